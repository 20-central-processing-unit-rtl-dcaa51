// word_register_tb: loads random words with random WRITE pulses into the
// 8-bit register (R / IR width) and checks the output bus, including the
// figure's example of the value 5 replacing 12 on a WRITE.
module word_register_tb;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, write = 0;
  logic [W-1:0] in_bus = '0, out_bus, ref_v;
  int checks = 0, failures = 0;

  word_register #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .in_bus(in_bus), .write(write), .out_bus(out_bus));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [W-1:0] v, input logic w);
    in_bus = v; write = w;
    @(posedge clk);
    if (w) ref_v = v;
    #1;
    checks++;
    if (out_bus !== ref_v) begin
      failures++;
      $display("mismatch: in=%h w=%0b out=%h exp=%h", v, w, out_bus, ref_v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (out_bus !== '0) failures++;
    rst_n = 1; ref_v = '0;
    step(8'd12, 1);
    step(8'd5, 0);   // WRITE off: stays 12
    step(8'd5, 1);   // WRITE on: becomes 5
    for (int i = 0; i < 300; i++) step(W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
