// memory_bit_tb: random d and WRITE; the bit must take d only on clk edges
// where WRITE is 1 and hold otherwise.
module memory_bit_tb;
  logic clk = 0, rst_n = 0, d = 0, write = 0, q;
  int checks = 0, failures = 0;
  logic ref_q;

  memory_bit dut (.clk(clk), .rst_n(rst_n), .d(d), .write(write), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; ref_q = 0;
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom); write = 1'($urandom);
      @(posedge clk);
      if (write) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch at %0d: d=%0b w=%0b q=%0b exp=%0b", i, d, write, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
