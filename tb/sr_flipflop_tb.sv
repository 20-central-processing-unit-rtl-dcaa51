// sr_flipflop_tb: drives set, reset and hold on the SR flip-flop and compares
// Q after each clk edge with a reference state kept in the testbench.
module sr_flipflop_tb;
  logic clk = 0, rst_n = 0, s = 0, r = 0, q;
  int checks = 0, failures = 0;
  logic ref_q;

  sr_flipflop dut (.clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 1'b0) failures++;
    rst_n = 1; ref_q = 0;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 2);
      s = (k == 1); r = (k == 2);
      @(posedge clk);
      if (s) ref_q = 1; else if (r) ref_q = 0;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch at %0d: s=%0b r=%0b q=%0b exp=%0b", i, s, r, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
