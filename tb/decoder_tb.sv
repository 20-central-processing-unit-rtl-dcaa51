// decoder_tb: exhaustive check of the 4-to-16 decoder with the enable high
// (one-hot line at the address) and low (all lines low).
module decoder_tb;
  localparam int N = 4;
  logic [N-1:0]    addr;
  logic            en;
  logic [2**N-1:0] y;
  int checks = 0, failures = 0;

  decoder #(.N(N)) dut (.addr(addr), .en(en), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 2**N; a++) begin
        logic [2**N-1:0] expv;
        addr = N'(a); en = 1'(e);
        expv = (e != 0) ? (2**N)'(1) << a : '0;
        #1;
        checks++;
        if (y !== expv) begin
          failures++;
          $display("mismatch: addr=%0d en=%0b y=%h exp=%h", a, e, y, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
