// incrementer_tb: exhaustive check of the 4-bit incrementer against x + 1,
// including the carry out of the top cell.
module incrementer_tb;
  localparam int N = 4;
  logic [N-1:0] x, z;
  logic         co;
  int checks = 0, failures = 0;

  incrementer #(.N(N)) dut (.x(x), .z(z), .carry_out(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**N; i++) begin
      logic [N:0] e;
      x = N'(i);
      e = (N+1)'(i + 1);
      #1;
      checks++;
      if ({co, z} !== e) begin
        failures++;
        $display("mismatch: x=%h z=%h co=%b exp=%h", x, z, co, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
