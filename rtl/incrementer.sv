// incrementer: computes z = x + 1 with a ripple of half-adder cells.
//
// It is a bitwise adder with the y inputs removed and carry-in tied to 1:
// in each cell the carry out is x_i AND c_i and the sum bit is x_i XOR c_i.
// carry_out is the carry leaving the top cell (1 only when x is all ones, where
// z wraps to 0). Purely combinational.
module incrementer #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] z,
  output logic         carry_out
);

  logic [N:0] c;

  assign c[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_cell
    assign z[i]   = x[i] ^ c[i];
    assign c[i+1] = x[i] & c[i];
  end
  assign carry_out = c[N];

endmodule
