// bus_mux: one-hot M-way bus selector.
//
// M input busses of W lines and M selection lines, of which at most one is 1.
// Each output line is the OR over all busses of (input line AND its selection
// line), so there is no direct path from any input to the output: with no
// selection line high the output is all zeros. The one-hot rule is checked by
// an immediate assertion. Purely combinational.
module bus_mux #(
  parameter int unsigned W = 4,
  parameter int unsigned M = 3
) (
  input  logic [M-1:0][W-1:0] in_bus,
  input  logic [M-1:0]        sel,
  output logic [W-1:0]        out_bus
);

  always_comb begin
    out_bus = '0;
    for (int unsigned m = 0; m < M; m++)
      out_bus |= in_bus[m] & {W{sel[m]}};
  end

  always_comb begin
    a_onehot: assert ($onehot0(sel)) else $error("bus_mux: more than one selection line high");
  end

endmodule
