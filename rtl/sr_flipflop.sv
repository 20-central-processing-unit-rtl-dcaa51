// sr_flipflop: set/reset flip-flop, the storage element every memory bit is
// built from.
//
// S sets the state to 1, R resets it to 0, and with both low the state holds;
// Q is always available. The classic circuit is a pair of cross-coupled
// switches whose feedback holds the value; this version samples S and R on the
// rising edge of clk so the whole machine stays synchronous. S and R must not
// be high together (checked by an assertion). rst_n clears the state
// asynchronously; the reset is this design's addition.
module sr_flipflop (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (s)  q <= 1'b1;
    else if (r)  q <= 1'b0;
  end

  a_not_both: assert property (@(posedge clk) !(s && r))
    else $error("sr_flipflop: S and R asserted together");

endmodule
