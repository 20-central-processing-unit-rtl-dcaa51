// memory_bit: one bit of storage with a data input and a WRITE control.
//
// Instead of driving S and R directly, the value is offered on d and WRITE
// decides when it is taken: S = WRITE & d, R = WRITE & ~d. With WRITE low
// neither control is active and the flip-flop holds. The stored value is on q
// at all times. Timing: q takes d at the rising clk edge on which write is 1.
module memory_bit (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic write,
  output logic q
);

  logic set, reset;

  assign set   = write &  d;
  assign reset = write & ~d;

  sr_flipflop u_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .s    (set),
    .r    (reset),
    .q    (q)
  );

endmodule
