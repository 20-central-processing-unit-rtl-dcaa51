// program_counter: the TOY-8 PC, an N-bit register with increment and load.
//
// An incrementer computes PC + 1 from the register output; a one-hot 2-way
// bus mux chooses between it (INCREMENT) and the input bus (LOAD); the PC
// register takes the mux output when WRITE is 1. The current address is
// always on out_bus. Use: raise INCREMENT or LOAD (never both), then WRITE.
// Timing: out_bus changes at the rising clk edge on which write is 1. With
// neither INCREMENT nor LOAD the mux output is 0, so a bare WRITE clears the
// PC. Reset to 0 is this design's addition.
module program_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_bus,
  input  logic         increment,
  input  logic         load,
  input  logic         write,
  output logic [N-1:0] out_bus
);

  logic [N-1:0] inc;
  logic [N-1:0] next;
  logic         unused_carry;

  incrementer #(.N(N)) u_inc (.x(out_bus), .z(inc), .carry_out(unused_carry));

  bus_mux #(.W(N), .M(2)) u_mux (
    .in_bus ({in_bus, inc}),
    .sel    ({load, increment}),
    .out_bus(next)
  );

  word_register #(.W(N)) u_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_bus (next),
    .write  (write),
    .out_bus(out_bus)
  );

endmodule
