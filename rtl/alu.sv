// alu: TOY-8 arithmetic/logic unit with an adder, a bitwise AND and a
// bitwise XOR.
//
// All three results are computed in parallel from a (R) and b (the memory
// output bus); the one-hot control lines ALU ADD, ALU XOR and ALU AND pick
// one through a one-hot bus mux, so with none of them high the output is 0.
// The sum is modulo 2^W. Purely combinational. Which units the ALU has and
// its control lines follow the CPU description; the adder-plus-mux structure
// is this design's choice.
module alu #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         op_add,
  input  logic         op_xor,
  input  logic         op_and,
  output logic [W-1:0] y
);

  logic [W-1:0] sum, x_xor, x_and;

  assign sum   = a + b;
  assign x_xor = a ^ b;
  assign x_and = a & b;

  bus_mux #(.W(W), .M(3)) u_mux (
    .in_bus ({x_and, x_xor, sum}),
    .sel    ({op_and, op_xor, op_add}),
    .out_bus(y)
  );

endmodule
