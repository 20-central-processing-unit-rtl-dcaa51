// word_register: W memory bits sharing a single WRITE pulse.
//
// Bit i of the input bus feeds memory bit i and every bit is written by the
// same WRITE line, so the whole word is loaded at once; the stored word is
// always on the output bus. In the TOY-8 CPU this is R and IR (8 bits), the PC
// register (4 bits) and each word of the memory bank.
// Timing: out_bus takes in_bus at the rising clk edge on which write is 1.
module word_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_bus,
  input  logic         write,
  output logic [W-1:0] out_bus
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    memory_bit u_bit (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (in_bus[i]),
      .write(write),
      .q    (out_bus[i])
    );
  end

endmodule
