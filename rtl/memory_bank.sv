// memory_bank: 2^N words of W bits built from registers of memory bits.
//
// A decoder/demux routes the WRITE pulse to the one word selected by addr,
// and a second decoding of the same address drives the selection lines of a
// one-hot bus mux that puts the selected word on the output bus. Reading is
// therefore combinational (out_bus follows addr), writing happens at the
// rising clk edge on which write is 1. rst_n clears every word; the reset is
// this design's addition.
module memory_bank #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] addr,
  input  logic [W-1:0] in_bus,
  input  logic         write,
  output logic [W-1:0] out_bus
);

  localparam int unsigned WORDS = 2**N;

  logic [WORDS-1:0]        word_write;
  logic [WORDS-1:0]        word_sel;
  logic [WORDS-1:0][W-1:0] word_out;

  decoder #(.N(N)) u_demux (.addr(addr), .en(write), .y(word_write));
  decoder #(.N(N)) u_sel   (.addr(addr), .en(1'b1),  .y(word_sel));

  for (genvar a = 0; a < WORDS; a++) begin : g_word
    word_register #(.W(W)) u_word (
      .clk    (clk),
      .rst_n  (rst_n),
      .in_bus (in_bus),
      .write  (word_write[a]),
      .out_bus(word_out[a])
    );
  end

  bus_mux #(.W(W), .M(WORDS)) u_out (
    .in_bus (word_out),
    .sel    (word_sel),
    .out_bus(out_bus)
  );

endmodule
