// decoder: N-bit address to 2^N one-hot lines, gated by an enable.
//
// Line a is high when addr == a and en is high, so with en tied to a WRITE
// pulse it works as the demux that routes WRITE to one memory word, and with
// en tied high it produces the selection lines of a one-hot bus mux.
// Purely combinational.
module decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      addr,
  input  logic              en,
  output logic [2**N-1:0]   y
);

  always_comb begin
    y = '0;
    y[addr] = en;
  end

endmodule
