// toy8_memory: TOY-8 main memory, 16 words of 8 bits with two special
// addresses.
//
//   M[0] always reads 0 (writes to it are dropped), so programs have a zero.
//   M[F] is standard input/output: a read returns stdin_data, and when the
//   CPU consumes that word (read_strobe high while addr == F and write low)
//   stdin_read pulses for one clk so the source can present its next word.
//   A store to M[F] does not change the bank; it pulses stdout_valid for the
//   clk cycle of the write with the stored word on stdout_data.
// All other addresses go to a memory_bank (its words 0 and F exist but are
// never written). Reads are combinational, writes
// take effect at the rising clk edge on which write is 1. The two special
// addresses follow the TOY-8 reference card; the stdin/stdout handshake is
// this design's own.
module toy8_memory
  import toy8_pkg::*;
#(
  parameter int unsigned W = WORD_W,
  parameter int unsigned N = ADDR_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] addr,
  input  logic [W-1:0] in_bus,
  input  logic         write,
  input  logic         read_strobe,
  output logic [W-1:0] out_bus,
  input  logic [W-1:0] stdin_data,
  output logic         stdin_read,
  output logic [W-1:0] stdout_data,
  output logic         stdout_valid
);

  localparam logic [N-1:0] A_ZERO = '0;
  localparam logic [N-1:0] A_IO   = '1;

  logic         is_zero, is_io;
  logic [W-1:0] bank_out;

  assign is_zero = (addr == A_ZERO);
  assign is_io   = (addr == A_IO);

  memory_bank #(.W(W), .N(N)) u_bank (
    .clk    (clk),
    .rst_n  (rst_n),
    .addr   (addr),
    .in_bus (in_bus),
    .write  (write & ~is_zero & ~is_io),
    .out_bus(bank_out)
  );

  always_comb begin
    if (is_zero)    out_bus = '0;
    else if (is_io) out_bus = stdin_data;
    else            out_bus = bank_out;
  end

  assign stdin_read   = read_strobe & is_io & ~write;
  assign stdout_valid = write & is_io;
  assign stdout_data  = in_bus;

endmodule
