// memory_bank_tb: 16x8 memory bank against a reference array. Random writes
// and reads; every read compares the combinational output with the model,
// and a final sweep reads all words back. A second instance of the 4-word,
// 6-bit example size gets the same treatment.
module memory_bank_tb;
  localparam int W = 8, N = 4;
  logic clk = 0, rst_n = 0, write = 0;
  logic [N-1:0] addr = '0;
  logic [W-1:0] in_bus = '0, out_bus;
  logic [W-1:0] model [2**N];
  int checks = 0, failures = 0;

  // 4 words x 6 bits
  logic [1:0] s_addr = '0;
  logic [5:0] s_in = '0, s_out;
  logic       s_write = 0;
  logic [5:0] s_model [4];

  memory_bank #(.W(6), .N(2)) dut_small (.clk(clk), .rst_n(rst_n), .addr(s_addr), .in_bus(s_in),
                                         .write(s_write), .out_bus(s_out));

  memory_bank #(.W(W), .N(N)) dut (.clk(clk), .rst_n(rst_n), .addr(addr), .in_bus(in_bus),
                                   .write(write), .out_bus(out_bus));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [N-1:0] a);
    addr = a; write = 0; #1;
    checks++;
    if (out_bus !== model[a]) begin
      failures++;
      $display("mismatch: addr=%0d out=%h exp=%h", a, out_bus, model[a]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 2**N; a++) check_read(N'(a));
    for (int i = 0; i < 600; i++) begin
      addr = N'($urandom); in_bus = W'($urandom); write = 1'($urandom);
      @(posedge clk);
      if (write) model[addr] = in_bus;
      #1;
      check_read(N'($urandom));
    end
    for (int a = 0; a < 2**N; a++) check_read(N'(a));
    foreach (s_model[i]) s_model[i] = '0;
    for (int i = 0; i < 200; i++) begin
      s_addr = 2'($urandom); s_in = 6'($urandom); s_write = 1'($urandom);
      @(posedge clk);
      if (s_write) s_model[s_addr] = s_in;
      #1;
      s_write = 0; s_addr = 2'($urandom); #1;
      checks++;
      if (s_out !== s_model[s_addr]) begin
        failures++;
        $display("4x6 mismatch: addr=%0d out=%h exp=%h", s_addr, s_out, s_model[s_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
