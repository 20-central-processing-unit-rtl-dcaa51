// toy8_memory_tb: TOY-8 main memory. Checks ordinary words against a model,
// that M[0] reads 0 even after a write, that M[F] returns stdin_data and
// pulses stdin_read only on a strobed read, and that a store to M[F] pulses
// stdout_valid with the stored word and leaves the bank unchanged.
module toy8_memory_tb;
  localparam int W = 8, N = 4;
  logic clk = 0, rst_n = 0, write = 0, read_strobe = 0;
  logic [N-1:0] addr = '0;
  logic [W-1:0] in_bus = '0, out_bus, stdin_data = '0, stdout_data;
  logic stdin_read, stdout_valid;
  logic [W-1:0] model [2**N];
  int checks = 0, failures = 0;

  toy8_memory #(.W(W), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .addr(addr), .in_bus(in_bus), .write(write),
    .read_strobe(read_strobe), .out_bus(out_bus), .stdin_data(stdin_data),
    .stdin_read(stdin_read), .stdout_data(stdout_data), .stdout_valid(stdout_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (addr=%0d out=%h)", what, addr, out_bus);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      addr = N'($urandom); in_bus = W'($urandom); write = 1'($urandom);
      read_strobe = ~write & 1'($urandom); stdin_data = W'($urandom);
      #1;
      if (addr == '1) begin
        if (!write) chk(out_bus === stdin_data, "M[F] reads stdin");
        chk(stdin_read === (read_strobe & ~write), "stdin_read pulse");
        chk(stdout_valid === write, "stdout_valid on store to M[F]");
        if (write) chk(stdout_data === in_bus, "stdout_data");
      end else begin
        chk(stdin_read === 1'b0 && stdout_valid === 1'b0, "no I/O away from M[F]");
        if (addr == '0) chk(out_bus === '0, "M[0] reads 0");
        else chk(out_bus === model[addr], "ordinary read");
      end
      @(posedge clk);
      if (write && addr != '0 && addr != '1) model[addr] = in_bus;
      #1;
    end
    write = 0; read_strobe = 0;
    addr = '0; #1 chk(out_bus === '0, "M[0] still 0");
    for (int a = 1; a < 15; a++) begin
      addr = N'(a); #1 chk(out_bus === model[a], "final sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
