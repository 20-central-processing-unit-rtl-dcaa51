// program_counter_tb: 4-bit PC. Random sequences of "increment, then write",
// "load, then write" and no write, checked against a reference counter that
// wraps at 16; also the branch-style load of the input bus.
module program_counter_tb;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, increment = 0, load = 0, write = 0;
  logic [N-1:0] in_bus = '0, out_bus, ref_pc;
  int checks = 0, failures = 0;

  program_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_bus(in_bus), .increment(increment),
                                .load(load), .write(write), .out_bus(out_bus));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input int kind, input logic [N-1:0] v);
    // kind 0: increment+write, 1: load+write, 2: increment without write
    in_bus = v; increment = (kind != 1); load = (kind == 1); write = (kind != 2);
    @(posedge clk);
    if (kind == 0) ref_pc = ref_pc + 1'b1;
    else if (kind == 1) ref_pc = v;
    #1;
    increment = 0; load = 0; write = 0;
    checks++;
    if (out_bus !== ref_pc) begin
      failures++;
      $display("mismatch: kind=%0d v=%h pc=%h exp=%h", kind, v, out_bus, ref_pc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (out_bus !== '0) failures++;
    rst_n = 1; ref_pc = '0;
    for (int i = 0; i < 20; i++) op(0, '0);        // counts past 15 and wraps
    op(1, 4'h9);
    op(2, 4'h0);
    for (int i = 0; i < 400; i++) op($urandom_range(0, 2), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
