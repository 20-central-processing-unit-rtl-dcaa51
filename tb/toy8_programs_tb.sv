// toy8_programs_tb: runs two complete TOY-8 programs on the default-size
// computer and checks their standard output against values computed here.
//
//  Fibonacci (runs forever; stopped after 14 outputs, 0 .. 233):
//    1: AB  R = a          7: AD  R = t
//    2: CF  print a        8: CC  b = t
//    3: 2C  R = a + b      9: 80  R = 0
//    4: CD  t = R          A: E1  goto 1 (branch on R == 0)
//    5: AC  R = b          B: a = 00   C: b = 01   D: t
//    6: CB  a = b
//  Sum of standard input (numbers until a 0, sum modulo 256 printed):
//    1: 80  R = 0          7: 80  R = 0
//    2: CC  s = 0          8: E3  goto 3
//    3: AF  R = stdin      9: AC  R = s
//    4: E9  if 0 goto 9    A: CF  print s
//    5: 2C  R = R + s      B: 00  halt
//    6: CC  s = R          C: s
// The second program is run three times with random input lists; each
// stdin word is replaced after the CPU's stdin_read pulse. The instruction
// count of every run is checked: 2 ticks per instruction.
module toy8_programs_tb;
  logic clk = 0, rst_n = 0, tick = 1, run = 0;
  logic [3:0] panel_addr = '0;
  logic [7:0] panel_data = '0, stdin_data = '0;
  logic panel_load_pc = 0, panel_deposit = 0;
  logic stdin_read, stdout_valid, halted, light_fetch, light_execute;
  logic [7:0] stdout_data, light_r, light_ir, light_mem;
  logic [3:0] light_pc;
  int checks = 0, failures = 0;
  logic [7:0] outq[$];
  logic [7:0] inq[$];
  int n_fetch;

  toy8_cpu dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .run(run),
    .panel_addr(panel_addr), .panel_data(panel_data),
    .panel_load_pc(panel_load_pc), .panel_deposit(panel_deposit),
    .stdin_data(stdin_data), .stdin_read(stdin_read),
    .stdout_data(stdout_data), .stdout_valid(stdout_valid),
    .halted(halted), .light_pc(light_pc), .light_r(light_r), .light_ir(light_ir),
    .light_mem(light_mem), .light_fetch(light_fetch), .light_execute(light_execute));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (stdout_valid) outq.push_back(stdout_data);
    if (light_fetch && tick) n_fetch++;
  end

  // standard input source: present the head of inq, pop it when consumed
  logic stdin_read_seen = 0;
  always @(posedge clk) if (stdin_read) stdin_read_seen = 1;

  always @(negedge clk) begin
    if (stdin_read_seen) begin
      if (inq.size() > 0) void'(inq.pop_front());
      stdin_read_seen = 0;
    end
    stdin_data = (inq.size() > 0) ? inq[0] : 8'h00;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic set_pc(input logic [3:0] a);
    @(negedge clk);
    panel_addr = a; panel_load_pc = 1;
    @(negedge clk);
    panel_load_pc = 0;
  endtask

  task automatic deposit(input logic [3:0] a, input logic [7:0] d);
    set_pc(a);
    panel_data = d; panel_deposit = 1;
    @(negedge clk);
    panel_deposit = 0;
  endtask

  task automatic start(input logic [3:0] pc0);
    set_pc(pc0);
    @(negedge clk) run = 1;
    @(negedge clk) run = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- Fibonacci ---------------------------------------------------------
    begin
      automatic logic [7:0] prog [13] = '{8'hAB, 8'hCF, 8'h2C, 8'hCD, 8'hAC, 8'hCB, 8'hAD,
                                8'hCC, 8'h80, 8'hE1, 8'h00, 8'h01, 8'h00};
      int a, b, t;
      for (int i = 0; i < 13; i++) deposit(4'(i + 1), prog[i]);
      outq.delete();
      n_fetch = 0;
      start(4'h1);
      wait (outq.size() == 14);
      // the 14th output comes from the second instruction of loop pass 14:
      // 13 passes of 10 instructions plus 2
      chk(n_fetch == 13 * 10 + 2, $sformatf("Fibonacci: 132 instructions for 14 outputs (got %0d)", n_fetch));
      a = 0; b = 1;
      for (int k = 0; k < 14; k++) begin
        chk(outq[k] == 8'(a), $sformatf("Fibonacci output %0d: got %0d, expected %0d", k, outq[k], a));
        t = a + b; a = b; b = t;
      end
      chk(!halted, "Fibonacci program keeps running");
      // stop it: reset returns the machine to the stopped state
      @(negedge clk) rst_n = 0;
      @(negedge clk) rst_n = 1;
      chk(halted, "stopped by reset");
    end

    // ---- sum of standard input ---------------------------------------------
    for (int trial = 0; trial < 3; trial++) begin
      automatic logic [7:0] prog [12] = '{8'h80, 8'hCC, 8'hAF, 8'hE9, 8'h2C, 8'hCC, 8'h80,
                                8'hE3, 8'hAC, 8'hCF, 8'h00, 8'h00};
      int cnt, sum;
      for (int i = 0; i < 12; i++) deposit(4'(i + 1), prog[i]);
      cnt = (trial == 0) ? 0 : $urandom_range(1, 12);
      sum = 0;
      inq.delete();
      for (int i = 0; i < cnt; i++) begin
        logic [7:0] v;
        v = 8'($urandom_range(1, 255));
        inq.push_back(v);
        sum += int'(v);
      end
      inq.push_back(8'h00);
      outq.delete();
      n_fetch = 0;
      start(4'h1);
      for (int i = 0; i < 2000 && !halted; i++) @(negedge clk);
      chk(halted, "sum program halted");
      chk(outq.size() == 1 && outq[0] == 8'(sum),
          $sformatf("sum of %0d inputs: got %0d, expected %0d", cnt, (outq.size() > 0) ? outq[0] : 8'h00, sum % 256));
      chk(inq.size() == 0, "all input consumed");
      // 2 setup + 6 per number + 2 for the final 0 + 3 to print and halt
      chk(n_fetch == 2 + 6 * cnt + 2 + 3, $sformatf("sum program instruction count (got %0d)", n_fetch));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
