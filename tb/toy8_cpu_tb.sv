// toy8_cpu_tb: end-to-end test of the TOY-8 computer at its default size.
//
// Programs are entered through the front panel (load PC from ADDR, deposit
// DATA), started with RUN and checked when the machine halts.
//  1. The sample program  A5 26 C7 00 05 08 at address 1: R = M[5] + M[6],
//     stored to M[7], then halt. Expected R = 0D, M[7] = 0D, PC = 4, IR = 00,
//     and exactly 4 instructions x 2 ticks. The IR value after each fetch and
//     R after each execute are compared with the step-by-step trace.
//  2. A program using every instruction: load address, and, xor, branch-zero
//     not taken and taken, a load of M[0], standard output and standard input.
//  3. Program 1 again with an irregular tick: the phases stretch but the
//     result and the number of write pulses stay the same; the halt stops
//     the clock before its execute tick, so the run takes 7 ticks.
// Mechanism counters (halt, branch taken / not taken, each R mux source,
// memory write, stdin read, stdout write, panel load / deposit) must all be
// non-zero at the end.
module toy8_cpu_tb;
  import toy8_pkg::*;

  logic clk = 0, rst_n = 0, tick = 1, run = 0;
  logic [3:0] panel_addr = '0;
  logic [7:0] panel_data = '0, stdin_data = '0;
  logic panel_load_pc = 0, panel_deposit = 0;
  logic stdin_read, stdout_valid, halted, light_fetch, light_execute;
  logic [7:0] stdout_data, light_r, light_ir, light_mem;
  logic [3:0] light_pc;
  int checks = 0, failures = 0;
  int ticks_run, fw_run, ew_run;
  logic tick_random = 0;
  logic [7:0] outq[$];

  // mechanism counters
  int n_halt = 0, n_br_taken = 0, n_br_not = 0, n_rmux_alu = 0, n_rmux_mem = 0, n_rmux_ir = 0;
  int n_mem_write = 0, n_stdin = 0, n_stdout = 0, n_panel_load = 0, n_panel_dep = 0;
  int n_add = 0, n_and = 0, n_xor = 0;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (tick_random) tick <= ($urandom_range(0, 2) == 0);

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.ctrl.halt) n_halt++;
      if (dut.ctrl.pc_write && dut.ctrl.pc_load) n_br_taken++;
      if (dut.ctrl.pc_write && dut.opcode == OP_BRZ && dut.ctrl.pc_increment) n_br_not++;
      if (dut.ctrl.r_write && dut.ctrl.r_mux_alu) n_rmux_alu++;
      if (dut.ctrl.r_write && dut.ctrl.r_mux_mem) n_rmux_mem++;
      if (dut.ctrl.r_write && dut.ctrl.r_mux_ir) n_rmux_ir++;
      if (dut.ctrl.r_write && dut.ctrl.alu_add) n_add++;
      if (dut.ctrl.r_write && dut.ctrl.alu_and) n_and++;
      if (dut.ctrl.r_write && dut.ctrl.alu_xor) n_xor++;
      if (dut.ctrl.mem_write) n_mem_write++;
      if (stdin_read) n_stdin++;
      if (stdout_valid) begin n_stdout++; outq.push_back(stdout_data); end
      if (halted && panel_load_pc) n_panel_load++;
      if (halted && panel_deposit) n_panel_dep++;
      if (!halted && tick) ticks_run++;
      if (dut.fetch_write) fw_run++;
      if (dut.execute_write) ew_run++;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (pc=%h r=%h ir=%h mem=%h)", $time, what, light_pc, light_r, light_ir, light_mem);
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

  function automatic logic [7:0] peek_val(input logic [3:0] a);
    return dut.u_memory.u_bank.word_out[a];
  endfunction

  task automatic examine(input logic [3:0] a, input logic [7:0] expv, input string what);
    set_pc(a);
    #1 chk(light_mem === expv, what);
  endtask

  task automatic start_and_wait(input logic [3:0] start_pc, input int max_cycles);
    set_pc(start_pc);
    ticks_run = 0; fw_run = 0; ew_run = 0;
    @(negedge clk) run = 1;
    @(negedge clk) run = 0;
    for (int i = 0; i < max_cycles && !halted; i++) @(negedge clk);
    chk(halted, "machine halted");
  endtask

  // program 1: the sample program
  task automatic load_sample();
    automatic logic [7:0] prog [6] = '{8'hA5, 8'h26, 8'hC7, 8'h00, 8'h05, 8'h08};
    for (int i = 0; i < 6; i++) deposit(4'(i + 1), prog[i]);
    deposit(4'h7, 8'h00);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(halted, "stopped after reset");

    // ---- program 1 with the trace --------------------------------------
    load_sample();
    examine(4'h1, 8'hA5, "deposit visible on lights");
    set_pc(4'h1);
    @(negedge clk) run = 1; ticks_run = 0;
    @(negedge clk) run = 0;
    begin
      automatic logic [7:0] exp_ir [4] = '{8'hA5, 8'h26, 8'hC7, 8'h00};
      automatic logic [7:0] exp_r  [3] = '{8'h05, 8'h0D, 8'h0D};
      for (int k = 0; k < 4; k++) begin
        chk(light_fetch && light_pc == 4'(k + 1), "FETCH at expected PC");
        @(negedge clk);   // fetch write happened
        chk(light_ir === exp_ir[k], "IR after fetch matches trace");
        chk(light_execute, "EXECUTE follows FETCH");
        @(negedge clk);   // execute write happened (or halt)
        if (k < 3) begin
          chk(light_r === exp_r[k], "R after execute matches trace");
          chk(light_pc === 4'(k + 2), "PC incremented");
        end
      end
    end
    chk(halted, "halted after 00");
    chk(ticks_run == 8, $sformatf("4 instructions take 8 ticks (got %0d)", ticks_run));
    chk(light_pc === 4'h4 && light_r === 8'h0D && light_ir === 8'h00, "final PC 4, R 0D, IR 00");
    chk(peek_val(4'h7) === 8'h0D, "M[7] = 0D");
    examine(4'h7, 8'h0D, "M[7] = 0D on lights");

    // ---- program 2: every instruction ------------------------------------
    begin
      automatic logic [7:0] prog [15] = '{
        8'h8C,   // 1: R = C
        8'h49,   // 2: R = R & M[9]   -> 08
        8'h6A,   // 3: R = R ^ M[A]   -> F7
        8'hE8,   // 4: branch zero, not taken
        8'hCF,   // 5: stdout F7
        8'hA0,   // 6: R = M[0] = 0
        8'hEB,   // 7: branch zero, taken to B
        8'h00,   // 8: halt (skipped)
        8'h0A,   // 9: data
        8'hFF,   // A: data
        8'h2F,   // B: R = R + stdin
        8'hCF,   // C: stdout R
        8'hCE,   // D: M[E] = R
        8'h00,   // E: overwritten by D with R = 42, which is then executed
        8'h00};
      // D stores R into E, which is then fetched as an instruction: 42 is
      // "and M[2]"; then the PC reaches F and the fetch reads standard input.
      for (int i = 0; i < 14; i++) deposit(4'(i + 1), prog[i]);
      deposit(4'h0, 8'h77);   // write to M[0] is dropped
      outq.delete();
      stdin_data = 8'h42;
      // stdin_data changes to 00 (halt) once consumed: next reads see 00
      fork
        begin
          @(posedge clk iff stdin_read);
          @(negedge clk) stdin_data = 8'h00;
        end
      join_none
      start_and_wait(4'h1, 200);
      chk(outq.size() == 2, "two words written to standard output");
      if (outq.size() == 2) begin
        chk(outq[0] === 8'hF7, "stdout (0C & 0A) ^ FF = F7");
        chk(outq[1] === 8'h42, "stdout 0 + stdin = 42");
      end
      chk(peek_val(4'hE) === 8'h42, "M[E] = 42");
      // E: 42 = and M[2] -> 42 & 49 = 40; F: fetch M[F] = stdin = 00 -> halt
      chk(light_r === 8'h40, "R = 40 after executing the stored word");
      chk(light_pc === 4'hF && light_ir === 8'h00, "halted at F on a fetched stdin 00");
      examine(4'h0, 8'h00, "M[0] reads 0 after a write");
      examine(4'h8, 8'h00, "skipped word unchanged");
    end

    // ---- program 3: sample program with an irregular tick ----------------
    load_sample();
    tick_random = 1;
    start_and_wait(4'h1, 400);
    tick_random = 0;
    @(negedge clk) tick = 1;
    chk(fw_run == 4 && ew_run == 3,
        $sformatf("irregular tick: 4 fetch writes, 3 execute writes (got %0d, %0d)", fw_run, ew_run));
    chk(ticks_run == 7, $sformatf("irregular tick: halt stops before its execute tick: 7 ticks (got %0d)", ticks_run));
    chk(light_pc === 4'h4 && light_r === 8'h0D, "irregular tick: same result");
    chk(peek_val(4'h7) === 8'h0D, "irregular tick: M[7] = 0D");

    // ---- mechanisms -------------------------------------------------------
    $display("halt %0d, branch taken %0d, not taken %0d, R<-ALU %0d (add %0d and %0d xor %0d), R<-MEM %0d, R<-IR %0d",
             n_halt, n_br_taken, n_br_not, n_rmux_alu, n_add, n_and, n_xor, n_rmux_mem, n_rmux_ir);
    $display("memory writes %0d, stdin reads %0d, stdout writes %0d, panel loads %0d, deposits %0d",
             n_mem_write, n_stdin, n_stdout, n_panel_load, n_panel_dep);
    chk(n_halt > 0, "halt happened");
    chk(n_br_taken > 0, "branch taken happened");
    chk(n_br_not > 0, "branch not taken happened");
    chk(n_add > 0 && n_and > 0 && n_xor > 0, "add, and, xor happened");
    chk(n_rmux_mem > 0 && n_rmux_ir > 0, "R loaded from memory and from IR");
    chk(n_mem_write > 0, "memory write happened");
    chk(n_stdin > 0 && n_stdout > 0, "standard input and output happened");
    chk(n_panel_load > 0 && n_panel_dep > 0, "front panel used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
