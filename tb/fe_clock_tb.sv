// fe_clock_tb: fetch/execute clock. With a sparse, irregular tick the phase
// must alternate FETCH/EXECUTE at each tick, the write pulses must equal the
// phase ANDed with the tick, nothing may run before RUN, and HALT must stop
// the clock and suppress its EXECUTE WRITE. A reference model of the two
// state bits is kept in the testbench.
module fe_clock_tb;
  logic clk = 0, rst_n = 0, tick = 0, run = 0, halt = 0;
  logic running, fetch, fetch_write, execute, execute_write;
  logic m_run, m_phase;
  int checks = 0, failures = 0;
  int n_fw = 0, n_ew = 0, n_halt = 0;

  fe_clock dut (.clk(clk), .rst_n(rst_n), .tick(tick), .run(run), .halt(halt), .running(running),
                .fetch(fetch), .fetch_write(fetch_write), .execute(execute), .execute_write(execute_write));

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
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; m_run = 0; m_phase = 0;
    for (int i = 0; i < 1500; i++) begin
      tick = ($urandom_range(0, 2) == 0);
      run  = ($urandom_range(0, 40) == 0);
      halt = m_run & m_phase & ($urandom_range(0, 15) == 0);
      #1;
      chk(running === m_run, "running");
      chk(fetch === (m_run & ~m_phase), "FETCH");
      chk(execute === (m_run & m_phase), "EXECUTE");
      chk(fetch_write === (m_run & ~m_phase & tick), "FETCH WRITE = FETCH & CLOCK");
      chk(execute_write === (m_run & m_phase & tick & ~halt), "EXECUTE WRITE = EXECUTE & CLOCK");
      if (fetch_write) n_fw++;
      if (execute_write) n_ew++;
      if (halt) n_halt++;
      @(posedge clk);
      if (halt) m_run = 0;
      else if (run && !m_run) begin m_run = 1; m_phase = 0; end
      else if (m_run && tick) m_phase = ~m_phase;
      #1;
    end
    tick = 0; run = 0; halt = 0;
    chk(n_fw > 10 && n_ew > 10 && n_halt > 3, "all events seen");
    $display("fetch writes %0d, execute writes %0d, halts %0d", n_fw, n_ew, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
