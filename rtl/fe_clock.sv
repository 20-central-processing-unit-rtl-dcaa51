// fe_clock: the fetch/execute clock of the TOY-8 CPU.
//
// Two memory bits hold the state: 'running' and the phase bit (0 = FETCH,
// 1 = EXECUTE). While running, every CLOCK tick flips the phase bit, so the
// machine alternates FETCH and EXECUTE phases of one tick each. The write
// pulses are the phase ANDed with the tick:
//   FETCH WRITE   = FETCH   & tick
//   EXECUTE WRITE = EXECUTE & tick & ~HALT
// so the registers of the CPU are written at the clk edge that ends a phase.
// RUN (a one-clk pulse from a button) starts a stopped clock in FETCH. HALT
// (raised by the control during EXECUTE of a halt instruction) clears
// 'running' at the next clk edge and masks that phase's EXECUTE WRITE, so a
// halt instruction changes no register. Reset leaves the clock stopped.
// tick is the pulse of the physical clock, used as a clock enable: tied high
// it makes each phase one clk cycle long.
module fe_clock (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic run,
  input  logic halt,
  output logic running,
  output logic fetch,
  output logic fetch_write,
  output logic execute,
  output logic execute_write
);

  logic phase;
  logic start;
  logic run_d, run_w, phase_d, phase_w;

  assign start = run & ~running;

  // running: set by RUN, cleared by HALT
  always_comb begin
    run_w = halt | start;
    run_d = ~halt;
  end

  // phase: FETCH on start, flips on each tick while running
  always_comb begin
    phase_w = start | (running & tick & ~halt);
    phase_d = start ? 1'b0 : ~phase;
  end

  memory_bit u_running (.clk(clk), .rst_n(rst_n), .d(run_d),   .write(run_w),   .q(running));
  memory_bit u_phase   (.clk(clk), .rst_n(rst_n), .d(phase_d), .write(phase_w), .q(phase));

  assign fetch         = running & ~phase;
  assign execute       = running &  phase;
  assign fetch_write   = fetch & tick;
  assign execute_write = execute & tick & ~halt;

endmodule
