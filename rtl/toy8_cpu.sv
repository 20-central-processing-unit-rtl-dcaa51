// toy8_cpu: the complete TOY-8 computer - CPU, 16x8 main memory and the
// signals of its front panel.
//
// Components: ALU (adder, AND, XOR), main memory, register R, instruction
// register IR, program counter PC, control and the fetch/execute clock, tied
// together by busses and two one-hot bus muxes:
//   addr mux  memory address = PC (ADDR MUX PC) or IR[3:0] (ADDR MUX IR)
//   R mux     R input = ALU output, memory output or IR[3:0] zero-extended
// The memory output bus feeds IR and the ALU; R feeds the ALU, the memory
// input bus and the control (for branch-zero); IR[3:0] feeds the PC input bus.
//
// Each instruction takes two ticks: FETCH reads M[PC] into IR at the end of
// the fetch phase, EXECUTE carries out IR and writes the PC (PC + 1, or the
// branch target) together with R or memory at the end of the execute phase.
// A halt instruction stops the clock before anything is written, so after a
// halt at address a the PC still holds a.
//
// Front panel (used only while the clock is stopped): panel_load_pc copies
// the ADDR switches into the PC; panel_deposit writes the DATA switches into
// M[PC]. The lights show PC, R, IR, the memory output bus at the current
// address and the phase. run starts the clock (a one-clk pulse). The muxes
// that let the panel drive the PC and memory input busses are this design's
// own; the panel's connections are only named by the design.
//
// Standard I/O: reads of M[F] return stdin_data and pulse stdin_read when the
// word is consumed; stores to M[F] pulse stdout_valid with the word on
// stdout_data. M[0] always reads 0.
//
// Timing: single clk, registers written at the rising edge where the
// corresponding write pulse is high; tick is the CLOCK pulse (tie high for one
// phase per clk cycle). The instruction format needs W = 8 and N = 4.
module toy8_cpu
  import toy8_pkg::*;
#(
  parameter int unsigned W = WORD_W,
  parameter int unsigned N = ADDR_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         run,
  // front panel switches and buttons
  input  logic [N-1:0] panel_addr,
  input  logic [W-1:0] panel_data,
  input  logic         panel_load_pc,
  input  logic         panel_deposit,
  // standard input / output
  input  logic [W-1:0] stdin_data,
  output logic         stdin_read,
  output logic [W-1:0] stdout_data,
  output logic         stdout_valid,
  // lights
  output logic         halted,
  output logic [N-1:0] light_pc,
  output logic [W-1:0] light_r,
  output logic [W-1:0] light_ir,
  output logic [W-1:0] light_mem,
  output logic         light_fetch,
  output logic         light_execute
);

  // clock and control wires
  logic  running, fetch, fetch_write, execute, execute_write;
  ctrl_t ctrl;
  logic  panel;

  // busses
  logic [N-1:0] pc;
  logic [W-1:0] r, ir;
  logic [N-1:0] ir_addr;
  opcode_e      opcode;
  logic [W-1:0] mem_out, mem_in, alu_out, r_in;
  logic [N-1:0] mem_addr, pc_in;

  assign panel   = ~running;
  assign ir_addr = ir[N-1:0];
  assign opcode  = opcode_e'(ir[W-1 -: 3]);

  fe_clock u_clock (
    .clk          (clk),
    .rst_n        (rst_n),
    .tick         (tick),
    .run          (run),
    .halt         (ctrl.halt),
    .running      (running),
    .fetch        (fetch),
    .fetch_write  (fetch_write),
    .execute      (execute),
    .execute_write(execute_write)
  );

  control #(.W(W)) u_control (
    .fetch        (fetch),
    .fetch_write  (fetch_write),
    .execute      (execute),
    .execute_write(execute_write),
    .opcode       (opcode),
    .r            (r),
    .ctrl         (ctrl)
  );

  // addr mux: PC during fetch (and while the panel owns the machine), IR addr
  bus_mux #(.W(N), .M(2)) u_addr_mux (
    .in_bus ({ir_addr, pc}),
    .sel    ({ctrl.addr_mux_ir, ctrl.addr_mux_pc | panel}),
    .out_bus(mem_addr)
  );

  // memory input bus: R while running, DATA switches while halted
  bus_mux #(.W(W), .M(2)) u_mem_in_mux (
    .in_bus ({panel_data, r}),
    .sel    ({panel, running}),
    .out_bus(mem_in)
  );

  toy8_memory #(.W(W), .N(N)) u_memory (
    .clk         (clk),
    .rst_n       (rst_n),
    .addr        (mem_addr),
    .in_bus      (mem_in),
    .write       (ctrl.mem_write | (panel & panel_deposit)),
    .read_strobe (ctrl.r_write & (ctrl.r_mux_mem | ctrl.r_mux_alu)),
    .out_bus     (mem_out),
    .stdin_data  (stdin_data),
    .stdin_read  (stdin_read),
    .stdout_data (stdout_data),
    .stdout_valid(stdout_valid)
  );

  word_register #(.W(W)) u_ir (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_bus (mem_out),
    .write  (ctrl.ir_write),
    .out_bus(ir)
  );

  alu #(.W(W)) u_alu (
    .a     (r),
    .b     (mem_out),
    .op_add(ctrl.alu_add),
    .op_xor(ctrl.alu_xor),
    .op_and(ctrl.alu_and),
    .y     (alu_out)
  );

  // R mux
  bus_mux #(.W(W), .M(3)) u_r_mux (
    .in_bus ({W'(ir_addr), mem_out, alu_out}),
    .sel    ({ctrl.r_mux_ir, ctrl.r_mux_mem, ctrl.r_mux_alu}),
    .out_bus(r_in)
  );

  word_register #(.W(W)) u_r (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_bus (r_in),
    .write  (ctrl.r_write),
    .out_bus(r)
  );

  // PC input bus: IR addr (branch) while running, ADDR switches while halted
  bus_mux #(.W(N), .M(2)) u_pc_in_mux (
    .in_bus ({panel_addr, ir_addr}),
    .sel    ({panel, running}),
    .out_bus(pc_in)
  );

  program_counter #(.N(N)) u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_bus   (pc_in),
    .increment(ctrl.pc_increment),
    .load     (ctrl.pc_load | (panel & panel_load_pc)),
    .write    (ctrl.pc_write | (panel & panel_load_pc)),
    .out_bus  (pc)
  );

  assign halted        = ~running;
  assign light_pc      = pc;
  assign light_r       = r;
  assign light_ir      = ir;
  assign light_mem     = mem_out;
  assign light_fetch   = fetch;
  assign light_execute = execute;

endmodule
