// control: the combinational circuit that sequences the TOY-8 control wires.
//
// Inputs are the four wires of the fetch/execute clock, the 3-bit opcode
// IR[7:5] and the contents of R; the output is the 15-wire bundle ctrl_t.
//   FETCH          ADDR MUX PC            (memory addressed by the PC)
//   FETCH WRITE    IR WRITE               (instruction into IR)
//   EXECUTE        PC INCREMENT, or PC LOAD for branch-zero when R == 0,
//                  plus the instruction's selections below
//   EXECUTE WRITE  PC WRITE, plus the instruction's write below
// Per instruction (EXECUTE selections / EXECUTE WRITE write):
//   halt        HALT / -
//   add,and,xor ADDR MUX IR, ALU ADD|AND|XOR, R MUX ALU / R WRITE
//   load addr   R MUX IR / R WRITE
//   load        ADDR MUX IR, R MUX MEMORY / R WRITE
//   store       ADDR MUX IR / MEMORY WRITE
//   branch zero (PC LOAD instead of PC INCREMENT when R == 0) / -
// Selections are levels for the whole phase; writes are the phase's write
// pulse ANDed with the instruction, so they last one clk. The sequences follow
// the TOY-8 control-wire tables; the gate-level form is written as logic
// equations here.
module control
  import toy8_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         fetch,
  input  logic         fetch_write,
  input  logic         execute,
  input  logic         execute_write,
  input  opcode_e      opcode,
  input  logic [W-1:0] r,
  output ctrl_t        ctrl
);

  logic r_zero;
  logic is_alu, is_halt, writes_r;

  assign r_zero = (r == '0);

  always_comb begin
    is_halt  = (opcode == OP_HALT);
    is_alu   = (opcode == OP_ADD) || (opcode == OP_AND) || (opcode == OP_XOR);
    writes_r = is_alu || (opcode == OP_LDA) || (opcode == OP_LOAD);

    ctrl = '0;

    // fetch
    ctrl.addr_mux_pc = fetch;
    ctrl.ir_write    = fetch_write;

    // execute: PC update common to all instructions
    ctrl.pc_load      = execute & (opcode == OP_BRZ) & r_zero;
    ctrl.pc_increment = execute & ~ctrl.pc_load;
    ctrl.pc_write     = execute_write;

    // execute: per-instruction selections
    ctrl.halt        = execute & is_halt;
    ctrl.addr_mux_ir = execute & (is_alu || opcode == OP_LOAD || opcode == OP_STORE);
    ctrl.alu_add     = execute & (opcode == OP_ADD);
    ctrl.alu_and     = execute & (opcode == OP_AND);
    ctrl.alu_xor     = execute & (opcode == OP_XOR);
    ctrl.r_mux_alu   = execute & is_alu;
    ctrl.r_mux_mem   = execute & (opcode == OP_LOAD);
    ctrl.r_mux_ir    = execute & (opcode == OP_LDA);

    // execute write
    ctrl.r_write     = execute_write & writes_r;
    ctrl.mem_write   = execute_write & (opcode == OP_STORE);
  end

endmodule
