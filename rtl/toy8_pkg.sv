// toy8_pkg: constants and types shared by the TOY-8 CPU.
//
// TOY-8 is an 8-bit teaching machine: 16 words of 8-bit memory, one 8-bit
// register R, a 4-bit program counter and a single instruction format
//   IR[7:5] opcode | IR[4] unused | IR[3:0] addr
// The eight opcodes are printed on the reference card as the even hex digits
// 0,2,...,E of the high nibble; here they are the 3-bit field IR[7:5].
// The control-wire bundle ctrl_t carries the 15 control wires named in the
// design (HALT, ALU ADD/XOR/AND, R MUX ALU/MEMORY/IR, R WRITE, IR WRITE,
// MEMORY WRITE, PC INCREMENT/LOAD/WRITE, ADDR MUX PC/IR).
package toy8_pkg;

  localparam int unsigned WORD_W = 8;  // word and register width
  localparam int unsigned ADDR_N = 4;  // address and PC width

  typedef enum logic [2:0] {
    OP_HALT  = 3'h0,  // 0x: halt
    OP_ADD   = 3'h1,  // 2x: R = R + M[addr]
    OP_AND   = 3'h2,  // 4x: R = R & M[addr]
    OP_XOR   = 3'h3,  // 6x: R = R ^ M[addr]
    OP_LDA   = 3'h4,  // 8x: R = addr
    OP_LOAD  = 3'h5,  // Ax: R = M[addr]
    OP_STORE = 3'h6,  // Cx: M[addr] = R
    OP_BRZ   = 3'h7   // Ex: if (R == 0) PC = addr
  } opcode_e;

  typedef struct packed {
    logic halt;
    logic alu_add;
    logic alu_xor;
    logic alu_and;
    logic r_mux_alu;
    logic r_mux_mem;
    logic r_mux_ir;
    logic r_write;
    logic ir_write;
    logic mem_write;
    logic pc_increment;
    logic pc_load;
    logic pc_write;
    logic addr_mux_pc;
    logic addr_mux_ir;
  } ctrl_t;

endpackage
