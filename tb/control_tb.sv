// control_tb: for every opcode, both R == 0 and R != 0, and every legal
// combination of the clock wires, compares the 15 control wires with the
// control-wire table written out independently in the testbench.
module control_tb;
  import toy8_pkg::*;
  localparam int W = 8;
  logic fetch, fetch_write, execute, execute_write;
  opcode_e opcode;
  logic [W-1:0] r;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  control #(.W(W)) dut (.fetch(fetch), .fetch_write(fetch_write), .execute(execute),
                        .execute_write(execute_write), .opcode(opcode), .r(r), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // phases: 0 idle, 1 fetch, 2 fetch+fetch write, 3 execute, 4 execute+execute write
    for (int ph = 0; ph < 5; ph++)
      for (int op = 0; op < 8; op++)
        for (int rz = 0; rz < 2; rz++) begin
          fetch = (ph == 1 || ph == 2); fetch_write = (ph == 2);
          execute = (ph == 3 || ph == 4); execute_write = (ph == 4);
          opcode = opcode_e'(op);
          r = (rz != 0) ? 8'h00 : 8'($urandom_range(1, 255));
          e = '0;
          if (fetch) e.addr_mux_pc = 1;
          if (fetch_write) e.ir_write = 1;
          if (execute) begin
            if (op == 7 && rz != 0) e.pc_load = 1; else e.pc_increment = 1;
            case (op)
              0: e.halt = 1;
              1: begin e.addr_mux_ir = 1; e.alu_add = 1; e.r_mux_alu = 1; end
              2: begin e.addr_mux_ir = 1; e.alu_and = 1; e.r_mux_alu = 1; end
              3: begin e.addr_mux_ir = 1; e.alu_xor = 1; e.r_mux_alu = 1; end
              4: e.r_mux_ir = 1;
              5: begin e.addr_mux_ir = 1; e.r_mux_mem = 1; end
              6: e.addr_mux_ir = 1;
              default: ;
            endcase
          end
          if (execute_write) begin
            e.pc_write = 1;
            if (op >= 1 && op <= 5) e.r_write = 1;
            if (op == 6) e.mem_write = 1;
          end
          #1;
          checks++;
          if (ctrl !== e) begin
            failures++;
            $display("mismatch: phase=%0d op=%0d rzero=%0d ctrl=%b exp=%b", ph, op, rz, ctrl, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
