// alu_tb: random operands through each of ALU ADD, ALU XOR and ALU AND,
// compared with the sum modulo 256, the XOR and the AND; no control line
// must give 0.
module alu_tb;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic op_add, op_xor, op_and;
  int checks = 0, failures = 0;

  alu #(.W(W)) dut (.a(a), .b(b), .op_add(op_add), .op_xor(op_xor), .op_and(op_and), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = W'($urandom); b = W'($urandom);
      for (int k = 0; k < 4; k++) begin
        logic [W-1:0] expv;
        {op_and, op_xor, op_add} = (k == 3) ? 3'b000 : 3'(1 << k);
        case (k)
          0: expv = W'(int'(a) + int'(b));
          1: expv = a ^ b;
          2: expv = a & b;
          default: expv = '0;
        endcase
        #1;
        checks++;
        if (y !== expv) begin
          failures++;
          $display("mismatch: k=%0d a=%h b=%h y=%h exp=%h", k, a, b, y, expv);
        end
      end
    end
    // the sample program's addition: 05 + 08 = 0D
    a = 8'h05; b = 8'h08; {op_and, op_xor, op_add} = 3'b001; #1;
    checks++; if (y !== 8'h0D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
