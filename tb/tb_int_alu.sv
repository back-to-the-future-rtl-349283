// Testbench for int_alu: random operands for every operation against
// arithmetic written out in the testbench.
module tb_int_alu;
  import cslow_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y, e;
  logic [4:0] sh;
  int checks = 0, failures = 0;
  int_alu dut (.op(op), .a(a), .b(b), .shamt(sh), .y(y));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'($urandom % 12);
      a = $urandom; b = $urandom; sh = 5'($urandom);
      if (i % 7 == 0) b = a;
      #1;
      case (op)
        ALU_ADD:  e = a + b;
        ALU_SUB:  e = a + ~b + 1;
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_XOR:  e = a ^ b;
        ALU_NOR:  e = ~(a | b);
        ALU_SLT:  e = ((a[31] != b[31]) ? a[31] : (a < b)) ? 1 : 0;
        ALU_SLTU: e = (a < b) ? 1 : 0;
        ALU_SLL:  e = b << sh;
        ALU_SRL:  e = b >> sh;
        ALU_SRA:  begin e = b >> sh; if (b[31]) for (int k = 0; k < 32; k++) if (k >= 32 - int'(sh)) e[k] = 1'b1; end
        ALU_LUI:  e = {b[15:0], 16'h0};
        default:  e = 0;
      endcase
      checks++;
      if (y != e) begin failures++; $display("op %s a=%h b=%h sh=%0d y=%h exp %h", op.name(), a, b, sh, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
