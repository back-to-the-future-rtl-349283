// Testbench for branch_unit: random operands for each branch kind; taken
// flags and targets computed independently from the MIPS definitions.
module tb_branch_unit;
  import cslow_pkg::*;
  br_kind_e br;
  logic jr;
  logic [25:0] jidx;
  logic [31:0] pc, imm, rs, rt, target;
  logic taken;
  int checks = 0, failures = 0;
  branch_unit dut (.br(br), .jump_reg(jr), .jidx(jidx), .pc(pc), .imm(imm), .rs_val(rs),
    .rt_val(rt), .taken(taken), .target(target));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic et;
      logic [31:0] etg;
      longint srs;
      br = br_kind_e'($urandom % 8); jr = 1'($urandom); jidx = 26'($urandom);
      pc = {30'($urandom), 2'b00}; imm = {{16{1'b0}}, 16'($urandom)}; if (imm[15]) imm[31:16] = 16'hffff;
      rs = $urandom; rt = ($urandom % 3 == 0) ? rs : $urandom;
      if (i % 11 == 0) rs = 0;
      #1;
      srs = longint'($signed(rs));
      case (br)
        BR_EQ: et = rs == rt;   BR_NE: et = rs != rt;
        BR_LEZ: et = srs <= 0;  BR_GTZ: et = srs > 0;
        BR_LTZ: et = srs < 0;   BR_GEZ: et = srs >= 0;
        BR_JUMP: et = 1;        default: et = 0;
      endcase
      if (br == BR_JUMP) etg = jr ? rs : (((pc + 4) & 32'hf0000000) | (32'(jidx) * 4));
      else etg = pc + 4 + imm * 4;
      checks++;
      if (taken != et || (br != BR_NONE && target != etg)) begin
        failures++; $display("br=%s taken=%0d/%0d target=%h/%h", br.name(), taken, et, target, etg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
