// Testbench for mips_decoder: hand-encoded MIPS instructions, decoded
// fields compared with the values the instruction set defines. Then 20000
// random instructions (three in four drawn from the supported opcodes and
// function codes with random register and immediate fields, the rest fully
// random) are compared field by field with a table-driven reference decoder.
module tb_mips_decoder;
  import cslow_pkg::*;
  logic [31:0] instr;
  dec_t dec;
  int checks = 0, failures = 0;
  mips_decoder dut (.instr(instr), .dec(dec));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] r_type(int rs, int rt, int rd, int sh, int fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask
  initial begin
    instr = r_type(3, 4, 5, 0, 'h21); #1;   // addu r5, r3, r4
    chk("addu", dec.alu_op == ALU_ADD && dec.rs == 3 && dec.rt == 4 && dec.dest == 5 && dec.reg_write && !dec.use_imm);
    instr = r_type(0, 4, 0, 0, 'h21); #1;   // addu r0 -> no write
    chk("addu r0", !dec.reg_write);
    instr = r_type(0, 7, 8, 3, 'h03); #1;   // sra r8, r7, 3
    chk("sra", dec.alu_op == ALU_SRA && dec.shamt == 3 && !dec.shamt_var && dec.dest == 8);
    instr = r_type(2, 7, 8, 0, 'h04); #1;   // sllv
    chk("sllv", dec.alu_op == ALU_SLL && dec.shamt_var);
    instr = r_type(9, 10, 0, 0, 'h18); #1;  // mult
    chk("mult", dec.is_md && dec.md_op == MD_MULT && !dec.reg_write);
    instr = r_type(9, 10, 0, 0, 'h1b); #1;  // divu
    chk("divu", dec.is_md && dec.md_op == MD_DIVU);
    instr = r_type(0, 0, 12, 0, 'h10); #1;  // mfhi r12
    chk("mfhi", dec.mfhi && dec.dest == 12 && dec.reg_write && !dec.is_md);
    instr = r_type(31, 0, 0, 0, 'h08); #1;  // jr r31
    chk("jr", dec.br == BR_JUMP && dec.jump_reg && !dec.reg_write);
    instr = r_type(5, 0, 31, 0, 'h09); #1;  // jalr r31, r5
    chk("jalr", dec.br == BR_JUMP && dec.jump_reg && dec.link && dec.dest == 31);
    instr = i_type('h09, 1, 2, 'hfffc); #1; // addiu r2, r1, -4
    chk("addiu", dec.use_imm && dec.imm == 32'hfffffffc && dec.dest == 2 && dec.alu_op == ALU_ADD);
    instr = i_type('h0d, 1, 2, 'h8001); #1; // ori zero-extends
    chk("ori", dec.alu_op == ALU_OR && dec.imm == 32'h00008001);
    instr = i_type('h0f, 0, 6, 'h1234); #1; // lui
    chk("lui", dec.alu_op == ALU_LUI && dec.dest == 6);
    instr = i_type('h23, 29, 4, 8); #1;     // lw r4, 8(r29)
    chk("lw", dec.is_load && dec.dest == 4 && dec.reg_write && dec.imm == 8 && dec.rs == 29);
    instr = i_type('h2b, 29, 4, 8); #1;     // sw
    chk("sw", dec.is_store && !dec.reg_write && dec.rt == 4);
    instr = i_type('h05, 1, 2, 'hfff0); #1; // bne
    chk("bne", dec.br == BR_NE && !dec.reg_write && dec.imm == 32'hfffffff0);
    instr = i_type('h01, 3, 1, 4); #1;      // bgez
    chk("bgez", dec.br == BR_GEZ);
    instr = {6'h03, 26'h0000100}; #1;       // jal
    chk("jal", dec.br == BR_JUMP && dec.link && dec.dest == 31 && dec.jidx == 26'h100 && !dec.jump_reg);
    instr = {6'h3f, 26'h0}; #1;
    chk("illegal", dec.illegal && !dec.reg_write && !dec.is_store);
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(3) != 0) begin
        instr = $urandom;
        if ($urandom_range(1) == 1) begin
          instr[31:26] = 6'h00;
          instr[5:0]   = fns[$urandom_range(fns.size() - 1)];
        end else instr[31:26] = ops[$urandom_range(ops.size() - 1)];
      end else instr = $urandom;
      #1;
      compare_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // supported encodings: opcode 0 function codes, and the other opcodes
  logic [5:0] fns [] = '{6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07, 6'h08, 6'h09, 6'h10, 6'h12,
                         6'h18, 6'h19, 6'h1a, 6'h1b, 6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25,
                         6'h26, 6'h27, 6'h2a, 6'h2b};
  logic [5:0] ops [] = '{6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07, 6'h08, 6'h09, 6'h0a,
                         6'h0b, 6'h0c, 6'h0d, 6'h0e, 6'h0f, 6'h23, 6'h2b};

  // reference: class of the instruction, then the fields each class implies
  task automatic compare_ref();
    string cls;                        // "alu_r", "shift", "shiftv", "jr", "jalr", "mfhi", "mflo",
                                       // "md", "alu_i", "lw", "sw", "branch", "j", "jal", "bad"
    alu_op_e  alu;
    br_kind_e br;
    md_op_e   md;
    bit       zext;
    logic [4:0] dst;
    logic [5:0] op, fn;
    op = instr[31:26]; fn = instr[5:0];
    alu = ALU_ADD; br = BR_NONE; md = MD_MULT; zext = 0; cls = "bad";
    if (op == 6'h00) begin
      case (fn)
        6'h00: begin cls = "shift";  alu = ALU_SLL; end
        6'h02: begin cls = "shift";  alu = ALU_SRL; end
        6'h03: begin cls = "shift";  alu = ALU_SRA; end
        6'h04: begin cls = "shiftv"; alu = ALU_SLL; end
        6'h06: begin cls = "shiftv"; alu = ALU_SRL; end
        6'h07: begin cls = "shiftv"; alu = ALU_SRA; end
        6'h08: cls = "jr";
        6'h09: cls = "jalr";
        6'h10: cls = "mfhi";
        6'h12: cls = "mflo";
        6'h18: begin cls = "md"; md = MD_MULT;  end
        6'h19: begin cls = "md"; md = MD_MULTU; end
        6'h1a: begin cls = "md"; md = MD_DIV;   end
        6'h1b: begin cls = "md"; md = MD_DIVU;  end
        6'h20, 6'h21: begin cls = "alu_r"; alu = ALU_ADD; end
        6'h22, 6'h23: begin cls = "alu_r"; alu = ALU_SUB; end
        6'h24: begin cls = "alu_r"; alu = ALU_AND; end
        6'h25: begin cls = "alu_r"; alu = ALU_OR;  end
        6'h26: begin cls = "alu_r"; alu = ALU_XOR; end
        6'h27: begin cls = "alu_r"; alu = ALU_NOR; end
        6'h2a: begin cls = "alu_r"; alu = ALU_SLT; end
        6'h2b: begin cls = "alu_r"; alu = ALU_SLTU; end
        default: cls = "bad";
      endcase
    end else begin
      case (op)
        6'h01: if (instr[20:16] == 0) begin cls = "branch"; br = BR_LTZ; end
               else if (instr[20:16] == 1) begin cls = "branch"; br = BR_GEZ; end
        6'h02: cls = "j";
        6'h03: cls = "jal";
        6'h04: begin cls = "branch"; br = BR_EQ;  end
        6'h05: begin cls = "branch"; br = BR_NE;  end
        6'h06: begin cls = "branch"; br = BR_LEZ; end
        6'h07: begin cls = "branch"; br = BR_GTZ; end
        6'h08, 6'h09: begin cls = "alu_i"; alu = ALU_ADD; end
        6'h0a: begin cls = "alu_i"; alu = ALU_SLT; end
        6'h0b: begin cls = "alu_i"; alu = ALU_SLTU; end
        6'h0c: begin cls = "alu_i"; alu = ALU_AND; zext = 1; end
        6'h0d: begin cls = "alu_i"; alu = ALU_OR;  zext = 1; end
        6'h0e: begin cls = "alu_i"; alu = ALU_XOR; zext = 1; end
        6'h0f: begin cls = "alu_i"; alu = ALU_LUI; end
        6'h23: cls = "lw";
        6'h2b: cls = "sw";
        default: cls = "bad";
      endcase
    end
    case (cls)
      "alu_r", "shift", "shiftv", "jalr", "mfhi", "mflo": dst = instr[15:11];
      "alu_i", "lw": dst = instr[20:16];
      "jal": dst = 5'd31;
      default: dst = 5'd0;
    endcase
    chk($sformatf("rand %s illegal", cls), dec.illegal == (cls == "bad"));
    chk($sformatf("rand %s reg_write", cls), dec.reg_write == (dst != 0));
    if (dst != 0) chk($sformatf("rand %s dest", cls), dec.dest == dst);
    chk($sformatf("rand %s rs/rt", cls), dec.rs == instr[25:21] && dec.rt == instr[20:16]);
    chk($sformatf("rand %s use_imm", cls), dec.use_imm == (cls inside {"alu_i", "lw", "sw"}));
    if (cls inside {"alu_i", "lw", "sw", "branch"})
      chk($sformatf("rand %s imm", cls),
          dec.imm == (zext ? {16'd0, instr[15:0]} : {{16{instr[15]}}, instr[15:0]}));
    if (cls inside {"alu_r", "alu_i", "shift", "shiftv"})
      chk($sformatf("rand %s alu_op", cls), dec.alu_op == alu);
    if (cls inside {"shift", "shiftv"})
      chk($sformatf("rand %s shamt", cls), dec.shamt_var == (cls == "shiftv") && dec.shamt == instr[10:6]);
    chk($sformatf("rand %s br", cls), dec.br == (cls inside {"j", "jal", "jr", "jalr"} ? BR_JUMP : br));
    chk($sformatf("rand %s link/jump_reg", cls),
        dec.link == (cls inside {"jal", "jalr"}) && (cls == "bad" || dec.jump_reg == (cls inside {"jr", "jalr"})));
    if (cls inside {"j", "jal"}) chk($sformatf("rand %s jidx", cls), dec.jidx == instr[25:0]);
    chk($sformatf("rand %s load/store", cls), dec.is_load == (cls == "lw") && dec.is_store == (cls == "sw"));
    chk($sformatf("rand %s md", cls), dec.is_md == (cls == "md") && (cls != "md" || dec.md_op == md));
    chk($sformatf("rand %s mfhi/mflo", cls), dec.mfhi == (cls == "mfhi") && dec.mflo == (cls == "mflo"));
  endtask
endmodule
