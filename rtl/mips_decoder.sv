// MIPS instruction decoder of the decode stage.
//
// Combinational. Turns a 32-bit MIPS32 instruction into the control record
// cslow_pkg::dec_t. Supported subset (a choice of this design): ADD/ADDU,
// SUB/SUBU, AND, OR, XOR, NOR, SLT, SLTU, SLL, SRL, SRA, SLLV, SRLV, SRAV,
// JR, JALR, MFHI, MFLO, MULT, MULTU, DIV, DIVU, ADDI/ADDIU, SLTI, SLTIU,
// ANDI, ORI, XORI, LUI, LW, SW, BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ, J, JAL.
// ADD/SUB/ADDI behave as their unsigned forms (no overflow trap). Anything
// else is flagged `illegal` and executes as a no-op.
module mips_decoder
  import cslow_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  logic [5:0] op, fn;
  logic [4:0] rs, rt, rd;
  assign op = instr[31:26];
  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];
  assign fn = instr[5:0];

  always_comb begin
    dec           = '0;
    dec.alu_op    = ALU_ADD;
    dec.br        = BR_NONE;
    dec.md_op     = MD_MULT;
    dec.rs        = rs;
    dec.rt        = rt;
    dec.shamt     = instr[10:6];
    dec.imm       = {{16{instr[15]}}, instr[15:0]};
    dec.jidx      = instr[25:0];
    unique case (op)
      OP_SPECIAL: begin
        dec.dest      = rd;
        dec.reg_write = 1'b1;
        unique case (fn)
          FN_SLL:  dec.alu_op = ALU_SLL;
          FN_SRL:  dec.alu_op = ALU_SRL;
          FN_SRA:  dec.alu_op = ALU_SRA;
          FN_SLLV: begin dec.alu_op = ALU_SLL; dec.shamt_var = 1'b1; end
          FN_SRLV: begin dec.alu_op = ALU_SRL; dec.shamt_var = 1'b1; end
          FN_SRAV: begin dec.alu_op = ALU_SRA; dec.shamt_var = 1'b1; end
          FN_JR:   begin dec.br = BR_JUMP; dec.jump_reg = 1'b1; dec.reg_write = 1'b0; end
          FN_JALR: begin dec.br = BR_JUMP; dec.jump_reg = 1'b1; dec.link = 1'b1; end
          FN_MFHI: dec.mfhi = 1'b1;
          FN_MFLO: dec.mflo = 1'b1;
          FN_MULT:  begin dec.is_md = 1'b1; dec.md_op = MD_MULT;  dec.reg_write = 1'b0; end
          FN_MULTU: begin dec.is_md = 1'b1; dec.md_op = MD_MULTU; dec.reg_write = 1'b0; end
          FN_DIV:   begin dec.is_md = 1'b1; dec.md_op = MD_DIV;   dec.reg_write = 1'b0; end
          FN_DIVU:  begin dec.is_md = 1'b1; dec.md_op = MD_DIVU;  dec.reg_write = 1'b0; end
          FN_ADD, FN_ADDU: dec.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: dec.alu_op = ALU_SUB;
          FN_AND:  dec.alu_op = ALU_AND;
          FN_OR:   dec.alu_op = ALU_OR;
          FN_XOR:  dec.alu_op = ALU_XOR;
          FN_NOR:  dec.alu_op = ALU_NOR;
          FN_SLT:  dec.alu_op = ALU_SLT;
          FN_SLTU: dec.alu_op = ALU_SLTU;
          default: begin dec.illegal = 1'b1; dec.reg_write = 1'b0; end
        endcase
      end
      OP_REGIMM: begin
        if (rt == 5'd0)      dec.br = BR_LTZ;
        else if (rt == 5'd1) dec.br = BR_GEZ;
        else                 dec.illegal = 1'b1;
      end
      OP_J:    dec.br = BR_JUMP;
      OP_JAL:  begin dec.br = BR_JUMP; dec.link = 1'b1; dec.dest = 5'd31; dec.reg_write = 1'b1; end
      OP_BEQ:  dec.br = BR_EQ;
      OP_BNE:  dec.br = BR_NE;
      OP_BLEZ: dec.br = BR_LEZ;
      OP_BGTZ: dec.br = BR_GTZ;
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        dec.use_imm   = 1'b1;
        dec.dest      = rt;
        dec.reg_write = 1'b1;
        unique case (op)
          OP_SLTI:  dec.alu_op = ALU_SLT;
          OP_SLTIU: dec.alu_op = ALU_SLTU;
          OP_ANDI:  begin dec.alu_op = ALU_AND; dec.imm = {16'd0, instr[15:0]}; end
          OP_ORI:   begin dec.alu_op = ALU_OR;  dec.imm = {16'd0, instr[15:0]}; end
          OP_XORI:  begin dec.alu_op = ALU_XOR; dec.imm = {16'd0, instr[15:0]}; end
          OP_LUI:   dec.alu_op = ALU_LUI;
          default:  dec.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        dec.use_imm = 1'b1; dec.dest = rt; dec.reg_write = 1'b1; dec.is_load = 1'b1;
      end
      OP_SW: begin
        dec.use_imm = 1'b1; dec.is_store = 1'b1;
      end
      default: dec.illegal = 1'b1;
    endcase
    if (dec.dest == 5'd0) dec.reg_write = 1'b0;
  end
endmodule
