// Branch resolution unit of the execute stage.
//
// Branches and jumps are resolved in execute. The unit evaluates the branch
// condition on the forwarded operands and forms the target: PC-relative for
// conditional branches (PC+4 + (imm << 2)), pseudo-direct for J/JAL
// ({PC+4[31:28], index, 2'b00}) and the rs register for JR/JALR. MIPS
// branch-delay-slot semantics are kept: the instruction after a branch always
// executes, and the core nullifies the one further instruction of the thread
// that may already have been fetched on a taken branch.
// Interface: combinational; `taken` and `target` are valid when `br` is not
// BR_NONE.
module branch_unit
  import cslow_pkg::*;
(
  input  br_kind_e    br,
  input  logic        jump_reg,
  input  logic [25:0] jidx,
  input  logic [31:0] pc,
  input  logic [31:0] imm,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] target
);
  logic [31:0] pc4;
  assign pc4 = pc + 32'd4;

  always_comb begin
    unique case (br)
      BR_EQ:   taken = (rs_val == rt_val);
      BR_NE:   taken = (rs_val != rt_val);
      BR_LEZ:  taken = ($signed(rs_val) <= 0);
      BR_GTZ:  taken = ($signed(rs_val) > 0);
      BR_LTZ:  taken = rs_val[31];
      BR_GEZ:  taken = !rs_val[31];
      BR_JUMP: taken = 1'b1;
      default: taken = 1'b0;
    endcase
    if (br == BR_JUMP)
      target = jump_reg ? rs_val : {pc4[31:28], jidx, 2'b00};
    else
      target = pc4 + {imm[29:0], 2'b00};
  end
endmodule
