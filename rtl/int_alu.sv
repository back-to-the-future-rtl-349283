// Integer ALU of the execute stage: logic unit, adder/subtractor and shifter.
//
// Purely combinational. `op` selects the function (see cslow_pkg::alu_op_e);
// `a` is the rs operand, `b` the rt operand or immediate, `shamt` the shift
// amount (already chosen between the instruction field and rs[4:0]). Shifts
// operate on `b`, as MIPS shifts rt. Additions wrap; the overflow trap of
// MIPS ADD/SUB/ADDI is not implemented (this design has no exceptions).
module int_alu
  import cslow_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = 32'($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end
endmodule
