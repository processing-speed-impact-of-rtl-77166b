// alu: arithmetic and logic unit ("Alu" of both pipelines).
//
// Computes the ten RV32I register/immediate operations on the left operand
// op_l and the right operand op_r: add, subtract, shifts (amount op_r[4:0]),
// signed and unsigned set-less-than and the bitwise operations. It also forms
// AUIPC (pc + imm), LUI (0 + imm) and the link address (pc + 4) through ADD.
// Combinational; in the EX stage of the five-stage CPU and in the front stage
// of the two-stage CPU. The operation set is the ISA's; the encoding is local.
module alu
  import rv32i_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] op_l,
  input  logic [31:0] op_r,
  output logic [31:0] res
);
  logic [4:0] shamt;
  assign shamt = op_r[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  res = op_l + op_r;
      ALU_SUB:  res = op_l - op_r;
      ALU_SLL:  res = op_l << shamt;
      ALU_SLT:  res = {31'b0, $signed(op_l) < $signed(op_r)};
      ALU_SLTU: res = {31'b0, op_l < op_r};
      ALU_XOR:  res = op_l ^ op_r;
      ALU_SRL:  res = op_l >> shamt;
      ALU_SRA:  res = $unsigned($signed(op_l) >>> shamt);
      ALU_OR:   res = op_l | op_r;
      ALU_AND:  res = op_l & op_r;
      default:  res = op_l + op_r;
    endcase
  end
endmodule
