// decode_imm: immediate generator ("Decode_imm" of both pipelines).
//
// Takes the raw 32-bit instruction and returns its immediate, sign-extended
// to 32 bits, in the format the opcode selects: I (OP-IMM, LOAD, JALR),
// S (STORE), B (BRANCH), U (LUI, AUIPC) or J (JAL). Other opcodes give 0.
// Purely combinational; it sits in the ID stage of the five-stage CPU and in
// the single front stage of the two-stage CPU. The formats follow the RV32I
// base ISA; the block is named but not detailed by the pipeline description.
module decode_imm
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  output logic [31:0] imm
);
  always_comb begin
    unique case (instr[6:0])
      OP_IMM, OP_LOAD, OP_JALR:
        imm = {{20{instr[31]}}, instr[31:20]};
      OP_STORE:
        imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      OP_BRANCH:
        imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      OP_LUI, OP_AUIPC:
        imm = {instr[31:12], 12'b0};
      OP_JAL:
        imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default:
        imm = '0;
    endcase
  end
endmodule
