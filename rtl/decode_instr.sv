// decode_instr: instruction decoder ("Decode_instr" of both pipelines).
//
// Turns a raw RV32I instruction into the control word ctrl_t: register
// addresses, which of rs1/rs2 are read, the ALU operation and operand
// selects, register write, load/store and jump kind. Writes to x0 are
// dropped here (reg_we is 0 when rd is 0), so the forwarding logic never has
// to look at x0. FENCE, ECALL, EBREAK and unknown opcodes decode as no-ops:
// the CPUs implement the unprivileged rv32i subset without CSRs or traps.
// Combinational. Operand choice is this design's own: the link value pc+4
// of JAL/JALR is formed by the ALU as pc + 4, LUI as 0 + imm.
module decode_instr
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       f7_alt;   // instr[30]: SUB / SRA

  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];
  assign f7_alt = instr[30];

  function automatic alu_op_e alu_from_f3(input logic [2:0] f3, input logic alt, input logic sub_ok);
    unique case (f3)
      3'b000:  return (alt && sub_ok) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl          = '0;
    ctrl.rs1_addr = instr[19:15];
    ctrl.rs2_addr = instr[24:20];
    ctrl.rd_addr  = instr[11:7];
    ctrl.funct3   = funct3;
    ctrl.alu_op   = ALU_ADD;
    ctrl.opl_sel  = OPL_RS1;
    ctrl.opr_sel  = OPR_IMM;
    unique case (opcode)
      OP_LUI:    begin ctrl.reg_we = 1'b1; ctrl.opl_sel = OPL_ZERO; end
      OP_AUIPC:  begin ctrl.reg_we = 1'b1; ctrl.opl_sel = OPL_PC; end
      OP_JAL:    begin ctrl.reg_we = 1'b1; ctrl.jal = 1'b1;
                       ctrl.opl_sel = OPL_PC; ctrl.opr_sel = OPR_FOUR; end
      OP_JALR:   begin ctrl.reg_we = 1'b1; ctrl.jalr = 1'b1; ctrl.rs1_used = 1'b1;
                       ctrl.opl_sel = OPL_PC; ctrl.opr_sel = OPR_FOUR; end
      OP_BRANCH: begin ctrl.branch = 1'b1; ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1;
                       ctrl.opr_sel = OPR_RS2; end
      OP_LOAD:   begin ctrl.reg_we = 1'b1; ctrl.mem_re = 1'b1; ctrl.rs1_used = 1'b1; end
      OP_STORE:  begin ctrl.mem_we = 1'b1; ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1; end
      OP_IMM:    begin ctrl.reg_we = 1'b1; ctrl.rs1_used = 1'b1;
                       ctrl.alu_op = alu_from_f3(funct3, f7_alt && funct3 == 3'b101, 1'b0); end
      OP_REG:    begin ctrl.reg_we = 1'b1; ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1;
                       ctrl.opr_sel = OPR_RS2;
                       ctrl.alu_op = alu_from_f3(funct3, f7_alt, 1'b1); end
      default:   ;  // FENCE, SYSTEM and unknown opcodes: no-op
    endcase
    if (ctrl.rd_addr == 5'd0) ctrl.reg_we = 1'b0;
    if (!ctrl.rs1_used) ctrl.rs1_addr = 5'd0;
    if (!ctrl.rs2_used) ctrl.rs2_addr = 5'd0;
  end
endmodule
