// decode_instr_tb: decodes one instruction of every RV32I class (built with
// the testbench assembler's encoders) and checks each control field against
// the value the ISA requires; also checks that rd = x0 never writes and that
// FENCE/ECALL decode as no-ops.
module decode_instr_tb;
  import rv32i_pkg::*;
  import rv_tb_pkg::*;
  logic [31:0] instr;
  ctrl_t       c;
  int checks = 0, failures = 0;

  decode_instr dut (.instr(instr), .ctrl(c));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask

  // expected: alu, opl, opr, reg_we, re, we, branch, jal, jalr, rs1 used, rs2 used
  task automatic expect_ctrl(logic [31:0] ins, string nm, alu_op_e alu, opl_sel_e l, opr_sel_e r,
                             bit rwe, bit re, bit we, bit br, bit jl, bit jr, bit u1, bit u2);
    instr = ins; #1;
    chk(c.alu_op == alu, {nm, " alu_op"});
    chk(c.opl_sel == l, {nm, " op_l select"});
    chk(c.opr_sel == r, {nm, " op_r select"});
    chk(c.reg_we == rwe, {nm, " reg_we"});
    chk(c.mem_re == re && c.mem_we == we, {nm, " mem strobes"});
    chk(c.branch == br && c.jal == jl && c.jalr == jr, {nm, " jump kind"});
    chk(c.rd_addr == ins[11:7], {nm, " rd"});
    chk(c.rs1_addr == (u1 ? ins[19:15] : 5'd0), {nm, " rs1"});
    chk(c.rs2_addr == (u2 ? ins[24:20] : 5'd0), {nm, " rs2"});
    chk(c.funct3 == ins[14:12], {nm, " funct3"});
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_ctrl(enc_u(5, 3, 7'b0110111), "lui", ALU_ADD, OPL_ZERO, OPR_IMM, 1, 0, 0, 0, 0, 0, 0, 0);
    expect_ctrl(enc_u(5, 3, 7'b0010111), "auipc", ALU_ADD, OPL_PC, OPR_IMM, 1, 0, 0, 0, 0, 0, 0, 0);
    expect_ctrl(enc_j(8, 1), "jal", ALU_ADD, OPL_PC, OPR_FOUR, 1, 0, 0, 0, 1, 0, 0, 0);
    expect_ctrl(enc_i(4, 7, 0, 1, 7'b1100111), "jalr", ALU_ADD, OPL_PC, OPR_FOUR, 1, 0, 0, 0, 0, 1, 1, 0);
    expect_ctrl(enc_b(8, 9, 7, 5), "bge", ALU_ADD, OPL_RS1, OPR_RS2, 0, 0, 0, 1, 0, 0, 1, 1);
    expect_ctrl(enc_i(4, 7, 4, 6, 7'b0000011), "lbu", ALU_ADD, OPL_RS1, OPR_IMM, 1, 1, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_s(4, 9, 7, 1), "sh", ALU_ADD, OPL_RS1, OPR_IMM, 0, 0, 1, 0, 0, 0, 1, 1);
    expect_ctrl(enc_i(4, 7, 0, 6, 7'b0010011), "addi", ALU_ADD, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(12'h7ff, 7, 0, 6, 7'b0010011) | 32'h4000_0000, "addi imm bit 10", ALU_ADD, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 2, 6, 7'b0010011), "slti", ALU_SLT, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 3, 6, 7'b0010011), "sltiu", ALU_SLTU, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 4, 6, 7'b0010011), "xori", ALU_XOR, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 6, 6, 7'b0010011), "ori", ALU_OR, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 7, 6, 7'b0010011), "andi", ALU_AND, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 1, 6, 7'b0010011), "slli", ALU_SLL, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(3, 7, 5, 6, 7'b0010011), "srli", ALU_SRL, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_i(12'h403, 7, 5, 6, 7'b0010011), "srai", ALU_SRA, OPL_RS1, OPR_IMM, 1, 0, 0, 0, 0, 0, 1, 0);
    expect_ctrl(enc_r(0, 9, 7, 0, 6, 7'b0110011), "add", ALU_ADD, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(32, 9, 7, 0, 6, 7'b0110011), "sub", ALU_SUB, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 1, 6, 7'b0110011), "sll", ALU_SLL, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 2, 6, 7'b0110011), "slt", ALU_SLT, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 3, 6, 7'b0110011), "sltu", ALU_SLTU, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 4, 6, 7'b0110011), "xor", ALU_XOR, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 5, 6, 7'b0110011), "srl", ALU_SRL, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(32, 9, 7, 5, 6, 7'b0110011), "sra", ALU_SRA, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 6, 6, 7'b0110011), "or", ALU_OR, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    expect_ctrl(enc_r(0, 9, 7, 7, 6, 7'b0110011), "and", ALU_AND, OPL_RS1, OPR_RS2, 1, 0, 0, 0, 0, 0, 1, 1);
    // rd = x0 never writes
    instr = enc_i(1, 7, 0, 0, 7'b0010011); #1;
    chk(!c.reg_we, "addi x0 does not write");
    // FENCE and ECALL are no-ops
    instr = 32'h0ff0000f; #1;
    chk(!c.reg_we && !c.mem_re && !c.mem_we && !c.branch && !c.jal && !c.jalr, "fence no-op");
    instr = 32'h0000_0073; #1;
    chk(!c.reg_we && !c.mem_re && !c.mem_we && !c.branch && !c.jal && !c.jalr, "ecall no-op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
