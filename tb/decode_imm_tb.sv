// decode_imm_tb: encodes random immediates in the I, S, B, U and J formats
// with the testbench assembler's encoders and checks that the decoder
// recovers the sign-extended value; other opcodes must give zero.
module decode_imm_tb;
  import rv_tb_pkg::*;
  logic [31:0] instr, imm;
  int checks = 0, failures = 0;

  decode_imm dut (.instr(instr), .imm(imm));

  task automatic expect_imm(logic [31:0] ins, int exp, string fmt);
    instr = ins; #1;
    checks++;
    if (imm !== exp) begin failures++; $display("FAIL %s: %h -> %h, expected %h", fmt, ins, imm, exp); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      automatic int i12 = int'($urandom % 4096) - 2048;
      automatic int b13 = (int'($urandom % 4096) - 2048) * 2;
      automatic int j21 = (int'($urandom % (1 << 20)) - (1 << 19)) * 2;
      automatic int u20 = int'($urandom % (1 << 20));
      automatic int r = $urandom % 32;
      expect_imm(enc_i(i12, r, 0, 5, 7'b0010011), i12, "I/op-imm");
      expect_imm(enc_i(i12, r, 2, 5, 7'b0000011), i12, "I/load");
      expect_imm(enc_i(i12, r, 0, 5, 7'b1100111), i12, "I/jalr");
      expect_imm(enc_s(i12, r, 3, 2), i12, "S");
      expect_imm(enc_b(b13, r, 3, 1), b13, "B");
      expect_imm(enc_u(u20, 5, 7'b0110111), u20 << 12, "U/lui");
      expect_imm(enc_u(u20, 5, 7'b0010111), u20 << 12, "U/auipc");
      expect_imm(enc_j(j21, 1), j21, "J");
      expect_imm(enc_r(0, r, 3, 0, 5, 7'b0110011), 0, "R");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
