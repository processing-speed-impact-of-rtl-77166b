// comp: branch comparator ("Comp" of both pipelines).
//
// Decides whether a conditional jump is taken. a and b are the forwarded
// register values rs1 and rs2, funct3 selects BEQ, BNE, BLT, BGE, BLTU or
// BGEU. The output goes, qualified by the branch flag, into the jmp signal
// that is registered with the jump address at the end of EX. Combinational.
module comp
  import rv32i_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        taken
);
  always_comb begin
    unique case (funct3)
      F3_BEQ:  taken = (a == b);
      F3_BNE:  taken = (a != b);
      F3_BLT:  taken = ($signed(a) <  $signed(b));
      F3_BGE:  taken = ($signed(a) >= $signed(b));
      F3_BLTU: taken = (a <  b);
      F3_BGEU: taken = (a >= b);
      default: taken = 1'b0;
    endcase
  end
endmodule
