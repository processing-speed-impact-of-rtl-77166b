// sext: load data extension ("sext" of both pipelines).
//
// The memory returns the four bytes starting at the load address with the
// addressed byte in bits 7:0. sext keeps one byte (LB/LBU), two bytes
// (LH/LHU) or the whole word (LW) and sign- or zero-extends the result to
// 32 bits. Combinational, in the MA stage (five-stage) or the MA/WB stage
// (two-stage). Function from the pipeline description; insides are the
// simplest form of it.
module sext
  import rv32i_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [31:0] raw,
  output logic [31:0] data
);
  always_comb begin
    unique case (funct3)
      F3_LB:   data = {{24{raw[7]}}, raw[7:0]};
      F3_LH:   data = {{16{raw[15]}}, raw[15:0]};
      F3_LBU:  data = {24'b0, raw[7:0]};
      F3_LHU:  data = {16'b0, raw[15:0]};
      default: data = raw;
    endcase
  end
endmodule
