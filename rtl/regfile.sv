// regfile: the 32 x 32-bit integer register file ("Reg").
//
// Two combinational read ports serve the decode stage, one write port serves
// write-back; x0 always reads as zero. A write is visible to a read of the
// same register in the same cycle (write-through), so an instruction being
// decoded while its producer writes back gets the new value; forwarding in
// the pipelines covers only the stages after decode. All registers are
// cleared by reset. Built from flip-flops, as the register counts of the
// FPGA implementation suggest; write-through and reset are this design's
// choices.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  rs1_addr,
  input  logic [4:0]  rs2_addr,
  output logic [31:0] rs1_data,
  output logic [31:0] rs2_data,
  input  logic [4:0]  rd_addr,
  input  logic        rd_we,
  input  logic [31:0] rd_data
);
  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (rd_we && rd_addr != 5'd0) begin
      regs[rd_addr] <= rd_data;
    end
  end

  always_comb begin
    if (rs1_addr == 5'd0)                  rs1_data = '0;
    else if (rd_we && rd_addr == rs1_addr) rs1_data = rd_data;
    else                                   rs1_data = regs[rs1_addr];
    if (rs2_addr == 5'd0)                  rs2_data = '0;
    else if (rd_we && rd_addr == rs2_addr) rs2_data = rd_data;
    else                                   rs2_data = regs[rs2_addr];
  end
endmodule
