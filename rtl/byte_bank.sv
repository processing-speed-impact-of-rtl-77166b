// byte_bank: one byte-wide, dual-port synchronous RAM.
//
// Four of these form the common program and data memory (one per byte lane),
// matching block RAMs that have no byte addressing of their own. Port A is
// read-only (instruction fetch), port B reads and writes (data). Both ports
// register the address: read data appears one clock after the address, and a
// read on port B in the cycle of a write to the same row returns the old
// byte. INIT_FILE, if set, preloads the bank with $readmemh (one byte per
// line). Depth and read-during-write behaviour are this design's choices.
module byte_bank #(
  parameter int    ROWS      = 8192,
  parameter string INIT_FILE = ""
) (
  input  logic                    clk,
  input  logic [$clog2(ROWS)-1:0] a_addr,
  output logic [7:0]              a_rdata,
  input  logic [$clog2(ROWS)-1:0] b_addr,
  input  logic                    b_we,
  input  logic [7:0]              b_wdata,
  output logic [7:0]              b_rdata
);
  logic [7:0] ram [ROWS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, ram);
  end

  always_ff @(posedge clk) begin
    a_rdata <= ram[a_addr];
    b_rdata <= ram[b_addr];
    if (b_we) ram[b_addr] <= b_wdata;
  end
endmodule
