// byte_memory: common program and data memory with byte addressing.
//
// The memory is four byte-wide banks; bank b holds every byte whose address
// ends in b (address mod 4). An access at byte address A touches the bytes
// A, A+1, A+2, A+3, so the two low address bits decide which bank supplies
// which byte of the word and which row each bank reads: bank b is read at
// row (A + ((b - A) mod 4)) / 4. After the synchronous read the four bank
// outputs are rotated by the registered A[1:0], so d_rdata / i_rdata always
// carry byte A in bits 7:0. Writes of 1, 2 or 4 bytes (d_size) go to the
// banks in the same rotated order. Misaligned halfwords and words therefore
// work at full speed, also across a word boundary.
//
// Ports: i_* is the instruction port (read only), d_* the data port. Both
// have one cycle of read latency; the address is taken at the clock edge.
// Addresses wrap modulo MEM_BYTES (a power of two). The bank structure and the
// role of the low address bits follow the system description; the depth is
// this design's choice.
module byte_memory
  import rv32i_pkg::*;
#(
  parameter int    MEM_BYTES = 32768,
  parameter string INIT_FILE = ""     // prefix; bank b reads INIT_FILE<b>.hex
) (
  input  logic        clk,
  input  logic [31:0] i_addr,
  output logic [31:0] i_rdata,
  input  logic [31:0] d_addr,
  input  logic        d_we,
  input  size_e       d_size,
  input  logic [31:0] d_wdata,
  output logic [31:0] d_rdata
);
  localparam int ROWS = MEM_BYTES / 4;
  localparam int RW   = $clog2(ROWS);

  logic [RW-1:0] i_row [4];
  logic [RW-1:0] d_row [4];
  logic [3:0]    d_bwe;
  logic [7:0]    d_bwdata [4];
  logic [7:0]    i_bq [4];
  logic [7:0]    d_bq [4];
  logic [1:0]    i_off_q, d_off_q;
  logic [2:0]    nbytes;

  always_comb begin
    unique case (d_size)
      SZ_BYTE: nbytes = 3'd1;
      SZ_HALF: nbytes = 3'd2;
      default: nbytes = 3'd4;
    endcase
  end

  // per bank: k = position of this bank's byte within the access
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [1:0]  ki, kd;
      logic [31:0] ai, ad;
      ki = 2'(b) - i_addr[1:0];
      kd = 2'(b) - d_addr[1:0];
      ai = i_addr + 32'(ki);
      ad = d_addr + 32'(kd);
      i_row[b]    = ai[RW+1:2];
      d_row[b]    = ad[RW+1:2];
      d_bwe[b]    = d_we && ({1'b0, kd} < nbytes);
      d_bwdata[b] = d_wdata[8*kd +: 8];
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    byte_bank #(
      .ROWS      (ROWS),
      .INIT_FILE (INIT_FILE == "" ? "" : {INIT_FILE, string'(8'("0" + b)), ".hex"})
    ) u_bank (
      .clk     (clk),
      .a_addr  (i_row[b]),
      .a_rdata (i_bq[b]),
      .b_addr  (d_row[b]),
      .b_we    (d_bwe[b]),
      .b_wdata (d_bwdata[b]),
      .b_rdata (d_bq[b])
    );
  end

  always_ff @(posedge clk) begin
    i_off_q <= i_addr[1:0];
    d_off_q <= d_addr[1:0];
  end

  // rotate: byte k of the result comes from bank (offset + k) mod 4
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      i_rdata[8*k +: 8] = i_bq[2'(i_off_q + 2'(k))];
      d_rdata[8*k +: 8] = d_bq[2'(d_off_q + 2'(k))];
    end
  end
endmodule
