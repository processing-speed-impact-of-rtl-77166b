// gpio: the IO peripheral.
//
// An output register (written by a store, driven onto gpio_out) and an input
// register that samples gpio_in through two flip-flops to tame asynchronous
// pins; in_q is the synchronised value read by a load. Reset clears both.
// The register layout is this design's choice; the system names only "IO".
module gpio (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] gpio_out,
  input  logic [31:0] gpio_in,
  output logic [31:0] in_q
);
  logic [31:0] in_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_out <= '0;
      in_meta  <= '0;
      in_q     <= '0;
    end else begin
      if (we) gpio_out <= wdata;
      in_meta <= gpio_in;
      in_q    <= in_meta;
    end
  end
endmodule
