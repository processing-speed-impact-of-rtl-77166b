// timer: tick counter of the peripheral area.
//
// A 32-bit counter that advances by one every clock cycle, so a program
// measures its run time in clock ticks (score = iterations * f_clk / ticks).
// A write loads wdata; the counter continues from the loaded value on the
// next cycle. Reset clears it. The width and the write behaviour are this
// design's choices; the system only requires a timer for time recording.
module timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (we) count <= wdata;
    else         count <= count + 32'd1;
  end
endmodule
