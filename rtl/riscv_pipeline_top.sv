// riscv_pipeline_top: the two microprocessors of the pipeline-length study,
// side by side.
//
// u_soc5 is the system with the five-stage CPU, u_soc2 the same system with
// the two-stage CPU: same memory, same peripherals, same address map, same
// clock. Running one program on both shows the cost of the longer pipeline
// (three cycles per taken jump, one per load-use pair) against the shorter
// logic paths it allows. Each system has its own IO and serial pins. clk is
// the CPU clock, which on the FPGA board comes from a PLL fed by the 12 MHz
// board clock; reset is asynchronous and active low.
module riscv_pipeline_top #(
  parameter int    MEM_BYTES = 32768,
  parameter int    CLK_HZ    = 12_000_000,
  parameter int    BAUD      = 115_200,
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] gpio_in_5,
  output logic [31:0] gpio_out_5,
  input  logic        uart_rx_5,
  output logic        uart_tx_5,
  input  logic [31:0] gpio_in_2,
  output logic [31:0] gpio_out_2,
  input  logic        uart_rx_2,
  output logic        uart_tx_2
);
  soc #(.STAGES(5), .MEM_BYTES(MEM_BYTES), .CLK_HZ(CLK_HZ), .BAUD(BAUD), .INIT_FILE(INIT_FILE)) u_soc5 (
    .clk      (clk),
    .rst_n    (rst_n),
    .gpio_in  (gpio_in_5),
    .gpio_out (gpio_out_5),
    .uart_rx  (uart_rx_5),
    .uart_tx  (uart_tx_5)
  );

  soc #(.STAGES(2), .MEM_BYTES(MEM_BYTES), .CLK_HZ(CLK_HZ), .BAUD(BAUD), .INIT_FILE(INIT_FILE)) u_soc2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .gpio_in  (gpio_in_2),
    .gpio_out (gpio_out_2),
    .uart_rx  (uart_rx_2),
    .uart_tx  (uart_tx_2)
  );
endmodule
