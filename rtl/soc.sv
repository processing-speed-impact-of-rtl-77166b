// soc: one complete microprocessor, CPU plus memory plus peripherals.
//
// STAGES selects the CPU: 5 gives cpu_5stage, 2 gives cpu_2stage; everything
// else is identical for both, so differences in run time come from the CPU
// alone. The CPU's instruction port reads the common program/data memory
// (byte_memory) directly; its data request is decoded on address bit 31:
//   0x0000_0000 + n  common program and data memory (MEM_BYTES bytes, wraps)
//   0x8000_0000      GPIO output register   (read/write)
//   0x8000_0004      GPIO input register    (read)
//   0x8000_0010      timer, clock ticks     (read, write loads)
//   0x8000_0020      serial data            (write sends a byte, read takes
//                                            the received byte and clears
//                                            the received flag)
//   0x8000_0024      serial status          (bit 0 transmitter busy,
//                                            bit 1 byte received)
// Peripheral registers are 32 bits wide and decoded on address bits 7:0;
// a peripheral read is registered so its data returns one cycle after the
// request, like memory data. The memory/peripheral split follows the system
// description; the addresses and register layout are this design's own.
module soc
  import rv32i_pkg::*;
#(
  parameter int    STAGES    = 5,
  parameter int    MEM_BYTES = 32768,
  parameter int    CLK_HZ    = 12_000_000,
  parameter int    BAUD      = 115_200,
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] gpio_in,
  output logic [31:0] gpio_out,
  input  logic        uart_rx,
  output logic        uart_tx
);
  logic [31:0] imem_addr, imem_rdata, dbus_rdata, mem_rdata;
  dbus_req_t   dbus_req;

  if (STAGES == 2) begin : g_cpu2
    cpu_2stage u_cpu (
      .clk, .rst_n, .imem_addr, .imem_rdata, .dbus_req, .dbus_rdata
    );
  end else begin : g_cpu5
    cpu_5stage u_cpu (
      .clk, .rst_n, .imem_addr, .imem_rdata, .dbus_req, .dbus_rdata
    );
  end

  // ------------------------------------------------------- address decode
  logic       periph;
  logic [7:0] reg_sel;
  assign periph  = dbus_req.addr[31];
  assign reg_sel = dbus_req.addr[7:0];

  byte_memory #(.MEM_BYTES(MEM_BYTES), .INIT_FILE(INIT_FILE)) u_mem (
    .clk     (clk),
    .i_addr  (imem_addr),
    .i_rdata (imem_rdata),
    .d_addr  (dbus_req.addr),
    .d_we    (dbus_req.we && !periph),
    .d_size  (dbus_req.size),
    .d_wdata (dbus_req.wdata),
    .d_rdata (mem_rdata)
  );

  // ----------------------------------------------------------- peripherals
  logic        p_we, p_re;
  logic [31:0] gpio_in_q, ticks;
  logic        tx_busy, rx_valid;
  logic [7:0]  rx_data;

  assign p_we = dbus_req.we && periph;
  assign p_re = dbus_req.re && periph;

  gpio u_gpio (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (p_we && reg_sel == REG_GPIO_OUT),
    .wdata    (dbus_req.wdata),
    .gpio_out (gpio_out),
    .gpio_in  (gpio_in),
    .in_q     (gpio_in_q)
  );

  timer u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (p_we && reg_sel == REG_TIMER),
    .wdata (dbus_req.wdata),
    .count (ticks)
  );

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_we    (p_we && reg_sel == REG_UART_DATA),
    .tx_data  (dbus_req.wdata[7:0]),
    .tx_busy  (tx_busy),
    .tx       (uart_tx),
    .rx       (uart_rx),
    .rx_valid (rx_valid),
    .rx_data  (rx_data),
    .rx_ack   (p_re && reg_sel == REG_UART_DATA)
  );

  // ------------------------------------------------- registered read data
  logic        periph_q;
  logic [31:0] periph_rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      periph_q       <= 1'b0;
      periph_rdata_q <= '0;
    end else begin
      periph_q <= periph;
      unique case (reg_sel)
        REG_GPIO_OUT:    periph_rdata_q <= gpio_out;
        REG_GPIO_IN:     periph_rdata_q <= gpio_in_q;
        REG_TIMER:       periph_rdata_q <= ticks;
        REG_UART_DATA:   periph_rdata_q <= {24'b0, rx_data};
        REG_UART_STATUS: periph_rdata_q <= {30'b0, rx_valid, tx_busy};
        default:         periph_rdata_q <= '0;
      endcase
    end
  end

  assign dbus_rdata = periph_q ? periph_rdata_q : mem_rdata;
endmodule
