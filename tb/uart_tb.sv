// uart_tb: serial interface at a reduced rate (10 clocks per bit).
// Transmit: sends random bytes, decodes the tx line here by sampling in the
// middle of each bit, checks start bit, data, stop bit, that busy lasts
// exactly ten bit times and that a write while busy is ignored.
// Receive: drives random 8N1 frames onto rx and checks rx_data/rx_valid and
// the clearing by rx_ack; a start pulse shorter than half a bit must be
// ignored.
module uart_tb;
  localparam int CLK_HZ = 1000, BAUD = 100, DIV = CLK_HZ / BAUD;
  logic       clk = 0, rst_n = 0, tx_we = 0, rx = 1, rx_ack = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic       tx_busy, tx, rx_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_rx(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (DIV) @(negedge clk);
    end
  endtask

  int busy_cycles = 0;
  always @(negedge clk) if (tx_busy) busy_cycles++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(tx == 1 && !tx_busy && !rx_valid, "idle after reset");
    // ---------------- transmit
    repeat (20) begin
      automatic logic [7:0] b = 8'($urandom), got;
      busy_cycles = 0;
      tx_data = b; tx_we = 1;
      @(negedge clk); tx_we = 0;
      // a second write while busy must be ignored
      tx_data = ~b; tx_we = 1; @(negedge clk); tx_we = 0;
      wait (tx == 0);
      repeat (DIV / 2) @(negedge clk);
      chk(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        got[i] = tx;
      end
      repeat (DIV) @(negedge clk);
      chk(tx == 1, "stop bit");
      chk(got == b, $sformatf("tx byte %h, sent %h", got, b));
      wait (!tx_busy); @(negedge clk);
      chk(busy_cycles == 10 * DIV, $sformatf("busy %0d cycles", busy_cycles));
      repeat (2 * DIV) @(negedge clk);
      chk(tx == 1, "line idle after the frame");
    end
    // ---------------- receive
    repeat (20) begin
      automatic logic [7:0] b = 8'($urandom);
      send_rx(b);
      repeat (DIV) @(negedge clk);
      chk(rx_valid && rx_data == b, $sformatf("rx byte %h, sent %h", rx_data, b));
      rx_ack = 1; @(negedge clk); rx_ack = 0;
      chk(!rx_valid, "rx_ack clears rx_valid");
    end
    // glitch shorter than half a bit: no byte
    rx = 0; repeat (DIV / 2 - 2) @(negedge clk); rx = 1;
    repeat (12 * DIV) @(negedge clk);
    chk(!rx_valid, "short glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
