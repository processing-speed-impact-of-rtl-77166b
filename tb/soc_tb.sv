// soc_tb: the whole program on one system (five-stage CPU, memory and real
// peripherals) at a reduced serial rate (10 clocks per bit).
// Part 1 is checked against the reference model rv_iss: result words, the
// register signature (it includes the GPIO input the program read), the
// measured tick count between the two timer reads, and the cycle of the
// sentinel store. Part 2 must print the CRC as eight hex digits on the serial
// line, take one byte sent to it and echo that byte plus one, then write DONE
// to the GPIO output.
module soc_tb;
  import rv32i_pkg::*;
  import rv_tb_pkg::*;

  localparam int MEM_BYTES = 32768;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;
  localparam int unsigned GPIO_IN_VAL = 32'h0bad_cafe;

  logic        clk = 1'b0, rst_n = 1'b0, uart_rx = 1'b1, uart_tx;
  logic [31:0] gpio_in = GPIO_IN_VAL, gpio_out;

  always #5 clk = ~clk;

  soc #(.STAGES(5), .MEM_BYTES(MEM_BYTES), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  tb_uart_monitor #(.DIV(DIV)) u_mon (.clk(clk), .line(uart_tx));

  function automatic byte unsigned dut_byte(int unsigned ad);
    int unsigned row = (ad % MEM_BYTES) / 4;
    unique case (ad % 4)
      0: return dut.u_mem.g_bank[0].u_bank.ram[row];
      1: return dut.u_mem.g_bank[1].u_bank.ram[row];
      2: return dut.u_mem.g_bank[2].u_bank.ram[row];
      default: return dut.u_mem.g_bank[3].u_bank.ram[row];
    endcase
  endfunction
  task automatic put_byte(int unsigned ad, byte unsigned v);
    int unsigned row = ad / 4;
    unique case (ad % 4)
      0: dut.u_mem.g_bank[0].u_bank.ram[row] = v;
      1: dut.u_mem.g_bank[1].u_bank.ram[row] = v;
      2: dut.u_mem.g_bank[2].u_bank.ram[row] = v;
      default: dut.u_mem.g_bank[3].u_bank.ram[row] = v;
    endcase
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sentinel_tick = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.dbus_req.we && dut.dbus_req.addr == PERIPH && dut.dbus_req.wdata == SENTINEL && sentinel_tick < 0)
      sentinel_tick = int'(dut.u_timer.count);
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (gpio_out %h, %0d bytes received)", gpio_out, u_mon.bytes.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_rx(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (DIV) @(negedge clk);
    end
  endtask

  initial begin
    rv_asm a = new();
    rv_iss iss = new();
    string hex;
    build_test_program(a);
    foreach (a.code[i]) for (int k = 0; k < 4; k++) begin
      put_byte(4 * i + k, byte'(a.code[i] >> (8 * k)));
      iss.mem[4 * i + k] = byte'(a.code[i] >> (8 * k));
    end
    for (int i = 0; i < BUF_LEN; i++) begin
      put_byte(BUF + i, buf_byte(i));
      iss.mem[BUF + i] = buf_byte(i);
    end
    for (int i = 0; i < 512; i++) put_byte(RES + i, 8'h00);
    iss.gpio_in = GPIO_IN_VAL;
    iss.run(5);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (gpio_out == SENTINEL);
    repeat (5) @(posedge clk);
    for (int unsigned ad = RES; ad < RES + 40; ad++)
      check(dut_byte(ad) == iss.rb(ad), $sformatf("result byte %h", ad));
    for (int unsigned ad = SIG + 4; ad < SIG + 128; ad += 4)
      check({dut_byte(ad + 3), dut_byte(ad + 2), dut_byte(ad + 1), dut_byte(ad)} == iss.rd32(ad),
            $sformatf("signature x%0d", (ad - SIG) / 4));
    check(iss.rd32(SIG + 7 * 4) == 2 * GPIO_IN_VAL, "GPIO input read");
    check(sentinel_tick == int'(iss.sentinel_cyc), $sformatf("sentinel cycle %0d vs %0d", sentinel_tick, iss.sentinel_cyc));
    $display("ticks between timer reads: %0d", iss.rd32(RES + 36));

    hex = $sformatf("%08h", crc16(CRC_LEN));
    hex = hex.toupper();
    wait (u_mon.bytes.size() == 8);
    for (int i = 0; i < 8; i++) check(u_mon.bytes[i] == hex[i], $sformatf("printed digit %0d: %c, expected %c", i, u_mon.bytes[i], hex[i]));
    send_rx(8'h41);
    wait (gpio_out == DONE);
    wait (u_mon.bytes.size() == 9);
    check(u_mon.bytes[8] == 8'h42, "echo of the received byte plus one");
    check(u_mon.frame_errors == 0, "no frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
