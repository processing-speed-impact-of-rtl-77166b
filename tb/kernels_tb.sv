// kernels_tb: runs a compiled C program of benchmark-style kernels on both
// systems of riscv_pipeline_top at its default parameters.
//
// The program image tb/kernels.hex (one little-endian 32-bit word per line,
// loaded at address 0) was compiled for RV32I without any multiply or divide
// instructions. It sets the stack pointer to the top of the 32 KiB memory,
// clears its zero-initialised data and then runs four kernels of the kind a
// CPU benchmark uses:
//   - a linked list of 20 nodes: built from a pseudo-random sequence,
//     reversed, and insertion-sorted, with a hash of the list after each step;
//   - a 6x6 matrix product of 16-bit elements (the multiplications are done
//     by a shift-and-add routine);
//   - a state machine that classifies the comma-separated tokens of a text
//     string as integer, decimal, exponent or invalid numbers;
//   - a CRC-16 (reflected, polynomial 0xA001) over 64 pseudo-random bytes.
// The eight result words (the last one is the number of timer ticks the
// kernels took) are stored at 0x2000. The program then writes 0x600D to the
// GPIO output, prints the eight words in hex on the serial port, one per line,
// and writes 0x0600 to the GPIO output.
//
// The checks, for each system: the result words and the exact cycle of the
// 0x600D store against the reference model rv_iss run for that pipeline
// length, the number of jump flushes up to that store, and the 72 characters
// printed on the serial line. The two-stage system must finish the kernels
// in fewer clock cycles than the five-stage one.
module kernels_tb;
  import rv32i_pkg::*;
  import rv_tb_pkg::*;

  localparam int DIV   = 12_000_000 / 115_200;     // the top's defaults
  localparam int WORDS = 1024;                      // image area loaded

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] gpio_in_5 = '0, gpio_out_5, gpio_in_2 = '0, gpio_out_2;
  logic        uart_rx_5 = 1'b1, uart_tx_5, uart_rx_2 = 1'b1, uart_tx_2;

  always #5 clk = ~clk;

  riscv_pipeline_top dut (.*);
  tb_uart_monitor #(.DIV(DIV)) u_mon5 (.clk(clk), .line(uart_tx_5));
  tb_uart_monitor #(.DIV(DIV)) u_mon2 (.clk(clk), .line(uart_tx_2));

  function automatic byte unsigned dut_byte(int s, int unsigned ad);
    int unsigned row = ad / 4;
    if (s == 5) unique case (ad % 4)
      0: return dut.u_soc5.u_mem.g_bank[0].u_bank.ram[row];
      1: return dut.u_soc5.u_mem.g_bank[1].u_bank.ram[row];
      2: return dut.u_soc5.u_mem.g_bank[2].u_bank.ram[row];
      default: return dut.u_soc5.u_mem.g_bank[3].u_bank.ram[row];
    endcase
    else unique case (ad % 4)
      0: return dut.u_soc2.u_mem.g_bank[0].u_bank.ram[row];
      1: return dut.u_soc2.u_mem.g_bank[1].u_bank.ram[row];
      2: return dut.u_soc2.u_mem.g_bank[2].u_bank.ram[row];
      default: return dut.u_soc2.u_mem.g_bank[3].u_bank.ram[row];
    endcase
  endfunction
  task automatic put_word(int unsigned row, logic [31:0] v);
    dut.u_soc5.u_mem.g_bank[0].u_bank.ram[row] = v[7:0];
    dut.u_soc5.u_mem.g_bank[1].u_bank.ram[row] = v[15:8];
    dut.u_soc5.u_mem.g_bank[2].u_bank.ram[row] = v[23:16];
    dut.u_soc5.u_mem.g_bank[3].u_bank.ram[row] = v[31:24];
    dut.u_soc2.u_mem.g_bank[0].u_bank.ram[row] = v[7:0];
    dut.u_soc2.u_mem.g_bank[1].u_bank.ram[row] = v[15:8];
    dut.u_soc2.u_mem.g_bank[2].u_bank.ram[row] = v[23:16];
    dut.u_soc2.u_mem.g_bank[3].u_bank.ram[row] = v[31:24];
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n5_flush = 0, n2_flush = 0, n5_stall = 0;
  int sent5 = -1, sent2 = -1, flush5_at_sent = -1, flush2_at_sent = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_soc5.g_cpu5.u_cpu.flush) n5_flush++;
    if (dut.u_soc5.g_cpu5.u_cpu.stall && !dut.u_soc5.g_cpu5.u_cpu.flush) n5_stall++;
    if (dut.u_soc2.g_cpu2.u_cpu.flush) n2_flush++;
    if (dut.u_soc5.dbus_req.we && dut.u_soc5.dbus_req.addr == PERIPH && dut.u_soc5.dbus_req.wdata == SENTINEL && sent5 < 0)
    begin
      sent5 = int'(dut.u_soc5.u_timer.count);
      flush5_at_sent = n5_flush;
    end
    if (dut.u_soc2.dbus_req.we && dut.u_soc2.dbus_req.addr == PERIPH && dut.u_soc2.dbus_req.wdata == SENTINEL && sent2 < 0)
    begin
      sent2 = int'(dut.u_soc2.u_timer.count);
      flush2_at_sent = n2_flush;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_system(int s, rv_iss iss, int sent, int flushes, byte unsigned txt[$]);
    for (int unsigned ad = RES; ad < RES + 32; ad++)
      check(dut_byte(s, ad) == iss.rb(ad), $sformatf("%0d-stage result byte %h", s, ad));
    check(sent == int'(iss.sentinel_cyc), $sformatf("%0d-stage sentinel cycle %0d vs %0d", s, sent, iss.sentinel_cyc));
    check(flushes == iss.n_taken, $sformatf("%0d-stage flushes %0d, taken jumps %0d", s, flushes, iss.n_taken));
    for (int w = 0; w < 8; w++) begin
      string hex = $sformatf("%08h", iss.rd32(RES + 4 * w));
      hex = hex.toupper();
      for (int i = 0; i < 8; i++)
        check(txt[9 * w + i] == hex[i], $sformatf("%0d-stage printed word %0d digit %0d", s, w, i));
      check(txt[9 * w + 8] == 8'h0a, $sformatf("%0d-stage line end %0d", s, w));
    end
  endtask

  initial begin
    logic [31:0] img [WORDS];
    rv_iss iss5 = new(), iss2 = new();
    foreach (img[i]) img[i] = '0;
    $readmemh("tb/kernels.hex", img);
    foreach (img[i]) begin
      put_word(i, img[i]);
      iss5.wr(4 * i, img[i], 4);
      iss2.wr(4 * i, img[i], 4);
    end
    iss5.run(5, 200000);
    iss2.run(2, 200000);
    check(iss5.sentinel_cyc > 0 && iss2.sentinel_cyc > 0, "reference model reached the end of the kernels");
    check(iss5.rd32(RES + 28) > iss2.rd32(RES + 28), "reference: two-stage needs fewer ticks");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (gpio_out_5 == SENTINEL && gpio_out_2 == SENTINEL);
    wait (gpio_out_5 == DONE && gpio_out_2 == DONE);
    wait (u_mon5.bytes.size() == 72 && u_mon2.bytes.size() == 72);
    check_system(5, iss5, sent5, flush5_at_sent, u_mon5.bytes);
    check_system(2, iss2, sent2, flush2_at_sent, u_mon2.bytes);
    check(sent2 < sent5, "two-stage needs fewer cycles");
    check(n5_stall > 0, "five-stage load-use stalls");
    check(u_mon5.frame_errors == 0 && u_mon2.frame_errors == 0, "no frame errors");
    $display("kernels: five-stage %0d cycles, two-stage %0d cycles; %0d instructions, %0d taken jumps, %0d load-use pairs",
             sent5, sent2, iss5.n_instr, iss5.n_taken, iss5.n_load_use);
    $display("kernel ticks measured by the program: five-stage %0d, two-stage %0d",
             iss5.rd32(RES + 28), iss2.rd32(RES + 28));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
