// riscv_pipeline_top_tb: end-to-end run of both systems at the top's default
// parameters (32 KiB memory, 12 MHz clock, 115200 baud).
//
// The same program and data are loaded into both memories and both systems
// are released from reset together. For each system the testbench checks,
// against the reference model rv_iss run for that pipeline length: all
// result words, the register signature, and the exact cycle of the sentinel
// store. It then checks the serial output (the CRC as eight hex digits, the
// direct CRC computation being the reference), the echo of a received byte
// and the final GPIO value. The measured cycle counts must show the expected
// ordering (two-stage faster per clock).
//
// Every mechanism of the two pipelines is counted and must occur: five-stage
// jump flush, load-use stall, forwarding from MA, forwarding from WB;
// two-stage jump flush, forwarding of ALU results and of loaded data; and in
// the systems misaligned accesses, timer reads, GPIO input reads, serial
// transmission and reception.
module riscv_pipeline_top_tb;
  import rv32i_pkg::*;
  import rv_tb_pkg::*;

  localparam int MEM_BYTES = 32768;                 // the top's defaults
  localparam int DIV = 12_000_000 / 115_200;
  localparam int unsigned GPIO_IN_5 = 32'h1357_9bdf, GPIO_IN_2 = 32'h0246_8ace;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] gpio_in_5 = GPIO_IN_5, gpio_out_5, gpio_in_2 = GPIO_IN_2, gpio_out_2;
  logic        uart_rx_5 = 1'b1, uart_tx_5, uart_rx_2 = 1'b1, uart_tx_2;

  always #5 clk = ~clk;

  riscv_pipeline_top dut (.*);
  tb_uart_monitor #(.DIV(DIV)) u_mon5 (.clk(clk), .line(uart_tx_5));
  tb_uart_monitor #(.DIV(DIV)) u_mon2 (.clk(clk), .line(uart_tx_2));

  // ------------------------------------------------ memory access (both)
  function automatic byte unsigned dut_byte(int s, int unsigned ad);
    int unsigned row = (ad % MEM_BYTES) / 4;
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
  task automatic put_byte(int unsigned ad, byte unsigned v);
    int unsigned row = ad / 4;
    unique case (ad % 4)
      0: begin dut.u_soc5.u_mem.g_bank[0].u_bank.ram[row] = v; dut.u_soc2.u_mem.g_bank[0].u_bank.ram[row] = v; end
      1: begin dut.u_soc5.u_mem.g_bank[1].u_bank.ram[row] = v; dut.u_soc2.u_mem.g_bank[1].u_bank.ram[row] = v; end
      2: begin dut.u_soc5.u_mem.g_bank[2].u_bank.ram[row] = v; dut.u_soc2.u_mem.g_bank[2].u_bank.ram[row] = v; end
      default: begin dut.u_soc5.u_mem.g_bank[3].u_bank.ram[row] = v; dut.u_soc2.u_mem.g_bank[3].u_bank.ram[row] = v; end
    endcase
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------ event counters
  int n5_flush = 0, n5_stall = 0, n5_fwd_ma = 0, n5_fwd_wb = 0;
  int n2_flush = 0, n2_fwd = 0, n2_fwd_load = 0;
  int n_misaligned = 0, n_timer_rd = 0, n_gpio_rd = 0, n_tx = 0, n_rx = 0;
  int sent5 = -1, sent2 = -1, flush5_at_sent = -1, flush2_at_sent = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_soc5.g_cpu5.u_cpu.flush) n5_flush++;
    if (dut.u_soc5.g_cpu5.u_cpu.stall && !dut.u_soc5.g_cpu5.u_cpu.flush) n5_stall++;
    if (dut.u_soc5.g_cpu5.u_cpu.ex_valid && (dut.u_soc5.g_cpu5.u_cpu.fwd_ma_rs1 || dut.u_soc5.g_cpu5.u_cpu.fwd_ma_rs2)) n5_fwd_ma++;
    if (dut.u_soc5.g_cpu5.u_cpu.ex_valid && (dut.u_soc5.g_cpu5.u_cpu.fwd_wb_rs1 || dut.u_soc5.g_cpu5.u_cpu.fwd_wb_rs2)) n5_fwd_wb++;
    if (dut.u_soc2.g_cpu2.u_cpu.flush) n2_flush++;
    if (dut.u_soc2.g_cpu2.u_cpu.s1_live && (dut.u_soc2.g_cpu2.u_cpu.fwd_rs1 || dut.u_soc2.g_cpu2.u_cpu.fwd_rs2)) begin
      n2_fwd++;
      if (dut.u_soc2.g_cpu2.u_cpu.ma_mem_re) n2_fwd_load++;
    end
    for (int s = 0; s < 2; s++) begin
      dbus_req_t r;
      r = (s == 0) ? dut.u_soc5.dbus_req : dut.u_soc2.dbus_req;
      if ((r.re || r.we) && !r.addr[31] && r.size != SZ_BYTE && r.addr[1:0] != 2'b00) n_misaligned++;
      if (r.re && r.addr == PERIPH + 16) n_timer_rd++;
      if (r.re && r.addr == PERIPH + 4) n_gpio_rd++;
      if (r.we && r.addr == PERIPH + 32) n_tx++;
      if (r.re && r.addr == PERIPH + 32) n_rx++;
    end
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_rx(int s, logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (s == 5) uart_rx_5 = f[i]; else uart_rx_2 = f[i];
      repeat (DIV) @(negedge clk);
    end
  endtask

  task automatic check_part1(int s, rv_iss iss, int sent);
    for (int unsigned ad = RES; ad < RES + 40; ad++)
      check(dut_byte(s, ad) == iss.rb(ad), $sformatf("%0d-stage result byte %h", s, ad));
    for (int unsigned ad = SIG + 4; ad < SIG + 128; ad += 4)
      check({dut_byte(s, ad + 3), dut_byte(s, ad + 2), dut_byte(s, ad + 1), dut_byte(s, ad)} == iss.rd32(ad),
            $sformatf("%0d-stage signature x%0d", s, (ad - SIG) / 4));
    check(sent == int'(iss.sentinel_cyc), $sformatf("%0d-stage sentinel cycle %0d vs %0d", s, sent, iss.sentinel_cyc));
  endtask

  initial begin
    rv_asm a = new();
    rv_iss iss5 = new(), iss2 = new();
    string hex;
    build_test_program(a);
    foreach (a.code[i]) for (int k = 0; k < 4; k++) begin
      put_byte(4 * i + k, byte'(a.code[i] >> (8 * k)));
      iss5.mem[4 * i + k] = byte'(a.code[i] >> (8 * k));
      iss2.mem[4 * i + k] = byte'(a.code[i] >> (8 * k));
    end
    for (int i = 0; i < BUF_LEN; i++) begin
      put_byte(BUF + i, buf_byte(i));
      iss5.mem[BUF + i] = buf_byte(i);
      iss2.mem[BUF + i] = buf_byte(i);
    end
    for (int i = 0; i < 512; i++) put_byte(RES + i, 8'h00);
    iss5.gpio_in = GPIO_IN_5;
    iss2.gpio_in = GPIO_IN_2;
    iss5.run(5);
    iss2.run(2);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (gpio_out_5 == SENTINEL && gpio_out_2 == SENTINEL);
    repeat (5) @(posedge clk);
    check_part1(5, iss5, sent5);
    check_part1(2, iss2, sent2);
    check(sent2 < sent5, "two-stage needs fewer cycles");
    check(iss5.rd32(SIG + 28) == 2 * GPIO_IN_5 && iss2.rd32(SIG + 28) == 2 * GPIO_IN_2, "GPIO inputs read");
    $display("five-stage: %0d cycles, two-stage: %0d cycles, %0d instructions, %0d taken jumps, %0d load-use pairs",
             sent5, sent2, iss5.n_instr, iss5.n_taken, iss5.n_load_use);
    $display("ticks between the timer reads: five-stage %0d, two-stage %0d", iss5.rd32(RES + 36), iss2.rd32(RES + 36));

    hex = $sformatf("%08h", crc16(CRC_LEN));
    hex = hex.toupper();
    wait (u_mon5.bytes.size() == 8 && u_mon2.bytes.size() == 8);
    for (int i = 0; i < 8; i++) begin
      check(u_mon5.bytes[i] == hex[i], $sformatf("five-stage printed digit %0d", i));
      check(u_mon2.bytes[i] == hex[i], $sformatf("two-stage printed digit %0d", i));
    end
    fork
      send_rx(5, 8'h30);
      send_rx(2, 8'h61);
    join
    wait (gpio_out_5 == DONE && gpio_out_2 == DONE);
    wait (u_mon5.bytes.size() == 9 && u_mon2.bytes.size() == 9);
    check(u_mon5.bytes[8] == 8'h31 && u_mon2.bytes[8] == 8'h62, "echo of the received bytes");
    check(u_mon5.frame_errors == 0 && u_mon2.frame_errors == 0, "no frame errors");

    // every mechanism happened
    check(flush5_at_sent == iss5.n_taken, $sformatf("five-stage flushes %0d, taken jumps %0d", flush5_at_sent, iss5.n_taken));
    check(flush2_at_sent == iss2.n_taken, $sformatf("two-stage flushes %0d, taken jumps %0d", flush2_at_sent, iss2.n_taken));
    check(n5_stall > 0, "five-stage load-use stall");
    check(n5_fwd_ma > 0, "five-stage forwarding from MA");
    check(n5_fwd_wb > 0, "five-stage forwarding from WB");
    check(n2_flush > 0, "two-stage jump flush");
    check(n2_fwd > n2_fwd_load, "two-stage forwarding of ALU results");
    check(n2_fwd_load > 0, "two-stage forwarding of load data");
    check(n_misaligned > 0, "misaligned accesses");
    check(n_timer_rd == 4, "timer reads");
    check(n_gpio_rd == 2, "GPIO input reads");
    check(n_tx == 18, "serial bytes sent");
    check(n_rx == 2, "serial bytes received");
    $display("counts: 5st flush=%0d stall=%0d fwd_ma=%0d fwd_wb=%0d | 2st flush=%0d fwd=%0d fwd_load=%0d | misaligned=%0d",
             n5_flush, n5_stall, n5_fwd_ma, n5_fwd_wb, n2_flush, n2_fwd, n2_fwd_load, n_misaligned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
