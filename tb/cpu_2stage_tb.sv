// cpu_2stage_tb: runs the common test program on the two-stage CPU.
//
// The CPU is connected to a byte_memory and to a small testbench model of the
// peripheral area (a tick counter at the timer address, a constant GPIO
// input, and a catcher for stores to the GPIO output). The program runs until
// it stores SENTINEL to the GPIO output. Checked against the reference model
// rv_iss: every result word and the 31-register signature in memory, the
// cycle in which the sentinel store executes (one lost cycle per taken jump,
// none for a load-use pair), the number of flushes, the number of loaded
// values forwarded straight into a dependent instruction (one per load-use
// pair), and the CRC against a direct computation.
module cpu_2stage_tb;
  import rv32i_pkg::*;
  import rv_tb_pkg::*;

  localparam int MEM_BYTES = 32768;
  localparam int unsigned GPIO_IN_VAL = 32'h1234_5678;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] imem_addr, imem_rdata, dbus_rdata, mem_rdata;
  dbus_req_t   dbus_req;

  always #5 clk = ~clk;

  cpu_2stage dut (
    .clk, .rst_n, .imem_addr, .imem_rdata, .dbus_req, .dbus_rdata
  );

  byte_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk     (clk),
    .i_addr  (imem_addr),
    .i_rdata (imem_rdata),
    .d_addr  (dbus_req.addr),
    .d_we    (dbus_req.we && !dbus_req.addr[31]),
    .d_size  (dbus_req.size),
    .d_wdata (dbus_req.wdata),
    .d_rdata (mem_rdata)
  );

  // peripheral model: tick counter and GPIO input, read one cycle later
  int unsigned ticks;
  logic        periph_q;
  logic [31:0] prdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ticks <= 0; periph_q <= 1'b0; prdata_q <= '0;
    end else begin
      ticks    <= ticks + 1;
      periph_q <= dbus_req.addr[31];
      prdata_q <= (dbus_req.addr[7:0] == 8'h10) ? ticks :
                  (dbus_req.addr[7:0] == 8'h04) ? GPIO_IN_VAL : 32'h0;
    end
  end
  assign dbus_rdata = periph_q ? prdata_q : mem_rdata;

  // event counters
  int n_flush = 0, n_fwd = 0, n_fwd_load = 0;
  int sentinel_tick = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.flush) n_flush++;
    if (dut.s1_live && (dut.fwd_rs1 || dut.fwd_rs2)) n_fwd++;
    if (dut.s1_live && (dut.fwd_rs1 || dut.fwd_rs2) && dut.ma_mem_re) n_fwd_load++;
    if (dbus_req.we && dbus_req.addr == PERIPH && dbus_req.wdata == SENTINEL && sentinel_tick < 0)
      sentinel_tick = int'(ticks);
  end

  function automatic byte unsigned dut_byte(int unsigned ad);
    int unsigned row = (ad % MEM_BYTES) / 4;
    unique case (ad % 4)
      0: return u_mem.g_bank[0].u_bank.ram[row];
      1: return u_mem.g_bank[1].u_bank.ram[row];
      2: return u_mem.g_bank[2].u_bank.ram[row];
      default: return u_mem.g_bank[3].u_bank.ram[row];
    endcase
  endfunction
  task automatic put_byte(int unsigned ad, byte unsigned v);
    int unsigned row = ad / 4;
    unique case (ad % 4)
      0: u_mem.g_bank[0].u_bank.ram[row] = v;
      1: u_mem.g_bank[1].u_bank.ram[row] = v;
      2: u_mem.g_bank[2].u_bank.ram[row] = v;
      default: u_mem.g_bank[3].u_bank.ram[row] = v;
    endcase
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv_asm a = new();
    rv_iss iss = new();
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
    iss.run(2);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (sentinel_tick >= 0);
    repeat (5) @(posedge clk);

    check(iss.sentinel_cyc >= 0, "reference model reached the sentinel");
    for (int unsigned ad = RES; ad < RES + 40; ad++)
      check(dut_byte(ad) == iss.rb(ad), $sformatf("result byte %h: %h vs %h", ad, dut_byte(ad), iss.rb(ad)));
    for (int unsigned ad = SIG + 4; ad < SIG + 128; ad += 4)
      check({dut_byte(ad + 3), dut_byte(ad + 2), dut_byte(ad + 1), dut_byte(ad)} == iss.rd32(ad),
            $sformatf("signature x%0d", (ad - SIG) / 4));
    check(iss.rd32(RES + 28) == crc16(CRC_LEN), "reference CRC equals direct CRC");
    check(sentinel_tick == int'(iss.sentinel_cyc),
          $sformatf("sentinel cycle %0d, expected %0d", sentinel_tick, iss.sentinel_cyc));
    check(n_flush == iss.n_taken, $sformatf("flushes %0d, taken jumps %0d", n_flush, iss.n_taken));
    check(n_fwd_load == iss.n_load_use, $sformatf("load forwards %0d, load-use pairs %0d", n_fwd_load, iss.n_load_use));
    check(n_fwd > n_fwd_load, "forwarding of ALU results happened");
    $display("instr=%0d taken=%0d load_use=%0d cycles=%0d fwd=%0d fwd_load=%0d",
             iss.n_instr, iss.n_taken, iss.n_load_use, sentinel_tick, n_fwd, n_fwd_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
