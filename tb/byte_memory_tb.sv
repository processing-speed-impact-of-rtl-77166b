// byte_memory_tb: random byte, halfword and word accesses at every alignment
// (including words and halfwords that cross a word boundary and the wrap at
// the top of memory) against a flat byte array; checks the data port's
// four-byte read window one cycle after the address and the instruction
// port's reads of the same memory.
module byte_memory_tb;
  import rv32i_pkg::*;
  localparam int MEM_BYTES = 256;
  logic        clk = 0, d_we;
  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata;
  size_e       d_size;
  logic [7:0]  model [MEM_BYTES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  byte_memory #(.MEM_BYTES(MEM_BYTES)) dut (.*);

  function automatic logic [31:0] window(logic [31:0] ad);
    logic [31:0] w;
    for (int k = 0; k < 4; k++) w[8 * k +: 8] = model[(ad + k) % MEM_BYTES];
    return w;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_i, exp_d;
    d_we = 1; d_size = SZ_BYTE; i_addr = 0;
    for (int i = 0; i < MEM_BYTES; i++) begin
      @(negedge clk); d_addr = i; d_wdata = 32'($urandom); model[i] = d_wdata[7:0];
    end
    repeat (5000) begin
      @(negedge clk);
      d_addr = $urandom % MEM_BYTES; i_addr = ($urandom % MEM_BYTES) & ~32'h3;
      d_we = $urandom % 2; d_size = size_e'($urandom % 3); d_wdata = $urandom;
      exp_i = window(i_addr); exp_d = window(d_addr);
      @(posedge clk);
      if (d_we) for (int k = 0; k < (d_size == SZ_BYTE ? 1 : d_size == SZ_HALF ? 2 : 4); k++)
        model[(d_addr + k) % MEM_BYTES] = d_wdata[8 * k +: 8];
      #1;
      checks += 2;
      if (d_rdata !== exp_d) begin failures++; $display("FAIL data read @%0d: %h vs %h", d_addr, d_rdata, exp_d); end
      if (i_rdata !== exp_i) begin failures++; $display("FAIL instr read @%0d: %h vs %h", i_addr, i_rdata, exp_i); end
    end
    // final sweep: every word window matches the model
    d_we = 0;
    for (int i = 0; i < MEM_BYTES; i++) begin
      @(negedge clk); d_addr = i; exp_d = window(i);
      @(posedge clk); #1;
      checks++;
      if (d_rdata !== exp_d) begin failures++; $display("FAIL sweep @%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
