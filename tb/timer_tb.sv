// timer_tb: checks that the counter is zero in reset, advances by exactly
// one per clock, loads a written value and continues from it.
module timer_tb;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [31:0] wdata = 0, count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timer dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (count %0d)", what, count); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    chk(count == 0, "zero in reset");
    rst_n = 1;
    for (int i = 1; i <= 500; i++) begin
      @(negedge clk);
      chk(count == i, "one tick per clock");
    end
    we = 1; wdata = 32'hffff_fffe;
    @(negedge clk); we = 0;
    chk(count == 32'hffff_fffe, "load");
    @(negedge clk); chk(count == 32'hffff_ffff, "continue after load");
    @(negedge clk); chk(count == 0, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
