// gpio_tb: checks the output register (written value held until the next
// write, zero after reset) and the two-flip-flop input synchroniser (input
// visible exactly two clocks after it changes).
module gpio_tb;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [31:0] wdata = 0, gpio_out, gpio_in = 0, in_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpio dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, o;
    gpio_in = 32'hdead_beef;
    repeat (2) @(negedge clk);
    chk(gpio_out == 0 && in_q == 0, "reset");
    rst_n = 1;
    o = 0;
    repeat (200) begin
      @(negedge clk);
      we = $urandom % 2; wdata = $urandom; v = gpio_in ^ ($urandom | 32'h1); gpio_in = v;
      if (we) o = wdata;
      @(negedge clk); we = 0;
      chk(gpio_out == o, "output register");
      chk(in_q != v, "input not visible after one clock");
      @(negedge clk);
      chk(in_q == v, "input visible after two clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
