// byte_bank_tb: random traffic on both ports of one byte bank against a
// testbench array; checks the one-cycle read latency of both ports and that
// a port-B read of the row being written returns the old byte.
module byte_bank_tb;
  localparam int ROWS = 64;
  logic       clk = 0, b_we;
  logic [5:0] a_addr, b_addr;
  logic [7:0] a_rdata, b_rdata, b_wdata;
  logic [7:0] model [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  byte_bank #(.ROWS(ROWS)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_a, exp_b;
    b_we = 1;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk); b_addr = 6'(i); b_wdata = 8'(i * 7 + 3); model[i] = b_wdata; a_addr = 0;
    end
    repeat (3000) begin
      @(negedge clk);
      a_addr = 6'($urandom); b_addr = 6'($urandom); b_we = $urandom % 2; b_wdata = 8'($urandom);
      exp_a = model[a_addr]; exp_b = model[b_addr];
      @(posedge clk);
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL port A row %0d", a_addr); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL port B row %0d", b_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
