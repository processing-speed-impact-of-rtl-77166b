// regfile_tb: random writes and reads against a testbench array; checks
// reset to zero, x0 always zero, both read ports, and that a read of the
// register being written in the same cycle returns the new value.
module regfile_tb;
  logic        clk = 0, rst_n = 0, rd_we;
  logic [4:0]  rs1_addr, rs2_addr, rd_addr;
  logic [31:0] rs1_data, rs2_data, rd_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.*);

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
    foreach (model[i]) model[i] = 0;
    rd_we = 0; rd_addr = 0; rd_data = 0; rs1_addr = 0; rs2_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      rs1_addr = 5'(i); rs2_addr = 5'(31 - i); #1;
      chk(rs1_data == 0 && rs2_data == 0, "zero after reset");
    end
    repeat (2000) begin
      @(negedge clk);
      rd_we = ($urandom % 4) != 0;
      rd_addr = 5'($urandom); rd_data = $urandom;
      rs1_addr = ($urandom % 3 == 0) ? rd_addr : 5'($urandom);
      rs2_addr = 5'($urandom);
      #1;
      chk(rs1_data == ((rs1_addr == 0) ? 0 : (rd_we && rd_addr == rs1_addr) ? rd_data : model[rs1_addr]),
          $sformatf("rs1 x%0d", rs1_addr));
      chk(rs2_data == ((rs2_addr == 0) ? 0 : (rd_we && rd_addr == rs2_addr) ? rd_data : model[rs2_addr]),
          $sformatf("rs2 x%0d", rs2_addr));
      @(posedge clk);
      if (rd_we && rd_addr != 0) model[rd_addr] = rd_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
