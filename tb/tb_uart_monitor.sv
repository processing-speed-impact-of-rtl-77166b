// tb_uart_monitor: testbench-only serial receiver. Watches an 8N1 line with
// DIV clocks per bit, samples each bit in its middle and appends every byte
// with a valid stop bit to the queue `bytes`; frame errors are counted.
module tb_uart_monitor #(
  parameter int DIV = 10
) (
  input logic clk,
  input logic line
);
  byte unsigned bytes[$];
  int           frame_errors = 0;

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge line);
      repeat (DIV / 2) @(posedge clk);
      if (line == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = line;
        end
        repeat (DIV) @(posedge clk);
        if (line == 1'b1) bytes.push_back(b);
        else frame_errors++;
      end
    end
  end
endmodule
