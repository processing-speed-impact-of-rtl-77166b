// sext_tb: checks byte/half/word selection and sign or zero extension of the
// load data for all load funct3 codes, on random data and sign-bit corners.
module sext_tb;
  logic [2:0]  f3;
  logic [31:0] raw, data, exp;
  int checks = 0, failures = 0;

  sext dut (.funct3(f3), .raw(raw), .data(data));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [5] = '{0, 1, 2, 4, 5};
    repeat (300) begin
      raw = $urandom;
      if ($urandom % 3 == 0) raw[7] = 1'b1;
      if ($urandom % 3 == 0) raw[15] = 1'b1;
      foreach (codes[k]) begin
        f3 = 3'(codes[k]); #1;
        case (codes[k])
          0: exp = int'(byte'(raw[7:0]));
          1: exp = int'(shortint'(raw[15:0]));
          4: exp = 32'(raw[7:0]);
          5: exp = 32'(raw[15:0]);
          default: exp = raw;
        endcase
        checks++;
        if (data !== exp) begin failures++; $display("FAIL f3=%0d raw=%h -> %h", f3, raw, data); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
