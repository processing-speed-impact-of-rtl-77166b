// comp_tb: checks the branch comparator for all six conditions on corner
// values and random operands against comparisons done here in 64-bit
// signed/unsigned arithmetic.
module comp_tb;
  import rv32i_pkg::*;
  logic [2:0]  f3;
  logic [31:0] a, b;
  logic        taken;
  int checks = 0, failures = 0;

  comp dut (.funct3(f3), .a(a), .b(b), .taken(taken));

  function automatic bit model(logic [2:0] f, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    longint ux = longint'(x), uy = longint'(y);
    case (f)
      3'b000: return ux == uy;
      3'b001: return ux != uy;
      3'b100: return sx < sy;
      3'b101: return !(sx < sy);
      3'b110: return ux < uy;
      3'b111: return !(ux < uy);
      default: return 0;
    endcase
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    for (int f = 0; f < 8; f++) begin
      f3 = 3'(f);
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
        a = corners[i]; b = corners[j]; #1;
        checks++;
        if (taken !== model(f3, a, b)) begin failures++; $display("FAIL f3=%0d %h %h", f3, a, b); end
      end
      repeat (100) begin
        a = $urandom; b = ($urandom % 4 == 0) ? a : $urandom; #1;
        checks++;
        if (taken !== model(f3, a, b)) begin failures++; $display("FAIL f3=%0d %h %h", f3, a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
