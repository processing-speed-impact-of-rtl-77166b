// alu_tb: checks every ALU operation on corner values and random operands
// against results computed here from the operation's definition.
module alu_tb;
  import rv32i_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, res;
  int checks = 0, failures = 0;

  alu dut (.op(op), .op_l(a), .op_r(b), .res(res));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    logic [63:0] ext = {{32{x[31]}}, x};
    case (o)
      ALU_ADD:  return 32'(longint'(x) + longint'(y));
      ALU_SUB:  return 32'(longint'(x) - longint'(y));
      ALU_SLL:  return 32'(64'(x) << y[4:0]);
      ALU_SLT:  return (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(y)) ? 32'd1 : 32'd0;
      ALU_XOR:  return x ^ y;
      ALU_SRL:  return 32'(64'(x) >> y[4:0]);
      ALU_SRA:  return 32'(ext >> y[4:0]);
      ALU_OR:   return ~(~x & ~y);
      ALU_AND:  return ~(~x | ~y);
      default:  return 32'hx;
    endcase
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1f};
    for (int o = 0; o <= int'(ALU_AND); o++) begin
      op = alu_op_e'(o);
      for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
        a = corners[i]; b = corners[j]; #1;
        checks++;
        if (res !== model(op, a, b)) begin failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, res); end
      end
      repeat (200) begin
        a = $urandom; b = $urandom; #1;
        checks++;
        if (res !== model(op, a, b)) begin failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, res); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
