// rv_tb_pkg: verification helpers shared by the CPU, system and top-level
// testbenches.
//
//  - rv_asm: a tiny RV32I assembler (label-resolving, two pass) that builds
//    programs in memory without any external tool.
//  - build_test_program: the common test program. Its first part exercises
//    every instruction class, all forwarding paths, load-use pairs, misaligned
//    accesses, calls and a CRC-16 loop of the kind the benchmark uses; it reads
//    the timer before and after, stores a register signature and then writes
//    SENTINEL to the GPIO output. The second part (after the sentinel) prints
//    the CRC as eight hex digits on the serial port, waits for one received
//    byte, echoes it plus one and writes DONE to the GPIO output.
//  - rv_iss: an instruction-set reference model written from the ISA. It runs
//    the first part and also predicts, for a given pipeline length, the clock
//    cycle in which each instruction executes: five stages lose three cycles
//    per taken jump and one per load followed by a dependent instruction, two
//    stages lose one cycle per taken jump.
//  - crc16: the CRC the program computes, computed here directly.
package rv_tb_pkg;

  localparam int unsigned PERIPH   = 32'h8000_0000;
  localparam int unsigned BUF      = 32'h0000_1000;  // 64 preloaded bytes
  localparam int unsigned RES      = 32'h0000_2000;  // results
  localparam int unsigned SIG      = 32'h0000_2100;  // register signature
  localparam int unsigned SENTINEL = 32'h0000_600D;
  localparam int unsigned DONE     = 32'h0000_0600;
  localparam int unsigned BUF_LEN  = 64;
  localparam int unsigned CRC_LEN  = 32;

  // ---------------------------------------------------------- encodings
  function automatic int unsigned enc_r(int f7, int rs2, int rs1, int f3, int rd, int op);
    return (f7 << 25) | (rs2 << 20) | (rs1 << 15) | (f3 << 12) | (rd << 7) | op;
  endfunction
  function automatic int unsigned enc_i(int imm, int rs1, int f3, int rd, int op);
    return ((imm & 12'hfff) << 20) | (rs1 << 15) | (f3 << 12) | (rd << 7) | op;
  endfunction
  function automatic int unsigned enc_s(int imm, int rs2, int rs1, int f3);
    return (((imm >> 5) & 7'h7f) << 25) | (rs2 << 20) | (rs1 << 15) | (f3 << 12) |
           ((imm & 5'h1f) << 7) | 7'b0100011;
  endfunction
  function automatic int unsigned enc_b(int imm, int rs2, int rs1, int f3);
    return (((imm >> 12) & 1) << 31) | (((imm >> 5) & 6'h3f) << 25) | (rs2 << 20) |
           (rs1 << 15) | (f3 << 12) | (((imm >> 1) & 4'hf) << 8) | (((imm >> 11) & 1) << 7) |
           7'b1100011;
  endfunction
  function automatic int unsigned enc_u(int imm20, int rd, int op);
    return ((imm20 & 20'hfffff) << 12) | (rd << 7) | op;
  endfunction
  function automatic int unsigned enc_j(int imm, int rd);
    return (((imm >> 20) & 1) << 31) | (((imm >> 1) & 10'h3ff) << 21) | (((imm >> 11) & 1) << 20) |
           (((imm >> 12) & 8'hff) << 12) | (rd << 7) | 7'b1101111;
  endfunction

  // ---------------------------------------------------------- assembler
  class rv_asm;
    int unsigned code[$];
    int          labels[string];
    typedef struct { int idx; string lbl; int kind; int rd; int rs1; int rs2; int f3; } fix_t;
    fix_t        fixes[$];

    function int here(); return code.size() * 4; endfunction
    function void label(string n); labels[n] = here(); endfunction
    function void w(int unsigned x); code.push_back(x); endfunction

    function void r(int f7, int f3, int rd, int rs1, int rs2); w(enc_r(f7, rs2, rs1, f3, rd, 7'b0110011)); endfunction
    function void add (int rd, int a, int b); r(0,   0, rd, a, b); endfunction
    function void sub (int rd, int a, int b); r(32,  0, rd, a, b); endfunction
    function void sll (int rd, int a, int b); r(0,   1, rd, a, b); endfunction
    function void slt (int rd, int a, int b); r(0,   2, rd, a, b); endfunction
    function void sltu(int rd, int a, int b); r(0,   3, rd, a, b); endfunction
    function void xor_(int rd, int a, int b); r(0,   4, rd, a, b); endfunction
    function void srl (int rd, int a, int b); r(0,   5, rd, a, b); endfunction
    function void sra (int rd, int a, int b); r(32,  5, rd, a, b); endfunction
    function void or_ (int rd, int a, int b); r(0,   6, rd, a, b); endfunction
    function void and_(int rd, int a, int b); r(0,   7, rd, a, b); endfunction
    function void opi(int f3, int rd, int a, int imm); w(enc_i(imm, a, f3, rd, 7'b0010011)); endfunction
    function void addi (int rd, int a, int imm); opi(0, rd, a, imm); endfunction
    function void slti (int rd, int a, int imm); opi(2, rd, a, imm); endfunction
    function void sltiu(int rd, int a, int imm); opi(3, rd, a, imm); endfunction
    function void xori (int rd, int a, int imm); opi(4, rd, a, imm); endfunction
    function void ori  (int rd, int a, int imm); opi(6, rd, a, imm); endfunction
    function void andi (int rd, int a, int imm); opi(7, rd, a, imm); endfunction
    function void slli (int rd, int a, int sh); opi(1, rd, a, sh); endfunction
    function void srli (int rd, int a, int sh); opi(5, rd, a, sh); endfunction
    function void srai (int rd, int a, int sh); opi(5, rd, a, sh | 12'h400); endfunction
    function void lui  (int rd, int imm20); w(enc_u(imm20, rd, 7'b0110111)); endfunction
    function void auipc(int rd, int imm20); w(enc_u(imm20, rd, 7'b0010111)); endfunction
    function void ld(int f3, int rd, int a, int off); w(enc_i(off, a, f3, rd, 7'b0000011)); endfunction
    function void lb (int rd, int a, int off); ld(0, rd, a, off); endfunction
    function void lh (int rd, int a, int off); ld(1, rd, a, off); endfunction
    function void lw (int rd, int a, int off); ld(2, rd, a, off); endfunction
    function void lbu(int rd, int a, int off); ld(4, rd, a, off); endfunction
    function void lhu(int rd, int a, int off); ld(5, rd, a, off); endfunction
    function void sb(int v, int a, int off); w(enc_s(off, v, a, 0)); endfunction
    function void sh(int v, int a, int off); w(enc_s(off, v, a, 1)); endfunction
    function void sw(int v, int a, int off); w(enc_s(off, v, a, 2)); endfunction
    function void jalr(int rd, int a, int off); w(enc_i(off, a, 0, rd, 7'b1100111)); endfunction
    function void fence(); w(32'h0ff0000f); endfunction
    function void br(int f3, int a, int b, string l);
      fixes.push_back('{int'(code.size()), l, 0, 0, a, b, f3}); w(0);
    endfunction
    function void beq (int a, int b, string l); br(0, a, b, l); endfunction
    function void bne (int a, int b, string l); br(1, a, b, l); endfunction
    function void blt (int a, int b, string l); br(4, a, b, l); endfunction
    function void bge (int a, int b, string l); br(5, a, b, l); endfunction
    function void bltu(int a, int b, string l); br(6, a, b, l); endfunction
    function void bgeu(int a, int b, string l); br(7, a, b, l); endfunction
    function void jal(int rd, string l); fixes.push_back('{int'(code.size()), l, 1, rd, 0, 0, 0}); w(0); endfunction

    function void resolve();
      foreach (fixes[k]) begin
        int off = labels[fixes[k].lbl] - fixes[k].idx * 4;
        if (fixes[k].kind == 0) code[fixes[k].idx] = enc_b(off, fixes[k].rs2, fixes[k].rs1, fixes[k].f3);
        else                    code[fixes[k].idx] = enc_j(off, fixes[k].rd);
      end
    endfunction
  endclass

  // ------------------------------------------------------- test program
  function automatic void build_test_program(rv_asm a);
    // --- start: peripheral base, timer, GPIO input
    a.lui(5, 32'h80000);
    a.lw(6, 5, 16);            // x6 = timer at start
    a.lw(7, 5, 4);             // x7 = GPIO input
    a.add(7, 7, 7);            // load-use on a peripheral load
    // --- ALU with back-to-back dependencies (forward from MA and from WB)
    a.addi(1, 0, 100);
    a.addi(2, 1, -33);
    a.add(3, 1, 2);
    a.sub(4, 3, 1);
    a.xori(8, 4, 12'h5a5);
    a.ori(9, 8, 12'h0f0);
    a.andi(10, 9, 12'h7ff);
    a.slli(11, 10, 7);
    a.srli(12, 11, 3);
    a.lui(13, 20'hfffff);
    a.addi(13, 13, 12'h123);
    a.srai(14, 13, 5);
    a.slti(15, 13, 1);
    a.sltiu(16, 13, 1);
    a.slt(17, 13, 1);
    a.sltu(18, 13, 1);
    a.sll(19, 1, 2);
    a.srl(20, 13, 2);
    a.sra(21, 13, 2);
    a.xor_(22, 19, 20);
    a.or_(23, 22, 21);
    a.and_(24, 23, 13);
    a.auipc(25, 1);
    a.fence();
    // --- memory: all sizes, misaligned, load-use
    a.lui(26, BUF >> 12);
    a.lui(27, RES >> 12);
    a.sw(3, 27, 0);
    a.sh(13, 27, 4);
    a.sb(13, 27, 6);
    a.sw(13, 27, 9);           // misaligned word across a word boundary
    a.lw(28, 27, 9);
    a.add(29, 28, 1);          // load-use
    a.lh(30, 27, 10);
    a.lhu(31, 27, 10);
    a.lb(19, 27, 12);
    a.lbu(20, 27, 12);
    a.sw(29, 27, 16);
    a.sh(30, 27, 21);          // misaligned halfword
    a.lw(21, 27, 20);
    a.sw(21, 27, 24);          // load then dependent store data
    // --- branches of every kind, taken and not taken
    a.addi(22, 0, 0);
    a.beq(1, 2, "bad");
    a.bne(1, 1, "bad");
    a.blt(1, 13, "bad");
    a.bge(13, 1, "bad");
    a.bltu(13, 1, "bad");
    a.bgeu(1, 13, "bad");
    a.beq(1, 1, "t1");
    a.addi(22, 22, 1000);      // skipped
    a.label("t1");
    a.bne(1, 2, "t2");
    a.addi(22, 22, 1000);
    a.label("t2");
    a.blt(13, 1, "t3");
    a.addi(22, 22, 1000);
    a.label("t3");
    a.bge(1, 13, "t4");
    a.addi(22, 22, 1000);
    a.label("t4");
    a.bltu(1, 13, "t5");
    a.addi(22, 22, 1000);
    a.label("t5");
    a.bgeu(13, 1, "t6");
    a.addi(22, 22, 1000);
    a.label("t6");
    a.addi(22, 22, 7);
    a.jal(0, "crc");
    a.label("bad");
    a.addi(22, 22, 12'h7ff);
    // --- CRC-16 (reflected, polynomial 0xA001) over CRC_LEN buffer bytes
    a.label("crc");
    a.addi(8, 0, 0);
    a.addi(9, 26, 0);
    a.addi(10, 26, CRC_LEN);
    a.lui(11, 20'h0000a);
    a.addi(11, 11, 1);
    a.label("outer");
    a.lbu(12, 9, 0);
    a.addi(13, 0, 8);
    a.label("inner");
    a.xor_(14, 12, 8);
    a.andi(14, 14, 1);
    a.srli(8, 8, 1);
    a.beq(14, 0, "skip");
    a.xor_(8, 8, 11);
    a.label("skip");
    a.srli(12, 12, 1);
    a.addi(13, 13, -1);
    a.bne(13, 0, "inner");
    a.addi(9, 9, 1);
    a.bltu(9, 10, "outer");
    a.sw(8, 27, 28);
    // --- call: absolute value of the sum of 16 signed halfwords
    a.jal(1, "func");
    a.sw(15, 27, 32);
    a.lw(2, 5, 16);            // x2 = timer at end
    a.sub(2, 2, 6);
    a.sw(2, 27, 36);
    // --- signature: x1..x31
    for (int i = 1; i < 32; i++) a.sw(i, 27, 256 + 4 * i);
    a.lui(4, SENTINEL >> 12);
    a.addi(4, 4, SENTINEL & 12'hfff);
    a.sw(4, 5, 0);             // GPIO out = SENTINEL
    // --- part 2: print CRC (x8) as 8 hex digits, echo one byte + 1
    a.addi(20, 0, 8);
    a.label("ploop");
    a.srli(21, 8, 28);
    a.addi(23, 0, 10);
    a.blt(21, 23, "dig");
    a.addi(21, 21, 7);         // 'A' - '0' - 10
    a.label("dig");
    a.addi(21, 21, 48);
    a.label("txw");
    a.lw(24, 5, 12'h24);
    a.andi(24, 24, 1);
    a.bne(24, 0, "txw");
    a.sw(21, 5, 12'h20);
    a.slli(8, 8, 4);
    a.addi(20, 20, -1);
    a.bne(20, 0, "ploop");
    a.label("rxw");
    a.lw(24, 5, 12'h24);
    a.andi(24, 24, 2);
    a.beq(24, 0, "rxw");
    a.lw(22, 5, 12'h20);
    a.addi(22, 22, 1);
    a.label("txw2");
    a.lw(24, 5, 12'h24);
    a.andi(24, 24, 1);
    a.bne(24, 0, "txw2");
    a.sw(22, 5, 12'h20);
    a.addi(4, 0, DONE);
    a.sw(4, 5, 0);             // GPIO out = DONE
    a.label("halt");
    a.jal(0, "halt");
    // --- function
    a.label("func");
    a.addi(15, 0, 0);
    a.addi(16, 0, 0);
    a.addi(17, 0, 16);
    a.label("fl");
    a.slli(18, 16, 1);
    a.add(18, 18, 26);
    a.lh(19, 18, 0);
    a.add(15, 15, 19);         // load-use
    a.addi(16, 16, 1);
    a.blt(16, 17, "fl");
    a.bge(15, 0, "pos");
    a.sub(15, 0, 15);
    a.label("pos");
    a.jalr(0, 1, 0);
    a.resolve();
  endfunction

  // deterministic buffer contents
  function automatic byte unsigned buf_byte(int i);
    int unsigned x = (i + 1) * 32'h9E3779B1;
    return byte'(x >> 13);
  endfunction

  function automatic int unsigned crc16(int len);
    int unsigned crc = 0;
    for (int i = 0; i < len; i++) begin
      byte unsigned d = buf_byte(i);
      for (int b = 0; b < 8; b++) begin
        bit lsb = (d[0] ^ crc[0]);
        crc = crc >> 1;
        if (lsb) crc ^= 32'hA001;
        d = d >> 1;
      end
    end
    return crc;
  endfunction

  // ------------------------------------------------------ reference model
  class rv_iss;
    byte unsigned mem [int unsigned];
    int unsigned  x [32];
    int unsigned  gpio_in;
    // statistics / timing prediction
    longint       cyc;          // cycle in which the current instruction executes
    longint       sentinel_cyc;
    int           n_instr, n_taken, n_load_use;

    function new(); endfunction

    function byte unsigned rb(int unsigned ad);
      return mem.exists(ad) ? mem[ad] : 8'h00;
    endfunction
    function int unsigned rd32(int unsigned ad);
      return {rb(ad + 3), rb(ad + 2), rb(ad + 1), rb(ad)};
    endfunction
    function void wr(int unsigned ad, int unsigned v, int n);
      for (int i = 0; i < n; i++) mem[ad + i] = byte'(v >> (8 * i));
    endfunction

    // Runs from address 0 until the store of SENTINEL to the GPIO output.
    function void run(int stages, int unsigned max_steps = 100000);
      int unsigned pc = 0;
      int          prev_load_rd = 0;
      foreach (x[i]) x[i] = 0;
      cyc = (stages == 5) ? 3 : 1;
      n_instr = 0; n_taken = 0; n_load_use = 0;
      sentinel_cyc = -1;
      for (int unsigned step = 0; step < max_steps; step++) begin
        int unsigned ins = rd32(pc);
        int unsigned op = ins & 7'h7f, rd = (ins >> 7) & 31, f3 = (ins >> 12) & 7;
        int unsigned rs1 = (ins >> 15) & 31, rs2 = (ins >> 20) & 31, f7 = ins >> 25;
        int unsigned a = x[rs1], b = x[rs2], res = 0, npc = pc + 4;
        int          iimm = $signed(ins) >>> 20;
        int          simm = ($signed(ins) >>> 25 << 5) | int'((ins >> 7) & 31);
        int          bimm = (($signed(ins) >>> 31) << 12) | int'(((ins >> 7) & 1) << 11) |
                            int'(((ins >> 25) & 6'h3f) << 5) | int'(((ins >> 8) & 4'hf) << 1);
        int          jimm = (($signed(ins) >>> 31) << 20) | int'(ins & 32'h000ff000) |
                            int'(((ins >> 20) & 1) << 11) | int'(((ins >> 21) & 10'h3ff) << 1);
        bit          wr_rd = 0, taken = 0, use1 = 0, use2 = 0, is_load = 0, stop = 0;
        unique case (op)
          7'b0110111: begin res = ins & 32'hfffff000; wr_rd = 1; end
          7'b0010111: begin res = pc + (ins & 32'hfffff000); wr_rd = 1; end
          7'b1101111: begin res = pc + 4; wr_rd = 1; taken = 1; npc = pc + jimm; end
          7'b1100111: begin res = pc + 4; wr_rd = 1; taken = 1; use1 = 1; npc = (a + iimm) & ~1; end
          7'b1100011: begin
            use1 = 1; use2 = 1;
            unique case (f3)
              0: taken = (a == b);
              1: taken = (a != b);
              4: taken = ($signed(a) <  $signed(b));
              5: taken = ($signed(a) >= $signed(b));
              6: taken = (a <  b);
              7: taken = (a >= b);
              default: taken = 0;
            endcase
            if (taken) npc = pc + bimm;
          end
          7'b0000011: begin
            int unsigned ad = a + iimm, v;
            use1 = 1; wr_rd = 1; is_load = 1;
            if (ad >= PERIPH) v = (ad == PERIPH + 16) ? int'(cyc) : (ad == PERIPH + 4) ? gpio_in : 0;
            else v = rd32(ad);
            unique case (f3)
              0: res = {{24{v[7]}}, v[7:0]};
              1: res = {{16{v[15]}}, v[15:0]};
              4: res = v & 8'hff;
              5: res = v & 16'hffff;
              default: res = v;
            endcase
          end
          7'b0100011: begin
            int unsigned ad = a + simm;
            use1 = 1; use2 = 1;
            if (ad >= PERIPH) begin
              if (ad == PERIPH && b == SENTINEL) stop = 1;
            end else wr(ad, b, f3 == 0 ? 1 : f3 == 1 ? 2 : 4);
          end
          7'b0010011, 7'b0110011: begin
            int unsigned o2 = (op == 7'b0010011) ? int'(iimm) : b;
            bit alt = (op == 7'b0110011 || f3 == 5) && ins[30];
            use1 = 1; use2 = (op == 7'b0110011); wr_rd = 1;
            unique case (f3)
              0: res = (alt && op == 7'b0110011) ? a - o2 : a + o2;
              1: res = a << o2[4:0];
              2: res = ($signed(a) < $signed(o2)) ? 1 : 0;
              3: res = (a < o2) ? 1 : 0;
              4: res = a ^ o2;
              5: res = alt ? int'($signed(a) >>> o2[4:0]) : a >> o2[4:0];
              6: res = a | o2;
              default: res = a & o2;
            endcase
          end
          default: ;  // fence / system: no-op
        endcase
        // timing: one stall cycle if this instruction needs the previous load
        if (prev_load_rd != 0 &&
            ((use1 && rs1 == prev_load_rd) || (use2 && rs2 == prev_load_rd))) begin
          n_load_use++;
          if (stages == 5) cyc++;
        end
        if (ad_is_timer_load(ins, a)) res = int'(cyc);  // timer value after any stall
        if (wr_rd && rd != 0) x[rd] = res;
        n_instr++;
        if (stop) begin sentinel_cyc = cyc; return; end
        prev_load_rd = is_load ? int'(rd) : 0;
        if (taken) begin n_taken++; cyc += (stages == 5) ? 4 : 2; end
        else cyc += 1;
        pc = npc;
      end
    endfunction

    // a load from the timer register returns the cycle it executes in
    function bit ad_is_timer_load(int unsigned ins, int unsigned a);
      int iimm = $signed(ins) >>> 20;
      return (ins & 7'h7f) == 7'b0000011 && (a + iimm) == PERIPH + 16 && ((ins >> 12) & 7) == 2;
    endfunction
  endclass
endpackage
