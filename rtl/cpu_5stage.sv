// cpu_5stage: five-stage RV32I pipeline (IF, ID, EX, MA, WB).
//
// IF   The PC register holds the address of the instruction in IF. The
//      instruction memory is synchronous and is addressed with pc_next (the
//      PC mux output), so the instruction word arrives together with pc.
// ID   decode_instr / decode_imm decode the instruction; the register file
//      is read (write-through, so a value being written back is seen).
// EX   ALU, branch comparator, jump address (pc + imm, or rs1 + imm for
//      JALR) and data address (rs1 + imm). The data request leaves here; the
//      synchronous data memory itself separates EX from MA.
// MA   read data is rotated by the memory, extended by sext, and selected
//      against the ALU result.
// WB   the selected value is written to the register file.
//
// Jumps: jmp and jmp_addr are registered at the end of EX and steer the PC
// mux while the jump is in MA. In that cycle the three younger instructions
// (in IF, ID and EX) are discarded, so every taken jump or branch costs three
// cycles. There is no jump prediction.
// Forwarding: EX operands take the ALU result of the instruction in MA or the
// write-back value of the instruction in WB when the destination matches.
// Load-use: a load in EX whose destination is a source of the instruction in
// ID holds IF and ID for one cycle and puts a bubble into EX; the loaded value
// is then forwarded from WB.
//
// Interface: imem_addr/imem_rdata (one-cycle read latency), dbus_req in EX
// with dbus_rdata one cycle later. Reset is asynchronous, active low; fetch
// starts at RESET_PC. Stage split, forwarding paths, stall and three-slot
// jump penalty follow the pipeline description; the operand selects and the
// flush timing in detail are this design's reading of it. FENCE, ECALL and
// EBREAK execute as no-ops; there are no traps or CSRs.
module cpu_5stage
  import rv32i_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output dbus_req_t   dbus_req,
  input  logic [31:0] dbus_rdata
);
  // ------------------------------------------------------------------- IF
  logic        fetch_valid;
  logic [31:0] pc, pc_next;
  logic        stall;       // load-use hold of IF/ID, bubble into EX
  logic        flush;       // taken jump in MA: discard IF, ID and EX

  // EX/MA register (declared early: it drives the PC mux)
  logic        ma_valid, ma_reg_we, ma_mem_re, ma_jmp;
  logic [4:0]  ma_rd;
  logic [2:0]  ma_funct3;
  logic [31:0] ma_alu_res, ma_jmp_addr;

  assign flush = ma_jmp;

  always_comb begin
    if (!fetch_valid) pc_next = RESET_PC;
    else if (flush)   pc_next = ma_jmp_addr;
    else if (stall)   pc_next = pc;
    else              pc_next = pc + 32'd4;
  end
  assign imem_addr = pc_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_valid <= 1'b0;
      pc          <= RESET_PC;
    end else begin
      fetch_valid <= 1'b1;
      pc          <= pc_next;
    end
  end

  // --------------------------------------------------------------- IF/ID
  logic        id_valid;
  logic [31:0] id_pc, id_instr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_pc    <= '0;
      id_instr <= '0;
    end else if (flush) begin
      id_valid <= 1'b0;
    end else if (!stall) begin
      id_valid <= fetch_valid;
      id_pc    <= pc;
      id_instr <= imem_rdata;
    end
  end

  // ------------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [31:0] id_imm, id_rs1_data, id_rs2_data;

  // MA/WB register (write-back port)
  logic        wb_we;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data;

  decode_instr u_decode_instr (.instr(id_instr), .ctrl(id_ctrl));
  decode_imm   u_decode_imm   (.instr(id_instr), .imm(id_imm));

  regfile u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .rs1_addr (id_ctrl.rs1_addr),
    .rs2_addr (id_ctrl.rs2_addr),
    .rs1_data (id_rs1_data),
    .rs2_data (id_rs2_data),
    .rd_addr  (wb_rd),
    .rd_we    (wb_we),
    .rd_data  (wb_data)
  );

  // --------------------------------------------------------------- ID/EX
  logic        ex_valid;
  ctrl_t       ex_ctrl;
  logic [31:0] ex_pc, ex_imm, ex_rs1_data, ex_rs2_data;

  always_comb begin
    stall = ex_valid && ex_ctrl.mem_re && ex_ctrl.reg_we && id_valid &&
            ((ex_ctrl.rd_addr == id_ctrl.rs1_addr) || (ex_ctrl.rd_addr == id_ctrl.rs2_addr));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid    <= 1'b0;
      ex_ctrl     <= '0;
      ex_pc       <= '0;
      ex_imm      <= '0;
      ex_rs1_data <= '0;
      ex_rs2_data <= '0;
    end else begin
      ex_valid    <= id_valid && !flush && !stall;
      ex_ctrl     <= id_ctrl;
      ex_pc       <= id_pc;
      ex_imm      <= id_imm;
      ex_rs1_data <= id_rs1_data;
      ex_rs2_data <= id_rs2_data;
    end
  end

  // ------------------------------------------------------------------- EX
  logic        ex_live;              // EX holds an instruction that commits
  logic        fwd_ma_rs1, fwd_ma_rs2, fwd_wb_rs1, fwd_wb_rs2;
  logic [31:0] rs1_fwd, rs2_fwd, op_l, op_r, alu_res, jmp_base, jmp_addr;
  logic        br_taken, jmp;

  assign ex_live = ex_valid && !flush;

  always_comb begin
    fwd_ma_rs1 = ma_valid && ma_reg_we && !ma_mem_re && (ma_rd == ex_ctrl.rs1_addr);
    fwd_ma_rs2 = ma_valid && ma_reg_we && !ma_mem_re && (ma_rd == ex_ctrl.rs2_addr);
    fwd_wb_rs1 = wb_we && (wb_rd == ex_ctrl.rs1_addr);
    fwd_wb_rs2 = wb_we && (wb_rd == ex_ctrl.rs2_addr);
    rs1_fwd = fwd_ma_rs1 ? ma_alu_res : fwd_wb_rs1 ? wb_data : ex_rs1_data;
    rs2_fwd = fwd_ma_rs2 ? ma_alu_res : fwd_wb_rs2 ? wb_data : ex_rs2_data;

    unique case (ex_ctrl.opl_sel)
      OPL_PC:   op_l = ex_pc;
      OPL_ZERO: op_l = '0;
      default:  op_l = rs1_fwd;
    endcase
    unique case (ex_ctrl.opr_sel)
      OPR_RS2:  op_r = rs2_fwd;
      OPR_FOUR: op_r = 32'd4;
      default:  op_r = ex_imm;
    endcase

    jmp_base = ex_ctrl.jalr ? rs1_fwd : ex_pc;
    jmp_addr = (jmp_base + ex_imm) & ~{31'b0, ex_ctrl.jalr};
    jmp      = ex_ctrl.jal || ex_ctrl.jalr || (ex_ctrl.branch && br_taken);
  end

  alu  u_alu  (.op(ex_ctrl.alu_op), .op_l(op_l), .op_r(op_r), .res(alu_res));
  comp u_comp (.funct3(ex_ctrl.funct3), .a(rs1_fwd), .b(rs2_fwd), .taken(br_taken));

  always_comb begin
    dbus_req.addr  = rs1_fwd + ex_imm;
    dbus_req.wdata = rs2_fwd;
    dbus_req.re    = ex_live && ex_ctrl.mem_re;
    dbus_req.we    = ex_live && ex_ctrl.mem_we;
    dbus_req.size  = size_e'(ex_ctrl.funct3[1:0]);
  end

  // --------------------------------------------------------------- EX/MA
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ma_valid    <= 1'b0;
      ma_reg_we   <= 1'b0;
      ma_mem_re   <= 1'b0;
      ma_jmp      <= 1'b0;
      ma_rd       <= '0;
      ma_funct3   <= '0;
      ma_alu_res  <= '0;
      ma_jmp_addr <= '0;
    end else begin
      ma_valid    <= ex_live;
      ma_reg_we   <= ex_ctrl.reg_we;
      ma_mem_re   <= ex_ctrl.mem_re;
      ma_jmp      <= ex_live && jmp;
      ma_rd       <= ex_ctrl.rd_addr;
      ma_funct3   <= ex_ctrl.funct3;
      ma_alu_res  <= alu_res;
      ma_jmp_addr <= jmp_addr;
    end
  end

  // ------------------------------------------------------------------- MA
  logic [31:0] mem_data, ma_wdata;

  sext u_sext (.funct3(ma_funct3), .raw(dbus_rdata), .data(mem_data));
  assign ma_wdata = ma_mem_re ? mem_data : ma_alu_res;

  // --------------------------------------------------------------- MA/WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we   <= 1'b0;
      wb_rd   <= '0;
      wb_data <= '0;
    end else begin
      wb_we   <= ma_valid && ma_reg_we;
      wb_rd   <= ma_rd;
      wb_data <= ma_wdata;
    end
  end

  // ----------------------------------------------------------- assertions
  // a loaded value must never be needed in EX while the load is still in MA
  a_no_load_use_in_ex : assert property (@(posedge clk) disable iff (!rst_n)
    !(ex_valid && ma_valid && ma_mem_re && ma_reg_we &&
      (ma_rd == ex_ctrl.rs1_addr || ma_rd == ex_ctrl.rs2_addr)));
  // a store and a load are never requested together
  a_one_access : assert property (@(posedge clk) disable iff (!rst_n)
    !(dbus_req.re && dbus_req.we));
endmodule
