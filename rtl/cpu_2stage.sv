// cpu_2stage: two-stage RV32I pipeline (IF/ID/EX, then MA/WB).
//
// Stage 1 (IF/ID/EX) fetches, decodes, reads the register file and executes
// in one clock: the PC register addresses the synchronous instruction memory
// through pc_next, so the instruction arrives together with pc and flows
// combinationally through decode_instr, decode_imm, the register file, the
// operand muxes, ALU, comparator and address adder. The data request leaves
// in stage 1; the synchronous data memory is what makes a second stage
// necessary.
// Stage 2 (MA/WB) extends the read data with sext, selects it against the ALU
// result and writes the register file in the same cycle.
//
// Forwarding: the stage-2 write-back value, ALU result or loaded data, is fed
// back to the stage-1 operand muxes when the destination matches, so a load
// followed by a dependent instruction runs without a wait cycle (at the cost
// of a longer combinational path).
// Jumps: jmp and jmp_addr are registered at the end of stage 1 and steer the
// PC mux in the next cycle; the one instruction fetched meanwhile is
// discarded, so a taken jump or branch costs one cycle. There is no jump
// prediction.
//
// Interface and reset as cpu_5stage. The two stages, the merged stages and
// the forwarding of load data follow the pipeline description; that jmp is
// registered (one lost slot per jump) is this design's reading of the block
// diagram, where the jump path passes the stage register.
module cpu_2stage
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
  logic        fetch_valid;
  logic [31:0] pc, pc_next;
  logic        flush;       // taken jump in stage 2: discard stage 1

  // EX/MA register
  logic        ma_valid, ma_reg_we, ma_mem_re, ma_jmp;
  logic [4:0]  ma_rd;
  logic [2:0]  ma_funct3;
  logic [31:0] ma_alu_res, ma_jmp_addr;
  logic [31:0] mem_data, ma_wdata;
  logic        ma_we;

  assign flush = ma_jmp;

  // --------------------------------------------------------- stage 1: IF
  always_comb begin
    if (!fetch_valid) pc_next = RESET_PC;
    else if (flush)   pc_next = ma_jmp_addr;
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

  // --------------------------------------------------------- stage 1: ID
  ctrl_t       ctrl;
  logic [31:0] imm, rs1_data, rs2_data;
  logic        s1_live;

  assign s1_live = fetch_valid && !flush;

  decode_instr u_decode_instr (.instr(imem_rdata), .ctrl(ctrl));
  decode_imm   u_decode_imm   (.instr(imem_rdata), .imm(imm));

  regfile u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .rs1_addr (ctrl.rs1_addr),
    .rs2_addr (ctrl.rs2_addr),
    .rs1_data (rs1_data),
    .rs2_data (rs2_data),
    .rd_addr  (ma_rd),
    .rd_we    (ma_we),
    .rd_data  (ma_wdata)
  );

  // --------------------------------------------------------- stage 1: EX
  logic        fwd_rs1, fwd_rs2;
  logic [31:0] rs1_fwd, rs2_fwd, op_l, op_r, alu_res, jmp_base, jmp_addr;
  logic        br_taken, jmp;

  always_comb begin
    fwd_rs1 = ma_we && (ma_rd == ctrl.rs1_addr);
    fwd_rs2 = ma_we && (ma_rd == ctrl.rs2_addr);
    rs1_fwd = fwd_rs1 ? ma_wdata : rs1_data;
    rs2_fwd = fwd_rs2 ? ma_wdata : rs2_data;

    unique case (ctrl.opl_sel)
      OPL_PC:   op_l = pc;
      OPL_ZERO: op_l = '0;
      default:  op_l = rs1_fwd;
    endcase
    unique case (ctrl.opr_sel)
      OPR_RS2:  op_r = rs2_fwd;
      OPR_FOUR: op_r = 32'd4;
      default:  op_r = imm;
    endcase

    jmp_base = ctrl.jalr ? rs1_fwd : pc;
    jmp_addr = (jmp_base + imm) & ~{31'b0, ctrl.jalr};
    jmp      = ctrl.jal || ctrl.jalr || (ctrl.branch && br_taken);
  end

  alu  u_alu  (.op(ctrl.alu_op), .op_l(op_l), .op_r(op_r), .res(alu_res));
  comp u_comp (.funct3(ctrl.funct3), .a(rs1_fwd), .b(rs2_fwd), .taken(br_taken));

  always_comb begin
    dbus_req.addr  = rs1_fwd + imm;
    dbus_req.wdata = rs2_fwd;
    dbus_req.re    = s1_live && ctrl.mem_re;
    dbus_req.we    = s1_live && ctrl.mem_we;
    dbus_req.size  = size_e'(ctrl.funct3[1:0]);
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
      ma_valid    <= s1_live;
      ma_reg_we   <= ctrl.reg_we;
      ma_mem_re   <= ctrl.mem_re;
      ma_jmp      <= s1_live && jmp;
      ma_rd       <= ctrl.rd_addr;
      ma_funct3   <= ctrl.funct3;
      ma_alu_res  <= alu_res;
      ma_jmp_addr <= jmp_addr;
    end
  end

  // ------------------------------------------------------ stage 2: MA/WB
  sext u_sext (.funct3(ma_funct3), .raw(dbus_rdata), .data(mem_data));
  assign ma_wdata = ma_mem_re ? mem_data : ma_alu_res;
  assign ma_we    = ma_valid && ma_reg_we;

  a_one_access : assert property (@(posedge clk) disable iff (!rst_n)
    !(dbus_req.re && dbus_req.we));
endmodule
