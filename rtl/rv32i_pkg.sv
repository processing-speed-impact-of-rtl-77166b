// rv32i_pkg: types and constants shared by the RV32I units, the two CPU
// pipelines and the system around them.
//
// Holds the RV32I opcode and funct3 values, the ALU operation enum, the
// control word produced by the instruction decoder (ctrl_t), the data bus
// request that a CPU hands to memory and peripherals (dbus_req_t), and the
// address map of the peripheral area. The opcode and funct3 values are those
// of the RISC-V base ISA; the ALU encoding, the control word layout and the
// address map are this design's own choices.
package rv32i_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  // branch funct3
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // load/store funct3
  localparam logic [2:0] F3_LB  = 3'b000;
  localparam logic [2:0] F3_LH  = 3'b001;
  localparam logic [2:0] F3_LW  = 3'b010;
  localparam logic [2:0] F3_LBU = 3'b100;
  localparam logic [2:0] F3_LHU = 3'b101;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND
  } alu_op_e;

  // left ALU operand: register rs1, the instruction's pc, or zero (LUI)
  typedef enum logic [1:0] { OPL_RS1, OPL_PC, OPL_ZERO } opl_sel_e;
  // right ALU operand: register rs2, immediate, or 4 (link address pc+4)
  typedef enum logic [1:0] { OPR_RS2, OPR_IMM, OPR_FOUR } opr_sel_e;

  // access size on the data bus
  typedef enum logic [1:0] { SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2 } size_e;

  typedef struct packed {
    logic [4:0] rs1_addr;
    logic [4:0] rs2_addr;
    logic [4:0] rd_addr;
    logic [2:0] funct3;
    alu_op_e    alu_op;
    opl_sel_e   opl_sel;
    opr_sel_e   opr_sel;
    logic       rs1_used;
    logic       rs2_used;
    logic       reg_we;    // writes rd
    logic       mem_re;    // load
    logic       mem_we;    // store
    logic       branch;    // conditional jump
    logic       jal;
    logic       jalr;
  } ctrl_t;

  // request a CPU puts on the data bus in the stage that computes the address
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        re;
    logic        we;
    size_e       size;
  } dbus_req_t;

  // ------------------------------------------------------------ address map
  // bit 31 clear: common program/data memory; bit 31 set: peripheral area
  localparam logic [31:0] PERIPH_BASE = 32'h8000_0000;
  localparam logic [7:0]  REG_GPIO_OUT    = 8'h00;
  localparam logic [7:0]  REG_GPIO_IN     = 8'h04;
  localparam logic [7:0]  REG_TIMER       = 8'h10;
  localparam logic [7:0]  REG_UART_DATA   = 8'h20;
  localparam logic [7:0]  REG_UART_STATUS = 8'h24;

endpackage
