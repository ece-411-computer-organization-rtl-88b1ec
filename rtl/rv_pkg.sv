// rv_pkg: types and constants shared by the RV32IM pipeline, its caches and
// its memory path. Holds the RISC-V opcode and funct3 encodings, the ALU and
// MDU operation codes, the decoded control word carried down the pipeline,
// and the request/response bundles of the 256-bit cache-line bus that links
// the caches, the arbiter and the cacheline adaptor. The line size (32 bytes)
// and the 4 x 64-bit burst are this design's choices; the line size is fixed,
// not a parameter, as in the cache it serves.
package rv_pkg;

  localparam int XLEN        = 32;
  localparam int LINE_BITS   = 256;
  localparam int OFFSET_BITS = 5;   // 32-byte lines
  localparam int BURST_BITS  = 64;
  localparam int BURST_BEATS = LINE_BITS / BURST_BITS;

  // Major opcodes (instr[6:0])
  localparam logic [6:0] OP_LUI   = 7'b0110111;
  localparam logic [6:0] OP_AUIPC = 7'b0010111;
  localparam logic [6:0] OP_JAL   = 7'b1101111;
  localparam logic [6:0] OP_JALR  = 7'b1100111;
  localparam logic [6:0] OP_BR    = 7'b1100011;
  localparam logic [6:0] OP_LOAD  = 7'b0000011;
  localparam logic [6:0] OP_STORE = 7'b0100011;
  localparam logic [6:0] OP_IMM   = 7'b0010011;
  localparam logic [6:0] OP_REG   = 7'b0110011;

  // Branch funct3
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // Load/store funct3
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  // M-extension operations, numbered as their funct3
  typedef enum logic [2:0] {
    MDU_MUL, MDU_MULH, MDU_MULHSU, MDU_MULHU,
    MDU_DIV, MDU_DIVU, MDU_REM, MDU_REMU
  } mdu_op_e;

  typedef enum logic [1:0] { A_RS1, A_PC, A_ZERO } a_sel_e;
  typedef enum logic [0:0] { B_RS2, B_IMM } b_sel_e;
  typedef enum logic [1:0] { FWD_NONE, FWD_MEM, FWD_WB } fwd_e;

  // Control word produced in ID and carried through ID/EX, EX/MEM, MEM/WB.
  typedef struct packed {
    logic       valid;      // 0 = bubble (nop control word)
    logic [4:0] rs1;
    logic [4:0] rs2;
    logic [4:0] rd;
    logic       use_rs1;    // rs1 read in EX
    logic       use_rs2;    // rs2 read in EX (not a store's data)
    logic       reg_write;
    logic       mem_read;
    logic       mem_write;
    logic [2:0] funct3;
    alu_op_e    alu_op;
    a_sel_e     a_sel;
    b_sel_e     b_sel;
    logic       is_br;
    logic       is_jal;
    logic       is_jalr;
    logic       is_mdu;
    logic       illegal;
  } ctrl_t;

  // Cache-line bus: cache (or arbiter) -> memory side
  typedef struct packed {
    logic [31:0]          addr;   // line-aligned
    logic                 read;
    logic                 write;
    logic [LINE_BITS-1:0] wdata;
  } line_req_t;

  typedef struct packed {
    logic [LINE_BITS-1:0] rdata;
    logic                 resp;
  } line_rsp_t;

endpackage
