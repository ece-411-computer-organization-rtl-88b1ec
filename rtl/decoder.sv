// decoder: the ID-stage control unit. Turns a 32-bit RV32IM instruction into
// the control word (rv_pkg::ctrl_t) that travels down the pipeline and into
// its sign-extended immediate. Combinational. Supports all RV32I instructions
// except FENCE, ECALL, EBREAK and the CSR instructions, plus the eight
// M-extension instructions. Unsupported encodings decode to a control word
// that writes nothing and touches no memory, with `illegal` set.
// `valid_in` = 0 produces a bubble (valid = 0).
module decoder
  import rv_pkg::*;
(
  input  logic        valid_in,
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic [31:0] imm
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];
  assign f7     = instr[31:25];

  always_comb begin
    ctrl           = '0;
    ctrl.valid     = valid_in;
    ctrl.rs1       = instr[19:15];
    ctrl.rs2       = instr[24:20];
    ctrl.rd        = instr[11:7];
    ctrl.funct3    = f3;
    ctrl.alu_op    = ALU_ADD;
    ctrl.a_sel     = A_RS1;
    ctrl.b_sel     = B_IMM;
    imm            = '0;

    unique case (opcode)
      OP_LUI: begin
        imm = {instr[31:12], 12'b0};
        ctrl.alu_op = ALU_PASSB;
        ctrl.reg_write = 1'b1;
      end
      OP_AUIPC: begin
        imm = {instr[31:12], 12'b0};
        ctrl.a_sel = A_PC;
        ctrl.reg_write = 1'b1;
      end
      OP_JAL: begin
        imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
        ctrl.is_jal = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_JALR: begin
        imm = {{21{instr[31]}}, instr[30:20]};
        ctrl.is_jalr = 1'b1;
        ctrl.use_rs1 = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.illegal = (f3 != 3'b000);
      end
      OP_BR: begin
        imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
        ctrl.is_br = 1'b1;
        ctrl.use_rs1 = 1'b1;
        ctrl.use_rs2 = 1'b1;
        ctrl.illegal = (f3 == 3'b010) || (f3 == 3'b011);
      end
      OP_LOAD: begin
        imm = {{21{instr[31]}}, instr[30:20]};
        ctrl.use_rs1 = 1'b1;
        ctrl.mem_read = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.illegal = (f3 == 3'b011) || (f3 == 3'b110) || (f3 == 3'b111);
      end
      OP_STORE: begin
        imm = {{21{instr[31]}}, instr[30:25], instr[11:7]};
        ctrl.use_rs1 = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.illegal = (f3 > 3'b010);
      end
      OP_IMM: begin
        imm = {{21{instr[31]}}, instr[30:20]};
        ctrl.use_rs1 = 1'b1;
        ctrl.reg_write = 1'b1;
        unique case (f3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b110: ctrl.alu_op = ALU_OR;
          3'b111: ctrl.alu_op = ALU_AND;
          3'b001: ctrl.alu_op = ALU_SLL;
          3'b101: ctrl.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_REG: begin
        ctrl.use_rs1 = 1'b1;
        ctrl.use_rs2 = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.b_sel = B_RS2;
        if (f7 == 7'b0000001) begin
          ctrl.is_mdu = 1'b1;
        end else begin
          unique case (f3)
            3'b000: ctrl.alu_op = instr[30] ? ALU_SUB : ALU_ADD;
            3'b001: ctrl.alu_op = ALU_SLL;
            3'b010: ctrl.alu_op = ALU_SLT;
            3'b011: ctrl.alu_op = ALU_SLTU;
            3'b100: ctrl.alu_op = ALU_XOR;
            3'b101: ctrl.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
            3'b110: ctrl.alu_op = ALU_OR;
            3'b111: ctrl.alu_op = ALU_AND;
            default: ctrl.alu_op = ALU_ADD;
          endcase
        end
      end
      default: ctrl.illegal = 1'b1;
    endcase

    if (ctrl.illegal || !valid_in) begin
      ctrl.reg_write = 1'b0;
      ctrl.mem_read  = 1'b0;
      ctrl.mem_write = 1'b0;
      ctrl.is_br     = 1'b0;
      ctrl.is_jal    = 1'b0;
      ctrl.is_jalr   = 1'b0;
      ctrl.is_mdu    = 1'b0;
      ctrl.use_rs1   = 1'b0;
      ctrl.use_rs2   = 1'b0;
    end
    if (!ctrl.reg_write) ctrl.rd = 5'd0;
  end
endmodule
