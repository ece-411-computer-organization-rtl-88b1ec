// rv_asm_pkg: instruction encoders used by the testbenches to build RV32IM
// test programs in SystemVerilog (no external hex files). Each function
// returns the 32-bit encoding of one instruction; offsets are in bytes.
package rv_asm_pkg;
  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(int off, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(int imm20, logic [4:0] rd, logic [6:0] op);
    logic [19:0] i = 20'(imm20);
    return {i, rd, op};
  endfunction
  function automatic logic [31:0] j_type(int off, logic [4:0] rd);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  // mnemonics
  function automatic logic [31:0] ADDI(logic [4:0] rd, logic [4:0] rs1, int imm);  return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI(logic [4:0] rd, logic [4:0] rs1, int imm);  return i_type(imm, rs1, 3'b010, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTIU(logic [4:0] rd, logic [4:0] rs1, int imm); return i_type(imm, rs1, 3'b011, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI(logic [4:0] rd, logic [4:0] rs1, int imm);  return i_type(imm, rs1, 3'b100, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI(logic [4:0] rd, logic [4:0] rs1, int imm);   return i_type(imm, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(logic [4:0] rd, logic [4:0] rs1, int imm);  return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(logic [4:0] rd, logic [4:0] rs1, int sh);   return i_type(sh, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(logic [4:0] rd, logic [4:0] rs1, int sh);   return i_type(sh, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(logic [4:0] rd, logic [4:0] rs1, int sh);   return i_type(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ALU(logic [6:0] f7, logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(f7, rs2, rs1, f3, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] ADD(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h00, 3'b000, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SUB(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h20, 3'b000, rd, rs1, rs2); endfunction
  function automatic logic [31:0] MULOP(logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h01, f3, rd, rs1, rs2); endfunction
  function automatic logic [31:0] LUI(logic [4:0] rd, int imm20)   ; return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(logic [4:0] rd, int imm20) ; return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] LOAD(logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, int imm); return i_type(imm, rs1, f3, rd, 7'b0000011); endfunction
  function automatic logic [31:0] STORE(logic [2:0] f3, logic [4:0] rs2, logic [4:0] rs1, int imm); return s_type(imm, rs2, rs1, f3); endfunction
  function automatic logic [31:0] BR(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2, int off); return b_type(off, rs2, rs1, f3); endfunction
  function automatic logic [31:0] JAL(logic [4:0] rd, int off); return j_type(off, rd); endfunction
  function automatic logic [31:0] JALR(logic [4:0] rd, logic [4:0] rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
endpackage
