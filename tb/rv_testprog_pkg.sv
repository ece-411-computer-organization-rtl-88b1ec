// rv_testprog_pkg: the RV32IM test program shared by the processor-level
// testbenches and an instruction-set reference model that executes it one
// instruction at a time. The program covers ALU ops with back-to-back
// dependencies, loads and stores of every size, a load-use pair, a load
// followed by a store of the loaded value, a predictor-training loop with a
// pattern branch, calls and returns through JAL/JALR, all M-extension ops
// (including division by zero), stores that conflict in one data-cache set,
// and code placed at 0x400, 0x800 and 0x1000 so that one instruction-cache set
// holds more lines than it has ways. It ends in a jump-to-self at end_pc.
package rv_testprog_pkg;
  import rv_asm_pkg::*;

  localparam int unsigned MEM_BYTES = 131072;

  class rv_program;
    logic [31:0] prog [int];
    int unsigned pc_asm;
    int unsigned end_pc, loop_top, call_loop, lp2;

    function void emit(logic [31:0] w);
      prog[pc_asm] = w;
      pc_asm += 4;
    endfunction
    function void at(int unsigned a); pc_asm = a; endfunction

    function automatic logic [31:0] SLL(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h00, 3'b001, rd, rs1, rs2); endfunction
    function automatic logic [31:0] SRL(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h00, 3'b101, rd, rs1, rs2); endfunction
    function automatic logic [31:0] SRA(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h20, 3'b101, rd, rs1, rs2); endfunction
    function automatic logic [31:0] SLT(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h00, 3'b010, rd, rs1, rs2); endfunction
    function automatic logic [31:0] SLTU(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2); return ALU(7'h00, 3'b011, rd, rs1, rs2); endfunction
    localparam logic [2:0] BEQ = 3'b000, BNE = 3'b001, BLT = 3'b100, BGE = 3'b101,
                           BLTU = 3'b110, BGEU = 3'b111;
    function void build();
      at(0);
      // --- ALU and forwarding
      emit(LUI(1, 20'h12345));
      emit(ADDI(1, 1, 12'h678));          // MEM->EX
      emit(ADDI(2, 0, -5));
      emit(ADD(3, 1, 2));                 // WB->EX (x1), MEM->EX (x2)
      emit(SUB(4, 3, 1));
      emit(SLL(5, 1, 2));
      emit(SRL(6, 1, 2));
      emit(SRA(7, 2, 4));
      emit(SLT(8, 2, 1));
      emit(SLTU(9, 2, 1));
      emit(ALU(7'h00, 3'b100, 10, 1, 2)); // xor
      emit(ALU(7'h00, 3'b110, 11, 1, 2)); // or
      emit(ALU(7'h00, 3'b111, 12, 1, 2)); // and
      emit(SLTI(13, 2, -4));
      emit(SLTIU(14, 2, 3));
      emit(XORI(15, 1, -1));
      emit(ORI(16, 2, 12'h0f0));
      emit(ANDI(17, 1, 12'h0ff));
      emit(SLLI(18, 1, 7));
      emit(SRLI(19, 2, 3));
      emit(SRAI(20, 2, 1));
      emit(AUIPC(21, 1));
      // --- loads and stores, base x10 = 0x2000
      emit(LUI(10, 2));                   // x10 = 0x2000
      emit(STORE(3'b010, 1, 10, 0));      // sw x1
      emit(STORE(3'b000, 2, 10, 5));      // sb
      emit(STORE(3'b001, 2, 10, 10));     // sh
      emit(LOAD(3'b010, 22, 10, 0));      // lw
      emit(ADD(23, 22, 22));              // load-use stall
      emit(LOAD(3'b000, 24, 10, 5));      // lb
      emit(LOAD(3'b100, 25, 10, 5));      // lbu
      emit(LOAD(3'b001, 26, 10, 10));     // lh
      emit(LOAD(3'b101, 27, 10, 10));     // lhu
      emit(LOAD(3'b010, 28, 10, 4));      // lw mixed word
      emit(STORE(3'b010, 28, 10, 16));    // WB->MEM store-data forwarding
      emit(LOAD(3'b010, 29, 10, 16));
      // --- M extension
      emit(ADDI(5, 0, -7));
      emit(ADDI(6, 0, 3));
      for (int f = 0; f < 8; f++) emit(MULOP(3'(f), 24 + f, 5, 6));
      for (int f = 0; f < 8; f++) emit(MULOP(3'(f), 24 + f, 1, 5));
      emit(MULOP(3'b100, 15, 1, 0));      // div by zero
      emit(MULOP(3'b110, 16, 5, 0));      // rem by zero
      emit(MULOP(3'b101, 17, 5, 0));      // divu by zero
      emit(ADD(18, 15, 16));              // depends on MDU results
      // --- loop with predictor training, multiply-accumulate and array store
      emit(ADDI(11, 0, 24));              // i = 24
      emit(ADDI(12, 0, 0));               // acc
      emit(ADDI(13, 10, 256));            // array pointer 0x2100
      loop_top = pc_asm;
      emit(MULOP(3'b000, 14, 11, 11));    // i*i
      emit(ADD(12, 12, 14));
      emit(STORE(3'b010, 12, 13, 0));
      emit(ANDI(15, 11, 3));
      emit(BR(BNE, 15, 0, 8));            // skip next when i%4 != 0 (pattern branch)
      emit(ADDI(12, 12, 1));
      emit(ADDI(13, 13, 4));
      emit(ADDI(11, 11, -1));
      emit(BR(BNE, 11, 0, int'(loop_top) - int'(pc_asm)));
      // --- calls through JAL / JALR, functions spread to conflict in the I-cache
      emit(ADDI(20, 0, 6));               // call count
      call_loop = pc_asm;
      emit(JAL(1, 32'h400 - pc_asm));     // call f1
      emit(JAL(1, 32'h800 - pc_asm));     // call f2
      emit(JAL(1, 32'h1000 - pc_asm));    // call f3
      emit(ADDI(20, 20, -1));
      emit(BR(BLT, 0, 20, int'(call_loop) - int'(pc_asm)));
      // --- D-cache conflicts: 4 lines in one set of a 2-way cache, all dirty
      emit(LUI(21, 4));                   // 0x4000
      emit(ADDI(22, 0, 0));
      lp2 = pc_asm;
      emit(ADD(23, 21, 22));
      emit(STORE(3'b010, 23, 23, 0));
      emit(STORE(3'b010, 22, 23, 28));
      emit(ADDI(22, 22, 256));
      emit(SLTI(24, 22, 1024 + 256));
      emit(BR(BNE, 24, 0, int'(lp2) - int'(pc_asm)));
      emit(ADDI(22, 0, 0));
      emit(LOAD(3'b010, 25, 21, 0));
      emit(LOAD(3'b010, 26, 21, 256));
      emit(LOAD(3'b010, 27, 21, 512));
      emit(LOAD(3'b010, 28, 21, 768));
      emit(LOAD(3'b010, 29, 21, 1024));
      emit(LOAD(3'b010, 30, 21, 284));
      emit(LOAD(3'b010, 31, 13, -4));     // last array element
      emit(LOAD(3'b010, 3, 10, 256));
      emit(BR(BGEU, 3, 31, 8));
      emit(ADDI(3, 3, 1));
      emit(BR(BGE, 2, 0, 8));             // not taken (x2 < 0)
      emit(ADDI(4, 0, 77));
      emit(BR(BLTU, 0, 2, 8));            // taken
      emit(ADDI(4, 0, 99));
      emit(BR(BEQ, 0, 0, 8));
      emit(ADDI(4, 0, 55));
      end_pc = pc_asm;
      emit(JAL(0, 0));                    // end: spin
      // functions
      at(32'h400);
      emit(ADDI(12, 12, 3));
      emit(MULOP(3'b000, 12, 12, 6));
      emit(JALR(0, 1, 0));
      at(32'h800);
      emit(LOAD(3'b010, 7, 10, 0));
      emit(ADD(12, 12, 7));
      emit(STORE(3'b010, 12, 10, 32));
      emit(JALR(0, 1, 0));
      at(32'h1000);
      emit(JALR(5, 1, 0));                // return via JALR that also links
    endfunction

    // Factorial workload: for n = 1..12 computes n! and stores it with
    // n!/n and n! mod n (DIVU/REMU). With use_mul the product is formed by
    // MUL; without it by a shift-and-add multiply subroutine called through
    // JAL/JALR, as code without the M extension would do.
    function void build_factorial(bit use_mul);
      int unsigned outer, inner, mloop, mskip, msub;
      prog.delete();
      msub = 32'h600;
      at(msub);
      emit(ADDI(12, 0, 0));
      mloop = pc_asm;
      emit(ANDI(13, 11, 1));
      emit(BR(BEQ, 13, 0, 8));
      emit(ADD(12, 12, 10));
      emit(SLLI(10, 10, 1));
      emit(SRLI(11, 11, 1));
      emit(BR(BNE, 11, 0, int'(mloop) - int'(pc_asm)));
      emit(ADDI(10, 12, 0));
      emit(JALR(0, 1, 0));
      at(0);
      emit(LUI(20, 3));                 // results at 0x3000
      emit(ADDI(21, 0, 1));             // n
      emit(ADDI(22, 0, 13));            // limit
      outer = pc_asm;
      emit(ADDI(23, 0, 1));             // acc
      emit(ADDI(24, 0, 1));             // i
      inner = pc_asm;
      if (use_mul) begin
        emit(MULOP(3'b000, 23, 23, 24));
      end else begin
        emit(ADDI(10, 23, 0));
        emit(ADDI(11, 24, 0));
        emit(JAL(1, int'(msub) - int'(pc_asm)));
        emit(ADDI(23, 10, 0));
      end
      emit(ADDI(24, 24, 1));
      emit(BR(BGE, 21, 24, int'(inner) - int'(pc_asm)));
      emit(STORE(3'b010, 23, 20, 0));
      emit(MULOP(3'b101, 28, 23, 21));  // divu
      emit(MULOP(3'b111, 29, 23, 21));  // remu
      emit(STORE(3'b010, 28, 20, 4));
      emit(STORE(3'b010, 29, 20, 8));
      emit(LOAD(3'b010, 30, 20, 0));
      emit(ADD(31, 31, 30));            // running checksum
      emit(ADDI(20, 20, 16));
      emit(ADDI(21, 21, 1));
      emit(BR(BNE, 21, 22, int'(outer) - int'(pc_asm)));
      end_pc = pc_asm;
      emit(JAL(0, 0));
    endfunction

  endclass

  // Instruction-set reference: executes one instruction per step() and
  // reports the PC, the destination register (0 if none) and the value.
  class rv_ref;
    logic [7:0]  rmem [MEM_BYTES];
    logic [31:0] rx [32];
    logic [31:0] rpc;

    function automatic logic [31:0] rd32(logic [31:0] a);
      return {rmem[a+3], rmem[a+2], rmem[a+1], rmem[a]};
    endfunction

    // executes one instruction; returns destination (0 = none) and value
    function void step(output logic [31:0] pc_o, output logic [4:0] rd_o, output logic [31:0] val_o);
      logic [31:0] in, a, b, imm_i, imm_s, imm_b, imm_u, imm_j, res, addr, npc;
      logic [63:0] p;
      logic [4:0]  rd;
      logic        wr;
      in = rd32(rpc);
      a = rx[in[19:15]]; b = rx[in[24:20]]; rd = in[11:7];
      imm_i = {{21{in[31]}}, in[30:20]};
      imm_s = {{21{in[31]}}, in[30:25], in[11:7]};
      imm_b = {{20{in[31]}}, in[7], in[30:25], in[11:8], 1'b0};
      imm_u = {in[31:12], 12'b0};
      imm_j = {{12{in[31]}}, in[19:12], in[20], in[30:21], 1'b0};
      npc = rpc + 4; wr = 1'b0; res = 0;
      case (in[6:0])
        7'b0110111: begin res = imm_u; wr = 1; end
        7'b0010111: begin res = rpc + imm_u; wr = 1; end
        7'b1101111: begin res = rpc + 4; wr = 1; npc = rpc + imm_j; end
        7'b1100111: begin res = rpc + 4; wr = 1; npc = (a + imm_i) & ~32'd1; end
        7'b1100011: begin
          logic t;
          case (in[14:12])
            3'b000: t = a == b;  3'b001: t = a != b;
            3'b100: t = $signed(a) < $signed(b);  3'b101: t = $signed(a) >= $signed(b);
            3'b110: t = a < b;   default: t = a >= b;
          endcase
          if (t) npc = rpc + imm_b;
        end
        7'b0000011: begin
          addr = a + imm_i; wr = 1;
          case (in[14:12])
            3'b000: res = {{24{rmem[addr][7]}}, rmem[addr]};
            3'b001: res = {{16{rmem[addr+1][7]}}, rmem[addr+1], rmem[addr]};
            3'b100: res = {24'b0, rmem[addr]};
            3'b101: res = {16'b0, rmem[addr+1], rmem[addr]};
            default: res = rd32(addr);
          endcase
        end
        7'b0100011: begin
          addr = a + imm_s;
          rmem[addr] = b[7:0];
          if (in[13:12] != 0) rmem[addr+1] = b[15:8];
          if (in[13]) begin rmem[addr+2] = b[23:16]; rmem[addr+3] = b[31:24]; end
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] bb;
          wr = 1;
          bb = (in[6:0] == 7'b0010011) ? imm_i : b;
          if (in[6:0] == 7'b0110011 && in[31:25] == 7'h01) begin
            case (in[14:12])
              3'b000: res = a * b;
              3'b001: begin p = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b})); res = p[63:32]; end
              3'b010: begin p = 64'($signed({{32{a[31]}}, a}) * $signed({32'b0, b})); res = p[63:32]; end
              3'b011: begin p = {32'b0, a} * {32'b0, b}; res = p[63:32]; end
              3'b100: res = (b == 0) ? 32'hffffffff : (a == 32'h80000000 && b == 32'hffffffff) ? a : 32'($signed(a) / $signed(b));
              3'b101: res = (b == 0) ? 32'hffffffff : a / b;
              3'b110: res = (b == 0) ? a : (a == 32'h80000000 && b == 32'hffffffff) ? 0 : 32'($signed(a) % $signed(b));
              default: res = (b == 0) ? a : a % b;
            endcase
          end else begin
            case (in[14:12])
              3'b000: res = (in[6:0] == 7'b0110011 && in[30]) ? a - bb : a + bb;
              3'b001: res = a << bb[4:0];
              3'b010: res = {31'b0, $signed(a) < $signed(bb)};
              3'b011: res = {31'b0, a < bb};
              3'b100: res = a ^ bb;
              3'b101: res = in[30] ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
              3'b110: res = a | bb;
              default: res = a & bb;
            endcase
          end
        end
        default: ;
      endcase
      pc_o = rpc;
      rd_o = (wr && rd != 0) ? rd : 5'd0;
      val_o = (wr && rd != 0) ? res : 32'd0;
      if (wr && rd != 0) rx[rd] = res;
      rpc = npc;
    endfunction


    function void load(rv_program p);
      foreach (rmem[i]) rmem[i] = 8'h0;
      foreach (p.prog[a]) for (int k = 0; k < 4; k++) rmem[a + k] = p.prog[a][8*k +: 8];
      foreach (rx[i]) rx[i] = 0;
      rpc = 0;
    endfunction
  endclass
endpackage
