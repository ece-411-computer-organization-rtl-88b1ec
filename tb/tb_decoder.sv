// tb_decoder: decodes one instruction of each format and class and checks
// the control word fields and the immediate against hand-worked values.
module tb_decoder;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  logic valid_in; logic [31:0] instr, imm; ctrl_t ctrl;
  decoder u_dut (.*);
  int checks = 0, failures = 0;
  task automatic t(logic [31:0] in, logic [31:0] eimm, logic rw, logic mr, logic mw,
                   logic br, logic jal, logic jalr, logic md, logic u1, logic u2,
                   alu_op_e aop, string name);
    valid_in = 1; instr = in; #1;
    checks++;
    if (imm !== eimm || ctrl.reg_write !== rw || ctrl.mem_read !== mr || ctrl.mem_write !== mw ||
        ctrl.is_br !== br || ctrl.is_jal !== jal || ctrl.is_jalr !== jalr || ctrl.is_mdu !== md ||
        ctrl.use_rs1 !== u1 || ctrl.use_rs2 !== u2 || ctrl.alu_op !== aop || ctrl.valid !== 1'b1) begin
      failures++;
      $display("%s: imm %h rw%b mr%b mw%b br%b jal%b jalr%b md%b u%b%b op %s", name, imm, ctrl.reg_write,
               ctrl.mem_read, ctrl.mem_write, ctrl.is_br, ctrl.is_jal, ctrl.is_jalr, ctrl.is_mdu,
               ctrl.use_rs1, ctrl.use_rs2, ctrl.alu_op.name());
    end
  endtask
  initial begin
    t(ADDI(3, 4, -5),         32'hfffffffb, 1,0,0, 0,0,0, 0, 1,0, ALU_ADD, "addi");
    t(SRAI(3, 4, 7),          32'h00000407, 1,0,0, 0,0,0, 0, 1,0, ALU_SRA, "srai");
    t(SUB(1, 2, 3),           32'h0,        1,0,0, 0,0,0, 0, 1,1, ALU_SUB, "sub");
    t(ALU(7'h00, 3'b011, 1, 2, 3), 32'h0,   1,0,0, 0,0,0, 0, 1,1, ALU_SLTU, "sltu");
    t(LUI(5, 20'hABCDE),      32'hABCDE000, 1,0,0, 0,0,0, 0, 0,0, ALU_PASSB, "lui");
    t(AUIPC(5, 20'h00001),    32'h00001000, 1,0,0, 0,0,0, 0, 0,0, ALU_ADD, "auipc");
    t(LOAD(3'b100, 6, 7, 2047), 32'h000007ff, 1,1,0, 0,0,0, 0, 1,0, ALU_ADD, "lbu");
    t(STORE(3'b001, 8, 9, -2048), 32'hfffff800, 0,0,1, 0,0,0, 0, 1,0, ALU_ADD, "sh");
    t(BR(3'b101, 1, 2, -4096), 32'hfffff000, 0,0,0, 1,0,0, 0, 1,1, ALU_ADD, "bge");
    t(BR(3'b000, 1, 2, 4094),  32'h00000ffe, 0,0,0, 1,0,0, 0, 1,1, ALU_ADD, "beq");
    t(JAL(1, -1048576),       32'hfff00000, 1,0,0, 0,1,0, 0, 0,0, ALU_ADD, "jal");
    t(JAL(1, 2044),           32'h000007fc, 1,0,0, 0,1,0, 0, 0,0, ALU_ADD, "jal+");
    t(JALR(0, 1, 12),         32'h0000000c, 1,0,0, 0,0,1, 0, 1,0, ALU_ADD, "jalr x0");
    t(MULOP(3'b110, 9, 10, 11), 32'h0,      1,0,0, 0,0,0, 1, 1,1, ALU_ADD, "rem");
    t(32'h0000000f,           32'h0,        0,0,0, 0,0,0, 0, 0,0, ALU_ADD, "fence (unsupported)");
    valid_in = 0; instr = ADD(1, 2, 3); #1;
    checks++; if (ctrl.valid || ctrl.reg_write) begin failures++; $display("bubble"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
