// tb_bp_unit: next-PC prediction for each instruction class: ALU ops predict
// PC+4; a branch and a JAL predict PC+4 until trained taken, then the target
// decoded from the instruction (forward and backward offsets); a JALR
// predicts PC+4 until the BTB holds its target, then that target.
module tb_bp_unit;
  import rv_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pc, instr, pred_next, upd_pc, upd_target;
  logic pred_taken, upd_dir, upd_jalr, upd_taken;
  bp_unit u_dut (.*);
  int checks = 0, failures = 0;
  task automatic look(logic [31:0] a, logic [31:0] in, logic et, logic [31:0] en, string what);
    pc = a; instr = in; #1;
    checks++;
    if (pred_taken !== et || pred_next !== en) begin failures++; $display("%s: %b %h", what, pred_taken, pred_next); end
  endtask
  task automatic upd(logic dir, logic jr, logic [31:0] a, logic t, logic [31:0] tg);
    @(negedge clk); upd_dir = dir; upd_jalr = jr; upd_pc = a; upd_taken = t; upd_target = tg;
    @(negedge clk); upd_dir = 0; upd_jalr = 0;
  endtask
  initial begin
    upd_dir = 0; upd_jalr = 0; upd_pc = 0; upd_taken = 0; upd_target = 0; pc = 0; instr = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    look(32'h100, ADDI(1, 1, 1), 0, 32'h104, "alu");
    look(32'h200, BR(3'b001, 1, 2, -64), 0, 32'h204, "cold branch");
    look(32'h300, JAL(1, 32'h1f4), 0, 32'h304, "cold jal");
    upd(1, 0, 32'h200, 1, 32'h1c0);
    upd(1, 0, 32'h200, 1, 32'h1c0);
    upd(1, 0, 32'h200, 1, 32'h1c0);
    upd(1, 0, 32'h200, 1, 32'h1c0);
    upd(1, 0, 32'h200, 1, 32'h1c0);
    upd(1, 0, 32'h200, 1, 32'h1c0);
    look(32'h200, BR(3'b001, 1, 2, -64), 1, 32'h1c0, "trained branch");
    repeat (6) upd(1, 0, 32'h300, 1, 32'h4f4);
    look(32'h300, JAL(1, 32'h1f4), 1, 32'h4f4, "trained jal");
    look(32'h400, JALR(0, 1, 0), 0, 32'h404, "cold jalr");
    upd(0, 1, 32'h400, 1, 32'h1234);
    look(32'h400, JALR(0, 1, 0), 1, 32'h1234, "jalr from btb");
    look(32'h400, ADDI(0, 0, 0), 0, 32'h404, "btb hit ignored for non-jalr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
