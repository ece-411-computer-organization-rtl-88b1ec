// tb_btb: a lookup misses before any update, hits with the stored target
// afterwards, misses for a different PC mapping to the same entry (tag
// check), is overwritten by a later update, and is cleared by reset.
module tb_btb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pc, target, upd_pc, upd_target; logic hit, upd_valid;
  btb #(.IDX_BITS(6)) u_dut (.*);
  int checks = 0, failures = 0;
  task automatic look(logic [31:0] a, logic eh, logic [31:0] et, string what);
    pc = a; #1;
    checks++;
    if (hit !== eh || (eh && target !== et)) begin failures++; $display("%s: hit %b tgt %h", what, hit, target); end
  endtask
  task automatic upd(logic [31:0] a, logic [31:0] t);
    @(negedge clk); upd_valid = 1; upd_pc = a; upd_target = t;
    @(negedge clk); upd_valid = 0;
  endtask
  initial begin
    upd_valid = 0; upd_pc = 0; upd_target = 0; pc = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    look(32'h1000, 0, 0, "cold");
    upd(32'h1000, 32'h2468);
    look(32'h1000, 1, 32'h2468, "after update");
    look(32'h1100, 0, 0, "alias with other tag");
    look(32'h1004, 0, 0, "neighbour");
    upd(32'h1100, 32'h1358);
    look(32'h1100, 1, 32'h1358, "replaced");
    look(32'h1000, 0, 0, "old entry evicted");
    for (int i = 0; i < 64; i++) upd(32'h8000 + 4 * i, 32'h100 * i);
    for (int i = 0; i < 64; i++) look(32'h8000 + 4 * i, 1, 32'h100 * i, "fill all");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    look(32'h8000, 0, 0, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
