// tb_local_bp: drives random updates for a handful of branch addresses,
// some of which alias in the history table, and compares every prediction
// with a reference model of the two-level local scheme kept here. Then
// checks the behaviour the scheme exists for: a branch with a repeating
// taken/taken/not-taken pattern is predicted without error once trained.
module tb_local_bp;
  localparam int H = 5, P = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pc, upd_pc; logic pred_taken, upd_valid, upd_taken;
  local_bp #(.HIST_BITS(H), .PC_BITS(P)) u_dut (.*);
  int checks = 0, failures = 0;
  int unsigned hist [1 << P];
  int unsigned ctr  [1 << H];
  function automatic logic model_pred(logic [31:0] a);
    return ctr[hist[a[P+1:2]]] >= 2;
  endfunction
  function automatic void model_upd(logic [31:0] a, logic t);
    int unsigned h = hist[a[P+1:2]];
    if (t && ctr[h] < 3) ctr[h]++;
    if (!t && ctr[h] > 0) ctr[h]--;
    hist[a[P+1:2]] = ((h << 1) | t) & ((1 << H) - 1);
  endfunction
  initial begin
    logic [31:0] pcs [6] = '{32'h100, 32'h104, 32'h180, 32'h200, 32'h1100, 32'h3fc};
    foreach (hist[i]) hist[i] = 0;
    foreach (ctr[i]) ctr[i] = 1;
    pc = 0; upd_pc = 0; upd_valid = 0; upd_taken = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (3000) begin
      pc = pcs[$urandom % 6];
      upd_valid = 1'($urandom); upd_pc = pcs[$urandom % 6]; upd_taken = ($urandom % 3) != 0;
      #1;
      checks++;
      if (pred_taken !== model_pred(pc)) begin failures++; $display("pc %h pred %b", pc, pred_taken); end
      @(posedge clk);
      if (upd_valid) model_upd(upd_pc, upd_taken);
      #1;
    end
    // pattern learning: T T N repeated on one branch
    begin
      int wrong = 0;
      for (int n = 0; n < 60; n++) begin
        logic t;
        t = (n % 3) != 2;
        pc = 32'h240; upd_pc = 32'h240; upd_valid = 1; upd_taken = t; #1;
        if (n >= 30 && pred_taken != t) wrong++;
        @(posedge clk); #1;
      end
      checks++;
      if (wrong != 0) begin failures++; $display("pattern mispredicted %0d times after training", wrong); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
