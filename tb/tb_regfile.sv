// tb_regfile: random writes and reads against a reference array; checks x0
// stays zero and that a read of the register being written returns the new
// value in the same cycle (write-through).
module tb_regfile;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we; logic [4:0] waddr, raddr1, raddr2; logic [31:0] wdata, rdata1, rdata2;
  regfile u_dut (.*);
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    repeat (2000) begin
      we = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = 5'($urandom); raddr2 = ($urandom % 4 == 0) ? waddr : 5'($urandom);
      #1;
      chk(rdata1, (we && waddr != 0 && waddr == raddr1) ? wdata : model[raddr1], "rd1");
      chk(rdata2, (we && waddr != 0 && waddr == raddr2) ? wdata : model[raddr2], "rd2");
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
