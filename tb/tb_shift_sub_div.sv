// tb_shift_sub_div: random and corner unsigned divisions against `/` and
// `%`, division by zero (quotient all ones, remainder = dividend) and the
// latency: done exactly 33 cycles after start.
module tb_shift_sub_div;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy, done; logic [31:0] dividend, divisor, quotient, remainder;
  shift_sub_div #(.W(32)) u_dut (.*);
  int checks = 0, failures = 0;
  task automatic run(logic [31:0] x, logic [31:0] y);
    int lat;
    logic [31:0] eq, er;
    @(negedge clk); dividend = x; divisor = y; start = 1;
    @(negedge clk); start = 0; dividend = $urandom; divisor = $urandom;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    eq = (y == 0) ? 32'hffffffff : x / y;
    er = (y == 0) ? x : x % y;
    checks++;
    if (quotient !== eq || remainder !== er) begin failures++; $display("%h/%h=%h r %h", x, y, quotient, remainder); end
    checks++;
    if (lat != 33) begin failures++; $display("latency %0d", lat); end
  endtask
  initial begin
    start = 0; dividend = 0; divisor = 0;
    repeat (2) @(posedge clk); rst = 0;
    run(100, 7); run(7, 100); run(32'hffffffff, 1); run(32'hffffffff, 32'hffffffff);
    run(12345, 0); run(0, 5); run(32'h80000000, 3);
    repeat (200) run($urandom, $urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
