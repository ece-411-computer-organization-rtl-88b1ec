// tb_wallace_mul: random and corner unsigned products against the `*`
// operator, and the latency: done exactly 10 cycles after start
// (load, eight reduction levels, final add).
module tb_wallace_mul;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy, done; logic [31:0] a, b; logic [63:0] product;
  wallace_mul #(.W(32)) u_dut (.*);
  int checks = 0, failures = 0;
  task automatic run(logic [31:0] x, logic [31:0] y);
    int lat = 0;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; a = $urandom; b = $urandom;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (product !== {32'b0, x} * {32'b0, y}) begin failures++; $display("%h*%h=%h", x, y, product); end
    checks++;
    if (lat != 10) begin failures++; $display("latency %0d", lat); end
  endtask
  initial begin
    start = 0; a = 0; b = 0;
    repeat (2) @(posedge clk); rst = 0;
    run(0, 0); run(32'hffffffff, 32'hffffffff); run(1, 32'hffffffff); run(32'h80000000, 2);
    repeat (300) run($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
