// tb_mdu: all eight M-extension operations on corner values (zero, -1,
// most negative, division by zero, overflow) and random operands, compared
// with RISC-V semantics computed here; checks start-to-done latency (12
// cycles for multiplies, 35 for divides) and that the result holds until ack.
module tb_mdu;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, ack, busy, done; mdu_op_e op; logic [31:0] a, b, result;
  mdu u_dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_r(mdu_op_e o, logic [31:0] x, logic [31:0] y);
    logic [63:0] p;
    case (o)
      MDU_MUL:    return x * y;
      MDU_MULH:   begin p = 64'($signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y})); return p[63:32]; end
      MDU_MULHSU: begin p = 64'($signed({{32{x[31]}}, x}) * $signed({32'b0, y})); return p[63:32]; end
      MDU_MULHU:  begin p = {32'b0, x} * {32'b0, y}; return p[63:32]; end
      MDU_DIV:    return (y == 0) ? 32'hffffffff : (x == 32'h80000000 && y == 32'hffffffff) ? x : 32'($signed(x) / $signed(y));
      MDU_DIVU:   return (y == 0) ? 32'hffffffff : x / y;
      MDU_REM:    return (y == 0) ? x : (x == 32'h80000000 && y == 32'hffffffff) ? 0 : 32'($signed(x) % $signed(y));
      default:    return (y == 0) ? x : x % y;
    endcase
  endfunction

  task automatic run(mdu_op_e o, logic [31:0] x, logic [31:0] y);
    int lat;
    @(negedge clk); op = o; a = x; b = y; start = 1; ack = 0;
    lat = 0;
    do begin @(negedge clk); lat++; a = $urandom; b = $urandom; end while (!done);
    repeat (2) @(negedge clk);   // result must hold while not acknowledged
    checks++;
    if (result !== ref_r(o, x, y)) begin failures++; $display("%s %h %h -> %h", o.name(), x, y, result); end
    checks++;
    if (lat != (o[2] ? 35 : 12)) begin failures++; $display("%s latency %0d", o.name(), lat); end
    ack = 1; start = 0;
    @(negedge clk); ack = 0;
    checks++;
    if (done) begin failures++; $display("done after ack"); end
  endtask

  initial begin
    logic [31:0] cv [6] = '{0, 1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 7};
    start = 0; ack = 0; op = MDU_MUL; a = 0; b = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int o = 0; o < 8; o++) begin
      for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) run(mdu_op_e'(o), cv[i], cv[j]);
      repeat (25) run(mdu_op_e'(o), $urandom, $urandom >> ($urandom % 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
