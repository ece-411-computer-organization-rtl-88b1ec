// tb_arbiter: the instruction and data sides each issue line requests at
// random times to a line_mem model behind the arbiter. Checks that memory
// sees exactly the owner's request, that each response reaches only the
// side that asked and carries its line, that a tie goes to the data side,
// and that a request already being served is not pre-empted by the other
// (first come, first served).
module tb_arbiter;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  line_req_t i_req, d_req, m_req;
  line_rsp_t i_rsp, d_rsp, m_rsp;
  arbiter u_dut (.*);
  line_mem u_mem (.clk, .req(m_req), .rsp(m_rsp));
  int checks = 0, failures = 0;
  int n_i = 0, n_d = 0, ties = 0;

  function automatic logic [LINE_BITS-1:0] pattern(logic [31:0] a);
    logic [LINE_BITS-1:0] l;
    for (int k = 0; k < 32; k++) l[8*k +: 8] = a[7:0] ^ a[15:8] ^ 8'h5a ^ 8'(k);
    return l;
  endfunction

  // monitor: memory request must equal the request of the side being served
  always @(negedge clk) if (!rst) begin
    if (m_req.read || m_req.write) begin
      checks++;
      if (u_dut.state == 2'd1 && m_req !== i_req) begin failures++; $display("m_req != i_req"); end
      if (u_dut.state == 2'd2 && m_req !== d_req) begin failures++; $display("m_req != d_req"); end
    end
    if (i_rsp.resp && d_rsp.resp) begin failures++; $display("both responded"); end
  end

  task automatic side_i(int unsigned n);
    repeat (n) begin
      logic [31:0] a;
      repeat ($urandom % 6) @(negedge clk);
      a = {$urandom % 65536, 5'b0} & 32'h0000_ffe0;
      i_req.addr = a; i_req.read = 1;
      do @(negedge clk); while (!i_rsp.resp);
      checks++;
      if (i_rsp.rdata !== pattern({a[31:5], 5'b0}) && !u_mem.lines.exists(int'(a[31:5]))) begin
        failures++; $display("I data wrong for %h", a);
      end
      n_i++;
      i_req.read = 0;
    end
  endtask
  task automatic side_d(int unsigned n);
    repeat (n) begin
      logic [31:0] a;
      repeat ($urandom % 6) @(negedge clk);
      a = {$urandom % 65536, 5'b0} | 32'h0001_0000;
      d_req.addr = a; d_req.write = 1'($urandom); d_req.read = !d_req.write;
      d_req.wdata = {8{$urandom}};
      do @(negedge clk); while (!d_rsp.resp);
      n_d++;
      d_req.read = 0; d_req.write = 0;
    end
  endtask

  initial begin
    i_req = '0; d_req = '0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // tie: both ask in the same cycle -> data first
    i_req.addr = 32'h40; i_req.read = 1; d_req.addr = 32'h10080; d_req.read = 1;
    @(negedge clk);
    checks++;
    if (u_dut.state != 2'd2) begin failures++; $display("tie not given to data"); end
    do @(negedge clk); while (!d_rsp.resp);
    d_req.read = 0;
    do @(negedge clk); while (!i_rsp.resp);
    i_req.read = 0;
    // first come first served: instruction asks first, data must wait
    @(negedge clk); i_req.addr = 32'h80; i_req.read = 1;
    @(negedge clk); d_req.addr = 32'h100c0; d_req.read = 1;
    @(negedge clk);
    checks++;
    if (u_dut.state != 2'd1) begin failures++; $display("data pre-empted instruction"); end
    do @(negedge clk); while (!i_rsp.resp);
    i_req.read = 0;
    do @(negedge clk); while (!d_rsp.resp);
    d_req.read = 0;
    // random traffic from both sides
    fork
      side_i(200);
      side_d(200);
    join
    checks++;
    if (n_i != 200 || n_d != 200) begin failures++; $display("lost requests %0d %0d", n_i, n_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
