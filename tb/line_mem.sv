// line_mem: behavioural model of a memory on the 256-bit line bus (not
// synthesizable). A read or write request is answered after 1 to 4 random
// cycles by a one-cycle resp (with the line, for reads); storage is a sparse
// array of lines initialised on first use to a pattern derived from the
// address, so that every byte is predictable. Counts reads and writes.
module line_mem
  import rv_pkg::*;
(
  input  logic      clk,
  input  line_req_t req,
  output line_rsp_t rsp
);
  logic [LINE_BITS-1:0] lines [int];
  int unsigned cnt = 0;
  logic busy = 1'b0;
  int unsigned n_read = 0, n_write = 0;

  function automatic logic [7:0] init_byte(logic [31:0] a);
    return a[7:0] ^ a[15:8] ^ 8'h5a;
  endfunction
  function automatic logic [LINE_BITS-1:0] get(logic [31:0] a);
    logic [LINE_BITS-1:0] l;
    if (lines.exists(int'(a[31:5]))) return lines[int'(a[31:5])];
    for (int k = 0; k < 32; k++) l[8*k +: 8] = init_byte({a[31:5], 5'(k)});
    return l;
  endfunction

  initial rsp = '0;
  always @(posedge clk) begin
    rsp.resp <= 1'b0;
    if (busy) begin
      if (cnt == 0) begin
        rsp.resp <= 1'b1;
        if (req.write) begin lines[int'(req.addr[31:5])] = req.wdata; n_write++; end
        else begin rsp.rdata <= get(req.addr); n_read++; end
        busy <= 1'b0;
      end else cnt <= cnt - 1;
    end else if ((req.read || req.write) && !rsp.resp) begin
      busy <= 1'b1;
      cnt  <= $urandom % 4;
    end
  end
endmodule
