// tb_cache: random word, half and byte reads and writes over 8 KiB (many
// times the cache size, so misses, evictions and dirty write-backs are
// frequent) against a byte-level reference; the line-bus side is the
// line_mem model. Checks every read value, that a repeated access to the
// same line hits in the same cycle it is asked (single-cycle hit), and that
// lines written back and re-fetched keep their data. Runs the 4-way
// configuration used for the instruction cache and the 2-way one used for
// the data cache.
module tb_cache;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] addr, wdata, rdata4, rdata2;
  logic        read, write, resp4, resp2;
  logic [3:0]  wmask;
  line_req_t   mreq4, mreq2;
  line_rsp_t   mrsp4, mrsp2;
  logic        h4, m4, h2, m2;
  logic        sel;   // 0: drive 4-way instance, 1: 2-way

  cache #(.WAYS(4), .SETS(8)) u_c4 (.clk, .rst, .addr, .read(read && !sel), .write(write && !sel),
    .wmask, .wdata, .rdata(rdata4), .resp(resp4), .mreq(mreq4), .mrsp(mrsp4), .stat_hit(h4), .stat_miss(m4));
  cache u_c2 (.clk, .rst, .addr, .read(read && sel), .write(write && sel),
    .wmask, .wdata, .rdata(rdata2), .resp(resp2), .mreq(mreq2), .mrsp(mrsp2), .stat_hit(h2), .stat_miss(m2));
  line_mem u_m4 (.clk, .req(mreq4), .rsp(mrsp4));
  line_mem u_m2 (.clk, .req(mreq2), .rsp(mrsp2));

  logic [7:0] model [2][8192];
  int misses [2];

  task automatic access(logic w, logic [31:0] a, logic [3:0] m, logic [31:0] d, output int waited);
    logic r_ok;
    @(negedge clk);
    addr = a; read = !w; write = w; wmask = m; wdata = d;
    waited = 0;
    #1;
    while (!(sel ? resp2 : resp4)) begin @(negedge clk); #1; waited++; end
    if (!w) begin
      logic [31:0] exp;
      for (int k = 0; k < 4; k++) exp[8*k +: 8] = model[sel][{a[12:2], 2'(k)}];
      checks++;
      if ((sel ? rdata2 : rdata4) !== exp) begin
        failures++;
        $display("cache%0d read %h got %h exp %h", sel ? 2 : 4, a, sel ? rdata2 : rdata4, exp);
      end
    end else begin
      for (int k = 0; k < 4; k++) if (m[k]) model[sel][{a[12:2], 2'(k)}] = d[8*k +: 8];
    end
    @(negedge clk);
    read = 0; write = 0;
  endtask

  initial begin
    int wt;
    read = 0; write = 0; addr = 0; wmask = 0; wdata = 0; sel = 0;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 8192; i++) model[s][i] = i[7:0] ^ i[15:8] ^ 8'h5a;
    repeat (2) @(posedge clk); rst = 0;
    for (int s = 0; s < 2; s++) begin
      sel = s[0];
      repeat (3000) begin
        logic [31:0] a;
        logic w;
        logic [3:0] m;
        a = $urandom % 8192;
        w = 1'($urandom % 2);
        case ($urandom % 3)
          0: begin a[1:0] = 0; m = 4'b1111; end
          1: begin a[0] = 0; m = a[1] ? 4'b1100 : 4'b0011; end
          default: m = 4'b0001 << a[1:0];
        endcase
        access(w, a, m, $urandom, wt);
        // an immediate second access to the same line must hit at once
        access(0, {a[31:2], 2'b00} ^ 32'h4, 4'b0, 0, wt);
        checks++;
        if (wt != 0) begin failures++; $display("no single-cycle hit at %h", a); end
      end
      // read everything back: lines were evicted and written back many times
      for (int a = 0; a < 8192; a += 4) access(0, a, 0, 0, wt);
    end
    checks++;
    if (u_m4.n_write == 0 || u_m2.n_write == 0) begin failures++; $display("no write-backs seen"); end
    $display("4-way: %0d line reads %0d write-backs; 2-way: %0d reads %0d write-backs",
             u_m4.n_read, u_m4.n_write, u_m2.n_read, u_m2.n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
