// tb_cacheline_adaptor: writes random lines through the adaptor into the
// burst_mem model and reads them back, checking the read line, the beat
// order in memory (beat 0 = bits 63:0 at the lowest address) and the
// latency of a read (memory latency + 4 beats + 2 cycles: request capture
// and the response cycle).
module tb_cacheline_adaptor;
  import rv_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  line_req_t lreq; line_rsp_t lrsp;
  logic [31:0] burst_addr; logic burst_read, burst_write, burst_resp;
  logic [63:0] burst_wdata, burst_rdata;
  cacheline_adaptor u_dut (.*);
  burst_mem #(.WORDS(4096), .LATENCY(LAT)) u_mem (.clk, .addr(burst_addr), .read(burst_read),
    .write(burst_write), .wdata(burst_wdata), .rdata(burst_rdata), .resp(burst_resp));
  int checks = 0, failures = 0;
  logic [LINE_BITS-1:0] lines [64];

  task automatic xfer(logic w, int unsigned idx, output int lat);
    @(negedge clk);
    lreq.addr = 32'(idx) << 5; lreq.write = w; lreq.read = !w; lreq.wdata = lines[idx];
    lat = 0;
    do begin @(negedge clk); lat++; end while (!lrsp.resp);
    if (!w) begin
      checks++;
      if (lrsp.rdata !== lines[idx]) begin failures++; $display("line %0d read back wrong", idx); end
    end
    @(negedge clk);
    lreq = '0;
  endtask

  initial begin
    int lat;
    lreq = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = '0;
    foreach (lines[i]) lines[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 64; i++) xfer(1, i, lat);
    for (int i = 0; i < 64; i++) begin
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (u_mem.mem[4 * i + b] !== lines[i][64*b +: 64]) begin failures++; $display("beat %0d of line %0d", b, i); end
      end
    end
    for (int i = 63; i >= 0; i--) begin
      xfer(0, i, lat);
      checks++;
      if (lat != LAT + 4 + 2) begin failures++; $display("read latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
