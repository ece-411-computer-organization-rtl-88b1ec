// tb_cpu: runs the shared test program on the pipeline alone, with its
// instruction and data ports attached to a word-wide memory model that
// answers each request after 0 to 2 random wait cycles (0 = same cycle, as a
// cache hit does). Every retired instruction is compared with the
// instruction-set reference model. Also checks the hazard mechanisms were
// used and that, with a zero-wait instruction port, a straight-line run of
// independent ALU instructions retires one per cycle.
module tb_cpu;
  import rv_testprog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata;
  logic        i_read, i_resp, d_read, d_write, d_resp;
  logic [3:0]  d_wmask;
  logic        commit_valid;
  logic [31:0] commit_pc, commit_wdata;
  logic [4:0]  commit_rd;
  logic [31:0] perf_ctrl, perf_mispredict, perf_load_use, perf_fwd_mem, perf_fwd_wb,
               perf_fwd_store, perf_mdu_stall;

  cpu u_dut (.*);

  logic [7:0] mem [MEM_BYTES];
  int unsigned i_wait = 0, d_wait = 0;
  int checks = 0, failures = 0;
  rv_program pg;
  rv_ref     rm;

  function automatic logic [31:0] rd32(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    return {mem[w+3], mem[w+2], mem[w+1], mem[w]};
  endfunction

  assign i_resp  = i_read && i_wait == 0;
  assign i_rdata = rd32(i_addr);
  assign d_resp  = (d_read || d_write) && d_wait == 0;
  assign d_rdata = rd32(d_addr);

  always @(posedge clk) begin
    if (i_read) begin
      if (i_resp) i_wait <= $urandom % 3;
      else        i_wait <= i_wait - 1;
    end
    if (d_read || d_write) begin
      if (d_resp) begin
        d_wait <= $urandom % 3;
        if (d_write)
          for (int k = 0; k < 4; k++)
            if (d_wmask[k]) mem[{d_addr[31:2], 2'b00} + k] <= d_wdata[8*k +: 8];
      end else begin
        d_wait <= d_wait - 1;
      end
    end
  end

  int retired = 0, cycles = 0;
  logic done = 1'b0;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (commit_valid && !done) begin
      logic [31:0] epc, ev;
      logic [4:0]  erd;
      rm.step(epc, erd, ev);
      retired++;
      checks++;
      if (commit_pc !== epc || commit_rd !== erd || commit_wdata !== ev) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH #%0d: pc %h rd %0d val %h, expected pc %h rd %0d val %h",
                   retired, commit_pc, commit_rd, commit_wdata, epc, erd, ev);
      end
      if (commit_pc == pg.end_pc) done = 1'b1;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n <= 0) begin failures++; $display("never exercised: %s", what); end
  endtask

  initial begin
    pg = new();
    pg.build();
    rm = new();
    rm.load(pg);
    foreach (mem[i]) mem[i] = 8'h0;
    foreach (pg.prog[a]) for (int k = 0; k < 4; k++) mem[a + k] = pg.prog[a][8*k +: 8];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done);
    @(posedge clk);
    $display("retired %0d in %0d cycles", retired, cycles);
    need("load-use", int'(perf_load_use));
    need("fwd mem", int'(perf_fwd_mem));
    need("fwd wb", int'(perf_fwd_wb));
    need("fwd store", int'(perf_fwd_store));
    need("mdu stall", int'(perf_mdu_stall));
    need("mispredict", int'(perf_mispredict));

    // Throughput: 20 independent ADDIs with zero-wait memory retire one per cycle.
    rst = 1'b1;
    foreach (mem[i]) mem[i] = 8'h0;
    for (int n = 0; n < 24; n++) begin
      logic [31:0] w;
      w = rv_asm_pkg::ADDI(5'(1 + n % 8), 0, n);
      for (int k = 0; k < 4; k++) mem[4*n + k] = w[8*k +: 8];
    end
    i_wait = 0; d_wait = 0;
    force i_resp = i_read;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    begin
      int first = -1, last = -1, cnt = 0, cyc = 0;
      repeat (40) begin
        @(posedge clk);
        cyc++;
        if (commit_valid && commit_pc < 4 * 20) begin
          if (first < 0) first = cyc;
          last = cyc;
          cnt++;
        end
      end
      checks++;
      if (cnt != 20 || last - first != 19) begin
        failures++;
        $display("throughput: %0d retired over %0d cycles", cnt, last - first + 1);
      end
    end
    release i_resp;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
