// tb_rv_top: end-to-end test of the whole processor at its default
// configuration. A test program, assembled here with rv_asm_pkg, is loaded
// into the burst memory model and into an instruction-set reference model
// written in this testbench. Every instruction the pipeline retires is
// compared with the reference (PC, destination register, value written).
// The program exercises ALU ops and back-to-back dependencies (MEM->EX and
// WB->EX forwarding), loads and stores of every size, a load-use stall, a
// load followed by a store of the loaded value (WB->MEM forwarding), loops
// the branch predictor learns, calls and returns through JALR (BTB), all
// eight M-extension ops (MDU stalls), data-cache conflicts that evict dirty
// lines, and code spread over one instruction-cache set wider than its
// ways. Each of those mechanisms must be seen at least once.
module tb_rv_top;
  import rv_testprog_pkg::*;

  localparam int unsigned MEMW = 16384;  // 128 KiB
  localparam int unsigned MAXCYC = 400000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] pmem_addr, commit_pc, commit_wdata;
  logic        pmem_read, pmem_write, pmem_resp, commit_valid;
  logic [63:0] pmem_wdata, pmem_rdata;
  logic [4:0]  commit_rd;
  logic [31:0] perf_ctrl, perf_mispredict, perf_load_use, perf_fwd_mem, perf_fwd_wb,
               perf_fwd_store, perf_mdu_stall, perf_i_hit, perf_i_miss, perf_d_hit, perf_d_miss, perf_d_writeback,
               perf_arb_conflict;

  rv_top u_dut (.*);

  burst_mem #(.WORDS(MEMW), .LATENCY(8)) u_mem (
    .clk, .addr(pmem_addr), .read(pmem_read), .write(pmem_write),
    .wdata(pmem_wdata), .rdata(pmem_rdata), .resp(pmem_resp)
  );

  int checks = 0, failures = 0;
  rv_program pg;
  rv_ref     rm;

  // ---------------- run ----------------
  int cycles = 0, retired = 0, btb_hits = 0, redirect_waits = 0, ex_hold_mem = 0;
  logic done = 1'b0;

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (u_dut.u_cpu.u_bp.btb_hit && u_dut.u_cpu.u_bp.is_jalr && u_dut.u_cpu.i_resp) btb_hits++;
    if (u_dut.u_cpu.mispredict && u_dut.u_cpu.if_stall) redirect_waits++;
    if (u_dut.u_cpu.mem_stall) ex_hold_mem++;
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
    if (n <= 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = 64'h0;
    pg = new();
    pg.build();
    rm = new();
    rm.load(pg);
    foreach (pg.prog[a]) u_mem.mem[a / 8][32 * ((a / 4) % 2) +: 32] = pg.prog[a];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done);
    repeat (2) @(posedge clk);
    $display("retired %0d instructions in %0d cycles", retired, cycles);
    need("instructions retired", retired);
    need("load-use stalls", int'(perf_load_use));
    need("MEM->EX forwards", int'(perf_fwd_mem));
    need("WB->EX forwards", int'(perf_fwd_wb));
    need("WB->MEM store forwards", int'(perf_fwd_store));
    need("MDU stall cycles", int'(perf_mdu_stall));
    need("control transfers", int'(perf_ctrl));
    need("mispredictions", int'(perf_mispredict));
    need("correct predictions", int'(perf_ctrl - perf_mispredict));
    need("BTB hits on JALR", btb_hits);
    need("I-cache hits", int'(perf_i_hit));
    need("D-cache hits", int'(perf_d_hit));
    need("I-cache misses", int'(perf_i_miss));
    need("D-cache misses", int'(perf_d_miss));
    need("D-cache dirty write-backs", int'(perf_d_writeback));
    need("arbiter conflicts", int'(perf_arb_conflict));
    need("D-cache stall cycles", ex_hold_mem);
    $display("  (redirects waiting on an I-cache miss: %0d)", redirect_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
