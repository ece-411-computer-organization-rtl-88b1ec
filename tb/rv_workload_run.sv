// rv_workload_run: one processor (rv_top with the given configuration) with
// its own burst memory and instruction-set reference model, running one
// program to its end. PROG selects the program: 0 the mixed test program,
// 1 the factorial workload using MUL, 2 the factorial workload using a
// shift-and-add subroutine. Every retirement is compared with the
// reference; `done` rises when the program reaches its final jump. The
// results (cycles, retired, checks, failures and the counters) are
// read by the enclosing testbench.
module rv_workload_run #(
  parameter int unsigned I_WAYS  = 4,
  parameter int unsigned D_WAYS  = 2,
  parameter int unsigned BP_HIST = 5,
  parameter int unsigned BP_PC   = 6,
  parameter int unsigned PROG    = 0
) (
  input  logic clk,
  input  logic rst,
  output logic done
);
  import rv_testprog_pkg::*;

  localparam int unsigned MEMW = 16384;

  logic [31:0] pmem_addr, commit_pc, commit_wdata;
  logic        pmem_read, pmem_write, pmem_resp, commit_valid;
  logic [63:0] pmem_wdata, pmem_rdata;
  logic [4:0]  commit_rd;
  logic [31:0] perf_ctrl, perf_mispredict, perf_load_use, perf_fwd_mem, perf_fwd_wb,
               perf_fwd_store, perf_mdu_stall, perf_i_hit, perf_i_miss, perf_d_hit, perf_d_miss, perf_d_writeback,
               perf_arb_conflict;

  rv_top #(.I_WAYS(I_WAYS), .D_WAYS(D_WAYS), .BP_HIST(BP_HIST), .BP_PC(BP_PC)) u_dut (.*);

  burst_mem #(.WORDS(MEMW), .LATENCY(8)) u_mem (
    .clk, .addr(pmem_addr), .read(pmem_read), .write(pmem_write),
    .wdata(pmem_wdata), .rdata(pmem_rdata), .resp(pmem_resp)
  );

  int checks = 0, failures = 0, cycles = 0, retired = 0;
  // counters as they stood when the program reached its end (the final
  // jump-to-self keeps running until every instance is done)
  logic [31:0] s_ctrl, s_mis, s_ih, s_im, s_dh, s_dm;
  rv_program pg;
  rv_ref     rm;

  initial begin
    done = 1'b0;
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = 64'h0;
    pg = new();
    if (PROG == 0) pg.build();
    else pg.build_factorial(PROG == 1);
    rm = new();
    rm.load(pg);
    foreach (pg.prog[a]) u_mem.mem[a / 8][32 * ((a / 4) % 2) +: 32] = pg.prog[a];
  end

  always @(posedge clk) if (!rst && !done) begin
    cycles++;
    if (commit_valid) begin
      logic [31:0] epc, ev;
      logic [4:0]  erd;
      rm.step(epc, erd, ev);
      retired++;
      checks++;
      if (commit_pc !== epc || commit_rd !== erd || commit_wdata !== ev) begin
        failures++;
        if (failures < 5)
          $display("MISMATCH %m #%0d: pc %h rd %0d val %h, expected pc %h rd %0d val %h",
                   retired, commit_pc, commit_rd, commit_wdata, epc, erd, ev);
      end
      if (commit_pc == pg.end_pc) begin
        done   <= 1'b1;
        s_ctrl <= perf_ctrl;
        s_mis  <= perf_mispredict;
        s_ih   <= perf_i_hit;
        s_im   <= perf_i_miss;
        s_dh   <= perf_d_hit;
        s_dm   <= perf_d_miss;
      end
    end
  end

  // word of the memory image, for result checks by the testbench
  function automatic logic [31:0] word(int unsigned a);
    return u_mem.mem[a / 8][32 * ((a / 4) % 2) +: 32];
  endfunction
endmodule
