// rv_top: the complete processor in its chosen configuration: the five-stage
// RV32IM pipeline (cpu) with a 4-way instruction cache and a 2-way data cache
// (both `cache`, single-cycle hit), the arbiter that shares physical memory
// between them (data cache first on a tie), and the cacheline adaptor that
// turns 256-bit line transfers into 4 x 64-bit bursts on the physical-memory
// port brought out here. The branch predictor keeps 5 bits of local history
// in a table indexed by 6 PC bits. There is no L2 cache.
// Outputs besides the memory port: a retirement trace (one entry per
// instruction leaving WB) and event counters for the pipeline and caches
// (cache hit counts count cycles in which a cache answered a request).
// Cache set counts, BTB size and reset PC are this design's choices.
module rv_top
  import rv_pkg::*;
#(
  parameter int unsigned I_WAYS   = 4,
  parameter int unsigned I_SETS   = 8,
  parameter int unsigned D_WAYS   = 2,
  parameter int unsigned D_SETS   = 8,
  parameter int unsigned BP_HIST  = 5,
  parameter int unsigned BP_PC    = 6,
  parameter int unsigned BTB_BITS = 6,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic                  clk,
  input  logic                  rst,
  // physical memory (burst) port
  output logic [31:0]           pmem_addr,
  output logic                  pmem_read,
  output logic                  pmem_write,
  output logic [BURST_BITS-1:0] pmem_wdata,
  input  logic [BURST_BITS-1:0] pmem_rdata,
  input  logic                  pmem_resp,
  // retirement trace
  output logic                  commit_valid,
  output logic [31:0]           commit_pc,
  output logic [4:0]            commit_rd,
  output logic [31:0]           commit_wdata,
  // event counters
  output logic [31:0]           perf_ctrl,
  output logic [31:0]           perf_mispredict,
  output logic [31:0]           perf_load_use,
  output logic [31:0]           perf_fwd_mem,
  output logic [31:0]           perf_fwd_wb,
  output logic [31:0]           perf_fwd_store,
  output logic [31:0]           perf_mdu_stall,
  output logic [31:0]           perf_i_hit,
  output logic [31:0]           perf_i_miss,
  output logic [31:0]           perf_d_hit,
  output logic [31:0]           perf_d_miss,
  output logic [31:0]           perf_d_writeback,
  output logic [31:0]           perf_arb_conflict
);
  logic [31:0] i_addr, i_rdata, d_addr, d_rdata, d_wdata;
  logic        i_read, i_resp, d_read, d_write, d_resp;
  logic [3:0]  d_wmask;
  line_req_t   ic_req, dc_req, m_req;
  line_rsp_t   ic_rsp, dc_rsp, m_rsp;
  logic        i_hit, i_miss, d_hit, d_miss;

  cpu #(.RESET_PC(RESET_PC), .BP_HIST(BP_HIST), .BP_PC(BP_PC), .BTB_BITS(BTB_BITS)) u_cpu (
    .clk, .rst,
    .i_addr, .i_read, .i_rdata, .i_resp,
    .d_addr, .d_read, .d_write, .d_wmask, .d_wdata, .d_rdata, .d_resp,
    .commit_valid, .commit_pc, .commit_rd, .commit_wdata,
    .perf_ctrl, .perf_mispredict, .perf_load_use, .perf_fwd_mem, .perf_fwd_wb,
    .perf_fwd_store, .perf_mdu_stall
  );

  cache #(.WAYS(I_WAYS), .SETS(I_SETS)) u_icache (
    .clk, .rst,
    .addr(i_addr), .read(i_read), .write(1'b0), .wmask(4'b0), .wdata(32'b0),
    .rdata(i_rdata), .resp(i_resp),
    .mreq(ic_req), .mrsp(ic_rsp),
    .stat_hit(i_hit), .stat_miss(i_miss)
  );

  cache #(.WAYS(D_WAYS), .SETS(D_SETS)) u_dcache (
    .clk, .rst,
    .addr(d_addr), .read(d_read), .write(d_write), .wmask(d_wmask), .wdata(d_wdata),
    .rdata(d_rdata), .resp(d_resp),
    .mreq(dc_req), .mrsp(dc_rsp),
    .stat_hit(d_hit), .stat_miss(d_miss)
  );

  arbiter u_arb (
    .clk, .rst,
    .i_req(ic_req), .i_rsp(ic_rsp),
    .d_req(dc_req), .d_rsp(dc_rsp),
    .m_req, .m_rsp
  );

  cacheline_adaptor u_adapt (
    .clk, .rst,
    .lreq(m_req), .lrsp(m_rsp),
    .burst_addr (pmem_addr),
    .burst_read (pmem_read),
    .burst_write(pmem_write),
    .burst_wdata(pmem_wdata),
    .burst_rdata(pmem_rdata),
    .burst_resp (pmem_resp)
  );

  // cache and memory-system event counters
  logic i_want, d_want;
  assign i_want     = ic_req.read || ic_req.write;
  assign d_want     = dc_req.read || dc_req.write;

  logic d_wb_q, both_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      perf_i_hit        <= '0;
      perf_i_miss       <= '0;
      perf_d_hit        <= '0;
      perf_d_miss       <= '0;
      perf_d_writeback  <= '0;
      perf_arb_conflict <= '0;
      d_wb_q            <= 1'b0;
      both_q            <= 1'b0;
    end else begin
      d_wb_q <= dc_req.write;
      both_q <= i_want && d_want;
      if (i_hit)  perf_i_hit  <= perf_i_hit + 1;
      if (d_hit)  perf_d_hit  <= perf_d_hit + 1;
      if (i_miss) perf_i_miss <= perf_i_miss + 1;
      if (d_miss) perf_d_miss <= perf_d_miss + 1;
      if (dc_req.write && !d_wb_q) perf_d_writeback <= perf_d_writeback + 1;
      if (i_want && d_want && !both_q) perf_arb_conflict <= perf_arb_conflict + 1;
    end
  end
endmodule
