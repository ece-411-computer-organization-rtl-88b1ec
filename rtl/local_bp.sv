// local_bp: two-level local branch direction predictor with 2-bit counters.
//
// A local history table (LHT) of 2**PC_BITS entries, indexed by PC[PC_BITS+1:2],
// keeps the last HIST_BITS outcomes of the branches mapping to each entry.
// That history indexes a pattern history table (PHT) of 2**HIST_BITS
// saturating 2-bit counters; the prediction is the counter's upper bit.
// Lookup is combinational (IF stage). Update (one cycle, from EX when a
// BR or JAL resolves): the counter selected by the entry's current history
// moves toward the outcome and the outcome is shifted into the history.
// Reset sets every history to 0 and every counter to weakly not-taken (01).
// The 2-bit counters, the local history and the table-size parameters are the
// document's; indexing the PHT by history alone is this design's choice.
module local_bp #(
  parameter int unsigned HIST_BITS = 5,
  parameter int unsigned PC_BITS   = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc,
  output logic        pred_taken,
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int unsigned LHT_N = 1 << PC_BITS;
  localparam int unsigned PHT_N = 1 << HIST_BITS;

  logic [HIST_BITS-1:0] lht [LHT_N];
  logic [1:0]           pht [PHT_N];

  logic [PC_BITS-1:0]   rd_idx, up_idx;
  logic [HIST_BITS-1:0] up_hist;
  logic [1:0]           up_ctr;

  assign rd_idx     = pc[PC_BITS+1:2];
  assign pred_taken = pht[lht[rd_idx]][1];

  assign up_idx  = upd_pc[PC_BITS+1:2];
  assign up_hist = lht[up_idx];
  assign up_ctr  = pht[up_hist];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LHT_N; i++) lht[i] <= '0;
      for (int i = 0; i < PHT_N; i++) pht[i] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_taken && up_ctr != 2'b11)       pht[up_hist] <= up_ctr + 2'd1;
      else if (!upd_taken && up_ctr != 2'b00) pht[up_hist] <= up_ctr - 2'd1;
      if (HIST_BITS > 1) lht[up_idx] <= {up_hist[HIST_BITS-2:0], upd_taken};
      else               lht[up_idx] <= HIST_BITS'(upd_taken);
    end
  end
endmodule
