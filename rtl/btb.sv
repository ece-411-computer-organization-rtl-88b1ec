// btb: branch target buffer for JALR, whose target cannot be decoded from the
// instruction. Direct-mapped, 2**IDX_BITS entries indexed by PC[IDX_BITS+1:2],
// each holding a valid bit, the rest of the PC as tag and the last target.
// Lookup is combinational (IF stage): hit = valid and tag match. Update (from
// EX when a JALR resolves) writes the entry in one cycle. Reset clears the
// valid bits. What the table holds and when it is used follow the document;
// its size and organisation are this design's choice.
module btb #(
  parameter int unsigned IDX_BITS = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc,
  output logic        hit,
  output logic [31:0] target,
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic [31:0] upd_target
);
  localparam int unsigned N  = 1 << IDX_BITS;
  localparam int unsigned TW = 30 - IDX_BITS;

  logic          valid [N];
  logic [TW-1:0] tag   [N];
  logic [31:0]   tgt   [N];

  logic [IDX_BITS-1:0] ri, ui;
  assign ri = pc[IDX_BITS+1:2];
  assign ui = upd_pc[IDX_BITS+1:2];

  assign hit    = valid[ri] && (tag[ri] == pc[31:IDX_BITS+2]);
  assign target = tgt[ri];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) valid[i] <= 1'b0;
    end else if (upd_valid) begin
      valid[ui] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      tag[ui] <= upd_pc[31:IDX_BITS+2];
      tgt[ui] <= upd_target;
    end
  end
endmodule
