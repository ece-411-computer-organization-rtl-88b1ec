// bp_unit: next-PC prediction in the IF stage. The fetched instruction is
// decoded directly: for a conditional branch (BR) or JAL the local predictor
// gives the direction and the target is PC + immediate, computed here; for
// JALR the BTB gives the target, and a BTB hit predicts the jump. Everything
// else, and a BTB miss, predicts PC + 4. Combinational lookup; the update
// ports take the resolved outcome from EX (BR/JAL train the local predictor,
// JALR writes the BTB). Per the document, both BR and JAL use the direction
// predictor.
module bp_unit #(
  parameter int unsigned HIST_BITS = 5,
  parameter int unsigned PC_BITS   = 6,
  parameter int unsigned BTB_BITS  = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc,
  input  logic [31:0] instr,
  output logic        pred_taken,
  output logic [31:0] pred_next,
  // resolution from EX
  input  logic        upd_dir,       // a BR or JAL resolved
  input  logic        upd_jalr,      // a JALR resolved
  input  logic [31:0] upd_pc,
  input  logic        upd_taken,
  input  logic [31:0] upd_target
);
  import rv_pkg::*;

  logic        dir_taken, btb_hit;
  logic [31:0] btb_target, imm_b, imm_j;
  logic        is_br, is_jal, is_jalr;

  assign is_br   = instr[6:0] == OP_BR;
  assign is_jal  = instr[6:0] == OP_JAL;
  assign is_jalr = instr[6:0] == OP_JALR;
  assign imm_b   = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_j   = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};

  local_bp #(.HIST_BITS(HIST_BITS), .PC_BITS(PC_BITS)) u_local (
    .clk, .rst, .pc,
    .pred_taken(dir_taken),
    .upd_valid (upd_dir),
    .upd_pc,
    .upd_taken
  );

  btb #(.IDX_BITS(BTB_BITS)) u_btb (
    .clk, .rst, .pc,
    .hit       (btb_hit),
    .target    (btb_target),
    .upd_valid (upd_jalr),
    .upd_pc,
    .upd_target
  );

  always_comb begin
    pred_taken = 1'b0;
    pred_next  = pc + 32'd4;
    if (is_br && dir_taken) begin
      pred_taken = 1'b1;
      pred_next  = pc + imm_b;
    end else if (is_jal && dir_taken) begin
      pred_taken = 1'b1;
      pred_next  = pc + imm_j;
    end else if (is_jalr && btb_hit) begin
      pred_taken = 1'b1;
      pred_next  = btb_target;
    end
  end
endmodule
