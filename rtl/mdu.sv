// mdu: Multiplication/Division Unit of the EX stage, executing the eight
// RISC-V M-extension instructions with the unsigned wallace_mul and
// shift_sub_div submodules.
//
// Both submodules take unsigned operands. On `start` (in IDLE) the MDU takes
// one cycle to register the absolute values of the operands that the
// operation treats as signed, and remembers whether the result must be
// negated (product: operand signs differ; quotient: signs differ and divisor
// is not zero; remainder: dividend negative). It then starts the submodule the
// opcode selects, waits for its `done`, negates the result if needed and
// picks the half (MUL: low word, MULH/MULHSU/MULHU: high word) or output
// (quotient or remainder). The result waits in DONE with `done` = 1 until
// `ack`, the cycle the pipeline takes it.
// Latency from start to done: 12 cycles for multiplies (1 operand register,
// 1 submodule start, 10 multiplier) and 35 for divides (33 divider).
// The register stage in front of the submodules follows the document (it
// keeps the forwarding muxes out of the multiplier's and divider's paths).
module mdu
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  mdu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        ack,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  typedef enum logic [2:0] { M_IDLE, M_GO, M_WAIT, M_DONE } state_e;
  state_e state;

  logic        a_signed, b_signed;
  logic [31:0] a_abs, b_abs;
  logic        neg_prod, neg_quot, neg_rem;
  mdu_op_e     op_q;
  logic        is_div;

  logic        mul_done, div_done;
  logic [63:0] prod;
  logic [31:0] quot, rem;
  logic [63:0] prod_s;
  logic [31:0] quot_s, rem_s;

  always_comb begin
    a_signed = (op == MDU_MUL) || (op == MDU_MULH) || (op == MDU_MULHSU) ||
               (op == MDU_DIV) || (op == MDU_REM);
    b_signed = (op == MDU_MUL) || (op == MDU_MULH) || (op == MDU_DIV) || (op == MDU_REM);
  end

  assign is_div = op_q[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      a_abs    <= '0;
      b_abs    <= '0;
      neg_prod <= 1'b0;
      neg_quot <= 1'b0;
      neg_rem  <= 1'b0;
      op_q     <= MDU_MUL;
      result   <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (start) begin
          a_abs    <= (a_signed && a[31]) ? -a : a;
          b_abs    <= (b_signed && b[31]) ? -b : b;
          neg_prod <= (a_signed && a[31]) ^ (b_signed && b[31]);
          neg_quot <= ((a_signed && a[31]) ^ (b_signed && b[31])) && (b != 32'd0);
          neg_rem  <= a_signed && a[31];
          op_q     <= op;
          state    <= M_GO;
        end
        M_GO: state <= M_WAIT;
        M_WAIT: begin
          if (!is_div && mul_done) begin
            result <= (op_q == MDU_MUL) ? prod_s[31:0] : prod_s[63:32];
            state  <= M_DONE;
          end else if (is_div && div_done) begin
            result <= (op_q == MDU_DIV || op_q == MDU_DIVU) ? quot_s : rem_s;
            state  <= M_DONE;
          end
        end
        M_DONE: if (ack) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign prod_s = neg_prod ? -prod : prod;
  assign quot_s = neg_quot ? -quot : quot;
  assign rem_s  = neg_rem  ? -rem  : rem;

  wallace_mul #(.W(32)) u_mul (
    .clk, .rst,
    .start  (state == M_GO && !is_div),
    .a      (a_abs),
    .b      (b_abs),
    .busy   (),
    .done   (mul_done),
    .product(prod)
  );

  shift_sub_div #(.W(32)) u_div (
    .clk, .rst,
    .start    (state == M_GO && is_div),
    .dividend (a_abs),
    .divisor  (b_abs),
    .busy     (),
    .done     (div_done),
    .quotient (quot),
    .remainder(rem)
  );

  assign done = (state == M_DONE);
  assign busy = (state != M_IDLE) && (state != M_DONE);
endmodule
