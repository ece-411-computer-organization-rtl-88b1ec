// wallace_mul: unsigned 32 x 32 -> 64-bit multiplier built as a Wallace tree
// that is walked one reduction level per clock cycle.
//
// On `start` the 32 partial products (a AND b[i], shifted by i) are loaded
// into a bank of 32 rows. Each following cycle applies one Wallace level:
// the rows are taken in groups of three and each group is reduced to two rows
// (sum and shifted carry) by a row of full adders; rows left over from the
// grouping pass through. Row counts go 32-22-15-10-7-5-4-3-2, so eight cycles
// leave two rows, which a final cycle adds with one carry-propagate adder.
// `done` pulses for one cycle with `product` valid 10 cycles after `start`
// (1 load + 8 reduction + 1 final add); `product` then holds until the next
// start. `start` while busy is ignored. The 8-cycle reduction is the
// document's; the register bank and fixed grouping are this design's choice.
module wallace_mul #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);
  localparam int unsigned NG = W / 3;          // full groups in a level
  localparam int unsigned CW = $clog2(W + 2);

  logic [2*W-1:0] rows      [W];
  logic [2*W-1:0] rows_next [W];
  logic [CW-1:0]  level;
  typedef enum logic [1:0] { S_IDLE, S_REDUCE, S_ADD } state_e;
  state_e state;

  // One Wallace level over all W rows; rows beyond the live count are zero
  // and reduce to zero, so the same network serves every level.
  always_comb begin
    for (int r = 0; r < W; r++) rows_next[r] = '0;
    for (int g = 0; g < NG; g++) begin
      rows_next[2*g]   = rows[3*g] ^ rows[3*g+1] ^ rows[3*g+2];
      rows_next[2*g+1] = ((rows[3*g] & rows[3*g+1]) | (rows[3*g] & rows[3*g+2]) |
                          (rows[3*g+1] & rows[3*g+2])) << 1;
    end
    for (int r = 3*NG; r < W; r++) rows_next[r - NG] = rows[r];
  end

  // Number of levels needed to reach two rows from W rows.
  function automatic int unsigned levels_needed(int unsigned n);
    int unsigned k = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      k++;
    end
    return k;
  endfunction
  localparam int unsigned LEVELS = levels_needed(W);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      level   <= '0;
      done    <= 1'b0;
      product <= '0;
      for (int r = 0; r < W; r++) rows[r] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int r = 0; r < W; r++)
            rows[r] <= b[r] ? ({{W{1'b0}}, a} << r) : '0;
          level <= '0;
          state <= S_REDUCE;
        end
        S_REDUCE: begin
          for (int r = 0; r < W; r++) rows[r] <= rows_next[r];
          level <= level + 1'b1;
          if (level == CW'(LEVELS - 1)) state <= S_ADD;
        end
        S_ADD: begin
          product <= rows[0] + rows[1];
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
