// shift_sub_div: unsigned 32-bit subtract-and-shift divider. Finds q and r
// with x = q*y + r, r < y, one quotient bit per cycle from the most
// significant: at step i (31 down to 0) if x >= (y << i) then q[i] = 1 and
// (y << i) is subtracted from x. After 32 steps x holds the remainder, so the
// quotient and the remainder come out of the same run.
// `done` pulses one cycle with `quotient`/`remainder` valid 33 cycles after
// `start` (1 load + 32 steps); they hold until the next start. Division by
// zero gives quotient = all ones and remainder = dividend, as RISC-V requires,
// with no special case. `start` while busy is ignored.
module shift_sub_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  localparam int unsigned SW = $clog2(W);

  logic [W-1:0]   x, y, q;
  logic [SW-1:0]  i;
  logic           running;
  logic [2*W-1:0] y_shift;
  logic           ge;

  assign y_shift = {{W{1'b0}}, y} << i;
  assign ge      = {{W{1'b0}}, x} >= y_shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      done      <= 1'b0;
      x         <= '0;
      y         <= '0;
      q         <= '0;
      i         <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          x       <= dividend;
          y       <= divisor;
          q       <= '0;
          i       <= SW'(W - 1);
          running <= 1'b1;
        end
      end else begin
        if (ge) begin
          x    <= x - y_shift[W-1:0];
          q[i] <= 1'b1;
        end
        if (i == '0) begin
          running   <= 1'b0;
          done      <= 1'b1;
          quotient  <= ge ? (q | (W'(1) << i)) : q;
          remainder <= ge ? (x - y_shift[W-1:0]) : x;
        end else begin
          i <= i - 1'b1;
        end
      end
    end
  end

  assign busy = running;
endmodule
