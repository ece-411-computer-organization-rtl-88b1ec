// branch_cmp: evaluates an RV32I branch condition in the EX stage.
// Combinational: taken = (a <cond> b), cond chosen by the branch funct3
// (BEQ, BNE, BLT, BGE, BLTU, BGEU). Undefined funct3 values give not-taken.
module branch_cmp
  import rv_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        taken
);
  always_comb begin
    unique case (funct3)
      F3_BEQ:  taken = (a == b);
      F3_BNE:  taken = (a != b);
      F3_BLT:  taken = ($signed(a) <  $signed(b));
      F3_BGE:  taken = ($signed(a) >= $signed(b));
      F3_BLTU: taken = (a <  b);
      F3_BGEU: taken = (a >= b);
      default: taken = 1'b0;
    endcase
  end
endmodule
