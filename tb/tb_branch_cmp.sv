// tb_branch_cmp: all six branch conditions on equal, signed/unsigned corner
// and random operands against reference comparisons.
module tb_branch_cmp;
  logic [2:0] funct3; logic [31:0] a, b; logic taken;
  branch_cmp u_dut (.*);
  int checks = 0, failures = 0;
  function automatic logic ref_t(logic [2:0] f, logic [31:0] x, logic [31:0] y);
    case (f)
      3'b000: return x == y; 3'b001: return x != y;
      3'b100: return $signed(x) < $signed(y); 3'b101: return $signed(x) >= $signed(y);
      3'b110: return x < y; 3'b111: return x >= y;
      default: return 1'b0;
    endcase
  endfunction
  initial begin
    for (int f = 0; f < 8; f++) begin
      repeat (300) begin
        funct3 = 3'(f);
        a = $urandom; b = ($urandom % 4 == 0) ? a : ($urandom % 3 == 0) ? ~a : $urandom; #1;
        checks++;
        if (taken !== ref_t(funct3, a, b)) begin failures++; $display("f3 %0d %h %h", f, a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
