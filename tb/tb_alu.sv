// tb_alu: every ALU operation on corner and random operands, compared with
// values computed here from SystemVerilog operators.
module tb_alu;
  import rv_pkg::*;
  alu_op_e op; logic [31:0] a, b, y;
  alu u_dut (.*);
  int checks = 0, failures = 0;
  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;        ALU_SUB: return x - z;
      ALU_SLL: return x << z[4:0];  ALU_SLT: return ($signed(x) < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;  ALU_XOR: return x ^ z;
      ALU_SRL: return x >> z[4:0];  ALU_SRA: return 32'($signed(x) >>> z[4:0]);
      ALU_OR: return x | z;         ALU_AND: return x & z;
      default: return z;
    endcase
  endfunction
  initial begin
    logic [31:0] corner [6] = '{0, 1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 31};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
        op = alu_op_e'(o); a = corner[i]; b = corner[j]; #1;
        checks++; if (y !== ref_y(op, a, b)) begin failures++; $display("op %0d %h %h -> %h", o, a, b, y); end
      end
      repeat (200) begin
        op = alu_op_e'(o); a = $urandom; b = $urandom; #1;
        checks++; if (y !== ref_y(op, a, b)) begin failures++; $display("op %0d %h %h -> %h", o, a, b, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
