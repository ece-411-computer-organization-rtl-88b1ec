// regfile: the 32 x 32-bit integer register file of the pipeline. Two
// combinational read ports (used in ID) and one write port (used in WB).
// A read of the register being written in the same cycle returns the new
// value ("write-through"), which gives the WB->ID forwarding path without a
// mux in the hazard unit. x0 always reads as zero. Writes happen on the rising
// edge; reset clears all registers (a choice of this design).
module regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata1,
  output logic [31:0] rdata2
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && waddr != 5'd0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = regs[raddr1];
    rdata2 = regs[raddr2];
    if (we && waddr != 5'd0 && waddr == raddr1) rdata1 = wdata;
    if (we && waddr != 5'd0 && waddr == raddr2) rdata2 = wdata;
    if (raddr1 == 5'd0) rdata1 = '0;
    if (raddr2 == 5'd0) rdata2 = '0;
  end
endmodule
