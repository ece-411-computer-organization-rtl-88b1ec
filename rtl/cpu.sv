// cpu: in-order five-stage (IF, ID, EX, MEM, WB) RV32IM pipeline.
//
// IF   fetches from the instruction cache at PC and predicts the next PC with
//      bp_unit (local predictor for BR/JAL with targets decoded from the
//      instruction, BTB for JALR); the prediction travels with the
//      instruction.
// ID   decodes (decoder) and reads the write-through register file.
// EX   forwards operands (MEM->EX, WB->EX), runs the ALU, the branch
//      comparator and the multi-cycle MDU, and resolves control flow: if the
//      actual next PC differs from the predicted one the PC is redirected and
//      the two younger instructions are squashed (two-cycle penalty).
// MEM  accesses the data cache (byte/half/word loads and stores); store data
//      may be forwarded from WB.
// WB   writes the register file.
// hazard_unit decides forwarding and which pipeline registers hold or take a
// bubble. While a register holds, the operands it carries are refreshed with
// their forwarded values each cycle, so a forwarding source that moves on
// during a stall is not lost.
//
// Memory interfaces follow the caches' word protocol: hold the request until
// resp; a hit answers in the same cycle, so the pipeline runs one instruction
// per cycle when both caches hit. Loads and stores must be naturally aligned.
// The commit_* outputs report each instruction leaving WB; perf_* count
// resolved BR/JAL/JALR instructions and mispredictions.
// Reset PC is a parameter of this design (the document does not give one).
module cpu
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_0000,
  parameter int unsigned BP_HIST   = 5,
  parameter int unsigned BP_PC     = 6,
  parameter int unsigned BTB_BITS  = 6
) (
  input  logic        clk,
  input  logic        rst,
  // instruction cache
  output logic [31:0] i_addr,
  output logic        i_read,
  input  logic [31:0] i_rdata,
  input  logic        i_resp,
  // data cache
  output logic [31:0] d_addr,
  output logic        d_read,
  output logic        d_write,
  output logic [3:0]  d_wmask,
  output logic [31:0] d_wdata,
  input  logic [31:0] d_rdata,
  input  logic        d_resp,
  // retirement trace
  output logic        commit_valid,
  output logic [31:0] commit_pc,
  output logic [4:0]  commit_rd,
  output logic [31:0] commit_wdata,
  // performance counters
  output logic [31:0] perf_ctrl,
  output logic [31:0] perf_mispredict,
  output logic [31:0] perf_load_use,
  output logic [31:0] perf_fwd_mem,
  output logic [31:0] perf_fwd_wb,
  output logic [31:0] perf_fwd_store,
  output logic [31:0] perf_mdu_stall
);
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic [31:0] pred_next;
  } ifid_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] imm;
    logic [31:0] rs1v;
    logic [31:0] rs2v;
    logic [31:0] pred_next;
  } idex_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] res;
    logic [31:0] sdata;
  } exmem_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] wdata;
  } memwb_t;

  logic [31:0] pc;
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // hazard controls
  fwd_e fwd_a, fwd_b;
  logic fwd_store;
  logic pc_hold, redirect, ifid_hold, ifid_bubble, idex_hold, idex_bubble;
  logic exmem_hold, exmem_bubble, memwb_bubble, load_use;
  logic if_stall, ex_busy, mem_stall, mispredict;

  // ---------------- IF ----------------

  logic [31:0] pred_next;
  logic [31:0] ex_next_pc;
  logic        ex_fire, ex_taken;
  logic [31:0] ex_target;

  assign i_addr   = pc;
  assign i_read   = 1'b1;
  assign if_stall = !i_resp;

  bp_unit #(.HIST_BITS(BP_HIST), .PC_BITS(BP_PC), .BTB_BITS(BTB_BITS)) u_bp (
    .clk, .rst,
    .pc        (pc),
    .instr     (i_rdata),
    .pred_taken(),
    .pred_next (pred_next),
    .upd_dir   (ex_fire && (idex.ctrl.is_br || idex.ctrl.is_jal)),
    .upd_jalr  (ex_fire && idex.ctrl.is_jalr),
    .upd_pc    (idex.pc),
    .upd_taken (ex_taken),
    .upd_target(ex_target)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= RESET_PC;
      ifid <= '0;
    end else begin
      if (redirect)      pc <= ex_next_pc;
      else if (!pc_hold) pc <= pred_next;

      if (ifid_bubble)    ifid.valid <= 1'b0;
      else if (!ifid_hold) ifid <= '{valid: 1'b1, pc: pc, instr: i_rdata, pred_next: pred_next};
    end
  end

  // ---------------- ID ----------------
  ctrl_t       id_ctrl;
  logic [31:0] id_imm, id_rs1v, id_rs2v;
  logic        wb_we;

  decoder u_dec (
    .valid_in(ifid.valid),
    .instr   (ifid.instr),
    .ctrl    (id_ctrl),
    .imm     (id_imm)
  );

  assign wb_we = memwb.ctrl.valid && memwb.ctrl.reg_write;

  regfile u_rf (
    .clk, .rst,
    .we    (wb_we),
    .waddr (memwb.ctrl.rd),
    .wdata (memwb.wdata),
    .raddr1(ifid.instr[19:15]),
    .raddr2(ifid.instr[24:20]),
    .rdata1(id_rs1v),
    .rdata2(id_rs2v)
  );

  // ---------------- EX ----------------
  logic [31:0] ex_a, ex_b, alu_a, alu_b, alu_y, mdu_y, ex_res;
  logic        cmp_taken, mdu_done;

  always_comb begin
    unique case (fwd_a)
      FWD_MEM: ex_a = exmem.res;
      FWD_WB:  ex_a = memwb.wdata;
      default: ex_a = idex.rs1v;
    endcase
    unique case (fwd_b)
      FWD_MEM: ex_b = exmem.res;
      FWD_WB:  ex_b = memwb.wdata;
      default: ex_b = idex.rs2v;
    endcase
    unique case (idex.ctrl.a_sel)
      A_PC:    alu_a = idex.pc;
      A_ZERO:  alu_a = '0;
      default: alu_a = ex_a;
    endcase
    alu_b = (idex.ctrl.b_sel == B_IMM) ? idex.imm : ex_b;
  end

  alu u_alu (.op(idex.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  branch_cmp u_cmp (.funct3(idex.ctrl.funct3), .a(ex_a), .b(ex_b), .taken(cmp_taken));

  mdu u_mdu (
    .clk, .rst,
    .start (idex.ctrl.valid && idex.ctrl.is_mdu),
    .op    (mdu_op_e'(idex.ctrl.funct3)),
    .a     (ex_a),
    .b     (ex_b),
    .ack   (mdu_done && !mem_stall),
    .busy  (),
    .done  (mdu_done),
    .result(mdu_y)
  );

  assign ex_busy   = idex.ctrl.valid && idex.ctrl.is_mdu && !mdu_done;
  assign ex_taken  = idex.ctrl.is_jal || idex.ctrl.is_jalr || (idex.ctrl.is_br && cmp_taken);
  assign ex_target = idex.ctrl.is_jalr ? ((ex_a + idex.imm) & ~32'd1) : (idex.pc + idex.imm);
  assign ex_next_pc = ex_taken ? ex_target : (idex.pc + 32'd4);
  assign mispredict = idex.ctrl.valid && (ex_next_pc != idex.pred_next);
  assign ex_fire    = idex.ctrl.valid && !idex_hold;

  always_comb begin
    if (idex.ctrl.is_jal || idex.ctrl.is_jalr) ex_res = idex.pc + 32'd4;
    else if (idex.ctrl.is_mdu)                 ex_res = mdu_y;
    else                                       ex_res = alu_y;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idex <= '0;
    end else if (idex_bubble) begin
      idex.ctrl <= '0;
    end else if (idex_hold) begin
      idex.rs1v <= ex_a;
      idex.rs2v <= ex_b;
    end else begin
      idex <= '{ctrl: id_ctrl, pc: ifid.pc, imm: id_imm, rs1v: id_rs1v, rs2v: id_rs2v,
                pred_next: ifid.pred_next};
    end
  end

  // ---------------- MEM ----------------
  logic [31:0] st_data, ld_word, ld_val, mem_wb_val;
  logic [1:0]  boff;

  assign st_data = fwd_store ? memwb.wdata : exmem.sdata;
  assign boff    = exmem.res[1:0];
  assign d_addr  = exmem.res;
  assign d_read  = exmem.ctrl.valid && exmem.ctrl.mem_read;
  assign d_write = exmem.ctrl.valid && exmem.ctrl.mem_write;
  assign mem_stall = (d_read || d_write) && !d_resp;

  always_comb begin
    unique case (exmem.ctrl.funct3[1:0])
      2'b00:   begin d_wmask = 4'b0001 << boff; d_wdata = {4{st_data[7:0]}};  end
      2'b01:   begin d_wmask = 4'b0011 << boff; d_wdata = {2{st_data[15:0]}}; end
      default: begin d_wmask = 4'b1111;         d_wdata = st_data;            end
    endcase
    ld_word = d_rdata >> {boff, 3'b000};
    unique case (exmem.ctrl.funct3)
      F3_B:    ld_val = {{24{ld_word[7]}}, ld_word[7:0]};
      F3_H:    ld_val = {{16{ld_word[15]}}, ld_word[15:0]};
      F3_BU:   ld_val = {24'b0, ld_word[7:0]};
      F3_HU:   ld_val = {16'b0, ld_word[15:0]};
      default: ld_val = ld_word;
    endcase
    mem_wb_val = exmem.ctrl.mem_read ? ld_val : exmem.res;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      exmem <= '0;
    end else if (exmem_hold) begin
      exmem.sdata <= st_data;
    end else if (exmem_bubble) begin
      exmem.ctrl <= '0;
    end else begin
      exmem <= '{ctrl: idex.ctrl, pc: idex.pc, res: ex_res, sdata: ex_b};
    end
  end

  // ---------------- WB ----------------
  always_ff @(posedge clk) begin
    if (rst || memwb_bubble) begin
      memwb.ctrl <= '0;
    end else begin
      memwb <= '{ctrl: exmem.ctrl, pc: exmem.pc, wdata: mem_wb_val};
    end
  end

  assign commit_valid = memwb.ctrl.valid;
  assign commit_pc    = memwb.pc;
  assign commit_rd    = wb_we ? memwb.ctrl.rd : 5'd0;
  assign commit_wdata = (wb_we && memwb.ctrl.rd != 5'd0) ? memwb.wdata : 32'd0;

  // ---------------- hazard unit ----------------
  hazard_unit u_hz (
    .id_ctrl (id_ctrl),
    .ex_ctrl (idex.ctrl),
    .mem_ctrl(exmem.ctrl),
    .wb_ctrl (memwb.ctrl),
    .if_stall, .ex_busy, .mem_stall, .mispredict,
    .fwd_a, .fwd_b, .fwd_store,
    .pc_hold, .redirect, .ifid_hold, .ifid_bubble, .idex_hold, .idex_bubble,
    .exmem_hold, .exmem_bubble, .memwb_bubble, .load_use
  );

  // ---------------- performance counters ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      perf_ctrl       <= '0;
      perf_mispredict <= '0;
      perf_load_use   <= '0;
      perf_fwd_mem    <= '0;
      perf_fwd_wb     <= '0;
      perf_fwd_store  <= '0;
      perf_mdu_stall  <= '0;
    end else begin
      if (ex_fire && (idex.ctrl.is_br || idex.ctrl.is_jal || idex.ctrl.is_jalr))
        perf_ctrl <= perf_ctrl + 1;
      if (redirect) perf_mispredict <= perf_mispredict + 1;
      if (load_use && !idex_hold) perf_load_use <= perf_load_use + 1;
      if (ex_fire && ((fwd_a == FWD_MEM && idex.ctrl.use_rs1) || (fwd_b == FWD_MEM && idex.ctrl.use_rs2)))
        perf_fwd_mem <= perf_fwd_mem + 1;
      if (ex_fire && ((fwd_a == FWD_WB && idex.ctrl.use_rs1) || (fwd_b == FWD_WB && idex.ctrl.use_rs2)))
        perf_fwd_wb <= perf_fwd_wb + 1;
      if (fwd_store && !mem_stall) perf_fwd_store <= perf_fwd_store + 1;
      if (ex_busy) perf_mdu_stall <= perf_mdu_stall + 1;
    end
  end
endmodule
