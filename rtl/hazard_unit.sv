// hazard_unit: forwarding and stalling for the five-stage pipeline, in one
// block as the design bundles them.
//
// Forwarding (combinational selects):
//   fwd_a / fwd_b : operand source in EX - FWD_MEM (EX/MEM result),
//                   FWD_WB (value being written back) or FWD_NONE.
//   fwd_store     : WB->MEM forwarding of a store's data (covers a load
//                   followed directly by a store of the loaded value).
//   WB->ID is not handled here: the register file is write-through.
// A load in EX whose result the instruction in ID needs in EX is a load-use
// hazard and stalls ID for one cycle (store data is exempt: WB->MEM covers it).
//
// Stalling: a stage that is not ready (IF: I-cache miss; EX: MDU busy, or a
// misprediction that must wait for an I-cache miss to end; MEM: D-cache miss;
// ID: load-use) keeps every earlier pipeline register unchanged and sends a
// nop control word (bubble) to the next stage. A misprediction resolved in EX
// redirects the PC and turns the IF/ID and ID/EX contents into bubbles.
// The per-register controls are:  *_hold = keep value, *_bubble = load a nop.
module hazard_unit
  import rv_pkg::*;
(
  // ID stage
  input  ctrl_t id_ctrl,
  // EX stage
  input  ctrl_t ex_ctrl,
  // MEM stage
  input  ctrl_t mem_ctrl,
  // WB stage
  input  ctrl_t wb_ctrl,
  // readiness
  input  logic  if_stall,       // I-cache has not answered
  input  logic  ex_busy,        // MDU still working
  input  logic  mem_stall,      // D-cache has not answered
  input  logic  mispredict,     // EX found the fetched path wrong
  // forwarding selects
  output fwd_e  fwd_a,
  output fwd_e  fwd_b,
  output logic  fwd_store,
  // pipeline register control
  output logic  pc_hold,
  output logic  redirect,
  output logic  ifid_hold,
  output logic  ifid_bubble,
  output logic  idex_hold,
  output logic  idex_bubble,
  output logic  exmem_hold,
  output logic  exmem_bubble,
  output logic  memwb_bubble,
  output logic  load_use
);
  logic mem_fwd_ok, wb_fwd_ok, ex_hold, id_hold, redirect_wait;

  assign mem_fwd_ok = mem_ctrl.valid && mem_ctrl.reg_write && !mem_ctrl.mem_read && mem_ctrl.rd != 5'd0;
  assign wb_fwd_ok  = wb_ctrl.valid && wb_ctrl.reg_write && wb_ctrl.rd != 5'd0;

  always_comb begin
    fwd_a = FWD_NONE;
    if (mem_fwd_ok && mem_ctrl.rd == ex_ctrl.rs1)     fwd_a = FWD_MEM;
    else if (wb_fwd_ok && wb_ctrl.rd == ex_ctrl.rs1)  fwd_a = FWD_WB;
    fwd_b = FWD_NONE;
    if (mem_fwd_ok && mem_ctrl.rd == ex_ctrl.rs2)     fwd_b = FWD_MEM;
    else if (wb_fwd_ok && wb_ctrl.rd == ex_ctrl.rs2)  fwd_b = FWD_WB;
  end

  assign fwd_store = mem_ctrl.valid && mem_ctrl.mem_write && wb_fwd_ok && wb_ctrl.rd == mem_ctrl.rs2;

  assign load_use = ex_ctrl.valid && ex_ctrl.mem_read && ex_ctrl.rd != 5'd0 &&
                    ((id_ctrl.use_rs1 && id_ctrl.rs1 == ex_ctrl.rd) ||
                     (id_ctrl.use_rs2 && id_ctrl.rs2 == ex_ctrl.rd));

  assign redirect_wait = mispredict && if_stall;
  assign ex_hold  = mem_stall || ex_busy || redirect_wait;
  assign id_hold  = ex_hold || load_use;
  assign redirect = mispredict && !ex_hold;

  assign memwb_bubble = mem_stall;
  assign exmem_hold   = mem_stall;
  assign exmem_bubble = !mem_stall && (ex_busy || redirect_wait);
  assign idex_hold    = ex_hold;
  assign idex_bubble  = !ex_hold && (load_use || redirect);
  assign ifid_hold    = id_hold && !redirect;
  assign ifid_bubble  = redirect || (!id_hold && if_stall);
  assign pc_hold      = !redirect && (id_hold || if_stall);
endmodule
