// tb_hazard_unit: directed cases for each forwarding path (MEM->EX, WB->EX,
// priority of MEM over WB, no forwarding from x0 or from a load in MEM,
// WB->MEM store data), the load-use stall and the hold/bubble pattern of
// each kind of stall (I-cache, MDU, D-cache, misprediction, misprediction
// during an I-cache miss).
module tb_hazard_unit;
  import rv_pkg::*;
  ctrl_t id_ctrl, ex_ctrl, mem_ctrl, wb_ctrl;
  logic if_stall, ex_busy, mem_stall, mispredict;
  fwd_e fwd_a, fwd_b;
  logic fwd_store, pc_hold, redirect, ifid_hold, ifid_bubble, idex_hold, idex_bubble;
  logic exmem_hold, exmem_bubble, memwb_bubble, load_use;
  hazard_unit u_dut (.*);
  int checks = 0, failures = 0;

  function automatic ctrl_t mk(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                               logic ld = 0, logic st = 0);
    ctrl_t c = '0;
    c.valid = 1; c.rd = rd; c.rs1 = rs1; c.rs2 = rs2; c.use_rs1 = 1; c.use_rs2 = !st;
    c.reg_write = !st; c.mem_read = ld; c.mem_write = st;
    return c;
  endfunction
  task automatic clr();
    id_ctrl = '0; ex_ctrl = '0; mem_ctrl = '0; wb_ctrl = '0;
    if_stall = 0; ex_busy = 0; mem_stall = 0; mispredict = 0;
  endtask
  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  // {pc_hold, redirect, ifid_hold, ifid_bubble, idex_hold, idex_bubble, exmem_hold, exmem_bubble, memwb_bubble}
  function automatic logic [8:0] ctl();
    return {pc_hold, redirect, ifid_hold, ifid_bubble, idex_hold, idex_bubble, exmem_hold, exmem_bubble, memwb_bubble};
  endfunction

  initial begin
    clr(); ex_ctrl = mk(3, 1, 2); mem_ctrl = mk(1, 0, 0); wb_ctrl = mk(2, 0, 0);
    #1 chk(fwd_a == FWD_MEM && fwd_b == FWD_WB, "mem->ex on a, wb->ex on b");
    clr(); ex_ctrl = mk(3, 1, 1); mem_ctrl = mk(1, 0, 0); wb_ctrl = mk(1, 0, 0);
    #1 chk(fwd_a == FWD_MEM && fwd_b == FWD_MEM, "mem has priority over wb");
    clr(); ex_ctrl = mk(3, 0, 0); mem_ctrl = mk(0, 0, 0); mem_ctrl.reg_write = 1;
    #1 chk(fwd_a == FWD_NONE, "no forwarding of x0");
    clr(); ex_ctrl = mk(3, 4, 5); mem_ctrl = mk(4, 0, 0, 1);
    #1 chk(fwd_a == FWD_NONE, "no forwarding from a load in MEM");
    clr(); ex_ctrl = mk(3, 4, 5); mem_ctrl = mk(4, 0, 0); mem_ctrl.valid = 0;
    #1 chk(fwd_a == FWD_NONE, "no forwarding from a bubble");
    clr(); mem_ctrl = mk(0, 1, 7, 0, 1); wb_ctrl = mk(7, 0, 0, 1);
    #1 chk(fwd_store == 1, "wb->mem store data");
    clr(); mem_ctrl = mk(0, 1, 7, 0, 1); wb_ctrl = mk(6, 0, 0, 1);
    #1 chk(fwd_store == 0, "no store forwarding on other reg");
    clr(); ex_ctrl = mk(9, 1, 2, 1); id_ctrl = mk(3, 9, 4);
    #1 chk(load_use && ctl() == 9'b101001000, "load-use: hold pc/ifid, bubble idex");
    clr(); ex_ctrl = mk(9, 1, 2, 1); id_ctrl = mk(0, 1, 9, 0, 1);
    #1 chk(!load_use, "store data after load is not a load-use stall");
    clr(); if_stall = 1;
    #1 chk(ctl() == 9'b100100000, "icache stall: hold pc, bubble ifid");
    clr(); ex_busy = 1;
    #1 chk(ctl() == 9'b101010010, "mdu busy: hold pc/ifid/idex, bubble exmem");
    clr(); mem_stall = 1;
    #1 chk(ctl() == 9'b101010101, "dcache stall: hold all, bubble memwb");
    clr(); mispredict = 1;
    #1 chk(ctl() == 9'b010101000, "mispredict: redirect, bubble ifid and idex");
    clr(); mispredict = 1; if_stall = 1;
    #1 chk(ctl() == 9'b101010010, "mispredict waits for icache");
    clr(); mispredict = 1; mem_stall = 1;
    #1 chk(!redirect, "no redirect while EX held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
