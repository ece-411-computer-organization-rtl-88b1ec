// tb_workloads: runs programs on the processor in the configurations the
// design was evaluated in, each in its own instance with its own memory and
// reference model, and reports cycles, prediction accuracy and cache hit
// rates side by side.
//   fact_mul / fact_sw : factorial workload at the final configuration, with
//                        MUL and with a software multiply (n!, n!/n and
//                        n! mod n for n = 1..12); the final product and the
//                        checksum are checked and the MUL version must take
//                        fewer cycles.
//   cfg1 / cfg3        : 2-way I-cache; local predictor 7/7 bits.
//   bp_h/p             : the predictor table sweep (history bits / PC bits).
//   i8way / d4way      : 8-way instruction cache; 4-way data cache.
// All runs but the first two use the mixed test program. Every retirement of every
// instance is compared with the reference model.
module tb_workloads;
  localparam int N = 11;
  localparam int unsigned MAXCYC = 200000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0] done;

  rv_workload_run #(.PROG(1))                          r0 (.clk, .rst, .done(done[0]));
  rv_workload_run #(.PROG(2))                          r1 (.clk, .rst, .done(done[1]));
  rv_workload_run #(.I_WAYS(2))                        r2 (.clk, .rst, .done(done[2]));
  rv_workload_run #(.BP_HIST(7),  .BP_PC(7))           r3 (.clk, .rst, .done(done[3]));
  rv_workload_run #(.BP_HIST(2),  .BP_PC(2))           r4 (.clk, .rst, .done(done[4]));
  rv_workload_run #(.BP_HIST(4),  .BP_PC(3))           r5 (.clk, .rst, .done(done[5]));
  rv_workload_run #(.BP_HIST(6),  .BP_PC(5))           r6 (.clk, .rst, .done(done[6]));
  rv_workload_run #(.BP_HIST(8),  .BP_PC(6))           r7 (.clk, .rst, .done(done[7]));
  rv_workload_run #(.BP_HIST(10), .BP_PC(8))           r8 (.clk, .rst, .done(done[8]));
  rv_workload_run #(.I_WAYS(8))                        r9 (.clk, .rst, .done(done[9]));
  rv_workload_run #(.D_WAYS(4))                        r10 (.clk, .rst, .done(done[10]));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic string pct(logic [31:0] num, logic [31:0] den);
    if (den == 0) return "  -  ";
    return $sformatf("%5.1f%%", 100.0 * real'(num) / real'(den));
  endfunction

  // one line of the report, from the counters of one instance
  task automatic report(string name, int cyc, int ret, int ch, int fl,
                        logic [31:0] ctrl, logic [31:0] mis,
                        logic [31:0] ih, logic [31:0] im, logic [31:0] dh, logic [31:0] dm);
    $display("%-9s cycles %6d  retired %5d  CPI %5.2f  predicted %s  I-hit %s  D-hit %s",
             name, cyc, ret, real'(cyc) / real'(ret > 0 ? ret : 1), pct(ctrl - mis, ctrl),
             pct(ih, ih + im), pct(dh, dh + dm));
    checks += ch;
    failures += fl;
    chk(ret > 0, {name, " retired nothing"});
  endtask

  `define REPORT(NAME, R) report(NAME, R.cycles, R.retired, R.checks, R.failures, \
      R.s_ctrl, R.s_mis, R.s_ih, R.s_im, R.s_dh, R.s_dm)

  initial begin
    logic [31:0] f, sum;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&done);
    repeat (2) @(posedge clk);
    `REPORT("fact_mul", r0);
    `REPORT("fact_sw",  r1);
    `REPORT("cfg1",     r2);
    `REPORT("cfg3",     r3);
    `REPORT("bp_2/2",   r4);
    `REPORT("bp_4/3",   r5);
    `REPORT("bp_6/5",   r6);
    `REPORT("bp_8/6",   r7);
    `REPORT("bp_10/8",  r8);
    `REPORT("i8way",    r9);
    `REPORT("d4way",    r10);
    // every stored result is loaded back and summed by the program itself,
    // so the reference comparison already covers it; here the final 12! and
    // the checksum are checked against values computed in the testbench
    chk(r0.cycles < r1.cycles, "MUL version not faster than software multiply");
    $display("M extension speed-up on the factorial workload: %0d -> %0d cycles (%0.1f%% fewer)",
             r1.cycles, r0.cycles, 100.0 * real'(r1.cycles - r0.cycles) / real'(r1.cycles));
    f = 1;
    sum = 0;
    for (int n = 1; n <= 12; n++) begin
      f = f * n;
      sum = sum + f;
    end
    chk(r0.u_dut.u_cpu.u_rf.regs[23] == f, "fact_mul: 12! not in x23");
    chk(r1.u_dut.u_cpu.u_rf.regs[23] == f, "fact_sw: 12! not in x23");
    chk(r0.u_dut.u_cpu.u_rf.regs[31] == sum, "fact_mul: wrong checksum in x31");
    chk(r1.u_dut.u_cpu.u_rf.regs[31] == sum, "fact_sw: wrong checksum in x31");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: a run did not finish (done = %b)", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
