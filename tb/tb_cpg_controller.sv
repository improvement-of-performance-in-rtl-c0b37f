// tb_cpg_controller: self-checking test of the cyclic power-gating
// controller at its default period (T_CPG = 100, T_SLEEP = T_WAKEUP = 10).
// For every period the testbench builds the expected phase sequence from
// the off time that was applied at the period start (ON for T_CPG - T_off
// cycles, then sleep, off and wake-up) and compares the controller's state,
// power and clock enables, save/restore pulses and period start cycle by
// cycle. It changes t_off at a random point inside each period, which must
// only take effect at the next period, and checks the measured duty cycle
// (T_CPG - T_off)/T_CPG of every period. Off times cover 0, shorter than the
// wake-up time, shorter than sleep plus wake-up, the full period, clamping
// above T_CPG and run = 0.
module tb_cpg_controller;
  timeunit 1ps;
  timeprecision 1ps;
  import cpg_pkg::*;

  localparam int T_CPG = 100, T_SLEEP = 10, T_WAKEUP = 10;
  localparam int TW = $clog2(T_CPG + 1);

  int checks = 0, failures = 0;

  logic          clk, rst_n, run;
  logic [TW-1:0] t_off, t_off_active;
  cpg_state_e    state;
  logic          pwr_on, clk_en, save, restore, period_start;

  cpg_controller dut (.*);

  initial clk = 1'b0;
  always #(1500) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected phase sequence of one period
  cpg_state_e exp_seq [T_CPG];
  task automatic build_seq(input int toff);
    int wake, slp, off, on;
    wake = (toff < T_WAKEUP) ? toff : T_WAKEUP;
    slp  = (toff - wake < T_SLEEP) ? toff - wake : T_SLEEP;
    off  = toff - wake - slp;
    on   = T_CPG - toff;
    for (int i = 0; i < T_CPG; i++) begin
      if (i < on)                  exp_seq[i] = CPG_ON;
      else if (i < on + slp)       exp_seq[i] = CPG_SLEEP;
      else if (i < on + slp + off) exp_seq[i] = CPG_OFF;
      else                         exp_seq[i] = CPG_WAKEUP;
    end
  endtask

  int plan_toff [] = '{40, 0, 5, 15, 20, 21, 99, 100, 150, 60, 30, 73, 1, 10, 11};
  bit plan_run  [] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 1, 1, 1, 1, 1};

  initial begin : main
    int cur_toff, on_cycles, cyc, n_save, n_restore;
    cpg_state_e nxt;
    run = 1'b0; t_off = '0; rst_n = 1'b1;
    #(100);
    rst_n = 1'b0;
    #(10_000);
    check(state == CPG_ON && pwr_on && clk_en, "reset state is ON");
    @(negedge clk);
    rst_n = 1'b1;
    // first period after reset: off time 0; program the first plan entry
    run = plan_run[0]; t_off = TW'(plan_toff[0]);
    @(posedge clk); #1;
    while (!period_start) begin @(posedge clk); #1; end
    for (int per = 0; per < plan_toff.size(); per++) begin
      // applied off time (t_off was stable since the previous negedge)
      cur_toff = run ? ((int'(t_off) > T_CPG) ? T_CPG : int'(t_off)) : 0;
      build_seq(cur_toff);
      check(int'(t_off_active) == cur_toff, $sformatf("period %0d off time %0d, expected %0d", per, t_off_active, cur_toff));
      on_cycles = 0; n_save = 0; n_restore = 0;
      for (cyc = 0; cyc < T_CPG; cyc++) begin
        check(period_start == (cyc == 0), "period_start");
        check(state == exp_seq[cyc], $sformatf("period %0d cycle %0d state %s expected %s",
                                              per, cyc, state.name(), exp_seq[cyc].name()));
        check(pwr_on == (exp_seq[cyc] inside {CPG_ON, CPG_WAKEUP}), "pwr_on");
        check(clk_en == (exp_seq[cyc] == CPG_ON), "clk_en");
        // phase of the following cycle; the next period opens with ON
        // unless its off time is the whole period
        if (cyc < T_CPG - 1) nxt = exp_seq[cyc + 1];
        else nxt = ((run ? ((int'(t_off) > T_CPG) ? T_CPG : int'(t_off)) : 0) < T_CPG) ? CPG_ON : CPG_SLEEP;
        check(save == (exp_seq[cyc] == CPG_ON && nxt != CPG_ON), "save pulse");
        check(restore == (exp_seq[cyc] == CPG_WAKEUP && nxt == CPG_ON), "restore pulse");
        if (clk_en) on_cycles++;
        n_save += int'(save); n_restore += int'(restore);
        // change the request somewhere inside the period
        if (cyc == 37 + per) begin
          @(negedge clk);
          if (per + 1 < plan_toff.size()) begin
            run = plan_run[per + 1]; t_off = TW'(plan_toff[per + 1]);
          end
        end
        @(posedge clk); #1;
      end
      check(on_cycles == T_CPG - cur_toff,
            $sformatf("period %0d duty %0d/%0d, expected %0d/%0d", per, on_cycles, T_CPG, T_CPG - cur_toff, T_CPG));
      check(n_save <= 1 && n_restore <= 1 && (cur_toff == 0 || cur_toff == T_CPG || n_save == 1),
            $sformatf("period %0d save/restore count %0d/%0d", per, n_save, n_restore));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
