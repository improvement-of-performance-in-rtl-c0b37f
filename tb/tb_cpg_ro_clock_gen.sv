// tb_cpg_ro_clock_gen: end-to-end test of the whole clock generator with
// every parameter at its default.
// Sequence: power-good reset; calibration of the ring-oscillator clock
// against an RTC (30.5 ns period here, a scaled-down RTC so that the run
// stays short); cyclic power gating on the calibrated clock with three
// different off times, including one too short for a fully-off phase;
// the gated oscillator's counts per powered-on window; the calibrated
// watchdog, first kicked and then left to expire; finally a second boot
// with the RTC stopped, which must end in the tamper trigger.
// All expected values come from the testbench's own edge counting and from
// the clock periods, not from the design. Every mechanism is counted and a
// mechanism that never happened is a failure.
module tb_cpg_ro_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;
  import cpg_pkg::*;

  localparam int PROG_W = 8, RO_W = 24, TRIG_W = 8, T_CPG = 100;
  localparam int TW = $clog2(T_CPG + 1), SUM_W = 10;
  localparam int RTC_HALF = 15250;       // 30.5 ns RTC period
  localparam int RO_PERIOD = 3000;       // 3 stages of 500 ps: 2*3*500 ps

  int checks = 0, failures = 0;

  logic              rst_n, rtc_clk, enable1, enable2, wdt_kick, cpg_run;
  logic [PROG_W-1:0] prog_load_value;
  logic [TRIG_W-1:0] trig_units;
  logic [TW-1:0]     t_off, t_off_active;
  logic              ro_clk, hold_signal, ro_is_faster, trig_signal, rtc_tamper, wdt_expired;
  logic [RO_W-1:0]   ro_ratio;
  cpg_state_e        cpg_state;
  logic              pwr_on, clk_en, save, restore, period_start, clk_out;
  logic [SUM_W-1:0]  gro_count, gro_out;

  cpg_ro_clock_gen dut (.*);

  // mechanisms
  int n_calib, n_faster, n_period, n_sleep, n_off, n_wake, n_save, n_restore,
      n_duty_change, n_capture, n_kick, n_wdt, n_tamper;

  bit rtc_run = 1'b1;
  initial rtc_clk = 1'b0;
  always begin
    #(RTC_HALF);
    if (rtc_run) rtc_clk = ~rtc_clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'd60_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- independent observation of the calibration window ----
  int  ro_edges, rtc_edges;
  bit  count_ro, count_rtc;
  time t_en, t_cal_end;
  always @(posedge ro_clk) if (count_ro) ro_edges++;
  always @(posedge rtc_clk) if (count_rtc) begin
    rtc_edges++;
    if (rtc_edges == int'(prog_load_value)) begin
      count_ro  = 1'b0;
      t_cal_end = $time;
    end
  end

  // ---- CPG observation: phases, pulses, duty per period ----
  int on_cycles, exp_toff;
  bit in_cpg;
  always @(posedge ro_clk) if (in_cpg) begin
    #1;
    if (cpg_state == CPG_SLEEP)  n_sleep++;
    if (cpg_state == CPG_OFF)    n_off++;
    if (cpg_state == CPG_WAKEUP) n_wake++;
    if (save)    n_save++;
    if (restore) n_restore++;
    check(clk_en == (cpg_state == CPG_ON), "clk_en follows ON");
    check(pwr_on == (cpg_state inside {CPG_ON, CPG_WAKEUP}), "pwr_on follows ON/WAKEUP");
  end

  // ---- gated oscillator: edges per window and silence while gated ----
  // When the ring is stopped its stages settle within three stage delays; an
  // edge later than that while clk_en is low would be an error.
  int  gro_edges, gro_edges_off;
  bit  first_window;
  time t_gate;
  always @(negedge clk_en) t_gate = $time;
  for (genvar s = 0; s < 3; s++) begin : g_obs
    always @(posedge dut.u_gro.taps[s]) begin
      if (clk_en)                       gro_edges++;
      else if ($time - t_gate > 2000)   gro_edges_off++;
    end
  end
  always @(negedge clk_en) if (in_cpg) begin
    #1;
    // The window that was open when observation began is not checked.
    if (!first_window) begin
      check(int'(gro_out) == gro_edges,
            $sformatf("gated RO count %0d, observed %0d edges", gro_out, gro_edges));
      check(gro_edges > 0, "gated RO ran in its window");
      n_capture++;
    end
    first_window = 1'b0;
    gro_edges = 0;
  end

  task automatic boot(input int p, input int units);
    rst_n = 1'b0; enable1 = 1'b0; enable2 = 1'b0; wdt_kick = 1'b0;
    cpg_run = 1'b0; t_off = '0; in_cpg = 1'b0;
    prog_load_value = PROG_W'(p); trig_units = TRIG_W'(units);
    count_ro = 1'b0; count_rtc = 1'b0; ro_edges = 0; rtc_edges = 0;
    #(200_000);
    check(!hold_signal && !trig_signal && clk_en && cpg_state == CPG_ON, "reset state");
    rst_n = 1'b1;
    #(20_123);
    enable1 = 1'b1; count_rtc = 1'b1;
    enable2 = 1'b1; count_ro = 1'b1;
    t_en = $time;
  endtask

  // wait until just after the first clock edge of the next CPG period
  task automatic next_period();
    do begin @(posedge ro_clk); #1; end while (!period_start);
  endtask

  // run whole CPG periods with a given off time and check the duty cycle
  task automatic cpg_periods(input int toff, input int n);
    @(negedge ro_clk);
    if (t_off != TW'(toff)) n_duty_change++;
    t_off = TW'(toff);
    // skip to the first period that uses the new off time
    next_period();
    next_period();
    for (int k = 0; k < n; k++) begin
      check(int'(t_off_active) == toff, "off time applied at period start");
      on_cycles = 0;
      for (int c = 0; c < T_CPG; c++) begin
        if (clk_en) on_cycles++;
        @(posedge ro_clk); #1;
      end
      check(period_start, "period length T_CPG");
      check(on_cycles == T_CPG - toff,
            $sformatf("duty %0d/%0d, expected %0d/%0d", on_cycles, T_CPG, T_CPG - toff, T_CPG));
      n_period++;
      // a kick each period keeps the watchdog from expiring
      @(negedge ro_clk); wdt_kick = 1'b1; @(negedge ro_clk); wdt_kick = 1'b0; n_kick++;
      next_period();
    end
  endtask

  initial rst_n = 1'b1;  // so that the first reset is a falling edge

  initial begin : main
    int ratio, p, edges;
    time t0, t1, window;
    #(100);
    p = 32;
    boot(p, 2);
    @(posedge hold_signal);
    ratio = int'(ro_ratio);
    check(ratio == ro_edges + 2, $sformatf("ratio %0d, expected %0d", ratio, ro_edges + 2));
    window = t_cal_end - t_en;
    check(time'(ratio * RO_PERIOD) + 3 * RO_PERIOD > window &&
          time'(ratio * RO_PERIOD) < window + 4 * RO_PERIOD, "ratio matches clock periods");
    n_calib++;
    check(ro_is_faster, "3 ns RO is faster than the 30.5 ns RTC");
    if (ro_is_faster) n_faster++;
    check(!trig_signal, "no trigger after calibration");

    // cyclic power gating on the calibrated clock
    @(negedge ro_clk);
    cpg_run = 1'b1; in_cpg = 1'b1; gro_edges = 0; gro_edges_off = 0; first_window = 1'b1;
    cpg_periods(40, 3);
    cpg_periods(15, 2);   // shorter than sleep + wake-up: no OFF phase
    cpg_periods(70, 2);
    check(gro_edges_off == 0, $sformatf("gated RO silent while gated (%0d edges)", gro_edges_off));
    check(!trig_signal, "kicked watchdog did not expire");

    // stop kicking: the watchdog expires after 2 calibration windows
    @(negedge ro_clk); wdt_kick = 1'b1; @(negedge ro_clk); wdt_kick = 1'b0; n_kick++;
    t0 = $time;
    edges = 0;
    while (!wdt_expired) begin @(posedge ro_clk); edges++; #1; end
    t1 = $time;
    n_wdt++;
    check(edges == 2 * ratio + 1, $sformatf("watchdog after %0d RO cycles, expected %0d", edges, 2 * ratio + 1));
    check(t1 - t0 > 2 * window - 8 * RO_PERIOD && t1 - t0 < 2 * window + 8 * RO_PERIOD,
          $sformatf("watchdog time %0t, expected about %0t", t1 - t0, 2 * window));
    check(trig_signal && !rtc_tamper, "trigger from watchdog");
    in_cpg = 1'b0;

    // second boot with a stopped RTC: calibration never ends, MSB trigger
    rtc_run = 1'b0;
    boot(p, 2);
    edges = 0;
    while (!rtc_tamper) begin @(posedge ro_clk); edges++; #1; end
    n_tamper++;
    check(edges == (1 << (RO_W - 1)) + 1, $sformatf("tamper after %0d RO cycles", edges));
    check(trig_signal && !hold_signal, "trigger from stopped RTC");
    check(clk_en && cpg_state == CPG_ON, "CPG idle without calibration");

    $display("mechanisms: calib=%0d faster=%0d periods=%0d sleep=%0d off=%0d wakeup=%0d save=%0d restore=%0d duty_change=%0d capture=%0d kick=%0d wdt=%0d tamper=%0d",
             n_calib, n_faster, n_period, n_sleep, n_off, n_wake, n_save, n_restore,
             n_duty_change, n_capture, n_kick, n_wdt, n_tamper);
    check(n_calib > 0, "calibration happened");
    check(n_faster > 0, "ro_is_faster seen");
    check(n_period > 0, "CPG periods");
    check(n_sleep > 0 && n_off > 0 && n_wake > 0, "sleep/off/wake-up phases");
    check(n_save > 0 && n_restore > 0, "save/restore pulses");
    check(n_duty_change >= 3, "duty-cycle changes");
    check(n_capture > 0, "gated RO captures");
    check(n_kick > 0 && n_wdt > 0 && n_tamper > 0, "watchdog kick, expiry and tamper");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
