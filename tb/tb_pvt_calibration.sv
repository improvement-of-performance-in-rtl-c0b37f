// tb_pvt_calibration: the calibration workload with a real 32.768 kHz RTC.
// Three copies of the whole clock generator share one RTC; their ring
// oscillators have stage delays of 400 ps, 500 ps (default) and 650 ps,
// standing for fast, typical and slow process/voltage/temperature corners
// (416, 333 and 256 MHz). Each is calibrated over 64 RTC cycles (1.95 ms)
// and then left to run its watchdog for two calibration windows. The
// testbench checks for every corner that the ratio matches RTC time over
// RO period, that the RTC tamper trigger stays off, that the cycle count of
// the watchdog is 2*ratio+1, and that the watchdog expires after the same
// real time (2 x 64 RTC periods) at all corners, within three RO periods
// per window, although the raw RO frequencies differ by 60 %. It also runs the
// cyclic power gating on each calibrated clock for a few periods.
module tb_pvt_calibration;
  timeunit 1ps;
  timeprecision 1ps;
  import cpg_pkg::*;

  localparam int NC = 3;
  localparam int DELAY [NC] = '{400, 500, 650};
  localparam longint RTC_HALF = 15_258_789;   // 1 / (2 * 32768 Hz), in ps
  localparam int P = 64, UNITS = 2;
  localparam int PROG_W = 8, RO_W = 24, TRIG_W = 8, TW = 7, SUM_W = 10;

  int checks = 0, failures = 0;

  logic rst_n, rtc_clk, enable1, enable2;
  logic [NC-1:0] ro_clk, hold_signal, ro_is_faster, trig_signal, rtc_tamper, wdt_expired;
  logic [NC-1:0] pwr_on, clk_en, save, restore, period_start, clk_out;
  logic [RO_W-1:0]  ro_ratio [NC];
  cpg_state_e       cpg_state [NC];
  logic [TW-1:0]    t_off_active [NC];
  logic [SUM_W-1:0] gro_count [NC], gro_out [NC];
  time t_hold [NC], t_exp [NC];
  int  wdt_cycles [NC], periods [NC];

  for (genvar c = 0; c < NC; c++) begin : g_corner
    cpg_ro_clock_gen #(
      .CAL_STAGE_DELAY_PS(DELAY[c]),
      .GRO_STAGE_DELAY_PS(DELAY[c])
    ) dut (
      .rst_n(rst_n), .rtc_clk(rtc_clk), .enable1(enable1), .enable2(enable2),
      .prog_load_value(PROG_W'(P)), .trig_units(TRIG_W'(UNITS)), .wdt_kick(1'b0),
      .cpg_run(1'b1), .t_off(TW'(25)),
      .ro_clk(ro_clk[c]), .hold_signal(hold_signal[c]), .ro_ratio(ro_ratio[c]),
      .ro_is_faster(ro_is_faster[c]), .trig_signal(trig_signal[c]), .rtc_tamper(rtc_tamper[c]),
      .wdt_expired(wdt_expired[c]), .cpg_state(cpg_state[c]), .pwr_on(pwr_on[c]),
      .clk_en(clk_en[c]), .save(save[c]), .restore(restore[c]), .period_start(period_start[c]),
      .t_off_active(t_off_active[c]), .clk_out(clk_out[c]), .gro_count(gro_count[c]),
      .gro_out(gro_out[c]));

    // per corner: hold time, expiry time, RO cycles between them, CPG periods
    bit counting;
    always @(posedge hold_signal[c]) begin t_hold[c] = $time; counting = 1'b1; wdt_cycles[c] = 0; end
    always @(posedge ro_clk[c]) if (counting) begin
      wdt_cycles[c]++;
      #1;
      if (wdt_expired[c]) begin counting = 1'b0; t_exp[c] = $time; end
    end
    always @(posedge ro_clk[c]) if (period_start[c] && t_off_active[c] == TW'(25)) periods[c]++;
  end

  initial rtc_clk = 1'b0;
  always #(RTC_HALF) rtc_clk = ~rtc_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(64'd20_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial rst_n = 1'b1;

  initial begin : main
    time t_en, t_cal, window, ro_per, wdt_time;
    longint exp_ratio;
    for (int c = 0; c < NC; c++) periods[c] = 0;
    #(100);
    rst_n = 1'b0; enable1 = 1'b0; enable2 = 1'b0;
    #(1_000_000);
    rst_n = 1'b1;
    #(1_000_000);
    @(negedge rtc_clk);
    enable1 = 1'b1; enable2 = 1'b1;
    t_en = $time;
    repeat (P) @(posedge rtc_clk);
    t_cal = $time;
    window = t_cal - t_en;
    wait (&wdt_expired);
    repeat (100) @(posedge ro_clk[0]);
    for (int c = 0; c < NC; c++) begin
      ro_per = time'(6 * DELAY[c]);
      exp_ratio = longint'(window / ro_per);
      check(longint'(ro_ratio[c]) >= exp_ratio && longint'(ro_ratio[c]) <= exp_ratio + 3,
            $sformatf("corner %0d ps: ratio %0d, expected %0d..%0d", DELAY[c], ro_ratio[c], exp_ratio, exp_ratio + 3));
      check(ro_is_faster[c], "RO faster than the RTC");
      check(!rtc_tamper[c], "no tamper trigger with a running RTC");
      check(wdt_cycles[c] == UNITS * int'(ro_ratio[c]) + 1, $sformatf("corner %0d ps: watchdog cycles", DELAY[c]));
      wdt_time = t_exp[c] - t_hold[c];
      // each calibrated window is 2 to 3 RO periods longer than the RTC
      // window (the synchroniser cycles counted into the ratio)
      check(wdt_time + 2 * ro_per >= time'(UNITS) * window &&
            wdt_time <= time'(UNITS) * window + time'(3 * UNITS + 2) * ro_per,
            $sformatf("corner %0d ps: watchdog after %0t, expected %0t", DELAY[c], wdt_time, time'(UNITS) * window));
      check(periods[c] > 10, $sformatf("corner %0d ps: %0d CPG periods", DELAY[c], periods[c]));
      $display("corner %0d ps: ratio %0d, watchdog %0t ps", DELAY[c], ro_ratio[c], wdt_time);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
