// tb_ro_calibrator: self-checking test of the RTC-based RO calibration and
// the calibrated watchdog.
// The testbench makes both clocks itself and changes the RO period between
// runs, as process, voltage and temperature would. For every run it counts
// on its own the RO edges between enable2 and the prog_load_value-th RTC
// edge; the calibrated ratio must be that count plus the two RO cycles of
// the hold synchroniser. It then checks ro_is_faster against the two clock
// periods, that the RO counter stays frozen, that the watchdog fires after
// exactly trig_units*ratio+1 RO cycles (so after the same real time for
// every RO speed, within the calibration error), that a kick restarts it,
// and, with the RTC stopped, that the MSB of the RO counter raises the
// trigger after 2**(RO_W-1)+1 RO cycles.
module tb_ro_calibrator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PROG_W = 8, RO_W = 24, TRIG_W = 8;

  int checks = 0, failures = 0;

  logic              rst_n, rtc_clk, ro_clk, enable1, enable2, wdt_kick;
  logic [PROG_W-1:0] prog_load_value;
  logic [TRIG_W-1:0] trig_units;
  logic              hold_signal, ro_is_faster, trig_signal, rtc_tamper, wdt_expired;
  logic [RO_W-1:0]   ro_ratio;

  ro_calibrator dut (.*);

  int  rtc_half = 15250, ro_half = 1500;
  bit  rtc_run = 1'b1;

  initial rtc_clk = 1'b0;
  always begin
    #(rtc_half);
    if (rtc_run) rtc_clk = ~rtc_clk;
  end
  initial ro_clk = 1'b0;
  always begin
    #(ro_half);
    ro_clk = ~ro_clk;
  end

  // independent edge counters
  int  ro_edges, rtc_edges;
  bit  count_ro, count_rtc;
  time t_last_rtc;
  always @(posedge ro_clk) if (count_ro) ro_edges++;
  always @(posedge rtc_clk) if (count_rtc) begin
    rtc_edges++;
    if (rtc_edges == int'(prog_load_value)) begin
      count_ro   = 1'b0;      // stop counting at the P-th RTC edge
      t_last_rtc = $time;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(64'd40_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0; enable1 = 1'b0; enable2 = 1'b0; wdt_kick = 1'b0;
    count_ro = 1'b0; count_rtc = 1'b0; ro_edges = 0; rtc_edges = 0;
    #(100_000);
    check(!hold_signal && ro_ratio == 0 && !trig_signal, "reset state");
    rst_n = 1'b1;
    #(7_000);
  endtask

  task automatic calibrate(input int ro_half_ps, input int p, input int en2_delay_ps,
                           input int units);
    int ratio, wdt_edges;
    time t_hold, t_trig, window, tol;
    ro_half = ro_half_ps;
    prog_load_value = PROG_W'(p);
    trig_units = TRIG_W'(units);
    do_reset();
    #(333);
    enable1 = 1'b1; count_rtc = 1'b1;
    #(en2_delay_ps);
    enable2 = 1'b1; count_ro = 1'b1;
    @(posedge hold_signal);
    t_hold = $time;
    ratio = int'(ro_ratio);
    check(ratio == ro_edges + 2,
          $sformatf("Tro=%0d P=%0d: ratio %0d, expected %0d", 2*ro_half_ps, p, ratio, ro_edges + 2));
    check(ro_is_faster == (ratio > p), "ro_is_faster matches the ratio");
    check(ro_is_faster == (2*ro_half_ps < 2*rtc_half), "ro_is_faster matches the clock periods");
    check(!trig_signal, "no trigger at calibration");
    // watchdog, with one kick on the first run
    if (units != 0) begin
      wdt_edges = 0;
      if (en2_delay_ps == 0) begin
        repeat (ratio) @(posedge ro_clk);
        @(negedge ro_clk); wdt_kick = 1'b1;
        @(negedge ro_clk); wdt_kick = 1'b0;
        t_hold = $time;
        check(!wdt_expired, "no expiry before timeout");
      end
      while (!wdt_expired) begin
        @(posedge ro_clk);
        wdt_edges++;
        #1;
      end
      t_trig = $time;
      check(wdt_edges == units * ratio + 1,
            $sformatf("watchdog after %0d RO cycles, expected %0d", wdt_edges, units * ratio + 1));
      check(trig_signal && !rtc_tamper, "watchdog drives trig_signal");
      // real time of the timeout against units calibration windows; the
      // window is P RTC periods less the delay of enable2 after enable1
      window = time'(p) * time'(2*rtc_half) - time'(en2_delay_ps);
      tol    = time'(units + 1) * time'(8*ro_half_ps);
      check((t_trig - t_hold) + tol >= time'(units) * window &&
            (t_trig - t_hold) <= time'(units) * window + tol,
            $sformatf("watchdog time %0t for %0d windows of %0t", t_trig - t_hold, units, window));
      repeat (10) @(posedge ro_clk);
      check(trig_signal, "trigger is sticky");
    end
    // counter frozen
    repeat (50) @(posedge ro_clk);
    check(int'(ro_ratio) == ratio, "ratio frozen after hold");
  endtask

  initial rst_n = 1'b1;  // so that the first reset is a falling edge

  initial begin : main
    #(100);
    prog_load_value = 8'd20; trig_units = '0;
    calibrate(1500, 20, 0, 3);     // 3 ns RO, RO faster
    calibrate(1100, 50, 0, 2);     // 2.2 ns RO
    calibrate(1100, 50, 97_000, 2); // enable2 set by software later
    calibrate(20500, 10, 0, 2);    // 41 ns RO, slower than the RTC
    calibrate(1700, 7, 0, 0);      // watchdog off
    repeat (200) @(posedge ro_clk);
    check(!trig_signal, "no trigger with trig_units = 0");

    // tampered RTC: no RTC edges, hold never comes, MSB trigger
    begin
      int edges;
      ro_half = 1000;
      rtc_run = 1'b0;
      prog_load_value = 8'd20; trig_units = 8'd1;
      do_reset();
      enable1 = 1'b1; enable2 = 1'b1;
      edges = 0;
      while (!rtc_tamper) begin
        @(posedge ro_clk);
        edges++;
        #1;
      end
      check(edges == (1 << (RO_W - 1)) + 1,
            $sformatf("tamper trigger after %0d RO cycles, expected %0d", edges, (1 << (RO_W - 1)) + 1));
      check(trig_signal && !hold_signal && !wdt_expired, "tamper drives trig_signal");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
