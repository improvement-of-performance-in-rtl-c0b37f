// ro_calibrator: calibrates a free-running ring-oscillator (RO) clock once,
// at boot, against an external real-time clock (RTC), and then uses the
// calibrated RO clock as a watchdog time base that triggers a platform reset.
//
// Calibration (two clock domains):
//  * RTC domain: after `enable1` the RTC counter ("increment logic") counts
//    RTC cycles. On the RTC edge at which it reaches `prog_load_value` a
//    match flag is registered; OR feedback keeps it set and the RTC
//    counter stops itself. The RTC is not used again. A load value of 0
//    stands for 2**PROG_W.
//  * The sticky flag is passed through two RO-clock flip-flops and becomes
//    `hold_signal` in the RO domain.
//  * RO domain: after `enable2` the RO counter counts RO cycles until
//    `hold_signal` stops it. Its frozen value is `ro_ratio`: the number of
//    RO cycles in the calibration window of `prog_load_value` RTC cycles.
//    `ro_is_faster` says the RO made more cycles than the RTC did.
//  * If the RTC is stopped or tampered with, `hold_signal` never comes, the
//    RO counter keeps running and its MSB sets, which fires `trig_signal`.
// Watchdog (RO domain, after `hold_signal`): the LOW counter counts RO
// cycles and restarts each time it reaches `ro_ratio`, so one LOW cycle is
// one calibrated unit of `prog_load_value` RTC periods whatever the RO's
// speed; the HIGH counter counts these units. When HIGH equals `trig_units`
// (non-zero) `trig_signal` fires. `wdt_kick` restarts LOW and HIGH.
// `trig_signal` is sticky until reset.
//
// Interface: rst_n (async, active low, power-good reset for both domains),
// rtc_clk, ro_clk, enable1, enable2 (levels, assumed quasi-static with
// respect to the clock they qualify), prog_load_value, trig_units,
// wdt_kick (RO domain). Outputs in the RO domain.
// Timing: hold_signal follows the prog_load_value-th RTC edge after
// enable1 by two to three RO cycles; the watchdog fires trig_units*ro_ratio+1 RO cycles after
// hold_signal (or after the last kick).
// From the source design: the two counters and their enables, the
// programmable load value and its comparator, the self-stopping RTC
// counter, the hold signal stopping the RO counter, the MSB trigger, and
// the names RO_Ratio, RO_is_faster, HIGH/LOW count and trigger signal.
// This design's own choices: all widths, the reading of the HIGH/LOW
// counters as a calibrated watchdog, the watchdog kick input, the
// ro_is_faster comparison, and sticky triggering.
module ro_calibrator #(
  parameter int unsigned PROG_W = cpg_pkg::PROG_W_DEF,
  parameter int unsigned RO_W   = cpg_pkg::RO_W_DEF,
  parameter int unsigned TRIG_W = 8
) (
  input  logic              rst_n,
  input  logic              rtc_clk,
  input  logic              ro_clk,
  input  logic              enable1,
  input  logic              enable2,
  input  logic [PROG_W-1:0] prog_load_value,
  input  logic [TRIG_W-1:0] trig_units,
  input  logic              wdt_kick,
  output logic              hold_signal,
  output logic [RO_W-1:0]   ro_ratio,
  output logic              ro_is_faster,
  output logic              trig_signal,
  output logic              rtc_tamper,
  output logic              wdt_expired
);
  timeunit 1ps;
  timeprecision 1ps;

  // ---------------- RTC domain ----------------
  // The counter stops itself at the RTC edge on which it reaches the load
  // value; the comparator result is registered and held by OR feedback.
  logic [PROG_W-1:0] rtc_cnt;
  logic              rtc_done;      // sticky registered match
  logic              rtc_hit;

  assign rtc_hit = enable1 && !rtc_done && (rtc_cnt + 1'b1 == prog_load_value);

  always_ff @(posedge rtc_clk or negedge rst_n) begin
    if (!rst_n) begin
      rtc_cnt  <= '0;
      rtc_done <= 1'b0;
    end else begin
      rtc_done <= rtc_done | rtc_hit;
      if (enable1 && !rtc_done) rtc_cnt <= rtc_cnt + 1'b1;
    end
  end

  // ---------------- RTC -> RO synchroniser ----------------
  logic [1:0] hold_sync;
  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) hold_sync <= '0;
    else        hold_sync <= {hold_sync[0], rtc_done};
  end
  assign hold_signal = hold_sync[1];

  // ---------------- RO domain: calibration counter ----------------
  logic [RO_W-1:0] ro_cnt;
  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_cnt     <= '0;
      rtc_tamper <= 1'b0;
    end else begin
      if (enable2 && !hold_signal) ro_cnt <= ro_cnt + 1'b1;
      if (ro_cnt[RO_W-1] && !hold_signal) rtc_tamper <= 1'b1;
    end
  end

  // Calibration happens once: while the hold is set its source stays set.
  a_hold_sticky: assert property (@(posedge ro_clk) disable iff (!rst_n) hold_signal |-> hold_sync[0]);

  assign ro_ratio     = hold_signal ? ro_cnt : '0;
  assign ro_is_faster = hold_signal && (ro_cnt > RO_W'(prog_load_value));

  // ---------------- RO domain: calibrated watchdog ----------------
  logic [RO_W-1:0]   low_cnt;
  logic [TRIG_W-1:0] high_cnt;
  logic              low_eq, high_eq;

  assign low_eq  = (low_cnt == ro_cnt - 1'b1);   // one calibrated unit
  assign high_eq = (trig_units != '0) && (high_cnt == trig_units);

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      low_cnt     <= '0;
      high_cnt    <= '0;
      wdt_expired <= 1'b0;
    end else if (!hold_signal || wdt_kick) begin
      low_cnt  <= '0;
      high_cnt <= '0;
    end else begin
      if (high_eq) wdt_expired <= 1'b1;
      if (low_eq) begin
        low_cnt <= '0;
        if (!high_eq) high_cnt <= high_cnt + 1'b1;
      end else begin
        low_cnt <= low_cnt + 1'b1;
      end
    end
  end

  assign trig_signal = rtc_tamper | wdt_expired;

endmodule
