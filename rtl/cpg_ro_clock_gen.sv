// cpg_ro_clock_gen: ring-oscillator clock generation with a calibrated,
// cyclically power-gated architecture.
//
// A ring-oscillator clock is generated on chip, so it is tamper-proof, but
// its frequency moves with process, voltage and temperature. This top
// combines three parts so that power management can run on such a clock:
//  * a free-running ring oscillator (u_cal_osc) gives `ro_clk`; the
//    ro_calibrator measures it once at boot against the external RTC, gives
//    the calibrated ratio, and from then on runs a watchdog in calibrated
//    time units that raises `trig_signal` for a platform reset (also raised
//    if the RTC never completes the calibration);
//  * a cyclic power-gating controller (u_cpg), clocked by the calibrated
//    `ro_clk` and started once calibration is done, switches the gated
//    domain on and off every T_CPG cycles with the duty cycle set by `t_off`;
//  * the gated domain is a power-gated ring oscillator with its per-stage
//    counters (u_gro, power_gated_ro): it oscillates only while the CPG
//    controller enables its clock and gives `clk_out`, and `gro_out` holds
//    the number of stage transitions of its last powered-on window.
// The power switch and the state-retention registers of the gated domain
// are physical cells; their controls (pwr_on, save, restore) are outputs.
//
// Interface: rst_n (power-good reset, async, active low), rtc_clk,
// enable1/enable2 (calibration enables, RTC side and RO side),
// prog_load_value (calibration window in RTC cycles), trig_units (watchdog
// timeout in calibration windows, 0 = off), wdt_kick (RO domain),
// cpg_run and t_off (CPG on and off time per period, RO domain).
// Structure, names and the order "calibrate, then run power management on
// the calibrated clock" follow the source design; which signal gates which
// oscillator, and the start condition of the CPG controller, are this
// design's own choices.
module cpg_ro_clock_gen
  import cpg_pkg::*;
#(
  parameter int unsigned N_STAGES           = 3,
  parameter int unsigned CAL_STAGE_DELAY_PS = 500,
  parameter int unsigned GRO_STAGE_DELAY_PS = 500,
  parameter int unsigned PROG_W             = PROG_W_DEF,
  parameter int unsigned RO_W               = RO_W_DEF,
  parameter int unsigned TRIG_W             = 8,
  parameter int unsigned CNT_W              = CNT_W_DEF,
  parameter int unsigned T_CPG              = 100,
  parameter int unsigned T_SLEEP            = 10,
  parameter int unsigned T_WAKEUP           = 10,
  parameter int unsigned TW                 = $clog2(T_CPG + 1),
  parameter int unsigned SUM_W              = CNT_W + $clog2(N_STAGES)
) (
  input  logic              rst_n,
  input  logic              rtc_clk,
  input  logic              enable1,
  input  logic              enable2,
  input  logic [PROG_W-1:0] prog_load_value,
  input  logic [TRIG_W-1:0] trig_units,
  input  logic              wdt_kick,
  input  logic              cpg_run,
  input  logic [TW-1:0]     t_off,
  // calibrated RO clock and calibration results
  output logic              ro_clk,
  output logic              hold_signal,
  output logic [RO_W-1:0]   ro_ratio,
  output logic              ro_is_faster,
  output logic              trig_signal,
  output logic              rtc_tamper,
  output logic              wdt_expired,
  // cyclic power gating
  output cpg_state_e        cpg_state,
  output logic              pwr_on,
  output logic              clk_en,
  output logic              save,
  output logic              restore,
  output logic              period_start,
  output logic [TW-1:0]     t_off_active,
  // gated ring oscillator
  output logic              clk_out,
  output logic [SUM_W-1:0]  gro_count,
  output logic [SUM_W-1:0]  gro_out
);
  timeunit 1ps;
  timeprecision 1ps;


  // Free-running oscillator, running as soon as power is good.
  ring_oscillator #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(CAL_STAGE_DELAY_PS)
  ) u_cal_osc (
    .enable (rst_n),
    .taps   (),
    .clk_out(ro_clk)
  );

  ro_calibrator #(
    .PROG_W(PROG_W),
    .RO_W  (RO_W),
    .TRIG_W(TRIG_W)
  ) u_cal (
    .rst_n          (rst_n),
    .rtc_clk        (rtc_clk),
    .ro_clk         (ro_clk),
    .enable1        (enable1),
    .enable2        (enable2),
    .prog_load_value(prog_load_value),
    .trig_units     (trig_units),
    .wdt_kick       (wdt_kick),
    .hold_signal    (hold_signal),
    .ro_ratio       (ro_ratio),
    .ro_is_faster   (ro_is_faster),
    .trig_signal    (trig_signal),
    .rtc_tamper     (rtc_tamper),
    .wdt_expired    (wdt_expired)
  );

  // Power management runs on the calibrated clock once calibration is done.
  cpg_controller #(
    .T_CPG   (T_CPG),
    .T_SLEEP (T_SLEEP),
    .T_WAKEUP(T_WAKEUP)
  ) u_cpg (
    .clk         (ro_clk),
    .rst_n       (rst_n),
    .run         (cpg_run && hold_signal),
    .t_off       (t_off),
    .state       (cpg_state),
    .pwr_on      (pwr_on),
    .clk_en      (clk_en),
    .save        (save),
    .restore     (restore),
    .period_start(period_start),
    .t_off_active(t_off_active)
  );

  // Cyclically gated oscillator and its counters.
  power_gated_ro #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(GRO_STAGE_DELAY_PS),
    .CNT_W         (CNT_W),
    .SUM_W         (SUM_W)
  ) u_gro (
    .rst_n  (rst_n),
    .enable (clk_en),
    .clk_out(clk_out),
    .count  (gro_count),
    .out    (gro_out)
  );

endmodule
