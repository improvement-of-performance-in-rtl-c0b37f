// cpg_pkg: types and default sizes shared by the cyclic power-gated ring
// oscillator clock generator.
//
// cpg_state_e names the four phases of one cyclic power-gating period (see
// cpg_controller): the core is powered and clocked (CPG_ON), its clock has
// stopped and its supply is being switched off (CPG_SLEEP), it is fully off
// (CPG_OFF), and its supply is back on while the clock is still held
// (CPG_WAKEUP). The phase names follow the powered-on / powered-off,
// T_sleep / T_wakeup waveform of the cyclic power-gating scheme; the
// encoding and all default widths below are this design's own choices.
package cpg_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    CPG_ON     = 2'd0,
    CPG_SLEEP  = 2'd1,
    CPG_OFF    = 2'd2,
    CPG_WAKEUP = 2'd3
  } cpg_state_e;

  // Default widths (not given by the source design; chosen here).
  localparam int unsigned PROG_W_DEF = 8;   // programmable RTC load value
  localparam int unsigned RO_W_DEF   = 24;  // RO calibration counter
  localparam int unsigned CNT_W_DEF  = 8;   // per-stage gated-RO counters

endpackage
