// power_gated_ro: a power-gated ring oscillator with its counters, the
// unit switched by the cyclic power-gating controller.
//
// How it works: one `enable` both runs the ring (ring_oscillator, a
// behavioural model) and releases the per-stage counters
// (gated_ro_counter). While `enable` is high the ring oscillates and every
// stage's rising edges are counted; when `enable` falls the summed count
// is loaded into `out`, the ring stops and the counters clear. Started
// from rest, the ring gives one rising edge on one of its stages every two
// stage delays, so `out` = number of k >= 1 with 2*k*Td shorter than the
// enabled window.
//
// Interface: rst_n (async, clears `out`), enable, clk_out (ring output,
// the gated clock), count (live sum), out (sum of the last window).
// Timing: `out` changes on the falling edge of `enable`.
// The structure (gated ring, counters on every stage, adder, register
// loaded from Enable) follows the source design; the parts' own headers
// list the choices made here.
module power_gated_ro #(
  parameter int unsigned N_STAGES       = 3,
  parameter int unsigned STAGE_DELAY_PS = 500,
  parameter int unsigned CNT_W          = cpg_pkg::CNT_W_DEF,
  parameter int unsigned SUM_W          = CNT_W + $clog2(N_STAGES)
) (
  input  logic             rst_n,
  input  logic             enable,
  output logic             clk_out,
  output logic [SUM_W-1:0] count,
  output logic [SUM_W-1:0] out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES-1:0] taps;

  ring_oscillator #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_ring (
    .enable (enable),
    .taps   (taps),
    .clk_out(clk_out)
  );

  gated_ro_counter #(
    .N_STAGES(N_STAGES),
    .CNT_W   (CNT_W),
    .SUM_W   (SUM_W)
  ) u_cnt (
    .rst_n (rst_n),
    .enable(enable),
    .taps  (taps),
    .count (count),
    .out   (out)
  );

endmodule
