// cpg_controller: cyclic power-gating (CPG) controller.
//
// The controlled domain is powered on and off over a short, fixed period of
// T_CPG clock cycles. Within each period it is powered and clocked for
// T_CPG - T_off cycles and powered off for T_off cycles, so its effective
// frequency and power follow the duty cycle (T_CPG - T_off) / T_CPG without
// any change of supply voltage. T_off comes from the `t_off` input and is
// loaded into the off-time timer at the start of every period, so the duty
// cycle can change between any two periods with no overhead.
//
// Within a period the phases are (see cpg_pkg::cpg_state_e):
//   CPG_ON     T_CPG - T_off cycles: pwr_on = 1, clk_en = 1
//   CPG_SLEEP  first T_SLEEP off cycles: clock stopped, supply switched off
//              and decaying
//   CPG_OFF    the rest of the off time: fully off
//   CPG_WAKEUP last T_WAKEUP off cycles: supply switched back on so that it
//              has settled when the clock restarts; clock still stopped
// When T_off is shorter than T_SLEEP + T_WAKEUP the wake-up phase keeps its
// length (up to T_off) and the sleep phase is shortened; there is then no
// CPG_OFF phase. `save` pulses in the last ON cycle before an off time and
// `restore` in the last WAKEUP cycle, for state-retention registers.
//
// Interface: clk, rst_n (async, active low), run (CPG on; sampled at each
// period start, when low the period is spent fully on), t_off (cycles,
// values above T_CPG are clamped). state, pwr_on, clk_en and t_off_active
// come straight from flip-flops; save, restore and period_start are
// decoded from the period counter.
// Timing: period_start is high in the first cycle of every period; a new
// t_off takes effect from that period on.
// From the source design: the fixed period T_CPG, the off-time timer
// initialised at every period start, the duty-cycle relation, the sleep and
// wake-up intervals and state retention across the off time. This design's
// own choices: the clock-cycle values of T_CPG, T_SLEEP and T_WAKEUP, the
// ON-then-OFF order inside the period, the run input and the save/restore
// pulse timing.
module cpg_controller
  import cpg_pkg::*;
#(
  parameter int unsigned T_CPG    = 100,
  parameter int unsigned T_SLEEP  = 10,
  parameter int unsigned T_WAKEUP = 10,
  parameter int unsigned TW       = $clog2(T_CPG + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [TW-1:0] t_off,
  output cpg_state_e    state,
  output logic          pwr_on,
  output logic          clk_en,
  output logic          save,
  output logic          restore,
  output logic          period_start,
  output logic [TW-1:0] t_off_active
);
  timeunit 1ps;
  timeprecision 1ps;

  // Phase of cycle `p` of a period whose off time is `toff` cycles.
  function automatic cpg_state_e phase_of(logic [TW-1:0] p, logic [TW-1:0] toff);
    logic [TW-1:0] on_len, o, wake_len;
    on_len   = TW'(T_CPG) - toff;
    wake_len = (toff < TW'(T_WAKEUP)) ? toff : TW'(T_WAKEUP);
    if (p < on_len) return CPG_ON;
    o = p - on_len;
    if (o >= toff - wake_len) return CPG_WAKEUP;
    if (o < TW'(T_SLEEP))     return CPG_SLEEP;
    return CPG_OFF;
  endfunction

  logic [TW-1:0] p_q, p_next, toff_next, t_off_clamped;
  cpg_state_e    state_next;

  assign t_off_clamped = (t_off > TW'(T_CPG)) ? TW'(T_CPG) : t_off;

  always_comb begin
    p_next     = (p_q == TW'(T_CPG - 1)) ? '0 : p_q + 1'b1;
    toff_next  = (p_next == '0) ? (run ? t_off_clamped : '0) : t_off_active;
    state_next = phase_of(p_next, toff_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q          <= '0;
      t_off_active <= '0;
      state        <= CPG_ON;
      pwr_on       <= 1'b1;
      clk_en       <= 1'b1;
    end else begin
      p_q          <= p_next;
      t_off_active <= toff_next;
      state        <= state_next;
      // own flip-flops, so that no state change can glitch the enables
      pwr_on       <= (state_next == CPG_ON) || (state_next == CPG_WAKEUP);
      clk_en       <= (state_next == CPG_ON);
    end
  end

  // The domain is never clocked without power, and the off time of a
  // period changes only at its start.
  a_clk_needs_power: assert property (@(posedge clk) disable iff (!rst_n) clk_en |-> pwr_on);
  a_toff_per_period: assert property (@(posedge clk) disable iff (!rst_n)
                                      !period_start |-> $stable(t_off_active));

  assign save         = (state == CPG_ON) && (state_next != CPG_ON);
  assign restore      = (state == CPG_WAKEUP) && (state_next == CPG_ON);
  assign period_start = (p_q == '0);

endmodule
