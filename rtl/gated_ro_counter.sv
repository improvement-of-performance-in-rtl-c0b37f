// gated_ro_counter: the counting half of a power-gated ring oscillator.
//
// One counter per inverter stage of the gated ring, each clocked by the
// rising edge of its own stage output. While `enable` is low the counters
// are held in reset (asynchronously) and the ring is stopped; while
// `enable` is high the ring runs and every counter counts the oscillations
// of its stage. The counter values are summed into `count`, and the sum is
// captured into the output register `out` on the falling edge of `enable`,
// i.e. at the end of each enabled window, before the counters are cleared.
// `out` therefore reports the total number of stage transitions seen in the
// last enabled window; with the ring's period 2*n*Td this is a measure of
// the window length in stage delays.
//
// Interface: enable (in; also the register's clock), taps[N_STAGES-1:0]
// (in, ring stage outputs), rst_n (in, async, clears `out` and the
// counters),
// count (out, live sum), out (out, registered sum).
// Timing: `out` changes only on the falling edge of `enable`; `count` is
// combinational from the counters.
// From the source design: one counter per stage, the counters reset by
// Enable, the adder and the register loaded from Enable. This design's own
// choices: the counter width, capture on the falling edge of Enable (the
// edge is not given), the power-on reset of the register and counters
// (their clear is the AND of Enable and reset), and wrap-around counters.
module gated_ro_counter #(
  parameter int unsigned N_STAGES = 3,
  parameter int unsigned CNT_W    = cpg_pkg::CNT_W_DEF,
  parameter int unsigned SUM_W    = CNT_W + $clog2(N_STAGES)
) (
  input  logic                rst_n,
  input  logic                enable,
  input  logic [N_STAGES-1:0] taps,
  output logic [SUM_W-1:0]    count,
  output logic [SUM_W-1:0]    out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES-1:0][CNT_W-1:0] stage_cnt;

  // counters are cleared while enable is low and at power-on reset
  logic clr_n;
  assign clr_n = enable & rst_n;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    logic [CNT_W-1:0] cnt;
    always_ff @(posedge taps[i] or negedge clr_n) begin
      if (!clr_n) cnt <= '0;
      else         cnt <= cnt + 1'b1;
    end
    assign stage_cnt[i] = cnt;
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < N_STAGES; i++) count += SUM_W'(stage_cnt[i]);
  end

  always_ff @(negedge enable or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= count;
  end

endmodule
