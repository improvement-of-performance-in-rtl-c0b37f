// ring_oscillator: BEHAVIOURAL MODEL of a gated ring oscillator. It is not
// synthesizable logic: a real ring oscillator is a loop of an odd number of
// inverting stages whose frequency is set by the analogue stage delay, which
// a synthesizable description cannot express (a synthesis tool ignores the
// delays and reports the ring as a combinational loop; that loop is the
// oscillator itself and is intended).
//
// How it works: N_STAGES inverting stages form a closed loop, each with a
// transport delay of STAGE_DELAY_PS. The first stage is a NAND of the last
// stage and `enable`, the others are inverters. With `enable` high one
// transition travels round the ring and every stage output toggles with
// period 2 * N_STAGES * STAGE_DELAY_PS, i.e. f = 1/(2 n Td). With `enable`
// low the first stage is forced high and within N_STAGES stage delays the
// ring settles to 1,0,1,...; it restarts from stage 0 when `enable` rises.
// Process, voltage and temperature variation enters only through the
// STAGE_DELAY_PS parameter.
//
// Interface: enable (in), taps[N_STAGES-1:0] (out, the output of every
// stage), clk_out (out, the last stage, used as the clock).
// The odd inverter loop and f = 1/(2 n Td) follow the source design, and so
// do the three stages and the enable reaching the ring in its drawing of
// the gated oscillator. The gating at the first stage only, and the
// default stage delay of 500 ps (a 333 MHz clock with three stages), are
// this model's own choices.
module ring_oscillator #(
  parameter int unsigned N_STAGES       = 3,
  parameter int unsigned STAGE_DELAY_PS = 500
) (
  input  logic                enable,
  output logic [N_STAGES-1:0] taps,
  output logic                clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES-1:0] stage;

  initial begin
    if ((N_STAGES % 2) == 0 || N_STAGES < 3)
      $error("ring_oscillator: N_STAGES must be odd and at least 3");
  end

  // stage 0 is the gating NAND, the others are inverters
  assign #(STAGE_DELAY_PS) stage[0] = ~(stage[N_STAGES-1] & enable);
  for (genvar k = 1; k < N_STAGES; k++) begin : g_inv
    assign #(STAGE_DELAY_PS) stage[k] = ~stage[k-1];
  end

  assign taps    = stage;
  assign clk_out = stage[N_STAGES-1];

endmodule
