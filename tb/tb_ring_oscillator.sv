// tb_ring_oscillator: self-checking test of the ring-oscillator model.
// Two instances (3 stages at 500 ps, 5 stages at 200 ps) are stopped,
// started and stopped again. While stopped every stage must hold the
// settled pattern 1,0,1,...; while running the period of the output and of
// every stage, measured between rising edges, must be 2*n*Td, and each
// stage must lag the one before it by Td.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic en;
  logic [2:0] taps3;
  logic [4:0] taps5;
  logic       clk3, clk5;

  ring_oscillator #(.N_STAGES(3), .STAGE_DELAY_PS(500)) dut3 (.enable(en), .taps(taps3), .clk_out(clk3));
  ring_oscillator #(.N_STAGES(5), .STAGE_DELAY_PS(200)) dut5 (.enable(en), .taps(taps5), .clk_out(clk5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure the rising-edge period of one bit of a signal.
  task automatic period_of(ref logic sig, output longint per);
    time t0;
    @(posedge sig); t0 = $time;
    @(posedge sig); per = longint'($time - t0);
  endtask

  initial begin : watchdog
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges3;
  always @(posedge clk3) edges3++;

  initial begin : main
    longint per;
    time ta, tb;
    en = 1'b0;
    #(5000);
    check(taps3 == 3'b101, "3-stage stopped pattern");
    check(taps5 == 5'b10101, "5-stage stopped pattern");
    edges3 = 0;
    #(5000);
    check(edges3 == 0, "no edges while disabled");

    en = 1'b1;
    for (int k = 0; k < 4; k++) begin
      period_of(clk3, per);
      check(per == 3000, $sformatf("3-stage period %0d ps, expected 3000", per));
    end
    for (int k = 0; k < 4; k++) begin
      period_of(clk5, per);
      check(per == 2000, $sformatf("5-stage period %0d ps, expected 2000", per));
    end
    // stage-to-stage lag and per-stage period in the 3-stage ring
    @(posedge taps3[0]); ta = $time;
    @(negedge taps3[1]); tb = $time;
    check(tb - ta == 500, $sformatf("stage lag %0t, expected 500 ps", tb - ta));
    for (int s = 0; s < 3; s++) begin
      time t0;
      wait (taps3[s] == 1'b0);
      @(posedge taps3[s]); t0 = $time;
      @(posedge taps3[s]);
      check($time - t0 == 3000, $sformatf("stage %0d period", s));
    end
    // over 300 ns at 3 ns per cycle: 100 rising edges (+-1)
    edges3 = 0;
    #(300_000);
    check(edges3 >= 99 && edges3 <= 101, $sformatf("edge count %0d in 300 ns", edges3));

    en = 1'b0;
    #(2000);
    edges3 = 0;
    #(20_000);
    check(edges3 == 0, "stops after disable");
    check(taps3 == 3'b101, "settles after disable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
