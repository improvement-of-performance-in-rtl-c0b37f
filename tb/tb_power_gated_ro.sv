// tb_power_gated_ro: self-checking test of the power-gated ring oscillator
// at its defaults (3 stages of 500 ps). It opens enable windows of random
// length and checks the captured count against the count worked out from
// the ring's timing alone: started from rest, one stage rises every
// 2*Td = 1000 ps, first at 1000 ps, so a window of 1000*m + 500 ps holds
// m rising edges. It also checks the 3 ns clock period while enabled, that
// the clock stops while disabled, and that the live count clears.
module tb_power_gated_ro;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic       rst_n, enable, clk_out;
  logic [9:0] count, out;

  power_gated_ro dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clk_edges;
  always @(posedge clk_out) clk_edges++;

  initial begin : main
    int m;
    time t0;
    rst_n = 1'b1; enable = 1'b1;
    #(100);
    rst_n = 1'b0; enable = 1'b0;
    #(10_000);
    check(out == 0 && count == 0, "reset");
    rst_n = 1'b1;
    for (int w = 0; w < 20; w++) begin
      m = (w == 0) ? 0 : (w == 1) ? 1 : $urandom_range(2, 600);
      enable = 1'b1;
      #(1000 * m + 500);
      enable = 1'b0;
      #(1);
      check(int'(out) == m, $sformatf("window of %0d ps: out %0d, expected %0d", 1000 * m + 500, out, m));
      check(count == 0, "counters clear when disabled");
      #(5000);
      clk_edges = 0;
      #(20_000);
      check(clk_edges == 0, "clock stopped while disabled");
    end
    // clock period while enabled
    enable = 1'b1;
    @(posedge clk_out); t0 = $time;
    repeat (10) @(posedge clk_out);
    check($time - t0 == 30_000, $sformatf("10 periods took %0t, expected 30 ns", $time - t0));
    enable = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
