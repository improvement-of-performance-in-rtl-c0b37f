// tb_gated_ro_counter: self-checking test of the gated-oscillator counters.
// The testbench drives the stage outputs itself, with a different random
// number of rising edges on every stage in each enabled window, and checks
// that the live sum equals the number of edges given, that the register
// captures that sum when enable falls, and that the counters restart from
// zero in the next window. A 3-stage and a 5-stage instance are used.
module tb_gated_ro_counter;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic       rst_n, en;
  logic [2:0] taps3;
  logic [4:0] taps5;
  logic [9:0] count3, out3;
  logic [10:0] count5, out5;

  gated_ro_counter #(.N_STAGES(3)) dut3 (
    .rst_n(rst_n), .enable(en), .taps(taps3), .count(count3), .out(out3));
  gated_ro_counter #(.N_STAGES(5)) dut5 (
    .rst_n(rst_n), .enable(en), .taps(taps5), .count(count5), .out(out5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n3 [3];
    int n5 [5];
    int sum3, sum5;
    rst_n = 1'b1; en = 1'b1; taps3 = '0; taps5 = '0;
    #(100);
    rst_n = 1'b0; en = 1'b0;
    #(1000);
    check(out3 == 0 && out5 == 0, "output register reset");
    check(count3 == 0 && count5 == 0, "counters cleared while disabled");
    rst_n = 1'b1;
    // pulses while disabled must not count
    repeat (5) begin taps3 = '1; taps5 = '1; #(100); taps3 = '0; taps5 = '0; #(100); end
    check(count3 == 0 && count5 == 0, "no counting while disabled");

    for (int w = 0; w < 12; w++) begin
      sum3 = 0; sum5 = 0;
      foreach (n3[i]) begin n3[i] = $urandom_range(0, 60); sum3 += n3[i]; end
      foreach (n5[i]) begin n5[i] = $urandom_range(0, 60); sum5 += n5[i]; end
      if (w == 11) begin  // one window that makes an 8-bit counter wrap
        n3[0] = 300; sum3 = 300 + n3[1] + n3[2];
      end
      #(500);
      en = 1'b1;
      #(500);
      for (int k = 0; k < 300; k++) begin
        for (int i = 0; i < 3; i++) taps3[i] = (k < n3[i]);
        for (int i = 0; i < 5; i++) taps5[i] = (k < n5[i]);
        #(100);
        taps3 = '0; taps5 = '0;
        #(100);
      end
      if (w == 11) sum3 = (300 % 256) + n3[1] + n3[2];
      check(int'(count3) == sum3, $sformatf("window %0d live sum3 %0d expected %0d", w, count3, sum3));
      check(int'(count5) == sum5, $sformatf("window %0d live sum5 %0d expected %0d", w, count5, sum5));
      en = 1'b0;
      #(10);
      check(int'(out3) == sum3, $sformatf("window %0d out3 %0d expected %0d", w, out3, sum3));
      check(int'(out5) == sum5, $sformatf("window %0d out5 %0d expected %0d", w, out5, sum5));
      check(count3 == 0 && count5 == 0, "counters cleared after window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
