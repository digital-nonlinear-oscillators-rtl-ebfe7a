// tb_single_lut_oscillator: self-checking test of the one-LUT oscillator.
//
// With en = 1 the output must oscillate with period
// 2*(LUT_DELAY_PS + ROUTE_STAGES*ROUTE_DELAY_PS), i.e. 1 ns (1 GHz) with the
// defaults and 1.6 ns for a second instance with longer routing; with en = 0
// it must hold its last value, and it must restart when en returns to 1.
module tb_single_lut_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic en;
  logic o1, o2;

  single_lut_oscillator u_1 (.en(en), .o(o1));
  single_lut_oscillator #(.LUT_DELAY_PS(200), .ROUTE_STAGES(3), .ROUTE_DELAY_PS(200)) u_2 (.en(en), .o(o2));

  int t1 = 0, t2 = 0;
  always @(o1) t1++;
  always @(o2) t2++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic period1(input int expected);
    time t0;
    @(posedge o1); t0 = $time; @(posedge o1);
    check($time - t0 == time'(expected), "one-LUT loop period, default");
  endtask
  task automatic period2(input int expected);
    time t0;
    @(posedge o2); t0 = $time; @(posedge o2);
    check($time - t0 == time'(expected), "one-LUT loop period, longer routing");
  endtask

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic l1, l2;
    int   s1, s2;
    en = 1'b0;
    force u_1.o = 1'b0;
    force u_2.o = 1'b0;
    #2000;
    release u_1.o;
    release u_2.o;
    #2000;
    for (int round = 0; round < 6; round++) begin
      l1 = o1; l2 = o2; s1 = t1; s2 = t2;
      #20000;
      check(t1 == s1 && o1 == l1, "holds with en=0 (default)");
      check(t2 == s2 && o2 == l2, "holds with en=0 (longer routing)");
      en = 1'b1;
      #5000;
      fork
        repeat (4) period1(2 * (100 + 2 * 200));
        repeat (4) period2(2 * (200 + 3 * 200));
      join
      #(137 * (round + 1));
      en = 1'b0;
      #5000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
