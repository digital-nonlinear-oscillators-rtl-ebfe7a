// tb_sync_interface: self-checking test of the sampling flip-flop.
//
// Drives a random input that changes between clock edges, and checks after
// every rising edge that the output holds the value the input had at that
// edge, that a reset pulse clears the output only at a clock edge
// (synchronous reset), and that the output stays still between edges.
module tb_sync_interface;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 10_000;   // 100 MHz sampling clock

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst, din, q;
  logic q1;

  sync_interface #(.INIT(1'b1)) u_dut (.analog_in(din), .clk(clk), .rst(rst), .rnd_out(q));

  always #(T / 2) clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #(T * 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    rst = 1'b0;
    din = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      // new input a random time after the falling edge
      #($urandom_range(T / 2 - 100, 1));
      din = 1'($urandom);
      rst = ($urandom_range(15, 0) == 0);
      exp_q = rst ? 1'b0 : din;
      @(posedge clk);
      #1;
      check(q == exp_q, rst ? "synchronous reset clears" : "samples input at edge");
      q1 = q;
      din = ~din;           // input and reset move between edges
      rst = ~rst;
      #(T / 2 - 10);
      check(q == q1, "output still between edges");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
