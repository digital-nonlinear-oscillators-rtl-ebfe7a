// tb_ring_oscillator: self-checking test of the inverter ring.
//
// Runs a 3-node ring (the default) and a 5-node ring with other delays.
// Every transition of every node is checked against the inverter equation
// with the node delay (tb_node_check), and after the start-up transient the
// period of the output is checked, from a forced start state with one
// circulating edge (with exactly equal delays a random start state can keep
// several edges running, a harmonic mode real rings leave quickly), to be 2*N*DELAY_PS, the ring oscillator
// frequency law f = 1/(2*N*tau), with a high time of N*DELAY_PS.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N3 = 3, D3 = 500;
  localparam int unsigned N5 = 5, D5 = 320;

  int checks = 0, failures = 0;

  logic [N3-1:0] n3;
  logic [N5-1:0] n5;
  logic          o3, o5;

  ring_oscillator u_r3 (.nodes(n3), .o(o3));
  ring_oscillator #(.N(N5), .DELAY_PS(D5)) u_r5 (.nodes(n5), .o(o5));

  int nc_checks [N3+N5];
  int nc_fail   [N3+N5];
  int nc_tog    [N3+N5];

  for (genvar s = 0; s < N3; s++) begin : g_c3
    tb_node_check #(.FUNC("NOT"), .K(1), .DELAY_PS(D3), .NAME("ring3")) u_c (
      .in(n3[(s+N3-1)%N3]), .out(n3[s]), .checks(nc_checks[s]), .failures(nc_fail[s]), .toggles(nc_tog[s]));
  end
  for (genvar s = 0; s < N5; s++) begin : g_c5
    tb_node_check #(.FUNC("NOT"), .K(1), .DELAY_PS(D5), .NAME("ring5")) u_c (
      .in(n5[(s+N5-1)%N5]), .out(n5[s]), .checks(nc_checks[N3+s]), .failures(nc_fail[N3+s]),
      .toggles(nc_tog[N3+s]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic measure(input int n, input int d, input string what);
    time t_rise, t_fall, t_next;
    for (int p = 0; p < 8; p++) begin
      if (n == N3) @(posedge o3); else @(posedge o5);
      t_rise = $time;
      if (n == N3) @(negedge o3); else @(negedge o5);
      t_fall = $time;
      if (n == N3) @(posedge o3); else @(posedge o5);
      t_next = $time;
      check(t_next - t_rise == time'(2 * n * d), {what, " period 2*N*tau"});
      check(t_fall - t_rise == time'(n * d), {what, " high time N*tau"});
    end
  endtask

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // start from a single circulating edge, as a real ring settles to
    force u_r3.nodes = 3'b001;
    force u_r5.nodes = 5'b01010;
    #(2 * D3);
    release u_r3.nodes;
    release u_r5.nodes;
    #(20 * 2 * N3 * D3);                      // start-up transient
    fork
      measure(N3, D3, "ring3");
      measure(N5, D5, "ring5");
    join
    #(4 * 2 * N3 * D3);
    for (int k = 0; k < N3 + N5; k++) begin
      checks   += nc_checks[k];
      failures += nc_fail[k];
      check(nc_tog[k] > 10, "every node toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
