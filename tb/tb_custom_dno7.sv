// tb_custom_dno7: self-checking test of the seven-node custom DNO.
//
// Starts from the ring holding one edge and ELB#4-7 at 0, then runs against
// a 100 MHz sampling clock. Checks every transition of the seven nodes
// against its gate equation and delay (tb_node_check), the sampled bit
// after each clock edge against ELB#4 just before the edge, and that the
// mechanisms described for this topology happen: a ring edge travels
// through ELB#4-6, ELB#7 runs by itself while ELB#6 is 1 and holds while it
// is 0, and its output comes back into ELB#4.
module tb_custom_dno7;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 10_000;
  localparam int unsigned DR = 500, DXR = 450, DD = 400;
  localparam int NCYC = 3000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst;
  logic [6:0] e;
  logic rnd;

  custom_dno7 u_dut (.clk(clk), .rst(rst), .nodes(e), .rnd_out(rnd));

  always #(T / 2) clk = ~clk;

  int nc_checks [7];
  int nc_fail   [7];
  int nc_tog    [7];

  for (genvar s = 0; s < 3; s++) begin : g_ro
    tb_node_check #(.FUNC("NOT"), .K(1), .DELAY_PS(DR), .NAME("ring")) u_c (.in(e[(s+2)%3]), .out(e[s]),
      .checks(nc_checks[s]), .failures(nc_fail[s]), .toggles(nc_tog[s]));
  end
  tb_node_check #(.FUNC("XOR2"), .K(2), .DELAY_PS(DXR), .NAME("ELB4")) u_c4 (.in({e[6], e[2]}), .out(e[3]),
    .checks(nc_checks[3]), .failures(nc_fail[3]), .toggles(nc_tog[3]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DD), .NAME("ELB5")) u_c5 (.in(e[3]), .out(e[4]),
    .checks(nc_checks[4]), .failures(nc_fail[4]), .toggles(nc_tog[4]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DD), .NAME("ELB6")) u_c6 (.in(e[4]), .out(e[5]),
    .checks(nc_checks[5]), .failures(nc_fail[5]), .toggles(nc_tog[5]));
  tb_node_check #(.FUNC("XOR2"), .K(2), .DELAY_PS(DXR), .NAME("ELB7")) u_c7 (.in({e[5], e[6]}), .out(e[6]),
    .checks(nc_checks[6]), .failures(nc_fail[6]), .toggles(nc_tog[6]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int  self_osc = 0;     // ELB#7 toggles while ELB#6 is 1
  int  e7_hold = 0;      // ELB#6 low spells in which ELB#7 stayed still
  int  e7_into_4 = 0;    // ELB#4 toggles DXR after an ELB#7 toggle
  int  e7_tog_in_spell = 0;
  time e7_last = 0, e7_prev = 0;
  always @(e[6]) begin
    if (e[5]) self_osc++;
    else      e7_tog_in_spell++;
    e7_prev = e7_last;
    e7_last = $time;
  end
  // an ELB#4 transition that no ring edge DXR earlier explains comes from ELB#7
  time phi_last = 0, phi_prev = 0;
  always @(e[2]) begin
    phi_prev = phi_last;
    phi_last = $time;
  end
  always @(e[3]) begin
    if ($time - phi_last != time'(DXR) && $time - phi_prev != time'(DXR)) e7_into_4++;
  end
  always @(negedge e[5]) e7_tog_in_spell = 0;
  always @(posedge e[5]) if (e7_tog_in_spell == 0) e7_hold++;

  // ---- sampler check ----
  logic n_pre;
  time  n_chg = 0;
  int   ones = 0, zeros = 0;
  always @(e[3]) n_chg = $time;
  always @(negedge clk) begin
    #(T / 2 - 1);
    n_pre = e[3];
  end
  always @(posedge clk) begin
    if (!rst && n_chg != $time) begin
      #1;
      check(rnd == n_pre, "ELB8 samples ELB4");
      if (rnd) ones++; else zeros++;
    end
  end

  initial begin : watchdog
    #(time'(T) * (NCYC + 200));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    force u_dut.nodes = 7'b0000001;
    #(2 * DR);
    release u_dut.nodes;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (NCYC) @(posedge clk);
    #(T / 2);
    for (int k = 0; k < 7; k++) begin
      checks   += nc_checks[k];
      failures += nc_fail[k];
      check(nc_tog[k] > 10, "every node toggles");
    end
    $display("mechanisms: ELB7 self-oscillation toggles %0d, ELB7 holds %0d, ELB7->ELB4 %0d, ones %0d, zeros %0d",
             self_osc, e7_hold, e7_into_4, ones, zeros);
    check(self_osc > 0,  "ELB7 oscillates while ELB6 = 1");
    check(e7_hold > 0,   "ELB7 holds while ELB6 = 0");
    check(e7_into_4 > 0, "ELB7 feeds back into ELB4");
    check(ones > 0 && zeros > 0, "both bit values sampled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
