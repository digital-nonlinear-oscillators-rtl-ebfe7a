// tb_hp_dno: self-checking test of the high-performance DNO.
//
// Starts the oscillator from defined node states (one edge in the ring, the
// loop and mixer nodes at 0) and lets it run against a 100 MHz sampling
// clock. Checks:
//  - every transition of each of the ten oscillator nodes against its gate
//    equation and delay (ring NOT, mixer XOR3, NXOR/XOR loop gates, DELs),
//    with the equations written independently in tb_node_check;
//  - the sampled bit after each clock edge against the mixer output seen
//    just before the edge;
//  - that each mechanism of the design happens: every node toggles,
//    the XOR loop runs and is frozen through z = 0 spells longer than a
//    loop turn,
//    the NXOR loop does the opposite, and both sampled values occur.
module tb_hp_dno;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 10_000;
  localparam int unsigned DR = 500, DM = 450, DX = 430, DY = 370;
  localparam int NCYC = 3000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst;
  logic z, rnd;
  logic [2:0] ro, xn, yn;

  hp_dno u_dut (.clk(clk), .rst(rst), .z(z), .ro_nodes(ro), .x_nodes(xn), .y_nodes(yn), .rnd_out(rnd));

  always #(T / 2) clk = ~clk;

  localparam int NCK = 10;
  int nc_checks [NCK];
  int nc_fail   [NCK];
  int nc_tog    [NCK];

  for (genvar s = 0; s < 3; s++) begin : g_ro
    tb_node_check #(.FUNC("NOT"), .K(1), .DELAY_PS(DR), .NAME("ring")) u_c (.in(ro[(s+2)%3]), .out(ro[s]),
      .checks(nc_checks[s]), .failures(nc_fail[s]), .toggles(nc_tog[s]));
  end
  tb_node_check #(.FUNC("XOR3"), .K(3), .DELAY_PS(DM), .NAME("ELB4")) u_c4 (.in({yn[2], ro[2], xn[2]}), .out(z),
    .checks(nc_checks[3]), .failures(nc_fail[3]), .toggles(nc_tog[3]));
  tb_node_check #(.FUNC("NXOR2"), .K(2), .DELAY_PS(DY), .NAME("ELB5")) u_c5 (.in({z, yn[2]}), .out(yn[0]),
    .checks(nc_checks[4]), .failures(nc_fail[4]), .toggles(nc_tog[4]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DY), .NAME("ELB6")) u_c6 (.in(yn[0]), .out(yn[1]),
    .checks(nc_checks[5]), .failures(nc_fail[5]), .toggles(nc_tog[5]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DY), .NAME("ELB7")) u_c7 (.in(yn[1]), .out(yn[2]),
    .checks(nc_checks[6]), .failures(nc_fail[6]), .toggles(nc_tog[6]));
  tb_node_check #(.FUNC("XOR2"), .K(2), .DELAY_PS(DX), .NAME("ELB8")) u_c8 (.in({z, xn[2]}), .out(xn[0]),
    .checks(nc_checks[7]), .failures(nc_fail[7]), .toggles(nc_tog[7]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DX), .NAME("ELB9")) u_c9 (.in(xn[0]), .out(xn[1]),
    .checks(nc_checks[8]), .failures(nc_fail[8]), .toggles(nc_tog[8]));
  tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(DX), .NAME("ELB10")) u_c10 (.in(xn[1]), .out(xn[2]),
    .checks(nc_checks[9]), .failures(nc_fail[9]), .toggles(nc_tog[9]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int  x_run = 0, y_run = 0;          // loop-gate toggles (loop running)
  int  x_frozen = 0, y_frozen = 0;    // z spells long enough to freeze a loop
  time z_last = 0;
  always @(xn[0]) x_run++;
  always @(yn[0]) y_run++;
  always @(z) begin
    if ($time - z_last > time'(3 * DX) && z == 1'b1) x_frozen++;  // z was 0 for a full x-loop turn
    if ($time - z_last > time'(3 * DY) && z == 1'b0) y_frozen++;  // z was 1 for a full y-loop turn
    z_last = $time;
  end

  // ---- sampler check ----
  logic z_pre;
  time  z_chg = 0;
  int   ones = 0, zeros = 0;
  always @(z) z_chg = $time;
  always @(negedge clk) begin
    #(T / 2 - 1);
    z_pre = z;
  end
  always @(posedge clk) begin
    if (!rst && z_chg != $time) begin
      #1;
      check(rnd == z_pre, "ELB11 samples the mixer output");
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
    force u_dut.ro_nodes = 3'b001;
    force u_dut.x_nodes  = 3'b000;
    force u_dut.y_nodes  = 3'b000;
    force u_dut.z        = 1'b0;
    #(2 * DR);
    release u_dut.ro_nodes;
    release u_dut.x_nodes;
    release u_dut.y_nodes;
    release u_dut.z;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (NCYC) @(posedge clk);
    #(T / 2);
    for (int k = 0; k < NCK; k++) begin
      checks   += nc_checks[k];
      failures += nc_fail[k];
      check(nc_tog[k] > 10, "every node toggles");
    end
    $display("mechanisms: x-loop toggles %0d, y-loop toggles %0d, x-loop freezes %0d, y-loop freezes %0d, ones %0d, zeros %0d",
             x_run, y_run, x_frozen, y_frozen, ones, zeros);
    check(x_run > 0,        "XOR loop runs");
    check(y_run > 0,        "NXOR loop runs");
    check(x_frozen > 0,     "XOR loop frozen by z = 0");
    check(y_frozen > 0,     "NXOR loop frozen by z = 1");
    check(ones > 0 && zeros > 0, "both bit values sampled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
