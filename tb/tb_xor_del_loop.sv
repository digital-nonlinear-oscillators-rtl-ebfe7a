// tb_xor_del_loop: self-checking test of the XOR/NXOR feedback loop.
//
// Three loops: XOR with two delays (the default), NXOR with two delays, and
// XOR with four delays and different gate and delay times. For each, every
// node transition is checked against its gate equation and delay
// (tb_node_check). The enabling input value (1 for XOR, 0 for NXOR) must
// give a steady oscillation with period 2*(GATE_DELAY + K_DEL*DEL_DELAY);
// the other value must freeze the loop, which then keeps its last output
// for as long as the input stays there (bistable behaviour), and the loop
// must restart when the enabling value returns. The input is switched off
// while the travelling edge is inside the gate: with ideal delays, a loop
// cut off mid-turn keeps a pulse running in its delay chain, which a real
// circuit damps out.
module tb_xor_del_loop;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 400;
  localparam int unsigned G4 = 300, D4 = 250;

  int checks = 0, failures = 0;

  logic       xa, xb, xc;
  logic [2:0] na, nb;
  logic [4:0] nc;
  logic       oa, ob, oc;

  xor_del_loop #(.NXOR(1'b0), .K_DEL(2), .GATE_DELAY_PS(D), .DEL_DELAY_PS(D)) u_a (.x(xa), .nodes(na), .o(oa));
  xor_del_loop #(.NXOR(1'b1), .K_DEL(2), .GATE_DELAY_PS(D), .DEL_DELAY_PS(D)) u_b (.x(xb), .nodes(nb), .o(ob));
  xor_del_loop #(.NXOR(1'b0), .K_DEL(4), .GATE_DELAY_PS(G4), .DEL_DELAY_PS(D4)) u_c (.x(xc), .nodes(nc), .o(oc));

  localparam int NCK = 3 + 3 + 5;
  int nc_checks [NCK];
  int nc_fail   [NCK];
  int nc_tog    [NCK];

  tb_node_check #(.FUNC("XOR2"),  .K(2), .DELAY_PS(D), .NAME("a.gate")) u_ca0 (.in({xa, na[2]}), .out(na[0]),
    .checks(nc_checks[0]), .failures(nc_fail[0]), .toggles(nc_tog[0]));
  tb_node_check #(.FUNC("NXOR2"), .K(2), .DELAY_PS(D), .NAME("b.gate")) u_cb0 (.in({xb, nb[2]}), .out(nb[0]),
    .checks(nc_checks[3]), .failures(nc_fail[3]), .toggles(nc_tog[3]));
  tb_node_check #(.FUNC("XOR2"),  .K(2), .DELAY_PS(G4), .NAME("c.gate")) u_cc0 (.in({xc, nc[4]}), .out(nc[0]),
    .checks(nc_checks[6]), .failures(nc_fail[6]), .toggles(nc_tog[6]));
  for (genvar k = 1; k <= 2; k++) begin : g_ab
    tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(D), .NAME("a.del")) u_ca (.in(na[k-1]), .out(na[k]),
      .checks(nc_checks[k]), .failures(nc_fail[k]), .toggles(nc_tog[k]));
    tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(D), .NAME("b.del")) u_cb (.in(nb[k-1]), .out(nb[k]),
      .checks(nc_checks[3+k]), .failures(nc_fail[3+k]), .toggles(nc_tog[3+k]));
  end
  for (genvar k = 1; k <= 4; k++) begin : g_c
    tb_node_check #(.FUNC("DEL"), .K(1), .DELAY_PS(D4), .NAME("c.del")) u_cc (.in(nc[k-1]), .out(nc[k]),
      .checks(nc_checks[6+k]), .failures(nc_fail[6+k]), .toggles(nc_tog[6+k]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // toggle counters of the loop outputs
  int ta = 0, tbb = 0, tc = 0;
  always @(oa) ta++;
  always @(ob) tbb++;
  always @(oc) tc++;

  task automatic period_a(input int expected);
    time t0;
    @(posedge oa); t0 = $time; @(posedge oa);
    check($time - t0 == time'(expected), "XOR loop period 2*(K+1)*tau");
  endtask
  task automatic period_b(input int expected);
    time t0;
    @(posedge ob); t0 = $time; @(posedge ob);
    check($time - t0 == time'(expected), "NXOR loop period 2*(K+1)*tau");
  endtask
  task automatic period_c(input int expected);
    time t0;
    @(posedge oc); t0 = $time; @(posedge oc);
    check($time - t0 == time'(expected), "XOR loop K=4 period");
  endtask

  initial begin : watchdog
    #(2_000_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic la, lb, lc;
    int   sa, sb, sc;
    // a single edge in each loop: all nodes equal, then enable
    xa = 1'b0; xb = 1'b1; xc = 1'b0;
    force u_a.nodes = 3'b000;
    force u_b.nodes = 3'b000;
    force u_c.nodes = 5'b00000;
    #(2 * D);
    release u_a.nodes;
    release u_b.nodes;
    release u_c.nodes;
    #(4 * D);
    for (int round = 0; round < 4; round++) begin
      // frozen: outputs must not move
      la = oa; lb = ob; lc = oc;
      sa = ta; sb = tbb; sc = tc;
      #(40 * D);
      check(ta == sa && oa == la, "XOR loop holds with x=0");
      check(tbb == sb && ob == lb, "NXOR loop holds with x=1");
      check(tc == sc && oc == lc, "XOR K=4 loop holds with x=0");
      // enabled: steady oscillation
      xa = 1'b1; xb = 1'b0; xc = 1'b1;
      #(10 * D);
      fork
        repeat (3) period_a(2 * 3 * D);
        repeat (3) period_b(2 * 3 * D);
        repeat (3) period_c(2 * (G4 + 4 * D4));
      join
      // stop while the edge is inside the gate: the loop then freezes
      fork
        begin repeat (round + 1) @(oa); #(D / 2);  xa = 1'b0; end
        begin repeat (round + 1) @(ob); #(D / 2);  xb = 1'b1; end
        begin repeat (round + 1) @(oc); #(G4 / 2); xc = 1'b0; end
      join
      #(10 * D);
    end
    for (int k = 0; k < NCK; k++) begin
      checks   += nc_checks[k];
      failures += nc_fail[k];
      check(nc_tog[k] > 10, "every node toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
