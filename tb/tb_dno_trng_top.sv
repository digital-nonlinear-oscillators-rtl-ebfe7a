// tb_dno_trng_top: end-to-end test of the DNO random bit generator.
//
// Starts every oscillator from defined node states, runs the sources
// against a 100 MHz clock and asks the selector for a comparison (twice).
// The testbench records every bit reported as counted, rebuilds the word
// histograms, computes each source's score with its own fixed-point
// Mitchell c*log2(c) and checks that the selector picks the source with
// the smallest score (highest entropy), that the comparison takes exactly
// 2**SYM_BITS + 4*(NSYM*SYM_BITS + 2**SYM_BITS + 1) cycles, and that
// rnd_out then forwards the chosen source. It also counts the mechanisms
// of the design and fails if one never happened: the two loops of each
// high-performance DNO running and frozen, the self-oscillation of ELB#7 in
// the seven-node DNO, the single-LUT oscillator toggling, every source
// measured, and both bit values in every source.
//
// SYM_BITS and NBITS are reduced here to keep the run short; the
// module tb_dno_trng_top_full runs the same flow at the full size.
module tb_dno_trng_top #(
  parameter int SB    = 4,
  parameter int NBITS = 4000,
  parameter int RUNS  = 2
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NSRC = 4;
  localparam int LF   = 8;
  localparam int NSYM = NBITS / SB;
  localparam int NW   = 2 ** SB;
  localparam int LAT  = NW + NSRC * (NSYM * SB + NW + 1);
  localparam int T    = 10_000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst, start;
  logic [3:0] sb;
  logic busy, done, rnd, mv;
  logic [1:0] sel, ms;

  dno_trng_top #(.SYM_BITS(SB), .NBITS(NBITS)) u_top (
    .clk(clk), .rst(rst), .start(start), .src_bits(sb), .busy(busy), .done(done), .sel(sel),
    .rnd_out(rnd), .meas_valid(mv), .meas_src(ms)
  );

  always #(T / 2) clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int hp0_x = 0, hp0_y = 0, hp1_x = 0, hp1_y = 0;
  int hp0_xfrz = 0, hp0_yfrz = 0, hp1_xfrz = 0, hp1_yfrz = 0;
  int c7_self = 0, sl_tog = 0;
  int measured [NSRC];
  int ones [NSRC], zeros [NSRC];
  time z0_last = 0, z1_last = 0;

  always @(u_top.u_hp0.x_nodes[0]) hp0_x++;
  always @(u_top.u_hp0.y_nodes[0]) hp0_y++;
  always @(u_top.u_hp1.x_nodes[0]) hp1_x++;
  always @(u_top.u_hp1.y_nodes[0]) hp1_y++;
  always @(u_top.u_hp0.z) begin
    if ($time - z0_last > 3 * 430 && u_top.u_hp0.z)  hp0_xfrz++;
    if ($time - z0_last > 3 * 370 && !u_top.u_hp0.z) hp0_yfrz++;
    z0_last = $time;
  end
  always @(u_top.u_hp1.z) begin
    if ($time - z1_last > 3 * 470 && u_top.u_hp1.z)  hp1_xfrz++;
    if ($time - z1_last > 3 * 390 && !u_top.u_hp1.z) hp1_yfrz++;
    z1_last = $time;
  end
  always @(u_top.u_c7.nodes[6]) if (u_top.u_c7.nodes[5]) c7_self++;
  always @(u_top.sl_osc) sl_tog++;

  // ---- reference ----
  int hist [NSRC][NW];
  int wbits = 0, word = 0;

  function automatic longint mitchell_clogc(input int c);
    int p;
    longint frac;
    if (c == 0) return 0;
    p = 0;
    while ((c >> (p + 1)) != 0) p++;
    frac = (longint'(c - (1 << p)) << LF) >> p;
    return longint'(c) * ((longint'(p) << LF) + frac);
  endfunction

  always @(posedge clk) begin
    if (mv) begin
      measured[ms]++;
      if (sb[ms]) ones[ms]++; else zeros[ms]++;
      word = word | (int'(sb[ms]) << wbits);
      wbits++;
      if (wbits == SB) begin
        hist[ms][word]++;
        word  = 0;
        wbits = 0;
      end
    end
  end

  initial begin : watchdog
    #(time'(T) * (RUNS * (LAT + 100) + 1000));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int     cyc, best;
    longint sc, best_sc;
    for (int s = 0; s < NSRC; s++) begin
      measured[s] = 0; ones[s] = 0; zeros[s] = 0;
    end
    rst = 1'b1; start = 1'b0;
    // defined start states: one edge in each ring, other nodes low
    force u_top.u_hp0.ro_nodes = 3'b001;
    force u_top.u_hp0.x_nodes  = 3'b000;
    force u_top.u_hp0.y_nodes  = 3'b000;
    force u_top.u_hp1.ro_nodes = 3'b001;
    force u_top.u_hp1.x_nodes  = 3'b000;
    force u_top.u_hp1.y_nodes  = 3'b000;
    force u_top.u_c7.nodes     = 7'b0000001;
    force u_top.sl_osc         = 1'b0;
    #(1000);
    release u_top.u_hp0.ro_nodes;
    release u_top.u_hp0.x_nodes;
    release u_top.u_hp0.y_nodes;
    release u_top.u_hp1.ro_nodes;
    release u_top.u_hp1.x_nodes;
    release u_top.u_hp1.y_nodes;
    release u_top.u_c7.nodes;
    release u_top.sl_osc;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20) @(posedge clk);
    for (int r = 0; r < RUNS; r++) begin
      for (int s = 0; s < NSRC; s++)
        for (int w = 0; w < NW; w++) hist[s][w] = 0;
      word = 0; wbits = 0;
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cyc = 0;
      while (!done && cyc < LAT + 10) begin
        @(posedge clk);
        #1 cyc++;
      end
      check(done, "comparison finishes");
      check(cyc == LAT, $sformatf("comparison takes %0d cycles (got %0d)", LAT, cyc));
      best = 0; best_sc = 0;
      for (int s = 0; s < NSRC; s++) begin
        sc = 0;
        for (int w = 0; w < NW; w++) sc += mitchell_clogc(hist[s][w]);
        $display("run %0d source %0d: score %0d", r, s, sc);
        if (s == 0 || sc < best_sc) begin best_sc = sc; best = s; end
      end
      check(int'(sel) == best, $sformatf("selected source %0d, expected %0d", sel, best));
      repeat (50) begin
        @(negedge clk);
        check(rnd == sb[sel], "rnd_out forwards the selected source");
      end
    end
    $display("mechanisms: hp0 x/y runs %0d/%0d freezes %0d/%0d, hp1 x/y runs %0d/%0d freezes %0d/%0d, c7 self-osc %0d, 1-LUT toggles %0d",
             hp0_x, hp0_y, hp0_xfrz, hp0_yfrz, hp1_x, hp1_y, hp1_xfrz, hp1_yfrz, c7_self, sl_tog);
    check(hp0_x > 0 && hp0_y > 0 && hp1_x > 0 && hp1_y > 0, "both loops of both DNOs run");
    check(hp0_xfrz > 0 && hp0_yfrz > 0 && hp1_xfrz > 0 && hp1_yfrz > 0, "both loops of both DNOs freeze");
    check(c7_self > 0, "ELB#7 self-oscillation");
    check(sl_tog > 0, "single-LUT oscillator runs");
    for (int s = 0; s < NSRC; s++) begin
      $display("source %0d: %0d bits measured, %0d ones, %0d zeros", s, measured[s], ones[s], zeros[s]);
      check(measured[s] == RUNS * NSYM * SB, "every source measured in full");
      check(ones[s] > 0 && zeros[s] > 0, "both bit values in every source");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
