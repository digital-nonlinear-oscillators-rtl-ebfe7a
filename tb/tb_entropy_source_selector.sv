// tb_entropy_source_selector: self-checking test of the entropy selector.
//
// Four stimulus sources with very different entropy: a constant, a fair
// random stream, a short repeating pattern and a biased random stream
// (P(1) = 7/8). The testbench records every bit the selector reports as
// counted, builds its own word histogram, and checks for each source:
//  - the reported score against the sum of c*log2(c) computed here with
//    the same fixed-point Mitchell logarithm (integer part from the leading
//    one, fraction from the bits below it, truncated);
//  - the chosen source against the one with the highest exact Shannon
//    entropy (computed with real arithmetic);
//  - done after exactly 2**SYM_BITS + NSRC*(NSYM*SYM_BITS + 2**SYM_BITS + 1)
//    cycles, and rnd_out = src[sel].
// It runs two comparisons with the sources in different positions.
module tb_entropy_source_selector;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NSRC = 4, SB = 4, NBITS = 2000, LF = 8;
  localparam int NSYM = NBITS / SB;
  localparam int NW = 2 ** SB;
  localparam int LAT = NW + NSRC * (NSYM * SB + NW + 1);
  localparam int T = 10_000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst, start;
  logic [NSRC-1:0] src;
  logic busy, done, rnd, mv, sv;
  logic [1:0] sel, ms;
  logic [63:0] score;
  logic [31:0] score_w;

  entropy_source_selector #(.NSRC(NSRC), .SYM_BITS(SB), .NBITS(NBITS), .LOG_FRAC(LF)) u_dut (
    .clk(clk), .rst(rst), .start(start), .src(src), .busy(busy), .done(done), .sel(sel),
    .rnd_out(rnd), .meas_valid(mv), .meas_src(ms), .score_valid(sv), .score(score_w)
  );
  assign score = 64'(score_w);

  always #(T / 2) clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- stimulus: kind k of source position p ----
  int kind [NSRC];
  int phase = 0;
  always @(negedge clk) begin
    phase++;
    for (int p = 0; p < NSRC; p++) begin
      case (kind[p])
        0: src[p] <= 1'b0;
        1: src[p] <= 1'($urandom);
        2: src[p] <= 1'((phase / 2) % 2);
        default: src[p] <= ($urandom_range(7, 0) != 0);
      endcase
    end
  end

  // ---- reference ----
  int hist [NSRC][NW];
  int wbits, wcnt [NSRC];
  int word;
  int nsv;

  function automatic longint mitchell_clogc(input int c);
    int p;
    longint frac;
    if (c == 0) return 0;
    p = 0;
    while ((c >> (p + 1)) != 0) p++;
    frac = (longint'(c - (1 << p)) << LF) >> p;
    return longint'(c) * ((longint'(p) << LF) + frac);
  endfunction

  function automatic real shannon(input int s);
    real h = 0.0, q;
    for (int w = 0; w < NW; w++) begin
      if (hist[s][w] > 0) begin
        q = real'(hist[s][w]) / real'(NSYM);
        h -= q * $ln(q) / $ln(2.0);
      end
    end
    return h;
  endfunction

  always @(posedge clk) begin
    if (mv) begin
      word = word | (int'(src[ms]) << wbits);
      wbits++;
      if (wbits == SB) begin
        hist[ms][word]++;
        wcnt[ms]++;
        word  = 0;
        wbits = 0;
      end
    end
    if (sv) begin
      longint ref_s;
      ref_s = 0;
      for (int w = 0; w < NW; w++) ref_s += mitchell_clogc(hist[ms][w]);
      check(score == 64'(ref_s), $sformatf("score of source %0d: %0d, reference %0d", ms, score, ref_s));
      check(wcnt[ms] == NSYM, "NSYM words counted");
      nsv++;
    end
  end

  initial begin : watchdog
    #(time'(T) * (3 * LAT + 500));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int k0, input int k1, input int k2, input int k3);
    int cyc;
    int best;
    real hb, h;
    kind[0] = k0; kind[1] = k1; kind[2] = k2; kind[3] = k3;
    for (int s = 0; s < NSRC; s++) begin
      wcnt[s] = 0;
      for (int w = 0; w < NW; w++) hist[s][w] = 0;
    end
    word = 0; wbits = 0; nsv = 0;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);                       // start is seen on this edge
    #1 start = 1'b0;
    cyc = 0;
    check(busy, "busy after start");
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == LAT, $sformatf("comparison takes %0d cycles (got %0d)", LAT, cyc));
    check(nsv == NSRC, "one score per source");
    best = 0; hb = -1.0;
    for (int s = 0; s < NSRC; s++) begin
      h = shannon(s);
      $display("source %0d kind %0d: entropy %f bit/word", s, kind[s], h);
      if (h > hb + 1e-9) begin hb = h; best = s; end
    end
    check(int'(sel) == best, $sformatf("selected %0d, highest entropy %0d", sel, best));
    @(posedge clk);
    check(!busy, "idle after done");
    repeat (20) begin
      @(negedge clk);
      #1 check(rnd == src[sel], "rnd_out forwards the selected source");
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    kind[0] = 0; kind[1] = 0; kind[2] = 0; kind[3] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(0, 1, 2, 3);
    run(3, 2, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
