// entropy_source_selector: picks, out of NSRC sampled random bit streams,
// the one with the highest estimated Shannon entropy and forwards it.
//
// Method. The sources are measured one after another with a single
// histogram memory, which keeps the logic small. For source s the selector
// takes NBITS consecutive bits, groups them into NSYM = NBITS/SYM_BITS words
// of SYM_BITS bits (first bit in the least significant position) and counts
// how often each of the 2**SYM_BITS words occurs. The average Shannon
// entropy of the source is then
//   ASE = (log2(NSYM) - (1/NSYM) * sum_w c_w*log2(c_w)) / SYM_BITS,
// so with NSYM the same for every source the highest entropy belongs to the
// smallest score S = sum_w c_w*log2(c_w). S is computed while the histogram
// is swept (and cleared) after the count, with log2 in fixed point with
// LOG_FRAC fraction bits by Mitchell's rule: for c with leading one at bit
// p, log2(c) ~ p + (c - 2**p)/2**p. The source with the strictly smallest S
// wins; on a tie the lower index is kept.
//
// The goal (choose the most entropic of a set of sources, cheaply enough for
// a small PLD) is the published one; the histogram, the Mitchell logarithm
// and the sequential schedule are this design's own.
//
// Timing, counted from the cycle after start is seen in IDLE:
//   2**SYM_BITS cycles clearing the histogram, then for each source
//   NSYM*SYM_BITS cycles counting (meas_valid = 1, meas_src = s, the bit of
//   src[s] present in that cycle is the one counted), 2**SYM_BITS cycles
//   summing (score_valid pulses with the score of meas_src on the last of
//   them) and 1 cycle deciding; done pulses in the cycle after the last
//   decision, i.e. 2**SYM_BITS + NSRC*(NSYM*SYM_BITS + 2**SYM_BITS + 1)
//   cycles after start. sel keeps its value until the next comparison
//   ends; rnd_out = src[sel] at all times. rst is synchronous.
module entropy_source_selector #(
  parameter int unsigned NSRC     = 4,
  parameter int unsigned SYM_BITS = 10,
  parameter int unsigned NBITS    = 1_000_000,
  parameter int unsigned LOG_FRAC = 8,
  localparam int unsigned SELW    = (NSRC > 1) ? $clog2(NSRC) : 1,
  localparam int unsigned NSYM    = NBITS / SYM_BITS,
  localparam int unsigned CW      = $clog2(NSYM + 1),
  localparam int unsigned ACC_W   = CW + $clog2(CW + 1) + LOG_FRAC + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [NSRC-1:0]   src,
  output logic              busy,
  output logic              done,
  output logic [SELW-1:0]   sel,
  output logic              rnd_out,
  output logic              meas_valid,
  output logic [SELW-1:0]   meas_src,
  output logic              score_valid,
  output logic [ACC_W-1:0]  score
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NWORDS = 2 ** SYM_BITS;
  localparam int unsigned LW     = $clog2(CW) + LOG_FRAC; // width of fixed-point log2

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_COLLECT, S_SUM, S_DECIDE} state_t;

  state_t                  state;
  logic [CW-1:0]           hist [NWORDS];
  logic [SYM_BITS-1:0]     addr;          // sweep address in S_CLEAR and S_SUM
  logic [SYM_BITS-1:0]     shreg;         // word being assembled
  logic [$clog2(SYM_BITS+1)-1:0] bitcnt;
  logic [CW-1:0]           symcnt;
  logic [SELW-1:0]         cur;
  logic [ACC_W-1:0]        acc;
  logic [ACC_W-1:0]        best;
  logic                    have_best;

  // ---------------------------------------------------------------------
  // c * log2(c) in fixed point, Mitchell approximation of the logarithm
  // ---------------------------------------------------------------------
  function automatic logic [ACC_W-1:0] clogc(input logic [CW-1:0] c);
    logic [LW-1:0]        lg;
    logic [CW+LOG_FRAC-1:0] mant;
    int unsigned          p;
    p = 0;
    for (int b = 0; b < int'(CW); b++) if (c[b]) p = b;
    // fraction: bits of c below its leading one, aligned to LOG_FRAC bits
    mant = ({{LOG_FRAC{1'b0}}, c} << LOG_FRAC) >> p;
    lg   = LW'(p) << LOG_FRAC | LW'(mant[LOG_FRAC-1:0]);
    return ACC_W'(c) * ACC_W'(lg);
  endfunction

  logic                in_bit;
  logic [SYM_BITS-1:0] word;

  assign in_bit = src[cur];
  assign word   = {in_bit, shreg[SYM_BITS-1:1]};

  always_ff @(posedge clk) begin
    done        <= 1'b0;
    score_valid <= 1'b0;
    if (rst) begin
      state     <= S_IDLE;
      addr      <= '0;
      shreg     <= '0;
      bitcnt    <= '0;
      symcnt    <= '0;
      cur       <= '0;
      acc       <= '0;
      best      <= '0;
      have_best <= 1'b0;
      sel       <= '0;
      score     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_CLEAR;
          addr      <= '0;
          cur       <= '0;
          have_best <= 1'b0;
        end
        S_CLEAR: begin
          hist[addr] <= '0;
          addr       <= addr + 1'b1;
          if (addr == SYM_BITS'(NWORDS - 1)) begin
            state  <= S_COLLECT;
            bitcnt <= '0;
            symcnt <= '0;
          end
        end
        S_COLLECT: begin
          shreg <= word;
          if (bitcnt == ($bits(bitcnt))'(SYM_BITS - 1)) begin
            bitcnt     <= '0;
            hist[word] <= hist[word] + 1'b1;
            symcnt     <= symcnt + 1'b1;
            if (symcnt == CW'(NSYM - 1)) begin
              state <= S_SUM;
              addr  <= '0;
              acc   <= '0;
            end
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        S_SUM: begin
          acc        <= acc + clogc(hist[addr]);
          hist[addr] <= '0;
          addr       <= addr + 1'b1;
          if (addr == SYM_BITS'(NWORDS - 1)) begin
            state       <= S_DECIDE;
            score       <= acc + clogc(hist[addr]);
            score_valid <= 1'b1;
          end
        end
        S_DECIDE: begin
          if (!have_best || score < best) begin
            best <= score;
            sel  <= cur;
          end
          have_best <= 1'b1;
          if (cur == SELW'(NSRC - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cur    <= cur + 1'b1;
            state  <= S_COLLECT;
            bitcnt <= '0;
            symcnt <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign meas_valid = (state == S_COLLECT);
  assign meas_src   = cur;
  assign rnd_out    = src[sel];
endmodule
