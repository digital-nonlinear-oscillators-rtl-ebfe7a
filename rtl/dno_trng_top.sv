// dno_trng_top: a true random bit generator built from Digital Nonlinear
// Oscillators and a selector that keeps the best of them.
//
// Four free-running entropy sources, each sampled by its own flip-flop on
// clk, feed the entropy source selector:
//   src[0]  high-performance DNO (hp_dno), first placement
//   src[1]  high-performance DNO, second placement (other routing delays)
//   src[2]  seven-node custom DNO (custom_dno7)
//   src[3]  single-LUT oscillator, sampled by a sync_interface flip-flop
// A pulse on start makes the selector measure every source in turn and
// choose the one with the highest estimated Shannon entropy; from then on
// rnd_out carries that source's bit stream, one bit per clock. Using two
// placements of the same DNO mirrors the fact that one topology gives
// different sources at different places in a chip. The mix of sources is
// this design's choice; the DNOs and the selection goal are the published
// ones.
//
// Interface: clk is the sampling clock (100 MHz in the reference setup),
// rst a synchronous reset of the samplers and the selector; src_bits shows
// the sampled bit of every source. busy, done, sel, meas_valid and meas_src
// are the selector's status (see entropy_source_selector for the timing).
// The oscillators contain combinational loops on purpose.
module dno_trng_top #(
  parameter int unsigned SYM_BITS = 10,
  parameter int unsigned NBITS    = 1_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic [3:0] src_bits,
  output logic       busy,
  output logic       done,
  output logic [1:0] sel,
  output logic       rnd_out,
  output logic       meas_valid,
  output logic [1:0] meas_src
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NSRC = 4;

  logic sl_osc;

  hp_dno #(.RO_DELAY_PS(500), .MIX_DELAY_PS(450), .X_DELAY_PS(430), .Y_DELAY_PS(370)) u_hp0 (
    .clk(clk), .rst(rst), .z(), .ro_nodes(), .x_nodes(), .y_nodes(), .rnd_out(src_bits[0])
  );

  hp_dno #(.RO_DELAY_PS(530), .MIX_DELAY_PS(410), .X_DELAY_PS(470), .Y_DELAY_PS(390)) u_hp1 (
    .clk(clk), .rst(rst), .z(), .ro_nodes(), .x_nodes(), .y_nodes(), .rnd_out(src_bits[1])
  );

  custom_dno7 #(.OUT_NODE(4)) u_c7 (
    .clk(clk), .rst(rst), .nodes(), .rnd_out(src_bits[2])
  );

  // routing of 2 x 215 ps: a period of 1.06 ns, not a divisor of the clock
  // period, so the ideal-delay model does not sample one fixed phase
  single_lut_oscillator #(.LUT_DELAY_PS(100), .ROUTE_STAGES(2), .ROUTE_DELAY_PS(215)) u_sl (
    .en(1'b1), .o(sl_osc)
  );

  sync_interface #(.INIT(1'b0)) u_sl_sample (
    .analog_in(sl_osc), .clk(clk), .rst(rst), .rnd_out(src_bits[3])
  );

  entropy_source_selector #(.NSRC(NSRC), .SYM_BITS(SYM_BITS), .NBITS(NBITS)) u_sel (
    .clk        (clk),
    .rst        (rst),
    .start      (start),
    .src        (src_bits),
    .busy       (busy),
    .done       (done),
    .sel        (sel),
    .rnd_out    (rnd_out),
    .meas_valid (meas_valid),
    .meas_src   (meas_src),
    .score_valid(),
    .score      ()
  );
endmodule
