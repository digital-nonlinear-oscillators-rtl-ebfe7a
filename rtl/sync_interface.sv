// sync_interface: sampling flip-flop between an oscillator and the clocked
// logic.
//
// A single D flip-flop both quantises the free-running oscillator signal to
// one bit and samples it uniformly at the clock rate: every rising edge of
// clk stores analog_in, so rnd_out carries one random bit per clock period,
// one cycle after the sample is taken. rst is a synchronous reset to 0 and
// INIT is the power-up value, as in a 7-series FDRE flip-flop with its clock
// enable tied high. There is deliberately no second synchronising stage: the
// single flip-flop is the sampler. Downstream logic should treat the first
// bit after a metastable sample as random, which it is.
// q is declared with its INIT value on purpose: an FPGA flip-flop has a
// configured power-up state as well as a reset, and this models both.
module sync_interface #(
  parameter bit INIT = 1'b0
) (
  input  logic analog_in,
  input  logic clk,
  input  logic rst,
  output logic rnd_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q = INIT;

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= analog_in;
  end

  assign rnd_out = q;
endmodule
