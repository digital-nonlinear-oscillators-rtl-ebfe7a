// elb: Elementary Logic Block, the node of every DNO in this library.
//
// The block is the programmable cell of an FPGA slice: a K-input look-up
// table holding an arbitrary one-bit function in INIT (INIT[a] is the output
// for input address a), a flip-flop that can register the LUT output, and a
// multiplexer choosing the asynchronous LUT output (SYNC = 0, the mode every
// oscillator node uses) or the registered one (SYNC = 1). This structure and
// the INIT convention follow the LUT primitives of Xilinx 7-series parts.
//
// Timing: the LUT output follows its inputs after DELAY_PS picoseconds. The
// delay stands for the gate plus the routing to the next node; it only
// shapes simulation, where it is what makes a loop of nodes oscillate, and
// synthesis ignores it. Its default is this library's choice. In SYNC mode
// the output changes on the rising edge of clk. The flip-flop has no reset.
module elb #(
  parameter int unsigned         K        = 6,
  parameter logic [2**K-1:0]     INIT     = '0,
  parameter bit                  SYNC     = 1'b0,
  parameter int unsigned         DELAY_PS = dno_pkg::DEFAULT_DELAY_PS
) (
  input  logic         clk,
  input  logic [K-1:0] i,
  output logic         o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic lut_o;
  logic ff_q;

  assign #(DELAY_PS) lut_o = INIT[i];

  always_ff @(posedge clk) ff_q <= lut_o;

  assign o = SYNC ? ff_q : lut_o;
endmodule
