// single_lut_oscillator: an oscillator built from one LUT.
//
// In an FPGA the output of a LUT reaches any LUT input, even its own, only
// through active routing multiplexers, and each of them acts as a digital
// delay stage. A single LUT configured as XOR(en, feedback) and fed back to
// itself therefore already forms the XOR-plus-two-delays loop that is the
// smallest oscillating structure, and it runs faster than a three-LUT ring.
// Here the routing is modelled as ROUTE_STAGES delay stages of
// ROUTE_DELAY_PS each on the feedback wire (synthesis keeps only the wire).
// The XOR function with an enable input, and the delay values, are this
// library's choices.
//
// Interface: en = 1 lets the loop oscillate with period
// 2*(LUT_DELAY_PS + ROUTE_STAGES*ROUTE_DELAY_PS); en = 0 makes the LUT a
// buffer and the loop holds its last value. o is the LUT output. The
// feedback is a combinational cycle on purpose.
module single_lut_oscillator #(
  parameter int unsigned LUT_DELAY_PS   = 100,
  parameter int unsigned ROUTE_STAGES   = 2,
  parameter int unsigned ROUTE_DELAY_PS = 200
) (
  input  logic en,
  output logic o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic fb;

  // address {i1, i0} = {en, fb}
  elb #(.K(2), .INIT(dno_pkg::LUT2_XOR), .DELAY_PS(LUT_DELAY_PS)) u_lut (
    .clk(1'b0),
    .i  ({en, fb}),
    .o  (o)
  );

  assign #(ROUTE_STAGES * ROUTE_DELAY_PS) fb = o;
endmodule
