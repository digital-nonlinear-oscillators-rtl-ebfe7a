// xor_del_loop: the feedback primitive of the DNOs, a two-input gate whose
// output returns to one of its inputs through a cascade of K_DEL buffers.
//
// Node 0 is XOR(x, feedback) (NXOR when NXOR = 1); nodes 1..K_DEL are digital
// delays (buffers); the last node is the feedback. With the XOR and x = 1 the
// loop inverts once per turn and oscillates with period 2*(K_DEL+1)*tau; with
// x = 0 it is a loop of buffers and holds its last value (bistable). The
// NXOR version does the opposite: it oscillates for x = 0 and holds for
// x = 1. A fixed-point analysis of the analog gate model shows that K_DEL
// must be at least 2 for a real loop to oscillate, hence the default; a
// zero-delay-free logic simulation oscillates for any K_DEL, so smaller
// values are allowed but are not a working oscillator in silicon.
//
// Interface: x is the independent input, nodes[k] the output of node k and
// o = nodes[K_DEL], the loop output. No reset; the loop is a combinational
// cycle on purpose.
module xor_del_loop #(
  parameter bit          NXOR         = 1'b0,
  parameter int unsigned K_DEL        = 2,
  parameter int unsigned GATE_DELAY_PS = dno_pkg::DEFAULT_DELAY_PS,
  parameter int unsigned DEL_DELAY_PS  = dno_pkg::DEFAULT_DELAY_PS
) (
  input  logic           x,
  output logic [K_DEL:0] nodes,
  output logic           o
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [3:0] GATE_INIT = NXOR ? dno_pkg::LUT2_NXOR : dno_pkg::LUT2_XOR;

  // input address {i1, i0} = {x, feedback}
  elb #(.K(2), .INIT(GATE_INIT), .DELAY_PS(GATE_DELAY_PS)) u_gate (
    .clk(1'b0),
    .i  ({x, nodes[K_DEL]}),
    .o  (nodes[0])
  );

  for (genvar k = 1; k <= K_DEL; k++) begin : g_del
    elb #(.K(1), .INIT(dno_pkg::LUT1_DEL), .DELAY_PS(DEL_DELAY_PS)) u_del (
      .clk(1'b0),
      .i  (nodes[k-1]),
      .o  (nodes[k])
    );
  end

  assign o = nodes[K_DEL];
endmodule
