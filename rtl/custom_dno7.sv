// custom_dno7: seven-node custom DNO, a ring oscillator mixed with a loop of
// digital delays and XOR gates, plus the sampling node.
//
//   ELB#1-3  three-inverter ring oscillator, phi = ELB#3
//   ELB#4    e4 = XOR(phi, e7)      mixes the ring with the loop output
//   ELB#5-6  e5 = DEL(e4), e6 = DEL(e5)   digital delays
//   ELB#7    e7 = XOR(e6, e7)      single-LUT loop: toggles by itself
//                                   while e6 = 1, holds while e6 = 0
//   ELB#8    flip-flop sampling node OUT_NODE (one of ELB#4-7)
//
// A rising edge of the ring reaches ELB#7 through ELB#4-6 and starts its
// self-oscillation; that oscillation returns into ELB#4 and is mixed with
// the ring again, so the two loops keep gating each other. The node list,
// the gate types and the XOR/DEL roles are the published design; the exact
// wiring (which XOR input closes which loop) and the choice of ELB#4 as the
// sampled node are this library's reading of it.
//
// Interface: nodes[k-1] is ELB#k, rnd_out the sampled bit (one per clock,
// valid from the second clock after reset). rst clears only the sampler.
module custom_dno7 #(
  parameter int unsigned OUT_NODE     = 4,
  parameter int unsigned RO_DELAY_PS  = 500,
  parameter int unsigned XOR_DELAY_PS = 450,
  parameter int unsigned DEL_DELAY_PS = 400
) (
  input  logic       clk,
  input  logic       rst,
  output logic [6:0] nodes,
  output logic       rnd_out
);
  timeunit 1ps;
  timeprecision 1ps;

  if (OUT_NODE < 4 || OUT_NODE > 7) begin : g_bad_out
    $error("custom_dno7: OUT_NODE must be 4, 5, 6 or 7");
  end

  // ELB#1-3
  ring_oscillator #(.N(3), .DELAY_PS(RO_DELAY_PS)) u_ring (
    .nodes(nodes[2:0]),
    .o    ()
  );

  // ELB#4, address {i1, i0} = {e7, phi}
  elb #(.K(2), .INIT(dno_pkg::LUT2_XOR), .DELAY_PS(XOR_DELAY_PS)) u_elb4 (
    .clk(1'b0), .i({nodes[6], nodes[2]}), .o(nodes[3])
  );

  // ELB#5-6
  elb #(.K(1), .INIT(dno_pkg::LUT1_DEL), .DELAY_PS(DEL_DELAY_PS)) u_elb5 (
    .clk(1'b0), .i(nodes[3]), .o(nodes[4])
  );
  elb #(.K(1), .INIT(dno_pkg::LUT1_DEL), .DELAY_PS(DEL_DELAY_PS)) u_elb6 (
    .clk(1'b0), .i(nodes[4]), .o(nodes[5])
  );

  // ELB#7, address {i1, i0} = {e6, e7}
  elb #(.K(2), .INIT(dno_pkg::LUT2_XOR), .DELAY_PS(XOR_DELAY_PS)) u_elb7 (
    .clk(1'b0), .i({nodes[5], nodes[6]}), .o(nodes[6])
  );

  // ELB#8
  sync_interface #(.INIT(1'b0)) u_sample (
    .analog_in(nodes[OUT_NODE-1]),
    .clk      (clk),
    .rst      (rst),
    .rnd_out  (rnd_out)
  );
endmodule
