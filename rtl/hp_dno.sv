// hp_dno: the high-performance Digital Nonlinear Oscillator, an entropy
// source of eleven ELBs built from purely digital gates.
//
// Idea: two feedback loops of the xor_del_loop kind are joined at their
// independent inputs. The XOR loop (x1..x3) oscillates while the common
// input z is 1 and freezes while it is 0; the NXOR loop (y1..y3) does the
// reverse. z itself is the XOR of both loop outputs and of a periodic drive
// phi from a free-running three-inverter ring, so the ring keeps switching
// the two loops on and off while the loops feed back into their own switch.
// The result is a forced nonlinear oscillator whose output z can be chaotic.
//
//   ELB#1-3   ring oscillator, phi = ELB#3
//   ELB#4     z  = XOR3(x3, phi, y3)         (mixer, output node)
//   ELB#5-7   y1 = NXOR(y3, z), y2 = DEL(y1), y3 = DEL(y2)
//   ELB#8-10  x1 = XOR(x3, z),  x2 = DEL(x1), x3 = DEL(x2)
//   ELB#11    flip-flop sampling z on every clock edge
//
// The topology and the gate of every node are the published design. The
// per-group delays are this library's choice: in silicon they come from
// placement and routing, and their ratio decides the dynamics, so they are
// parameters (different values stand for different placements).
//
// Interface: z is the free-running output (for observation only), rnd_out
// the sampled bit, valid from the second clock after reset. rst clears only
// the sampler; the oscillator has no reset or enable. The three loops are
// combinational cycles on purpose.
module hp_dno #(
  parameter int unsigned RO_DELAY_PS  = 500,
  parameter int unsigned MIX_DELAY_PS = 450,
  parameter int unsigned X_DELAY_PS   = 430,
  parameter int unsigned Y_DELAY_PS   = 370
) (
  input  logic       clk,
  input  logic       rst,
  output logic       z,
  output logic [2:0] ro_nodes,
  output logic [2:0] x_nodes,
  output logic [2:0] y_nodes,
  output logic       rnd_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic phi;

  // ELB#1-3
  ring_oscillator #(.N(3), .DELAY_PS(RO_DELAY_PS)) u_ring (
    .nodes(ro_nodes),
    .o    (phi)
  );

  // ELB#4, input address {i2, i1, i0} = {y3, phi, x3}
  elb #(.K(3), .INIT(dno_pkg::LUT3_XOR), .DELAY_PS(MIX_DELAY_PS)) u_mix (
    .clk(1'b0),
    .i  ({y_nodes[2], phi, x_nodes[2]}),
    .o  (z)
  );

  // ELB#5-7
  xor_del_loop #(.NXOR(1'b1), .K_DEL(2), .GATE_DELAY_PS(Y_DELAY_PS),
                 .DEL_DELAY_PS(Y_DELAY_PS)) u_yloop (
    .x    (z),
    .nodes(y_nodes),
    .o    ()
  );

  // ELB#8-10
  xor_del_loop #(.NXOR(1'b0), .K_DEL(2), .GATE_DELAY_PS(X_DELAY_PS),
                 .DEL_DELAY_PS(X_DELAY_PS)) u_xloop (
    .x    (z),
    .nodes(x_nodes),
    .o    ()
  );

  // ELB#11
  sync_interface #(.INIT(1'b0)) u_sample (
    .analog_in(z),
    .clk      (clk),
    .rst      (rst),
    .rnd_out  (rnd_out)
  );
endmodule
