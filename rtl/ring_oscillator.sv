// ring_oscillator: loop of N inverting ELBs (N odd, at least 3).
//
// Node s inverts node s-1 and node 0 inverts node N-1, so the loop has no
// stable state and a transition runs around it forever. With a delay tau per
// node the output period is 2*N*tau, i.e. f = 1/(2*N*tau). In the DNOs of
// this library the three-node ring is the periodic driver that excites the
// other loops; its randomness in silicon is the jitter of that period.
//
// Interface: nodes[s] is the output of node s, o = nodes[N-1]. There is no
// enable or reset: the loop starts from whatever state it powers up in. The
// loop is a combinational cycle on purpose; lint tools report it as such.
module ring_oscillator #(
  parameter int unsigned N        = 3,
  parameter int unsigned DELAY_PS = dno_pkg::DEFAULT_DELAY_PS
) (
  output logic [N-1:0] nodes,
  output logic         o
);
  timeunit 1ps;
  timeprecision 1ps;

  if (N < 3 || N % 2 == 0) begin : g_bad_n
    $error("ring_oscillator: N must be odd and at least 3");
  end

  for (genvar s = 0; s < N; s++) begin : g_stage
    elb #(.K(1), .INIT(dno_pkg::LUT1_NOT), .DELAY_PS(DELAY_PS)) u_not (
      .clk(1'b0),
      .i  (nodes[(s + N - 1) % N]),
      .o  (nodes[s])
    );
  end

  assign o = nodes[N-1];
endmodule
