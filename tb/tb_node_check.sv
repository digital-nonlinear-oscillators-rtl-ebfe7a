// tb_node_check: testbench monitor for one oscillator node.
//
// Keeps a copy of the node's inputs delayed by DELAY_PS (transport delay)
// and, half a picosecond after every transition of the node output, checks
// that the new output equals the gate function FUNC of the inputs as they
// were DELAY_PS earlier. The gate functions are written here with logic
// operators, independently of the LUT truth tables of the design. Checking
// starts after ARM_PS, once any forced start-up state has been released. Counts
// are exported as ports so that the testbench can add them up.
module tb_node_check #(
  parameter string       FUNC     = "NOT",   // NOT, DEL, XOR2, NXOR2, XOR3
  parameter int unsigned K        = 1,
  parameter int unsigned DELAY_PS = 500,
  parameter string       NAME     = "node",
  parameter int unsigned ARM_PS   = 20_000    // start-up time not checked
) (
  input  logic [K-1:0] in,
  input  logic         out,
  output int           checks,
  output int           failures,
  output int           toggles
);
  timeunit 1ps;
  timeprecision 100fs;

  logic [K-1:0] in_d;
  logic         armed = 1'b0;

  initial begin
    checks   = 0;
    failures = 0;
    toggles  = 0;
    in_d     = in;
    #(ARM_PS * 1ps);
    armed = 1'b1;
  end

  always @(in) in_d <= #(DELAY_PS * 1ps) in;

  function automatic logic model(input logic [K-1:0] v);
    logic [2:0] w;
    w = 3'(v);
    case (FUNC)
      "NOT":   return ~w[0];
      "DEL":   return  w[0];
      "XOR2":  return  w[1] ^ w[0];
      "NXOR2": return ~(w[1] ^ w[0]);
      "XOR3":  return  w[2] ^ w[1] ^ w[0];
      default: return 1'b0;
    endcase
  endfunction

  always @(out) begin
    #0.5;
    if (armed) begin
      toggles++;
      checks++;
      if (out !== model(in_d)) begin
        failures++;
        if (failures < 5)
          $display("FAIL %s: output %b at %0t, expected %b from inputs %b", NAME, out, $time,
                   model(in_d), in_d);
      end
    end
  end
endmodule
