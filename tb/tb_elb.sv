// tb_elb: self-checking test of the Elementary Logic Block.
//
// Checks, for LUTs of 1, 2, 3 and 6 inputs, that every input address gives
// the truth-table bit (expected values from the gate equations or from the
// INIT constant read bit by bit), that the asynchronous output keeps its old
// value until DELAY_PS has passed and takes the new one right after, and
// that in registered mode the output only moves on a rising clock edge.
module tb_elb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 500;
  localparam logic [63:0] C6 = 64'hDEAD_BEEF_0123_4567;

  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic [0:0] i1;
  logic [1:0] i2;
  logic [2:0] i3;
  logic [5:0] i6;
  logic       o_not, o_del, o_xor, o_nxor, o_xor3, o_l6, o_sync;

  elb #(.K(1), .INIT(dno_pkg::LUT1_NOT),  .DELAY_PS(D)) u_not  (.clk(1'b0), .i(i1), .o(o_not));
  elb #(.K(1), .INIT(dno_pkg::LUT1_DEL),  .DELAY_PS(D)) u_del  (.clk(1'b0), .i(i1), .o(o_del));
  elb #(.K(2), .INIT(dno_pkg::LUT2_XOR),  .DELAY_PS(D)) u_xor  (.clk(1'b0), .i(i2), .o(o_xor));
  elb #(.K(2), .INIT(dno_pkg::LUT2_NXOR), .DELAY_PS(D)) u_nxor (.clk(1'b0), .i(i2), .o(o_nxor));
  elb #(.K(3), .INIT(dno_pkg::LUT3_XOR),  .DELAY_PS(D)) u_xor3 (.clk(1'b0), .i(i3), .o(o_xor3));
  elb #(.K(6), .INIT(C6),                 .DELAY_PS(D)) u_l6   (.clk(1'b0), .i(i6), .o(o_l6));
  elb #(.K(2), .INIT(dno_pkg::LUT2_XOR), .SYNC(1'b1), .DELAY_PS(D)) u_sync (.clk(clk), .i(i2), .o(o_sync));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    // one-input gates
    for (int a = 0; a < 4; a++) begin
      i1 = 1'(a);
      #(D + 1);
      check(o_not, ~i1[0], "NOT");
      check(o_del,  i1[0], "DEL");
    end
    // two-input gates, exhaustive, with the delay check on every change
    for (int a = 0; a < 8; a++) begin
      i2 = 2'(a ^ (a >> 1));                 // Gray order: one input moves
      prev = o_xor;
      #(D - 1);
      check(o_xor, prev, "XOR holds until DELAY");
      #2;
      check(o_xor,  i2[1] ^ i2[0],    "XOR");
      check(o_nxor, ~(i2[1] ^ i2[0]), "NXOR");
    end
    for (int a = 0; a < 8; a++) begin
      i3 = 3'(a);
      #(D + 1);
      check(o_xor3, i3[2] ^ i3[1] ^ i3[0], "XOR3");
    end
    for (int n = 0; n < 64; n++) begin
      i6 = 6'($urandom);
      #(D + 1);
      check(o_l6, C6[i6], "LUT6 INIT bit");
    end
    // registered mode: output follows the LUT only at rising clock edges
    i2 = 2'b00;
    #(D + 1);
    clk = 1'b1; #10; clk = 1'b0; #10;
    check(o_sync, 1'b0, "SYNC after edge");
    for (int a = 1; a < 16; a++) begin
      i2 = 2'(a);
      #(D + 1);
      clk = 1'b1; #10; clk = 1'b0; #10;
      check(o_sync, i2[1] ^ i2[0], "SYNC registered value");
      i2 = {i2[1], ~i2[0]};                   // flips the LUT output
      #(D + 1);
      check(o_sync, ~(i2[1] ^ i2[0]), "SYNC holds between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
