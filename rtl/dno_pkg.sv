// dno_pkg: shared constants of the Digital Nonlinear Oscillator (DNO) library.
//
// A DNO node is a look-up table whose INIT vector is its truth table: bit
// INIT[a] is the output for the input address a = {.., i1, i0}. The
// constants below are the truth tables of the gates the oscillators use:
// the inverter and XOR of the LUT1/LUT2 examples, the buffer used as a
// digital delay (DEL), the XNOR used in the complementary feedback loop and
// the three-input XOR that mixes the loops of the high-performance DNO.
// DEFAULT_DELAY_PS is this library's own choice of LUT-plus-routing delay
// for simulation; synthesis ignores all delays.
package dno_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [1:0] LUT1_NOT  = 2'b01;        // o = ~i0
  localparam logic [1:0] LUT1_DEL  = 2'b10;        // o =  i0 (digital delay / rectifier)
  localparam logic [3:0] LUT2_XOR  = 4'b0110;      // o = i1 ^ i0
  localparam logic [3:0] LUT2_NXOR = 4'b1001;      // o = ~(i1 ^ i0)
  localparam logic [7:0] LUT3_XOR  = 8'b1001_0110; // o = i2 ^ i1 ^ i0

  localparam int unsigned DEFAULT_DELAY_PS = 500;
endpackage
