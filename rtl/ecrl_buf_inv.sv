// ecrl_buf_inv -- behavioural model of the dual-rail ECRL buffer/inverter cell.
//
// The real cell is a transistor circuit: two cross-coupled PMOS devices connect
// the rails out and out_b to the power clock pclk, and one NMOS on each rail
// pulls it to ground. The NMOS driven by `in` discharges `out` and the NMOS
// driven by `in_b` discharges `out_b`, so `out` is the inverted copy of the
// input and `out_b` the buffered copy. This file models that cell at logic
// level; it is not a description of the transistors.
//
// Power clock: while pclk is 1 the cell evaluates and the rails are
// complementary. While pclk is 0 (the recovery phase of the adiabatic supply)
// both rails sit at 0, because they can be charged only through pclk. With
// pclk held at 1 the cell behaves as an ordinary static differential gate.
//
// Timing: every output change appears TPD_PS picoseconds after the input or
// pclk change. The cell structure follows the published schematic; the delay
// value and the 0/1 abstraction of the trapezoidal power clock are this
// model's own choices.
module ecrl_buf_inv #(
  parameter int unsigned TPD_PS = 20
) (
  input  logic pclk,
  input  logic in,
  input  logic in_b,
  output logic out,
  output logic out_b
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime Tpd = TPD_PS * 1ps;

  // Each rail is high when pclk is up and its pull-down device is off.
  assign #Tpd out   = pclk & ~in;
  assign #Tpd out_b = pclk & ~in_b;
endmodule
