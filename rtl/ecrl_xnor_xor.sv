// ecrl_xnor_xor -- behavioural model of the dual-rail ECRL XNOR/XOR cell.
//
// The transistor cell discharges one rail or the other through an NMOS network
// driven by x, x_b, y and y_b, below a cross-coupled PMOS pair fed from the
// power clock. The result is out = x XOR y and out_b = x XNOR y. This file
// models the cell at logic level.
//
// Power clock: with pclk at 1 the rails carry the complementary result; with
// pclk at 0 (recovery) both rails are 0. Outputs follow inputs after TPD_PS
// picoseconds. Which rail carries XOR follows the cell's name and the naming of
// the other cells; the delay and power-clock abstraction are this model's own.
module ecrl_xnor_xor #(
  parameter int unsigned TPD_PS = 20
) (
  input  logic pclk,
  input  logic x,
  input  logic x_b,
  input  logic y,
  input  logic y_b,
  output logic out,
  output logic out_b
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime Tpd = TPD_PS * 1ps;

  // out is discharged when the inputs are equal (x.y or x_b.y_b conduct),
  // out_b when they differ (x.y_b or x_b.y conduct).
  assign #Tpd out   = pclk & ~((x & y) | (x_b & y_b));
  assign #Tpd out_b = pclk & ~((x & y_b) | (x_b & y));
endmodule
