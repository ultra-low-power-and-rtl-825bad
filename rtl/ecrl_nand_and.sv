// ecrl_nand_and -- behavioural model of the dual-rail ECRL NAND/AND cell.
//
// In the transistor cell two series NMOS devices (x, y) discharge out_b and two
// parallel NMOS devices (x_b, y_b) discharge out, under a cross-coupled PMOS
// pair fed from the power clock. The result is out = x AND y and
// out_b = x NAND y. This file models the cell at logic level.
//
// Power clock: with pclk at 1 the rails carry the complementary result; with
// pclk at 0 (recovery) both rails are 0. Outputs follow inputs after TPD_PS
// picoseconds. Cell structure follows the published schematic; the delay and
// the two-level power-clock abstraction are this model's own choices.
module ecrl_nand_and #(
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

  // out is discharged if x_b or y_b conducts; out_b only if both x and y do.
  assign #Tpd out   = pclk & ~(x_b | y_b);
  assign #Tpd out_b = pclk & ~(x & y);
endmodule
