// ecrl_mux -- behavioural model of the dual-rail ECRL 2:1 multiplexer cell.
//
// In the transistor cell out_b is discharged through x in series with s, or
// through y in series with s_b; out is discharged through x_b with s, or y_b
// with s_b. So out = s ? x : y and out_b is its complement. This file models
// the cell at logic level.
//
// Power clock: with pclk at 1 the rails carry the complementary result; with
// pclk at 0 (recovery) both rails are 0. Outputs follow inputs after TPD_PS
// picoseconds. Cell structure follows the published schematic; the delay and
// power-clock abstraction are this model's own choices.
module ecrl_mux #(
  parameter int unsigned TPD_PS = 20
) (
  input  logic pclk,
  input  logic s,
  input  logic s_b,
  input  logic x,
  input  logic x_b,
  input  logic y,
  input  logic y_b,
  output logic out,
  output logic out_b
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime Tpd = TPD_PS * 1ps;

  assign #Tpd out   = pclk & ~((x_b & s) | (y_b & s_b));
  assign #Tpd out_b = pclk & ~((x & s) | (y & s_b));
endmodule
