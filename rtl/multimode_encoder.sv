// multimode_encoder -- one-flip-flop line encoder for DSRC transponders that
// produces Manchester, FM0 or differential Manchester code from the same cells.
//
// How it works. Every bit of X occupies one period of CLK: CLK is high for the
// first half of the bit and low for the second. A flip-flop holds Q, the line
// level at the end of the previous bit. In the first half (CLK = 1) the
// output is (Q xor (M1 and X)) xor M2, in the second half (CLK = 0) it is
// (Q xnor X) xor M2. The flip-flop samples OUT on the rising CLK edge, i.e. it
// stores the second-half level of the bit that has just ended. With M2 = 1:
//
//   mode                      M1 M2 CLR   first half   second half
//   Manchester                 1  1  0    not X        X            (Q held 0)
//   FM0                        0  1  1    not Q        Q xor X
//   differential Manchester    1  1  1    Q xnor X     Q xor X
//
// So Manchester is X xor CLK; FM0 always toggles at a bit boundary and toggles
// again in mid-bit for a 0; differential Manchester always toggles in mid-bit
// and toggles at the boundary for a 0. M2 is 1 in all three modes; with
// M2 = 0 the circuit produces other codes (Manchester of the opposite
// polarity when CLR = 0), which are not among its documented modes.
//
// Structure. The datapath is built from dual-rail efficient charge recovery
// logic (ECRL) cells: MUX1 (ecrl_mux, selects X or 0 by M1), XNOR and XOR1
// (ecrl_xnor_xor, both fed by Q), MUX2 (ecrl_mux, selected by CLK: input 1 is
// XOR1, input 0 is XNOR), XOR2 (ecrl_xnor_xor with M2) and an output stage
// (ecrl_buf_inv) driving OUT/OUT_b. OUT feeds D of dff_pc, clocked by CLK and
// cleared by CLR (active low). All cells share the power clock pclk: hold it
// at 1 for ordinary static operation; while it is 0 all rails, OUT and OUT_b
// included, are 0.
//
// Interface and timing. X must change only after a rising CLK edge and stay
// stable until the next one. OUT for a bit appears in that same bit period,
// at most five cell delays after CLK, X or Q change (no pipeline latency). The
// flip-flop relies on that path delay being longer than its hold time: it
// samples the old second-half level at the same edge that starts the next
// bit. PRE (active low) presets Q to 1 and selects the starting polarity;
// tie it to 1 when unused.
//
// Following the published architecture: the cell list, the connections of
// MUX1, XNOR, XOR1, MUX2, XOR2 and the flip-flop, and the mode table. This
// design's own choices: the PRE port, the inverters that form the complement
// rails of X, M1, M2 and CLK at the boundary, the output buffer cell, and the
// cell delay TPD_PS. The cell_* ports bring out a stand-alone ECRL NAND/AND
// cell, the one cell of the library the encoder datapath does not use.
module multimode_encoder #(
  parameter int unsigned TPD_PS = 20
) (
  input  logic CLK,
  input  logic X,
  input  logic M1,
  input  logic M2,
  input  logic CLR,
  input  logic PRE,
  input  logic pclk,
  output logic OUT,
  output logic OUT_b,
  input  logic cell_x,
  input  logic cell_y,
  output logic cell_and,
  output logic cell_nand
);
  timeunit 1ns; timeprecision 1ps;

  // Complement rails of the single-rail inputs.
  logic x_b, m1_b, m2_b, clk_b;
  assign x_b   = ~X;
  assign m1_b  = ~M1;
  assign m2_b  = ~M2;
  assign clk_b = ~CLK;

  logic q, q_b;              // flip-flop state, both rails
  logic mux1,  mux1_b;       // M1 ? X : 0
  logic xnor1, xnor1_b;      // Q xnor X   (true rail = XNOR)
  logic xor1,  xor1_b;       // Q xor MUX1
  logic mux2,  mux2_b;       // CLK ? XOR1 : XNOR
  logic xor2,  xor2_b;       // MUX2 xor M2

  // MUX1: input 1 is X, input 0 is the constant 0.
  ecrl_mux #(.TPD_PS(TPD_PS)) u_mux1 (
    .pclk(pclk), .s(M1), .s_b(m1_b),
    .x(X), .x_b(x_b), .y(1'b0), .y_b(1'b1),
    .out(mux1), .out_b(mux1_b)
  );

  // XNOR of Q and X: the cell's out_b rail is the XNOR.
  ecrl_xnor_xor #(.TPD_PS(TPD_PS)) u_xnor (
    .pclk(pclk), .x(q), .x_b(q_b), .y(X), .y_b(x_b),
    .out(xnor1_b), .out_b(xnor1)
  );

  // XOR1 of Q and the MUX1 output.
  ecrl_xnor_xor #(.TPD_PS(TPD_PS)) u_xor1 (
    .pclk(pclk), .x(q), .x_b(q_b), .y(mux1), .y_b(mux1_b),
    .out(xor1), .out_b(xor1_b)
  );

  // MUX2: CLK = 1 (first half-bit) passes XOR1, CLK = 0 passes XNOR.
  ecrl_mux #(.TPD_PS(TPD_PS)) u_mux2 (
    .pclk(pclk), .s(CLK), .s_b(clk_b),
    .x(xor1), .x_b(xor1_b), .y(xnor1), .y_b(xnor1_b),
    .out(mux2), .out_b(mux2_b)
  );

  // XOR2 with M2.
  ecrl_xnor_xor #(.TPD_PS(TPD_PS)) u_xor2 (
    .pclk(pclk), .x(mux2), .x_b(mux2_b), .y(M2), .y_b(m2_b),
    .out(xor2), .out_b(xor2_b)
  );

  // Output stage: the buffer/inverter cell's out rail inverts `in`, so the
  // complement rail goes to `in` to give OUT = XOR2.
  ecrl_buf_inv #(.TPD_PS(TPD_PS)) u_outbuf (
    .pclk(pclk), .in(xor2_b), .in_b(xor2),
    .out(OUT), .out_b(OUT_b)
  );

  dff_pc u_dff (
    .clk(CLK), .d(OUT), .preset_n(PRE), .clear_n(CLR),
    .q(q), .qb(q_b)
  );

  // Stand-alone NAND/AND cell.
  ecrl_nand_and #(.TPD_PS(TPD_PS)) u_nand_cell (
    .pclk(pclk), .x(cell_x), .x_b(~cell_x), .y(cell_y), .y_b(~cell_y),
    .out(cell_and), .out_b(cell_nand)
  );
endmodule
