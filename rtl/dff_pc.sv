// dff_pc -- positive edge-triggered D flip-flop with asynchronous preset and
// clear, the storage element of the multimode encoder.
//
// On each rising edge of clk, q takes the value of d, unless an asynchronous
// input is active. preset_n = 0 forces q to 1 and clear_n = 0 forces q to 0
// at once, without waiting for the clock; if both are low, clear wins. (As in
// any edge-sensitive model of such a flip-flop, releasing clear while preset
// stays low leaves q at 0 until the next clock edge.) qb is always the complement of q (the encoder uses it as the second rail of its
// dual-rail datapath).
//
// Two asynchronous inputs on one register are beyond some synthesis front
// ends, which then need a library flip-flop with set and reset in its place.
//
// The function (edge trigger, asynchronous preset and clear, Q and Qb outputs)
// follows the published flip-flop; active-low polarity of both asynchronous
// inputs and the priority of clear are this design's choices.
module dff_pc (
  input  logic clk,
  input  logic d,
  input  logic preset_n,
  input  logic clear_n,
  output logic q,
  output logic qb
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge clear_n or negedge preset_n) begin
    if (!clear_n)       q <= 1'b0;
    else if (!preset_n) q <= 1'b1;
    else                q <= d;
  end

  assign qb = ~q;
endmodule
