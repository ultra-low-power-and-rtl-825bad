// tb_dsrc_pattern_32bit -- encodes the 32-bit test pattern
// 01001011111000110100101111100011 in all three modes and compares the line
// signal, half-bit by half-bit, with precomputed codes.
//
// The expected 64 half-bit levels of each case were worked out by hand from
// the coding rules (Manchester: 0 -> 10, 1 -> 01; FM0: toggle at every bit
// start and in mid-bit for a 0; differential Manchester: toggle in every
// mid-bit and at the start of a 0), listed first half first, first bit at the
// left. FM0 and differential Manchester run from both starting levels, set by
// the flip-flop's clear (level 0) or preset (level 1); FM0 from level 1 gives
// the 0-to-1 first transition of the usual FM0 drawing. The pattern takes
// exactly 32 clock periods: one bit per CLK cycle, with the code for a bit
// appearing in that same cycle.
module tb_dsrc_pattern_32bit;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [31:0] PATTERN = 32'b01001011111000110100101111100011;

  typedef struct {
    string       name;
    logic        m1, m2, clr;
    logic        start;        // starting flip-flop level (0 = clear, 1 = preset)
    logic [63:0] code;
  } case_t;

  localparam int NCASES = 5;
  case_t cases[NCASES] = '{
    '{"Manchester",                 1'b1, 1'b1, 1'b0, 1'b0, 64'h9a6556a59a6556a5},
    '{"FM0 from 0",                 1'b0, 1'b1, 1'b1, 1'b0, 64'hb52ccd534ad332ac},
    '{"FM0 from 1",                 1'b0, 1'b1, 1'b1, 1'b1, 64'h4ad332acb52ccd53},
    '{"diff. Manchester from 0",    1'b1, 1'b1, 1'b1, 1'b0, 64'h95a665596a599aa6},
    '{"diff. Manchester from 1",    1'b1, 1'b1, 1'b1, 1'b1, 64'h6a599aa695a66559}
  };

  logic CLK = 1'b0, X = 1'b0, M1 = 1'b1, M2 = 1'b1, CLR = 1'b1, PRE = 1'b1;
  logic pclk = 1'b1;
  logic OUT, OUT_b;
  logic cell_x = 1'b0, cell_y = 1'b0, cell_and, cell_nand;

  multimode_encoder dut (.*);

  int checks = 0, failures = 0;
  int edges = 0;
  always @(posedge CLK) edges++;

  initial begin
    #(10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] got;
    int          e0;
    #100ps;
    foreach (cases[c]) begin
      // Set the starting level: hold clear or preset low across one edge.
      M1 = cases[c].m1; M2 = cases[c].m2;
      CLR = 1'b0;
      #1ns;
      if (cases[c].start) begin CLR = 1'b1; PRE = 1'b0; end
      #1ns CLK = 1'b1;
      #1ns CLK = 1'b0;
      #950ps;
      e0 = edges;
      for (int i = 31; i >= 0; i--) begin
        CLK = 1'b1;
        #100ps X = PATTERN[i];
        CLR = cases[c].clr; PRE = 1'b1;
        #200ps got[2*i+1] = OUT;
        #700ps CLK = 1'b0;
        #300ps got[2*i] = OUT;
        #700ps;
      end
      checks++;
      if (got !== cases[c].code) begin
        failures++;
        $display("FAIL %s: got %h expected %h", cases[c].name, got, cases[c].code);
      end else
        $display("%s: %b", cases[c].name, got);
      checks++;
      if (edges - e0 != 32) begin
        failures++;
        $display("FAIL %s took %0d clock periods, expected 32", cases[c].name, edges - e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
