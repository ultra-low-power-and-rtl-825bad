// tb_multimode_encoder -- end-to-end test of the multimode encoder at its
// default parameters.
//
// The testbench generates the bit clock itself, one 2 ns period per bit (CLK
// high in the first half), changes X and the mode pins 100 ps after each
// rising edge, and samples OUT 300 ps into each half-bit. Every sampled level
// is compared with enc_ref_pkg, which encodes from the coding rules alone;
// the reference tracks the line level that the flip-flop should hold.
//
// Sequence: the 32-bit pattern 01001011111000110100101111100011 in each of
// the three modes, random data, random mode switches between bits without any
// restart, restarts through the asynchronous preset and clear, a power-clock
// recovery phase (all rails must fall to 0), the complement rail OUT_b, and the
// stand-alone NAND/AND cell. Each of these mechanisms is counted and must occur
// at least once. A watchdog ends the run if it hangs.
module tb_multimode_encoder;
  timeunit 1ns; timeprecision 1ps;
  import enc_ref_pkg::*;

  localparam logic [31:0] PATTERN = 32'b01001011111000110100101111100011;

  logic CLK = 1'b0, X = 1'b0, M1 = 1'b1, M2 = 1'b1, CLR = 1'b0, PRE = 1'b1;
  logic pclk = 1'b1;
  logic OUT, OUT_b;
  logic cell_x = 1'b0, cell_y = 1'b0, cell_and, cell_nand;

  multimode_encoder dut (.*);

  int checks = 0, failures = 0;
  int n_bits[3] = '{0, 0, 0};
  int n_switch = 0, n_preset = 0, n_clear = 0, n_recovery = 0;
  int n_fm0_mid = 0, n_dm_start = 0, n_man_bits_1 = 0, n_cell = 0;

  enc_mode_e mode = MODE_MANCHESTER;
  logic      last = 1'b0;      // line level expected in the flip-flop

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (mode %s, t=%0t)", what, got, exp, mode.name(), $time);
    end
  endtask

  // One bit period. `nmode` becomes active with this bit; `restart` is
  // 0 = none, 1 = hold PRE low across the edge, 2 = hold CLR low across it.
  task automatic send_bit(input logic d, input enc_mode_e nmode, input int restart = 0);
    mode_pins_t pins;
    logic [1:0] exp;
    logic       y_got, z_got, prev_level;
    prev_level = OUT;
    if (restart == 1) PRE = 1'b0;
    if (restart == 2) CLR = 1'b0;
    #50ps;
    CLK = 1'b1;                       // start of bit: flip-flop samples OUT
    #100ps;
    if (nmode != mode) n_switch++;
    mode = nmode;
    pins = pins_of(mode);
    X = d; M1 = pins.m1; M2 = pins.m2; CLR = pins.clr; PRE = 1'b1;
    if (restart == 1) begin last = 1'b1; n_preset++; end
    if (restart == 2) begin last = 1'b0; n_clear++; end
    if (mode == MODE_MANCHESTER) last = 1'b0;   // clear is held in this mode
    exp = encode_bit(mode, last, d);
    #200ps;
    y_got = OUT;
    check(y_got, exp[1], "first half");
    check(OUT_b, ~OUT, "complement rail");
    #650ps;
    CLK = 1'b0;                       // mid-bit
    #300ps;
    z_got = OUT;
    check(z_got, exp[0], "second half");
    check(OUT_b, ~OUT, "complement rail");
    #700ps;
    n_bits[mode]++;
    if (mode == MODE_FM0 && !d && y_got != z_got) n_fm0_mid++;
    if (mode == MODE_DIFF_MAN && !d && restart == 0 && y_got != prev_level) n_dm_start++;
    if (mode == MODE_MANCHESTER && d && !y_got && z_got) n_man_bits_1++;
    last = (mode == MODE_MANCHESTER) ? 1'b0 : exp[0];  // clear holds Q at 0
  endtask

  task automatic send_pattern(input enc_mode_e m, input int restart);
    for (int i = 31; i >= 0; i--) send_bit(PATTERN[i], m, (i == 31) ? restart : 0);
  endtask

  initial begin
    #(400us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Clear the flip-flop before anything reads it.
    #10ps CLR = 1'b0;
    #100ps;

    // The 32-bit pattern in each mode, from both starting levels.
    send_pattern(MODE_MANCHESTER, 0);
    send_pattern(MODE_FM0, 2);
    send_pattern(MODE_FM0, 1);
    send_pattern(MODE_DIFF_MAN, 2);
    send_pattern(MODE_DIFF_MAN, 1);

    // Random data with random mode switches and occasional restarts.
    for (int i = 0; i < 3000; i++) begin
      enc_mode_e m;
      int r;
      m = mode;
      if ($urandom_range(0, 15) == 0) m = enc_mode_e'($urandom_range(0, 2));
      r = ($urandom_range(0, 63) == 0) ? int'($urandom_range(1, 2)) : 0;
      send_bit(1'($urandom), m, r);
    end

    // Power-clock recovery: every rail, OUT and OUT_b included, falls to 0,
    // and the cells evaluate again once pclk returns.
    #500ps pclk = 1'b0;
    #200ps;
    check(OUT, 1'b0, "OUT in recovery");
    check(OUT_b, 1'b0, "OUT_b in recovery");
    check(cell_and | cell_nand, 1'b0, "cell rails in recovery");
    n_recovery++;
    pclk = 1'b1;
    #200ps;
    check(OUT_b, ~OUT, "rails after recovery");
    // Restart cleanly after the recovery phase.
    send_bit(1'b0, MODE_DIFF_MAN, 2);
    send_bit(1'b1, MODE_DIFF_MAN, 0);

    // Stand-alone NAND/AND cell.
    for (int v = 0; v < 4; v++) begin
      {cell_x, cell_y} = 2'(v);
      #100ps;
      check(cell_and, cell_x & cell_y, "cell AND");
      check(cell_nand, ~(cell_x & cell_y), "cell NAND");
      n_cell++;
    end

    $display("bits: manchester=%0d fm0=%0d diff_manchester=%0d", n_bits[0], n_bits[1], n_bits[2]);
    $display("mode switches=%0d preset restarts=%0d clear restarts=%0d recovery phases=%0d",
             n_switch, n_preset, n_clear, n_recovery);
    $display("fm0 mid-bit toggles=%0d dm start toggles=%0d manchester low-high=%0d cell=%0d",
             n_fm0_mid, n_dm_start, n_man_bits_1, n_cell);
    foreach (n_bits[i]) if (n_bits[i] == 0) begin failures++; $display("FAIL mode %0d never ran", i); end
    if (n_switch == 0)     begin failures++; $display("FAIL no mode switch"); end
    if (n_preset == 0)     begin failures++; $display("FAIL no preset restart"); end
    if (n_clear == 0)      begin failures++; $display("FAIL no clear restart"); end
    if (n_recovery == 0)   begin failures++; $display("FAIL no recovery phase"); end
    if (n_fm0_mid == 0)    begin failures++; $display("FAIL no FM0 mid-bit toggle"); end
    if (n_dm_start == 0)   begin failures++; $display("FAIL no DM start toggle"); end
    if (n_man_bits_1 == 0) begin failures++; $display("FAIL no Manchester 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
