// tb_dff_pc -- self-checking test of the edge-triggered flip-flop with
// asynchronous preset and clear.
//
// Random data is clocked in with both asynchronous inputs inactive and q is
// compared with the value d had at the rising edge, one edge of latency. Then
// clear and preset are pulsed between clock edges: q must change at once,
// without a clock edge, and stay after release until the next edge; with
// both low, clear must win; a falling clock edge must not load d. qb is
// compared with the complement of q throughout.
module tb_dff_pc;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, d = 1'b0, preset_n = 1'b1, clear_n = 1'b1;
  logic q, qb;
  logic exp_q = 1'b0;

  dff_pc dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic exp, input string what);
    checks += 2;
    if (q !== exp || qb !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%0b qb=%0b expected q=%0b (t=%0t)", what, q, qb, exp, $time);
    end
  endtask

  initial begin
    #(10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ps clear_n = 1'b0;
    #1ns check(1'b0, "clear at start");
    clear_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int act;
      act = int'($urandom_range(0, 9));
      d = 1'($urandom);
      #1ns;
      clk = 1'b1;
      exp_q = d;
      #1ps;
      d = ~d;                        // data change after the edge: no effect
      #1ns;
      check(exp_q, "after rising edge");
      clk = 1'b0;
      #1ns;
      check(exp_q, "after falling edge");
      if (act == 0) begin            // clear pulse
        clear_n = 1'b0; #100ps check(1'b0, "during clear");
        clear_n = 1'b1; #100ps check(1'b0, "after clear");
        exp_q = 1'b0;
      end else if (act == 1) begin   // preset pulse
        preset_n = 1'b0; #100ps check(1'b1, "during preset");
        preset_n = 1'b1; #100ps check(1'b1, "after preset");
        exp_q = 1'b1;
      end else if (act == 2) begin   // both: clear wins
        preset_n = 1'b0; clear_n = 1'b0; #100ps check(1'b0, "clear over preset");
        clear_n = 1'b1; preset_n = 1'b1; #100ps;
        exp_q = 1'b0;
      end else if (act == 3) begin   // preset held across a clock edge
        preset_n = 1'b0;
        #100ps clk = 1'b1; #100ps check(1'b1, "preset held at edge");
        clk = 1'b0; preset_n = 1'b1; #100ps check(1'b1, "preset released");
        exp_q = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
