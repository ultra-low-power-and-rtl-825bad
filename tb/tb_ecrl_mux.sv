// tb_ecrl_mux -- self-checking test of the ecrl_mux cell model.
//
// Applies every combination of the true inputs, with the complement inputs
// driven as their inverses, under both power-clock levels. For each it checks
// that the outputs still hold their old values 5 ps before the cell delay has
// passed and hold the new values 5 ps after it: with pclk = 1 the rails must
// carry s ? x : y and its complement, with pclk = 0 both rails must be 0.
module tb_ecrl_mux;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned TPD_PS = 20;
  localparam int          NIN    = 3;

  logic [NIN-1:0] v = '0;
  logic           pclk = 1'b0;
  logic           out, out_b;

  ecrl_mux #(.TPD_PS(TPD_PS)) dut (.pclk(pclk), .s(v[2]), .s_b(~v[2]), .x(v[1]), .x_b(~v[1]), .y(v[0]), .y_b(~v[0]), .out(out), .out_b(out_b));

  int checks = 0, failures = 0;

  function automatic logic f(logic [NIN-1:0] a);
    return a[2] ? a[1] : a[0];
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: v=%b pclk=%0b got %0b expected %0b", what, v, pclk, got, exp);
    end
  endtask

  initial begin
    #(100ns);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_out, old_out_b, exp;
    #(1ns);
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < (1 << NIN); i++) begin
        old_out   = out;
        old_out_b = out_b;
        pclk = 1'(p);
        v    = NIN'(i);
        exp  = f(v);
        #((TPD_PS - 5) * 1ps);
        check(out,   old_out,   "out before delay");
        check(out_b, old_out_b, "out_b before delay");
        #(10ps);
        check(out,   pclk & exp,  "out");
        check(out_b, pclk & ~exp, "out_b");
        #(200ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
