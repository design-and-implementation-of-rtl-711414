// Self-checking testbench for the dac_r2r behavioural model.
//
// Applies codes (the ends of the range and random values) and checks that
// VOUT still shows the previous level 99 ns after the change and shows
// VDD * code / 4096 after 101 ns, i.e. the 100 ns settling time.
module tb_dac_r2r;
  timeunit 1ns;
  timeprecision 1ps;

  logic [11:0] DATA;
  real         VOUT;
  int checks = 0, failures = 0;

  dac_r2r dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic bit close(input real a, input real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  task automatic apply(input logic [11:0] code);
    real v_old = VOUT;
    real want = 1.8 * code / 4096.0;
    DATA = code;
    #99 check(close(VOUT, v_old), $sformatf("VOUT settled too early for %0d", code));
    #2  check(close(VOUT, want), $sformatf("VOUT %f for code %0d, expected %f", VOUT, code, want));
    #20;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    DATA = 12'd0;
    #200 check(close(VOUT, 0.0), "VOUT at code 0");
    apply(12'd4095);
    check(VOUT > 1.799 && VOUT < 1.8, "full scale just below VDD");
    apply(12'd2048);
    check(close(VOUT, 0.9), "mid scale is VDD/2");
    apply(12'd1);
    for (int i = 0; i < 50; i++) apply(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
