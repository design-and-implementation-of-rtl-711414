// Self-checking testbench for the adc_model behavioural model.
//
// Holds VIN at several levels (inside, at and beyond the range) and checks
// that BUSY drops for exactly one cycle every 16 clocks, that DATA changes
// only in that cycle, and that the new DATA equals floor(VIN / 1.8 * 1024)
// clamped to 0..1023.
module tb_adc_model;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clock = 1'b0;
  logic       nRST;
  real        VIN;
  logic [9:0] DATA;
  logic       BUSY;
  int checks = 0, failures = 0;

  always #5 clock = ~clock;

  adc_model dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int expect_code(input real v);
    int c;
    c = int'($floor(v / 1.8 * 1024.0));
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    return c;
  endfunction

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real        levels [8] = '{0.0, 0.9, 1.7999, 2.5, -0.3, 0.123, 1.0, 0.00175};
  logic [9:0] prev;
  int         since;

  initial begin
    VIN = 0.0;
    nRST = 1'b1;
    #1 nRST = 1'b0;
    repeat (2) @(posedge clock);
    @(negedge clock) nRST = 1'b1;
    // align to the first BUSY-low cycle
    do @(negedge clock); while (BUSY);
    prev = DATA;
    foreach (levels[i]) begin
      VIN = levels[i];
      since = 0;
      do begin
        @(negedge clock);
        since++;
        if (BUSY) check(DATA == prev, "DATA stable while BUSY high");
      end while (BUSY && since < 40);
      check(since == 16, $sformatf("conversion period %0d", since));
      check(int'(DATA) == expect_code(VIN),
            $sformatf("VIN %f -> %0d, expected %0d", VIN, DATA, expect_code(VIN)));
      prev = DATA;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
