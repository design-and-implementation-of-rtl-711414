// Self-checking testbench for dac_apb_if.
//
// An APB master performs writes (with and without idle cycles between them)
// and reads. For each write it counts the access-phase cycles until PREADY
// and expects DELAY + 4 (startW, savePwdata, DELAY + 1 cycles in working,
// readyW), and checks cycle by cycle that DATA keeps the old code until the
// first 'working' cycle has passed and then shows PWDATA[11:0]. Reads must be
// acknowledged in their first access cycle and leave DATA alone. Setup-only
// and unselected cycles must not start a write.
module tb_dac_apb_if;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DELAY = 4;

  logic        clock = 1'b0;
  logic        nRST;
  logic        PSEL, PENABLE, PWRITE, PREADY;
  logic [31:0] PWDATA;
  logic [11:0] DATA;

  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_b2b = 0;
  logic [11:0] expect_data;

  always #5 clock = ~clock;

  dac_apb_if dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic apb_write(input logic [31:0] wd, input bit idle_after);
    int k = 0;
    logic [11:0] old = expect_data;
    @(negedge clock);
    PSEL = 1; PENABLE = 0; PWRITE = 1; PWDATA = wd;          // setup
    #1 check(DATA == old, "DATA before access");
    do begin
      @(negedge clock);
      PENABLE = 1;
      k++;
      #1;
      if (k <= 3) check(DATA == old, $sformatf("DATA still old at access cycle %0d", k));
      else        check(DATA == wd[11:0], $sformatf("DATA new at access cycle %0d", k));
    end while (!PREADY && k < 50);
    check(k == DELAY + 4, $sformatf("write access cycles %0d, expected %0d", k, DELAY + 4));
    expect_data = wd[11:0];
    n_write++;
    if (idle_after) begin
      @(negedge clock);
      PSEL = 0; PENABLE = 0; PWDATA = $urandom;
    end else n_b2b++;
  endtask

  task automatic apb_read();
    int k = 0;
    @(negedge clock);
    PSEL = 1; PENABLE = 0; PWRITE = 0; PWDATA = $urandom;
    do begin
      @(negedge clock);
      PENABLE = 1;
      k++;
      #1;
    end while (!PREADY && k < 50);
    check(k == 1, $sformatf("read access cycles %0d", k));
    check(DATA == expect_data, "DATA unchanged by read");
    n_read++;
    @(negedge clock);
    PSEL = 0; PENABLE = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    PSEL = 0; PENABLE = 0; PWRITE = 0; PWDATA = 0;
    expect_data = '0;
    nRST = 1'b1;
    #1 nRST = 1'b0;
    repeat (3) @(posedge clock);
    nRST = 1'b1;
    check(DATA == 12'd0, "DATA after reset");

    apb_write(32'h0000_0ABC, 1'b1);
    apb_write(32'hFFFF_F123, 1'b0);      // back-to-back: next setup follows at once
    apb_write(32'h0000_0FFF, 1'b1);
    apb_read();
    // setup phases and unselected cycles must not start a write
    for (int i = 0; i < 20; i++) begin
      @(negedge clock);
      PSEL = 1'($urandom); PENABLE = 0; PWRITE = 1'($urandom); PWDATA = $urandom;
      #1 check(DATA == expect_data, "no write without PSEL & PENABLE");
    end
    @(negedge clock);
    PSEL = 0; PENABLE = 0;
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 3) == 0) apb_read();
      else apb_write($urandom, 1'($urandom));
    end
    repeat (3) @(negedge clock);
    #1 check(DATA == expect_data, "DATA holds last code");

    $display("writes=%0d back_to_back=%0d reads=%0d", n_write, n_b2b, n_read);
    check(n_write > 0 && n_b2b > 0 && n_read > 0, "all transfer kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
