// Self-checking testbench for adc_apb_if.
//
// The testbench plays the ADC itself, driving DATA and BUSY, and an APB
// master. It checks that the result register loads DATA only on clock edges
// where BUSY is high, that a read takes two access cycles and returns that
// register's value in the second (PREADY high), that PRDATA is zero in every
// other cycle, and that a write is acknowledged in its first access cycle.
module tb_adc_apb_if;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clock = 1'b0;
  logic       nRST;
  logic       PSEL, PENABLE, PWRITE, PREADY, BUSY;
  logic [9:0] PRDATA, DATA;

  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_busy_low = 0;
  logic [9:0] model_latch;

  always #5 clock = ~clock;

  adc_apb_if dut (.*);

  // Independent model of the result register.
  always @(posedge clock or negedge nRST)
    if (!nRST) model_latch <= '0;
    else if (BUSY) model_latch <= DATA;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // New ADC output each cycle; BUSY random.
  task automatic adc_drive();
    DATA = 10'($urandom);
    BUSY = ($urandom_range(0, 2) != 0);
    if (!BUSY) n_busy_low++;
  endtask

  task automatic apb(input bit wr);
    int k = 0;
    @(negedge clock);
    adc_drive();
    PSEL = 1; PENABLE = 0; PWRITE = wr;
    #1 check(PRDATA == '0, "PRDATA zero in setup");
    do begin
      @(negedge clock);
      adc_drive();
      PENABLE = 1;
      k++;
      #1;
      if (!PREADY) check(PRDATA == '0, "PRDATA zero while waiting");
    end while (!PREADY && k < 20);
    if (wr) begin
      check(k == 1, $sformatf("write access cycles %0d", k));
      n_write++;
    end else begin
      check(k == 2, $sformatf("read access cycles %0d", k));
      check(PRDATA == model_latch, $sformatf("read data %h exp %h", PRDATA, model_latch));
      n_read++;
    end
    if ($urandom_range(0, 1) == 1) begin
      @(negedge clock);
      adc_drive();
      PSEL = 0; PENABLE = 0;
      #1 check(PRDATA == '0, "PRDATA zero when idle");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    PSEL = 0; PENABLE = 0; PWRITE = 0; DATA = 0; BUSY = 0;
    nRST = 1'b1;
    #1 nRST = 1'b0;
    repeat (3) @(posedge clock);
    nRST = 1'b1;
    // read with BUSY held low: register keeps its reset value
    @(negedge clock);
    DATA = 10'h155; BUSY = 0;
    @(negedge clock);
    PSEL = 1; PWRITE = 0;
    @(negedge clock);
    PENABLE = 1;
    @(negedge clock);
    #1 check(PREADY && PRDATA == 10'h000, "BUSY low: no latch");
    @(negedge clock);
    PSEL = 0; PENABLE = 0; BUSY = 1;
    @(negedge clock);
    BUSY = 0; DATA = 10'h2AA;
    @(negedge clock);
    PSEL = 1;
    @(negedge clock);
    PENABLE = 1;
    @(negedge clock);
    #1 check(PREADY && PRDATA == 10'h155, "value latched while BUSY high");
    @(negedge clock);
    PSEL = 0; PENABLE = 0;

    for (int i = 0; i < 500; i++) apb(1'($urandom_range(0, 3) == 0));

    $display("reads=%0d writes=%0d busy_low_cycles=%0d", n_read, n_write, n_busy_low);
    check(n_read > 0 && n_write > 0 && n_busy_low > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
