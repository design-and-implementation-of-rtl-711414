// End-to-end testbench for openv_periph_top at its default sizes.
//
// Three masters run at the same time, one per bus port:
//   AHB-Lite: word, halfword and byte writes (read-modify-write in the SRAM),
//     single and pipelined reads, and ignored cycles, checked against a
//     reference memory; every read data phase is checked.
//   DAC APB: writes whose access phase must last 8 cycles, after which the
//     analog output must reach VDD * code / 4096 within the 100 ns settling
//     time; reads must be acknowledged at once.
//   ADC APB: reads (two access cycles) of the converter result. In loop-back
//     mode the ADC input is wired to the DAC output, so the value read must be
//     the DAC code divided by 4; otherwise a fixed level is applied and the
//     expected code is floor(VIN * 1024 / 1.8). Writes must be acknowledged at
//     once.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_openv_periph_top;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clock = 1'b0;
  logic        nRST;
  logic        HSELx, HWRITE, HMASTLOCK, HREADY, HREADYOUT, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [2:0]  HSIZE, HBURST;
  logic [3:0]  HPROT;
  logic [1:0]  HTRANS;
  logic        dac_psel, dac_penable, dac_pwrite, dac_pready;
  logic [31:0] dac_pwdata;
  real         dac_vout;
  logic        adc_psel, adc_penable, adc_pwrite, adc_pready;
  logic [31:0] adc_prdata;
  real         adc_vin, adc_level;
  bit          loopback;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sram_read = 0, n_sram_pipe = 0, n_sram_word = 0, n_sram_half = 0, n_sram_byte = 0;
  int n_sram_ignored = 0, n_dac_write = 0, n_dac_read = 0, n_adc_read = 0, n_adc_loop = 0;
  int n_adc_write = 0;

  always #5 clock = ~clock;
  assign adc_vin = loopback ? dac_vout : adc_level;

  openv_periph_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- AHB-Lite
  logic [31:0] refmem [1024];
  typedef struct packed {
    logic        valid;
    logic        wr;
    logic [9:0]  a;
    logic [2:0]  sz;
    logic [31:0] wd;
  } xfer_t;
  xfer_t dphase, w2;
  logic [31:0] w2_old;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] wd,
                                        input logic [2:0] sz);
    case (sz)
      3'd0:    return {old[31:8], wd[7:0]};
      3'd1:    return {old[31:16], wd[15:0]};
      default: return wd;
    endcase
  endfunction

  task automatic ahb_step(input bit sel, input logic [1:0] trans, input bit wr,
                          input logic [9:0] a, input logic [2:0] sz, input logic [31:0] wd);
    xfer_t nxt;
    @(negedge clock);
    HSELx = sel; HTRANS = trans; HREADY = 1'b1; HWRITE = wr;
    HADDR = {22'($urandom), a}; HSIZE = sz;
    HWDATA = (dphase.valid && dphase.wr) ? dphase.wd : $urandom;
    #1;
    check(HREADYOUT && !HRESP, "HREADYOUT/HRESP");
    if (dphase.valid && !dphase.wr)
      check(HRDATA == refmem[dphase.a],
            $sformatf("SRAM read a=%0d got %h exp %h", dphase.a, HRDATA, refmem[dphase.a]));
    // a write lands in the SRAM at the end of its second cycle
    if (w2.valid) refmem[w2.a] = merge(refmem[w2.a], w2.wd, w2.sz);
    nxt = '0;
    if (sel && trans == 2'd2) nxt = '{1'b1, wr, a, sz, wd};
    else n_sram_ignored++;
    if (nxt.valid && !nxt.wr) begin
      n_sram_read++;
      if (dphase.valid && !dphase.wr) n_sram_pipe++;
    end
    if (nxt.valid && nxt.wr) begin
      if (sz == 3'd0) n_sram_byte++;
      else if (sz == 3'd1) n_sram_half++;
      else n_sram_word++;
    end
    w2 = (dphase.valid && dphase.wr) ? dphase : '0;
    dphase = nxt;
  endtask

  task automatic ahb_master(input int n);
    for (int i = 0; i < n; i++) begin
      automatic int unsigned kind = $urandom_range(0, 9);
      automatic logic [9:0] a = ($urandom_range(0, 1) == 1) ? 10'($urandom_range(0, 7))
                                                            : 10'($urandom);
      if (kind < 4) begin
        ahb_step(1'b1, 2'd2, 1'b1, a, 3'($urandom_range(0, 2)), $urandom);
        ahb_step(1'b0, 2'd0, 1'b0, '0, 3'd2, '0);        // data phase of the write
      end else if (kind < 8) ahb_step(1'b1, 2'd2, 1'b0, a, 3'd2, '0);
      else if (kind == 8) ahb_step(1'b0, 2'd2, 1'($urandom), a, 3'd2, '0);
      else ahb_step(1'b1, 2'd3, 1'($urandom), a, 3'd2, '0);
    end
    ahb_step(1'b0, 2'd0, 1'b0, '0, 3'd2, '0);
    ahb_step(1'b0, 2'd0, 1'b0, '0, 3'd2, '0);
    for (int i = 0; i < 8; i++) ahb_step(1'b1, 2'd2, 1'b0, 10'(i), 3'd2, '0);
    ahb_step(1'b0, 2'd0, 1'b0, '0, 3'd2, '0);
  endtask

  // ---------------------------------------------------------------- DAC APB
  logic [11:0] dac_code;

  function automatic bit close(input real x, input real y);
    return (x - y < 1.0e-9) && (y - x < 1.0e-9);
  endfunction

  task automatic dac_write(input logic [11:0] code);
    int k = 0;
    @(negedge clock);
    dac_psel = 1; dac_penable = 0; dac_pwrite = 1; dac_pwdata = {20'($urandom), code};
    do begin
      @(negedge clock);
      dac_penable = 1;
      k++;
      #1;
    end while (!dac_pready && k < 50);
    check(k == 8, $sformatf("DAC write access cycles %0d", k));
    @(negedge clock);
    dac_psel = 0; dac_penable = 0;
    dac_code = code;
    n_dac_write++;
    #110 check(close(dac_vout, 1.8 * code / 4096.0),
               $sformatf("DAC output %f for code %0d", dac_vout, code));
  endtask

  task automatic dac_read();
    int k = 0;
    @(negedge clock);
    dac_psel = 1; dac_penable = 0; dac_pwrite = 0;
    do begin
      @(negedge clock);
      dac_penable = 1;
      k++;
      #1;
    end while (!dac_pready && k < 50);
    check(k == 1, "DAC read acknowledged at once");
    n_dac_read++;
    @(negedge clock);
    dac_psel = 0; dac_penable = 0;
  endtask

  // ---------------------------------------------------------------- ADC APB
  task automatic adc_read(output logic [31:0] d);
    int k = 0;
    @(negedge clock);
    adc_psel = 1; adc_penable = 0; adc_pwrite = 0;
    do begin
      @(negedge clock);
      adc_penable = 1;
      k++;
      #1;
    end while (!adc_pready && k < 50);
    check(k == 2, $sformatf("ADC read access cycles %0d", k));
    d = adc_prdata;
    n_adc_read++;
    @(negedge clock);
    adc_psel = 0; adc_penable = 0;
  endtask

  task automatic adc_write();
    int k = 0;
    @(negedge clock);
    adc_psel = 1; adc_penable = 0; adc_pwrite = 1;
    do begin
      @(negedge clock);
      adc_penable = 1;
      k++;
      #1;
    end while (!adc_pready && k < 50);
    check(k == 1, "ADC write acknowledged at once");
    n_adc_write++;
    @(negedge clock);
    adc_psel = 0; adc_penable = 0;
  endtask

  function automatic int adc_expect(input real v);
    int c = int'($floor(v / 1.8 * 1024.0));   // same operation order as the model
    return (c < 0) ? 0 : (c > 1023) ? 1023 : c;
  endfunction

  task automatic analog_master(input int n);
    logic [31:0] d;
    for (int i = 0; i < n; i++) begin
      automatic logic [11:0] code = 12'($urandom);
      // loop-back: DAC output into ADC input
      loopback = 1'b1;
      dac_write(code);
      repeat (2 * 16 + 2) @(negedge clock);   // two full conversions
      adc_read(d);
      // floor(code / 4); when code is a multiple of 4 the analog value sits on
      // a decision threshold and rounding may give one code less
      check(d == 32'(code >> 2) || (code[1:0] == 2'b00 && d + 1 == 32'(code >> 2)),
            $sformatf("loop-back code %0d read %0d", code, d));
      n_adc_loop++;
      // fixed input level
      loopback = 1'b0;
      adc_level = real'($urandom_range(0, 2000)) / 1000.0;
      repeat (2 * 16 + 2) @(negedge clock);
      adc_read(d);
      check(d == 32'(adc_expect(adc_level)),
            $sformatf("ADC level %f read %0d exp %0d", adc_level, d, adc_expect(adc_level)));
      if (i % 4 == 0) begin
        dac_read();
        adc_write();
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (refmem[i]) refmem[i] = '0;
    dphase = '0; w2 = '0; w2_old = '0;
    HSELx = 0; HTRANS = 0; HREADY = 1; HWRITE = 0; HADDR = 0; HSIZE = 0; HWDATA = 0;
    HBURST = 0; HPROT = 0; HMASTLOCK = 0;
    dac_psel = 0; dac_penable = 0; dac_pwrite = 0; dac_pwdata = 0; dac_code = 0;
    adc_psel = 0; adc_penable = 0; adc_pwrite = 0;
    adc_level = 0.0; loopback = 1'b0;
    nRST = 1'b1;
    #1 nRST = 1'b0;
    repeat (3) @(posedge clock);
    nRST = 1'b1;

    fork
      ahb_master(6000);
      analog_master(40);
    join

    $display("sram: reads=%0d pipelined=%0d word=%0d half=%0d byte=%0d ignored=%0d",
             n_sram_read, n_sram_pipe, n_sram_word, n_sram_half, n_sram_byte, n_sram_ignored);
    $display("dac: writes=%0d reads=%0d  adc: reads=%0d loop-back=%0d writes=%0d",
             n_dac_write, n_dac_read, n_adc_read, n_adc_loop, n_adc_write);
    check(n_sram_read > 0, "SRAM read happened");
    check(n_sram_pipe > 0, "SRAM pipelined read happened");
    check(n_sram_word > 0, "SRAM word write happened");
    check(n_sram_half > 0, "SRAM halfword read-modify-write happened");
    check(n_sram_byte > 0, "SRAM byte read-modify-write happened");
    check(n_sram_ignored > 0, "SRAM ignored cycle happened");
    check(n_dac_write > 0 && n_dac_read > 0, "DAC write wait and read happened");
    check(n_adc_read > 0 && n_adc_loop > 0 && n_adc_write > 0, "ADC reads and write happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
