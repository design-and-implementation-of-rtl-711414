// Self-checking testbench for sram_ahb_if with the SP32B1024 SRAM model.
//
// An AHB-Lite master drives directed and then random transfers: word,
// halfword and byte writes, single and back-to-back (pipelined) reads, and
// cycles the interface must ignore (not selected, HREADY low, IDLE, BUSY and
// SEQ). Every cycle the testbench checks HREADYOUT/HRESP and the SRAM strobes
// against the expected sequence (read: CEN=0 WEN=1 in the data phase; write:
// a read cycle then a write cycle), checks A and D, and checks HRDATA in
// each read data phase against a reference memory kept by the testbench.
// Masters leave one cycle without a new transfer after each write.
module tb_sram_ahb_if;
  timeunit 1ns;
  timeprecision 1ps;
  import openv_pkg::*;

  logic        clock = 1'b0;
  logic        nRST;
  logic        HSELx, HWRITE, HMASTLOCK, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [2:0]  HSIZE, HBURST;
  logic [3:0]  HPROT;
  logic [1:0]  HTRANS;
  logic        HREADYOUT, HRESP, CEN, WEN;
  logic [9:0]  A;
  logic [31:0] D, Q;

  int checks = 0, failures = 0;
  int n_read = 0, n_pipe_read = 0, n_wr_word = 0, n_wr_half = 0, n_wr_byte = 0, n_ignored = 0;

  always #5 clock = ~clock;

  sram_ahb_if dut (.*);
  sram_sp32b1024 u_sram (.clock, .CEN, .WEN, .A, .D, .Q);

  logic [31:0] refmem [1024];

  typedef struct packed {
    logic        valid;
    logic        wr;
    logic [9:0]  a;
    logic [2:0]  sz;
    logic [31:0] wd;
  } xfer_t;

  xfer_t dphase;   // transfer in its data phase this cycle
  xfer_t w2;       // write in its second SRAM cycle this cycle

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] wd,
                                        input logic [2:0] sz);
    case (sz)
      3'd0:    return {old[31:8], wd[7:0]};
      3'd1:    return {old[31:16], wd[15:0]};
      default: return wd;
    endcase
  endfunction

  // One bus cycle: drive the address phase of a (possible) new transfer and
  // the write data of the transfer in its data phase, then check outputs.
  task automatic step(input bit sel, input logic [1:0] trans, input bit rdy, input bit wr,
                      input logic [9:0] a, input logic [2:0] sz, input logic [31:0] wd);
    xfer_t nxt;
    @(negedge clock);
    HSELx  = sel;
    HTRANS = trans;
    HREADY = rdy;
    HWRITE = wr;
    HADDR  = {22'($urandom), a};
    HSIZE  = sz;
    HBURST = 3'($urandom);
    HPROT  = 4'($urandom);
    HMASTLOCK = 1'($urandom);
    HWDATA = (dphase.valid && dphase.wr) ? dphase.wd : $urandom;
    #1;
    check(HREADYOUT == 1'b1 && HRESP == 1'b0, "HREADYOUT/HRESP");
    if (dphase.valid && !dphase.wr) begin
      check(CEN == 1'b0 && WEN == 1'b1 && A == dphase.a, "read strobes");
      check(HRDATA == refmem[dphase.a],
            $sformatf("read data a=%0d got %h exp %h", dphase.a, HRDATA, refmem[dphase.a]));
    end else if (dphase.valid && dphase.wr) begin
      check(CEN == 1'b0 && WEN == 1'b1 && A == dphase.a, "write cycle 1 strobes");
    end else if (w2.valid) begin
      check(CEN == 1'b0 && WEN == 1'b0 && A == w2.a, "write cycle 2 strobes");
      check(D == merge(refmem[w2.a], w2.wd, w2.sz),
            $sformatf("write data sz=%0d got %h exp %h", w2.sz, D, merge(refmem[w2.a], w2.wd, w2.sz)));
      refmem[w2.a] = merge(refmem[w2.a], w2.wd, w2.sz);
    end else begin
      check(CEN == 1'b1, "SRAM idle");
    end
    nxt = '0;
    if (sel && rdy && trans == 2'd2) nxt = '{1'b1, wr, a, sz, wd};
    else if (trans == 2'd2 || (sel && trans != 2'd0)) n_ignored++;
    if (nxt.valid && !nxt.wr) begin
      n_read++;
      if (dphase.valid && !dphase.wr) n_pipe_read++;
    end
    if (nxt.valid && nxt.wr) begin
      if (sz == 3'd0) n_wr_byte++;
      else if (sz == 3'd1) n_wr_half++;
      else n_wr_word++;
    end
    w2     = (dphase.valid && dphase.wr) ? dphase : '0;
    dphase = nxt;
  endtask

  task automatic idle();
    step(1'b0, 2'd0, 1'b1, 1'b0, '0, 3'd2, '0);
  endtask
  task automatic wr(input logic [9:0] a, input logic [2:0] sz, input logic [31:0] d);
    step(1'b1, 2'd2, 1'b1, 1'b1, a, sz, d);
    idle();  // data phase of the write: no new transfer
  endtask
  task automatic rd(input logic [9:0] a);
    step(1'b1, 2'd2, 1'b1, 1'b0, a, 3'd2, '0);
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (refmem[i]) refmem[i] = '0;
    dphase = '0;
    w2 = '0;
    HSELx = 0; HTRANS = 0; HREADY = 1; HWRITE = 0; HADDR = 0; HSIZE = 0;
    HWDATA = 0; HBURST = 0; HPROT = 0; HMASTLOCK = 0;
    nRST = 1'b1;
    #1 nRST = 1'b0;   // falling edge: asynchronous reset before the first clock
    repeat (3) @(posedge clock);
    nRST = 1'b1;

    // directed: word write, read back, halfword and byte merge
    wr(10'd5, 3'd2, 32'hDEADBEEF);
    rd(10'd5);
    wr(10'd5, 3'd1, 32'h1234_5678);   // -> DEAD5678
    rd(10'd5);
    wr(10'd5, 3'd0, 32'hFFFF_FFAB);   // -> DEAD56AB
    rd(10'd5);
    idle();
    idle();
    check(refmem[5] == 32'hDEAD56AB, "directed merge result");
    // pipelined reads
    wr(10'd1023, 3'd2, 32'hCAFE0001);
    rd(10'd1023); rd(10'd5); rd(10'd1023); rd(10'd0);
    idle();

    // random traffic
    for (int i = 0; i < 20000; i++) begin
      automatic int unsigned kind = $urandom_range(0, 9);
      automatic logic [9:0] a = 10'($urandom_range(0, 15));   // small window: many hits
      if (kind < 3) wr(a, 3'($urandom_range(0, 4)), $urandom);
      else if (kind < 7) rd(a);
      else if (kind == 7) idle();
      else if (kind == 8) step(1'b0, 2'd2, 1'b1, 1'($urandom), a, 3'd2, $urandom); // not selected
      else begin                                                        // IDLE/BUSY/SEQ
        automatic logic [1:0] t = 2'($urandom_range(0, 2));
        step(1'b1, (t == 2'd2) ? 2'd3 : t, 1'($urandom), 1'($urandom), a, 3'd2, $urandom);
      end
    end
    // HREADY low with NONSEQ must be ignored too
    step(1'b1, 2'd2, 1'b0, 1'b0, 10'd3, 3'd2, '0);
    idle(); idle();
    // read every address once more
    for (int i = 0; i < 1024; i++) rd(10'(i));
    idle(); idle();

    $display("reads=%0d pipelined=%0d word=%0d half=%0d byte=%0d ignored=%0d",
             n_read, n_pipe_read, n_wr_word, n_wr_half, n_wr_byte, n_ignored);
    check(n_read > 0 && n_pipe_read > 0 && n_wr_word > 0 && n_wr_half > 0 && n_wr_byte > 0
          && n_ignored > 0, "all transfer kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
