// Self-checking testbench for the sram_sp32b1024 behavioural model.
//
// Random cycles of write (CEN=0 WEN=0), read (CEN=0 WEN=1), and deselect
// (CEN=1, with WEN random, which must neither write nor change Q) are checked
// against a reference array: reads show mem[A] in the same cycle, and Q holds
// the last word read while the macro is deselected or writing.
module tb_sram_sp32b1024;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clock = 1'b0;
  logic        CEN, WEN;
  logic [9:0]  A;
  logic [31:0] D, Q;
  logic [31:0] refmem [1024];
  logic [31:0] last_q;
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0, n_off = 0;

  always #5 clock = ~clock;

  sram_sp32b1024 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (refmem[i]) refmem[i] = '0;
    CEN = 1; WEN = 1; A = 0; D = 0;
    // establish a known Q
    @(negedge clock);
    CEN = 0; WEN = 1; A = 10'd7;
    #1 check(Q == 32'd0, "initial contents zero");
    last_q = Q;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clock);
      A = 10'($urandom_range(0, 31));
      D = $urandom;
      case ($urandom_range(0, 2))
        0: begin CEN = 0; WEN = 0; end
        1: begin CEN = 0; WEN = 1; end
        default: begin CEN = 1; WEN = 1'($urandom); end
      endcase
      #1;
      if (!CEN && WEN) begin
        check(Q == refmem[A], $sformatf("read a=%0d got %h exp %h", A, Q, refmem[A]));
        last_q = refmem[A];
        n_rd++;
      end else begin
        check(Q == last_q, "Q holds");
        if (!CEN) begin
          refmem[A] = D;
          n_wr++;
        end else n_off++;
      end
    end
    $display("reads=%0d writes=%0d deselected=%0d", n_rd, n_wr, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
