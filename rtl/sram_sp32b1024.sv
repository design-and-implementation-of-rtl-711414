// Behavioural model of the SP32B1024 single-port SRAM macro (1024 x 32).
//
// This is a simulation model of a process-specific memory macro, not the
// macro itself; in a chip it is replaced by the foundry block with the same
// ports. CEN and WEN are active low. On a rising clock edge with CEN and WEN
// low, D is written to word A. While CEN is low and WEN high the model shows
// mem[A] on Q in the same cycle (flow-through read); otherwise Q holds the
// last word read. Only the macro's name and ports come from the source
// design; this read timing and the zeroed initial contents are this model's
// own choices.
module sram_sp32b1024 #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 32
) (
  input  logic          clock,
  input  logic          CEN,
  input  logic          WEN,
  input  logic [AW-1:0] A,
  input  logic [DW-1:0] D,
  output logic [DW-1:0] Q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] q_hold;
  logic          rd;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  assign rd = !CEN && WEN;

  always_ff @(posedge clock) begin
    if (!CEN && !WEN) mem[A] <= D;
    if (rd) q_hold <= mem[A];
  end

  assign Q = rd ? mem[A] : q_hold;

endmodule
