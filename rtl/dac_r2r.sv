// Behavioural model of a 12-bit R2R digital-to-analog converter.
//
// Simulation model of an analog block, not synthesizable logic. An ideal R2R
// ladder with rail-to-rail output gives VOUT = VDD * DATA / 2^BITS. The model
// applies each new code T_SETTLE_NS after DATA changes (a transport delay
// standing for the typical settling time), so a code held for less than that
// time never appears at the output. Resolution, R2R structure, rail-to-rail
// output and the 100 ns settling time follow the source design; the supply
// value and the ideal transfer function are this model's assumptions.
module dac_r2r #(
  parameter int unsigned BITS        = 12,
  parameter int unsigned T_SETTLE_NS = 100,
  parameter real         VDD         = 1.8
) (
  input  logic [BITS-1:0] DATA,
  output real             VOUT
);
  timeunit 1ns;
  timeprecision 1ps;

  initial VOUT = 0.0;

  always @(DATA) begin
    VOUT <= #(T_SETTLE_NS * 1ns) VDD * real'(DATA) / real'(2**BITS);
  end

endmodule
