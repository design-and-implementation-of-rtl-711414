// Behavioural model of a free-running 10-bit analog-to-digital converter.
//
// Simulation model of an analog block. Every CONV_CYCLES clocks it samples
// VIN and puts floor(VIN / VREF * 2^BITS), clamped to the code range, on
// DATA. BUSY is low during the one cycle in which DATA has just changed and
// high otherwise, so a register enabled by BUSY only ever loads a settled
// result. The 10-bit DATA output and the BUSY signal are the ports the source
// design connects to; conversion time, reference voltage and BUSY timing are
// this model's assumptions.
module adc_model #(
  parameter int unsigned BITS        = 10,
  parameter int unsigned CONV_CYCLES = 16,
  parameter real         VREF        = 1.8
) (
  input  logic            clock,
  input  logic            nRST,
  input  real             VIN,
  output logic [BITS-1:0] DATA,
  output logic            BUSY
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNTW = $clog2(CONV_CYCLES);

  logic [CNTW-1:0] cnt;
  int              code;

  always_comb begin
    code = int'($floor(VIN / VREF * real'(2**BITS)));
    if (code < 0) code = 0;
    if (code > 2**BITS - 1) code = 2**BITS - 1;
  end

  always_ff @(posedge clock or negedge nRST) begin
    if (!nRST) begin
      cnt  <= '0;
      DATA <= '0;
      BUSY <= 1'b0;
    end else begin
      BUSY <= 1'b1;
      if (cnt == CNTW'(CONV_CYCLES - 1)) begin
        cnt  <= '0;
        DATA <= BITS'(code);
        BUSY <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
