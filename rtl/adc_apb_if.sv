// APB slave interface for a 10-bit ADC.
//
// The ADC result DATA is copied into register latchDATA on every clock edge
// at which the ADC's BUSY output is high, so the register always holds a
// settled result. A two-state FSM serves reads:
//   startR  : waits for PSEL & !PWRITE & PENABLE (a read access phase)
//   process : enData is high, PRDATA shows latchDATA, PREADY ends the read
// and returns to startR. Outside 'process' PRDATA is zero. PREADY is chosen
// by PWRITE between PreadyW (high in startR) and PreadyR (high in process),
// so a read takes two access cycles and a write is acknowledged at once and
// changes nothing.
//
// The latch with BUSY as enable, the PRDATA mux with a zero input, the PREADY
// mux and the FSM follow the source design. Raising PreadyR in 'process' (the
// cycle that carries the data) and the asynchronous reset are this design's
// own choices. PADDR is not used. Assertions check that PENABLE comes only
// with PSEL and that the master holds a read until PREADY.
//
// The assertions read nRST synchronously (to stay quiet during reset) while
// the registers use it as an asynchronous reset; lint reports this mix, and it
// is intended.
module adc_apb_if
  import openv_pkg::*;
#(
  parameter int unsigned ADC_BITS = 10  // ADC resolution and PRDATA width
) (
  input  logic                clock,
  input  logic                nRST,
  input  logic                PSEL,
  input  logic                PENABLE,
  input  logic                PWRITE,
  output logic [ADC_BITS-1:0] PRDATA,
  output logic                PREADY,
  input  logic [ADC_BITS-1:0] DATA,
  input  logic                BUSY
);
  timeunit 1ns;
  timeprecision 1ps;

  adc_state_e          state;
  logic [ADC_BITS-1:0] latchDATA;
  logic                enData, preadyW, preadyR;

  always_ff @(posedge clock or negedge nRST) begin
    if (!nRST) latchDATA <= '0;
    else if (BUSY) latchDATA <= DATA;
  end

  always_ff @(posedge clock or negedge nRST) begin
    if (!nRST) state <= ADC_START_R;
    else begin
      unique case (state)
        ADC_START_R: if (PSEL && !PWRITE && PENABLE) state <= ADC_PROCESS;
        ADC_PROCESS: state <= ADC_START_R;
      endcase
    end
  end

  assign enData  = (state == ADC_PROCESS);
  assign preadyW = (state == ADC_START_R);
  assign preadyR = (state == ADC_PROCESS);
  assign PRDATA  = enData ? latchDATA : '0;
  assign PREADY  = PWRITE ? preadyW : preadyR;

  // APB rules this interface relies on: PENABLE only with PSEL, and a read
  // stays in its access phase until PREADY.
  always_ff @(posedge clock) begin
    if (nRST) begin
      a_penable_needs_psel : assert (!PENABLE || PSEL)
        else $error("adc_apb_if: PENABLE without PSEL");
      a_read_held : assert (state == ADC_START_R || (PSEL && PENABLE && !PWRITE))
        else $error("adc_apb_if: read abandoned before PREADY");
    end
  end

endmodule
