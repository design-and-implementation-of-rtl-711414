// APB slave interface for a 12-bit R2R DAC.
//
// A write-control FSM runs the transfer:
//   startW     : idle; leaves when PSEL, PWRITE and PENABLE are all high
//   savePwdata : PWDATA[11:0] is saved in a register
//   working    : the DATA register in front of the DAC loads the saved code;
//                a delay counter counts the cycles spent here and the state
//                is left when it reads DELAY (the self loop is taken DELAY
//                times), giving the converter time to follow
//   readyW     : PREADY is high for one cycle and the transfer ends
// With DELAY = 4 a write's access phase is 8 clock cycles long (startW,
// savePwdata, five cycles in working, readyW). DATA keeps the last code until
// the next write. Reads are acknowledged at once (PREADY = 1 while PWRITE is
// low) and return no data; the interface has no PRDATA.
//
// The states, their order, the start condition and the four-cycle wait follow
// the source design. The holding DATA register, the read behaviour, the
// counter's exact timing and the asynchronous reset are this design's own
// choices. PADDR is not used: the interface answers any address it is
// selected for. Assertions check that PENABLE comes only with PSEL and that
// the master holds a write until PREADY.
//
// The assertions read nRST synchronously (to stay quiet during reset) while
// the registers use it as an asynchronous reset; lint reports this mix, and it
// is intended.
module dac_apb_if
  import openv_pkg::*;
#(
  parameter int unsigned DAC_BITS = 12,  // DAC resolution
  parameter int unsigned DELAY    = 4,   // self-loop count in 'working'
  parameter int unsigned PW       = 32   // APB data width
) (
  input  logic                clock,
  input  logic                nRST,
  input  logic                PSEL,
  input  logic                PENABLE,
  input  logic                PWRITE,
  input  logic [PW-1:0]       PWDATA,
  output logic                PREADY,
  output logic [DAC_BITS-1:0] DATA
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(DELAY + 1);

  dac_state_e          state;
  logic [CW-1:0]       delay;
  logic [DAC_BITS-1:0] pwdata_q;
  logic                preadyW;

  always_ff @(posedge clock or negedge nRST) begin
    if (!nRST) begin
      state    <= DAC_START_W;
      delay    <= '0;
      pwdata_q <= '0;
      DATA     <= '0;
    end else begin
      unique case (state)
        DAC_START_W:
          if (PSEL && PWRITE && PENABLE) state <= DAC_SAVE_PWDATA;
        DAC_SAVE_PWDATA: begin
          pwdata_q <= PWDATA[DAC_BITS-1:0];
          state    <= DAC_WORKING;
        end
        DAC_WORKING: begin
          DATA <= pwdata_q;
          if (delay == CW'(DELAY)) state <= DAC_READY_W;
          else                     delay <= delay + 1'b1;
        end
        DAC_READY_W:
          state <= DAC_START_W;
      endcase
      if (state != DAC_WORKING) delay <= '0;
    end
  end

  assign preadyW = (state == DAC_READY_W);
  assign PREADY  = PWRITE ? preadyW : 1'b1;

  // APB rules this interface relies on: PENABLE only with PSEL, and a write
  // stays in its access phase, with PWDATA held, until PREADY.
  always_ff @(posedge clock) begin
    if (nRST) begin
      a_penable_needs_psel : assert (!PENABLE || PSEL)
        else $error("dac_apb_if: PENABLE without PSEL");
      a_write_held : assert (state == DAC_START_W || (PSEL && PENABLE && PWRITE))
        else $error("dac_apb_if: write abandoned before PREADY");
    end
  end

endmodule
