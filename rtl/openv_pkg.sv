// Shared types and constants for the Open-V v.2 peripheral interfaces.
//
// Holds the AHB-Lite transfer-type and transfer-size encodings used by the
// SRAM interface, and the state encodings of the three interface FSMs so that
// testbenches can name states without repeating the numbers. The encodings of
// HTRANS and HSIZE are those of the AMBA AHB-Lite protocol; the FSM state
// names follow the state diagrams of the DAC and ADC interfaces, and the SRAM
// interface states are this design's own naming of its read/write sequencer.
package openv_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // AHB-Lite transfer type (HTRANS)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'd0,
    HTRANS_BUSY   = 2'd1,
    HTRANS_NONSEQ = 2'd2,
    HTRANS_SEQ    = 2'd3
  } htrans_e;

  // AHB-Lite transfer size (HSIZE)
  localparam logic [2:0] HSIZE_BYTE = 3'd0;
  localparam logic [2:0] HSIZE_HALF = 3'd1;
  localparam logic [2:0] HSIZE_WORD = 3'd2;

  // SRAM interface sequencer
  typedef enum logic [1:0] {
    SRAM_IDLE = 2'd0,  // no SRAM access
    SRAM_RD   = 2'd1,  // reading1: read the addressed word
    SRAM_W1   = 2'd2,  // writing1: read the old word, capture write data
    SRAM_W2   = 2'd3   // writing1 + writing2: write the merged word
  } sram_state_e;

  // DAC interface write-control FSM
  typedef enum logic [1:0] {
    DAC_START_W     = 2'd0,
    DAC_SAVE_PWDATA = 2'd1,
    DAC_WORKING     = 2'd2,
    DAC_READY_W     = 2'd3
  } dac_state_e;

  // ADC interface control FSM
  typedef enum logic {
    ADC_START_R = 1'b0,
    ADC_PROCESS = 1'b1
  } adc_state_e;

endpackage
