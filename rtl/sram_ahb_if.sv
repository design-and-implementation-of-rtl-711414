// AHB-Lite slave interface for a 1024 x 32 single-port SRAM macro.
//
// A transfer is taken when HSELx and HREADY are high and HTRANS is NONSEQ (2).
// In that address phase the word address HADDR[9:0] is stored in register AP,
// which drives the SRAM address A, and HSIZE is stored with it. A small
// sequencer then produces the SRAM strobes:
//   read : one cycle READ  (reading1)           CEN=0 WEN=1, HRDATA = Q
//   write: one cycle W1    (writing1)           CEN=0 WEN=1, old word read,
//                                               QP <= Q, DP <= HWDATA
//          one cycle W2    (writing1, writing2) CEN=0 WEN=0, D written
// CEN is the NOR of reading1 and writing1, WEN the inverse of writing2. The
// word written is chosen by the stored HSIZE: byte {QP[31:8],DP[7:0]},
// halfword {QP[31:16],DP[15:0]}, anything larger DP. Partial writes are
// therefore read-modify-write, and always update the low lanes of the
// addressed word, because every bus address selects a whole 32-bit word.
//
// HREADYOUT is always 1 and HRESP always OKAY; HRDATA is always the SRAM
// output Q. With a flow-through SRAM the read word is on HRDATA in the
// AHB data phase. A write occupies the SRAM in its data phase and in the cycle
// after; the master must not start a transfer in the data phase of a write
// (an assertion flags it, and such a transfer is not taken).
//
// Follows the source design: the registers for address, SRAM output and write
// data, the "HTRANS = 2" capture condition, the CEN/WEN gates, the HSIZE mux
// and the tied HREADYOUT/HRESP/HRDATA. This design's own choices: write data
// and the old word are captured in the data phase (AHB-Lite timing) rather
// than together with the address, HSIZE is registered, and the sequencer
// states. HBURST, HPROT and HMASTLOCK are accepted but unused (no bursts,
// protection or locking are handled), and HADDR above bit 9 is ignored.
//
// The assertions read nRST synchronously (to stay quiet during reset) while
// the registers use it as an asynchronous reset; lint reports this mix, and it
// is intended.
module sram_ahb_if
  import openv_pkg::*;
#(
  parameter int unsigned AW = 10,  // SRAM word-address width (1024 words)
  parameter int unsigned DW = 32   // data width
) (
  input  logic          clock,
  input  logic          nRST,
  // AHB-Lite slave
  input  logic          HSELx,
  input  logic [31:0]   HADDR,
  input  logic          HWRITE,
  input  logic [2:0]    HSIZE,
  input  logic [2:0]    HBURST,
  input  logic [3:0]    HPROT,
  input  logic [1:0]    HTRANS,
  input  logic          HMASTLOCK,
  input  logic          HREADY,
  input  logic [DW-1:0] HWDATA,
  output logic [DW-1:0] HRDATA,
  output logic          HREADYOUT,
  output logic          HRESP,
  // SRAM macro
  output logic          CEN,
  output logic          WEN,
  output logic [AW-1:0] A,
  output logic [DW-1:0] D,
  input  logic [DW-1:0] Q
);
  timeunit 1ns;
  timeprecision 1ps;

  sram_state_e   state;
  logic [AW-1:0] AP;
  logic [DW-1:0] QP, DP;
  logic [2:0]    size_q;
  logic          request, take;
  logic          reading1, writing1, writing2;

  // Bus wants a transfer; it is taken unless a write is in its first cycle.
  assign request = HSELx && HREADY && (htrans_e'(HTRANS) == HTRANS_NONSEQ);
  assign take    = request && (state != SRAM_W1);

  always_ff @(posedge clock or negedge nRST) begin
    if (!nRST) begin
      state  <= SRAM_IDLE;
      AP     <= '0;
      size_q <= '0;
      DP     <= '0;
      QP     <= '0;
    end else begin
      if (take) begin
        AP     <= HADDR[AW-1:0];
        size_q <= HSIZE;
        state  <= HWRITE ? SRAM_W1 : SRAM_RD;
        if (!HWRITE) DP <= '0;
      end else begin
        unique case (state)
          SRAM_W1: state <= SRAM_W2;
          default: state <= SRAM_IDLE;
        endcase
      end
      if (state == SRAM_W1) begin
        DP <= HWDATA;   // AHB data phase of the write
        QP <= Q;        // old word of the addressed location
      end
    end
  end

  assign reading1 = (state == SRAM_RD);
  assign writing1 = (state == SRAM_W1) || (state == SRAM_W2);
  assign writing2 = (state == SRAM_W2);

  assign CEN = !(reading1 || writing1);
  assign WEN = !writing2;
  assign A   = AP;

  always_comb begin
    unique case (size_q)
      HSIZE_BYTE: D = {QP[DW-1:8],  DP[7:0]};
      HSIZE_HALF: D = {QP[DW-1:16], DP[15:0]};
      default:    D = DP;
    endcase
  end

  assign HRDATA    = Q;
  assign HREADYOUT = 1'b1;
  assign HRESP     = 1'b0;

  // A write needs the SRAM for two cycles while HREADYOUT stays high, so the
  // master may not place a new transfer in the data phase of a write.
  always_ff @(posedge clock) begin
    if (nRST) begin
      a_no_transfer_in_write_data_phase : assert (!(request && state == SRAM_W1))
        else $error("sram_ahb_if: transfer started in the data phase of a write");
    end
  end

endmodule
