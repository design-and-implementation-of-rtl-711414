// Open-V v.2 peripheral interfaces: SRAM on AHB-Lite, DAC and ADC on APB.
//
// Puts the three bus interfaces next to the peripherals they serve:
//   - sram_ahb_if + sram_sp32b1024: 4 KB (1024 x 32) on-chip SRAM on the
//     AHB-Lite system bus;
//   - dac_apb_if + dac_r2r: 12-bit DAC on a peripheral APB; a write sets the
//     output code and completes after the converter wait;
//   - adc_apb_if + adc_model: 10-bit ADC on the always-on APB; a read returns
//     the last settled conversion result (zero-extended to 32 bits).
// The processor and the AHB-to-APB bridges of the microcontroller are outside
// this block, so the AHB-Lite slave port and the two APB slave ports are
// brought out, together with the DAC's analog output and the ADC's analog
// input. One clock and one active-low asynchronous reset serve all three;
// the source design does not describe how the always-on domain is clocked.
// Timing per port is that of the interface module behind it.
module openv_periph_top (
  input  logic        clock,
  input  logic        nRST,
  // AHB-Lite slave port: SRAM
  input  logic        HSELx,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [3:0]  HPROT,
  input  logic [1:0]  HTRANS,
  input  logic        HMASTLOCK,
  input  logic        HREADY,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP,
  // APB slave port: DAC
  input  logic        dac_psel,
  input  logic        dac_penable,
  input  logic        dac_pwrite,
  input  logic [31:0] dac_pwdata,
  output logic        dac_pready,
  output real         dac_vout,
  // APB slave port: ADC (always-on domain)
  input  logic        adc_psel,
  input  logic        adc_penable,
  input  logic        adc_pwrite,
  output logic [31:0] adc_prdata,
  output logic        adc_pready,
  input  real         adc_vin
);
  timeunit 1ns;
  timeprecision 1ps;

  // SRAM side
  logic        sram_cen, sram_wen;
  logic [9:0]  sram_a;
  logic [31:0] sram_d, sram_q;

  sram_ahb_if u_sram_if (
    .clock, .nRST,
    .HSELx, .HADDR, .HWRITE, .HSIZE, .HBURST, .HPROT, .HTRANS, .HMASTLOCK,
    .HREADY, .HWDATA, .HRDATA, .HREADYOUT, .HRESP,
    .CEN(sram_cen), .WEN(sram_wen), .A(sram_a), .D(sram_d), .Q(sram_q)
  );

  sram_sp32b1024 u_sram (
    .clock, .CEN(sram_cen), .WEN(sram_wen), .A(sram_a), .D(sram_d), .Q(sram_q)
  );

  // DAC side
  logic [11:0] dac_data;

  dac_apb_if u_dac_if (
    .clock, .nRST,
    .PSEL(dac_psel), .PENABLE(dac_penable), .PWRITE(dac_pwrite), .PWDATA(dac_pwdata),
    .PREADY(dac_pready), .DATA(dac_data)
  );

  dac_r2r u_dac (.DATA(dac_data), .VOUT(dac_vout));

  // ADC side
  logic [9:0] adc_data, adc_prdata10;
  logic       adc_busy;

  adc_model u_adc (
    .clock, .nRST, .VIN(adc_vin), .DATA(adc_data), .BUSY(adc_busy)
  );

  adc_apb_if u_adc_if (
    .clock, .nRST,
    .PSEL(adc_psel), .PENABLE(adc_penable), .PWRITE(adc_pwrite),
    .PRDATA(adc_prdata10), .PREADY(adc_pready), .DATA(adc_data), .BUSY(adc_busy)
  );

  assign adc_prdata = {22'd0, adc_prdata10};

endmodule
