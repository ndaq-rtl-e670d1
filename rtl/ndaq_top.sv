// ndaq_top: the digital logic of the NDAQ data-acquisition module.
//
// Two FPGAs: the Core FPGA (core_fpga) filters, triggers on and captures the
// eight ADC channels and builds events; the VME FPGA (vme_fpga) serves the VME
// bus and the USB port and reaches the Core FPGA registers over SPI, which is
// wired here between the two. The output FIFO chips (512K x 32 on the board)
// sit between the Core FPGA's write port and the VME FPGA's read port; being
// off-chip memory they are not part of this logic, so both ports are brought
// out (ofifo_* from the Core FPGA, fifo_* into the VME FPGA). The ADCs, the TDC
// and the FT245BM USB chip are likewise reached through ports. Each FPGA has its
// own clock, core_clk and vme_clk; the ADC data come with their own data
// clock, adc_dco (125 MHz), and cross into core_clk inside the Core FPGA.
module ndaq_top
  import ndaq_pkg::*;
(
  input  logic              core_clk,
  input  logic              vme_clk,
  input  logic              rst_n,
  // Core FPGA: ADCs, trigger input, TDC
  input  logic              adc_dco,
  input  logic [ADC_W-1:0]  adc_data [NCH],
  input  logic              ext_trig,
  input  logic              tdc_ef,
  input  logic [27:0]       tdc_d,
  output logic              tdc_rd_n,
  // Core FPGA -> output FIFO write port
  output logic [31:0]       ofifo_data,
  output logic              ofifo_we,
  input  logic              ofifo_full,
  // output FIFO read port -> VME FPGA
  input  logic [31:0]       fifo_q,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  // VME bus
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [23:2]       vme_a,
  input  logic [31:0]       vme_d_in,
  output logic [31:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  // FT245BM USB chip
  input  logic              usb_rxf_n,
  input  logic              usb_txe_n,
  output logic              usb_rd_n,
  output logic              usb_wr,
  input  logic [7:0]        usb_d_in,
  output logic [7:0]        usb_d_out,
  output logic              usb_d_oe,
  // monitoring
  output logic              trig_out,
  output logic              trig_accepted,
  output logic [15:0]       trig_lost
);

  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;

  core_fpga u_core (
    .clk(core_clk), .rst_n,
    .adc_dco, .adc_data, .ext_trig, .tdc_ef, .tdc_d, .tdc_rd_n,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .ofifo_data, .ofifo_we, .ofifo_full,
    .trig_out, .trig_accepted, .trig_lost
  );

  vme_fpga u_vme (
    .clk(vme_clk), .rst_n,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_d_in,
    .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .fifo_q, .fifo_empty, .fifo_rd,
    .usb_rxf_n, .usb_txe_n, .usb_rd_n, .usb_wr, .usb_d_in, .usb_d_out, .usb_d_oe,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso
  );

endmodule
