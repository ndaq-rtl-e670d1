// vme_fpga: the bus-control FPGA of the NDAQ module.
//
// Joins the VME slave, the USB path (ft245_if and usb_bridge) and the master
// SPI that reaches the Core FPGA registers. The VME side has priority for both
// shared resources: the master SPI is granted to USB only when it is idle and
// VME is not starting a command, and a USB pop of the output FIFO counts only on
// clocks where VME is not popping. Each side reads the SPI result on its own
// port. Bus control of VME and USB and the master SPI follow the module
// description; the arbitration is this design's choice.
module vme_fpga #(
  parameter logic [7:0]  BASE     = 8'h10,
  parameter int unsigned SPI_HALF = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [23:2] vme_a,
  input  logic [31:0] vme_d_in,
  output logic [31:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // external output FIFO read port
  input  logic [31:0] fifo_q,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // FT245BM
  input  logic        usb_rxf_n,
  input  logic        usb_txe_n,
  output logic        usb_rd_n,
  output logic        usb_wr,
  input  logic [7:0]  usb_d_in,
  output logic [7:0]  usb_d_out,
  output logic        usb_d_oe,
  // SPI to the Core FPGA
  output logic        spi_sclk,
  output logic        spi_cs_n,
  output logic        spi_mosi,
  input  logic        spi_miso
);

  logic        v_start, u_req, u_gnt, m_start, m_busy, m_done;
  logic [31:0] v_cmd, u_cmd, m_cmd;
  logic [15:0] m_rdata;
  logic        v_fifo_rd, u_fifo_req, u_fifo_gnt;
  logic        usb_active;

  vme_slave #(.BASE(BASE)) u_vme (
    .clk, .rst_n,
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am), .a(vme_a),
    .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .spi_start(v_start), .spi_cmd(v_cmd), .spi_busy(m_busy || u_gnt), .spi_rdata(m_rdata),
    .fifo_q, .fifo_empty, .fifo_rd(v_fifo_rd), .usb_active
  );

  assign u_gnt   = u_req && !m_busy && !v_start;
  assign m_start = v_start || u_gnt;
  assign m_cmd   = v_start ? v_cmd : u_cmd;

  spi_master #(.HALF(SPI_HALF)) u_spi (
    .clk, .rst_n,
    .start(m_start), .rw(m_cmd[31]), .addr(m_cmd[30:16]), .wdata(m_cmd[15:0]),
    .busy(m_busy), .done(m_done), .rdata(m_rdata),
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso)
  );

  assign u_fifo_gnt = u_fifo_req && !v_fifo_rd;
  assign fifo_rd    = v_fifo_rd || u_fifo_gnt;

  logic       rx_valid, rx_ready, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  ft245_if u_ft (
    .clk, .rst_n,
    .rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr(usb_wr),
    .d_in(usb_d_in), .d_out(usb_d_out), .d_oe(usb_d_oe),
    .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready
  );

  usb_bridge u_usb (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .spi_req(u_req), .spi_gnt(u_gnt), .spi_cmd(u_cmd), .spi_done(m_done), .spi_rdata(m_rdata),
    .fifo_q, .fifo_empty, .fifo_req(u_fifo_req), .fifo_gnt(u_fifo_gnt),
    .active(usb_active)
  );

endmodule
