// tb_vme_fpga: the VME FPGA with a behavioural SPI register file standing in
// for the Core FPGA, a queue as the output FIFO and a behavioural FT245BM.
// Checks register writes and reads from VME (through the master SPI), a VME
// block read of the FIFO, and the same register and FIFO accesses from USB,
// including a USB command issued while VME holds the SPI.
module tb_vme_fpga;
  logic clk = 0, rst_n = 0;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = '0;
  logic [23:2] vme_a = '0;
  logic [31:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [31:0] fifo_q;
  logic fifo_empty, fifo_rd;
  logic usb_rxf_n, usb_txe_n, usb_rd_n, usb_wr, usb_d_oe;
  logic [7:0] usb_d_in, usb_d_out;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;

  vme_fpga dut (.*);
  ft245bm_model usb (.rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr(usb_wr),
                     .d_from_fpga(usb_d_out), .d_oe(usb_d_oe), .d_to_fpga(usb_d_in), .active(rst_n));
  always #12 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural SPI slave with 64 registers
  logic [15:0] regs [64];
  logic [31:0] sr;
  int nb;
  logic [15:0] txs;
  initial begin spi_miso = 0; for (int i = 0; i < 64; i++) regs[i] = 16'(i * 7); end
  always @(negedge spi_cs_n) begin nb = 0; sr = 0; end
  always @(posedge spi_sclk) if (!spi_cs_n) begin
    sr = {sr[30:0], spi_mosi}; nb++;
    if (nb == 32 && !sr[31]) regs[sr[21:16]] = sr[15:0];
  end
  always @(negedge spi_sclk) if (!spi_cs_n) begin
    if (nb == 16) txs = regs[sr[5:0]]; else txs = {txs[14:0], 1'b0};
    spi_miso = txs[15];
  end

  // output FIFO
  logic [31:0] fifo [$];
  assign fifo_empty = fifo.size() == 0;
  assign fifo_q = fifo_empty ? 32'd0 : fifo[0];
  bit popq = 0;
  always @(posedge clk) popq <= rst_n && fifo_rd;
  always @(negedge clk) if (popq) void'(fifo.pop_front());

  logic [31:0] r;
  task automatic vme(input logic [23:0] addr, input logic wr, input logic [31:0] wd);
    vme_am = 6'h39; vme_a = addr[23:2]; vme_write_n = !wr; vme_d_in = wd;
    #20 vme_as_n = 0;
    #20 vme_ds_n = 0;
    wait (!vme_dtack_n);
    r = vme_d_out;
    #10 vme_ds_n = 1; vme_as_n = 1;
    wait (vme_dtack_n);
    #30;
  endtask
  task automatic vme_spi_read(logic [14:0] a);
    vme(24'h100000, 1, {1'b1, a, 16'h0});
    do vme(24'h100000, 0, 0); while (r[31]);
  endtask

  initial begin
    logic [31:0] words [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // VME register write and read through SPI
    vme(24'h100000, 1, {1'b0, 15'd9, 16'hABCD});
    vme_spi_read(15'd9);
    check(r[15:0] == 16'hABCD, $sformatf("VME read back %h", r[15:0]));
    vme_spi_read(15'd20);
    check(r[15:0] == 16'd140, "VME read of untouched register");
    // USB write while VME keeps the SPI busy
    usb.host_send(8'h57); usb.host_send(8'h00); usb.host_send(8'h05);
    usb.host_send(8'h12); usb.host_send(8'h34);
    vme(24'h100000, 1, {1'b0, 15'd6, 16'h0F0F});
    repeat (2000) @(posedge clk);
    check(regs[5] == 16'h1234, "USB register write");
    check(regs[6] == 16'h0F0F, "VME register write");
    usb.host_send(8'h52); usb.host_send(8'h00); usb.host_send(8'h06);
    repeat (2000) @(posedge clk);
    check(usb.to_host.size() == 2 && usb.to_host[0] == 8'h0F && usb.to_host[1] == 8'h0F, "USB register read");
    usb.to_host = {};
    // VME block read of 10 FIFO words
    for (int i = 0; i < 20; i++) fifo.push_back($urandom);
    words = fifo;
    vme_am = 6'h3F; vme_a = 22'(24'h100008 >> 2); vme_write_n = 1;
    #20 vme_as_n = 0;
    for (int i = 0; i < 10; i++) begin
      #20 vme_ds_n = 0;
      wait (!vme_dtack_n);
      check(vme_d_out == words[i], "VME block read word");
      #10 vme_ds_n = 1;
      wait (vme_dtack_n);
    end
    #20 vme_as_n = 1;
    // USB read of the other 10
    usb.host_send(8'h46); usb.host_send(8'h00); usb.host_send(8'd10);
    repeat (3000) @(posedge clk);
    check(usb.to_host.size() == 40, $sformatf("USB FIFO bytes %0d", usb.to_host.size()));
    for (int i = 0; i < 40 && i < usb.to_host.size(); i++)
      check(usb.to_host[i] == words[10 + i/4][31 - 8*(i%4) -: 8], "USB FIFO byte");
    check(fifo_empty, "FIFO drained");
    check(usb.violations == 0, "FT245 timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
