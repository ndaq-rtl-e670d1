// tb_ndaq_top: end-to-end test of the whole module at its default sizes
// (8 channels, 100-tap filters, 128-sample frames with 32 before the trigger).
// Everything is configured from the VME bus: register writes travel VME ->
// VME FPGA -> SPI -> Core FPGA. Channel 0 gets a zero-sum filter (pedestal
// rejection) on a flat input, channels 1-7 identity filters on numbered ramps.
// Events go through an output-FIFO model that raises its almost-full flag at
// 100 words, and are read back by VME block transfers and by USB commands.
// Mechanisms counted, each must happen: external trigger, internal trigger,
// External+Internal coincidence (accepted and rejected), FIR bypass, lost
// trigger in the dead time, output back-pressure, TDC hits in an event, VME
// block readout, USB readout, register read-back over SPI.
module tb_ndaq_top;
  import ndaq_pkg::*;
  // The ADC clock crossing (in-phase DCO) delays the sample stream by 4 clocks:
  // a sample written at edge t leaves the FIFO after t+3 and enters the filter
  // or the bypass register at t+4, where without the crossing it would at t.
  localparam int CDC_LAT = 4;

  logic core_clk = 0, vme_clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data [NCH];
  wire adc_dco = core_clk;   // ADC data clock in phase with the core clock
  logic ext_trig = 0, tdc_ef, tdc_rd_n;
  logic [27:0] tdc_d;
  logic [31:0] ofifo_data, fifo_q;
  logic ofifo_we, ofifo_full, fifo_empty, fifo_rd;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = '0;
  logic [23:2] vme_a = '0;
  logic [31:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic usb_rxf_n, usb_txe_n, usb_rd_n, usb_wr, usb_d_oe;
  logic [7:0] usb_d_in, usb_d_out;
  logic trig_out, trig_accepted;
  logic [15:0] trig_lost;

  ndaq_top dut (.*);
  ft245bm_model usb (.rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr(usb_wr),
                     .d_from_fpga(usb_d_out), .d_oe(usb_d_oe), .d_to_fpga(usb_d_in), .active(rst_n));
  always #4 core_clk = ~core_clk;
  always #12.5 vme_clk = ~vme_clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge core_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge core_clk) cyc <= cyc + 1;

  // ---------------- ADC stimulus ----------------
  int stim = 0, pulse_ch = 5, pulse_at = -1;
  always @(negedge core_clk)
    for (int c = 0; c < NCH; c++)
      if (c == 0) adc_data[c] = 10'd600;   // flat, off the 512 midpoint
      else if (stim == 0) adc_data[c] = ADC_W'(cyc * 3 + 100 * c);
      else adc_data[c] = (c == pulse_ch && cyc >= pulse_at && cyc < pulse_at + 20) ? 10'd812 : 10'd512;

  // ---------------- TDC ----------------
  logic [27:0] tdc_q [$];
  assign tdc_ef = tdc_q.size() == 0;
  assign tdc_d  = tdc_ef ? 28'd0 : tdc_q[0];
  always @(posedge tdc_rd_n) if (rst_n && tdc_q.size() != 0) void'(tdc_q.pop_front());

  // ---------------- output FIFO (four chips as one 32-bit FIFO) ----------------
  logic [31:0] ofifo [$];
  int bp_clocks = 0;
  assign ofifo_full = ofifo.size() >= 100;
  assign fifo_empty = ofifo.size() == 0;
  assign fifo_q = fifo_empty ? 32'd0 : ofifo[0];
  // The queue changes only at falling edges, so the flags are stable at rising edges.
  always @(negedge core_clk) begin
    if (rst_n && ofifo_we) ofifo.push_back(ofifo_data);
    if (ofifo_full) bp_clocks++;
  end
  bit popq = 0;
  always @(posedge vme_clk) popq <= rst_n && fifo_rd;
  always @(negedge vme_clk) if (popq) void'(ofifo.pop_front());

  // ---------------- VME master ----------------
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
  // Register write; returns once the SPI transfer to the Core FPGA is over.
  task automatic reg_wr(logic [14:0] a, logic [15:0] d);
    vme(24'h100000, 1, {1'b0, a, d});
    do vme(24'h100000, 0, 0); while (r[31]);
  endtask
  task automatic reg_rd(logic [14:0] a);
    vme(24'h100000, 1, {1'b1, a, 16'h0});
    do vme(24'h100000, 0, 0); while (r[31]);
  endtask

  // Block-reads one event (until its trailer) into ev.
  logic [31:0] ev [$];
  int blt_words = 0, usb_words = 0;
  task automatic vme_read_event();
    ev = {};
    vme_am = 6'h3B; vme_a = 22'(24'h100008 >> 2); vme_write_n = 1;
    #20 vme_as_n = 0;
    while (ev.size() == 0 || ev[ev.size()-1][31:24] != TRL_MARK) begin
      if (fifo_empty) begin #100; continue; end
      #20 vme_ds_n = 0;
      wait (!vme_dtack_n);
      ev.push_back(vme_d_out);
      blt_words++;
      #10 vme_ds_n = 1;
      wait (vme_dtack_n);
    end
    #20 vme_as_n = 1;
    #50;
  endtask

  task automatic usb_read_event(int n);
    int got;
    ev = {};
    usb.to_host = {};
    usb.host_send(8'h46); usb.host_send(8'(n >> 8)); usb.host_send(8'(n));
    wait (usb.to_host.size() == 4 * n);
    for (int i = 0; i < n; i++)
      ev.push_back({usb.to_host[4*i], usb.to_host[4*i+1], usb.to_host[4*i+2], usb.to_host[4*i+3]});
    usb_words += n;
  endtask

  // Decodes and checks one event held in ev.
  int events = 0;
  task automatic check_event(int exp_mode, bit exp_ext, int ntdc, logic [27:0] hits [$],
                             bit ramp, int first_cyc, bit bypass);
    int base;
    logic [SAMPLE_W-1:0] s [NCH][FRAME_N];
    check(ev[0] == {HDR_MARK, 24'(events)}, $sformatf("header %h", ev[0]));
    check(ev[1][31:24] == RATE_MARK, "rate word");
    check(ev[2][31:8] == {8'hE0, 6'd0, 2'(exp_mode), exp_ext, 7'd0}, $sformatf("trigger word %h", ev[2]));
    if (!ramp) check(ev[2][7:0] == 8'(1 << pulse_ch), "crossed channel");
    for (int h = 0; h < ntdc; h++) check(ev[3+h] == {4'hC, hits[h]}, "tdc word");
    base = 3 + ntdc;
    check(ev.size() == base + NCH * FRAME_N / 2 + 1, $sformatf("event length %0d", ev.size()));
    check(ev[ev.size()-1] == {TRL_MARK, 24'(ev.size())}, "trailer");
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < FRAME_N / 2; i++) begin
        s[c][2*i]   = ev[base + c * FRAME_N / 2 + i][15:0];
        s[c][2*i+1] = ev[base + c * FRAME_N / 2 + i][31:16];
      end
    begin
      int bad = 0;
      for (int i = 0; i < FRAME_N; i++) if (s[0][i] != (bypass ? 16'd88 : 16'd0)) bad++;
      check(bad == 0, $sformatf("channel 0 (%s): %0d samples wrong, first %0d",
                                bypass ? "unfiltered" : "pedestal rejected", bad, $signed(s[0][0])));
    end
    if (ramp) begin
      int bad = 0;
      for (int c = 1; c < NCH; c++)
        for (int i = 0; i < FRAME_N; i++)
          if (s[c][i] != SAMPLE_W'((((first_cyc + i) * 3 + 100 * c) % 1024) - 512)) bad++;
      check(bad == 0, $sformatf("ramp frames: %0d samples wrong", bad));
    end else begin
      int hi = 0, first_hi = -1, other = 0;
      for (int c = 1; c < NCH; c++)
        for (int i = 0; i < FRAME_N; i++)
          if (c == pulse_ch && s[c][i] == 16'd300) begin hi++; if (first_hi < 0) first_hi = i; end
          else if (s[c][i] != 16'd0) other++;
      check(hi == 20 && other == 0, $sformatf("pulse frame hi=%0d other=%0d", hi, other));
      check(first_hi >= 30 && first_hi <= 32, $sformatf("pulse at %0d", first_hi));
    end
    events++;
  endtask

  int n_ext = 0, n_int = 0, n_coinc = 0, n_coinc_rej = 0, n_bypass = 0, n_tdc = 0, n_spi_rd = 0;

  initial begin
    logic [27:0] hits [$];
    int t0;
    repeat (5) @(posedge vme_clk);
    rst_n = 1;
    repeat (5) @(posedge vme_clk);
    // channel 0: zero-sum filter (+ on 50 taps, - on 50 taps); others identity
    for (int k = 0; k < NTAPS; k++) reg_wr(REG_COEF_BASE + 15'(k), k < 50 ? 16'sd160 : -16'sd160);
    for (int c = 1; c < NCH; c++) reg_wr(REG_COEF_BASE + 15'(c * 128), 16'd16384);
    for (int c = 0; c < NCH; c++) reg_wr(REG_THR_BASE + 15'(c), 16'd200);
    reg_wr(REG_CTRL, 16'h0001);                    // run, external trigger
    reg_rd(REG_CTRL);
    check(r[15:0] == 16'h0001, "CTRL read back over VME/SPI");
    n_spi_rd++;
    repeat (2 * 125) @(posedge core_clk);

    // ---- event 0: external trigger, TDC hits, a lost trigger, back-pressure, VME readout ----
    hits = {28'h0001111, 28'h0002222, 28'h0003333};
    tdc_q = hits;
    repeat (1 * 125) @(posedge core_clk);
    @(negedge core_clk) ext_trig = 1; t0 = cyc;
    #80 ext_trig = 0;
    #300 ext_trig = 1;
    #80 ext_trig = 0;
    repeat (3 * 125) @(posedge core_clk);                                           // let the FIFO fill to its flag
    vme_read_event();
    check_event(0, 1, 3, hits, 1, t0 - 32 - CDC_LAT, 0);
    n_ext++; n_tdc += 3;
    check(trig_lost == 1, $sformatf("lost %0d", trig_lost));

    // ---- event 1: internal trigger on channel 5, USB readout ----
    stim = 1;
    reg_wr(REG_CTRL, 16'h0003);
    repeat (2 * 125) @(posedge core_clk);
    pulse_at = cyc + 10;
    repeat (3 * 125) @(posedge core_clk);
    hits = {};
    usb_read_event(3 + NCH * FRAME_N / 2 + 1);
    check_event(1, 0, 0, hits, 0, 0, 0);
    n_int++;

    // ---- External+Internal with FIR bypass: rejected alone, accepted in coincidence ----
    reg_wr(REG_CTRL, 16'h000D);
    repeat (2 * 125) @(posedge core_clk);
    @(negedge core_clk) ext_trig = 1;
    #80 ext_trig = 0;
    repeat (2 * 125) @(posedge core_clk);
    check(fifo_empty, "external alone rejected in External+Internal mode");
    n_coinc_rej++;
    pulse_ch = 2;
    pulse_at = cyc + 10;
    #60 ext_trig = 1;
    #80 ext_trig = 0;
    repeat (1 * 125) @(posedge core_clk);
    vme_read_event();
    check_event(2, 1, 0, hits, 0, 0, 1);
    n_coinc++; n_bypass++;

    reg_rd(REG_EVT_LO);
    check(r[15:0] == 16'd3, "event counter over VME/SPI");
    n_spi_rd++;
    vme(24'h100004, 0, 0);
    check(r[0] == 1'b1, "output FIFO empty at the end");

    $display("mechanisms: ext=%0d int=%0d coinc=%0d coinc_rejected=%0d bypass=%0d lost=%0d backpressure_clocks=%0d tdc_hits=%0d blt_words=%0d usb_words=%0d spi_reads=%0d",
             n_ext, n_int, n_coinc, n_coinc_rej, n_bypass, trig_lost, bp_clocks, n_tdc, blt_words, usb_words, n_spi_rd);
    check(n_ext > 0, "external trigger seen");
    check(n_int > 0, "internal trigger seen");
    check(n_coinc > 0 && n_coinc_rej > 0, "coincidence seen");
    check(n_bypass > 0, "bypass seen");
    check(trig_lost > 0, "lost trigger seen");
    check(bp_clocks > 0, "back-pressure seen");
    check(n_tdc > 0, "TDC hits seen");
    check(blt_words > 0 && usb_words > 0, "both readout paths used");
    check(usb.violations == 0, "FT245 timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
