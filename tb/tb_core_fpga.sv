// tb_core_fpga: end-to-end test of the Core FPGA.
// Configures it over SPI (bit-banged here), feeds numbered ADC ramps so that
// every captured sample tells which clock it was taken on, and decodes the
// events written to the output-FIFO port. Checks, per event: header and event
// number, rate word, trigger word (mode, external flag, crossed channels),
// TDC words, 8 frames of 128 consecutive samples with exactly 32 taken before
// the trigger, and the trailer word count. Covers the external, internal and
// External+Internal trigger modes, FIR bypass, output back-pressure, a trigger
// lost during the dead time, and the rate meter read back over SPI.
module tb_core_fpga;
  import ndaq_pkg::*;
  localparam int HALF = 6, GATE = 3000;
  // The ADC clock crossing (in-phase DCO) delays the sample stream by 4 clocks:
  // a sample written at edge t leaves the FIFO after t+3 and enters the filter
  // or the bypass register at t+4, where without the crossing it would at t.
  localparam int CDC_LAT = 4;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data [NCH];
  wire adc_dco = clk;   // ADC data clock in phase with the core clock
  logic ext_trig = 0, tdc_ef, tdc_rd_n;
  logic [27:0] tdc_d;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic [31:0] ofifo_data;
  logic ofifo_we, ofifo_full = 0;
  logic trig_out, trig_accepted;
  logic [15:0] trig_lost;

  core_fpga #(.RATE_GATE(GATE)) dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- SPI master ----------------
  logic [15:0] spi_rd;
  task automatic spi(logic rw, logic [14:0] a, logic [15:0] d);
    logic [31:0] f;
    f = {rw, a, d};
    spi_cs_n = 0;
    repeat (HALF) @(posedge clk);
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (HALF) @(posedge clk);
      spi_sclk = 1;
      repeat (HALF) @(posedge clk);
      if (b < 16) spi_rd[b] = spi_miso;
      spi_sclk = 0;
    end
    repeat (HALF) @(posedge clk);
    spi_cs_n = 1;
    repeat (2 * HALF) @(posedge clk);
  endtask

  // ---------------- ADC stimulus ----------------
  // mode 0: ramp, code = (cycle*3 + 100*ch) mod 1024 -> each sample names its clock
  // mode 1: flat baseline 512, plus a pulse of height 300 on channel pulse_ch
  int stim = 0, pulse_ch = 3, pulse_at = -1;
  always @(negedge clk)
    for (int c = 0; c < NCH; c++)
      if (stim == 0) adc_data[c] = ADC_W'(cyc * 3 + 100 * c);
      else adc_data[c] = (c == pulse_ch && cyc >= pulse_at && cyc < pulse_at + 20) ? 10'd812 : 10'd512;

  // ---------------- TDC model ----------------
  logic [27:0] tdc_q [$];
  assign tdc_ef = tdc_q.size() == 0;
  assign tdc_d  = tdc_ef ? 28'd0 : tdc_q[0];
  always @(posedge tdc_rd_n) if (rst_n && tdc_q.size() != 0) void'(tdc_q.pop_front());

  // ---------------- output FIFO ----------------
  logic [31:0] words [$];
  bit bp = 0;
  int nfull = 0;
  // ofifo_full acts as an almost-full flag: a write may follow it by one clock.
  logic full_q = 0;
  always @(posedge clk) begin
    full_q <= ofifo_full;
    if (rst_n && ofifo_we) begin
      check(!(ofifo_full && full_q), "write after two clocks of full");
      words.push_back(ofifo_data);
    end
    ofifo_full <= bp && ($urandom_range(0, 2) == 0);
    if (ofifo_full) nfull++;
  end

  int ntrig = 0;
  always @(posedge clk) if (rst_n && trig_out) ntrig++;

  // Waits for one whole event and checks it. first_code: expected ADC code of
  // channel 0 at frame position 0, or -1 not to check it.
  int events = 0;
  task automatic get_event(int exp_mode, bit exp_ext, logic [7:0] exp_crossed,
                           int ntdc, logic [27:0] hits [$], bit ramp, int first_code);
    int base;
    logic [SAMPLE_W-1:0] s [NCH][FRAME_N];
    wait (words.size() > 0 && words[words.size()-1][31:24] == TRL_MARK);
    check(words[0] == {HDR_MARK, 24'(events)}, "header");
    check(words[1][31:24] == RATE_MARK, "rate word");
    // In the ramp run the channels above threshold vary, so only the upper bits are compared.
    check(ramp ? words[2][31:8] == {8'hE0, 6'd0, 2'(exp_mode), exp_ext, 7'd0}
               : words[2] == {8'hE0, 6'd0, 2'(exp_mode), exp_ext, 7'd0, exp_crossed},
          $sformatf("trigger word %h", words[2]));
    for (int h = 0; h < ntdc; h++) check(words[3+h] == {4'hC, hits[h]}, "tdc word");
    base = 3 + ntdc;
    check(words.size() == base + NCH * FRAME_N / 2 + 1, $sformatf("event length %0d", words.size()));
    check(words[words.size()-1] == {TRL_MARK, 24'(words.size())}, "trailer");
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < FRAME_N / 2; i++) begin
        s[c][2*i]   = words[base + c * FRAME_N / 2 + i][15:0];
        s[c][2*i+1] = words[base + c * FRAME_N / 2 + i][31:16];
      end
    if (ramp) begin
      int bad = 0;
      for (int c = 0; c < NCH; c++)
        for (int i = 0; i < FRAME_N; i++)
          if (s[c][i] != SAMPLE_W'(((first_code + 3 * i + 100 * c) % 1024) - 512)) bad++;
      check(bad == 0, $sformatf("frame contents: %0d samples wrong (ch0[0]=%0d, expected %0d)",
                                bad, $signed(s[0][0]), (first_code % 1024) - 512));
    end else begin
      // pulse run: only the pulse channel leaves the baseline; count high samples
      int hi = 0, lo = 0, first_hi = -1;
      for (int c = 0; c < NCH; c++)
        for (int i = 0; i < FRAME_N; i++)
          if (c == pulse_ch && s[c][i] == 16'd300) begin hi++; if (first_hi < 0) first_hi = i; end
          else if (s[c][i] == 16'd0) lo++;
      check(hi == 20 && lo == NCH * FRAME_N - 20, $sformatf("pulse frame hi=%0d lo=%0d", hi, lo));
      check(first_hi >= 30 && first_hi <= 32, $sformatf("pulse position %0d", first_hi));
    end
    words = {};
    events++;
  endtask

  initial begin
    logic [27:0] hits [$];
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // identity filters: c[0] = 1.0 (Q14), rest zero
    for (int c = 0; c < NCH; c++) spi(1'b0, REG_COEF_BASE + 15'(c * 128), 16'd16384);
    for (int c = 0; c < NCH; c++) spi(1'b0, REG_THR_BASE + 15'(c), 16'd200);
    spi(1'b0, REG_INTMASK, 16'h00FF);
    spi(1'b0, REG_CTRL, 16'h0001);              // run, external mode
    spi(1'b1, REG_CTRL, 16'h0000);
    check(spi_rd == 16'h0001, "CTRL read back");
    repeat (60) @(posedge clk);

    // ---- 1: external trigger, ramp data, TDC hits ----
    hits = {28'h0000123, 28'h0ABCDEF};
    tdc_q = hits;
    @(negedge clk) ext_trig = 1; t0 = cyc;
    repeat (10) @(negedge clk);
    ext_trig = 0;
    // a second trigger during the dead time is lost
    repeat (20) @(negedge clk);
    ext_trig = 1; repeat (10) @(negedge clk); ext_trig = 0;
    get_event(0, 1, 8'h00, 2, hits, 1, (t0 - 32 - CDC_LAT) * 3);
    check(trig_lost == 1, $sformatf("lost triggers %0d", trig_lost));

    // ---- 2: internal trigger on channel 3 ----
    stim = 1;
    spi(1'b0, REG_CTRL, 16'h0003);              // run, internal mode
    repeat (60) @(posedge clk);
    pulse_at = cyc + 10;
    hits = {};
    get_event(1, 0, 8'h08, 0, hits, 0, 0);

    // ---- 3: FIR bypass, External+Internal, back-pressure ----
    spi(1'b0, REG_CTRL, 16'h000D);              // run, mode 2, bypass
    bp = 1;
    repeat (60) @(posedge clk);
    // external alone: no trigger
    @(negedge clk) ext_trig = 1; repeat (10) @(negedge clk); ext_trig = 0;
    repeat (100) @(posedge clk);
    check(words.size() == 0, "external alone must not trigger in mode 2");
    pulse_ch = 6;
    pulse_at = cyc + 10;
    repeat (8) @(negedge clk);
    ext_trig = 1; repeat (10) @(negedge clk); ext_trig = 0;
    get_event(2, 1, 8'h40, 0, hits, 0, 0);
    check(nfull > 0, "back-pressure applied");
    bp = 0;

    // ---- 4: rate meter over SPI ----
    spi(1'b0, REG_CTRL, 16'h0001);
    stim = 0;
    repeat (2 * GATE) @(posedge clk);
    spi(1'b1, REG_RATE_LO, 16'h0);
    check(spi_rd == 16'd0, $sformatf("rate with no triggers %0d", spi_rd));
    spi(1'b1, REG_EVT_LO, 16'h0);
    check(spi_rd == 16'd3, $sformatf("event count %0d", spi_rd));
    check(ntrig == 4, $sformatf("trigger pulses %0d", ntrig));
    $display("events=%0d lost=%0d backpressure_clocks=%0d", events, trig_lost, nfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
