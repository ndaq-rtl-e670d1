// core_fpga: the processing FPGA of the NDAQ module.
//
// Eight ADC channels arrive at 125 MHz. Each passes its optimal-amplitude FIR
// filter (or, with FIR bypass set, goes through unfiltered as a signed sample)
// and is written continuously into its pre-trigger FIFO. A trigger is formed
// from the front-panel input (trigger_cond) and/or the per-channel digital
// comparators on the filtered samples (digital_trigger), according to the trigger
// mode. An accepted trigger makes capture_ctrl copy, for every channel at once,
// the M = 32 stored samples and the N - M = 96 following ones into the channel's
// post-trigger FIFO. The data builder then writes the event (header, trigger
// rate, trigger source, TDC hits, 8 x 128 samples, trailer) to the 32-bit
// external FIFO bus. The trigger rate meter counts every trigger produced by
// the selected mode. Configuration registers are reached through the slave SPI.
// The ADC samples arrive with the ADCs' own data clock (adc_dco) and enter the
// core clock domain through adc_cdc; everything after that runs on the core
// clock. With adc_dco in phase with clk the crossing adds 4 clocks to the data
// path (3 in the FIFO, 1 for the filter input register that now takes the
// FIFO output); the trigger input does not pass through it.
//
// The block structure (FIR, Digital Trigger, Trigger Cond, Pre/Post FIFO, Freq
// Meter, registers, slave SPI, data builder) follows the module description;
// interfaces and formats are this design's.
module core_fpga
  import ndaq_pkg::*;
#(
  parameter int unsigned TAPS      = NTAPS,
  parameter int unsigned FRAME     = FRAME_N,
  parameter int unsigned PRE       = PRE_M,
  parameter int unsigned RATE_GATE = 125_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // ADCs (10 MSBs of each converter, offset binary), clocked by their DCO
  input  logic              adc_dco,
  input  logic [ADC_W-1:0]  adc_data [NCH],
  // front-panel trigger
  input  logic              ext_trig,
  // TDC result port
  input  logic              tdc_ef,
  input  logic [27:0]       tdc_d,
  output logic              tdc_rd_n,
  // SPI from the VME FPGA
  input  logic              spi_sclk,
  input  logic              spi_cs_n,
  input  logic              spi_mosi,
  output logic              spi_miso,
  // external output FIFO write port
  output logic [31:0]       ofifo_data,
  output logic              ofifo_we,
  input  logic              ofifo_full,
  // monitoring
  output logic              trig_out,     // every trigger of the selected mode
  output logic              trig_accepted,
  output logic [15:0]       trig_lost
);

  // ---------------- registers and SPI ----------------
  logic        bus_wr;
  logic [14:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic        run, fir_bypass;
  trig_mode_e  mode;
  logic [NCH-1:0] int_mask;
  logic [7:0]  coinc_window;
  logic signed [SAMPLE_W-1:0] threshold [NCH];
  logic        coef_we;
  logic [2:0]  coef_ch;
  logic [6:0]  coef_tap;
  logic signed [COEF_W-1:0] coef_data;
  logic [15:0] status;
  logic [31:0] rate;
  logic [23:0] event_count;

  spi_slave u_spi (
    .clk, .rst_n,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(bus_rdata)
  );

  config_regs u_regs (
    .clk, .rst_n,
    .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(bus_rdata),
    .run, .mode, .fir_bypass, .int_mask, .coinc_window, .threshold,
    .coef_we, .coef_ch, .coef_tap, .coef_data,
    .status, .rate, .event_count(event_count[15:0])
  );

  // ---------------- per-channel processing ----------------
  logic signed [SAMPLE_W-1:0] fir_out [NCH];
  logic signed [SAMPLE_W-1:0] raw_q   [NCH];
  logic signed [SAMPLE_W-1:0] sample  [NCH];
  logic [SAMPLE_W-1:0]        pre_dout  [NCH];
  logic [SAMPLE_W-1:0]        post_dout [NCH];
  logic [NCH-1:0]             pre_valid, pre_full, post_empty, post_pop;
  logic                       post_we;

  // ADC data: from the DCO domain into the core clock domain, all channels
  // through one dual-clock FIFO.
  logic [NCH*ADC_W-1:0] adc_bus_dco, adc_bus;
  logic [ADC_W-1:0]     adc_q [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_pack
    assign adc_bus_dco[c*ADC_W +: ADC_W] = adc_data[c];
    assign adc_q[c] = adc_bus[c*ADC_W +: ADC_W];
  end

  adc_cdc #(.W(NCH*ADC_W), .DEPTH(8)) u_adc_cdc (
    .rst_n,
    .wclk      (adc_dco),
    .din       (adc_bus_dco),
    .rclk      (clk),
    .dout      (adc_bus),
    .dout_valid()
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    fir_transposed #(.TAPS(TAPS)) u_fir (
      .clk, .rst_n,
      .adc_in   (adc_q[c]),
      .coef_we  (coef_we && coef_ch == 3'(c)),
      .coef_addr($clog2(TAPS)'(coef_tap)),
      .coef_data(coef_data),
      .y_full   (),
      .y_out    (fir_out[c])
    );

    // Unfiltered path: offset binary to two's complement, sign-extended.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) raw_q[c] <= '0;
      else raw_q[c] <= SAMPLE_W'(signed'({~adc_q[c][ADC_W-1], adc_q[c][ADC_W-2:0]}));
    end
    assign sample[c] = fir_bypass ? raw_q[c] : fir_out[c];

    pre_fifo #(.DEPTH(PRE), .W(SAMPLE_W)) u_pre (
      .clk, .rst_n,
      .clear     (!run),
      .we        (run),
      .din       (sample[c]),
      .dout      (pre_dout[c]),
      .dout_valid(pre_valid[c]),
      .full      (pre_full[c])
    );

    sync_fifo #(.DEPTH(FRAME), .W(SAMPLE_W)) u_post (
      .clk, .rst_n,
      .clear(1'b0),
      .push (post_we),
      .din  (pre_dout[c]),
      .pop  (post_pop[c]),
      .dout (post_dout[c]),
      .empty(post_empty[c]),
      .full (),
      .count()
    );
  end

  // ---------------- triggers ----------------
  logic [NCH-1:0] above, crossed;
  logic int_trig, ext_pulse, trig;

  digital_trigger u_dtrig (
    .clk, .rst_n,
    .sample, .threshold, .int_mask,
    .above, .crossed, .int_trig
  );

  trigger_cond u_tcond (
    .clk, .rst_n,
    .ext_trig_in(ext_trig), .int_trig, .mode, .window(coinc_window),
    .trig, .ext_pulse
  );

  freq_meter #(.GATE(RATE_GATE)) u_freq (
    .clk, .rst_n, .pulse(trig && run), .rate, .rate_valid()
  );

  // ---------------- capture and event building ----------------
  logic cap_busy, accepted, frame_done, bld_busy, ready;
  assign ready = !bld_busy && (&post_empty) && !frame_done;

  capture_ctrl #(.FRAME(FRAME)) u_cap (
    .clk, .rst_n, .run, .trig,
    .armed(pre_full[0]), .ready, .pre_valid(pre_valid[0]),
    .post_we, .busy(cap_busy), .accepted, .frame_done, .lost(trig_lost)
  );

  // Trigger information kept for the event header.
  logic [1:0] ev_mode;
  logic       ev_ext;
  logic [7:0] ev_crossed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_mode    <= '0;
      ev_ext     <= 1'b0;
      ev_crossed <= '0;
    end else if (accepted) begin
      ev_mode    <= mode;
      ev_ext     <= (mode != TRIG_INTERNAL);
      ev_crossed <= 8'(above & int_mask);
    end
  end

  logic        hit_valid, hit_pop;
  logic [27:0] hit_data;

  tdc_reader u_tdc (
    .clk, .rst_n, .clear(!run),
    .ef(tdc_ef), .tdc_d, .rd_n(tdc_rd_n),
    .hit_valid, .hit_data, .hit_pop
  );

  data_builder #(.FRAME(FRAME)) u_bld (
    .clk, .rst_n,
    .start(frame_done), .busy(bld_busy),
    .post_dout, .post_pop,
    .tdc_valid(hit_valid), .tdc_data(hit_data), .tdc_pop(hit_pop),
    .rate, .trig_mode(ev_mode), .trig_ext(ev_ext), .trig_crossed(ev_crossed),
    .out_data(ofifo_data), .out_we(ofifo_we), .out_full(ofifo_full),
    .event_count
  );

  assign status        = {13'd0, bld_busy, cap_busy, pre_full[0]};
  assign trig_out      = trig && run;
  assign trig_accepted = accepted;

endmodule
