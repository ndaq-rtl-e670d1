// adc_cdc: moves the ADC samples from the ADC data clock (DCO) into the core
// clock domain.
//
// The ADCs send their data with their own output clock, so the samples arrive
// in a different clock domain from the core logic even though both run at the
// same nominal 125 MHz. This block is a small dual-clock FIFO. The write side
// stores din on every wclk edge unless the FIFO is full. The read side pops a
// word on every rclk edge on which it is not empty, and presents it on dout
// with dout_valid. Pointers cross between the domains in Gray code through
// two-flip-flop register chains, so only one pointer bit changes per step.
// When the two clocks have the same frequency the FIFO settles at a constant
// fill level and passes one sample per clock. If the read side ever finds it
// empty, dout keeps the last sample and dout_valid is low for that clock.
//
// Interface: wclk/din (DCO domain), rclk/dout/dout_valid (core domain), one
// active-low asynchronous reset for both sides. DEPTH must be a power of two, at least 4.
//
// Timing: with wclk and rclk on the same edges, the word written at edge t is
// on dout after edge t+3 (one write, two synchroniser stages, one read
// register), so LATENCY = 3 clocks in that case.
//
// That the Core FPGA receives both a core clock and the ADC DCO, and that it
// synchronises clock domains with dual-port FIFOs and register chains, follows
// the module description; the depth, the Gray-pointer scheme and the
// hold-on-empty behaviour are choices of this design.
module adc_cdc #(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 8
) (
  input  logic         rst_n,
  input  logic         wclk,
  input  logic [W-1:0] din,
  input  logic         rclk,
  output logic [W-1:0] dout,
  output logic         dout_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic         full, empty;

  function automatic logic [AW:0] to_gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side (wclk) ----------------
  // Full when the write pointer is exactly DEPTH ahead of the read pointer:
  // in Gray code, the two top bits differ and the rest are equal.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (!full) mem[wbin[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (!full) begin
        wbin  <= wbin + 1'b1;
        wgray <= to_gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side (rclk) ----------------
  assign empty = (rgray == wgray_r2);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin       <= '0;
      rgray      <= '0;
      wgray_r1   <= '0;
      wgray_r2   <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      wgray_r1   <= wgray;
      wgray_r2   <= wgray_r1;
      dout_valid <= !empty;
      if (!empty) begin
        dout  <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= to_gray(rbin + 1'b1);
      end
    end
  end
endmodule
