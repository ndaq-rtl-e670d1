// digital_trigger: the internal ("digital") trigger, one comparator per channel.
//
// Each channel's filtered sample is compared with that channel's signed threshold;
// a channel is "above" while its sample is strictly greater than the threshold.
// The internal trigger is a one-clock pulse on the first clock on which any
// channel enabled in int_mask goes from not-above to above; one such crossing on
// any channel starts the capture of all channels. One comparator per channel and
// the any-channel rule follow the module description; the strict comparison,
// the rising-crossing pulse and the channel mask are choices of this design.
//
// Timing: above and int_trig are registered, one clock after the sample.
module digital_trigger
  import ndaq_pkg::*;
#(
  parameter int unsigned CH = NCH,
  parameter int unsigned W  = SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] sample    [CH],
  input  logic signed [W-1:0] threshold [CH],
  input  logic [CH-1:0]       int_mask,
  output logic [CH-1:0]       above,      // registered comparator outputs
  output logic [CH-1:0]       crossed,    // channels that crossed on this pulse
  output logic                int_trig    // one-clock internal trigger pulse
);

  logic [CH-1:0] cmp;
  always_comb begin
    for (int c = 0; c < CH; c++) cmp[c] = sample[c] > threshold[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above    <= '0;
      crossed  <= '0;
      int_trig <= 1'b0;
    end else begin
      above    <= cmp;
      crossed  <= cmp & ~above & int_mask;
      int_trig <= |(cmp & ~above & int_mask);
    end
  end

endmodule
