// freq_meter: trigger rate meter.
//
// Counts the trigger pulses that occur during a gate of GATE clocks and, at the
// end of each gate, publishes the count in rate (triggers per gate) with a
// one-clock rate_valid pulse; the counter then restarts. With the default gate
// of 125,000,000 clocks at 125 MHz, rate is in hertz. The rate meter itself
// follows the module description; the gate-and-count method and the gate length
// are choices of this design. The counter saturates at all ones.
module freq_meter #(
  parameter int unsigned GATE = 125_000_000,
  parameter int unsigned W    = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pulse,
  output logic [W-1:0] rate,
  output logic         rate_valid
);

  localparam int unsigned GW = $clog2(GATE);
  logic [GW-1:0] gate_cnt;
  logic [W-1:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_cnt   <= '0;
      cnt        <= '0;
      rate       <= '0;
      rate_valid <= 1'b0;
    end else begin
      rate_valid <= 1'b0;
      if (gate_cnt == GW'(GATE-1)) begin
        gate_cnt   <= '0;
        rate       <= (pulse && cnt != '1) ? cnt + 1'b1 : cnt;
        rate_valid <= 1'b1;
        cnt        <= '0;
      end else begin
        gate_cnt <= gate_cnt + 1'b1;
        if (pulse && cnt != '1) cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
