// fir_transposed: optimal-filter FIR for one ADC channel, transposed structure.
//
// Computes y[n] = sum_{k=0}^{NTAPS-1} c[k] * x[n-k] on every clock (one sample per
// clock, 125 MHz in the module). In the transposed form each tap multiplies the
// current sample by its coefficient and adds the partial sum held in the next tap's
// register, so the long adder tree of the direct form becomes a chain of short
// multiply-add stages with one register each; that is what lets the filter run at
// the sampling rate in plain logic cells. The 100-tap length and the transposed
// structure follow the module description.
//
// Choices of this implementation: the 10-bit ADC code is offset binary and is
// turned into two's complement by inverting its MSB; coefficients are signed
// COEF_W-bit numbers loaded one at a time through coef_we/coef_addr/coef_data
// (they reset to zero); the full-precision sum is shifted right by OUT_SHIFT and
// saturated to SAMPLE_W bits.
//
// Timing: the sample on adc_in at clock edge t contributes to y_full after edge
// t+2 and to y_out after edge t+3 (LATENCY = 3 for y_out).
module fir_transposed
  import ndaq_pkg::*;
#(
  parameter int unsigned TAPS      = NTAPS,
  parameter int unsigned IN_W      = ADC_W,
  parameter int unsigned CW        = COEF_W,
  parameter int unsigned OUT_W     = SAMPLE_W,
  parameter int unsigned OUT_SHIFT = 14,
  parameter int unsigned ACC_W     = IN_W + CW + $clog2(TAPS) + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [IN_W-1:0]           adc_in,     // offset-binary ADC code
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_addr,
  input  logic signed [CW-1:0]      coef_data,
  output logic signed [ACC_W-1:0]   y_full,     // full-precision filter output
  output logic signed [OUT_W-1:0]   y_out       // scaled and saturated output
);

  logic signed [CW-1:0]    coef [TAPS];
  logic signed [IN_W-1:0]  x_r;
  logic signed [ACC_W-1:0] z    [TAPS];   // z[0] unused as a register; z[k] partial sums
  logic signed [IN_W+CW-1:0] prod [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= '0;
    end else if (coef_we && 32'(coef_addr) < TAPS) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++) prod[k] = coef[k] * x_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0;
      for (int k = 0; k < TAPS; k++) z[k] <= '0;
      y_full <= '0;
    end else begin
      x_r <= {~adc_in[IN_W-1], adc_in[IN_W-2:0]};
      z[TAPS-1] <= ACC_W'(prod[TAPS-1]);
      for (int k = 1; k < TAPS-1; k++) z[k] <= ACC_W'(prod[k]) + z[k+1];
      z[0] <= '0;
      y_full <= ACC_W'(prod[0]) + z[1];
    end
  end

  // Scale and saturate.
  localparam logic signed [OUT_W-1:0] MAXV = {1'b0, {(OUT_W-1){1'b1}}};
  localparam logic signed [OUT_W-1:0] MINV = {1'b1, {(OUT_W-1){1'b0}}};
  logic signed [ACC_W-1:0] shifted;
  assign shifted = y_full >>> OUT_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_out <= '0;
    else if (shifted > ACC_W'(MAXV)) y_out <= MAXV;
    else if (shifted < ACC_W'(MINV)) y_out <= MINV;
    else y_out <= shifted[OUT_W-1:0];
  end

endmodule
