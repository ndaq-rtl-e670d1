// tb_fir_transposed: checks the transposed FIR against a direct convolution.
// Loads random coefficients through the coefficient port, drives random ADC
// codes (plus a unit impulse), and compares y_full two clocks and y_out three
// clocks after each input with sum c[k]*x[n-k] computed here, including the
// shift-and-saturate step.
module tb_fir_transposed;
  import ndaq_pkg::*;
  localparam int TAPS = NTAPS;
  localparam int NS   = 600;
  localparam int ACC_W = ADC_W + COEF_W + $clog2(TAPS) + 1;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_in = ADC_W'(512);
  logic coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic signed [ACC_W-1:0] y_full;
  logic signed [SAMPLE_W-1:0] y_out;

  fir_transposed dut (.*);

  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int signed c [TAPS];
  int signed x [NS];
  longint signed ref_y [NS];

  function automatic longint signed sat(longint signed v);
    longint signed s = v >>> 14;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < TAPS; k++) begin
      c[k] = int'($urandom_range(0, 65535)) - 32768;
      if (k < 3) c[k] = (k == 0) ? 32767 : -32768;   // extremes
      #1 coef_we = 1; coef_addr = k[$clog2(TAPS)-1:0]; coef_data = c[k][15:0];
      @(posedge clk);
    end
    #1 coef_we = 0;
    // inputs: impulse at n=5 on a zero (code 512) background, then random
    for (int n = 0; n < NS; n++) begin
      int code;
      if (n < 150) code = (n == 5) ? 1023 : 512;
      else if (n < 200) code = (n % 2) ? 1023 : 0;      // drives the output into saturation
      else code = int'($urandom_range(0, 1023));
      x[n] = code - 512;
      ref_y[n] = 0;
      for (int k = 0; k < TAPS; k++) if (n - k >= 0) ref_y[n] += longint'(c[k]) * x[n-k];
    end
    for (int n = 0; n < NS + 3; n++) begin
      if (n < NS) adc_in = ADC_W'(x[n] + 512);
      @(posedge clk);
      #1;
      if (n >= 1 && n - 1 < NS) begin
        checks++;
        if (longint'(y_full) != ref_y[n-1]) begin
          failures++;
          if (failures < 10) $display("y_full n=%0d got %0d exp %0d", n-1, y_full, ref_y[n-1]);
        end
      end
      if (n >= 2 && n - 2 < NS) begin
        checks++;
        if (longint'(y_out) != sat(ref_y[n-2])) begin
          failures++;
          if (failures < 10) $display("y_out n=%0d got %0d exp %0d", n-2, y_out, sat(ref_y[n-2]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
