// tb_freq_meter: random pulses with a short gate; checks that each published
// rate equals the number of pulses in its gate and that a new value comes every
// GATE clocks.
module tb_freq_meter;
  localparam int GATE = 200;
  logic clk = 0, rst_n = 0, pulse = 0;
  logic [31:0] rate;
  logic rate_valid;

  freq_meter #(.GATE(GATE)) dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt = 0, cyc = 0, last_valid = -1, nvalid = 0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8 * GATE; n++) begin
      pulse = ($urandom_range(0, 9) < (n / GATE) + 1);
      @(posedge clk);
      cyc++;
      if (pulse) cnt++;
      if (cyc % GATE == 0) begin
        #1;
        checks += 2;
        if (!rate_valid) failures++;
        if (rate != cnt) begin failures++; $display("rate %0d exp %0d", rate, cnt); end
        cnt = 0;
        nvalid++;
        @(negedge clk);
      end else begin
        #1;
        checks++;
        if (rate_valid) failures++;
        @(negedge clk);
      end
    end
    checks++;
    if (nvalid != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
