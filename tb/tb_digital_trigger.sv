// tb_digital_trigger: random samples and thresholds on eight channels; checks
// the registered comparator outputs, the crossing mask and the internal trigger
// pulse against a model kept here, one clock after each sample.
module tb_digital_trigger;
  import ndaq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [SAMPLE_W-1:0] sample [NCH];
  logic signed [SAMPLE_W-1:0] threshold [NCH];
  logic [NCH-1:0] int_mask, above, crossed;
  logic int_trig;

  digital_trigger dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0, pulses = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NCH-1:0] prev_above, cmp;
  initial begin
    for (int c = 0; c < NCH; c++) begin sample[c] = 0; threshold[c] = 16'sd100 * 16'(c + 1); end
    int_mask = 8'b1011_0111;
    prev_above = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 1000) int_mask = 8'hFF;
      for (int c = 0; c < NCH; c++) begin
        sample[c] = SAMPLE_W'($signed(int'($urandom_range(0, 1200)) - 200));
        cmp[c] = sample[c] > threshold[c];
      end
      @(posedge clk); #1;
      checks += 3;
      if (above !== cmp) failures++;
      if (crossed !== (cmp & ~prev_above & int_mask)) failures++;
      if (int_trig !== |(cmp & ~prev_above & int_mask)) failures++;
      if (int_trig) pulses++;
      prev_above = cmp;
    end
    // equality is not above
    @(negedge clk);
    for (int c = 0; c < NCH; c++) sample[c] = threshold[c];
    @(posedge clk); #1;
    checks++;
    if (above != '0 || int_trig) failures++;
    checks++;
    if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
