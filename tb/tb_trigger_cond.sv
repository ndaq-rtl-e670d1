// tb_trigger_cond: exercises the three trigger modes. External mode must give
// one pulse 4 clocks after each rising edge of the asynchronous input; internal
// mode must pass the internal pulse with one clock of delay; External+Internal
// must fire only when the two arrive within the coincidence window.
module tb_trigger_cond;
  import ndaq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ext_trig_in = 0, int_trig = 0;
  trig_mode_e mode = TRIG_EXTERNAL;
  logic [7:0] window = 8'd10;
  logic trig, ext_pulse;

  trigger_cond dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0, ntrig = 0, last_trig = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && trig) begin ntrig++; last_trig = cyc; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(int n, string what);
    checks++;
    if (ntrig != n) begin failures++; $display("%s: %0d triggers, expected %0d", what, ntrig, n); end
    ntrig = 0;
  endtask

  task automatic ipulse();
    @(negedge clk) int_trig = 1;
    @(negedge clk) int_trig = 0;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // External mode: a long external pulse gives exactly one trigger.
    @(negedge clk); ext_trig_in = 1; t0 = cyc;
    repeat (20) @(posedge clk);
    ext_trig_in = 0;
    ipulse();
    repeat (10) @(posedge clk);
    expect_count(1, "external");
    checks++;
    if (last_trig - t0 != 4) begin failures++; $display("ext latency %0d", last_trig - t0); end
    // Internal mode.
    mode = TRIG_INTERNAL;
    @(negedge clk); ext_trig_in = 1; repeat (5) @(negedge clk); ext_trig_in = 0;
    repeat (3) @(negedge clk);
    t0 = cyc; int_trig = 1; @(negedge clk); int_trig = 0;
    repeat (5) @(posedge clk);
    expect_count(1, "internal");
    checks++;
    if (last_trig - t0 != 2) begin failures++; $display("int latency %0d", last_trig - t0); end
    // External+Internal: alone, nothing.
    mode = TRIG_EXT_AND_INT;
    repeat (30) @(posedge clk);
    ipulse();
    repeat (30) @(posedge clk);
    @(negedge clk); ext_trig_in = 1; repeat (5) @(negedge clk); ext_trig_in = 0;
    repeat (30) @(posedge clk);
    expect_count(0, "coincidence, sources apart");
    // internal then external within the window
    ipulse();
    @(negedge clk); ext_trig_in = 1; repeat (5) @(negedge clk); ext_trig_in = 0;
    repeat (30) @(posedge clk);
    expect_count(1, "coincidence, int then ext");
    // external then internal within the window
    @(negedge clk); ext_trig_in = 1; repeat (6) @(negedge clk); ext_trig_in = 0;
    ipulse();
    repeat (30) @(posedge clk);
    expect_count(1, "coincidence, ext then int");
    // external then internal beyond the window
    @(negedge clk); ext_trig_in = 1; repeat (20) @(negedge clk); ext_trig_in = 0;
    ipulse();
    repeat (30) @(posedge clk);
    expect_count(0, "coincidence, too late");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
