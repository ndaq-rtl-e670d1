// tb_capture_ctrl: checks that an accepted trigger enables exactly FRAME writes
// (counting only clocks with pre_valid), that frame_done pulses on the last
// one, and that triggers arriving while busy, not armed or not ready are
// refused and counted as lost.
module tb_capture_ctrl;
  import ndaq_pkg::*;
  localparam int FRAME = FRAME_N;
  logic clk = 0, rst_n = 0, run = 0, trig = 0, armed = 0, ready = 1, pre_valid = 0;
  logic post_we, busy, accepted, frame_done;
  logic [15:0] lost;

  capture_ctrl dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  int nwe = 0, ndone = 0, nacc = 0;
  always @(posedge clk) if (rst_n) begin
    if (post_we) nwe++;
    if (frame_done) ndone++;
    if (accepted) nacc++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_trig();
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    pulse_trig();                 // not armed: lost
    checks++; if (lost != 1 || nacc != 0) begin failures++; $display("check failed at %0t: lost != 1 || nacc != 0", $time); end
    armed = 1;
    pre_valid = 1;
    pulse_trig();
    checks++; if (nacc != 1 || !busy) begin failures++; $display("check failed at %0t: nacc != 1 || !busy", $time); end
    repeat (10) @(negedge clk);
    pulse_trig();                 // busy: lost
    checks++; if (lost != 2) begin failures++; $display("check failed at %0t: lost != 2", $time); end
    // drop pre_valid for some clocks: writes must pause
    pre_valid = 0; repeat (7) @(negedge clk); pre_valid = 1;
    wait (frame_done);
    @(posedge clk);
    @(negedge clk);
    checks += 3;
    if (nwe != FRAME) begin failures++; $display("writes %0d", nwe); end
    if (ndone != 1) begin failures++; $display("frame_done count %0d", ndone); end
    if (busy) begin failures++; $display("still busy"); end
    ready = 0;
    pulse_trig();                 // not ready: lost
    checks++; if (lost != 3 || nacc != 1) begin failures++; $display("check failed at %0t: lost != 3 || nacc != 1", $time); end
    ready = 1;
    pulse_trig();
    repeat (20) @(negedge clk);
    run = 0;                      // stop aborts the frame
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("check failed at %0t: busy", $time); end
    checks++; if (ndone != 1) begin failures++; $display("check failed at %0t: ndone != 1", $time); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
