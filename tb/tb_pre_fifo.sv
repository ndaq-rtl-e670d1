// tb_pre_fifo: writes a counting sequence with gaps; checks that full rises
// after DEPTH writes, that dout then always carries the sample written DEPTH
// writes earlier (valid one clock after the write), and that clear empties it.
module tb_pre_fifo;
  import ndaq_pkg::*;
  localparam int D = PRE_M;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [SAMPLE_W-1:0] din = '0, dout;
  logic dout_valid, full;

  pre_fifo dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int written;
  logic [SAMPLE_W-1:0] hist [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      written = 0;
      hist = {};
      for (int n = 0; n < 400; n++) begin
        logic w, was_full;
        w = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        we = w; din = SAMPLE_W'($urandom);
        was_full = full;
        checks++;
        if (full != (written >= D)) begin failures++; $display("full wrong at %0d", written); end
        @(posedge clk); #1;
        checks++;
        if (dout_valid != (w && was_full)) failures++;
        if (w) begin
          hist.push_back(din);
          written++;
          if (was_full) begin
            checks++;
            if (dout !== hist[0]) begin failures++; $display("dout %h exp %h", dout, hist[0]); end
            void'(hist.pop_front());
          end
        end
      end
      @(negedge clk); we = 0; clear = 1;
      @(negedge clk); clear = 0;
      checks++;
      if (full) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
