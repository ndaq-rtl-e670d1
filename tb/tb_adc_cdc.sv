// tb_adc_cdc: self-checking test of the ADC clock-domain crossing FIFO.
//
// The write side is fed a counter, one value per write-clock edge, so every
// word names its own position in the stream. Three runs, each after a reset:
//   1. both sides on the same clock: every value must come out, in order, and
//      exactly 3 clocks after it was written (the block's stated latency);
//   2. the read clock slightly faster than the write clock, with an odd phase:
//      every value must come out, in order, none lost or repeated;
//   3. the read clock slower than the write clock: the FIFO overflows and
//      drops words, but what comes out must still be rising values written
//      earlier, never a corrupted or repeated word.
// Checks are made on every valid output word. A watchdog ends the run.
module tb_adc_cdc;
  localparam int W = 16;

  logic rst_n = 0, wclk = 0, rclk_i = 0;
  logic same = 1;
  logic [W-1:0] din, dout;
  logic dout_valid;
  wire rclk = same ? wclk : rclk_i;
  int  whalf = 4, rhalf = 4;

  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [W-1:0] expect_v;
  bit  lossless = 1;

  adc_cdc #(.W(W), .DEPTH(8)) dut (
    .rst_n, .wclk, .din, .rclk, .dout, .dout_valid
  );

  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk_i = ~rclk_i;

  // Write-domain counter.
  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) din <= '0;
    else din <= din + 1'b1;
  end

  // Read-domain checker, sampling after the edge has settled.
  always @(negedge rclk) begin
    if (rst_n && dout_valid) begin
      checks++;
      if (lossless) begin
        if (dout != expect_v) begin
          failures++;
          $display("FAIL: got %0d expected %0d (t=%0t)", dout, expect_v, $time);
        end
      end else if (nvalid > 0 && dout <= expect_v - 1'b1) begin
        failures++;
        $display("FAIL: %0d does not follow %0d (t=%0t)", dout, expect_v - 1'b1, $time);
      end
      if (same) begin
        checks++;
        // Written at edge t, out after edge t+3; the counter is then 4 ahead.
        if (dout != din - 4) begin
          failures++;
          $display("FAIL: latency, dout %0d din %0d (t=%0t)", dout, din, $time);
        end
      end
      expect_v = dout + 1'b1;
      nvalid++;
    end
  end

  task automatic run(input bit s, input int wh, input int rh, input bit ll, input int cycles);
    rst_n = 0;
    same = s; whalf = wh; rhalf = rh; lossless = ll;
    expect_v = '0; nvalid = 0;
    repeat (3) @(posedge wclk);
    rst_n = 1;
    repeat (cycles) @(posedge wclk);
  endtask

  initial begin
    int n1, n2, n3;
    run(1, 4, 4, 1, 400);
    n1 = nvalid;
    run(0, 4, 3, 1, 400);
    n2 = nvalid;
    run(0, 4, 6, 0, 400);
    n3 = nvalid;
    // Runs 1 and 2 deliver every word written (minus the pipeline fill);
    // run 3 can deliver only about two thirds of them.
    checks++; if (n1 < 390) begin failures++; $display("FAIL: run 1 delivered %0d", n1); end
    checks++; if (n2 < 390) begin failures++; $display("FAIL: run 2 delivered %0d", n2); end
    checks++; if (n3 < 200 || n3 > 300) begin failures++; $display("FAIL: run 3 delivered %0d", n3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
