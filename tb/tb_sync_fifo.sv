// tb_sync_fifo: random pushes and pops against a queue model; checks dout,
// empty, full and count every clock, with the FIFO driven to full and empty.
module tb_sync_fifo;
  localparam int D = 128, W = 16;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.DEPTH(D), .W(W)) dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int bias;
      bias = (n / 1000) % 2 ? 1 : 3;   // alternate phases: mostly push, mostly pop
      @(negedge clk);
      checks += 3;
      if (empty != (q.size() == 0)) failures++;
      if (full != (q.size() == D)) failures++;
      if (int'(count) != q.size()) failures++;
      if (q.size() > 0) begin checks++; if (dout !== q[0]) failures++; end
      if (full) saw_full++;
      if (empty) saw_empty++;
      push = ($urandom_range(0, 3) < bias) && !full;
      pop  = ($urandom_range(0, 3) >= bias) && !empty;
      din  = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    @(negedge clk); push = 0; pop = 0;
    checks += 2;
    if (saw_full == 0) failures++;
    if (saw_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
