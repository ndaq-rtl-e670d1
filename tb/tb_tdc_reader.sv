// tb_tdc_reader: a behavioural TDC result FIFO (ef flag, data valid while rd_n
// is low) holding random hit words; checks that the reader pulls every word in
// order, that rd_n low pulses last RD_CLKS clocks, that it never reads while ef
// is high, and that it stops when its buffer is full and resumes once drained.
module tb_tdc_reader;
  localparam int RD = 3, DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic ef;
  logic [27:0] tdc_d;
  logic rd_n, hit_valid, hit_pop = 0;
  logic [27:0] hit_data;

  tdc_reader #(.RD_CLKS(RD), .DEPTH(DEPTH)) dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [27:0] chip [$];
  logic [27:0] sent [$];
  assign ef = chip.size() == 0;
  assign tdc_d = rd_n ? 28'hxxxxxxx : chip[0];
  int low = 0;
  always @(posedge clk) begin
    if (!rst_n) low = 0;
    else if (!rd_n) low++;
    else if (low != 0) begin
      checks++;
      if (low != RD) begin failures++; $display("rd_n low for %0d", low); end
      low = 0;
      void'(chip.pop_front());   // chip advances after the read strobe
    end
  end
  always @(negedge rd_n) if (rst_n) begin
    checks++;
    if (ef) failures++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin logic [27:0] w; w = 28'($urandom); chip.push_back(w); sent.push_back(w); end
    repeat (300) @(posedge clk);
    checks++;
    if (chip.size() != 20 - DEPTH) begin failures++; $display("left in chip %0d", chip.size()); end
    // drain everything
    for (int i = 0; i < 20; i++) begin
      @(negedge clk iff hit_valid);
      checks++;
      if (hit_data !== sent[i]) begin failures++; $display("hit %0d %h exp %h", i, hit_data, sent[i]); end
      hit_pop = 1;
      @(negedge clk) hit_pop = 0;
    end
    repeat (50) @(posedge clk);
    checks++;
    if (hit_valid || chip.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
