// tb_data_builder: feeds two events (post-FIFO contents, TDC hits, rate and
// trigger information) with random back-pressure on out_full and compares the
// words written with the event format computed here: header, rate, trigger,
// TDC words, 8 x 64 sample-pair words, trailer with the word count.
module tb_data_builder;
  import ndaq_pkg::*;
  localparam int CH = NCH, FRAME = FRAME_N;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [SAMPLE_W-1:0] post_dout [CH];
  logic [CH-1:0] post_pop;
  logic tdc_valid, tdc_pop;
  logic [27:0] tdc_data;
  logic [31:0] rate = '0;
  logic [1:0] trig_mode = 2'd2;
  logic trig_ext = 1'b1;
  logic [7:0] trig_crossed = 8'h21;
  logic [31:0] out_data;
  logic out_we, out_full = 0;
  logic [23:0] event_count;

  data_builder dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // post-FIFO and TDC models
  logic [SAMPLE_W-1:0] frame [CH][FRAME];
  int rd [CH];
  logic [27:0] hits [$];
  for (genvar c = 0; c < CH; c++) assign post_dout[c] = frame[c][rd[c] % FRAME];
  assign tdc_valid = hits.size() > 0;
  assign tdc_data  = tdc_valid ? hits[0] : '0;
  always @(posedge clk) begin
    for (int c = 0; c < CH; c++) if (rst_n && post_pop[c]) rd[c]++;
    if (rst_n && tdc_pop) void'(hits.pop_front());
    out_full <= ($urandom_range(0, 4) == 0);
  end

  logic [31:0] got [$];
  always @(posedge clk) if (rst_n && out_we) got.push_back(out_data);

  initial begin
    logic [31:0] exp [$];
    for (int c = 0; c < CH; c++) rd[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 2; ev++) begin
      int nh;
      nh = ev == 0 ? 3 : 0;
      rate = ev == 0 ? 32'd1234 : 32'h0200_0000;   // second one saturates
      for (int c = 0; c < CH; c++) for (int i = 0; i < FRAME; i++) frame[c][i] = SAMPLE_W'($urandom);
      for (int h = 0; h < nh; h++) hits.push_back(28'($urandom));
      exp = {};
      exp.push_back({8'hA5, 24'(ev)});
      exp.push_back({8'hF0, ev == 0 ? 24'd1234 : 24'hFFFFFF});
      exp.push_back({8'hE0, 6'd0, trig_mode, trig_ext, 7'd0, trig_crossed});
      for (int h = 0; h < nh; h++) exp.push_back({4'hC, hits[h]});
      for (int c = 0; c < CH; c++) for (int i = 0; i < FRAME; i += 2) exp.push_back({frame[c][i+1], frame[c][i]});
      exp.push_back({8'h5A, 24'(exp.size() + 1)});
      got = {};
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (!busy);
      repeat (2) @(posedge clk);
      checks++;
      if (got.size() != exp.size()) begin failures++; $display("event %0d: %0d words, expected %0d", ev, got.size(), exp.size()); end
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++;
          if (failures < 10) $display("word %0d: %h expected %h", i, got[i], exp[i]);
        end
      end
      checks++;
      if (event_count != 24'(ev + 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
