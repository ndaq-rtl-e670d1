// tb_usb_bridge: drives the command byte stream directly and checks the SPI
// commands issued ('W' and 'R'), the two-byte read reply, and the FIFO words
// sent back by 'F' (4 bytes each, MSB first, 0 for words asked from an empty
// FIFO). The SPI grant is withheld for a while to check that the bridge waits.
module tb_usb_bridge;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready;
  logic [7:0] rx_data = '0, tx_data;
  logic spi_req, spi_gnt, spi_done = 0;
  logic [31:0] spi_cmd;
  logic [15:0] spi_rdata = 16'hC3A5;
  logic [31:0] fifo_q;
  logic fifo_empty, fifo_req, fifo_gnt, active;

  usb_bridge dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SPI stub: grant after a delay, done 10 clocks later
  bit hold = 1;
  assign spi_gnt = spi_req && !hold;
  logic [31:0] cmds [$];
  always @(posedge clk) if (rst_n && spi_gnt) begin
    cmds.push_back(spi_cmd);
    fork begin repeat (10) @(posedge clk); spi_done <= 1; @(posedge clk); spi_done <= 0; end join_none
  end
  // FIFO model
  logic [31:0] fifo [$];
  assign fifo_empty = fifo.size() == 0;
  assign fifo_q = fifo_empty ? 32'd0 : fifo[0];
  assign fifo_gnt = fifo_req;
  bit popq = 0;
  always @(posedge clk) popq <= rst_n && fifo_gnt;
  always @(negedge clk) if (popq) void'(fifo.pop_front());
  // TX sink, accepts every other clock
  logic [7:0] out [$];
  logic tog = 0;
  always @(posedge clk) tog <= ~tog;
  assign tx_ready = tx_valid && tog;
  always @(posedge clk) if (rst_n && tx_ready) out.push_back(tx_data);

  task automatic send(logic [7:0] b);
    @(negedge clk iff rx_ready);
    rx_valid = 1; rx_data = b;
    @(negedge clk) rx_valid = 0;
  endtask

  initial begin
    logic [31:0] words [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(8'h00);   // unknown, dropped
    send(8'h57); send(8'h00); send(8'h10); send(8'hBE); send(8'hEF);
    repeat (30) @(posedge clk);
    checks++; if (cmds.size() != 0) failures++;   // grant withheld
    hold = 0;
    repeat (30) @(posedge clk);
    send(8'h52); send(8'h00); send(8'h03);
    repeat (60) @(posedge clk);
    checks += 4;
    if (cmds.size() != 2) failures++;
    else begin
      if (cmds[0] != 32'h0010_BEEF) begin failures++; $display("W cmd %h", cmds[0]); end
      if (cmds[1] != 32'h8003_0000) begin failures++; $display("R cmd %h", cmds[1]); end
    end
    if (out.size() != 2 || out[0] != 8'hC3 || out[1] != 8'hA5) failures++;
    out = {};
    for (int i = 0; i < 3; i++) fifo.push_back($urandom);
    words = fifo;
    words.push_back(0);
    send(8'h46); send(8'h00); send(8'h04);
    repeat (200) @(posedge clk);
    checks++;
    if (out.size() != 16) begin failures++; $display("F reply %0d bytes", out.size()); end
    for (int i = 0; i < 16 && i < out.size(); i++) begin
      checks++;
      if (out[i] != words[i/4][31 - 8*(i%4) -: 8]) begin failures++; $display("byte %0d %h", i, out[i]); end
    end
    checks++; if (active) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
