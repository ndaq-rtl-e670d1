// tb_vme_slave: a VME master made of tasks (address strobe, data strobe, wait
// for DTACK) runs single writes and reads and a block transfer against the
// slave, with a queue as the output FIFO and a stub for the master SPI.
// Checks the SPI command words, the SPI read-back register, status, FIFO words
// in order (single and block reads), and that another base address gets no
// acknowledge.
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, ds_n = 1, write_n = 1;
  logic [5:0] am = '0;
  logic [23:2] a = '0;
  logic [31:0] d_in = '0, d_out;
  logic d_oe, dtack_n;
  logic spi_start, spi_busy;
  logic [31:0] spi_cmd;
  logic [15:0] spi_rdata = 16'h5A5A;
  logic [31:0] fifo_q;
  logic fifo_empty, fifo_rd;
  logic usb_active = 0;

  vme_slave #(.BASE(8'h10)) dut (.*);
  always #12 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output FIFO model
  logic [31:0] fifo [$];
  assign fifo_empty = fifo.size() == 0;
  assign fifo_q = fifo_empty ? 32'd0 : fifo[0];
  always @(posedge clk) if (rst_n && fifo_rd) void'(fifo.pop_front());

  // master SPI stub: busy for 30 clocks, records commands
  int busy_cnt = 0;
  logic [31:0] cmds [$];
  assign spi_busy = busy_cnt != 0;
  always @(posedge clk) begin
    if (rst_n && spi_start) begin busy_cnt <= 30; cmds.push_back(spi_cmd); end
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  logic [31:0] r;
  bit ack;
  task automatic cycle(input logic [23:0] addr, input logic [5:0] amod, input logic wr,
                       input logic [31:0] wd);
    am = amod; a = addr[23:2]; write_n = !wr; d_in = wd;
    #20 as_n = 0;
    #20 ds_n = 0;
    ack = 0;
    fork
      begin wait (!dtack_n); ack = 1; end
      #3000;
    join_any
    disable fork;
    r = d_out;
    #10 ds_n = 1; as_n = 1;
    wait (dtack_n);
    #30;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) fifo.push_back($urandom);
    begin
      logic [31:0] words [$];
      words = fifo;
      // two SPI commands back to back: the second waits for the first
      cycle(24'h100000, 6'h39, 1, 32'h8005_0000);
      cycle(24'h100000, 6'h39, 1, 32'h0010_1234);
      repeat (40) @(posedge clk);
      checks += 3;
      if (cmds.size() != 2) failures++;
      else if (cmds[0] != 32'h8005_0000 || cmds[1] != 32'h0010_1234) failures++;
      if (!ack) failures++;
      cycle(24'h100000, 6'h39, 0, 0);
      checks++; if (r != 32'h0000_5A5A) begin failures++; $display("spi reg %h", r); end
      cycle(24'h100004, 6'h39, 0, 0);
      checks++; if (r != 32'h0) failures++;
      // single read of the FIFO
      cycle(24'h100008, 6'h39, 0, 0);
      checks++; if (r != words[0]) failures++;
      // other base address: ignored
      cycle(24'h200008, 6'h39, 0, 0);
      checks++; if (ack) failures++;
      // block transfer of 49 words: AS held, DS toggled
      am = 6'h3B; a = 22'(24'h100008 >> 2); write_n = 1;
      #20 as_n = 0;
      for (int i = 1; i < 50; i++) begin
        #20 ds_n = 0;
        wait (!dtack_n);
        checks++;
        if (d_out !== words[i]) begin failures++; $display("blt %0d %h exp %h", i, d_out, words[i]); end
        #10 ds_n = 1;
        wait (dtack_n);
      end
      #20 as_n = 1;
      #100;
      checks++; if (!fifo_empty) failures++;
      cycle(24'h100004, 6'h39, 0, 0);
      checks++; if (r != 32'h1) failures++;
      // reading an empty FIFO returns 0
      cycle(24'h100008, 6'h39, 0, 0);
      checks++; if (r != 0 || !ack) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
