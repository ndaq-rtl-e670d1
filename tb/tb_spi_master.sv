// tb_spi_master: a behavioural SPI slave (mode 0) in this bench records the
// 32 bits the master sends and returns a known 16-bit value in the data phase
// of reads. Checks the transmitted frames, the read data, the number of sclk
// edges and the transaction time of 65 * HALF + 1 clocks from start to done.
module tb_spi_master;
  localparam int HALF = 8;
  logic clk = 0, rst_n = 0, start = 0, rw = 0;
  logic [14:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic busy, done, sclk, cs_n, mosi, miso;

  spi_master #(.HALF(HALF)) dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  // behavioural slave
  logic [31:0] got;
  int nedges;
  logic [15:0] reply;
  logic [15:0] txs;
  always @(negedge cs_n) begin got = 0; nedges = 0; txs = reply; end
  always @(posedge sclk) if (!cs_n) begin got = {got[30:0], mosi}; nedges++; end
  always @(negedge sclk) if (!cs_n && nedges >= 16) begin
    miso = txs[15];
    txs = {txs[14:0], 1'b0};
  end
  initial miso = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] cmd;
      cmd = $urandom;
      reply = 16'($urandom);
      @(negedge clk);
      rw = cmd[31]; addr = cmd[30:16]; wdata = cmd[15:0]; start = 1;
      @(posedge clk); t0 = $time;
      @(negedge clk) start = 0;
      @(posedge clk iff done); t1 = $time;
      checks += 3;
      if (got !== cmd) begin failures++; $display("frame %h exp %h", got, cmd); end
      if (nedges != 32) failures++;
      if ((t1 - t0) / 8 != 65 * HALF + 1) begin failures++; $display("time %0d", (t1 - t0) / 8); end
      if (cmd[31]) begin
        checks++;
        if (rdata !== reply) begin failures++; $display("rdata %h exp %h", rdata, reply); end
      end
      @(negedge clk iff !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
