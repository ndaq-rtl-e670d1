// tb_spi_slave: a bit-banged SPI master (mode 0, half period HALF core clocks)
// writes random values to a register array behind the slave and reads them
// back; checks each write strobe's address and data and each read's returned
// bits. A frame cut short by cs_n must write nothing.
module tb_spi_slave;
  localparam int HALF = 6;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic wr;
  logic [14:0] addr;
  logic [15:0] wdata, rdata;

  spi_slave dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0, nwr = 0;

  logic [15:0] regs [64];
  assign rdata = regs[addr[5:0]];
  logic [14:0] last_waddr;
  always @(posedge clk) if (rst_n && wr) begin
    regs[addr[5:0]] <= wdata;
    last_waddr = addr;
    nwr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [31:0] out, output logic [31:0] in, input int nbits = 32);
    cs_n = 0;
    repeat (HALF) @(posedge clk);
    for (int b = 31; b >= 32 - nbits; b--) begin
      mosi = out[b];
      repeat (HALF) @(posedge clk);
      sclk = 1;
      repeat (HALF) @(posedge clk);
      in[b] = miso;
      sclk = 0;
    end
    repeat (HALF) @(posedge clk);
    cs_n = 1;
    repeat (2 * HALF) @(posedge clk);
  endtask

  logic [15:0] model [64];
  initial begin
    logic [31:0] rx;
    for (int i = 0; i < 64; i++) begin regs[i] = 0; model[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [5:0] a;
      logic [15:0] d;
      int nbefore;
      a = 6'($urandom);
      d = 16'($urandom);
      nbefore = nwr;
      frame({1'b0, 9'd0, a, d}, rx);
      model[a] = d;
      checks += 2;
      if (nwr != nbefore + 1) begin failures++; $display("write %0d not seen", n); end
      if (last_waddr != {9'd0, a}) begin failures++; $display("waddr %h exp %h", last_waddr, a); end
      a = 6'($urandom);
      frame({1'b1, 9'd0, a, 16'h0000}, rx);
      checks++;
      if (rx[15:0] !== model[a]) begin failures++; $display("read %h exp %h", rx[15:0], model[a]); end
    end
    begin
      int nbefore;
      nbefore = nwr;
      frame({1'b0, 9'd0, 6'd3, 16'hDEAD}, rx, 20);
      checks++;
      if (nwr != nbefore) begin failures++; $display("cut frame wrote"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
