// spi_slave: Core FPGA end of the link that lets the VME FPGA reach the Core
// FPGA configuration registers.
//
// Frame (SPI mode 0, MSB first, 32 clocks with cs_n low):
//   bit 31      1 = read, 0 = write
//   bits 30:16  register address
//   bits 15:0   write data (write), or read data returned on miso (read)
// sclk, cs_n and mosi are asynchronous to the core clock and are oversampled
// through two-flip-flop synchronisers, so the SPI clock must stay low and high
// for at least 5 core clocks each. mosi is taken on each rising sclk edge. For a
// read, the register is read right after the 16th bit and its value is shifted
// out on miso from the 16th falling edge, so that the master finds the MSB at
// the 17th rising edge. A write is performed with a one-clock wr pulse once all
// 32 bits have arrived; a frame cut short by cs_n rising does nothing.
// The master/slave SPI link follows the module description; the frame format
// and the oversampling are choices of this design.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  // local register bus
  output logic        wr,
  output logic [14:0] addr,
  output logic [15:0] wdata,
  input  logic [15:0] rdata
);

  logic [2:0] sclk_s;
  logic [1:0] cs_s, mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  logic rise, fall, sel;
  assign rise = sclk_s[1] & ~sclk_s[2];
  assign fall = ~sclk_s[1] & sclk_s[2];
  assign sel  = ~cs_s[1];

  logic [31:0] rx;
  logic [5:0]  nbits;
  logic [15:0] tx;

  assign miso  = tx[15];
  // During a read the address is in the first 16 bits (rx[14:0] from bit 16
  // on); during the write pulse all 32 bits are in and it sits in rx[30:16].
  assign addr  = wr ? rx[30:16] : rx[14:0];
  assign wdata = rx[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx    <= '0;
      nbits <= '0;
      tx    <= '0;
      wr    <= 1'b0;
    end else begin
      wr <= 1'b0;
      if (!sel) begin
        nbits <= '0;
        tx    <= '0;
      end else begin
        if (rise && nbits != 6'd32) begin
          rx    <= {rx[30:0], mosi_s[1]};
          nbits <= nbits + 1'b1;
          // 32nd bit arriving; rx[30] is then the read/write bit.
          if (nbits == 6'd31 && !rx[30]) wr <= 1'b1;
        end
        if (fall) begin
          if (nbits == 6'd16 && rx[15]) tx <= rdata;
          else                          tx <= {tx[14:0], 1'b0};
        end
      end
    end
  end

endmodule
