// spi_master: VME FPGA end of the inter-FPGA link.
//
// A command (start pulse with rw, addr, wdata) sent by the VME side becomes one
// 32-bit SPI frame in the format of spi_slave: read flag, 15-bit address, 16-bit
// data, MSB first, SPI mode 0. Each half period of sclk lasts HALF clocks. mosi
// changes while sclk is low; miso passes a two-flip-flop synchroniser and is
// sampled on the last clock of each high half. cs_n is held low one half period
// before the first edge and after the last one, and stays high at least one half
// period between frames. done pulses for one clock at the end; rdata then holds
// the last 16 bits received (the register value for a read).
// The master SPI driven by VME commands follows the module description; the
// frame format and timing are choices of this design.
//
// Timing: done comes 65 * HALF + 1 clocks after the clock that sampled start.
module spi_master #(
  parameter int unsigned HALF = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        rw,        // 1 = read
  input  logic [14:0] addr,
  input  logic [15:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso
);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_LOW, S_HIGH, S_TRAIL, S_GAP} state_e;
  state_e state;

  localparam int unsigned HW = $clog2(HALF + 1);
  logic [HW-1:0] tick;
  logic [5:0]    bitn;
  logic [31:0]   sr;
  logic [1:0]    miso_s;

  logic half_end;
  assign half_end = (tick == HW'(HALF - 1));
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tick   <= '0;
      bitn   <= '0;
      sr     <= '0;
      rdata  <= '0;
      done   <= 1'b0;
      sclk   <= 1'b0;
      cs_n   <= 1'b1;
      mosi   <= 1'b0;
      miso_s <= '0;
    end else begin
      miso_s <= {miso_s[0], miso};
      done   <= 1'b0;
      tick   <= half_end ? '0 : tick + 1'b1;
      unique case (state)
        S_IDLE: begin
          tick <= '0;
          if (start) begin
            sr    <= {rw, addr, wdata};
            cs_n  <= 1'b0;
            mosi  <= rw;
            bitn  <= '0;
            state <= S_LEAD;
          end
        end
        S_LEAD: if (half_end) begin
          sclk  <= 1'b1;
          state <= S_HIGH;
        end
        S_HIGH: if (half_end) begin
          sclk <= 1'b0;
          sr   <= {sr[30:0], miso_s[1]};
          bitn <= bitn + 1'b1;
          if (bitn == 6'd31) begin
            state <= S_TRAIL;
          end else begin
            mosi  <= sr[30];
            state <= S_LOW;
          end
        end
        S_LOW: if (half_end) begin
          sclk  <= 1'b1;
          state <= S_HIGH;
        end
        S_TRAIL: if (half_end) begin
          cs_n  <= 1'b1;
          mosi  <= 1'b0;
          rdata <= sr[15:0];
          done  <= 1'b1;
          state <= S_GAP;
        end
        S_GAP: if (half_end) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
