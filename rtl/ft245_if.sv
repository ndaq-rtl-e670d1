// ft245_if: byte interface to the FT245BM USB FIFO chip.
//
// The chip shows a received byte waiting with rxf_n low and room for a byte to
// send with txe_n low; the FPGA reads with an rd_n low pulse (data valid while
// it is low) and writes by putting the byte on the bus and taking wr from high
// to low. This module turns that into two byte streams: rx_valid/rx_data
// (one-clock pulses, when rx_ready) and tx_valid/tx_data/tx_ready. Reads take
// priority over writes. Each strobe lasts STROBE clocks and is followed by
// GAP clocks of recovery, so that the chip's flags settle before being looked at
// again (STROBE = 4, GAP = 6 give 50 ns and 80 ns at 125 MHz, above the chip's
// minimums). The bus is bidirectional: d_oe enables the FPGA's driver.
// The FT245BM interface block follows the module description; the timing
// parameters are this design's choice.
module ft245_if #(
  parameter int unsigned STROBE = 4,
  parameter int unsigned GAP    = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  // chip side
  input  logic       rxf_n,
  input  logic       txe_n,
  output logic       rd_n,
  output logic       wr,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output logic       d_oe,
  // byte streams
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       rx_ready,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready
);

  typedef enum logic [2:0] {U_IDLE, U_RD, U_WR_SETUP, U_WR, U_GAP} ustate_e;
  ustate_e state;

  localparam int unsigned TW = $clog2(STROBE + GAP + 1);
  logic [TW-1:0] t;
  logic [1:0] rxf_s, txe_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_s <= '1;
      txe_s <= '1;
    end else begin
      rxf_s <= {rxf_s[0], rxf_n};
      txe_s <= {txe_s[0], txe_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= U_IDLE;
      t        <= '0;
      rd_n     <= 1'b1;
      wr       <= 1'b0;
      d_out    <= '0;
      d_oe     <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      tx_ready <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      tx_ready <= 1'b0;
      t        <= t + 1'b1;
      unique case (state)
        U_IDLE: begin
          t <= '0;
          if (!rxf_s[1] && rx_ready) begin
            rd_n  <= 1'b0;
            state <= U_RD;
          end else if (!txe_s[1] && tx_valid) begin
            d_out    <= tx_data;
            d_oe     <= 1'b1;
            wr       <= 1'b1;
            tx_ready <= 1'b1;
            state    <= U_WR;
          end
        end
        U_RD: if (t == TW'(STROBE - 1)) begin
          rx_data  <= d_in;
          rx_valid <= 1'b1;
          rd_n     <= 1'b1;
          t        <= '0;
          state    <= U_GAP;
        end
        U_WR: if (t == TW'(STROBE - 1)) begin
          wr    <= 1'b0;          // falling edge writes the byte
          t     <= '0;
          state <= U_WR_SETUP;
        end
        U_WR_SETUP: begin        // hold data one clock after the edge
          d_oe  <= 1'b0;
          t     <= '0;
          state <= U_GAP;
        end
        U_GAP: if (t == TW'(GAP - 1)) state <= U_IDLE;
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
