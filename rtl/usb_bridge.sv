// usb_bridge: command decoder behind the USB interface, for standalone use of
// the module outside a VME crate.
//
// The host sends byte commands through the FT245BM (multi-byte fields MSB
// first):
//   'W' (0x57) a1 a0 d1 d0  write Core FPGA register {a1,a0} with {d1,d0}
//   'R' (0x52) a1 a0        read Core FPGA register, reply d1 d0
//   'F' (0x46) n1 n0        read n words of the output FIFO, reply 4 bytes
//                           each, MSB first (0 for a word asked from an empty
//                           FIFO)
// Unknown command bytes are dropped. Register accesses share the master SPI
// with the VME side: the bridge raises spi_req and starts when spi_gnt is
// given. FIFO pops are requested with fifo_req and count only when fifo_gnt
// is given. That the output data and the Core FPGA registers can be reached
// through the USB port follows the module description; the command set is this
// design's choice.
module usb_bridge (
  input  logic        clk,
  input  logic        rst_n,
  // byte streams from/to ft245_if
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  output logic        rx_ready,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  input  logic        tx_ready,
  // master SPI
  output logic        spi_req,
  input  logic        spi_gnt,
  output logic [31:0] spi_cmd,
  input  logic        spi_done,
  input  logic [15:0] spi_rdata,
  // output FIFO
  input  logic [31:0] fifo_q,
  input  logic        fifo_empty,
  output logic        fifo_req,
  input  logic        fifo_gnt,
  output logic        active
);

  typedef enum logic [2:0] {C_CMD, C_ARG, C_SPI, C_SPI_WAIT, C_FIFO, C_SEND} cstate_e;
  cstate_e state;

  logic [7:0]  cmd;
  logic [2:0]  nargs, argi;
  logic [31:0] args;       // received argument bytes, left-aligned as they come
  logic [31:0] txbuf;
  logic [2:0]  ntx;        // bytes left to send
  logic [15:0] nwords;     // FIFO words left to send

  assign rx_ready = (state == C_CMD) || (state == C_ARG);
  assign active   = (state != C_CMD);
  assign tx_valid = (state == C_SEND);
  assign tx_data  = txbuf[31:24];
  assign spi_req  = (state == C_SPI);
  assign fifo_req = (state == C_FIFO) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_CMD;
      cmd     <= '0;
      nargs   <= '0;
      argi    <= '0;
      args    <= '0;
      txbuf   <= '0;
      ntx     <= '0;
      nwords  <= '0;
      spi_cmd <= '0;
    end else begin
      unique case (state)
        C_CMD: if (rx_valid) begin
          cmd  <= rx_data;
          argi <= '0;
          args <= '0;
          unique case (rx_data)
            8'h57:   begin nargs <= 3'd4; state <= C_ARG; end
            8'h52,
            8'h46:   begin nargs <= 3'd2; state <= C_ARG; end
            default: state <= C_CMD;
          endcase
        end
        C_ARG: if (rx_valid) begin
          args <= {args[23:0], rx_data};
          argi <= argi + 1'b1;
          if (argi == nargs - 3'd1) begin
            if (cmd == 8'h46) begin
              nwords <= {args[7:0], rx_data};
              state  <= ({args[7:0], rx_data} == 16'd0) ? C_CMD : C_FIFO;
            end else if (cmd == 8'h57) begin
              spi_cmd <= {1'b0, args[22:0], rx_data};
              state   <= C_SPI;
            end else begin
              spi_cmd <= {1'b1, args[6:0], rx_data, 16'd0};
              state   <= C_SPI;
            end
          end
        end
        C_SPI: if (spi_gnt) state <= C_SPI_WAIT;
        C_SPI_WAIT: if (spi_done) begin
          if (spi_cmd[31]) begin
            txbuf <= {spi_rdata, 16'd0};
            ntx   <= 3'd2;
            state <= C_SEND;
          end else begin
            state <= C_CMD;
          end
        end
        C_FIFO: begin
          if (fifo_empty) begin
            txbuf  <= '0;
            ntx    <= 3'd4;
            nwords <= nwords - 1'b1;
            state  <= C_SEND;
          end else if (fifo_gnt) begin
            txbuf  <= fifo_q;
            ntx    <= 3'd4;
            nwords <= nwords - 1'b1;
            state  <= C_SEND;
          end
        end
        C_SEND: if (tx_ready) begin
          txbuf <= {txbuf[23:0], 8'd0};
          ntx   <= ntx - 1'b1;
          if (ntx == 3'd1) state <= (cmd == 8'h46 && nwords != 16'd0) ? C_FIFO : C_CMD;
        end
        default: state <= C_CMD;
      endcase
    end
  end

endmodule
