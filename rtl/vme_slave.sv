// vme_slave: VME bus decoding and control in the VME FPGA.
//
// An A24/D32 slave. The strobes (as_n, ds_n, write_n) are asynchronous and pass
// two-flip-flop synchronisers; address, address modifier and data are sampled
// once the synchronised strobe is seen, since the bus holds them stable by then.
// The module answers when a[23:16] equals BASE and the address modifier is an
// A24 data (0x39, 0x3D) or block-transfer (0x3B, 0x3F) code. Registers, by
// offset a[7:2]:
//   0x00 SPI_CMD  write {rw, addr[14:0], data[15:0]}: start a Core FPGA register
//                 access through the master SPI (the cycle is acknowledged once
//                 the master is free); read {busy, 15'd0, last read data[15:0]}
//   0x04 STATUS   read {30'd0, usb_active, fifo_empty}
//   0x08 FIFO     read: pops one word of the external output FIFO (0 if empty)
// In a block transfer the address stays on FIFO so that successive data strobes
// drain the FIFO; for the other registers it advances by 4. Each data strobe is
// answered by dtack_n low until ds_n rises. Block reads from the output FIFOs
// and the control of register access through the master SPI follow the module
// description; the register map and base-address decoding are this design's.
module vme_slave #(
  parameter logic [7:0] BASE = 8'h10
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (active-low strobes)
  input  logic        as_n,
  input  logic        ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [23:2] a,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  // master SPI command port
  output logic        spi_start,
  output logic [31:0] spi_cmd,
  input  logic        spi_busy,
  input  logic [15:0] spi_rdata,
  // external output FIFO read port (first word fall-through)
  input  logic [31:0] fifo_q,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  input  logic        usb_active
);

  localparam logic [5:0] OFS_SPI = 6'h00, OFS_STAT = 6'h01, OFS_FIFO = 6'h02;

  logic [1:0] as_s, ds_s, wr_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= '1;
      ds_s <= '1;
      wr_s <= '1;
    end else begin
      as_s <= {as_s[0], as_n};
      ds_s <= {ds_s[0], ds_n};
      wr_s <= {wr_s[0], write_n};
    end
  end
  logic as_act, ds_act, is_write;
  assign as_act   = ~as_s[1];
  assign ds_act   = ~ds_s[1];
  assign is_write = ~wr_s[1];

  typedef enum logic [2:0] {V_IDLE, V_SKIP, V_WAIT_DS, V_ACT, V_ACK} vstate_e;
  vstate_e state;
  logic [5:0] ofs;
  logic       blt;

  logic am_ok;
  always_comb begin
    unique case (am)
      6'h39, 6'h3D, 6'h3B, 6'h3F: am_ok = 1'b1;
      default:                    am_ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= V_IDLE;
      ofs       <= '0;
      blt       <= 1'b0;
      d_out     <= '0;
      d_oe      <= 1'b0;
      dtack_n   <= 1'b1;
      spi_start <= 1'b0;
      spi_cmd   <= '0;
      fifo_rd   <= 1'b0;
    end else begin
      spi_start <= 1'b0;
      fifo_rd   <= 1'b0;
      unique case (state)
        V_IDLE: if (as_act) begin
          ofs   <= a[7:2];
          blt   <= am[1:0] == 2'b11;
          state <= (a[23:16] == BASE && am_ok) ? V_WAIT_DS : V_SKIP;
        end
        V_SKIP: if (!as_act) state <= V_IDLE;
        V_WAIT_DS: begin
          if (!as_act)     state <= V_IDLE;
          else if (ds_act) state <= V_ACT;
        end
        V_ACT: begin
          if (is_write) begin
            if (ofs == OFS_SPI) begin
              if (!spi_busy && !spi_start) begin
                spi_cmd   <= d_in;
                spi_start <= 1'b1;
                state     <= V_ACK;
              end
            end else begin
              state <= V_ACK;
            end
          end else begin
            unique case (ofs)
              OFS_SPI:  d_out <= {spi_busy, 15'd0, spi_rdata};
              OFS_STAT: d_out <= {30'd0, usb_active, fifo_empty};
              OFS_FIFO: begin
                d_out   <= fifo_empty ? 32'd0 : fifo_q;
                fifo_rd <= !fifo_empty;
              end
              default:  d_out <= '0;
            endcase
            d_oe  <= 1'b1;
            state <= V_ACK;
          end
        end
        V_ACK: begin
          dtack_n <= 1'b0;
          if (!ds_act) begin
            dtack_n <= 1'b1;
            d_oe    <= 1'b0;
            if (blt && ofs != OFS_FIFO) ofs <= ofs + 1'b1;
            state   <= as_act ? V_WAIT_DS : V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  // One data strobe, one acknowledge.
  a_dtack_needs_ds: assert property (@(posedge clk) disable iff (!rst_n)
                                     !dtack_n |-> state == V_ACK);

endmodule
