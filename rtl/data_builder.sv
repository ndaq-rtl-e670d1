// data_builder: assembles one event from the captured frame, the TDC hits and
// the trigger rate, and writes it as 32-bit words to the external output FIFOs.
//
// Started by the frame_done pulse of capture_ctrl, it writes, one word per clock
// while out_full is low:
//   header   {8'hA5, event number[23:0]}
//   rate     {8'hF0, trigger rate[23:0]}            (saturated to 24 bits)
//   trigger  {8'hE0, 6'd0, mode[1:0], ext, 7'd0, crossed channels[7:0]}
//   TDC hits {4'hC, hit[27:0]}  for each hit waiting, at most MAX_TDC
//   samples  channel 0 to CH-1, FRAME/2 words each, {sample[2i+1], sample[2i]}
//   trailer  {8'h5A, number of words in the event including header and trailer}
// The samples are popped from each channel's post-trigger FIFO in order. What
// the builder collects (filter output, TDC, rate meter) and the 32-bit output
// bus follow the module description; the event format is this design's choice.
module data_builder
  import ndaq_pkg::*;
#(
  parameter int unsigned CH      = NCH,
  parameter int unsigned FRAME   = FRAME_N,
  parameter int unsigned W       = SAMPLE_W,
  parameter int unsigned MAX_TDC = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  // post-trigger FIFOs
  input  logic [W-1:0]  post_dout [CH],
  output logic [CH-1:0] post_pop,
  // TDC hits
  input  logic          tdc_valid,
  input  logic [27:0]   tdc_data,
  output logic          tdc_pop,
  // event information
  input  logic [31:0]   rate,
  input  logic [1:0]    trig_mode,
  input  logic          trig_ext,
  input  logic [7:0]    trig_crossed,
  // output FIFO write port
  output logic [31:0]   out_data,
  output logic          out_we,
  input  logic          out_full,
  output logic [23:0]   event_count
);

  typedef enum logic [2:0] {B_IDLE, B_HDR, B_RATE, B_TRIG, B_TDC, B_DATA, B_TRL} bstate_e;
  bstate_e state;

  localparam int unsigned CHW = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned SW  = $clog2(FRAME);

  logic [CHW-1:0] ch;
  logic [SW-1:0]  idx;        // sample index within the channel
  logic [W-1:0]   low;        // first sample of the pair
  logic [23:0]    nwords;
  logic [$clog2(MAX_TDC+1)-1:0] ntdc;

  logic go;                   // a word may be written this clock
  assign go   = !out_full;
  assign busy = (state != B_IDLE);

  always_comb begin
    post_pop = '0;
    if (state == B_DATA && go) post_pop[ch] = 1'b1;
  end
  assign tdc_pop = (state == B_TDC) && go && tdc_valid && (32'(ntdc) < MAX_TDC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= B_IDLE;
      ch          <= '0;
      idx         <= '0;
      low         <= '0;
      nwords      <= '0;
      ntdc        <= '0;
      out_data    <= '0;
      out_we      <= 1'b0;
      event_count <= '0;
    end else begin
      out_we <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          state  <= B_HDR;
          nwords <= '0;
          ntdc   <= '0;
          ch     <= '0;
          idx    <= '0;
        end
        B_HDR: if (go) begin
          out_data <= {HDR_MARK, event_count};
          out_we   <= 1'b1;
          nwords   <= nwords + 1'b1;
          state    <= B_RATE;
        end
        B_RATE: if (go) begin
          out_data <= {RATE_MARK, (rate > 32'h00FF_FFFF) ? 24'hFF_FFFF : rate[23:0]};
          out_we   <= 1'b1;
          nwords   <= nwords + 1'b1;
          state    <= B_TRIG;
        end
        B_TRIG: if (go) begin
          out_data <= {8'hE0, 6'd0, trig_mode, trig_ext, 7'd0, trig_crossed};
          out_we   <= 1'b1;
          nwords   <= nwords + 1'b1;
          state    <= B_TDC;
        end
        B_TDC: if (go) begin
          if (tdc_pop) begin
            out_data <= {4'hC, tdc_data};
            out_we   <= 1'b1;
            nwords   <= nwords + 1'b1;
            ntdc     <= ntdc + 1'b1;
          end else begin
            state <= B_DATA;
          end
        end
        B_DATA: if (go) begin
          idx <= idx + 1'b1;
          if (!idx[0]) begin
            low <= post_dout[ch];
          end else begin
            out_data <= {post_dout[ch], low};
            out_we   <= 1'b1;
            nwords   <= nwords + 1'b1;
            if (idx == SW'(FRAME-1)) begin
              idx <= '0;
              if (ch == CHW'(CH-1)) state <= B_TRL;
              else                  ch    <= ch + 1'b1;
            end
          end
        end
        B_TRL: if (go) begin
          out_data    <= {TRL_MARK, nwords + 24'd1};
          out_we      <= 1'b1;
          event_count <= event_count + 1'b1;
          state       <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
