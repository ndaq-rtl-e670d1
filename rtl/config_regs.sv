// config_regs: Core FPGA configuration and status registers.
//
// A 16-bit register file behind a simple local bus (write strobe, read strobe,
// 15-bit address) that the slave SPI drives. It holds the acquisition controls
// (run, trigger mode, FIR bypass), the internal-trigger channel mask, the
// coincidence window and the per-channel digital-trigger thresholds, and returns
// status, trigger rate and event count on reads. Writes in the coefficient window
// REG_COEF_BASE + ch*128 + tap are not stored here but forwarded, as coef_we with
// channel, tap and value, to the FIR filters. The existence of configuration
// registers reached over SPI follows the module description; the register map
// (ndaq_pkg) is this design's choice. rdata is combinational from raddr.
module config_regs
  import ndaq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // local bus
  input  logic              wr,
  input  logic [14:0]       addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  // controls
  output logic              run,
  output trig_mode_e        mode,
  output logic              fir_bypass,
  output logic [NCH-1:0]    int_mask,
  output logic [7:0]        coinc_window,
  output logic signed [SAMPLE_W-1:0] threshold [NCH],
  // coefficient loading
  output logic              coef_we,
  output logic [2:0]        coef_ch,
  output logic [6:0]        coef_tap,
  output logic signed [COEF_W-1:0] coef_data,
  // status
  input  logic [15:0]       status,
  input  logic [31:0]       rate,
  input  logic [15:0]       event_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run          <= 1'b0;
      mode         <= TRIG_EXTERNAL;
      fir_bypass   <= 1'b0;
      int_mask     <= '1;
      coinc_window <= 8'd16;
      for (int c = 0; c < NCH; c++) threshold[c] <= 16'sd1000;
    end else if (wr) begin
      if (addr == REG_CTRL) begin
        run        <= wdata[0];
        mode       <= trig_mode_e'(wdata[2:1]);
        fir_bypass <= wdata[3];
      end
      if (addr == REG_INTMASK) int_mask     <= wdata[NCH-1:0];
      if (addr == REG_COINC)   coinc_window <= wdata[7:0];
      for (int c = 0; c < NCH; c++)
        if (addr == REG_THR_BASE + 15'(c)) threshold[c] <= wdata;
    end
  end

  // Coefficient window: 0x1000..0x13FF.
  logic in_coef;
  assign in_coef   = (addr[14:10] == REG_COEF_BASE[14:10]);
  assign coef_we   = wr && in_coef;
  assign coef_ch   = addr[9:7];
  assign coef_tap  = addr[6:0];
  assign coef_data = wdata;

  always_comb begin
    rdata = '0;
    unique case (addr)
      REG_CTRL:    rdata = {12'd0, fir_bypass, mode, run};
      REG_INTMASK: rdata = {{(16-NCH){1'b0}}, int_mask};
      REG_STATUS:  rdata = status;
      REG_RATE_LO: rdata = rate[15:0];
      REG_RATE_HI: rdata = rate[31:16];
      REG_EVT_LO:  rdata = event_count;
      REG_COINC:   rdata = {8'd0, coinc_window};
      default: begin
        for (int c = 0; c < NCH; c++)
          if (addr == REG_THR_BASE + 15'(c)) rdata = threshold[c];
      end
    endcase
  end

endmodule
