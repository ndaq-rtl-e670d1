// ndaq_pkg: types and constants shared by the NDAQ Core FPGA and VME FPGA logic.
//
// The numbers that come from the module description are the channel count (8),
// the connected ADC resolution (10 of 12 bits), the FIR length (100 taps), the
// frame length N = 128 and the pre-trigger depth M = 32. Everything else here
// (coefficient and sample widths, the register map, the SPI frame and the event
// word format) is a choice of this implementation and is documented next to it.
package ndaq_pkg;

  localparam int unsigned NCH      = 8;    // analog channels
  localparam int unsigned ADC_W    = 10;   // ADC bits wired to the FPGA
  localparam int unsigned NTAPS    = 100;  // optimal-filter length
  localparam int unsigned COEF_W   = 16;   // signed FIR coefficient width (choice)
  localparam int unsigned SAMPLE_W = 16;   // signed sample width after the FIR (choice)
  localparam int unsigned FRAME_N  = 128;  // samples per captured frame
  localparam int unsigned PRE_M    = 32;   // pre-trigger samples

  // Trigger modes.
  typedef enum logic [1:0] {
    TRIG_EXTERNAL     = 2'd0,  // front-panel trigger only
    TRIG_INTERNAL     = 2'd1,  // any enabled digital comparator
    TRIG_EXT_AND_INT  = 2'd2   // external trigger in coincidence with a comparator
  } trig_mode_e;               // code 3 is unused and produces no trigger

  // Core FPGA register map (16-bit registers, 15-bit address).
  localparam logic [14:0] REG_CTRL     = 15'h0000; // [0] run, [2:1] trig mode, [3] FIR bypass
  localparam logic [14:0] REG_INTMASK  = 15'h0001; // [7:0] channels enabled for internal trigger
  localparam logic [14:0] REG_STATUS   = 15'h0002; // read: [0] armed, [1] capture busy, [2] builder busy
  localparam logic [14:0] REG_RATE_LO  = 15'h0003; // read: trigger rate, low half
  localparam logic [14:0] REG_RATE_HI  = 15'h0004; // read: trigger rate, high half
  localparam logic [14:0] REG_EVT_LO   = 15'h0005; // read: events built, low half
  localparam logic [14:0] REG_COINC    = 15'h0006; // [7:0] coincidence window for EXT+INT, in clocks
  localparam logic [14:0] REG_THR_BASE = 15'h0010; // 0x10..0x17: per-channel threshold (signed)
  localparam logic [14:0] REG_COEF_BASE = 15'h1000; // 0x1000 + ch*128 + tap: FIR coefficient (write)

  // Event word markers written by the data builder.
  localparam logic [7:0] HDR_MARK  = 8'hA5;
  localparam logic [7:0] TDC_MARK  = 8'hC0;   // upper 4 bits 4'hC on TDC words
  localparam logic [7:0] RATE_MARK = 8'hF0;
  localparam logic [7:0] TRL_MARK  = 8'h5A;

endpackage
