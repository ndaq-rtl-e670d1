// trigger_cond: trigger conditioning and trigger-mode selection.
//
// The front-panel trigger is asynchronous to the core clock: it passes a
// two-flip-flop synchroniser and a rising-edge detector, giving a one-clock
// external pulse. The mode then decides what starts a capture:
//   TRIG_EXTERNAL    - the external pulse;
//   TRIG_INTERNAL    - the internal pulse from digital_trigger;
//   TRIG_EXT_AND_INT - the two in coincidence: either pulse fires the trigger if
//                      the other one arrived within the last `window` clocks
//                      (or on the same clock).
// The three modes follow the module description; the coincidence window that
// realises "External+Internal" and the synchroniser depth are choices of this
// design. Code 3 of the mode never triggers.
//
// Timing: trig is a registered one-clock pulse. For an external edge it comes
// 4 clocks after the input rises (2 synchroniser stages, edge register, output
// register); for an internal pulse it comes one clock after int_trig.
module trigger_cond
  import ndaq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ext_trig_in,   // asynchronous front-panel trigger
  input  logic       int_trig,      // one-clock pulse from digital_trigger
  input  trig_mode_e mode,
  input  logic [7:0] window,        // coincidence window in clocks
  output logic       trig,          // one-clock trigger pulse
  output logic       ext_pulse      // synchronised external edge (for monitoring)
);

  logic [2:0] sync;   // [1:0] synchroniser, [2] previous value for the edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], ext_trig_in};
  end
  assign ext_pulse = sync[1] & ~sync[2];

  // Age counters: clocks since the last pulse of each source, saturating.
  logic [8:0] ext_age, int_age;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_age <= '1;
      int_age <= '1;
    end else begin
      ext_age <= ext_pulse ? 9'd0 : (ext_age == '1 ? ext_age : ext_age + 9'd1);
      int_age <= int_trig  ? 9'd0 : (int_age == '1 ? int_age : int_age + 9'd1);
    end
  end

  logic fire;
  always_comb begin
    unique case (mode)
      TRIG_EXTERNAL:    fire = ext_pulse;
      TRIG_INTERNAL:    fire = int_trig;
      TRIG_EXT_AND_INT: fire = (ext_pulse && (int_trig || int_age < {1'b0, window})) ||
                               (int_trig  && (ext_age < {1'b0, window}));
      default:          fire = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= fire;
  end

endmodule
