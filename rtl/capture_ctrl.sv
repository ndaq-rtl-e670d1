// capture_ctrl: frame-capture controller shared by the eight channels.
//
// While acquisition runs, every channel's pre_fifo holds the last M samples. A
// trigger is accepted when the pre-trigger FIFOs are full (armed), no capture is
// in progress and the downstream side is ready (the post-trigger FIFOs are
// empty and the data builder is idle). After an accepted trigger the controller
// enables, for FRAME clocks on which the pre_fifo outputs are valid, the write of
// those outputs into the post-trigger FIFOs: the first M are the samples before
// the trigger, the rest (N - M) follow it. Then it pulses frame_done. A trigger
// that arrives while the controller cannot accept it is counted in lost.
//
// N = 128, M = 32 follow the module description; refusing triggers during the
// dead time and the lost-trigger counter are choices of this design.
module capture_ctrl
  import ndaq_pkg::*;
#(
  parameter int unsigned FRAME = FRAME_N
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        trig,         // one-clock trigger pulse
  input  logic        armed,        // pre-trigger FIFOs hold M samples
  input  logic        ready,        // post-trigger FIFOs empty, builder idle
  input  logic        pre_valid,    // pre_fifo outputs valid this clock
  output logic        post_we,      // write pre_fifo outputs into the post FIFOs
  output logic        busy,
  output logic        accepted,     // one-clock pulse: trigger accepted
  output logic        frame_done,   // one-clock pulse: frame complete
  output logic [15:0] lost          // triggers refused (saturating)
);

  localparam int unsigned CW = $clog2(FRAME+1);
  logic [CW-1:0] remaining;

  assign busy     = (remaining != '0);
  assign accepted = run && trig && armed && ready && !busy;
  assign post_we  = busy && pre_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining  <= '0;
      frame_done <= 1'b0;
      lost       <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!run) begin
        remaining <= '0;
      end else if (accepted) begin
        remaining <= CW'(FRAME);
      end else if (post_we) begin
        remaining <= remaining - 1'b1;
        if (remaining == CW'(1)) frame_done <= 1'b1;
      end
      if (run && trig && !accepted && lost != '1) lost <= lost + 1'b1;
    end
  end

endmodule
