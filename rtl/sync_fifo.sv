// sync_fifo: single-clock first-word-fall-through FIFO, used as the post-trigger
// FIFO of each channel (DEPTH = N = 128 samples, one captured frame) and as the
// small hit buffer behind the TDC reader.
//
// dout shows the oldest word whenever empty is low; pop removes it. A push to a
// full FIFO and a pop from an empty one are ignored and flagged by the
// assertions below. The frame depth follows the module description; the
// first-word-fall-through behaviour is this design's choice.
module sync_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rptr];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  // Protocol checks: no push into a full FIFO, no pop from an empty one.
  always_ff @(posedge clk) begin
    if (rst_n && !clear) begin
      a_no_overflow:  assert (!(push && full))  else $error("sync_fifo: push while full");
      a_no_underflow: assert (!(pop && empty))  else $error("sync_fifo: pop while empty");
    end
  end

endmodule
