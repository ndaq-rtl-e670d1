// pre_fifo: the pre-trigger buffer of one channel.
//
// A DEPTH-word ring FIFO written with every sample while acquisition runs. Once
// it holds DEPTH samples, each new write also pops the oldest word, which appears
// on dout with dout_valid one clock later; dout therefore always carries the
// sample written DEPTH writes earlier. When a trigger arrives, copying dout into
// the post-trigger FIFO for N clocks first flushes the DEPTH stored pre-trigger
// samples and then continues with the samples that follow the trigger. The
// continuously filled FIFO of M = 32 samples follows the module description;
// the ring organisation is this design's choice. clear empties it (acquisition
// stopped); full tells that DEPTH pre-trigger samples are available.
module pre_fifo
  import ndaq_pkg::*;
#(
  parameter int unsigned DEPTH = PRE_M,
  parameter int unsigned W     = SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         we,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         dout_valid,
  output logic         full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW:0]   count;

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      count      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else if (clear) begin
      wptr       <= '0;
      count      <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= we && full;
      if (we) begin
        // When full, the slot about to be overwritten holds the oldest word.
        if (full) dout <= mem[wptr];
        else      count <= count + 1'b1;
        wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      end
    end
  end

endmodule
