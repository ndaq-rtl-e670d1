// tdc_reader: moves hit words from the TDC chip into the Core FPGA.
//
// The TDC (single START, multiple STOP) stores each measured START-to-STOP
// interval in an internal result FIFO and shows that it is empty on ef. While ef
// is low and there is room in the local hit buffer, the reader drives a read
// cycle: rd_n low for RD_CLKS clocks, the 28-bit result word sampled on the last
// of them, then rd_n high for one clock before the next read. The words go into
// a DEPTH-word FIFO that the data builder drains (hit_valid/hit_data/hit_pop).
// clear empties the buffer. The presence of the TDC and its data path to the
// Core FPGA follow the module description; this read cycle and the buffer depth
// are choices of this design (the document gives no interface details).
module tdc_reader #(
  parameter int unsigned RD_CLKS = 3,
  parameter int unsigned DEPTH   = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  // TDC chip side
  input  logic        ef,          // TDC result FIFO empty
  input  logic [27:0] tdc_d,
  output logic        rd_n,
  // hit stream
  output logic        hit_valid,
  output logic [27:0] hit_data,
  input  logic        hit_pop
);

  localparam int unsigned TW = $clog2(RD_CLKS + 1);
  logic [TW-1:0] t;
  logic          reading, recover;
  logic          push;
  logic [27:0]   word;
  logic          empty, full;

  // Room is checked with full at the start of a read; a read in progress
  // always finds a free slot because only this process pushes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading <= 1'b0;
      recover <= 1'b0;
      t       <= '0;
      rd_n    <= 1'b1;
      push    <= 1'b0;
      word    <= '0;
    end else begin
      push <= 1'b0;
      if (recover) begin
        recover <= 1'b0;
      end else if (!reading) begin
        if (!ef && !full && !clear) begin
          reading <= 1'b1;
          rd_n    <= 1'b0;
          t       <= '0;
        end
      end else begin
        t <= t + 1'b1;
        if (t == TW'(RD_CLKS - 1)) begin
          word    <= tdc_d;
          push    <= 1'b1;
          rd_n    <= 1'b1;
          reading <= 1'b0;
          recover <= 1'b1;
        end
      end
    end
  end

  sync_fifo #(.DEPTH(DEPTH), .W(28)) u_buf (
    .clk, .rst_n, .clear,
    .push (push),
    .din  (word),
    .pop  (hit_pop),
    .dout (hit_data),
    .empty(empty),
    .full (full),
    .count()
  );

  assign hit_valid = !empty;

endmodule
