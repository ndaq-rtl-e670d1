// ft245bm_model: behavioural model of the FT245BM USB FIFO chip, for
// testbenches. Bytes queued by the host (host_send) show up with rxf_n low and
// are put on d_to_fpga while rd_n is low; the next byte becomes available when
// rd_n rises. A byte driven by the FPGA (d_oe high) is taken on the falling
// edge of wr and queued in to_host; txe_n goes high for a while after each
// write, as on the real chip. Strobe widths below min_strobe ns are counted in
// violations. Strobe activity while active is low (the FPGA still in reset)
// is ignored.
module ft245bm_model #(
  parameter int MIN_STROBE = 30
) (
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr,
  input  logic [7:0] d_from_fpga,
  input  logic       d_oe,
  output logic [7:0] d_to_fpga,
  input  logic       active
);
  logic [7:0] from_host [$];
  logic [7:0] to_host [$];
  int violations = 0;
  int reads = 0, writes = 0;

  function automatic void host_send(logic [7:0] b);
    from_host.push_back(b);
  endfunction

  initial begin
    txe_n = 1'b0;
    d_to_fpga = '0;
  end
  assign rxf_n = (from_host.size() == 0);

  realtime t_rd, t_wr;
  always @(negedge rd_n) if (active) begin
    t_rd = $realtime;
    if (from_host.size() == 0) violations++;
    else d_to_fpga = from_host[0];
  end
  always @(posedge rd_n) if (active && from_host.size() != 0) begin
    if ($realtime - t_rd < MIN_STROBE) violations++;
    void'(from_host.pop_front());
    reads++;
  end
  always @(posedge wr) t_wr = $realtime;
  always @(negedge wr) if (active) begin
    if (!d_oe || txe_n || $realtime - t_wr < MIN_STROBE) violations++;
    to_host.push_back(d_from_fpga);
    writes++;
    txe_n = 1'b1;
    #60 txe_n = 1'b0;
  end
endmodule
