// tb_ft245_if: connects the interface to a behavioural FT245BM. The host sends
// random bytes, which must arrive in order on rx_valid/rx_data; random bytes
// offered on tx_valid/tx_data must reach the host in order; the chip model
// checks strobe widths and that no read or write happens when not allowed.
module tb_ft245_if;
  logic clk = 0, rst_n = 0;
  logic rxf_n, txe_n, rd_n, wr, d_oe;
  logic [7:0] d_in, d_out;
  logic rx_valid, rx_ready = 1, tx_valid = 0, tx_ready;
  logic [7:0] rx_data, tx_data = '0;

  ft245_if dut (.*);
  ft245bm_model chip (.rxf_n, .txe_n, .rd_n, .wr, .d_from_fpga(d_out), .d_oe, .d_to_fpga(d_in), .active(rst_n));
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] host_bytes [$], fpga_bytes [$], got [$];
  always @(posedge clk) if (rst_n && rx_valid) got.push_back(rx_data);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b; b = 8'($urandom);
      host_bytes.push_back(b);
      chip.host_send(b);
    end
    for (int i = 0; i < 40; i++) fpga_bytes.push_back(8'($urandom));
    // offer tx bytes while rx traffic is going on
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      tx_valid = 1; tx_data = fpga_bytes[i];
      @(posedge clk iff tx_ready);
      @(negedge clk) tx_valid = 0;
    end
    repeat (200) @(posedge clk);
    checks += 3;
    if (got.size() != 40) begin failures++; $display("received %0d", got.size()); end
    if (chip.to_host.size() != 40) begin failures++; $display("sent %0d", chip.to_host.size()); end
    if (chip.violations != 0) begin failures++; $display("violations %0d", chip.violations); end
    for (int i = 0; i < 40; i++) begin
      checks += 2;
      if (i < got.size() && got[i] !== host_bytes[i]) failures++;
      if (i < chip.to_host.size() && chip.to_host[i] !== fpga_bytes[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
