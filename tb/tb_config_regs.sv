// tb_config_regs: writes every register through the local bus and reads it
// back, checks the decoded control outputs, the status/rate/event read-only
// registers, and the forwarding of coefficient-window writes.
module tb_config_regs;
  import ndaq_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [14:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic run, fir_bypass;
  trig_mode_e mode;
  logic [NCH-1:0] int_mask;
  logic [7:0] coinc_window;
  logic signed [SAMPLE_W-1:0] threshold [NCH];
  logic coef_we;
  logic [2:0] coef_ch;
  logic [6:0] coef_tap;
  logic signed [COEF_W-1:0] coef_data;
  logic [15:0] status = 16'h0005, event_count = 16'd77;
  logic [31:0] rate = 32'h0012_3456;

  config_regs dut (.*);
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(logic [14:0] a, logic [15:0] d);
    @(negedge clk) wr = 1; addr = a; wdata = d;
    @(negedge clk) wr = 0;
  endtask
  task automatic rcheck(logic [14:0] a, logic [15:0] exp);
    @(negedge clk) addr = a;
    #1 checks++;
    if (rdata !== exp) begin failures++; $display("reg %h = %h exp %h", a, rdata, exp); end
  endtask

  int ncoef = 0;
  logic [15:0] last_coef;
  always @(posedge clk) if (coef_we) begin
    ncoef++;
    last_coef = coef_data;
    checks++;
    if (coef_ch != 3'd5 || coef_tap != 7'd99) failures++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks += 2;
    if (run !== 0 || mode !== TRIG_EXTERNAL) failures++;
    if (threshold[3] !== 16'sd1000) failures++;
    wreg(REG_CTRL, 16'h000D);      // run, mode 2, bypass
    checks += 3;
    if (!run) failures++;
    if (mode != TRIG_EXT_AND_INT) failures++;
    if (!fir_bypass) failures++;
    rcheck(REG_CTRL, 16'h000D);
    wreg(REG_INTMASK, 16'h00A5);
    rcheck(REG_INTMASK, 16'h00A5);
    checks++; if (int_mask != 8'hA5) failures++;
    wreg(REG_COINC, 16'h0033);
    rcheck(REG_COINC, 16'h0033);
    for (int c = 0; c < NCH; c++) wreg(REG_THR_BASE + 15'(c), 16'(-100 * c));
    for (int c = 0; c < NCH; c++) begin
      rcheck(REG_THR_BASE + 15'(c), 16'(-100 * c));
      checks++; if (threshold[c] != 16'(-100 * c)) failures++;
    end
    rcheck(REG_STATUS, 16'h0005);
    rcheck(REG_RATE_LO, 16'h3456);
    rcheck(REG_RATE_HI, 16'h0012);
    rcheck(REG_EVT_LO, 16'd77);
    wreg(REG_COEF_BASE + 15'(5 * 128 + 99), 16'hBEEF);
    checks += 2;
    if (ncoef != 1) failures++;
    if (last_coef != 16'hBEEF) failures++;
    rcheck(15'h0100, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
