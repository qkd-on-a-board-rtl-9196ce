// tb_ctrl_status: writes random values to every configuration register and reads them
// back, checks the control-bit fields and their decoded outputs, the one-clock pulses of
// the RNG-load and histogram-clear bits (never stored), the test-memory write strobe with
// its address and data one clock after the bus write, status reads at 0x20+i and histogram
// reads at 0x40+i with the bin index passed through, and the reset values.
`timescale 1ns/1ps
module tb_ctrl_status;
  localparam int NS = 32;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [7:0] host_addr;
  logic host_we;
  logic [31:0] host_wdata, host_rdata;
  logic run, gated, use_test, rng_load, hist_clear, tm_we;
  logic [1:0] spacing_log2, hist_det, tm_data;
  logic [31:0] seed_value, seed_basis, chan_delay, ec_seed, pa_seed;
  logic [3:0][3:0] align_delay;
  logic [15:0] pa_margin, test_len, tm_addr;
  logic [31:0] status [NS];
  logic [3:0] hist_addr;
  logic [31:0] hist_data;
  int checks = 0, failures = 0;

  ctrl_status dut (.*);
  assign hist_data = 32'hAB00_0000 | 32'(hist_addr);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    host_addr = a; host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic expect_rd(input logic [7:0] a, input logic [31:0] d);
    host_addr = a;
    #0.1;
    checks++;
    if (host_rdata !== d) begin failures++; $display("FAIL read %h got %h exp %h", a, host_rdata, d); end
  endtask

  initial begin
    logic [31:0] v [9];
    host_addr = 0; host_we = 0; host_wdata = 0;
    foreach (status[i]) status[i] = 32'h5000_0000 + 32'(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_rd(8'h07, 32'd64);          // default security margin
    expect_rd(8'h00, 32'h0);
    // plain registers
    for (int r = 1; r <= 8; r++) begin
      v[r] = $urandom;
      if (r == 4 || r >= 7) v[r] &= 32'hFFFF;
      wr(8'(r), v[r]);
    end
    for (int r = 1; r <= 8; r++) expect_rd(8'(r), v[r]);
    checks += 4;
    if (seed_value != v[1] || seed_basis != v[2] || chan_delay != v[3]) begin failures++; $display("FAIL seed/delay outputs"); end
    if (align_delay != v[4][15:0]) begin failures++; $display("FAIL align outputs"); end
    if (ec_seed != v[5] || pa_seed != v[6]) begin failures++; $display("FAIL ec/pa seeds"); end
    if (pa_margin != v[7][15:0] || test_len != v[8][15:0]) begin failures++; $display("FAIL margin/test_len"); end
    // control word with the two pulse bits
    host_addr = 8'h00; host_wdata = 32'h0000_037F; host_we = 1;
    @(negedge clk);
    host_we = 0;
    checks += 2;
    if (!rng_load || !hist_clear) begin failures++; $display("FAIL pulses missing"); end
    if (!run || !gated || spacing_log2 != 2'd3 || !use_test || hist_det != 2'd3) begin
      failures++; $display("FAIL control fields");
    end
    @(negedge clk);
    checks++;
    if (rng_load || hist_clear) begin failures++; $display("FAIL pulses longer than one clock"); end
    expect_rd(8'h00, 32'h0000_031F);
    // test memory write port
    wr(8'h09, {16'd1234, 14'h0, 2'b10});
    checks++;
    if (!tm_we || tm_addr != 16'd1234 || tm_data != 2'b10) begin failures++; $display("FAIL test memory write"); end
    @(negedge clk);
    checks++;
    if (tm_we) begin failures++; $display("FAIL test memory strobe stuck"); end
    // status and histogram windows
    for (int i = 0; i < NS; i++) expect_rd(8'h20 + 8'(i), 32'h5000_0000 + 32'(i));
    for (int i = 0; i < 16; i++) expect_rd(8'h40 + 8'(i), 32'hAB00_0000 + 32'(i));
    expect_rd(8'h80, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
