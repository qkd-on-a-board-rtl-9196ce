// tb_qkd_full: the QKD link at its default size (4096-bit error-correction blocks, four
// Cascade threads per board, eight packets in flight, 2048-slot packets), one complete
// operation: 2.5 GHz transmission, ungated, about 4% QBER from bit flips and detector
// jitter, until every thread has corrected, verified and privacy-amplified a block. The
// two key streams must be equal and non-empty.
`timescale 1ns/1ps
module tb_qkd_full;
  import qkd_pkg::*;

  localparam int QD = 20, CD = 5, ECD = 7;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [7:0]  a_addr = '0, b_addr = '0;
  logic        a_we = 0, b_we = 0, a_pop, b_pop, a_empty, b_empty;
  logic [31:0] a_wd = '0, b_wd = '0, a_rd, b_rd, a_kw, b_kw;
  logic [3:0]  a_q, b_det;
  cword_t      a_ctx, a_crx, b_ctx, b_crx;
  eword_t      a_etx, a_erx, b_etx, b_erx;
  int          n_det, n_flip, n_jit, n_multi;

  qkd_system_top dut (
    .clk, .rst_n,
    .a_host_addr(a_addr), .a_host_we(a_we), .a_host_wdata(a_wd), .a_host_rdata(a_rd),
    .a_key_pop(a_pop), .a_key_word(a_kw), .a_key_empty(a_empty),
    .a_q_out(a_q), .a_c_tx(a_ctx), .a_c_rx(a_crx), .a_ec_tx(a_etx), .a_ec_rx(a_erx),
    .b_host_addr(b_addr), .b_host_we(b_we), .b_host_wdata(b_wd), .b_host_rdata(b_rd),
    .b_key_pop(b_pop), .b_key_word(b_kw), .b_key_empty(b_empty),
    .b_det_in(b_det), .b_c_tx(b_ctx), .b_c_rx(b_crx), .b_ec_tx(b_etx), .b_ec_rx(b_erx)
  );

  qkd_channel_model #(.QD(QD), .CD(CD), .ECD(ECD)) u_ch (
    .clk, .det_pm(32'd450), .qber_pm(32'd30), .jit_pm(32'd20), .multi_pm(32'd5),
    .dark_pm(32'd1),
    .a_q, .b_det, .a_c_tx(a_ctx), .b_c_rx(b_crx), .b_c_tx(b_ctx), .a_c_rx(a_crx),
    .a_ec_tx(a_etx), .b_ec_rx(b_erx), .b_ec_tx(b_etx), .a_ec_rx(a_erx),
    .n_det, .n_flip, .n_jit, .n_multi
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ka[$], kb[$];
  assign a_pop = !a_empty && rst_n;
  assign b_pop = !b_empty && rst_n;
  always @(posedge clk) begin
    if (a_pop) ka.push_back(a_kw);
    if (b_pop) kb.push_back(b_kw);
  end

  task automatic wr(input bit bob, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    if (bob) begin b_addr = a; b_wd = d; b_we = 1; end
    else     begin a_addr = a; a_wd = d; a_we = 1; end
    @(negedge clk);
    a_we = 0; b_we = 0;
  endtask

  initial begin
    int n, bad, cyc;
    repeat (4) @(negedge clk);
    rst_n = 1;
    wr(1, 8'h03, QD - CD - 1);
    wr(1, 8'h00, 32'h1);
    wr(0, 8'h00, 32'h1);
    cyc = 0;
    while ((dut.u_alice.status[9] + dut.u_alice.status[10] < 4 ||
            dut.u_bob.status[15] + dut.u_bob.status[16] < 4) && cyc < 1_900_000) begin
      @(posedge clk);
      cyc++;
    end
    repeat (5000) @(posedge clk);
    n = (ka.size() < kb.size()) ? ka.size() : kb.size();
    bad = 0;
    for (int k = 0; k < n; k++) if (ka[k] !== kb[k]) bad++;
    $display("cycles %0d, packets %0d, sifted %0d, blocks ok %0d dropped %0d, key words %0d/%0d",
             cyc, dut.u_alice.status[0], dut.u_alice.status[4], dut.u_alice.status[9],
             dut.u_alice.status[10], ka.size(), kb.size());
    check(dut.u_alice.status[9] >= 3, "blocks corrected");
    check(n > 0 && ka.size() == kb.size(), "key produced on both sides");
    check(bad == 0, "keys equal");
    check(dut.u_bob.status[9] == 0 && dut.u_bob.status[6] == 0, "no sift or CRC errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
