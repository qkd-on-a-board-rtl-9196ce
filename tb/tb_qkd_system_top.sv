// tb_qkd_system_top: end-to-end test of the QKD link, both boards plus a behavioural
// model of the optics in between, at a reduced error-correction block (512 bits) and one
// packet in flight so that every mechanism shows within a short run.
//
// Runs, each from reset:
//   A  2.5 GHz (spacing 1), ungated, 3% QBER, jitter, multi-detector events, dark counts
//   A2 1.25 GHz (spacing 2), gated
//   B  625 MHz (spacing 4), gated: late (jittered) detections are dropped
//   C  625 MHz, ungated: jittered detections are kept, repeated events in a slot counted
//   D  312.5 MHz (spacing 8) with Alice's test pattern, detector histogram read back
//   E  2.5 GHz at 25% QBER: Cascade must drop the blocks (error estimate too high)
// In A, A2, B and C the two key streams must be equal, non-empty and produced by all four threads.
// Each mechanism (stall between packets, gate drop, repeated event, multi-detector event,
// corrected error, phase-2 pass, dropped block, histogram count) must occur at least once.
`timescale 1ns/1ps
module tb_qkd_system_top;
  import qkd_pkg::*;

  localparam int LOGN = 9;
  localparam int QD = 20, CD = 5, ECD = 7;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [7:0]  a_addr, b_addr;
  logic        a_we, b_we, a_pop, b_pop, a_empty, b_empty;
  logic [31:0] a_wd, b_wd, a_rd, b_rd, a_kw, b_kw;
  logic [3:0]  a_q, b_det;
  cword_t      a_ctx, a_crx, b_ctx, b_crx;
  eword_t      a_etx, a_erx, b_etx, b_erx;
  logic [31:0] det_pm, qber_pm, jit_pm, multi_pm, dark_pm;
  int          n_det, n_flip, n_jit, n_multi;

  qkd_system_top #(.MAX_OUT(1), .LOGN(LOGN), .K1(3), .ABORT_GROUPS(24)) dut (
    .clk, .rst_n,
    .a_host_addr(a_addr), .a_host_we(a_we), .a_host_wdata(a_wd), .a_host_rdata(a_rd),
    .a_key_pop(a_pop), .a_key_word(a_kw), .a_key_empty(a_empty),
    .a_q_out(a_q), .a_c_tx(a_ctx), .a_c_rx(a_crx), .a_ec_tx(a_etx), .a_ec_rx(a_erx),
    .b_host_addr(b_addr), .b_host_we(b_we), .b_host_wdata(b_wd), .b_host_rdata(b_rd),
    .b_key_pop(b_pop), .b_key_word(b_kw), .b_key_empty(b_empty),
    .b_det_in(b_det), .b_c_tx(b_ctx), .b_c_rx(b_crx), .b_ec_tx(b_etx), .b_ec_rx(b_erx)
  );

  qkd_channel_model #(.QD(QD), .CD(CD), .ECD(ECD)) u_ch (
    .clk, .det_pm, .qber_pm, .jit_pm, .multi_pm, .dark_pm,
    .a_q, .b_det, .a_c_tx(a_ctx), .b_c_rx(b_crx), .b_c_tx(b_ctx), .a_c_rx(a_crx),
    .a_ec_tx(a_etx), .b_ec_rx(b_erx), .b_ec_tx(b_etx), .a_ec_rx(a_erx),
    .n_det, .n_flip, .n_jit, .n_multi
  );

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // key collection
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

  function automatic logic [31:0] st(input bit bob, input int idx);
    return bob ? dut.u_bob.status[idx] : dut.u_alice.status[idx];
  endfunction

  task automatic rd(input bit bob, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    if (bob) begin b_addr = a; #0.1 d = b_rd; end
    else     begin a_addr = a; #0.1 d = a_rd; end
  endtask

  // mechanism counters
  int m_stall, m_gate, m_dup, m_multi, m_fix, m_p2, m_drop, m_hist, m_underflow_free;

  task automatic start_run(input logic [1:0] sp, input bit gated, input bit use_test,
                           input int qber);
    rst_n = 0;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wd = 0; b_wd = 0;
    ka.delete(); kb.delete();
    det_pm = 450; qber_pm = qber; jit_pm = 20; multi_pm = 10; dark_pm = 1;
    // hold reset until the words of the previous run have left the channel
    repeat (QD + CD + ECD + 4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // channel delay: Sync leaves one clock after the first pulse and takes CD clocks
    wr(1, 8'h03, QD - CD - 1);
    wr(0, 8'h07, 0);  wr(1, 8'h07, 0);          // no extra PA margin at this block size
    if (use_test) begin
      for (int k = 0; k < 8; k++) wr(0, 8'h09, {16'(k), 14'd0, 2'(k % 4)});
      wr(0, 8'h08, 8);
    end
    wr(1, 8'h00, {22'd0, 2'd0, 4'd0, use_test, sp, gated, 1'b1});
    wr(0, 8'h00, {22'd0, 2'd0, 4'd0, use_test, sp, gated, 1'b1});
  endtask

  task automatic wait_keys(input int words, input int max_cycles);
    int c0;
    c0 = cycles;
    while ((ka.size() < words || kb.size() < words) && cycles - c0 < max_cycles)
      @(posedge clk);
  endtask

  task automatic compare_keys(input string name, input int words);
    int n, bad;
    n = (ka.size() < kb.size()) ? ka.size() : kb.size();
    bad = 0;
    for (int k = 0; k < n; k++) if (ka[k] !== kb[k]) bad++;
    check(n >= words, $sformatf("%s: key words %0d/%0d, wanted %0d", name, ka.size(), kb.size(), words));
    check(bad == 0, $sformatf("%s: %0d of %0d key words differ", name, bad, n));
    $display("%s: %0d key words equal on both sides, cycles %0d, Bob sifted %0d, fixed %0d, passes %0d, dropped %0d",
             name, n - bad, cycles, st(1, 12), st(1, 17), st(1, 18), st(1, 16));
  endtask

  task automatic note_mechanisms();
    if (st(0, 1) != 0) m_stall++;
    if (st(1, 2) != 0) m_gate++;
    if (st(1, 1) != 0) m_dup++;
    if (st(1, 4) != 0) m_multi++;
    if (st(1, 17) != 0) m_fix++;
    if (st(0, 12) != 0) m_p2++;
    if (st(0, 10) != 0 && st(1, 10) != 0) m_drop++;
    // no protocol errors on any run
    check(st(0, 5) == 0 && st(1, 6) == 0 && st(0, 13) == 0 && st(1, 19) == 0, "CRC errors");
    check(st(1, 9) == 0, "Bob sift errors");
    check(st(1, 3) == 0, "Sync overlap");
    check(st(1, 11) == 0 && st(0, 7) == 0 && st(1, 13) == 0 && st(0, 6) == 0, "buffer overflow");
    // both boards agree on how many blocks they kept
    check(st(0, 9) == st(1, 15) || (st(0, 9) + 1 == st(1, 15)) || (st(1, 15) + 1 == st(0, 9)),
          "blocks corrected on both sides");
  endtask

  initial begin
    logic [31:0] h [16];
    int peak;
    m_stall = 0; m_gate = 0; m_dup = 0; m_multi = 0; m_fix = 0; m_p2 = 0; m_drop = 0; m_hist = 0;

    // ---------------- A: 2.5 GHz ungated
    start_run(2'd0, 1'b0, 1'b0, 30);
    wait_keys(60, 400_000);
    compare_keys("A 2.5GHz", 60);
    check(st(0, 9) >= 4, "all four threads produced key");
    check(st(0, 0) > 0 && st(1, 10) > 0, "packets sent and sifted");
    note_mechanisms();

    // ---------------- A2: 1.25 GHz gated
    start_run(2'd1, 1'b1, 1'b0, 30);
    wait_keys(30, 500_000);
    compare_keys("A2 1.25GHz gated", 30);
    note_mechanisms();

    // ---------------- B: 625 MHz gated
    start_run(2'd2, 1'b1, 1'b0, 30);
    wait_keys(30, 600_000);
    compare_keys("B 625MHz gated", 30);
    check(st(1, 2) > 0, "gated mode dropped late detections");
    note_mechanisms();

    // ---------------- C: 625 MHz ungated, more dark counts
    start_run(2'd2, 1'b0, 1'b0, 30);
    dark_pm = 20;
    wait_keys(30, 600_000);
    compare_keys("C 625MHz ungated", 30);
    check(st(1, 2) == 0, "ungated mode drops nothing");
    note_mechanisms();

    // ---------------- D: 312.5 MHz, test pattern, histogram of detector 0
    start_run(2'd3, 1'b0, 1'b1, 0);
    jit_pm = 200;
    wr(1, 8'h00, {22'd0, 2'd0, 4'd0, 1'b0, 2'd3, 1'b0, 1'b1});
    repeat (3 * 2048 * 8) @(posedge clk);
    for (int k = 0; k < 16; k++) rd(1, 8'(8'h40 + k), h[k]);
    peak = 0;
    for (int k = 0; k < 16; k++) if (h[k] > h[peak]) peak = k;
    $display("D histogram: %p", h);
    check(peak == 0 || peak == 8, "histogram peaks in the transmission bin");
    check(h[1] > 0 && h[9] > 0, "histogram shows the jitter tail");
    check(h[4] <= h[1], "histogram low between pulses");
    if (h[0] > 0) m_hist++;
    check(st(0, 2) == 0, "no RN underflow with test pattern");
    note_mechanisms();

    // ---------------- E: 25% QBER, blocks must be dropped
    start_run(2'd0, 1'b0, 1'b0, 250);
    begin
      int c0;
      c0 = cycles;
      while ((st(0, 10) < 2 || st(1, 10) < 2) && cycles - c0 < 400_000) @(posedge clk);
    end
    check(st(0, 10) >= 2 && st(1, 10) >= 2, "high-QBER blocks dropped");
    check(ka.size() == 0 && kb.size() == 0, "no key at 25% QBER");
    note_mechanisms();

    $display("mechanisms: stall=%0d gate=%0d dup=%0d multi=%0d fix=%0d phase2=%0d drop=%0d hist=%0d",
             m_stall, m_gate, m_dup, m_multi, m_fix, m_p2, m_drop, m_hist);
    check(m_stall > 0, "stall between packets happened");
    check(m_gate > 0,  "gate drop happened");
    check(m_dup > 0,   "repeated event in a slot happened");
    check(m_multi > 0, "multi-detector event happened");
    check(m_fix > 0,   "error correction happened");
    check(m_p2 > 0,    "phase-2 pass happened");
    check(m_drop > 0,  "block drop happened");
    check(m_hist > 0,  "histogram counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
