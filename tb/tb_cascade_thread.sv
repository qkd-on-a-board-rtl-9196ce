// tb_cascade_thread: an Active and a Passive thread connected back to back (each one's
// messages go straight into the other's receive port, with random transmit stalls). Each
// block is loaded as random bits on the Active side and the same bits with a chosen number
// of flips on the Passive side. For correctable blocks both threads must accept the
// signature and stream identical kept bits of equal length, with at least
// one flip per error; a block at a 25 % error rate must be dropped by both. The disclosed-bit count must
// be at least one parity per phase-1 group. The clocks per block are printed.
`timescale 1ns/1ps
module tb_cascade_thread;
  import qkd_pkg::*;
  localparam int LOGN = 12, N = 1 << LOGN, K1 = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic ld_ready [2], ld_valid [2], ld_bit [2], blk_start [2];
  logic tx_valid [2], tx_ready [2], ob_valid [2], ob_bit [2], fin_valid [2], fin_ok [2];
  ecmsg_t tx_msg [2];
  logic [LOGN:0] fin_kept [2];
  logic [LOGN+8:0] fin_leak [2];
  logic [15:0] blk_idx [2], blocks_ok [2], blocks_dropped [2], errors_fixed [2];
  logic [7:0] phase2_passes [2];
  logic [15:0] ld_blk;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g_thr
    cascade_thread #(.LOGN(LOGN), .K1(K1)) u (
      .clk, .rst_n, .active(i == 0), .seed(32'h0BAD_5EED),
      .ld_ready(ld_ready[i]), .ld_valid(ld_valid[i]), .ld_bit(ld_bit[i]), .ld_blk,
      .pa_idle(1'b1), .blk_start(blk_start[i]),
      .tx_valid(tx_valid[i]), .tx_msg(tx_msg[i]), .tx_ready(tx_ready[i]),
      .rx_valid(tx_valid[1-i] && tx_ready[1-i]), .rx_msg(tx_msg[1-i]),
      .ob_valid(ob_valid[i]), .ob_bit(ob_bit[i]), .fin_valid(fin_valid[i]), .fin_ok(fin_ok[i]),
      .fin_kept(fin_kept[i]), .fin_leak(fin_leak[i]), .blk_idx(blk_idx[i]),
      .blocks_ok(blocks_ok[i]), .blocks_dropped(blocks_dropped[i]),
      .errors_fixed(errors_fixed[i]), .phase2_passes(phase2_passes[i]));
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    tx_ready[0] = ($urandom_range(0, 3) != 0);
    tx_ready[1] = ($urandom_range(0, 3) != 0);
  end

  bit ob_q [2][$];
  always @(posedge clk) for (int i = 0; i < 2; i++) if (ob_valid[i]) ob_q[i].push_back(ob_bit[i]);

  int total_fixed = 0;

  task automatic run_block(input int nerr, input bit expect_ok);
    bit a[], b[];
    int got_ok [2], kept [2], leak [2], t, fixed0;
    a = new[N]; b = new[N];
    foreach (a[i]) begin a[i] = 1'($urandom); b[i] = a[i]; end
    for (int e = 0; e < nerr; e++) begin
      int p;
      p = $urandom_range(0, N - 1);
      while (a[p] != b[p]) p = $urandom_range(0, N - 1);
      b[p] = !b[p];
    end
    fixed0 = errors_fixed[1];
    ob_q[0].delete(); ob_q[1].delete();
    // load both threads
    fork
      for (int k = 0; k < N; k++) begin
        do @(negedge clk); while (!ld_ready[0]);
        ld_valid[0] = 1; ld_bit[0] = a[k];
        @(negedge clk);
        ld_valid[0] = 0;
      end
      for (int k = 0; k < N; k++) begin
        ld_valid[1] = 0;
        while (!ld_ready[1] || $urandom_range(0, 2) == 0) @(negedge clk);
        ld_valid[1] = 1; ld_bit[1] = b[k];
        @(negedge clk);
        ld_valid[1] = 0;
      end
    join
    t = 0;
    got_ok[0] = -1; got_ok[1] = -1;
    while (got_ok[0] < 0 || got_ok[1] < 0) begin
      @(posedge clk);
      t++;
      for (int i = 0; i < 2; i++) if (fin_valid[i]) begin
        got_ok[i] = fin_ok[i]; kept[i] = fin_kept[i]; leak[i] = fin_leak[i];
      end
    end
    @(negedge clk);
    ld_blk = ld_blk + 1;
    $display("block errors %0d: ok %0d/%0d kept %0d leak %0d fixed %0d p2 %0d, %0d clocks after load",
             nerr, got_ok[0], got_ok[1], kept[1], leak[1], errors_fixed[1] - fixed0,
             phase2_passes[1], t);
    checks++;
    if (got_ok[0] != got_ok[1] || got_ok[0] != int'(expect_ok)) begin
      failures++; $display("FAIL verdict %0d/%0d expected %0d", got_ok[0], got_ok[1], expect_ok);
    end
    if (expect_ok) begin
      checks += 4;
      if (kept[0] != kept[1] || ob_q[0].size() != kept[0] || ob_q[1].size() != kept[1]) begin
        failures++; $display("FAIL kept %0d/%0d streamed %0d/%0d", kept[0], kept[1], ob_q[0].size(), ob_q[1].size());
      end
      if (ob_q[0] != ob_q[1]) begin failures++; $display("FAIL corrected streams differ"); end
      if (leak[0] != leak[1] || leak[1] < (N >> K1)) begin
        failures++; $display("FAIL leak %0d/%0d", leak[0], leak[1]);
      end
      // with no group discarded every error needs at least one flip (a wrong flip made on
      // an odd error count in a group is undone later, so flips may exceed errors)
      if (kept[1] == N && errors_fixed[1] - fixed0 < nerr) begin
        failures++; $display("FAIL fixed %0d of %0d", errors_fixed[1] - fixed0, nerr);
      end
      checks++;
      if (t > 200000) begin failures++; $display("FAIL block took %0d clocks", t); end
    end
  endtask

  initial begin
    ld_valid[0] = 0; ld_valid[1] = 0; ld_bit[0] = 0; ld_bit[1] = 0; ld_blk = 16'd7;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(0, 1);
    run_block(12, 1);
    run_block(61, 1);     // 1.5 % errors
    run_block(120, 1);    // 3 % errors
    run_block(1024, 0);   // 25 % errors: dropped
    run_block(40, 1);
    checks += 2;
    if (blocks_ok[0] != 5 || blocks_ok[1] != 5) begin failures++; $display("FAIL blocks_ok %0d/%0d", blocks_ok[0], blocks_ok[1]); end
    if (blocks_dropped[0] != 1 || blocks_dropped[1] != 1) begin failures++; $display("FAIL blocks_dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
