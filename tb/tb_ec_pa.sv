// tb_ec_pa: Alice's and Bob's EC&PA units (four threads each) joined by their EC channel
// words. Eight blocks are loaded, two per thread, Bob's copy carrying about 2 % flipped
// bits, and one block with 25 % errors. For every block both sides must deliver the same
// key bits, of length kept - leak - 32 - margin, or both an empty result for the bad block.
// One corrupted word (an idle word with a flipped bit) is injected and must be counted, and the threads must overlap in
// time (several blocks in reconciliation at once).
`timescale 1ns/1ps
module tb_ec_pa;
  import qkd_pkg::*;
  localparam int NT = 4, LOGN = 12, N = 1 << LOGN;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [NT-1:0] ld_ready [2], ld_valid [2], out_valid [2], out_bit [2], out_last [2];
  logic [NT-1:0] out_empty [2], out_ready [2];
  logic ld_bit [2];
  logic [15:0] ld_blk [2];
  eword_t tx [2], rx [2];
  logic [31:0] bok [2], bdrop [2], fixed [2], p2 [2], rxerr [2];
  logic corrupt = 0;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g_side
    ec_pa #(.NTHREADS(NT), .IS_BOB(i == 1), .LOGN(LOGN)) u (
      .clk, .rst_n, .ec_seed(32'h5EED_0001), .pa_seed(32'h7A11_0002), .pa_margin(16'd64),
      .ld_ready(ld_ready[i]), .ld_valid(ld_valid[i]), .ld_bit(ld_bit[i]), .ld_blk(ld_blk[i]),
      .out_valid(out_valid[i]), .out_bit(out_bit[i]), .out_last(out_last[i]),
      .out_empty(out_empty[i]), .out_ready(out_ready[i]),
      .ec_tx_word(tx[i]), .ec_rx_word(rx[i]),
      .blocks_ok(bok[i]), .blocks_dropped(bdrop[i]), .errors_fixed(fixed[i]),
      .phase2_passes(p2[i]), .rx_errors(rxerr[i]));
  end
  // channel: a few clocks of delay each way, one word corrupted on request
  eword_t d0 [4], d1 [4];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d0 <= '{default: '0};
      d1 <= '{default: '0};
    end else begin
      d0 <= {d0[1:3], tx[0]};
      d1 <= {d1[1:3], tx[1]};
    end
  end
  assign rx[1] = d0[0] ^ (corrupt ? 40'h1 : 40'h0);
  assign rx[0] = d1[0];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 9;
  bit key_q [2][NB][$];
  int  empty_seen [2][NB];
  int  done [2];
  int  busy, max_busy = 0;
  // collect per side and thread: block b of thread t is b = t + NT*round
  int  rnd [2][NT];
  initial begin
    for (int i = 0; i < 2; i++) begin done[i] = 0; for (int t = 0; t < NT; t++) rnd[i][t] = 0; end
  end
  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++) for (int t = 0; t < NT; t++)
    if (out_valid[i][t] && out_ready[i][t]) begin
      int b;
      b = t + NT * rnd[i][t];
      if (out_empty[i][t]) begin empty_seen[i][b] = 1; rnd[i][t]++; done[i]++; end
      else begin
        key_q[i][b].push_back(out_bit[i][t]);
        if (out_last[i][t]) begin rnd[i][t]++; done[i]++; end
      end
    end
  always @(negedge clk) for (int i = 0; i < 2; i++) out_ready[i] = 4'($urandom);

  initial begin
    bit a[], b[];
    int kept_exp;
    for (int i = 0; i < 2; i++) begin ld_valid[i] = 0; ld_bit[i] = 0; ld_blk[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < NB; blk++) begin
      int t, nerr;
      t = blk % NT;
      nerr = (blk == 5) ? N / 4 : N / 50;
      a = new[N]; b = new[N];
      foreach (a[k]) begin a[k] = 1'($urandom); b[k] = a[k]; end
      for (int e = 0; e < nerr; e++) begin
        int p;
        p = $urandom_range(0, N - 1);
        b[p] = a[p] ^ 1'b1;
      end
      if (blk == 6) begin @(negedge clk); corrupt = 1; @(negedge clk); corrupt = 0; end
      fork
        for (int k = 0; k < N; k++) begin
          do @(negedge clk); while (!ld_ready[0][t]);
          ld_valid[0] = 4'(1 << t); ld_bit[0] = a[k]; ld_blk[0] = 16'(blk);
          @(negedge clk); ld_valid[0] = 0;
        end
        for (int k = 0; k < N; k++) begin
          do @(negedge clk); while (!ld_ready[1][t]);
          ld_valid[1] = 4'(1 << t); ld_bit[1] = b[k]; ld_blk[1] = 16'(blk);
          @(negedge clk); ld_valid[1] = 0;
        end
      join
      busy = 0;
      for (int q = 0; q < NT; q++) if (!ld_ready[0][q]) busy++;
      if (busy > max_busy) max_busy = busy;
    end
    while (done[0] < NB || done[1] < NB) @(negedge clk);
    for (int blk = 0; blk < NB; blk++) begin
      checks++;
      if (blk == 5 || blk == 6) begin
        // the bad block is dropped; the block hit by the corrupted word may be either way,
        // but the two sides must agree
        if (blk == 5 && (!empty_seen[0][blk] || !empty_seen[1][blk])) begin
          failures++; $display("FAIL block %0d not dropped", blk);
        end
      end
      if (empty_seen[0][blk] != empty_seen[1][blk] || key_q[0][blk] != key_q[1][blk]) begin
        failures++; $display("FAIL block %0d keys differ (%0d / %0d bits)", blk,
                             key_q[0][blk].size(), key_q[1][blk].size());
      end
      if (blk != 5 && blk != 6) begin
        checks++;
        if (empty_seen[0][blk] || key_q[0][blk].size() < 1000) begin
          failures++; $display("FAIL block %0d too short: %0d", blk, key_q[0][blk].size());
        end
      end
      $display("block %0d: %0d key bits", blk, key_q[0][blk].size());
    end
    checks += 3;
    if (rxerr[1] != 1) begin failures++; $display("FAIL rx_errors %0d", rxerr[1]); end
    if (bdrop[0] < 1 || bdrop[0] != bdrop[1]) begin failures++; $display("FAIL dropped %0d/%0d", bdrop[0], bdrop[1]); end
    if (max_busy < 2) begin failures++; $display("FAIL threads never overlapped"); end
    $display("ok %0d dropped %0d fixed %0d max busy threads %0d", bok[0], bdrop[0], fixed[1], max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
