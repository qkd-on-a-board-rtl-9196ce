// tb_sift2pa: sifted bits arrive in bursts; four model EC threads take one block each in
// turn (block k to thread k mod 4), hold it for a random time and return a key of their own
// length (a prefix of the block, or an empty result for one block). The key FIFO words must
// hold the thread outputs in block order, first bit in bit 0, whatever order the threads
// finish in; the loader must fill a thread only while it is ready.
`timescale 1ns/1ps
module tb_sift2pa;
  localparam int NT = 4, LOGN = 8, N = 1 << LOGN, NB = 12;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic sift_valid, sift_bit, ld_bit, key_push, key_full;
  logic [NT-1:0] ld_ready, ld_valid, out_valid, out_bit, out_last, out_empty, out_ready;
  logic [15:0] ld_blk;
  logic [31:0] key_word, overflows, key_bits;
  int checks = 0, failures = 0;

  sift2pa #(.NTHREADS(NT), .LOGN(LOGN)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: got %0d exp %0d states %0d %0d %0d %0d lt %0d ct %0d f_empty %0d ld_ready %b", got_bits.size(), exp_bits.size(), tstate[0], tstate[1], tstate[2], tstate[3], dut.lt, dut.ct, dut.f_empty, ld_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit in_bits[$];          // all sifted bits, in order
  bit exp_bits[$];         // expected key stream
  bit got_bits[$];
  // per thread model state
  bit tbuf [NT][$];
  int tblk [NT], tlen [NT], tpos [NT], twait [NT], tstate [NT];   // 0 free, 1 loading, 2 busy, 3 output

  function automatic int keylen(int b);
    return (b == 5) ? 0 : N / 2 + 7 * b;
  endfunction

  always @(negedge clk) if (rst_n) begin
    key_full = ($urandom_range(0, 5) == 0);
    for (int t = 0; t < NT; t++) begin
      ld_ready[t] = (tstate[t] <= 1);
      out_valid[t] = (tstate[t] == 3);
      out_empty[t] = (tstate[t] == 3) && tlen[t] == 0;
      out_bit[t]   = (tstate[t] == 3 && tlen[t] > 0) ? tbuf[t][tpos[t]] : 1'b0;
      out_last[t]  = (tstate[t] == 3) && tlen[t] > 0 && tpos[t] == tlen[t] - 1;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      if (ld_valid[t]) begin
        if (!ld_ready[t]) begin failures++; $display("FAIL load to busy thread %0d", t); end
        if (tstate[t] == 0) begin tstate[t] = 1; tblk[t] = ld_blk; tbuf[t].delete(); end
        tbuf[t].push_back(ld_bit);
        if (tbuf[t].size() == N) begin
          tstate[t] = 2; twait[t] = $urandom_range(10, 600); tlen[t] = keylen(tblk[t]); tpos[t] = 0;
        end
      end
      if (tstate[t] == 2) begin
        if (twait[t] == 0) tstate[t] = 3; else twait[t]--;
      end else if (tstate[t] == 3 && out_ready[t]) begin
        if (tlen[t] == 0 || tpos[t] == tlen[t] - 1) tstate[t] = 0; else tpos[t]++;
      end
    end
    if (key_push) for (int i = 0; i < 32; i++) got_bits.push_back(key_word[i]);
  end

  initial begin
    int total;
    for (int t = 0; t < NT; t++) tstate[t] = 0;
    sift_valid = 0; sift_bit = 0; key_full = 0;
    ld_ready = '0; out_valid = '0; out_bit = '0; out_last = '0; out_empty = '0;
    for (int k = 0; k < NB * N; k++) in_bits.push_back(1'($urandom));
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < keylen(b); i++) exp_bits.push_back(in_bits[b * N + i]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (in_bits[k]) begin
      while ($urandom_range(0, 2) == 0) begin sift_valid = 0; @(negedge clk); end
      sift_valid = 1; sift_bit = in_bits[k];
      @(negedge clk);
    end
    sift_valid = 0;
    total = (exp_bits.size() / 32) * 32;
    while (got_bits.size() < total) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got_bits.size() != total) begin failures++; $display("FAIL %0d bits, expected %0d", got_bits.size(), total); end
    for (int i = 0; i < total; i++) begin
      checks++;
      if (got_bits[i] != exp_bits[i]) begin
        failures++;
        if (failures < 10) $display("FAIL key bit %0d", i);
      end
    end
    checks += 2;
    if (key_bits != 32'(exp_bits.size())) begin failures++; $display("FAIL key_bits %0d exp %0d", key_bits, exp_bits.size()); end
    if (overflows != 0) begin failures++; $display("FAIL overflows %0d", overflows); end
    $display("%0d key bits, %0d words", key_bits, got_bits.size() / 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
