// tb_toeplitz_pa: blocks of random bits are hashed and the output compared bit by bit with
// a software Toeplitz product built from the same LFSR sequence. Covers the output length
// M = kept - leak - 32 - margin, the empty result for a failed block and for M <= 0, the
// MMAX-clock window fill after start, and random back-pressure on the output.
`timescale 1ns/1ps
module tb_toeplitz_pa;
  localparam int MMAX = 4096;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic start, in_valid, in_bit, fin_valid, fin_ok, out_ready;
  logic idle, out_valid, out_bit, out_last, out_empty;
  logic [31:0] seed;
  logic [15:0] blk, margin;
  logic [12:0] fin_kept;
  logic [20:0] fin_leak;
  int checks = 0, failures = 0;

  toeplitz_pa dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int kept, input int leak, input int mrg, input bit ok);
    bit lbits[];
    bit x[];
    bit y[];
    logic [31:0] l;
    int m, got;
    m = kept - leak - 32 - mrg;
    if (!ok || m <= 0) m = 0;
    if (m > MMAX) m = MMAX;
    // model: LFSR bit stream and Toeplitz product
    lbits = new[MMAX + kept];
    l = (seed ^ {blk, 16'hC3A5}) | 32'h1;
    foreach (lbits[i]) begin
      lbits[i] = l[0];
      l = l[0] ? ((l >> 1) ^ 32'h8020_0003) : (l >> 1);
    end
    x = new[kept];
    foreach (x[j]) x[j] = 1'($urandom);
    y = new[MMAX];
    foreach (y[r]) begin
      y[r] = 0;
      foreach (x[j]) if (x[j]) y[r] ^= lbits[MMAX - 1 + j - r];
    end
    // drive
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // the window takes MMAX clocks to fill; the block is busy from start on
    checks++;
    if (idle) begin failures++; $display("FAIL still idle after start"); end
    repeat (MMAX) @(negedge clk);
    foreach (x[j]) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = x[j];
      while (!in_valid) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
      end
      @(negedge clk);
    end
    in_valid = 0;
    fin_valid = 1; fin_ok = ok; fin_kept = 13'(kept); fin_leak = 21'(leak); margin = 16'(mrg);
    @(negedge clk);
    fin_valid = 0;
    got = 0;
    while (1) begin
      out_ready = ($urandom_range(0, 4) != 0);
      #0.5;
      if (out_valid && out_ready) begin
        if (m == 0) begin
          checks++;
          if (!out_empty) begin failures++; $display("FAIL expected empty result"); end
          @(negedge clk);
          break;
        end
        checks++;
        if (out_empty || out_bit != y[got] || out_last != (got == m - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d got %0d exp %0d last %0d", got, out_bit, y[got], out_last);
        end
        got++;
        if (out_last) begin @(negedge clk); break; end
      end
      @(negedge clk);
    end
    out_ready = 0;
    checks++;
    if (got != m) begin failures++; $display("FAIL length %0d exp %0d", got, m); end
    @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after the block"); end
    $display("block kept %0d leak %0d margin %0d ok %0d: %0d bits", kept, leak, mrg, ok, got);
  endtask

  initial begin
    start = 0; in_valid = 0; in_bit = 0; fin_valid = 0; fin_ok = 0; out_ready = 0;
    seed = 32'h1234_5678; blk = 0; margin = 0; fin_kept = 0; fin_leak = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    blk = 16'd0; run_block(1000, 200, 64, 1);
    blk = 16'd1; run_block(1000, 200, 64, 0);
    blk = 16'd2; run_block(300, 250, 64, 1);
    blk = 16'd3; seed = 32'hCAFE_F00D; run_block(4096, 0, 0, 1);
    blk = 16'd4; run_block(2500, 700, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
