// tb_state_source: loads a test pattern, replays it (checking order and wrap at tm_len),
// then switches to the random generator and checks it against an LFSR model.
`timescale 1ns/1ps
module tb_state_source;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic use_test, tm_we, rng_load, req, valid;
  logic [3:0] tm_addr, tm_len;
  qstate_t tm_data, state;
  logic [31:0] seed_value, seed_basis;
  int checks = 0, failures = 0;

  state_source #(.TEST_DEPTH(16)) dut (.*);

  function automatic logic [31:0] step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qstate_t pat [16];
    logic [31:0] mv, mb;
    int idx;
    use_test = 0; tm_we = 0; rng_load = 0; req = 0; tm_addr = 0; tm_len = 0; tm_data = '0;
    seed_value = 32'h1111_2222; seed_basis = 32'h3333_4444;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      pat[k] = qstate_t'(2'($urandom));
      tm_we = 1; tm_addr = 4'(k); tm_data = pat[k];
      @(negedge clk);
    end
    tm_we = 0;
    tm_len = 4'd11;
    use_test = 1;
    @(negedge clk);
    idx = 0;
    for (int k = 0; k < 60; k++) begin
      req = (k % 5) != 4;
      @(negedge clk);
      if (req) begin
        checks++;
        if (!valid || state !== pat[idx]) begin
          failures++;
          $display("FAIL test k=%0d idx=%0d got %b exp %b v=%b", k, idx, state, pat[idx], valid);
        end
        idx = (idx == 10) ? 0 : idx + 1;
      end else begin
        checks++;
        if (valid) failures++;
      end
    end
    req = 0; use_test = 0;
    rng_load = 1; @(negedge clk); rng_load = 0;
    mv = seed_value; mb = seed_basis;
    for (int k = 0; k < 100; k++) begin
      req = 1;
      @(negedge clk);
      checks++;
      if (!valid || state.value !== mv[0] || state.basis !== mb[0]) failures++;
      mv = step(mv); mb = step(mb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
