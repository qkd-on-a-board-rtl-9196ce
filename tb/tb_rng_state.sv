// tb_rng_state: compares both output streams with an independent model of the two 32-bit
// Galois LFSRs (taps 0x80200003) after a seed load, with enable toggling; also checks
// that the basis and value streams are roughly balanced and differ from each other.
`timescale 1ns/1ps
module tb_rng_state;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic load, en, valid;
  logic [31:0] seed_value, seed_basis;
  qstate_t state;
  int checks = 0, failures = 0;

  rng_state dut (.*);

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
    logic [31:0] mv, mb;
    logic exp_v, exp_b;
    int ones_v, ones_b, same;
    load = 0; en = 0; seed_value = 32'hDEAD_BEEF; seed_basis = 32'h0C0F_FEE0;
    ones_v = 0; ones_b = 0; same = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    mv = seed_value; mb = seed_basis;
    for (int k = 0; k < 4000; k++) begin
      en = ($urandom % 3) != 0;
      @(posedge clk);
      #0.1;
      checks++;
      if (en) begin
        exp_v = mv[0]; exp_b = mb[0];
        mv = step(mv); mb = step(mb);
        if (!valid || state.value !== exp_v || state.basis !== exp_b) failures++;
        ones_v += state.value; ones_b += state.basis; same += (state.value == state.basis);
      end else if (valid) begin
        failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (ones_v < 1000 || ones_v > 1700 || ones_b < 1000 || ones_b > 1700 || same > 1700) begin
      failures++;
      $display("FAIL balance %0d %0d %0d", ones_v, ones_b, same);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
