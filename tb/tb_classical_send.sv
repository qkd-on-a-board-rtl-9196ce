// tb_classical_send: random detection pairs and packet-end markers; one clock after each
// request the transmitted word must be the CRC-protected DET / DET_END message carrying the
// same packet, slot and basis, and an idle cycle must send the all-zero word. The pair
// counter must count DET messages only.
`timescale 1ns/1ps
module tb_classical_send;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic pair_valid, pair_last, pair_basis;
  pkt_t pair_pkt;
  slot_t pair_slot;
  cword_t tx_word;
  logic [31:0] pairs_sent;
  int checks = 0, failures = 0;

  classical_send dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    logic pv, pl, pb; pkt_t pp; slot_t ps;
    pair_valid = 0; pair_last = 0; pair_basis = 0; pair_pkt = 0; pair_slot = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      pv = ($urandom_range(0, 2) != 0); pl = ($urandom_range(0, 15) == 0);
      pb = 1'($urandom); pp = pkt_t'($urandom); ps = slot_t'($urandom);
      pair_valid = pv; pair_last = pl; pair_basis = pb; pair_pkt = pp; pair_slot = ps;
      if (pv && !pl) n++;
      @(negedge clk);                        // one clock of latency
      checks++;
      if (!pv) begin
        if (tx_word != '0) begin failures++; $display("FAIL idle word %h", tx_word); end
      end else begin
        cmsg_t m;
        m = cmsg_t'(tx_word[31:8]);
        if (!cmsg_ok(tx_word) || m.pkt != pp ||
            m.mtype != (pl ? MSG_DET_END : MSG_DET) ||
            (!pl && (m.slot != ps || m.basis != pb))) begin
          failures++; $display("FAIL word %h for pkt %0d slot %0d last %0d", tx_word, pp, ps, pl);
        end
      end
    end
    pair_valid = 0;
    @(negedge clk);
    checks++;
    if (pairs_sent != 32'(n)) begin failures++; $display("FAIL pairs_sent %0d exp %0d", pairs_sent, n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
