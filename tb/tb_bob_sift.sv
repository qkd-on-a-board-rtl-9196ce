// tb_bob_sift: per packet, Bob's stored triples (sorted by slot, then an end marker) and
// Alice's acknowledge list (a random subset of those slots, then ACK_END) are fed through
// two queues that become non-empty at random. The sifted bits must be exactly the values of
// the acknowledged triples, in order; unacknowledged triples must be discarded and counted,
// and each packet must be closed once.
`timescale 1ns/1ps
module tb_bob_sift;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  triple_t det;
  ack_t ack;
  logic det_empty, det_pop, ack_empty, ack_pop, sift_valid, sift_bit;
  logic [31:0] discards, errors, packets_done;
  int checks = 0, failures = 0;

  bob_sift dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  triple_t dq[$];
  ack_t    aq[$];
  logic    bits[$];
  int      n_disc = 0;
  localparam int NPKT = 30;

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int s;
      s = 0;
      while (1) begin
        triple_t t;
        s += 1 + $urandom_range(0, 40);
        if (s > 2047) break;
        t.last = 0; t.pkt = pkt_t'(p); t.slot = slot_t'(s); t.st = qstate_t'(2'($urandom));
        dq.push_back(t);
        if ($urandom_range(0, 1)) begin
          ack_t a;
          a.last = 0; a.pkt = pkt_t'(p); a.slot = slot_t'(s);
          aq.push_back(a); bits.push_back(t.st.value);
        end else n_disc++;
      end
      begin
        triple_t t; ack_t a;
        t = '0; t.last = 1; t.pkt = pkt_t'(p); dq.push_back(t);
        a = '0; a.last = 1; a.pkt = pkt_t'(p); aq.push_back(a);
      end
    end

    det_empty = 1; ack_empty = 1; det = '0; ack = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (dq.size() > 0 || aq.size() > 0) begin
      @(negedge clk);
      det_empty = dq.size() == 0 || ($urandom_range(0, 3) == 0);
      ack_empty = aq.size() == 0 || ($urandom_range(0, 3) == 0);
      det = (dq.size() > 0) ? dq[0] : '0;
      ack = (aq.size() > 0) ? aq[0] : '0;
      #0.5;
      if (sift_valid) begin
        logic b;
        b = bits.pop_front();
        checks++;
        if (sift_bit != b) begin failures++; $display("FAIL sift bit pkt %0d slot %0d", det.pkt, det.slot); end
      end
      if (det_pop) begin
        if (det_empty) begin failures++; $display("FAIL det pop while empty"); end
        void'(dq.pop_front());
      end
      if (ack_pop) begin
        if (ack_empty) begin failures++; $display("FAIL ack pop while empty"); end
        void'(aq.pop_front());
      end
    end
    @(negedge clk); det_empty = 1; ack_empty = 1;
    @(negedge clk);
    checks += 4;
    if (bits.size() != 0) begin failures++; $display("FAIL %0d sifted bits missing", bits.size()); end
    if (discards != 32'(n_disc)) begin failures++; $display("FAIL discards %0d exp %0d", discards, n_disc); end
    if (errors != 0) begin failures++; $display("FAIL errors %0d", errors); end
    if (packets_done != NPKT) begin failures++; $display("FAIL packets_done %0d", packets_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
