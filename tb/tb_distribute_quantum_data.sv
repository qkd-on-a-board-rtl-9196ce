// tb_distribute_quantum_data: random detection entries (single clicks, multi-clicks, packet
// end entries with and without an event) are offered with random Recov-FIFO gaps and random
// Det-FIFO back-pressure. Every triple and pair leaving the block is checked against a model
// stream; multi-click entries must be dropped and counted, and each packet end must produce
// exactly one end marker after the packet's last triple.
`timescale 1ns/1ps
module tb_distribute_quantum_data;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  det_event_t ev;
  logic ev_empty, ev_pop, trip_push, trip_full;
  triple_t trip;
  logic pair_valid, pair_last, pair_basis;
  pkt_t pair_pkt;
  slot_t pair_slot;
  logic [31:0] multi_clicks;
  int checks = 0, failures = 0;

  distribute_quantum_data dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  det_event_t in_q[$];
  triple_t    exp_q[$];
  int         n_multi = 0;

  initial begin
    // build the input entries and the expected output stream
    for (int p = 0; p < 20; p++) begin
      int s;
      s = 0;
      for (int e = 0; e < 30; e++) begin
        det_event_t d;
        s += 1 + $urandom_range(0, 60);
        if (s > 2000) break;
        d.last = 0; d.pkt = pkt_t'(p); d.slot = slot_t'(s);
        case ($urandom_range(0, 9))
          0:       d.detmask = 4'b0101;
          1:       d.detmask = 4'b1111;
          default: d.detmask = 4'(1 << $urandom_range(0, 3));
        endcase
        in_q.push_back(d);
      end
      begin
        det_event_t d;
        d.last = 1; d.pkt = pkt_t'(p); d.slot = 11'd2047;
        d.detmask = (p % 3 == 0) ? 4'b0010 : (p % 3 == 1) ? 4'b0110 : 4'b0000;
        in_q.push_back(d);
      end
    end
    foreach (in_q[i]) begin
      det_event_t d;
      int nb;
      d = in_q[i];
      nb = $countones(d.detmask);
      if (nb > 1) n_multi++;
      if (nb == 1) begin
        triple_t t;
        t.last = 0; t.pkt = d.pkt; t.slot = d.slot;
        for (int b = 0; b < 4; b++) if (d.detmask[b]) t.st = qstate_t'(2'(b));
        exp_q.push_back(t);
      end
      if (d.last) begin
        triple_t t;
        t = '0; t.last = 1; t.pkt = d.pkt;
        exp_q.push_back(t);
      end
    end

    ev = '0; ev_empty = 1; trip_full = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (in_q.size() > 0) begin
      @(negedge clk);
      ev_empty  = ($urandom_range(0, 3) == 0);
      trip_full = ($urandom_range(0, 4) == 0);
      ev        = in_q[0];
      #0.5;
      if (trip_push) begin
        triple_t x;
        x = exp_q.pop_front();
        checks++;
        if (trip.last != x.last || trip.pkt != x.pkt ||
            (!x.last && (trip.slot != x.slot || trip.st != x.st)) ||
            !pair_valid || pair_last != x.last || pair_pkt != x.pkt ||
            (!x.last && (pair_slot != x.slot || pair_basis != x.st.basis))) begin
          failures++;
          $display("FAIL triple got %p exp %p", trip, x);
        end
        if (trip_full) begin failures++; $display("FAIL push while full"); end
      end else if (pair_valid) begin
        failures++; $display("FAIL pair without triple");
      end
      if (ev_pop) begin
        if (ev_empty) begin failures++; $display("FAIL pop while empty"); end
        void'(in_q.pop_front());
      end
    end
    @(negedge clk); ev_empty = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d triples missing", exp_q.size()); end
    checks++;
    if (multi_clicks != 32'(n_multi)) begin
      failures++; $display("FAIL multi_clicks %0d exp %0d", multi_clicks, n_multi);
    end
    $display("multi %0d", multi_clicks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
