// tb_recover_quantum_data: random detector pulses (two bins wide) over whole packets at
// 4-bin spacing. Detector 2 is wired three bins early and given an alignment delay of 3.
// Capture starts chan_delay bins after the Sync. An independent model finds the rising
// edges per bin and applies the gated / ungated and first-event-per-slot rules; the
// emitted events (packet, slot, detector mask, last flag) must match it exactly. Packet 0
// runs gated, packet 1 ungated, packet 2 at 1-bin spacing.
`timescale 1ns/1ps
module tb_recover_quantum_data;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [3:0] det_in, edges;
  logic [3:0][3:0] align_delay;
  logic [9:0] chan_delay;
  logic [1:0] spacing_log2;
  logic gated, sync, ev_push, cap_active;
  pkt_t sync_pkt;
  det_event_t ev_data;
  logic [13:0] cap_bin_now;
  logic [31:0] detections, dup_events, gated_out, sync_overlaps;
  int checks = 0, failures = 0;

  recover_quantum_data dut (.*);

  localparam int DLY = 7;
  det_event_t got[$], expq[$];
  always @(posedge clk) if (ev_push) got.push_back(ev_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raw drive schedule: bit d of sched[c] is detector d's level at cycle c
  logic [3:0] sched [int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) det_in = sched.exists(cyc) ? sched[cyc] : 4'b0;

  task automatic run_packet(input pkt_t p, input int sp, input bit g);
    int nb, t0;
    logic [3:0] edge_at [int];
    int last_on [4];
    bit seen; slot_t seen_slot;
    nb = PKT_PAIRS << sp;
    spacing_log2 = 2'(sp);
    gated = g;
    @(negedge clk);
    t0 = cyc + DLY;              // the Sync is seen in cycle cyc, bin 0 DLY cycles later
    for (int d = 0; d < 4; d++) last_on[d] = -10;
    for (int b = 0; b < nb; b++) begin
      for (int d = 0; d < 4; d++) begin
        if (b - last_on[d] >= 3 && ($urandom % 1000) < 25) begin
          int c;
          last_on[d] = b;
          c = t0 + b - ((d == 2) ? 3 : 0);
          sched[c]     = (sched.exists(c) ? sched[c] : 4'b0) | 4'(1 << d);
          sched[c + 1] = (sched.exists(c + 1) ? sched[c + 1] : 4'b0) | 4'(1 << d);
          edge_at[b]   = (edge_at.exists(b) ? edge_at[b] : 4'b0) | 4'(1 << d);
        end
      end
    end
    // expected events
    seen = 0; seen_slot = '0;
    for (int b = 0; b < nb; b++) begin
      logic [3:0] m;
      bit keep;
      slot_t s;
      m = edge_at.exists(b) ? edge_at[b] : 4'b0;
      s = slot_t'(b >> sp);
      keep = (m != 0) && !(g && (b % (1 << sp)) != 0) && !(seen && seen_slot == s);
      if (keep) begin seen = 1; seen_slot = s; end
      if (keep || b == nb - 1)
        expq.push_back('{last: (b == nb - 1), pkt: p, slot: s, detmask: keep ? m : 4'b0});
    end
    // the Sync
    sync = 1; sync_pkt = p;
    @(negedge clk);
    sync = 0;
    repeat (nb + DLY + 10) @(negedge clk);
  endtask

  initial begin
    sync = 0; sync_pkt = 0; gated = 1; spacing_log2 = 2;
    align_delay = '0; align_delay[2] = 4'd3; chan_delay = 10'(DLY);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    run_packet(8'd0, 2, 1'b1);
    run_packet(8'd1, 2, 1'b0);
    run_packet(8'd2, 0, 1'b1);
    checks++;
    if (got.size() != expq.size()) begin
      failures++;
      $display("FAIL count got %0d exp %0d", got.size(), expq.size());
    end
    for (int k = 0; k < expq.size() && k < got.size(); k++) begin
      checks++;
      if (got[k] !== expq[k]) begin
        failures++;
        if (failures < 6) $display("FAIL ev %0d got %p exp %p", k, got[k], expq[k]);
      end
    end
    checks++;
    if (gated_out == 0 || dup_events == 0 || sync_overlaps != 0) begin
      failures++;
      $display("FAIL counters gated_out %0d dup %0d overlap %0d", gated_out, dup_events, sync_overlaps);
    end
    $display("events %0d gated_out %0d dup %0d", got.size(), gated_out, dup_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
