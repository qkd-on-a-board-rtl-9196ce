// tb_alice_fpga: Alice's board on its own, with a behavioural Bob on the classical channel.
// The bench records every state Alice sends on the four quantum lines (one-hot, slot = order
// within the 2048-pair packet) and every Sync. Bob answers nothing until eight packets are
// out, so Alice must stop sending (all match-memory pages in use); it then returns, per
// packet, detection messages for random slots with random bases and a packet end. Alice's
// acknowledge list must hold exactly the slots whose basis matched, in order, followed by
// the packet end, and the sifted-bit counter must agree. Transmission at one state per clock
// (2.5 GHz spacing) is checked by counting the clocks of each packet.
`timescale 1ns/1ps
module tb_alice_fpga;
  import qkd_pkg::*;
  localparam int NP = 12;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [7:0] host_addr;
  logic host_we, key_pop, key_empty;
  logic [31:0] host_wdata, host_rdata, key_word;
  logic [3:0] q_out;
  cword_t c_tx, c_rx;
  eword_t ec_tx, ec_rx;
  int checks = 0, failures = 0;

  alice_fpga dut (.*);
  assign key_pop = 1'b0;
  assign ec_rx = '0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    host_addr = a; host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    host_addr = a;
    #0.1;
    d = host_rdata;
  endtask

  // monitors
  logic [1:0] sent [NP][PKT_PAIRS];
  int npkt = 0, nslot = 0, nsync = 0, first_cyc = 0, cyc = 0, pkt_cycles [NP];
  ack_t acks[$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && q_out != 0) begin
      checks++;
      if ($countones(q_out) != 1) begin failures++; $display("FAIL q_out not one-hot: %b", q_out); end
      if (nslot == 0) first_cyc = cyc;
      if (npkt < NP) for (int i = 0; i < 4; i++) if (q_out[i]) sent[npkt][nslot] = 2'(i);
      nslot++;
      if (nslot == PKT_PAIRS) begin
        if (npkt < NP) pkt_cycles[npkt] = cyc - first_cyc + 1;
        nslot = 0; npkt++;
      end
    end
    if (rst_n && c_tx != '0) begin
      cmsg_t m;
      m = cmsg_t'(c_tx[31:8]);
      checks++;
      if (!cmsg_ok(c_tx)) begin failures++; $display("FAIL bad CRC from Alice"); end
      if (m.mtype == MSG_SYNC) begin
        if (m.pkt != pkt_t'(nsync)) begin failures++; $display("FAIL sync pkt %0d exp %0d", m.pkt, nsync); end
        nsync++;
      end else if (m.mtype == MSG_ACK || m.mtype == MSG_ACK_END)
        acks.push_back('{last: m.mtype == MSG_ACK_END, pkt: m.pkt, slot: m.slot});
    end
  end

  initial begin
    ack_t exp_acks[$];
    logic [31:0] v;
    int n_sift = 0, held;
    host_addr = 0; host_we = 0; host_wdata = 0; c_rx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wr(8'h00, 32'h0000_0001);                  // run, one state per time bin
    while (npkt < 8) @(negedge clk);
    // all eight pages in use: no further packet may start
    held = npkt;
    repeat (3000) @(negedge clk);
    checks++;
    if (npkt != 8 || nslot != 0) begin failures++; $display("FAIL sent past the match memory: %0d.%0d", npkt, nslot); end
    rd(8'h21, v);
    checks++;
    if (v == 0) begin failures++; $display("FAIL no stall counted"); end
    for (int p = 0; p < NP; p++) begin
      int s;
      while (npkt <= p) @(negedge clk);
      s = $urandom_range(0, 20);
      while (s < PKT_PAIRS) begin
        cmsg_t m;
        logic b;
        b = 1'($urandom);
        m = '0; m.mtype = MSG_DET; m.pkt = pkt_t'(p); m.slot = slot_t'(s); m.basis = b;
        c_rx = cmsg_encode(m);
        if (b == sent[p][s][1]) begin
          exp_acks.push_back('{last: 1'b0, pkt: pkt_t'(p), slot: slot_t'(s)});
          n_sift++;
        end
        @(negedge clk);
        c_rx = '0;
        if ($urandom_range(0, 1)) @(negedge clk);
        s += 1 + $urandom_range(0, 40);
      end
      begin
        cmsg_t m;
        m = '0; m.mtype = MSG_DET_END; m.pkt = pkt_t'(p);
        c_rx = cmsg_encode(m);
        exp_acks.push_back('{last: 1'b1, pkt: pkt_t'(p), slot: '0});
        @(negedge clk);
        c_rx = '0;
      end
    end
    repeat (200) @(negedge clk);
    checks++;
    if (acks.size() != exp_acks.size()) begin
      failures++; $display("FAIL %0d acknowledges, expected %0d", acks.size(), exp_acks.size());
    end
    foreach (exp_acks[i]) if (i < acks.size()) begin
      checks++;
      if (acks[i].last != exp_acks[i].last || acks[i].pkt != exp_acks[i].pkt ||
          (!acks[i].last && acks[i].slot != exp_acks[i].slot)) begin
        failures++;
        if (failures < 10) $display("FAIL ack %0d got %p exp %p", i, acks[i], exp_acks[i]);
      end
    end
    rd(8'h24, v);
    checks++;
    if (v != 32'(n_sift)) begin failures++; $display("FAIL sift count %0d exp %0d", v, n_sift); end
    for (int p = 0; p < 8; p++) begin
      checks++;
      if (pkt_cycles[p] != PKT_PAIRS) begin failures++; $display("FAIL packet %0d took %0d clocks", p, pkt_cycles[p]); end
    end
    checks++;
    if (nsync < NP) begin failures++; $display("FAIL %0d Syncs", nsync); end
    $display("packets %0d syncs %0d sifted %0d", npkt, nsync, n_sift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
