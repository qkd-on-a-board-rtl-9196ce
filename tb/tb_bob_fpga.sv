// tb_bob_fpga: Bob's board on its own, with a behavioural Alice. For each packet the bench
// sends a Sync word on the classical channel and, after the programmed channel delay, drives
// two-bin detector pulses at random slots (one state per time bin), some on two detectors
// at once. Bob's detection messages must name every single-detector slot, in order, with
// the basis of the detector that fired and one constant slot offset (the fixed pipeline
// latency between the Sync and bin 0, at most a few bins), followed by the packet end.
// The bench then acknowledges every other detection; the sifted-bit counter and the
// detection, multi-click and packet counters must agree.
`timescale 1ns/1ps
module tb_bob_fpga;
  import qkd_pkg::*;
  localparam int NP = 6, DLY = 20;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [7:0] host_addr;
  logic host_we, key_pop, key_empty;
  logic [31:0] host_wdata, host_rdata, key_word;
  logic [3:0] det_in;
  cword_t c_tx, c_rx;
  eword_t ec_tx, ec_rx;
  int checks = 0, failures = 0;

  bob_fpga dut (.*);
  assign key_pop = 1'b0;
  assign ec_rx = '0;

  initial begin
    repeat (200000) @(posedge clk);
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

  cmsg_t dets[$];
  always @(posedge clk)
    if (rst_n && c_tx != '0) begin
      cmsg_t m;
      m = cmsg_t'(c_tx[31:8]);
      checks++;
      if (!cmsg_ok(c_tx)) begin failures++; $display("FAIL bad CRC from Bob"); end
      else dets.push_back(m);
    end

  initial begin
    int slots [NP][$], bases [NP][$];
    int n_single = 0, n_multi = 0, n_ack = 0, off;
    logic [31:0] v;
    host_addr = 0; host_we = 0; host_wdata = 0; c_rx = '0; det_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wr(8'h03, DLY);                      // channel delay
    wr(8'h00, 32'h0000_0000);            // ungated, one state per time bin
    for (int p = 0; p < NP; p++) begin
      logic [3:0] pat [PKT_PAIRS];
      int s;
      foreach (pat[i]) pat[i] = '0;
      s = $urandom_range(0, 10);
      while (s < PKT_PAIRS - 8) begin
        int d;
        d = $urandom_range(0, 3);
        if ($urandom_range(0, 7) == 0) begin
          pat[s] = 4'(1 << d) | 4'(1 << ((d + 1) % 4));
          n_multi++;
        end else begin
          pat[s] = 4'(1 << d);
          slots[p].push_back(s); bases[p].push_back(d >> 1);
          n_single++;
        end
        s += 3 + $urandom_range(0, 60);
      end
      begin
        cmsg_t m;
        m = '0; m.mtype = MSG_SYNC; m.pkt = pkt_t'(p);
        c_rx = cmsg_encode(m);
        @(negedge clk);
        c_rx = '0;
      end
      repeat (DLY - 1) @(negedge clk);
      for (int b = 0; b < PKT_PAIRS + 1; b++) begin
        det_in = (b < PKT_PAIRS ? pat[b] : 4'b0) | (b > 0 ? pat[b - 1] : 4'b0);
        @(negedge clk);
      end
      det_in = '0;
      repeat (40) @(negedge clk);
    end
    repeat (500) @(negedge clk);
    // check the detection messages
    off = (dets.size() > 0) ? int'(dets[0].slot) - slots[0][0] : 0;
    checks++;
    if (off < -4 || off > 4) begin failures++; $display("FAIL slot offset %0d", off); end
    for (int p = 0; p < NP; p++) begin
      foreach (slots[p][i]) begin
        cmsg_t m;
        checks++;
        if (dets.size() == 0) begin failures++; $display("FAIL detection missing"); break; end
        m = dets.pop_front();
        if (m.mtype != MSG_DET || m.pkt != pkt_t'(p) || int'(m.slot) != slots[p][i] + off ||
            m.basis != 1'(bases[p][i])) begin
          failures++;
          if (failures < 10) $display("FAIL det %p exp pkt %0d slot %0d", m, p, slots[p][i] + off);
        end
        // acknowledge every other detection
        if (i % 2 == 0) begin
          cmsg_t a;
          a = '0; a.mtype = MSG_ACK; a.pkt = m.pkt; a.slot = m.slot;
          c_rx = cmsg_encode(a);
          n_ack++;
          @(negedge clk);
          c_rx = '0;
        end
      end
      begin
        cmsg_t m, a;
        checks++;
        m = (dets.size() > 0) ? dets.pop_front() : '0;
        if (m.mtype != MSG_DET_END || m.pkt != pkt_t'(p)) begin failures++; $display("FAIL packet end %p", m); end
        a = '0; a.mtype = MSG_ACK_END; a.pkt = pkt_t'(p);
        c_rx = cmsg_encode(a);
        @(negedge clk);
        c_rx = '0;
      end
    end
    repeat (1000) @(negedge clk);      // sifting takes one clock per stored triple
    rd(8'h20, v); checks++;
    if (v != 32'(n_single + n_multi)) begin failures++; $display("FAIL detections %0d exp %0d", v, n_single + n_multi); end
    rd(8'h24, v); checks++;
    if (v != 32'(n_multi)) begin failures++; $display("FAIL multi %0d exp %0d", v, n_multi); end
    rd(8'h2A, v); checks++;
    if (v != NP) begin failures++; $display("FAIL packets done %0d", v); end
    rd(8'h2C, v); checks++;
    if (v != 32'(n_ack)) begin failures++; $display("FAIL sifted %0d exp %0d", v, n_ack); end
    $display("singles %0d multi %0d acks %0d slot offset %0d", n_single, n_multi, n_ack, off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
