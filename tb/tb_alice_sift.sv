// tb_alice_sift: drives detection pairs against a modelled match memory (one-cycle read)
// and checks that exactly the pairs with a valid slot and equal basis give the stored bit
// and an acknowledge, in order, and that each end-of-list gives an end-of-acknowledge and
// a packet release.
`timescale 1ns/1ps
module tb_alice_sift;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic det_valid, mm_re, sift_valid, sift_bit, ack_valid, pkt_release;
  cmsg_t det_msg, ack_msg;
  pkt_t mm_pkt;
  slot_t mm_slot;
  logic [2:0] mm_data;
  logic [31:0] det_count, sift_count;
  int checks = 0, failures = 0;

  alice_sift dut (.*);

  logic [2:0] mem [4][PKT_PAIRS];
  always @(posedge clk) if (mm_re) mm_data <= mem[mm_pkt[1:0]][mm_slot];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit sift; bit b; cmsg_t ack; bit rel; } exp_t;
  exp_t exp_q[$];
  int nsift = 0, nrel = 0;

  always @(posedge clk) if (rst_n) begin
    #0.1;
    if (sift_valid || ack_valid || pkt_release) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        exp_t e;
        e = exp_q.pop_front();
        if (sift_valid !== e.sift || (e.sift && sift_bit !== e.b) || ack_msg !== e.ack ||
            pkt_release !== e.rel || !ack_valid) begin
          failures++;
          if (failures < 5) $display("FAIL out %b %b %p exp %p", sift_valid, sift_bit, ack_msg, e);
        end
        nsift += sift_valid; nrel += pkt_release;
      end
    end
  end

  initial begin
    det_valid = 0; det_msg = '0; mm_data = '0;
    for (int p = 0; p < 4; p++) for (int s = 0; s < PKT_PAIRS; s++) mem[p][s] = 3'($urandom) | 3'b100;
    for (int s = 0; s < 100; s++) mem[1][s] = 3'b000;   // dark slots
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      int s;
      s = 0;
      for (int k = 0; k < 150; k++) begin
        exp_t e;
        s += 1 + int'($urandom % 3);
        det_valid = 1;
        det_msg = '{mtype: MSG_DET, pkt: pkt_t'(p), slot: slot_t'(s), basis: 1'($urandom), rsvd: 1'b0};
        if (mem[p][s][2] && mem[p][s][1] == det_msg.basis) begin
          e.sift = 1; e.b = mem[p][s][0]; e.rel = 0;
          e.ack = det_msg; e.ack.mtype = MSG_ACK;
          exp_q.push_back(e);
        end
        @(negedge clk);
        if ($urandom % 4 == 0) begin det_valid = 0; @(negedge clk); end
      end
      begin
        exp_t e;
        det_valid = 1;
        det_msg = '{mtype: MSG_DET_END, pkt: pkt_t'(p), slot: '0, basis: 1'b0, rsvd: 1'b0};
        e.sift = 0; e.b = 0; e.rel = 1; e.ack = det_msg; e.ack.mtype = MSG_ACK_END;
        exp_q.push_back(e);
        @(negedge clk);
      end
    end
    det_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nrel != 4 || sift_count != nsift || det_count != 600) begin
      failures++;
      $display("FAIL left %0d rel %0d sift %0d/%0d det %0d", exp_q.size(), nrel, sift_count, nsift, det_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
