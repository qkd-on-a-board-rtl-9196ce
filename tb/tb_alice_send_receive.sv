// tb_alice_send_receive: acknowledges queue up and go out in order when no Sync is due; a
// Sync always takes the next word; incoming detection words are decoded, corrupted words
// counted and ignored. Words are checked with an independent CRC-8 model.
`timescale 1ns/1ps
module tb_alice_send_receive;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic sync_req, ack_valid, det_valid;
  pkt_t sync_pkt;
  cmsg_t ack_msg, det_msg;
  cword_t tx_word, rx_word;
  logic [31:0] rx_errors, ack_drops;
  int checks = 0, failures = 0;

  alice_send_receive #(.ACK_DEPTH(8)) dut (.*);

  function automatic logic [7:0] crc_model(input logic [23:0] d);
    logic [7:0] c = 0;
    for (int i = 23; i >= 0; i--) c = (c[7] ^ d[i]) ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmsg_t q[$];
    cmsg_t m;
    logic was_sync;
    pkt_t sp;
    sync_req = 0; ack_valid = 0; sync_pkt = 0; ack_msg = '0; rx_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      // transmit side
      ack_valid = ($urandom % 3 == 0) && q.size() < 6;
      ack_msg = '{mtype: MSG_ACK, pkt: pkt_t'($urandom), slot: slot_t'($urandom), basis: 1'($urandom), rsvd: 1'b0};
      sync_req = ($urandom % 7 == 0);
      sync_pkt = pkt_t'($urandom);
      // receive side
      m = '{mtype: ($urandom % 2) ? MSG_DET : MSG_DET_END, pkt: pkt_t'($urandom),
            slot: slot_t'($urandom), basis: 1'($urandom), rsvd: 1'b0};
      rx_word = {m, crc_model(m)};
      if (k % 10 == 5) rx_word[3] = ~rx_word[3];
      #0.1;
      if (k % 10 == 5) check(!det_valid, "corrupt word ignored");
      else             check(det_valid && det_msg == m, "detection decoded");
      was_sync = sync_req; sp = sync_pkt;
      @(posedge clk);
      #0.1;
      check(tx_word[7:0] == crc_model(tx_word[31:8]), "CRC of sent word");
      if (was_sync) begin
        m = cmsg_t'(tx_word[31:8]);
        check(m.mtype == MSG_SYNC && m.pkt == sp, "sync sent first");
      end else if (q.size() > 0) begin
        check(tx_word[31:8] == q[0], "ack in order");
        void'(q.pop_front());
      end else begin
        check(tx_word == '0, "idle word");
      end
      if (ack_valid) q.push_back(ack_msg);
      @(negedge clk);
    end
    check(rx_errors == 40, "CRC errors counted");
    check(ack_drops == 0, "no drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
