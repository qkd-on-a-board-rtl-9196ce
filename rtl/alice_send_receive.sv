// alice_send_receive: Alice's Send/Receive module and the word side of her
// Transmit/Receive Interface on the sifting classical channel.
//
// Transmit: each clock one 32-bit word goes out. A Sync request (from spacing) always wins
// that clock, so the Sync leaves with a fixed latency relative to the first quantum pulse
// of its packet; otherwise the oldest queued acknowledge message is sent; otherwise an idle
// word (all zero, which fails the CRC check at the receiver). Acknowledges wait in an
// ACK_DEPTH-entry FIFO; one arriving while it is full is dropped and counted.
// Receive: each incoming word is CRC-checked and decoded; detection pairs and end-of-list
// messages go to sift, bad words are counted. The word output is registered.
module alice_send_receive
  import qkd_pkg::*;
#(
  parameter int ACK_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync_req,
  input  pkt_t        sync_pkt,
  input  logic        ack_valid,
  input  cmsg_t       ack_msg,
  output cword_t      tx_word,
  input  cword_t      rx_word,
  output logic        det_valid,
  output cmsg_t       det_msg,
  output logic [31:0] rx_errors,
  output logic [31:0] ack_drops
);
  logic  q_empty, q_full;
  cmsg_t q_dout;
  logic [$clog2(ACK_DEPTH):0] q_count;

  wire send_ack = !sync_req && !q_empty;

  sync_fifo #(.WIDTH($bits(cmsg_t)), .DEPTH(ACK_DEPTH)) u_ackq (
    .clk, .rst_n, .push(ack_valid && !q_full), .din(ack_msg), .pop(send_ack),
    .dout(q_dout), .full(q_full), .empty(q_empty), .count(q_count)
  );

  cmsg_t sync_msg;
  always_comb begin
    sync_msg       = '0;
    sync_msg.mtype = MSG_SYNC;
    sync_msg.pkt   = sync_pkt;
  end

  wire   rx_ok  = cmsg_ok(rx_word);
  cmsg_t rx_msg;
  assign rx_msg    = cmsg_t'(rx_word[31:8]);
  assign det_valid = rx_ok && (rx_msg.mtype inside {MSG_DET, MSG_DET_END});
  assign det_msg   = rx_msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_word   <= '0;
      rx_errors <= '0;
      ack_drops <= '0;
    end else begin
      tx_word <= sync_req ? cmsg_encode(sync_msg) : (send_ack ? cmsg_encode(q_dout) : '0);
      if (rx_word != '0 && !rx_ok) rx_errors <= rx_errors + 1;
      if (ack_valid && q_full)     ack_drops <= ack_drops + 1;
    end
  end
endmodule
