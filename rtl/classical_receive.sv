// classical_receive: Bob's Classical Receive Data module.
//
// Checks the CRC of each 32-bit word arriving on the sifting classical channel and decodes
// it. A Sync is passed straight on (combinationally, so its timing reference is not
// shifted) to Recover Quantum Data with its packet number. Acknowledges and end-of-list
// markers are pushed into the Sift FIFO as ack_t entries. Words with a bad CRC are counted
// and ignored; an all-zero word is an idle word.
module classical_receive
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cword_t      rx_word,
  output logic        sync,
  output pkt_t        sync_pkt,
  output logic        ack_push,
  output ack_t        ack_data,
  output logic [31:0] rx_errors,
  output logic [31:0] ack_count
);
  cmsg_t m;
  wire   ok = cmsg_ok(rx_word);
  assign m  = cmsg_t'(rx_word[31:8]);

  assign sync     = ok && (m.mtype == MSG_SYNC);
  assign sync_pkt = m.pkt;
  assign ack_push = ok && (m.mtype inside {MSG_ACK, MSG_ACK_END});
  assign ack_data = '{last: (m.mtype == MSG_ACK_END), pkt: m.pkt, slot: m.slot};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_errors <= '0;
      ack_count <= '0;
    end else begin
      if (rx_word != '0 && !ok)               rx_errors <= rx_errors + 1;
      if (ok && m.mtype == MSG_ACK)           ack_count <= ack_count + 1;
    end
  end
endmodule
