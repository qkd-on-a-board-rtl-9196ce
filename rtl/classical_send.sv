// classical_send: Bob's Classical Send Data module.
//
// Turns the detection pairs produced by Distribute Quantum Data (packet, slot, basis) and
// the end-of-packet markers into CRC-protected 32-bit words on the sifting classical
// channel, one per clock, registered. The bit value is never sent. Idle clocks send the
// all-zero idle word. Counts the pairs sent.
module classical_send
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pair_valid,
  input  logic        pair_last,     // end of packet's list (no pair)
  input  pkt_t        pair_pkt,
  input  slot_t       pair_slot,
  input  logic        pair_basis,
  output cword_t      tx_word,
  output logic [31:0] pairs_sent
);
  cmsg_t m;
  always_comb begin
    m       = '0;
    m.mtype = pair_last ? MSG_DET_END : MSG_DET;
    m.pkt   = pair_pkt;
    m.slot  = pair_last ? '0 : pair_slot;
    m.basis = pair_last ? 1'b0 : pair_basis;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_word    <= '0;
      pairs_sent <= '0;
    end else begin
      tx_word <= pair_valid ? cmsg_encode(m) : '0;
      if (pair_valid && !pair_last) pairs_sent <= pairs_sent + 1;
    end
  end
endmodule
