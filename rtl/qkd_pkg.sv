// qkd_pkg: types, constants and message coding shared by the Alice and Bob FPGA designs.
//
// Time is counted in time bins: the RTL handles one quantum-channel time bin per clock,
// the gigabit serializers that fan a bin stream out to a slower parallel bus sit outside it.
// A packet holds PKT_PAIRS transmission slots (2048, as the protocol defines); each slot
// carries one 2-bit state {basis, value} from Alice. The four quantum lines are one-hot:
// line index = {basis, value}.
//
// The sifting classical channel carries one 32-bit word per clock (the parallel side of its
// serializer). A word is a 24-bit message followed by a CRC-8 (polynomial x^8+x^2+x+1) over
// those 24 bits; a word whose CRC does not match, or whose type is MSG_NONE, is ignored by
// the receiver. The word layout, message types and CRC are this design's own choices.
//
// The post-processing (EC) channel carries 40-bit words: thread id, message type, a 26-bit
// payload and a CRC-8, used between the Active and Passive Cascade threads.
package qkd_pkg;

  localparam int PKT_PAIRS = 2048;              // bit pairs per packet
  localparam int SLOT_W    = $clog2(PKT_PAIRS); // slot index within a packet
  localparam int PKT_W     = 8;                 // packet sequence number, wraps

  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [PKT_W-1:0]  pkt_t;

  // One quantum state: basis selects the polarization basis, value the bit.
  typedef struct packed {
    logic basis;
    logic value;
  } qstate_t;

  typedef enum logic [2:0] {
    MSG_NONE    = 3'd0,
    MSG_SYNC    = 3'd1,  // Alice -> Bob: first slot of packet pkt leaves now
    MSG_DET     = 3'd2,  // Bob -> Alice: detection pair (slot, basis) of packet pkt
    MSG_DET_END = 3'd3,  // Bob -> Alice: end of packet pkt's detection list
    MSG_ACK     = 3'd4,  // Alice -> Bob: slot of packet pkt was sifted (bases matched)
    MSG_ACK_END = 3'd5   // Alice -> Bob: end of packet pkt's acknowledge list
  } msg_type_t;

  typedef struct packed {
    msg_type_t mtype;
    pkt_t      pkt;
    slot_t     slot;
    logic      basis;
    logic      rsvd;
  } cmsg_t;                                     // 24 bits

  typedef logic [31:0] cword_t;

  // Detection event from Recover Quantum Data: detmask has one bit per detector
  // (detector index = {basis, value}); last marks the final entry of a packet.
  typedef struct packed {
    logic       last;
    pkt_t       pkt;
    slot_t      slot;
    logic [3:0] detmask;
  } det_event_t;

  // (time bin, basis, value) triple kept by Bob until the acknowledge list arrives.
  typedef struct packed {
    logic    last;   // end-of-packet marker, other fields except pkt unused
    pkt_t    pkt;
    slot_t   slot;
    qstate_t st;
  } triple_t;

  // Acknowledged slot as Bob stores it in the Sift FIFO.
  typedef struct packed {
    logic  last;     // end of the packet's acknowledge list
    pkt_t  pkt;
    slot_t slot;
  } ack_t;

  function automatic logic [7:0] crc8(input logic [23:0] d);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 23; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ d[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  function automatic cword_t cmsg_encode(input cmsg_t m);
    return {m, crc8(m)};
  endfunction

  // Returns 1 when the word carries a valid message.
  function automatic logic cmsg_ok(input cword_t w);
    cmsg_t m;
    m = cmsg_t'(w[31:8]);
    return (crc8(w[31:8]) == w[7:0]) && (m.mtype != MSG_NONE);
  endfunction

  // ---------------------------------------------------------------------------------
  // EC channel (post-processing). One word per clock, 40 bits.
  localparam int THR_W = 2;                     // up to 4 Cascade threads

  typedef enum logic [3:0] {
    EC_NONE    = 4'd0,
    EC_PARITY  = 4'd1,  // Passive -> Active: 16 group parities, payload = {base_group, bits}
    EC_HAMMING = 4'd2,  // Active -> Passive: payload = {group, syndrome, parity}
    EC_PASS    = 4'd3,  // Active -> Passive: end of this pass's Hamming codes, payload = next action
    EC_DISCARD = 4'd4,  // Passive -> Active: final pass discarded group, payload = group
    EC_FINAL   = 4'd5,  // Passive -> Active: end of discard list
    EC_HASH    = 4'd6,  // Passive -> Active: one half of the 32-bit hash signature
    EC_VERDICT = 4'd7   // Active -> Passive: payload[0] = signatures equal
  } ec_type_t;

  typedef struct packed {
    logic [THR_W-1:0] thr;
    ec_type_t         etype;
    logic [25:0]      payload;
  } ecmsg_t;                                    // 32 bits

  typedef logic [39:0] eword_t;

  function automatic logic [7:0] crc8_32(input logic [31:0] d);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ d[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  function automatic eword_t ecmsg_encode(input ecmsg_t m);
    return {m, crc8_32(m)};
  endfunction

  function automatic logic ecmsg_ok(input eword_t w);
    ecmsg_t m;
    m = ecmsg_t'(w[39:8]);
    return (crc8_32(w[39:8]) == w[7:0]) && (m.etype != EC_NONE);
  endfunction

endpackage
