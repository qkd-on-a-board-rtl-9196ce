// alice_sift: Alice's Sift Data module.
//
// For every detection pair (packet, slot, basis) that Bob reports, the stored state is read
// from the match memory (one-cycle read). If the slot was sent and Bob's basis equals
// Alice's, the stored bit value becomes the next sifted bit and the pair is returned to Bob
// as an acknowledge. At the end of a packet's list (MSG_DET_END, possibly after an empty
// list) an end-of-acknowledge message is sent and the packet's match-memory space is
// released to spacing. Two-stage pipeline, one message per clock, no back-pressure: the
// consumers take one item per clock.
module alice_sift
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // detection messages from Send/Receive
  input  logic        det_valid,
  input  cmsg_t       det_msg,
  // match memory read port
  output logic        mm_re,
  output pkt_t        mm_pkt,
  output slot_t       mm_slot,
  input  logic [2:0]  mm_data,
  // sifted key bits
  output logic        sift_valid,
  output logic        sift_bit,
  // acknowledge messages to Send/Receive
  output logic        ack_valid,
  output cmsg_t       ack_msg,
  // packet fully sifted
  output logic        pkt_release,
  output logic [31:0] det_count,
  output logic [31:0] sift_count
);
  logic  s1_valid;
  cmsg_t s1_msg;

  assign mm_re   = det_valid && (det_msg.mtype == MSG_DET);
  assign mm_pkt  = det_msg.pkt;
  assign mm_slot = det_msg.slot;

  wire s1_det   = s1_valid && (s1_msg.mtype == MSG_DET);
  wire s1_end   = s1_valid && (s1_msg.mtype == MSG_DET_END);
  wire match    = s1_det && mm_data[2] && (mm_data[1] == s1_msg.basis);

  assign sift_valid  = match;
  assign sift_bit    = mm_data[0];
  assign ack_valid   = match || s1_end;
  assign pkt_release = s1_end;

  always_comb begin
    ack_msg       = s1_msg;
    ack_msg.mtype = s1_end ? MSG_ACK_END : MSG_ACK;
    ack_msg.rsvd  = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_msg     <= '0;
      det_count  <= '0;
      sift_count <= '0;
    end else begin
      s1_valid <= det_valid && (det_msg.mtype inside {MSG_DET, MSG_DET_END});
      s1_msg   <= det_msg;
      if (s1_det) det_count  <= det_count + 1;
      if (match)  sift_count <= sift_count + 1;
    end
  end
endmodule
