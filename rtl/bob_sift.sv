// bob_sift: Bob's Sift Data module.
//
// Walks the Det FIFO (Bob's detection triples, in slot order, one end marker per packet)
// against the Sift FIFO (Alice's acknowledge list, same order, one end marker per packet).
// A triple whose slot is on the acknowledge list gives its bit value as the next sifted bit;
// triples not on the list (wrong basis, or a slot Alice sent dark) are discarded. When the
// acknowledge list of a packet ends, the packet's remaining triples are discarded and both
// end markers are consumed together. One decision per clock when both FIFOs hold an entry.
// An acknowledge for a slot Bob does not hold, or for another packet, counts as an error.
module bob_sift
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  triple_t     det,
  input  logic        det_empty,
  output logic        det_pop,
  input  ack_t        ack,
  input  logic        ack_empty,
  output logic        ack_pop,
  output logic        sift_valid,
  output logic        sift_bit,
  output logic [31:0] discards,
  output logic [31:0] errors,
  output logic [31:0] packets_done
);
  wire both      = !det_empty && !ack_empty;
  wire pkt_bad   = both && (det.pkt != ack.pkt);
  wire slot_eq   = det.slot == ack.slot;
  wire slot_lt   = det.slot <  ack.slot;

  always_comb begin
    det_pop    = 1'b0;
    ack_pop    = 1'b0;
    sift_valid = 1'b0;
    if (both) begin
      if (ack.last) begin
        det_pop = 1'b1;
        ack_pop = det.last;
      end else if (det.last || !slot_eq && !slot_lt) begin
        ack_pop = 1'b1;                         // acknowledge with no matching triple
      end else if (slot_eq) begin
        det_pop    = 1'b1;
        ack_pop    = 1'b1;
        sift_valid = 1'b1;
      end else begin
        det_pop = 1'b1;                         // not acknowledged
      end
    end
  end
  assign sift_bit = det.st.value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      discards     <= '0;
      errors       <= '0;
      packets_done <= '0;
    end else if (both) begin
      if (det_pop && !sift_valid && !det.last)            discards     <= discards + 1;
      if (pkt_bad || (ack_pop && !det_pop && !ack.last))   errors       <= errors + 1;
      if (det_pop && ack_pop && ack.last)                  packets_done <= packets_done + 1;
    end
  end
endmodule
