// match_memory: Alice's Quantum Data Match Memory.
//
// Holds the state sent in every slot of the last MAX_OUT packets, addressed by
// (packet mod MAX_OUT) * 2048 + slot, so Alice's sift can look up the basis and bit value of a slot
// Bob reports. One write port (from spacing) and one read port (from sift) with a one-cycle
// registered read. Each entry is {valid, basis, value}; valid is low for a slot that was
// sent dark. MAX_OUT (packets in flight) is this design's choice: the round trip it must
// cover grows with the distance between the boards. MAX_OUT must divide 256, the range of
// the packet number.
module match_memory
  import qkd_pkg::*;
#(
  parameter int MAX_OUT = 8
) (
  input  logic       clk,
  input  logic       we,
  input  pkt_t       wr_pkt,
  input  slot_t      wr_slot,
  input  logic [2:0] wr_data,
  input  logic       re,
  input  pkt_t       rd_pkt,
  input  slot_t      rd_slot,
  output logic [2:0] rd_data
);
  localparam int DEPTH = MAX_OUT * PKT_PAIRS;
  localparam int AW    = $clog2(DEPTH);

  logic [2:0] mem [DEPTH];

  // packets share the memory round-robin: packet p uses rows (p mod MAX_OUT)
  function automatic logic [AW-1:0] addr(input pkt_t p, input slot_t s);
    return AW'((int'(p) % MAX_OUT) * PKT_PAIRS + int'(s));
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[addr(wr_pkt, wr_slot)] <= wr_data;
    if (re) rd_data <= mem[addr(rd_pkt, rd_slot)];
  end
endmodule
