// spacing: Alice's packet framer and transmission-rate control.
//
// The quantum channel runs one time bin per clock. Transmission events are spaced by
// 2**spacing_log2 bins (1, 2, 4 or 8: 2.5 GHz, 1.25 GHz, 625 MHz and 312.5 MHz at a 400 ps
// bin), the remaining bins of each period stay dark. PKT_PAIRS transmission slots form a
// packet. At the first transmission bin of a packet a Sync request is raised, in the same
// clock as the first quantum pulse, so Bob can time its capture from the Sync.
//
// At every transmission bin one state is popped from the RN FIFO, sent as a one-hot pulse
// on q_out (line {basis,value}), and written to the match memory at (packet, slot) with a
// valid bit. If the RN FIFO is empty at a transmission bin, the slot is sent dark and stored
// invalid (counted in underflows).
//
// Flow control: a packet starts only when the RN FIFO holds a state and fewer than MAX_OUT packets are waiting to be
// sifted (a packet is released by pkt_release from Alice's sift). Otherwise spacing waits
// between packets (counted in stall_cycles). This keeps the match memory, which holds
// MAX_OUT packets, from being overwritten. Packets start back to back when not stalled.
module spacing
  import qkd_pkg::*;
#(
  parameter int MAX_OUT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [1:0]  spacing_log2,
  // RN FIFO read side
  input  qstate_t     rn_state,
  input  logic        rn_empty,
  output logic        rn_pop,
  // quantum channel drive, one bin per clock
  output logic [3:0]  q_out,
  // Sync request for the classical channel
  output logic        sync_req,
  output pkt_t        sync_pkt,
  // match memory write
  output logic        mm_we,
  output pkt_t        mm_pkt,
  output slot_t       mm_slot,
  output logic [2:0]  mm_data,       // {valid, basis, value}
  // flow control
  input  logic        pkt_release,
  output logic        sending,
  output logic [31:0] stall_cycles,
  output logic [31:0] underflows,
  output logic [31:0] packets_sent
);
  localparam int OW = $clog2(MAX_OUT+1);

  logic [OW-1:0] outstanding;
  logic [2:0]    phase;
  slot_t         slot;
  pkt_t          pkt;
  logic [1:0]    sp_l2;              // spacing latched per packet

  wire  [2:0] phase_max = 3'((1 << sp_l2) - 1);
  wire        tx_bin    = sending && (phase == 3'd0);
  wire        can_start = run && !rn_empty && (outstanding < OW'(MAX_OUT));
  wire        pkt_done  = sending && (phase == phase_max) && (slot == slot_t'(PKT_PAIRS-1));
  wire        start     = can_start && (!sending || pkt_done);

  assign rn_pop   = tx_bin && !rn_empty;
  assign q_out    = (tx_bin && !rn_empty) ? 4'(1 << {rn_state.basis, rn_state.value}) : 4'b0;
  assign sync_req = tx_bin && (slot == '0);
  assign sync_pkt = pkt;
  assign mm_we    = tx_bin;
  assign mm_pkt   = pkt;
  assign mm_slot  = slot;
  assign mm_data  = {!rn_empty, rn_state.basis, rn_state.value};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding  <= '0;
      phase        <= '0;
      slot         <= '0;
      pkt          <= '0;
      sp_l2        <= '0;
      sending      <= 1'b0;
      stall_cycles <= '0;
      underflows   <= '0;
      packets_sent <= '0;
    end else begin
      outstanding <= outstanding + OW'(start) - OW'(pkt_release);
      if (tx_bin && rn_empty) underflows <= underflows + 1;
      if (run && !rn_empty && !can_start && (!sending || pkt_done)) stall_cycles <= stall_cycles + 1;
      if (start) begin
        sending <= 1'b1;
        phase   <= '0;
        slot    <= '0;
        sp_l2   <= spacing_log2;
        if (pkt_done) pkt <= pkt + 1'b1;
        packets_sent <= packets_sent + 1;
      end else if (pkt_done) begin
        sending <= 1'b0;
        pkt     <= pkt + 1'b1;
      end else if (sending) begin
        if (phase == phase_max) begin
          phase <= '0;
          slot  <= slot + 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  a_release_has_packet: assert property (@(posedge clk) disable iff (!rst_n)
                                         pkt_release |-> (outstanding != 0));
endmodule
