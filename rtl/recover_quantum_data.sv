// recover_quantum_data: Bob's Recover Quantum Data module.
//
// Input is the four detector lines, one sample per 400 ps time bin per clock (detector
// index = {basis, value}). Each line first passes a programmable alignment delay of 0-15
// bins (align_delay), so the four detectors line up with one another. A rising edge on an
// aligned line is a detection event.
//
// Capture of a packet is timed from Alice's Sync: the Sync is delayed by chan_delay bins
// (the measured difference between the quantum and classical path delays, set by the host;
// the quantum signal is assumed to arrive no earlier than the Sync) and then
// PKT_PAIRS * 2**spacing_log2 bins are captured. Bin b belongs to slot b >> spacing_log2 and
// has phase b mod 2**spacing_log2. In gated mode only phase-0 events (the transmission bin)
// are kept; in ungated mode events in any bin of the period are kept. Only the first kept
// event of a slot is reported (later ones are counted in dup_events).
//
// Output: one det_event_t per kept event, and an entry with last=1 at the final bin of
// each packet (its detmask is zero if nothing was kept in that bin), pushed into the Recov
// FIFO. The edge vector and the bin index are also given to the histogram unit. The
// alignment and delay ranges are this design's choice.
module recover_quantum_data
  import qkd_pkg::*;
#(
  parameter int MAX_CHAN_DELAY = 1024,
  parameter int BIN_W          = SLOT_W + 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  det_in,
  input  logic [3:0][3:0] align_delay,
  input  logic [$clog2(MAX_CHAN_DELAY)-1:0] chan_delay,
  input  logic [1:0]  spacing_log2,
  input  logic        gated,
  input  logic        sync,
  input  pkt_t        sync_pkt,
  output logic        ev_push,
  output det_event_t  ev_data,
  output logic [3:0]  edges,
  output logic        cap_active,
  output logic [BIN_W-1:0] cap_bin_now,
  output logic [31:0] detections,
  output logic [31:0] dup_events,
  output logic [31:0] gated_out,
  output logic [31:0] sync_overlaps
);
  localparam int DW = $clog2(MAX_CHAN_DELAY);

  // ---------------- per-detector alignment and edge detection
  logic [3:0][15:0] hist_sr;
  logic [3:0]       aligned, aligned_q;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      aligned[i] = (align_delay[i] == 4'd0) ? det_in[i] : hist_sr[i][align_delay[i] - 4'd1];
    end
  end
  assign edges = aligned & ~aligned_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_sr   <= '0;
      aligned_q <= '0;
    end else begin
      for (int i = 0; i < 4; i++) hist_sr[i] <= {hist_sr[i][14:0], det_in[i]};
      aligned_q <= aligned;
    end
  end

  // ---------------- Sync delay line (channel delay compensation)
  logic [MAX_CHAN_DELAY-1:0] dl_valid;
  pkt_t                      dl_pkt [MAX_CHAN_DELAY];
  logic [DW-1:0]             wptr;
  wire  [DW-1:0]             rptr = wptr - chan_delay;

  always_ff @(posedge clk) begin
    dl_pkt[wptr] <= sync_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_valid <= '0;
      wptr     <= '0;
    end else begin
      dl_valid[wptr] <= sync;
      wptr           <= wptr + 1'b1;
    end
  end

  wire  dsync     = (chan_delay == '0) ? sync     : dl_valid[rptr];
  pkt_t dsync_pkt;
  assign dsync_pkt = (chan_delay == '0) ? sync_pkt : dl_pkt[rptr];

  // ---------------- packet capture
  logic             cap_q;
  logic [BIN_W-1:0] cap_bin;
  pkt_t             cap_pkt;
  logic [1:0]       cap_sp;
  logic             seen_valid;
  slot_t            seen_slot;

  wire              cur_active = dsync || cap_q;
  wire [BIN_W-1:0]  cur_bin    = dsync ? '0 : cap_bin;
  pkt_t             cur_pkt;
  wire [1:0]        cur_sp     = dsync ? spacing_log2 : cap_sp;
  wire [BIN_W-1:0]  last_bin   = BIN_W'((PKT_PAIRS << cur_sp) - 1);
  wire [2:0]        phase      = 3'(cur_bin & BIN_W'((1 << cur_sp) - 1));
  slot_t            cur_slot;
  assign cur_pkt  = dsync ? dsync_pkt : cap_pkt;
  assign cur_slot = slot_t'(cur_bin >> cur_sp);

  wire is_last   = cur_active && (cur_bin == last_bin);
  wire any_edge  = cur_active && (edges != 4'b0);
  wire gate_drop = any_edge && gated && (phase != 3'd0);
  wire dup       = any_edge && !gate_drop && seen_valid && !dsync && (seen_slot == cur_slot);
  wire keep      = any_edge && !gate_drop && !dup;

  assign cap_active  = cur_active;
  assign cap_bin_now = cur_bin;
  assign ev_push     = keep || is_last;
  assign ev_data     = '{last: is_last, pkt: cur_pkt, slot: cur_slot,
                         detmask: keep ? edges : 4'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q         <= 1'b0;
      cap_bin       <= '0;
      cap_pkt       <= '0;
      cap_sp        <= '0;
      seen_valid    <= 1'b0;
      seen_slot     <= '0;
      detections    <= '0;
      dup_events    <= '0;
      gated_out     <= '0;
      sync_overlaps <= '0;
    end else begin
      if (dsync && cap_q) sync_overlaps <= sync_overlaps + 1;
      if (cur_active) begin
        cap_q   <= !is_last;
        cap_bin <= cur_bin + 1'b1;
        cap_pkt <= cur_pkt;
        cap_sp  <= cur_sp;
        if (dsync) seen_valid <= 1'b0;
        if (keep) begin
          seen_valid <= 1'b1;
          seen_slot  <= cur_slot;
        end
      end
      if (keep)      detections <= detections + 1;
      if (dup)       dup_events <= dup_events + 1;
      if (gate_drop) gated_out  <= gated_out + 1;
    end
  end
endmodule
