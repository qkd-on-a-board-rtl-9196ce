// bob_fpga: the receiver (Bob) FPGA design.
//
// The four detector lines det_in (one time bin per clock) enter Recover Quantum Data,
// which aligns them, times each packet's capture from Alice's Sync (decoded by Classical
// Receive Data from c_rx) plus the programmed channel delay, finds rising edges and tags
// them with packet and slot, into the Recov FIFO. A histogram unit counts the edges of one
// detector per time bin. Distribute Quantum Data turns single-detector events into
// (slot, basis, value) triples for the Det FIFO and detection pairs for Classical Send Data
// (c_tx). Alice's acknowledge lists arrive in the Sift FIFO; Sift keeps the acknowledged
// triples' bits. Sift2PA, EC&PA (the opposite thread roles to Alice's, on ec_tx/ec_rx) and
// the Key FIFO follow as on Alice's board.
//
// Status words (register 0x20 + index): 0 detections, 1 repeated events in a slot,
// 2 events outside the gate, 3 Sync overlaps, 4 multi-detector events, 5 pairs sent,
// 6 classical CRC errors, 7 acknowledges received, 8 discarded triples, 9 sift errors,
// 10 packets sifted, 11 Recov FIFO overflows, 12 sifted bits, 13 Sift2PA overflows,
// 14 key bits, 15 blocks corrected, 16 blocks dropped, 17 bits corrected,
// 18 Cascade passes after phase 1, 19 EC CRC errors, 20 Key FIFO level,
// 21 Sift FIFO overflows. Histogram counters at 0x40-0x4F.
module bob_fpga
  import qkd_pkg::*;
#(
  parameter int RECOV_DEPTH    = 64,
  parameter int DET_DEPTH      = 2048,
  parameter int SIFT_DEPTH     = 2048,
  parameter int MAX_CHAN_DELAY = 1024,
  parameter int HIST_BINS      = 16,
  parameter int NTHREADS       = 4,
  parameter int LOGN           = 12,
  parameter int K1             = 3,
  parameter int ABORT_GROUPS   = 194,
  parameter int P2_THR         = 0,
  parameter int MAX_P2         = 6,
  parameter int KEY_DEPTH      = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  host_addr,
  input  logic        host_we,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  input  logic        key_pop,
  output logic [31:0] key_word,
  output logic        key_empty,
  input  logic [3:0]  det_in,
  output cword_t      c_tx,
  input  cword_t      c_rx,
  output eword_t      ec_tx,
  input  eword_t      ec_rx
);
  localparam int DLW   = $clog2(MAX_CHAN_DELAY);
  localparam int BIN_W = SLOT_W + 3;

  // ---------------- control & status
  logic        run, gated, use_test, rng_load, hist_clear, tm_we;
  logic [1:0]  spacing_log2, hist_det, tm_data;
  logic [31:0] seed_value, seed_basis, chan_delay, ec_seed, pa_seed, hist_data;
  logic [3:0][3:0] align_delay;
  logic [15:0] pa_margin, test_len, tm_addr;
  logic [31:0] status [32];
  logic [$clog2(HIST_BINS)-1:0] hist_addr;

  ctrl_status #(.NSTATUS(32), .HIST_BINS(HIST_BINS)) u_cs (
    .clk, .rst_n, .host_addr, .host_we, .host_wdata, .host_rdata,
    .run, .gated, .spacing_log2, .use_test, .rng_load, .hist_clear, .hist_det,
    .seed_value, .seed_basis, .chan_delay, .align_delay, .ec_seed, .pa_seed, .pa_margin,
    .test_len, .tm_we, .tm_addr, .tm_data, .status, .hist_addr, .hist_data
  );

  // ---------------- classical receive, recover, histogram
  logic sync, ack_push, ev_push, cap_active;
  pkt_t sync_pkt;
  ack_t ack_data;
  det_event_t ev_data;
  logic [3:0] edges;
  logic [BIN_W-1:0] cap_bin;

  classical_receive u_crx (
    .clk, .rst_n, .rx_word(c_rx), .sync, .sync_pkt, .ack_push, .ack_data,
    .rx_errors(status[6]), .ack_count(status[7])
  );

  recover_quantum_data #(.MAX_CHAN_DELAY(MAX_CHAN_DELAY), .BIN_W(BIN_W)) u_rec (
    .clk, .rst_n, .det_in, .align_delay, .chan_delay(chan_delay[DLW-1:0]), .spacing_log2,
    .gated, .sync, .sync_pkt, .ev_push, .ev_data, .edges, .cap_active,
    .cap_bin_now(cap_bin), .detections(status[0]), .dup_events(status[1]),
    .gated_out(status[2]), .sync_overlaps(status[3])
  );

  det_histogram #(.HIST_BINS(HIST_BINS), .CNT_W(32), .BIN_W(BIN_W)) u_hist (
    .clk, .rst_n, .clear(hist_clear), .det_sel(hist_det), .edges, .cap_active, .cap_bin,
    .rd_addr(hist_addr), .rd_data(hist_data)
  );

  // ---------------- Recov FIFO, distribute, Det FIFO, classical send
  det_event_t rv_dout;
  logic rv_empty, rv_full, rv_pop;
  logic [$clog2(RECOV_DEPTH):0] rv_count;

  sync_fifo #(.WIDTH($bits(det_event_t)), .DEPTH(RECOV_DEPTH)) u_recov_fifo (
    .clk, .rst_n, .push(ev_push), .din(ev_data), .pop(rv_pop), .dout(rv_dout),
    .full(rv_full), .empty(rv_empty), .count(rv_count)
  );

  triple_t trip, det_dout;
  logic trip_push, det_full, det_empty, det_pop;
  logic pair_valid, pair_last, pair_basis;
  pkt_t pair_pkt;
  slot_t pair_slot;
  logic [$clog2(DET_DEPTH):0] det_count;

  distribute_quantum_data u_dist (
    .clk, .rst_n, .ev(rv_dout), .ev_empty(rv_empty), .ev_pop(rv_pop),
    .trip_push, .trip, .trip_full(det_full),
    .pair_valid, .pair_last, .pair_pkt, .pair_slot, .pair_basis,
    .multi_clicks(status[4])
  );

  sync_fifo #(.WIDTH($bits(triple_t)), .DEPTH(DET_DEPTH)) u_det_fifo (
    .clk, .rst_n, .push(trip_push), .din(trip), .pop(det_pop), .dout(det_dout),
    .full(det_full), .empty(det_empty), .count(det_count)
  );

  classical_send u_ctx (
    .clk, .rst_n, .pair_valid, .pair_last, .pair_pkt, .pair_slot, .pair_basis,
    .tx_word(c_tx), .pairs_sent(status[5])
  );

  // ---------------- Sift FIFO and sift
  ack_t sf_dout;
  logic sf_empty, sf_full, sf_pop, sift_valid, sift_bit;
  logic [$clog2(SIFT_DEPTH):0] sf_count;

  sync_fifo #(.WIDTH($bits(ack_t)), .DEPTH(SIFT_DEPTH)) u_sift_fifo (
    .clk, .rst_n, .push(ack_push && !sf_full), .din(ack_data), .pop(sf_pop), .dout(sf_dout),
    .full(sf_full), .empty(sf_empty), .count(sf_count)
  );

  bob_sift u_sift (
    .clk, .rst_n, .det(det_dout), .det_empty, .det_pop, .ack(sf_dout), .ack_empty(sf_empty),
    .ack_pop(sf_pop), .sift_valid, .sift_bit, .discards(status[8]), .errors(status[9]),
    .packets_done(status[10])
  );

  logic [31:0] rv_ovf, sifted, sf_ovf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_ovf <= '0; sifted <= '0; sf_ovf <= '0;
    end else begin
      if (ev_push && rv_full)   rv_ovf <= rv_ovf + 1;
      if (ack_push && sf_full)  sf_ovf <= sf_ovf + 1;
      if (sift_valid)           sifted <= sifted + 1;
    end
  end
  assign status[11] = rv_ovf;
  assign status[12] = sifted;
  assign status[21] = sf_ovf;

  // ---------------- Sift2PA, EC&PA, Key FIFO
  logic [NTHREADS-1:0] ld_ready, ld_valid, o_valid, o_bit, o_last, o_empty, o_ready;
  logic        ld_bit, key_push, key_full;
  logic [15:0] ld_blk;
  logic [31:0] kw;
  logic [$clog2(KEY_DEPTH):0] key_count;

  sift2pa #(.NTHREADS(NTHREADS), .LOGN(LOGN)) u_s2pa (
    .clk, .rst_n, .sift_valid, .sift_bit, .ld_ready, .ld_valid, .ld_bit, .ld_blk,
    .out_valid(o_valid), .out_bit(o_bit), .out_last(o_last), .out_empty(o_empty),
    .out_ready(o_ready), .key_push, .key_word(kw), .key_full,
    .overflows(status[13]), .key_bits(status[14])
  );

  ec_pa #(.NTHREADS(NTHREADS), .IS_BOB(1'b1), .LOGN(LOGN), .K1(K1),
          .ABORT_GROUPS(ABORT_GROUPS), .P2_THR(P2_THR), .MAX_P2(MAX_P2)) u_ecpa (
    .clk, .rst_n, .ec_seed, .pa_seed, .pa_margin, .ld_ready, .ld_valid, .ld_bit, .ld_blk,
    .out_valid(o_valid), .out_bit(o_bit), .out_last(o_last), .out_empty(o_empty),
    .out_ready(o_ready), .ec_tx_word(ec_tx), .ec_rx_word(ec_rx),
    .blocks_ok(status[15]), .blocks_dropped(status[16]), .errors_fixed(status[17]),
    .phase2_passes(status[18]), .rx_errors(status[19])
  );

  sync_fifo #(.WIDTH(32), .DEPTH(KEY_DEPTH)) u_key_fifo (
    .clk, .rst_n, .push(key_push), .din(kw), .pop(key_pop), .dout(key_word),
    .full(key_full), .empty(key_empty), .count(key_count)
  );

  assign status[20] = 32'(key_count);
  for (genvar k = 22; k < 32; k++) begin : g_st0
    assign status[k] = '0;
  end
endmodule
