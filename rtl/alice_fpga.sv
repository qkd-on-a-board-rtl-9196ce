// alice_fpga: the transmitter (Alice) FPGA design.
//
// State generation: the random number generator (or the host-loaded test pattern) feeds
// the RN FIFO; spacing pops one state per transmission bin, drives the four one-hot
// quantum lines q_out (one time bin per clock), stores the state in the match memory and
// raises a Sync for the first slot of each 2048-slot packet. Send/Receive puts the Sync
// and the acknowledge lists on the sifting classical channel (c_tx) and takes Bob's
// detection pairs from it (c_rx). Sift compares bases, frees the packet's match-memory
// space and passes sifted bits to Sift2PA, which cuts them into blocks for the EC&PA
// threads (error correction, signature check, privacy amplification, on the EC channel
// ec_tx/ec_rx). The final key is read from the Key FIFO (key_pop/key_word/key_empty).
// The host configures and monitors everything through the register bus of ctrl_status.
//
// Status words (register 0x20 + index): 0 packets sent, 1 stall cycles, 2 RN FIFO
// underflows, 3 detection pairs received, 4 sifted bits, 5 classical CRC errors,
// 6 dropped acknowledges, 7 Sift2PA overflows, 8 key bits, 9 blocks corrected,
// 10 blocks dropped, 11 bits corrected, 12 Cascade passes after phase 1, 13 EC CRC errors,
// 14 Key FIFO level.
module alice_fpga
  import qkd_pkg::*;
#(
  parameter int MAX_OUT      = 8,
  parameter int TEST_DEPTH   = 2048,
  parameter int RN_DEPTH     = 16,
  parameter int NTHREADS     = 4,
  parameter int LOGN         = 12,
  parameter int K1           = 3,
  parameter int ABORT_GROUPS = 194,
  parameter int P2_THR       = 0,
  parameter int MAX_P2       = 6,
  parameter int KEY_DEPTH    = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register bus
  input  logic [7:0]  host_addr,
  input  logic        host_we,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  // key FIFO read port
  input  logic        key_pop,
  output logic [31:0] key_word,
  output logic        key_empty,
  // photonics
  output logic [3:0]  q_out,
  output cword_t      c_tx,
  input  cword_t      c_rx,
  output eword_t      ec_tx,
  input  eword_t      ec_rx
);
  localparam int TAW = $clog2(TEST_DEPTH);

  // ---------------- control & status
  logic        run, gated, use_test, rng_load, hist_clear, tm_we;
  logic [1:0]  spacing_log2, hist_det, tm_data;
  logic [31:0] seed_value, seed_basis, chan_delay, ec_seed, pa_seed;
  logic [3:0][3:0] align_delay;
  logic [15:0] pa_margin, test_len, tm_addr;
  logic [31:0] status [32];
  logic [3:0]  hist_addr;

  ctrl_status #(.NSTATUS(32), .HIST_BINS(16)) u_cs (
    .clk, .rst_n, .host_addr, .host_we, .host_wdata, .host_rdata,
    .run, .gated, .spacing_log2, .use_test, .rng_load, .hist_clear, .hist_det,
    .seed_value, .seed_basis, .chan_delay, .align_delay, .ec_seed, .pa_seed, .pa_margin,
    .test_len, .tm_we, .tm_addr, .tm_data, .status, .hist_addr, .hist_data(32'h0)
  );

  // ---------------- state source and RN FIFO
  qstate_t src_state, rn_state;
  logic    src_valid, rn_empty, rn_full, rn_pop;
  logic [$clog2(RN_DEPTH):0] rn_count;

  state_source #(.TEST_DEPTH(TEST_DEPTH)) u_src (
    .clk, .rst_n, .use_test, .tm_we, .tm_addr(tm_addr[TAW-1:0]), .tm_data(qstate_t'(tm_data)),
    .tm_len(test_len[TAW-1:0]), .rng_load, .seed_value, .seed_basis,
    .req(run && (rn_count < ($clog2(RN_DEPTH)+1)'(RN_DEPTH - 2))),
    .state(src_state), .valid(src_valid)
  );

  sync_fifo #(.WIDTH($bits(qstate_t)), .DEPTH(RN_DEPTH)) u_rn_fifo (
    .clk, .rst_n, .push(src_valid), .din(src_state), .pop(rn_pop),
    .dout(rn_state), .full(rn_full), .empty(rn_empty), .count(rn_count)
  );

  // ---------------- spacing and match memory
  logic       sync_req, mm_we, mm_re, pkt_release, sending;
  pkt_t       sync_pkt, mm_wpkt, mm_rpkt;
  slot_t      mm_wslot, mm_rslot;
  logic [2:0] mm_wdata, mm_rdata;

  spacing #(.MAX_OUT(MAX_OUT)) u_spacing (
    .clk, .rst_n, .run, .spacing_log2, .rn_state, .rn_empty, .rn_pop, .q_out,
    .sync_req, .sync_pkt, .mm_we, .mm_pkt(mm_wpkt), .mm_slot(mm_wslot), .mm_data(mm_wdata),
    .pkt_release, .sending, .stall_cycles(status[1]), .underflows(status[2]),
    .packets_sent(status[0])
  );

  match_memory #(.MAX_OUT(MAX_OUT)) u_mm (
    .clk, .we(mm_we), .wr_pkt(mm_wpkt), .wr_slot(mm_wslot), .wr_data(mm_wdata),
    .re(mm_re), .rd_pkt(mm_rpkt), .rd_slot(mm_rslot), .rd_data(mm_rdata)
  );

  // ---------------- classical channel and sifting
  logic  det_valid, ack_valid, sift_valid, sift_bit;
  cmsg_t det_msg, ack_msg;

  alice_send_receive u_sr (
    .clk, .rst_n, .sync_req, .sync_pkt, .ack_valid, .ack_msg, .tx_word(c_tx), .rx_word(c_rx),
    .det_valid, .det_msg, .rx_errors(status[5]), .ack_drops(status[6])
  );

  alice_sift u_sift (
    .clk, .rst_n, .det_valid, .det_msg, .mm_re, .mm_pkt(mm_rpkt), .mm_slot(mm_rslot),
    .mm_data(mm_rdata), .sift_valid, .sift_bit, .ack_valid, .ack_msg, .pkt_release,
    .det_count(status[3]), .sift_count(status[4])
  );

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
    .overflows(status[7]), .key_bits(status[8])
  );

  ec_pa #(.NTHREADS(NTHREADS), .IS_BOB(1'b0), .LOGN(LOGN), .K1(K1),
          .ABORT_GROUPS(ABORT_GROUPS), .P2_THR(P2_THR), .MAX_P2(MAX_P2)) u_ecpa (
    .clk, .rst_n, .ec_seed, .pa_seed, .pa_margin, .ld_ready, .ld_valid, .ld_bit, .ld_blk,
    .out_valid(o_valid), .out_bit(o_bit), .out_last(o_last), .out_empty(o_empty),
    .out_ready(o_ready), .ec_tx_word(ec_tx), .ec_rx_word(ec_rx),
    .blocks_ok(status[9]), .blocks_dropped(status[10]), .errors_fixed(status[11]),
    .phase2_passes(status[12]), .rx_errors(status[13])
  );

  sync_fifo #(.WIDTH(32), .DEPTH(KEY_DEPTH)) u_key_fifo (
    .clk, .rst_n, .push(key_push), .din(kw), .pop(key_pop), .dout(key_word),
    .full(key_full), .empty(key_empty), .count(key_count)
  );

  assign status[14] = 32'(key_count);
  for (genvar k = 15; k < 32; k++) begin : g_st0
    assign status[k] = '0;
  end
endmodule
