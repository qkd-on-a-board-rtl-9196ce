// ec_pa: the EC&PA (error correction and privacy amplification) unit of one board.
//
// NTHREADS independent Cascade threads run in parallel, each followed by its own Toeplitz
// privacy-amplification unit. Thread t is Active when (t even) differs from IS_BOB, so a
// board holds equal numbers of Active and Passive threads and the peer board holds the
// opposite combination; thread t of Alice always talks to thread t of Bob. All threads
// share the post-processing classical channel: outgoing messages are granted round-robin,
// one 40-bit word per clock (thread id, message, CRC-8), registered; incoming words are
// CRC-checked and routed to the thread named in them. Blocks are loaded and results
// collected by sift2pa through per-thread ports.
//
// Four threads follow the protocol description (four parallel Cascade tasks, equal numbers
// of Active and Passive threads per board); the rest is this design's choice.
module ec_pa
  import qkd_pkg::*;
#(
  parameter int NTHREADS     = 4,
  parameter bit IS_BOB       = 1'b0,
  parameter int LOGN         = 12,
  parameter int K1           = 3,
  parameter int ABORT_GROUPS = 194,
  parameter int P2_THR       = 0,
  parameter int MAX_P2       = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         ec_seed,
  input  logic [31:0]         pa_seed,
  input  logic [15:0]         pa_margin,
  // block load, per thread
  output logic [NTHREADS-1:0] ld_ready,
  input  logic [NTHREADS-1:0] ld_valid,
  input  logic                ld_bit,
  input  logic [15:0]         ld_blk,
  // key output, per thread
  output logic [NTHREADS-1:0] out_valid,
  output logic [NTHREADS-1:0] out_bit,
  output logic [NTHREADS-1:0] out_last,
  output logic [NTHREADS-1:0] out_empty,
  input  logic [NTHREADS-1:0] out_ready,
  // EC classical channel
  output eword_t              ec_tx_word,
  input  eword_t              ec_rx_word,
  // statistics
  output logic [31:0]         blocks_ok,
  output logic [31:0]         blocks_dropped,
  output logic [31:0]         errors_fixed,
  output logic [31:0]         phase2_passes,
  output logic [31:0]         rx_errors
);
  localparam int TW = (NTHREADS > 1) ? $clog2(NTHREADS) : 1;

  logic [NTHREADS-1:0] tx_valid, tx_ready, rx_valid, ob_valid, ob_bit, fin_valid, fin_ok;
  logic [NTHREADS-1:0] pa_idle, blk_start;
  ecmsg_t              tx_msg [NTHREADS];
  logic [LOGN:0]       fin_kept [NTHREADS];
  logic [LOGN+8:0]     fin_leak [NTHREADS];
  logic [15:0]         blk_idx [NTHREADS];
  logic [15:0]         s_ok [NTHREADS], s_drop [NTHREADS], s_fix [NTHREADS];
  logic [7:0]          s_p2 [NTHREADS];

  ecmsg_t rx_m;
  wire    rx_ok = ecmsg_ok(ec_rx_word);
  assign  rx_m  = ecmsg_t'(ec_rx_word[39:8]);

  for (genvar t = 0; t < NTHREADS; t++) begin : g_thr
    assign rx_valid[t] = rx_ok && (rx_m.thr == THR_W'(t));

    cascade_thread #(
      .LOGN(LOGN), .K1(K1), .ABORT_GROUPS(ABORT_GROUPS), .P2_THR(P2_THR), .MAX_P2(MAX_P2)
    ) u_thr (
      .clk, .rst_n,
      .active(((t % 2) == 0) != IS_BOB),
      .seed(ec_seed),
      .ld_ready(ld_ready[t]), .ld_valid(ld_valid[t]), .ld_bit, .ld_blk,
      .pa_idle(pa_idle[t]), .blk_start(blk_start[t]),
      .tx_valid(tx_valid[t]), .tx_msg(tx_msg[t]), .tx_ready(tx_ready[t]),
      .rx_valid(rx_valid[t]), .rx_msg(rx_m),
      .ob_valid(ob_valid[t]), .ob_bit(ob_bit[t]),
      .fin_valid(fin_valid[t]), .fin_ok(fin_ok[t]), .fin_kept(fin_kept[t]),
      .fin_leak(fin_leak[t]), .blk_idx(blk_idx[t]),
      .blocks_ok(s_ok[t]), .blocks_dropped(s_drop[t]), .errors_fixed(s_fix[t]),
      .phase2_passes(s_p2[t])
    );

    toeplitz_pa #(.MMAX(1 << LOGN), .KW(LOGN+1), .LW(LOGN+9)) u_pa (
      .clk, .rst_n,
      .start(blk_start[t]), .seed(pa_seed), .blk(ld_blk),
      .in_valid(ob_valid[t]), .in_bit(ob_bit[t]),
      .fin_valid(fin_valid[t]), .fin_ok(fin_ok[t]), .fin_kept(fin_kept[t]),
      .fin_leak(fin_leak[t]), .margin(pa_margin),
      .idle(pa_idle[t]),
      .out_valid(out_valid[t]), .out_bit(out_bit[t]), .out_last(out_last[t]),
      .out_empty(out_empty[t]), .out_ready(out_ready[t])
    );
  end

  // round-robin transmit arbitration
  logic [TW-1:0] rr;
  logic          gnt_any;
  logic [TW-1:0] gnt;
  always_comb begin
    gnt_any = 1'b0;
    gnt     = '0;
    for (int k = 0; k < NTHREADS; k++) begin
      if (!gnt_any && tx_valid[(int'(rr) + k) % NTHREADS]) begin
        gnt_any = 1'b1;
        gnt     = TW'((int'(rr) + k) % NTHREADS);
      end
    end
    tx_ready = '0;
    if (gnt_any) tx_ready[gnt] = 1'b1;
  end

  ecmsg_t gm;
  always_comb begin
    gm     = tx_msg[gnt];
    gm.thr = THR_W'(gnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr         <= '0;
      ec_tx_word <= '0;
      rx_errors  <= '0;
    end else begin
      ec_tx_word <= gnt_any ? ecmsg_encode(gm) : '0;
      if (gnt_any) rr <= (gnt == TW'(NTHREADS - 1)) ? '0 : gnt + 1'b1;
      if (ec_rx_word != '0 && !rx_ok) rx_errors <= rx_errors + 1;
    end
  end

  always_comb begin
    blocks_ok = '0; blocks_dropped = '0; errors_fixed = '0; phase2_passes = '0;
    for (int k = 0; k < NTHREADS; k++) begin
      blocks_ok      += 32'(s_ok[k]);
      blocks_dropped += 32'(s_drop[k]);
      errors_fixed   += 32'(s_fix[k]);
      phase2_passes  += 32'(s_p2[k]);
    end
  end
endmodule
