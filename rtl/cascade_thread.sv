// cascade_thread: one thread of Cascade error correction, Active or Passive.
//
// A block of N = 2**LOGN sifted bits is loaded bit by bit. Both peers then run the same
// passes over it; every pass first shuffles the block with the same pseudo-random
// permutation on both sides, pos(i) = (a*i + b) mod N with odd a, drawn from a 32-bit
// LFSR seeded with seed ^ block index (the seed is shared, not secret). Position i of the
// shuffled block falls in group i >> glog (group size G = 2**glog).
//
//  Phase 1 (glog = K1): Passive computes the parity of every group and sends them, 16 per
//    message. Active compares them with its own. More than ABORT_GROUPS differing groups:
//    the error rate is too high and the block is dropped. Otherwise Active sends a Hamming
//    syndrome (XOR of the in-group offsets of all one bits, glog bits) of each differing
//    group; Passive XORs it with its own syndrome, which gives the offset of a single error,
//    and flips that bit. Then phase 2.
//  Phase 2 (group size doubled each repetition, up to 2**GLOG_MAX = 64 bits, so that every
//    group stays between 5 and 100 bits as the protocol asks): as phase 1, but when at most P2_THR groups
//    differ the thread moves on to phase 3; after MAX_P2 repetitions the block is dropped.
//  Phase 3 (group size doubled again): a final pass. Active sends syndrome and parity of
//    every group. Passive corrects a group whose parity differs; a group whose parity agrees
//    but whose syndrome does not holds an uncorrectable even number of errors, is discarded
//    and reported to Active.
// Afterwards both peers stream the kept bits (phase-3 order, discarded groups skipped) to
// privacy amplification and compute a CRC-32 signature of them. Passive sends its
// signature, Active compares and returns the verdict. `leak` counts the bits disclosed:
// one per parity and glog per syndrome (glog+1 in phase 3).
//
// The phase structure, the parity/syndrome exchange and the leakage count follow the
// protocol; block size, group sizes, thresholds, the permutation form, the message formats
// and the CRC-32 signature are this design's choices. Messages are 32-bit ecmsg_t without
// the thread id, sent with a valid/ready handshake; received messages wait in an internal
// FIFO. One bit of the block is read per clock. LOGN must be at most 12.
module cascade_thread
  import qkd_pkg::*;
#(
  parameter int LOGN         = 12,
  parameter int K1           = 3,
  parameter int ABORT_GROUPS = 194,
  parameter int P2_THR       = 0,
  parameter int MAX_P2       = 6,
  parameter int GLOG_MAX     = 6     // largest group: 64 bits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        active,          // role, constant while running
  input  logic [31:0] seed,
  // block load
  output logic        ld_ready,
  input  logic        ld_valid,
  input  logic        ld_bit,
  input  logic [15:0] ld_blk,          // block index, sampled with the first bit
  input  logic        pa_idle,
  output logic        blk_start,       // first bit of a block accepted
  // EC messages
  output logic        tx_valid,
  output ecmsg_t      tx_msg,
  input  logic        tx_ready,
  input  logic        rx_valid,
  input  ecmsg_t      rx_msg,
  // corrected bits to privacy amplification
  output logic        ob_valid,
  output logic        ob_bit,
  output logic        fin_valid,
  output logic        fin_ok,
  output logic [LOGN:0] fin_kept,
  output logic [LOGN+8:0] fin_leak,
  output logic [15:0] blk_idx,
  // statistics
  output logic [15:0] blocks_ok,
  output logic [15:0] blocks_dropped,
  output logic [15:0] errors_fixed,
  output logic [7:0]  phase2_passes
);
  localparam int N    = 1 << LOGN;
  localparam int NG1  = 1 << (LOGN - K1);     // most groups in any pass
  localparam int QD   = 2 * NG1 + 16;

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_PERM, S_PAR, S_WPAR, S_DECIDE, S_HAM, S_CMD, S_PSYN, S_FIX,
    S_ALL, S_DTX, S_WFIN, S_OUT, S_HASH, S_WHASH, S_WVERD, S_FIN, S_ABORT
  } state_t;

  typedef enum logic [1:0] {A_NEXT = 2'd0, A_FINAL = 2'd1, A_DONE = 2'd2, A_ABORT = 2'd3} act_t;

  state_t st;

  logic            mem [N];
  logic [31:0]     lfsr;
  logic [LOGN-1:0] pa, pb;                    // permutation a (odd), b
  logic [3:0]      glog;
  logic [1:0]      phase;
  logic [7:0]      p2_cnt;
  logic [LOGN:0]   i;                         // bit counter
  logic [LOGN-1:0] g;                         // current group
  logic            par_acc;
  logic [LOGN-1:0] syn_acc;
  logic [NG1-1:0]  parity_v, mism, discard;
  logic [15:0]     pword;
  logic [LOGN:0]   mcount;
  logic [LOGN-1:0] rx_syn;
  logic            rx_par;
  logic [LOGN:0]   kept;
  logic [LOGN+8:0] leak;
  logic [31:0]     crc, rx_hash;
  logic            rx_hash_hi_seen;
  logic            verdict;
  logic [LOGN:0]   chunks_seen;

  // ---------------- derived values
  wire [LOGN:0]   ngroups = (LOGN+1)'(N >> glog);
  wire [LOGN:0]   nchunks = (ngroups + 15) >> 4;
  wire [LOGN-1:0] gmask   = LOGN'((1 << glog) - 1);
  wire [LOGN-1:0] ii      = i[LOGN-1:0];
  wire [LOGN-1:0] ig      = LOGN'(ii >> glog);   // group of shuffled index ii
  wire [LOGN-1:0] ioff    = ii & gmask;          // offset inside the group

  function automatic logic [LOGN-1:0] perm(input logic [LOGN-1:0] k,
                                           input logic [LOGN-1:0] a,
                                           input logic [LOGN-1:0] b);
    logic [2*LOGN-1:0] prod;
    prod = k * a;
    return prod[LOGN-1:0] + b;
  endfunction

  function automatic logic [31:0] lfsr16(input logic [31:0] s);
    logic [31:0] r;
    r = s;
    for (int k = 0; k < 16; k++) r = r[0] ? ((r >> 1) ^ 32'h8020_0003) : (r >> 1);
    return r;
  endfunction

  function automatic logic [31:0] crc_step(input logic [31:0] c, input logic b);
    return (c[31] ^ b) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
  endfunction

  // shuffled index used for the current read: scanning states walk i, group states walk
  // g*G + offset
  logic [LOGN-1:0] sidx;
  always_comb begin
    if (st == S_HAM || st == S_PSYN) sidx = LOGN'((g << glog) | (ii & gmask));
    else if (st == S_FIX)            sidx = LOGN'((g << glog) | ((rx_syn ^ syn_acc) & gmask));
    else                             sidx = ii;
  end
  wire [LOGN-1:0] pos  = perm(sidx, pa, pb);
  wire            rbit = mem[pos];

  // ---------------- receive queue
  logic   q_empty, q_full, q_pop;
  ecmsg_t q_msg;
  logic [$clog2(QD):0] q_count;
  sync_fifo #(.WIDTH($bits(ecmsg_t)), .DEPTH(1 << $clog2(QD))) u_rxq (
    .clk, .rst_n, .push(rx_valid), .din(rx_msg), .pop(q_pop),
    .dout(q_msg), .full(q_full), .empty(q_empty), .count(q_count)
  );

  // ---------------- transmit register
  logic   txq_valid;
  ecmsg_t txq_msg;
  assign tx_valid = txq_valid;
  assign tx_msg   = txq_msg;
  wire can_send   = !txq_valid || tx_ready;

  function automatic ecmsg_t mk(input ec_type_t t, input logic [25:0] p);
    ecmsg_t m;
    m.thr     = '0;
    m.etype   = t;
    m.payload = p;
    return m;
  endfunction

  // ---------------- control
  logic   send;
  ecmsg_t send_msg;
  wire    grp_end   = (ioff == gmask);
  wire    last_i    = (ii == LOGN'(N - 1));
  wire    chunk_end = (ig[3:0] == 4'hF) || last_i;

  assign ld_ready  = (st == S_IDLE && pa_idle) || st == S_LOAD;
  assign blk_start = (st == S_IDLE) && ld_valid && ld_ready;
  assign ob_valid = (st == S_OUT) && !discard[ig];
  assign ob_bit   = rbit;

  // combinational send request and queue pop for this cycle
  always_comb begin
    send     = 1'b0;
    send_msg = '0;
    q_pop    = 1'b0;
    unique case (st)
      S_PAR: if (!active && grp_end && chunk_end) begin
        send     = 1'b1;
        send_msg = mk(EC_PARITY, {10'(ig & ~LOGN'(15)), pword | (16'(par_acc ^ rbit) << ig[3:0])});
      end
      S_WPAR, S_WVERD, S_WFIN, S_CMD: q_pop = !q_empty;
      S_DECIDE: begin
        send = 1'b1;
        if (phase == 2'd1 && mcount > (LOGN+1)'(ABORT_GROUPS))
          send_msg = mk(EC_PASS, 26'(A_ABORT));
        else if (phase == 2'd2 && mcount <= (LOGN+1)'(P2_THR))
          send_msg = mk(EC_PASS, 26'(A_FINAL));
        else if (phase == 2'd2 && p2_cnt >= 8'(MAX_P2))
          send_msg = mk(EC_PASS, 26'(A_ABORT));
        else
          send = 1'b0;
      end
      S_HAM: begin
        if (!mism[g] && g == LOGN'(ngroups - 1)) begin
          send     = 1'b1;
          send_msg = mk(EC_PASS, 26'(A_NEXT));
        end else if (mism[g] && grp_end) begin
          send     = 1'b1;
          send_msg = mk(EC_HAMMING, {1'b0, 12'(g), 12'(syn_acc ^ (rbit ? ioff : '0)), par_acc ^ rbit});
        end
      end
      S_ALL: if (grp_end) begin
        send     = 1'b1;
        send_msg = mk(EC_HAMMING, {1'b0, 12'(ig), 12'(syn_acc ^ (rbit ? ioff : '0)), par_acc ^ rbit});
      end
      S_DTX: begin
        send     = 1'b1;
        send_msg = mk(EC_PASS, 26'(A_DONE));
      end
      S_FIX: if (phase == 2'd3 && rx_par == par_acc && rx_syn != syn_acc) begin
        send     = 1'b1;
        send_msg = mk(EC_DISCARD, 26'(g));
      end
      S_HASH: if (!active) begin
        send     = 1'b1;
        send_msg = rx_hash_hi_seen ? mk(EC_HASH, {9'd0, 1'b0, crc[15:0]})
                                   : mk(EC_HASH, {9'd0, 1'b1, crc[31:16]});
      end
      S_WHASH: if (!q_empty && q_msg.etype == EC_HASH && !q_msg.payload[16]) begin
        send     = 1'b1;
        send_msg = mk(EC_VERDICT, 26'({rx_hash[31:16], q_msg.payload[15:0]} == crc));
        q_pop    = can_send;
      end else begin
        q_pop = !q_empty;
      end
      default: ;
    endcase
    if (st == S_CMD && !q_empty && q_msg.etype == EC_PASS && q_msg.payload[1:0] == A_DONE) begin
      send     = 1'b1;
      send_msg = mk(EC_FINAL, '0);
      q_pop    = can_send;
    end
  end

  wire stall = send && !can_send;

  // popcount of differing parities in one received chunk
  logic [15:0] chunk_diff;
  always_comb begin
    chunk_diff = '0;
    for (int k = 0; k < 16; k++) begin
      logic [LOGN:0] gi;
      gi = (LOGN+1)'(q_msg.payload[25:16]) + (LOGN+1)'(k);
      if (gi < ngroups) chunk_diff[k] = q_msg.payload[k] ^ parity_v[gi[LOGN-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_IDLE && ld_valid && ld_ready) mem[0] <= ld_bit;
    if (st == S_LOAD && ld_valid) mem[ii] <= ld_bit;
    if (st == S_FIX && phase != 2'd3) mem[pos] <= ~mem[pos];
    if (st == S_FIX && phase == 2'd3 && rx_par != par_acc) mem[pos] <= ~mem[pos];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      lfsr <= 32'h1; pa <= 1; pb <= '0; glog <= 4'(K1); phase <= 2'd1; p2_cnt <= '0;
      i <= '0; g <= '0; par_acc <= 1'b0; syn_acc <= '0;
      parity_v <= '0; mism <= '0; discard <= '0; pword <= '0; mcount <= '0;
      rx_syn <= '0; rx_par <= 1'b0; kept <= '0; leak <= '0; crc <= '0; rx_hash <= '0;
      rx_hash_hi_seen <= 1'b0; verdict <= 1'b0; chunks_seen <= '0;
      txq_valid <= 1'b0; txq_msg <= '0;
      fin_valid <= 1'b0; fin_ok <= 1'b0; fin_kept <= '0; fin_leak <= '0; blk_idx <= '0;
      blocks_ok <= '0; blocks_dropped <= '0; errors_fixed <= '0; phase2_passes <= '0;
    end else begin
      fin_valid <= 1'b0;
      if (tx_ready) txq_valid <= 1'b0;
      if (send && can_send) begin
        txq_valid <= 1'b1;
        txq_msg   <= send_msg;
      end

      unique case (st)
        S_IDLE: if (ld_valid && ld_ready) begin
          blk_idx <= ld_blk;
          lfsr    <= seed ^ {ld_blk, 16'h5A5A};
          i       <= 1;
          st      <= (N == 1) ? S_PERM : S_LOAD;
        end
        S_LOAD: if (ld_valid) begin
          i <= i + 1'b1;
          if (last_i) begin
            st <= S_PERM; glog <= 4'(K1); phase <= 2'd1; p2_cnt <= '0;
            leak <= '0; discard <= '0;
          end
        end
        S_PERM: begin
          pa <= lfsr[LOGN-1:0] | LOGN'(1);
          pb <= lfsr[LOGN+15:16];
          lfsr <= lfsr16(lfsr16(lfsr));
          i <= '0; g <= '0; par_acc <= 1'b0; syn_acc <= '0; pword <= '0;
          mism <= '0; mcount <= '0; chunks_seen <= '0;
          if (phase == 2'd3) st <= active ? S_ALL : S_CMD;
          else               st <= S_PAR;
        end
        S_PAR: if (!stall) begin
          i <= i + 1'b1;
          par_acc <= par_acc ^ rbit;
          if (grp_end) begin
            parity_v[ig] <= par_acc ^ rbit;
            pword[ig[3:0]] <= par_acc ^ rbit;
            par_acc <= 1'b0;
            if (chunk_end) pword <= '0;
          end
          if (last_i) begin
            leak <= leak + (LOGN+9)'(ngroups);
            st   <= active ? S_WPAR : S_CMD;
          end
        end
        S_WPAR: if (!q_empty) begin
          if (q_msg.etype == EC_PARITY) begin
            for (int k = 0; k < 16; k++)
              if (chunk_diff[k]) mism[LOGN'(q_msg.payload[25:16]) + LOGN'(k)] <= 1'b1;
            mcount <= mcount + (LOGN+1)'($countones(chunk_diff));
            chunks_seen <= chunks_seen + 1'b1;
            if (chunks_seen + 1'b1 == nchunks) st <= S_DECIDE;
          end
        end
        S_DECIDE: if (!stall) begin
          if (send) begin
            if (send_msg.payload[1:0] == A_FINAL) begin
              phase <= 2'd3;
              if (glog < 4'(GLOG_MAX)) glog <= glog + 1'b1;
              st <= S_PERM;
            end else begin
              st <= S_ABORT;
            end
          end else begin
            g <= '0; i <= '0; par_acc <= 1'b0; syn_acc <= '0;
            st <= S_HAM;
          end
        end
        S_HAM: if (!stall) begin
          if (!mism[g]) begin
            if (g == LOGN'(ngroups - 1)) begin
              // PASS NEXT sent this cycle
              if (phase == 2'd2) p2_cnt <= p2_cnt + 1'b1;
              phase2_passes <= phase2_passes + 1'b1;
              phase <= 2'd2;
              if (glog < 4'(GLOG_MAX)) glog <= glog + 1'b1;
              st <= S_PERM;
            end else begin
              g <= g + 1'b1;
            end
          end else begin
            i <= i + 1'b1;
            par_acc <= par_acc ^ rbit;
            syn_acc <= syn_acc ^ (rbit ? ioff : '0);
            if (grp_end) begin
              leak <= leak + (LOGN+9)'(glog);
              mism[g] <= 1'b0;             // done with this group, revisit as clean
              par_acc <= 1'b0; syn_acc <= '0; i <= '0;
            end
          end
        end
        S_CMD: if (!q_empty && !stall) begin
          unique case (q_msg.etype)
            EC_HAMMING: begin
              g      <= q_msg.payload[24:13];
              rx_syn <= q_msg.payload[12:1];
              rx_par <= q_msg.payload[0];
              i <= '0; par_acc <= 1'b0; syn_acc <= '0;
              st <= S_PSYN;
            end
            EC_PASS: begin
              unique case (act_t'(q_msg.payload[1:0]))
                A_NEXT: begin
                  if (phase == 2'd2) p2_cnt <= p2_cnt + 1'b1;
                  phase2_passes <= phase2_passes + 1'b1;
                  phase <= 2'd2;
                  if (glog < 4'(GLOG_MAX)) glog <= glog + 1'b1;
                  st <= S_PERM;
                end
                A_FINAL: begin
                  phase <= 2'd3;
                  if (glog < 4'(GLOG_MAX)) glog <= glog + 1'b1;
                  st <= S_PERM;
                end
                A_DONE: begin
                  i <= '0; kept <= '0; crc <= '1; st <= S_OUT;
                end
                default: st <= S_ABORT;
              endcase
            end
            default: ;
          endcase
        end
        S_PSYN: begin
          i <= i + 1'b1;
          par_acc <= par_acc ^ rbit;
          syn_acc <= syn_acc ^ (rbit ? ioff : '0);
          if (grp_end) st <= S_FIX;
        end
        S_FIX: if (!stall) begin
          leak <= leak + (LOGN+9)'(glog) + ((phase == 2'd3) ? (LOGN+9)'(1) : '0);
          if (phase != 2'd3 || rx_par != par_acc) errors_fixed <= errors_fixed + 1'b1;
          if (phase == 2'd3 && rx_par == par_acc && rx_syn != syn_acc) discard[g] <= 1'b1;
          st <= S_CMD;
        end
        S_ALL: if (!stall) begin
          i <= i + 1'b1;
          par_acc <= par_acc ^ rbit;
          syn_acc <= syn_acc ^ (rbit ? ioff : '0);
          if (grp_end) begin
            par_acc <= 1'b0; syn_acc <= '0;
            leak <= leak + (LOGN+9)'(glog) + (LOGN+9)'(1);
          end
          if (last_i) st <= S_DTX;
        end
        S_DTX: if (!stall) st <= S_WFIN;
        S_WFIN: begin
          if (!q_empty) begin
            if (q_msg.etype == EC_DISCARD) discard[q_msg.payload[LOGN-1:0]] <= 1'b1;
            if (q_msg.etype == EC_FINAL) begin
              i <= '0; kept <= '0; crc <= '1; st <= S_OUT;
            end
          end
        end
        S_OUT: begin
          i <= i + 1'b1;
          if (!discard[ig]) begin
            kept <= kept + 1'b1;
            crc  <= crc_step(crc, rbit);
          end
          if (last_i) begin
            rx_hash_hi_seen <= 1'b0;
            st <= S_HASH;
          end
        end
        S_HASH: begin
          if (active) st <= S_WHASH;
          else if (!stall) begin
            if (rx_hash_hi_seen) st <= S_WVERD;
            rx_hash_hi_seen <= 1'b1;
          end
        end
        S_WHASH: if (!q_empty && q_msg.etype == EC_HASH) begin
          if (q_msg.payload[16]) rx_hash[31:16] <= q_msg.payload[15:0];
          else if (!stall) begin
            verdict <= ({rx_hash[31:16], q_msg.payload[15:0]} == crc);
            st <= S_FIN;
          end
        end
        S_WVERD: if (!q_empty && q_msg.etype == EC_VERDICT) begin
          verdict <= q_msg.payload[0];
          st <= S_FIN;
        end
        S_FIN: begin
          fin_valid <= 1'b1;
          fin_ok    <= verdict;
          fin_kept  <= kept;
          fin_leak  <= leak;
          if (verdict) blocks_ok <= blocks_ok + 1'b1;
          else         blocks_dropped <= blocks_dropped + 1'b1;
          st <= S_IDLE;
        end
        S_ABORT: begin
          fin_valid <= 1'b1;
          fin_ok    <= 1'b0;
          fin_kept  <= '0;
          fin_leak  <= leak;
          blocks_dropped <= blocks_dropped + 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
