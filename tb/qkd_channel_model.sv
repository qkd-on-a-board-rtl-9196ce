// qkd_channel_model: behavioural model of everything between the two boards, for
// simulation only: Alice's sources, the quantum path, Bob's passive basis choice and his
// four single-photon detectors, and the three fibre classical links.
//
// For each quantum pulse (one-hot on a_q): with probability det_pm/1000 a photon is
// detected. Bob's basis is random; in Alice's basis the detector of Alice's value fires,
// flipped with probability qber_pm/1000; in the other basis a random value. The detector
// output is a two-bin pulse QD bins later, or one bin later still with probability
// jit_pm/1000 (detector jitter); with probability multi_pm/1000 a second detector fires too,
// and dark_pm/1000 per bin gives a dark count. The classical links are pure delays of CD
// (sifting) and ECD (post-processing) clocks. Counters report what was injected.
module qkd_channel_model
  import qkd_pkg::*;
#(
  parameter int QD  = 20,
  parameter int CD  = 5,
  parameter int ECD = 7
) (
  input  logic        clk,
  input  logic [31:0] det_pm,
  input  logic [31:0] qber_pm,
  input  logic [31:0] jit_pm,
  input  logic [31:0] multi_pm,
  input  logic [31:0] dark_pm,
  input  logic [3:0]  a_q,
  output logic [3:0]  b_det,
  input  cword_t      a_c_tx,
  output cword_t      b_c_rx,
  input  cword_t      b_c_tx,
  output cword_t      a_c_rx,
  input  eword_t      a_ec_tx,
  output eword_t      b_ec_rx,
  input  eword_t      b_ec_tx,
  output eword_t      a_ec_rx,
  output int          n_det,
  output int          n_flip,
  output int          n_jit,
  output int          n_multi
);
  logic [3:0] sched [64];
  int         t;
  cword_t     c_ab [CD], c_ba [CD];
  eword_t     e_ab [ECD], e_ba [ECD];

  initial begin
    for (int k = 0; k < 64; k++) sched[k] = '0;
    for (int k = 0; k < CD; k++) begin c_ab[k] = '0; c_ba[k] = '0; end
    for (int k = 0; k < ECD; k++) begin e_ab[k] = '0; e_ba[k] = '0; end
    t = 0; n_det = 0; n_flip = 0; n_jit = 0; n_multi = 0;
  end

  assign b_det   = sched[t % 64];
  assign b_c_rx  = c_ab[CD-1];
  assign a_c_rx  = c_ba[CD-1];
  assign b_ec_rx = e_ab[ECD-1];
  assign a_ec_rx = e_ba[ECD-1];

  function automatic logic chance(input logic [31:0] pm);
    return ($urandom % 1000) < pm;
  endfunction

  always @(posedge clk) begin
    logic [1:0] idx;
    logic       bb, v;
    int         d;
    logic [3:0] m;
    sched[t % 64] <= '0;
    if (a_q != 4'b0 && chance(det_pm)) begin
      idx = (a_q[1] ? 2'd1 : 2'd0) | (a_q[2] ? 2'd2 : 2'd0) | (a_q[3] ? 2'd3 : 2'd0);
      bb  = 1'($urandom);
      if (bb == idx[1]) begin
        v = idx[0];
        if (chance(qber_pm)) begin v = !v; n_flip++; end
      end else begin
        v = 1'($urandom);
      end
      m = 4'(1 << {bb, v});
      if (chance(multi_pm)) begin m = m | 4'(1 << {!bb, 1'($urandom)}); n_multi++; end
      d = QD;
      if (chance(jit_pm)) begin d = QD + 1; n_jit++; end
      sched[(t + d) % 64]     <= sched[(t + d) % 64] | m;
      sched[(t + d + 1) % 64] <= sched[(t + d + 1) % 64] | m;
      n_det++;
    end else if (chance(dark_pm)) begin
      sched[(t + QD) % 64] <= sched[(t + QD) % 64] | 4'(1 << ($urandom % 4));
    end
    t <= t + 1;
    // the boards' outputs are not yet reset during the first clocks: send idle words then
    c_ab[0] <= (t < 16) ? '0 : a_c_tx;   c_ba[0] <= (t < 16) ? '0 : b_c_tx;
    e_ab[0] <= (t < 16) ? '0 : a_ec_tx;  e_ba[0] <= (t < 16) ? '0 : b_ec_tx;
    for (int k = 1; k < CD; k++)  begin c_ab[k] <= c_ab[k-1]; c_ba[k] <= c_ba[k-1]; end
    for (int k = 1; k < ECD; k++) begin e_ab[k] <= e_ab[k-1]; e_ba[k] <= e_ba[k-1]; end
  end
endmodule
