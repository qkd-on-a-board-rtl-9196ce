// qkd_system_top: the two boards of the QKD link, Alice's transmitter FPGA and Bob's
// receiver FPGA, side by side.
//
// Everything between the boards is optical and analog (lasers, free-space quantum path,
// detectors, fibre classical links, serializers), so the top brings those signals out:
// Alice's four one-hot quantum lines and Bob's four detector lines, one time bin per clock,
// and the two classical channels of each board, the sifting channel (32-bit words) and
// the post-processing (EC) channel (40-bit words), one word per clock. Both boards run on
// one clock here; on hardware each board's serializers recover the peer's clock. Each
// board has its own host register bus and key FIFO read port. Parameters of the two
// boards are shared so that their EC threads match.
module qkd_system_top
  import qkd_pkg::*;
#(
  parameter int MAX_OUT      = 8,
  parameter int NTHREADS     = 4,
  parameter int LOGN         = 12,
  parameter int K1           = 3,
  parameter int ABORT_GROUPS = 194,
  parameter int P2_THR       = 0,
  parameter int MAX_P2       = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // Alice host side
  input  logic [7:0]  a_host_addr,
  input  logic        a_host_we,
  input  logic [31:0] a_host_wdata,
  output logic [31:0] a_host_rdata,
  input  logic        a_key_pop,
  output logic [31:0] a_key_word,
  output logic        a_key_empty,
  // Alice photonics
  output logic [3:0]  a_q_out,
  output cword_t      a_c_tx,
  input  cword_t      a_c_rx,
  output eword_t      a_ec_tx,
  input  eword_t      a_ec_rx,
  // Bob host side
  input  logic [7:0]  b_host_addr,
  input  logic        b_host_we,
  input  logic [31:0] b_host_wdata,
  output logic [31:0] b_host_rdata,
  input  logic        b_key_pop,
  output logic [31:0] b_key_word,
  output logic        b_key_empty,
  // Bob photonics
  input  logic [3:0]  b_det_in,
  output cword_t      b_c_tx,
  input  cword_t      b_c_rx,
  output eword_t      b_ec_tx,
  input  eword_t      b_ec_rx
);
  alice_fpga #(
    .MAX_OUT(MAX_OUT), .NTHREADS(NTHREADS), .LOGN(LOGN), .K1(K1),
    .ABORT_GROUPS(ABORT_GROUPS), .P2_THR(P2_THR), .MAX_P2(MAX_P2)
  ) u_alice (
    .clk, .rst_n,
    .host_addr(a_host_addr), .host_we(a_host_we), .host_wdata(a_host_wdata),
    .host_rdata(a_host_rdata), .key_pop(a_key_pop), .key_word(a_key_word),
    .key_empty(a_key_empty), .q_out(a_q_out), .c_tx(a_c_tx), .c_rx(a_c_rx),
    .ec_tx(a_ec_tx), .ec_rx(a_ec_rx)
  );

  bob_fpga #(
    .NTHREADS(NTHREADS), .LOGN(LOGN), .K1(K1),
    .ABORT_GROUPS(ABORT_GROUPS), .P2_THR(P2_THR), .MAX_P2(MAX_P2)
  ) u_bob (
    .clk, .rst_n,
    .host_addr(b_host_addr), .host_we(b_host_we), .host_wdata(b_host_wdata),
    .host_rdata(b_host_rdata), .key_pop(b_key_pop), .key_word(b_key_word),
    .key_empty(b_key_empty), .det_in(b_det_in), .c_tx(b_c_tx), .c_rx(b_c_rx),
    .ec_tx(b_ec_tx), .ec_rx(b_ec_rx)
  );
endmodule
