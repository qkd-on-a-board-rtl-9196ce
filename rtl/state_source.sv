// state_source: the Test Data Memory and the Mux in front of Alice's RN FIFO.
//
// The host loads a pattern of up to TEST_DEPTH states into the test memory (write port
// tm_we/tm_addr/tm_data) and sets tm_len (number of entries used, 0 means TEST_DEPTH).
// With use_test low, states come from the random number generator; with use_test high,
// the pattern is replayed from entry 0 in a loop. The source delivers one state per cycle
// while `req` is high, with valid one cycle later (matching rng_state). The memory depth
// is this design's choice.
module state_source
  import qkd_pkg::*;
#(
  parameter int TEST_DEPTH = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        use_test,
  input  logic        tm_we,
  input  logic [$clog2(TEST_DEPTH)-1:0] tm_addr,
  input  qstate_t     tm_data,
  input  logic [$clog2(TEST_DEPTH)-1:0] tm_len,
  input  logic        rng_load,
  input  logic [31:0] seed_value,
  input  logic [31:0] seed_basis,
  input  logic        req,
  output qstate_t     state,
  output logic        valid
);
  localparam int AW = $clog2(TEST_DEPTH);

  qstate_t tmem [TEST_DEPTH];
  logic [AW-1:0] rd_addr;
  qstate_t test_q;
  qstate_t rng_q;
  logic    rng_v;
  logic    test_v;
  logic    sel_q;

  rng_state u_rng (
    .clk, .rst_n, .load(rng_load), .seed_value, .seed_basis,
    .en(req && !use_test), .state(rng_q), .valid(rng_v)
  );

  always_ff @(posedge clk) begin
    if (tm_we) tmem[tm_addr] <= tm_data;
    test_q <= tmem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      test_v  <= 1'b0;
      sel_q   <= 1'b0;
    end else begin
      sel_q  <= use_test;
      test_v <= req && use_test;
      if (!use_test) begin
        rd_addr <= '0;
      end else if (req) begin
        rd_addr <= (rd_addr == tm_len - 1'b1) ? '0 : rd_addr + 1'b1;
      end
    end
  end

  assign state = sel_q ? test_q : rng_q;
  assign valid = sel_q ? test_v : rng_v;
endmodule
