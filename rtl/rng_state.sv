// rng_state: Alice's random number generator. Produces the two pseudo-random bit streams
// of the protocol, one for the bit value and one for the basis, as one qstate_t per enabled
// clock (one candidate transmission per clock).
//
// Two independent 32-bit Galois LFSRs (taps 0x80200003, maximal length) are used, one per
// stream, each seeded from the host with a nonzero value (a zero seed is replaced by a
// fixed constant). `load` reloads the seeds. Output is registered: state is valid the
// cycle after `en`. The document asks only for two pseudo-random streams; the generator
// type, length and seeding are this design's choice.
module rng_state
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed_value,
  input  logic [31:0] seed_basis,
  input  logic        en,
  output qstate_t     state,
  output logic        valid
);
  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] lfsr_v, lfsr_b;

  function automatic logic [31:0] step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ TAPS) : (s >> 1);
  endfunction

  function automatic logic [31:0] fix(input logic [31:0] s, input logic [31:0] alt);
    return (s == '0) ? alt : s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_v <= 32'h1234_5678;
      lfsr_b <= 32'h9ABC_DEF1;
      state  <= '0;
      valid  <= 1'b0;
    end else if (load) begin
      lfsr_v <= fix(seed_value, 32'h1234_5678);
      lfsr_b <= fix(seed_basis, 32'h9ABC_DEF1);
      valid  <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        state  <= '{basis: lfsr_b[0], value: lfsr_v[0]};
        lfsr_v <= step(lfsr_v);
        lfsr_b <= step(lfsr_b);
      end
    end
  end
endmodule
