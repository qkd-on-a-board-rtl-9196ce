// toeplitz_pa: privacy amplification of one corrected block by a Toeplitz-matrix hash.
//
// The output key is y = T x over GF(2), x being the kept bits of the block and T an
// M x kept Toeplitz matrix whose diagonals come from a 32-bit LFSR seeded with
// seed ^ block index (identical on both boards, public). It is computed as the bits
// stream in: a window w of MMAX LFSR bits is pre-filled when the block starts
// (MMAX clocks, overlapping the error correction); for every input bit, y ^= w when the
// bit is one, then w shifts by one fresh LFSR bit. Row r of T is therefore the window
// bits seen at offset r, and T[r][j] depends on r - j only.
//
// When the error-correction thread finishes (fin_valid), the output length is
//   M = kept - leak - 32 - margin
// (leak: bits disclosed by Cascade, 32: the signature, margin: host-set security margin).
// If the block was dropped, the signatures differed or M <= 0, a single out_empty word is
// given instead. Otherwise y[0..M-1] leaves one bit per clock with a valid/ready handshake,
// out_last on the final bit. The reduction by the disclosed bits follows the protocol; the
// Toeplitz construction, the LFSR and the margin term are this design's choices.
module toeplitz_pa #(
  parameter int MMAX = 4096,
  parameter int KW   = 13,
  parameter int LW   = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   seed,
  input  logic [15:0]   blk,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          fin_valid,
  input  logic          fin_ok,
  input  logic [KW-1:0] fin_kept,
  input  logic [LW-1:0] fin_leak,
  input  logic [15:0]   margin,
  output logic          idle,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          out_empty,
  input  logic          out_ready
);
  localparam int RW = $clog2(MMAX) + 1;

  typedef enum logic [2:0] {P_IDLE, P_FILL, P_ACC, P_EMIT, P_EMPTY} pstate_t;
  pstate_t st;

  logic [MMAX-1:0] w, acc;
  logic [31:0]     lfsr;
  logic [RW-1:0]   cnt, m_len;

  wire [31:0] lfsr_n = lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);

  logic signed [LW+2:0] m_calc;
  always_comb begin
    m_calc = $signed({3'b0, LW'(fin_kept)}) - $signed({3'b0, fin_leak}) - (LW+3)'(32)
             - $signed((LW+3)'(margin));
  end

  assign idle      = (st == P_IDLE);
  assign out_valid = (st == P_EMIT) || (st == P_EMPTY);
  assign out_empty = (st == P_EMPTY);
  assign out_bit   = (st == P_EMIT) && acc[cnt[RW-2:0]];
  assign out_last  = (st == P_EMIT) && (cnt == m_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; w <= '0; acc <= '0; lfsr <= 32'h1; cnt <= '0; m_len <= '0;
    end else begin
      unique case (st)
        P_IDLE: if (start) begin
          lfsr <= (seed ^ {blk, 16'hC3A5}) | 32'h1;
          acc  <= '0;
          cnt  <= '0;
          st   <= P_FILL;
        end
        P_FILL: begin
          w    <= {w[MMAX-2:0], lfsr[0]};
          lfsr <= lfsr_n;
          cnt  <= cnt + 1'b1;
          if (cnt == RW'(MMAX - 1)) st <= P_ACC;
        end
        P_ACC: begin
          if (in_valid) begin
            if (in_bit) acc <= acc ^ w;
            w    <= {w[MMAX-2:0], lfsr[0]};
            lfsr <= lfsr_n;
          end
          if (fin_valid) begin
            cnt <= '0;
            if (fin_ok && m_calc > 0) begin
              m_len <= (m_calc > (LW+3)'(MMAX)) ? RW'(MMAX) : RW'(m_calc);
              st    <= P_EMIT;
            end else begin
              st <= P_EMPTY;
            end
          end
        end
        P_EMIT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (out_last) st <= P_IDLE;
        end
        P_EMPTY: if (out_ready) st <= P_IDLE;
        default: st <= P_IDLE;
      endcase
    end
  end

  a_no_input_while_filling: assert property (@(posedge clk) disable iff (!rst_n)
                                             !(in_valid && st != P_ACC));
endmodule
