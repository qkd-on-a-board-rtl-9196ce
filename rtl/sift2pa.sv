// sift2pa: the Sift2PA module, between sifting and the EC&PA threads.
//
// Sifted bits enter a BUF_DEPTH-bit FIFO (one per clock; an overflow is counted and the
// bit lost). They leave it in blocks of 2**LOGN bits: block k goes to EC thread
// k mod NTHREADS, tagged with its index k, as soon as that thread can take a block. Both
// boards assign blocks the same way, so thread t on each board holds the same block.
// Results are collected in the same block order: the privacy-amplified bits of each block
// (none if the block was dropped) are packed, first bit in bit 0, into 32-bit key words
// and pushed into the Key FIFO, stalling while it is full. Packing order and buffer size
// are this design's choice.
module sift2pa #(
  parameter int NTHREADS  = 4,
  parameter int LOGN      = 12,
  parameter int BUF_DEPTH = 2 << LOGN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sift_valid,
  input  logic                sift_bit,
  // to EC&PA
  input  logic [NTHREADS-1:0] ld_ready,
  output logic [NTHREADS-1:0] ld_valid,
  output logic                ld_bit,
  output logic [15:0]         ld_blk,
  input  logic [NTHREADS-1:0] out_valid,
  input  logic [NTHREADS-1:0] out_bit,
  input  logic [NTHREADS-1:0] out_last,
  input  logic [NTHREADS-1:0] out_empty,
  output logic [NTHREADS-1:0] out_ready,
  // Key FIFO
  output logic                key_push,
  output logic [31:0]         key_word,
  input  logic                key_full,
  // statistics
  output logic [31:0]         overflows,
  output logic [31:0]         key_bits
);
  localparam int TW = (NTHREADS > 1) ? $clog2(NTHREADS) : 1;
  localparam int N  = 1 << LOGN;

  logic f_empty, f_full, f_dout;
  logic [$clog2(BUF_DEPTH):0] f_count;
  logic [TW-1:0] lt, ct;
  logic [LOGN:0] lcnt;
  logic [31:0]   word;
  logic [4:0]    wbits;

  wire load = !f_empty && ld_ready[lt];

  sync_fifo #(.WIDTH(1), .DEPTH(BUF_DEPTH)) u_bits (
    .clk, .rst_n, .push(sift_valid && !f_full), .din(sift_bit), .pop(load),
    .dout(f_dout), .full(f_full), .empty(f_empty), .count(f_count)
  );

  always_comb begin
    ld_valid     = '0;
    ld_valid[lt] = load;
    out_ready     = '0;
    out_ready[ct] = !key_full;
  end
  assign ld_bit = f_dout;

  wire take  = out_valid[ct] && !key_full;
  wire tbit  = take && !out_empty[ct];
  wire tnext = take && (out_empty[ct] || out_last[ct]);

  assign key_push = tbit && (wbits == 5'd31);
  assign key_word = {out_bit[ct], word[31:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lt <= '0; ct <= '0; lcnt <= '0; ld_blk <= '0; word <= '0; wbits <= '0;
      overflows <= '0; key_bits <= '0;
    end else begin
      if (sift_valid && f_full) overflows <= overflows + 1;
      if (load) begin
        if (lcnt == (LOGN+1)'(N - 1)) begin
          lcnt   <= '0;
          ld_blk <= ld_blk + 1'b1;
          lt     <= (lt == TW'(NTHREADS - 1)) ? '0 : lt + 1'b1;
        end else begin
          lcnt <= lcnt + 1'b1;
        end
      end
      if (tbit) begin
        word     <= {out_bit[ct], word[31:1]};
        wbits    <= wbits + 1'b1;
        key_bits <= key_bits + 1;
      end
      if (tnext) ct <= (ct == TW'(NTHREADS - 1)) ? '0 : ct + 1'b1;
    end
  end
endmodule
