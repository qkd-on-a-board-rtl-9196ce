// det_histogram: detection-time histogram with one-time-bin (400 ps) resolution.
//
// While a packet is being captured, every rising edge on the selected detector (det_sel)
// increments the counter of histogram bin (capture bin index mod HIST_BINS). With the
// transmission every 8th bin, HIST_BINS = 16 shows two transmission periods and the jitter
// tail between them. The host reads counter rd_addr on rd_data (combinational) and clears
// all counters with clear. Counters saturate. HIST_BINS and the counter width are this
// design's choice.
module det_histogram #(
  parameter int HIST_BINS = 16,
  parameter int CNT_W     = 32,
  parameter int BIN_W     = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [1:0]  det_sel,
  input  logic [3:0]  edges,
  input  logic        cap_active,
  input  logic [BIN_W-1:0] cap_bin,
  input  logic [$clog2(HIST_BINS)-1:0] rd_addr,
  output logic [CNT_W-1:0] rd_data
);
  localparam int HW = $clog2(HIST_BINS);

  logic [CNT_W-1:0] cnt [HIST_BINS];
  wire  [HW-1:0]    idx = cap_bin[HW-1:0];
  wire              hit = cap_active && edges[det_sel];

  assign rd_data = cnt[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST_BINS; i++) cnt[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < HIST_BINS; i++) cnt[i] <= '0;
    end else if (hit && cnt[idx] != '1) begin
      cnt[idx] <= cnt[idx] + 1'b1;
    end
  end
endmodule
