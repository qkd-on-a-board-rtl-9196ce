// ctrl_status: the Control & Status register block of a board, reached by the host
// through the user interface (PCI or USB on the board; here a plain word-addressed
// register bus: host_addr, host_we, host_wdata, combinational host_rdata).
//
// Word address map (this design's choice):
//   0x00 CTRL       [0] run  [1] gated  [3:2] spacing_log2  [4] use_test
//                   [5] rng_load (pulse)  [6] hist_clear (pulse)  [9:8] hist_det
//   0x01 SEED_VALUE 0x02 SEED_BASIS   RNG seeds (Alice)
//   0x03 CHAN_DELAY quantum-minus-classical path delay in time bins (Bob)
//   0x04 ALIGN      four 4-bit detector alignment delays, detector i in [4i+3:4i] (Bob)
//   0x05 EC_SEED    0x06 PA_SEED  shared seeds of the Cascade permutation and PA hash
//   0x07 PA_MARGIN  security margin in bits subtracted in PA
//   0x08 TEST_LEN   test-pattern length
//   0x09 TEST_WRITE write: [31:16] address, [1:0] {basis,value}; pulses tm_we
//   0x20-0x3F       status word (address - 0x20), read only
//   0x40-0x4F       histogram counter (address - 0x40), read only
// Pulse bits read back as zero.
module ctrl_status #(
  parameter int NSTATUS   = 32,
  parameter int HIST_BINS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  host_addr,
  input  logic        host_we,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        run,
  output logic        gated,
  output logic [1:0]  spacing_log2,
  output logic        use_test,
  output logic        rng_load,
  output logic        hist_clear,
  output logic [1:0]  hist_det,
  output logic [31:0] seed_value,
  output logic [31:0] seed_basis,
  output logic [31:0] chan_delay,
  output logic [3:0][3:0] align_delay,
  output logic [31:0] ec_seed,
  output logic [31:0] pa_seed,
  output logic [15:0] pa_margin,
  output logic [15:0] test_len,
  output logic        tm_we,
  output logic [15:0] tm_addr,
  output logic [1:0]  tm_data,
  input  logic [31:0] status [NSTATUS],
  output logic [$clog2(HIST_BINS)-1:0] hist_addr,
  input  logic [31:0] hist_data
);
  logic [31:0] ctrl;

  assign run          = ctrl[0];
  assign gated        = ctrl[1];
  assign spacing_log2 = ctrl[3:2];
  assign use_test     = ctrl[4];
  assign hist_det     = ctrl[9:8];
  assign hist_addr    = host_addr[$clog2(HIST_BINS)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl        <= '0;
      rng_load    <= 1'b0;
      hist_clear  <= 1'b0;
      seed_value  <= 32'h1234_5678;
      seed_basis  <= 32'h9ABC_DEF1;
      chan_delay  <= '0;
      align_delay <= '0;
      ec_seed     <= 32'h0BAD_5EED;
      pa_seed     <= 32'h5EED_0BAD;
      pa_margin   <= 16'd64;
      test_len    <= '0;
      tm_we       <= 1'b0;
      tm_addr     <= '0;
      tm_data     <= '0;
    end else begin
      rng_load   <= host_we && host_addr == 8'h00 && host_wdata[5];
      hist_clear <= host_we && host_addr == 8'h00 && host_wdata[6];
      tm_we      <= host_we && host_addr == 8'h09;
      if (host_we) begin
        unique case (host_addr)
          8'h00: ctrl        <= host_wdata & ~32'h60;
          8'h01: seed_value  <= host_wdata;
          8'h02: seed_basis  <= host_wdata;
          8'h03: chan_delay  <= host_wdata;
          8'h04: align_delay <= host_wdata[15:0];
          8'h05: ec_seed     <= host_wdata;
          8'h06: pa_seed     <= host_wdata;
          8'h07: pa_margin   <= host_wdata[15:0];
          8'h08: test_len    <= host_wdata[15:0];
          8'h09: begin
            tm_addr <= host_wdata[31:16];
            tm_data <= host_wdata[1:0];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    unique casez (host_addr)
      8'h00: host_rdata = ctrl;
      8'h01: host_rdata = seed_value;
      8'h02: host_rdata = seed_basis;
      8'h03: host_rdata = chan_delay;
      8'h04: host_rdata = {16'h0, align_delay};
      8'h05: host_rdata = ec_seed;
      8'h06: host_rdata = pa_seed;
      8'h07: host_rdata = {16'h0, pa_margin};
      8'h08: host_rdata = {16'h0, test_len};
      8'b001?_????: if (int'(host_addr[4:0]) < NSTATUS) host_rdata = status[host_addr[4:0]];
      8'b0100_????: host_rdata = hist_data;
      default: host_rdata = '0;
    endcase
  end
endmodule
