// tb_det_histogram: random edges during capture windows; the counters of the selected
// detector must equal a model histogram over (bin mod 16); edges of other detectors and
// edges outside capture are not counted; clear empties the histogram.
`timescale 1ns/1ps
module tb_det_histogram;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear, cap_active;
  logic [1:0] det_sel;
  logic [3:0] edges, rd_addr;
  logic [13:0] cap_bin;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;

  det_histogram dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model [16];
    clear = 0; cap_active = 0; det_sel = 2'd1; edges = 0; cap_bin = 0; rd_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 16; k++) model[k] = 0;
      @(negedge clk);
      for (int k = 0; k < 5000; k++) begin
        cap_active = (k % 1000) < 800;
        cap_bin = 14'(k);
        edges = 4'($urandom) & (((k % 8) < 2) ? 4'hF : 4'h0);
        if (cap_active && edges[det_sel]) model[k % 16]++;
        @(negedge clk);
      end
      cap_active = 0; edges = 0;
      for (int k = 0; k < 16; k++) begin
        rd_addr = 4'(k);
        #0.1;
        checks++;
        if (rd_data != 32'(model[k])) begin
          failures++;
          $display("FAIL bin %0d got %0d exp %0d", k, rd_data, model[k]);
        end
      end
      @(negedge clk);
      clear = 1; @(negedge clk); clear = 0;
      for (int k = 0; k < 16; k++) begin
        rd_addr = 4'(k);
        #0.1;
        checks++;
        if (rd_data != 0) failures++;
      end
      det_sel = 2'd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
