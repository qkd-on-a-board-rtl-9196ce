// tb_match_memory: writes random entries for several packets (more than MAX_OUT, so rows
// are reused) and reads them back with the one-cycle latency, against an associative model.
`timescale 1ns/1ps
module tb_match_memory;
  import qkd_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic we, re;
  pkt_t wr_pkt, rd_pkt;
  slot_t wr_slot, rd_slot;
  logic [2:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  match_memory #(.MAX_OUT(4)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] model [int];
    we = 0; re = 0; wr_pkt = 0; rd_pkt = 0; wr_slot = 0; rd_slot = 0; wr_data = 0;
    for (int p = 0; p < 10; p++) begin
      // write packet p completely
      for (int s = 0; s < PKT_PAIRS; s++) begin
        @(negedge clk);
        we = 1; wr_pkt = pkt_t'(p); wr_slot = slot_t'(s); wr_data = 3'($urandom);
        model[p * PKT_PAIRS + s] = wr_data;
      end
      @(negedge clk); we = 0;
      // read back random slots of the last min(4, p+1) packets
      for (int k = 0; k < 200; k++) begin
        int rp, rs;
        rp = p - int'($urandom % ((p < 3) ? p + 1 : 4));
        rs = int'($urandom % PKT_PAIRS);
        re = 1; rd_pkt = pkt_t'(rp); rd_slot = slot_t'(rs);
        @(negedge clk);
        re = 0;
        checks++;
        if (rd_data !== model[rp * PKT_PAIRS + rs]) begin
          failures++;
          if (failures < 5) $display("FAIL p=%0d s=%0d got %b exp %b", rp, rs, rd_data, model[rp * PKT_PAIRS + rs]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
