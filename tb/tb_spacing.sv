// tb_spacing: for each spacing (1, 2, 4, 8 bins) runs packets and checks that a quantum
// pulse (the popped state, one-hot) appears exactly in every 2**spacing_log2-th bin, that
// the Sync comes with the first pulse of each packet, that a packet lasts
// 2048 * 2**spacing_log2 bins, that the match memory is written with (packet, slot, state),
// and that with MAX_OUT = 2 outstanding packets spacing stalls until a packet is released.
`timescale 1ns/1ps
module tb_spacing;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic run, rn_empty, rn_pop, sync_req, mm_we, pkt_release, sending;
  logic [1:0] spacing_log2;
  qstate_t rn_state;
  logic [3:0] q_out;
  pkt_t sync_pkt, mm_pkt;
  slot_t mm_slot;
  logic [2:0] mm_data;
  logic [31:0] stall_cycles, underflows, packets_sent;
  int checks = 0, failures = 0;

  spacing #(.MAX_OUT(2)) dut (.*);

  // RN FIFO model: always has a state; next state after every pop
  always @(posedge clk) if (rn_pop) rn_state <= qstate_t'(2'($urandom));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bin_in_pkt, slot_exp, pkts_seen;
  pkt_t pkt_exp;
  bit in_pkt;

  initial begin
    run = 0; rn_empty = 0; rn_state = '0; pkt_release = 0; spacing_log2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pkt_exp = 0;
    for (int sp = 0; sp < 4; sp++) begin
      spacing_log2 = 2'(sp);
      run = 1;
      @(negedge clk);
      // two packets are sent back to back, then spacing must stall
      for (int p = 0; p < 2; p++) begin
        for (int b = 0; b < (PKT_PAIRS << sp); b++) begin
          #0.1;
          if ((b % (1 << sp)) == 0) begin
            check(q_out == 4'(1 << {rn_state.basis, rn_state.value}), "pulse in transmission bin");
            check(mm_we && mm_pkt == pkt_exp && mm_slot == slot_t'(b >> sp) &&
                  mm_data == {1'b1, rn_state.basis, rn_state.value}, "match memory write");
            check(rn_pop, "state popped");
            check(sync_req == (b == 0) && (b != 0 || sync_pkt == pkt_exp), "sync with first pulse");
          end else begin
            check(q_out == 4'b0 && !mm_we && !rn_pop && !sync_req, "dark bin");
          end
          @(negedge clk);
        end
        pkt_exp++;
      end
      // stalled: two packets outstanding
      repeat (20) begin
        #0.1;
        check(q_out == 4'b0 && !sending, "stalled while two packets outstanding");
        @(negedge clk);
      end
      check(stall_cycles > 0, "stall counted");
      run = 0;
      pkt_release = 1; @(negedge clk);
      pkt_release = 1; @(negedge clk);
      pkt_release = 0;
      @(negedge clk);
    end
    check(packets_sent == 8, "packet count");
    check(underflows == 0, "no underflow");
    // underflow: empty RN FIFO at a transmission bin sends a dark slot stored invalid
    run = 1; spacing_log2 = 0;
    @(negedge clk);
    #0.1 check(sync_req, "new packet started");
    @(negedge clk);
    rn_empty = 1;
    #0.1 check(q_out == 4'b0 && mm_we && mm_data[2] == 1'b0, "dark slot stored invalid");
    @(negedge clk);
    rn_empty = 0;
    check(underflows == 1, "underflow counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
