// tb_classical_receive: a random stream of idle words and CRC-protected SYNC, ACK, ACK_END
// and DET messages, some with a flipped bit. Sync and acknowledge outputs must follow valid
// words in the same clock with the decoded fields; corrupted words must be dropped and
// counted; idle and DET words must produce nothing.
`timescale 1ns/1ps
module tb_classical_receive;
  import qkd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  cword_t rx_word;
  logic sync, ack_push;
  pkt_t sync_pkt;
  ack_t ack_data;
  logic [31:0] rx_errors, ack_count;
  int checks = 0, failures = 0;

  classical_receive dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err = 0, n_ack = 0;
    rx_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      cmsg_t m;
      logic bad, idle;
      m = '0;
      case ($urandom_range(0, 3))
        0: m.mtype = MSG_SYNC;
        1: m.mtype = MSG_ACK;
        2: m.mtype = MSG_ACK_END;
        3: m.mtype = MSG_DET;
      endcase
      m.pkt = pkt_t'($urandom); m.slot = slot_t'($urandom); m.basis = 1'($urandom);
      idle = ($urandom_range(0, 4) == 0);
      bad  = !idle && ($urandom_range(0, 9) == 0);
      rx_word = idle ? '0 : cmsg_encode(m);
      if (bad) rx_word[$urandom_range(0, 31)] ^= 1'b1;
      if (bad) n_err++;
      if (!idle && !bad && m.mtype == MSG_ACK) n_ack++;
      #0.5;
      checks++;
      if (idle || bad) begin
        if (sync || ack_push) begin failures++; $display("FAIL output for idle/bad word"); end
      end else begin
        if (sync != (m.mtype == MSG_SYNC) || (sync && sync_pkt != m.pkt)) begin
          failures++; $display("FAIL sync for %p", m);
        end
        if (ack_push != (m.mtype inside {MSG_ACK, MSG_ACK_END}) ||
            (ack_push && (ack_data.pkt != m.pkt || ack_data.last != (m.mtype == MSG_ACK_END) ||
                          (m.mtype == MSG_ACK && ack_data.slot != m.slot)))) begin
          failures++; $display("FAIL ack for %p", m);
        end
      end
      @(negedge clk);
    end
    rx_word = '0;
    @(negedge clk);
    checks += 2;
    if (rx_errors != 32'(n_err)) begin failures++; $display("FAIL rx_errors %0d exp %0d", rx_errors, n_err); end
    if (ack_count != 32'(n_ack)) begin failures++; $display("FAIL ack_count %0d exp %0d", ack_count, n_ack); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
