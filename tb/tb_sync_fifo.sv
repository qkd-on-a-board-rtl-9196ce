// tb_sync_fifo: random pushes and pops against a queue model; checks data order, full,
// empty and count, including push and pop in the same cycle and attempts on full/empty.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic push, pop, full, empty;
  logic [7:0] din, dout;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  sync_fifo #(.WIDTH(8), .DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 8) || count != q.size() ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d size=%0d count=%0d dout=%h exp=%h", k, q.size(), count, dout, q.size() ? q[0] : 8'h0);
      end
      din  = 8'($urandom);
      push = ($urandom % 4) < ((k / 500) % 2 ? 1 : 3) && !full;
      pop  = ($urandom % 4) < ((k / 500) % 2 ? 3 : 1) && !empty;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
