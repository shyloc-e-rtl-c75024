// tb_sync_fifo: random pushes and pops (never over- or underflowing) against a
// queue model: head data, count, full and empty are checked every cycle.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] q[$];
    clear = 0; push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 300) % 2;
      checks++;
      if (count != 4'(q.size()) || full != (q.size() == DEPTH) || empty != (q.size() == 0)
          || (q.size() > 0 && rd_data != q[0])) begin
        failures++; if (failures < 5) $display("step %0d: count %0d expected %0d", n, count, q.size());
      end
      pop  = q.size() > 0 && ($urandom % 4 < (bias ? 3 : 1));
      push = (q.size() < DEPTH || pop) && ($urandom % 4 < (bias ? 1 : 3));
      wr_data = W'($urandom);
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
