// tb_delay_fifo: a random stream advanced on random cycles must come out delayed
// by exactly `len` advances, for several run-time lengths up to the maximum.
`timescale 1ns/1ps
module tb_delay_fifo;
  localparam int W = 16, ML = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, adv;
  logic [5:0] len;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  delay_fifo #(.W(W), .MAXLEN(ML)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int l);
    logic [W-1:0] h[$];
    @(negedge clk) begin clear = 1; len = 6'(l); end
    @(negedge clk) clear = 0;
    for (int n = 0; n < 400; n++) begin
      adv = $urandom % 3 != 0; din = W'($urandom);
      #1;
      if (adv) begin
        if (h.size() >= l) begin
          checks++;
          if (dout != h[h.size() - l]) begin failures++; if (failures < 5) $display("len %0d step %0d", l, n); end
        end
        h.push_back(din);
      end
      @(negedge clk);
    end
    adv = 0;
  endtask

  initial begin
    clear = 0; adv = 0; len = 0; din = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1); run(5); run(32); run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
