// tb_compute_lk: random blocks (with and without a reference sample, with small,
// large and all-zero residuals) are fed one per cycle; the winner length, its k
// and the all-zero flag are compared with lengths computed directly.
`timescale 1ns/1ps
module tb_compute_lk;
  import shyloc_pkg::*;
  localparam int D = 16, J = 32, KM = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid, in_ref, all_zero;
  logic [D-1:0] in_delta;
  logic [D+7:0] best_len;
  logic [4:0] best_k;
  int checks = 0, failures = 0;

  compute_lk #(.D(D), .J(J)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; in_valid = 0; in_ref = 0; in_delta = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      longint unsigned d[J], l, lb;
      int kb, scale;
      bit hr, az;
      hr = b % 3 == 0;
      scale = (b % 5 == 0) ? 0 : (1 << ($urandom % 16));
      for (int i = 0; i < J; i++) d[i] = (scale == 0) ? 0 : $urandom % scale;
      if (hr) d[0] = $urandom % 65536;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int i = 0; i < J; i++) begin
        in_valid = 1; in_delta = D'(d[i]); in_ref = hr && i == 0;
        @(negedge clk);
      end
      in_valid = 0;
      lb = 0; kb = 0; az = 1;
      for (int k = 0; k <= KM; k++) begin
        l = hr ? D : 0;
        for (int i = hr ? 1 : 0; i < J; i++) l += (d[i] >> k) + 1 + k;
        if (k == 0 || l < lb) begin lb = l; kb = k; end
      end
      for (int i = hr ? 1 : 0; i < J; i++) if (d[i] != 0) az = 0;
      checks++;
      if (best_len != (D+8)'(lb) || best_k != 5'(kb) || all_zero != az) begin
        failures++;
        $display("block %0d: len %0d k %0d z %0d, expected %0d %0d %0d", b, best_len, best_k, all_zero, lb, kb, az);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
