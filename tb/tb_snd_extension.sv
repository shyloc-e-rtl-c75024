// tb_snd_extension: random blocks of small residuals, with and without a
// reference sample; each gamma value, its pair index and the block length are
// compared with the pairing formula gamma = (a+b)(a+b+1)/2 + b.
`timescale 1ns/1ps
module tb_snd_extension;
  localparam int D = 16, J = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid, in_ref, gamma_valid;
  logic [D-1:0] in_delta;
  logic [2*D+2:0] gamma;
  logic [3:0] gamma_idx;
  logic [2*D+7:0] se_len;
  int checks = 0, failures = 0;
  longint unsigned g_exp[J/2];
  int ng;

  snd_extension #(.D(D), .J(J)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && gamma_valid) begin
    checks++; ng++;
    if (gamma != (2*D+3)'(g_exp[gamma_idx])) begin
      failures++; $display("gamma %0d: %0d expected %0d at %0t", gamma_idx, gamma, g_exp[gamma_idx], $time);
    end
  end

  initial begin
    clear = 0; in_valid = 0; in_ref = 0; in_delta = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      longint unsigned d[J], l, a;
      bit hr;
      int m;
      hr = b % 2 == 0;
      m = 1 << ($urandom % 12);
      for (int i = 0; i < J; i++) d[i] = $urandom % m;
      if (b == 7) begin d[0] = 65535; d[1] = 65535; end
      l = hr ? D : 0;
      for (int i = 0; i < J; i += 2) begin
        a = (hr && i == 0) ? 0 : d[i];
        g_exp[i/2] = (a + d[i+1]) * (a + d[i+1] + 1) / 2 + d[i+1];
        l += g_exp[i/2] + 1;
      end
      ng = 0;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int i = 0; i < J; i++) begin
        in_valid = 1; in_delta = D'(d[i]); in_ref = hr && i == 0;
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (se_len != (2*D+8)'(l) || ng != J/2) begin
        failures++; $display("block %0d: len %0d expected %0d, %0d gammas", b, se_len, l, ng);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
