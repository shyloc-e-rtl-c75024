// tb_option_coder: random candidate lengths around the no-compression length;
// the selected option must be zero-block for an all-zero block and otherwise the
// shortest total (identifier included: 4 bits, 5 for the second extension, 16*32+4
// for no compression), with L_k, then second extension, then no compression on ties.
`timescale 1ns/1ps
module tb_option_coder;
  import shyloc_pkg::*;
  localparam int D = 16, J = 32;
  logic all_zero;
  logic [D+7:0] lk_len;
  logic [4:0] lk_k, k;
  logic [2*D+7:0] se_len;
  option_e option;
  int checks = 0, failures = 0;

  option_coder #(.D(D), .J(J)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint unsigned a, b, best;
      option_e e; int ek;
      all_zero = ($urandom % 10) == 0;
      a = 300 + $urandom % 400; b = (n % 7 == 0) ? a + 1 : 300 + $urandom % 400;
      if (n % 11 == 0) b = a - 1;
      lk_len = (D+8)'(a); se_len = (2*D+8)'(b); lk_k = 5'($urandom % 14);
      #1;
      e = OPT_K; ek = lk_k; best = a + 4;
      if (b + 5 < best) begin e = OPT_SE; ek = 0; best = b + 5; end
      if (J*D + 4 < best) begin e = OPT_NC; ek = 0; end
      if (all_zero) begin e = OPT_ZB; ek = 0; end
      checks++;
      if (option != e || k != 5'(ek)) begin
        failures++;
        if (failures < 6) $display("lk %0d se %0d z %0d: %0d/%0d expected %0d/%0d", a, b, all_zero, option, k, e, ek);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
