// tb_ud_predictor: checks the unit-delay preprocessor against the reference
// mapping: random walks and jumps to the range ends, unsigned and signed samples,
// reference samples at the first sample of every r-th block, and the bypass
// when the preprocessor is disabled. Output follows the input in the same cycle.
`timescale 1ns/1ps
module tb_ud_predictor;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;
  localparam int D = 16, J = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  c121_cfg_t cfg;
  logic clear, in_valid, in_ready, out_valid, out_ready, out_ref;
  logic [D-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  ud_predictor #(.D(D), .J(J)) dut (.*);

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(bit pre, bit sgn, int r, int n);
    u64_q x, e;
    longint v = sgn ? 0 : 30000;
    int i = 0;
    for (int k = 0; k < n; k++) begin
      if ($urandom % 10 == 0) v = ($urandom % 2) ? (sgn ? 32767 : 65535) : (sgn ? -32768 : 0);
      else v += int'($urandom % 401) - 200;
      if (sgn) begin if (v > 32767) v = 32767; if (v < -32768) v = -32768; end
      else begin if (v > 65535) v = 65535; if (v < 0) v = 0; end
      x.push_back(64'(v) & 64'hFFFF);
    end
    e = pre ? pre121(D, J, sgn, r, x) : x;
    cfg.preproc_en = pre; cfg.signed_in = sgn; cfg.ref_interval = 13'(r);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    while (i < n) begin
      in_valid = $urandom % 3 != 0; out_ready = $urandom % 3 != 0; in_data = D'(x[i]);
      #1;
      checks++;
      if (out_valid != in_valid || in_ready != out_ready) failures++;
      if (in_valid && out_ready) begin
        checks++;
        if (out_data != D'(e[i]) || out_ref != (pre && (i % J == 0) && ((i / J) % r == 0))) begin
          failures++;
          if (failures < 6) $display("sample %0d: %0d ref %0d, expected %0d", i, out_data, out_ref, e[i]);
        end
        i++;
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    cfg = '0; clear = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 0, 3, 500);
    run(1, 1, 2, 500);
    run(0, 0, 1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
