// tb_ccsds123_sa_coder: self-checking test of the CCSDS-123 sample-adaptive coder.
// Two instances, one for band-interleaved-by-pixel and one for band-interleaved-by-
// line residual order, code several residual sets of different image shapes.
// Residual magnitudes differ from band to band and drift, so that k moves up and
// down, the counters are rescaled, and occasional very large residuals take the
// escape path (UMAX zeros plus raw value, sent as two fields). Output back-pressure
// and input gaps are random. Every word is compared with the reference coder, and
// `done` must rise after the last word.
`timescale 1ns/1ps
module tb_ccsds123_sa_coder;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]   nx;
  logic [8:0]   nz;
  logic         start [2], in_valid [2], in_ready [2], in_last [2];
  logic         out_valid [2], out_ready [2], done [2];
  logic [D-1:0] in_delta [2];
  logic [31:0]  out_word [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ccsds123_sa_coder #(.ORDER_BIL(g == 1)) dut (
      .clk, .rst_n, .start(start[g]), .cfg_nx(nx), .cfg_nz(nz), .in_valid(in_valid[g]),
      .in_ready(in_ready[g]), .in_delta(in_delta[g]), .in_last(in_last[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_word(out_word[g]),
      .done(done[g]));
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_escape = 0;

  task automatic run(input int g, input int ix, input int iy, input int iz);
    u64_q d;
    word_q exp, got;
    int i, nerr;
    for (int n = 0; n < ix*iy*iz; n++) begin
      int z, scale;
      z = (g == 1) ? (n / ix) % iz : n % iz;
      scale = 1 << ((z % 9) + ((n / (ix*iz)) % 4));
      if ($urandom % 97 == 0) begin d.push_back(40000 + $urandom % 20000); n_escape++; end
      else d.push_back($urandom % scale);
    end
    exp = sa123(D, 18, 1, 6, 3, ix, iz, g == 1, d);
    @(negedge clk);
    nx = 10'(ix); nz = 9'(iz); start[g] = 1;
    @(negedge clk) start[g] = 0;
    i = 0; nerr = 0;
    while (!done[g]) begin
      in_valid[g]  = (i < d.size()) && ($urandom % 4 != 0);
      in_delta[g]  = (i < d.size()) ? D'(d[i]) : '0;
      in_last[g]   = (i == d.size() - 1);
      out_ready[g] = $urandom % 3 != 0;
      #1;
      if (in_valid[g] && in_ready[g]) i++;
      if (out_valid[g] && out_ready[g]) got.push_back(out_word[g]);
      @(negedge clk);
    end
    in_valid[g] = 0;
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("coder %0d: %0d words, expected %0d", g, got.size(), exp.size());
    end
    for (int n = 0; n < exp.size() && n < got.size(); n++) begin
      checks++;
      if (got[n] !== exp[n]) begin
        failures++; nerr++;
        if (nerr < 6) $display("coder %0d word %0d: %h expected %h", g, n, got[n], exp[n]);
      end
    end
  endtask

  initial begin
    nx = 0; nz = 0;
    for (int g = 0; g < 2; g++) begin
      start[g] = 0; in_valid[g] = 0; in_last[g] = 0; in_delta[g] = '0; out_ready[g] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int g = 0; g < 2; g++) begin
      run(g, 8, 10, 5);
      run(g, 3, 40, 12);
      run(g, 20, 6, 1);
      run(g, 2, 2, 2);
    end
    $display("escape codewords %0d", n_escape);
    checks++;
    if (n_escape == 0) begin failures++; $display("no escape codeword"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
