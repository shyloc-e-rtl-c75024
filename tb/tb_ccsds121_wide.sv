// tb_ccsds121_wide: self-checking test of the CCSDS-121 compressor (unit-delay
// preprocessor + block-adaptive coder) built for the widest samples, D = 32
// (5-bit option identifiers, splitting up to k = 29), J = 32.
// Several data sets are compressed, each chosen to select a different coding
// option (splitting, second extension, zero-block runs incl. remainder-of-segment,
// no compression), with signed and unsigned samples, the preprocessor on and off,
// and a final block that is incomplete. Every output word is compared with the
// reference model; the use of every option is counted and must occur.
`timescale 1ns/1ps
module tb_ccsds121_wide;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 32, J = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  c121_cfg_t cfg;
  logic clear, in_valid, in_ready, in_last, out_valid, out_ready, done;
  logic [D-1:0] in_data;
  logic [31:0] out_word;
  int checks = 0, failures = 0;
  int hist[4] = '{0, 0, 0, 0};

  ccsds121_ip #(.D(D), .J(J)) dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit pre, input bit sgn, input int r, input u64_q x);
    u64_q d;
    word_q exp, got;
    int i;
    cfg.preproc_en = pre; cfg.signed_in = sgn; cfg.ref_interval = 13'(r);
    d   = pre ? pre121(D, J, sgn, r, x) : x;
    exp = enc121(D, J, pre, r, d, hist);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    i = 0;
    // Stimulus and response are driven and sampled at the falling edge; the
    // ready signals depend only on the state, so a handshake seen there is the
    // one taken at the next rising edge.
    while (!done) begin
      @(negedge clk);
      in_valid  = (i < x.size()) && (($urandom % 4) != 0);
      in_data   = (i < x.size()) ? D'(x[i]) : '0;
      in_last   = (i == x.size() - 1);
      out_ready = ($urandom % 3) != 0;
      #1;
      if (in_valid && in_ready) i++;
      if (out_valid && out_ready) got.push_back(out_word);
    end
    in_valid = 0; in_last = 0;
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("word count %0d, expected %0d", got.size(), exp.size());
    end
    for (i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: %h expected %h", i, got[i], exp[i]);
      end
    end
  endtask

  initial begin
    u64_q x;
    longint v;
    clear = 0; in_valid = 0; in_last = 0; in_data = '0; out_ready = 0; cfg = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1: smooth random walk, unsigned, reference every 4 blocks -> splitting options
    x = {}; v = 64'd3000000000;
    for (int i = 0; i < 32*20 + 7; i++) begin v += longint'($urandom % 2000001) - 1000000; x.push_back(v); end
    run(1, 0, 4, x);
    // 2: flat data with a few bumps -> zero-block runs (short, long, remainder of segment)
    x = {};
    for (int i = 0; i < 32*150; i++) x.push_back((i/32 == 3 || i/32 == 20 || i/32 == 100) ? 70000 + (i % 7) : 100000);
    run(1, 0, 256, x);
    // 3: full-range noise -> no compression
    x = {};
    for (int i = 0; i < 32*6; i++) x.push_back(longint'($urandom));
    run(1, 0, 2, x);
    // 4: mostly zero residuals with sparse ones, preprocessor off -> second extension
    x = {};
    for (int i = 0; i < 32*12; i++) x.push_back(($urandom % 8 == 0) ? 1 : 0);
    run(0, 0, 1, x);
    // 5: signed samples around zero
    x = {}; v = 0;
    for (int i = 0; i < 32*10; i++) begin v += longint'($urandom % 600001) - 300000; x.push_back(64'(v) & 64'hFFFF_FFFF); end
    run(1, 1, 3, x);
    // 6: large steps that exceed theta near the range ends
    x = {};
    for (int i = 0; i < 32*4; i++) x.push_back((i % 2) ? 64'hFFFF_FFFF - ($urandom % 5) : ($urandom % 5));
    run(1, 0, 1, x);
    $display("options used: zero-block %0d, second-ext %0d, FS/split %0d, no-comp %0d",
             hist[0], hist[1], hist[2], hist[3]);
    for (int o = 0; o < 4; o++) begin checks++; if (hist[o] == 0) begin failures++; $display("option %0d never used", o); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
