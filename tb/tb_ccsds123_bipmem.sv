// tb_ccsds123_bipmem: self-checking test of the CCSDS-123 BIP-MEM predictor with
// its AHB master and a behavioural external memory.
// The predictor (default parameters, 16-beat bursts) compresses several small
// images given at run time: default and custom weight initialisation, with and
// with random memory wait states and output back-pressure. Every mapped
// residual is compared with the reference model. A second instance with single
// transfers (BURST = 1) compresses the same image, and the sample rates are
// compared: bursts must reach at least 0.35 samples per cycle (two bus beats per
// sample) and be faster than single transfers.
`timescale 1ns/1ps
module tb_ccsds123_bipmem;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 16, P = 3, OM = 13;
  localparam int VW = (P + 3) * (OM + 3);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // one set of stimulus signals per instance
  logic [9:0]  nx;
  logic [10:0] ny;
  logic [8:0]  nz;
  logic        custom, start [2], wl_valid;
  logic [VW-1:0] wl_vec;
  logic        in_valid [2], in_ready [2], out_valid [2], out_ready [2], out_last [2], busy [2];
  logic [D-1:0] in_sample [2], out_delta [2];
  logic [31:0] n_bursts [2];
  logic        hbusreq [2], hgrant [2], hwrite [2], hready [2];
  logic [31:0] haddr [2], hwdata [2], hrdata [2];
  logic [1:0]  htrans [2], hresp [2];
  logic [2:0]  hsize [2], hburst [2];
  logic [3:0]  hprot [2];
  int          n_waits [2], n_beats [2];

  ccsds123_bipmem dut (
    .clk, .rst_n, .cfg_nx(nx), .cfg_ny(ny), .cfg_nz(nz), .cfg_custom_w(custom), .start(start[0]),
    .wload_valid(wl_valid), .wload_vec(wl_vec), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_sample(in_sample[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .out_delta(out_delta[0]), .out_last(out_last[0]), .busy(busy[0]), .n_bursts(n_bursts[0]),
    .hbusreq(hbusreq[0]), .hgrant(hgrant[0]), .haddr(haddr[0]), .htrans(htrans[0]),
    .hwrite(hwrite[0]), .hsize(hsize[0]), .hburst(hburst[0]), .hprot(hprot[0]),
    .hwdata(hwdata[0]), .hready(hready[0]), .hresp(hresp[0]), .hrdata(hrdata[0]));

  ccsds123_bipmem #(.BURST(1)) dut_single (
    .clk, .rst_n, .cfg_nx(nx), .cfg_ny(ny), .cfg_nz(nz), .cfg_custom_w(1'b0), .start(start[1]),
    .wload_valid(1'b0), .wload_vec('0), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_sample(in_sample[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]),
    .out_delta(out_delta[1]), .out_last(out_last[1]), .busy(busy[1]), .n_bursts(n_bursts[1]),
    .hbusreq(hbusreq[1]), .hgrant(hgrant[1]), .haddr(haddr[1]), .htrans(htrans[1]),
    .hwrite(hwrite[1]), .hsize(hsize[1]), .hburst(hburst[1]), .hprot(hprot[1]),
    .hwdata(hwdata[1]), .hready(hready[1]), .hresp(hresp[1]), .hrdata(hrdata[1]));

  int wait_pct;
  for (genvar g = 0; g < 2; g++) begin : g_mem
    ahb_mem_model #(.AW_WORDS(18)) u_mem (
      .clk, .wait_pct(wait_pct), .rst_n, .hbusreq(hbusreq[g]), .hgrant(hgrant[g]), .haddr(haddr[g]),
      .htrans(htrans[g]), .hwrite(hwrite[g]), .hwdata(hwdata[g]), .hready(hready[g]),
      .hresp(hresp[g]), .hrdata(hrdata[g]), .n_waits(n_waits[g]), .n_beats(n_beats[g]));
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compress one image on instance k; returns the cycles from first input to last output.
  task automatic run(input int k, input int ix, input int iy, input int iz, input bit cust,
                     input bit stall, output int cycles);
    u64_q img, exp;
    longint cw[$];
    int i, o, nerr;
    for (int n = 0; n < ix*iy*iz; n++) img.push_back(1000 + 40*(n % iz) + ($urandom % 300));
    for (int n = 0; n < iz*(P+3); n++) cw.push_back(int'($urandom % 4096) - 2048);
    exp = pred123(D, P, OM, 32, -1, 3, 6, ix, iy, iz, cust, cw, img);
    @(negedge clk);
    nx = 10'(ix); ny = 11'(iy); nz = 9'(iz); custom = cust; start[k] = 1;
    @(negedge clk) start[k] = 0;
    if (cust) begin
      for (int z = 0; z < iz; z++) begin
        for (int e = 0; e < P + 3; e++) wl_vec[e*(OM+3) +: OM+3] = (OM+3)'(cw[z*(P+3)+e]);
        wl_valid = 1;
        @(negedge clk);
      end
      wl_valid = 0;
    end
    i = 0; o = 0; nerr = 0; cycles = 0;
    while (o < exp.size()) begin
      in_valid[k]  = (i < img.size()) && (!stall || ($urandom % 4 != 0));
      in_sample[k] = (i < img.size()) ? D'(img[i]) : '0;
      out_ready[k] = !stall || ($urandom % 3 != 0);
      #1;
      if (in_valid[k] && in_ready[k]) i++;
      if (out_valid[k] && out_ready[k]) begin
        checks++;
        if (out_delta[k] != D'(exp[o]) || out_last[k] != (o == exp.size() - 1)) begin
          failures++; nerr++;
          if (nerr < 6) $display("inst %0d sample %0d: %0d expected %0d", k, o, out_delta[k], exp[o]);
        end
        o++;
      end
      cycles++;
      @(negedge clk);
    end
    in_valid[k] = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy[k]) begin failures++; $display("instance %0d still busy", k); end
  endtask

  initial begin
    int c16, c1, c;
    nx = 0; ny = 0; nz = 0; custom = 0; wl_valid = 0; wl_vec = '0;
    for (int k = 0; k < 2; k++) begin start[k] = 0; in_valid[k] = 0; in_sample[k] = 0; out_ready[k] = 0; end
    wait_pct = 25;
    repeat (3) @(negedge clk); rst_n = 1;
    run(0, 7, 6, 5, 0, 1, c);
    run(0, 12, 4, 9, 1, 1, c);
    run(0, 3, 9, 2, 0, 1, c);
    checks++;
    if (n_waits[0] == 0) begin failures++; $display("no wait state was inserted"); end
    wait_pct = 0;
    // rate: same image, no back-pressure, bursts versus single transfers
    run(0, 16, 6, 20, 0, 0, c16);
    run(1, 16, 6, 20, 0, 0, c1);
    $display("cycles for %0d samples: bursts %0d (%0d bursts), single %0d (%0d transfers)",
             16*6*20, c16, n_bursts[0], c1, n_bursts[1]);
    checks++;
    if (real'(16*6*20) / real'(c16) < 0.35) begin failures++; $display("burst rate too low"); end
    checks++;
    if (c16 >= c1) begin failures++; $display("bursts not faster than single transfers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
