// tb_shyloc_e_bil: end-to-end test of the design top built with the BIL-MEM
// CCSDS-123 architecture (parameter BIL = 1, all other parameters at default).
// Same operations as the BIP-MEM end-to-end test, with the hyperspectral images
// streamed in band-interleaved-by-line order:
//  1. chained mode: predictor (external memory with random wait states) and
//     CCSDS-121 coder, compared word by word with the reference predictor + coder,
//     with default and with custom weight initialisation;
//  2. side-by-side mode: the CCSDS-121 IP compresses its own samples with the
//     unit-delay preprocessor while the predictor residuals leave on their port.
//  3. entropy coder selection: the predictor output coded by the CCSDS-123
//     sample-adaptive coder, compared with its reference, while the CCSDS-121 IP
//     compresses its own samples.
// The mechanisms are counted and each must occur: AHB bursts, memory wait states,
// input back-pressure, reference samples, each coding option, both source
// selections, the sample-adaptive coder and both weight initialisations.
`timescale 1ns/1ps
module tb_shyloc_e_bil;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 16, P = 3, OM = 13, J = 32;
  localparam int VW = (P + 3) * (OM + 3);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel, sel_sa, sa_valid, sa_ready, sa_done, start123, custom, wl_valid, s_valid, s_ready, res_valid, res_ready, res_last, busy123;
  logic [9:0] nx; logic [10:0] ny; logic [8:0] nz;
  logic [VW-1:0] wl_vec;
  logic [D-1:0] s_data, res_data, x_data;
  logic [31:0] sa_data, n_bursts, haddr, hwdata, hrdata, cw_data;
  logic hbusreq, hgrant, hwrite, hready;
  logic [1:0] htrans, hresp; logic [2:0] hsize, hburst; logic [3:0] hprot;
  c121_cfg_t cfg121;
  logic clear121, x_valid, x_ready, x_last, cw_valid, cw_ready, cw_done;
  int wait_pct, n_waits, n_beats;

  shyloc_e_top #(.BIL(1'b1)) dut (
    .clk, .rst_n, .sel_123_to_121(sel), .cfg_nx(nx), .cfg_ny(ny), .cfg_nz(nz),
    .cfg_custom_w(custom), .start123, .wload_valid(wl_valid), .wload_vec(wl_vec),
    .s_valid, .s_ready, .s_data, .res_valid, .res_ready, .res_data, .res_last,
    .sel_sa, .sa_valid, .sa_ready, .sa_data, .sa_done, .busy123,
    .n_bursts, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata,
    .hready, .hresp, .hrdata, .cfg121, .clear121, .x_valid, .x_ready, .x_data, .x_last,
    .cw_valid, .cw_ready, .cw_data, .cw_done);

  ahb_mem_model #(.AW_WORDS(18)) u_mem (
    .clk, .rst_n, .wait_pct, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hresp, .hrdata, .n_waits, .n_beats);

  int hist[4] = '{0, 0, 0, 0};
  int n_stall = 0, n_ref = 0, n_mode[2] = '{0, 0}, n_init[2] = '{0, 0}, n_sa = 0, bursts = 0;

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if ((s_valid && !s_ready) || (x_valid && !x_ready)) n_stall++;
    if (dut.u_ccsds121.p_ref && dut.u_ccsds121.p_valid && dut.u_ccsds121.p_ready) n_ref++;
  end

  function automatic void cmp_words(word_q got, word_q exp, string what);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("%s: %0d words, expected %0d", what, got.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        if (failures < 8) $display("%s word %0d: %h expected %h", what, i, got[i], exp[i]);
      end
    end
  endfunction

  // One operation. chained: 123 -> 121. Otherwise 123 residuals out and 121 on x.
  task automatic run(input bit chained, input bit sa, input int ix, input int iy, input int iz, input bit cust,
                     input int r, input int nxs);
    u64_q img, res, xs, dx, got_res, bimg, bres;
    word_q exp, got, sexp, sgot;
    longint cw[$];
    int i, o, k;
    bit fin;
    for (int n = 0; n < ix*iy*iz; n++)
      bimg.push_back((n / (ix*iz) == 1) ? 2000 + 10*(n % iz) : 2000 + 30*(n % iz) + ($urandom % 200));
    for (int n = 0; n < iz*(P+3); n++) cw.push_back(int'($urandom % 2048) - 1024);
    // the model works in BIP order; samples and residuals are streamed in BIL order
    bres = pred123(D, P, OM, 32, -1, 3, 6, ix, iy, iz, cust, cw, bimg);
    for (int y = 0; y < iy; y++)
      for (int z = 0; z < iz; z++)
        for (int x = 0; x < ix; x++) begin
          img.push_back(bimg[(y*ix + x)*iz + z]);
          res.push_back(bres[(y*ix + x)*iz + z]);
        end
    for (int n = 0; n < nxs; n++)
      case ((n / 32) % 5)
        1:       xs.push_back(700 + (($urandom % 10) == 0));   // low entropy
        2:       xs.push_back($urandom % 65536);               // noise
        3:       xs.push_back(700 + 37 * (n % 32));            // ramp
        default: xs.push_back(700);                            // flat
      endcase
    if (chained) exp = enc121(D, J, 0, 1, res, hist);
    else begin
      dx  = pre121(D, J, 0, r, xs);
      exp = enc121(D, J, 1, r, dx, hist);
    end
    if (sa && !chained) begin
      sexp = sa123(D, 18, 1, 6, 3, ix, iz, 1, res);
      n_sa++;
    end
    n_mode[chained]++; n_init[cust]++;
    @(negedge clk);
    sel = chained; sel_sa = sa; nx = 10'(ix); ny = 11'(iy); nz = 9'(iz); custom = cust;
    cfg121.preproc_en = 1; cfg121.signed_in = 0; cfg121.ref_interval = 13'(r);
    start123 = 1; clear121 = 1;
    @(negedge clk) start123 = 0; clear121 = 0;
    if (cust) begin
      for (int z = 0; z < iz; z++) begin
        for (int e = 0; e < P + 3; e++) wl_vec[e*(OM+3) +: OM+3] = (OM+3)'(cw[z*(P+3)+e]);
        wl_valid = 1;
        @(negedge clk);
      end
      wl_valid = 0;
    end
    i = 0; k = 0; fin = 0;
    while (!(cw_done && (chained || (sa ? sa_done : got_res.size() == res.size())))) begin
      s_valid   = (i < img.size()) && ($urandom % 5 != 0);
      s_data    = (i < img.size()) ? D'(img[i]) : '0;
      x_valid   = !chained && (k < xs.size()) && ($urandom % 3 != 0);
      x_data    = (k < xs.size()) ? D'(xs[k]) : '0;
      x_last    = (k == xs.size() - 1);
      res_ready = $urandom % 4 != 0;
      cw_ready  = $urandom % 4 != 0;
      sa_ready  = $urandom % 3 != 0;
      #1;
      if (s_valid && s_ready) i++;
      if (x_valid && x_ready) k++;
      if (res_valid && res_ready) got_res.push_back(res_data);
      if (cw_valid && cw_ready) got.push_back(cw_data);
      if (sa_valid && sa_ready) sgot.push_back(sa_data);
      @(negedge clk);
    end
    s_valid = 0; x_valid = 0;
    cmp_words(got, exp, chained ? "chained codewords" : "121 codewords");
    if (!chained && sa) cmp_words(sgot, sexp, "sample-adaptive codewords");
    if (!chained && !sa) begin
      checks++;
      if (got_res.size() != res.size()) begin failures++; $display("residual count"); end
      for (int n = 0; n < res.size() && n < got_res.size(); n++) begin
        checks++;
        if (got_res[n] != res[n]) begin failures++; if (failures < 8) $display("residual %0d", n); end
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (busy123) begin failures++; $display("predictor still busy"); end
  endtask

  initial begin
    sel = 0; sel_sa = 0; sa_ready = 0; start123 = 0; custom = 0; wl_valid = 0; wl_vec = '0; s_valid = 0; s_data = '0;
    res_ready = 0; cfg121 = '0; clear121 = 0; x_valid = 0; x_data = '0; x_last = 0; cw_ready = 0;
    nx = 0; ny = 0; nz = 0; wait_pct = 20;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1, 0, 10, 5, 8, 0, 1, 0);
    bursts += n_bursts;
    run(1, 0, 6, 4, 12, 1, 1, 0);
    bursts += n_bursts;
    run(0, 0, 9, 4, 7, 0, 4, 32*150 + 9);
    bursts += n_bursts;
    run(0, 0, 5, 3, 4, 1, 2, 32*3);
    bursts += n_bursts;
    run(0, 1, 7, 5, 6, 0, 3, 32*40);
    bursts += n_bursts;
    $display("bursts %0d, wait states %0d, stall cycles %0d, reference samples %0d",
             bursts, n_waits, n_stall, n_ref);
    $display("options: zero-block %0d, second-ext %0d, FS/split %0d, no-comp %0d",
             hist[0], hist[1], hist[2], hist[3]);
    $display("modes: side-by-side %0d, chained %0d, sample-adaptive coder %0d; weights: default %0d, custom %0d",
             n_mode[0], n_mode[1], n_sa, n_init[0], n_init[1]);
    checks++; if (n_sa == 0)      begin failures++; $display("sample-adaptive coder unused"); end
    checks++; if (bursts == 0)    begin failures++; $display("no burst"); end
    checks++; if (n_waits == 0)   begin failures++; $display("no wait state"); end
    checks++; if (n_stall == 0)   begin failures++; $display("no stall"); end
    checks++; if (n_ref == 0)     begin failures++; $display("no reference sample"); end
    for (int o = 0; o < 4; o++) begin
      checks++; if (hist[o] == 0) begin failures++; $display("option %0d never used", o); end
    end
    for (int m = 0; m < 2; m++) begin
      checks++; if (n_mode[m] == 0 || n_init[m] == 0) begin failures++; $display("mode %0d unused", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
