// tb_shyloc_e_workloads: the sensor image shapes the cores are meant for, run
// through the top at its default parameters (BIP-MEM predictor chained into the
// CCSDS-121 coder), each cut to what the defaults hold and to a few rows so that
// the run stays short:
//   * 512 x 680 x 224 at 16 bits (airborne imaging spectrometer): 512 x 6 x 224;
//   * 1024 x 1024 x 6 at 8 bits (multispectral imager): width cut to 512, 24 rows;
//   * 90 x 135 x 1501 at 14 bits (infrared sounder): all 135 rows of 90 pixels,
//     bands cut to 64.
// The images are synthetic (spectrally and spatially correlated values plus noise
// of the given bit depth). For each, the coded words are compared with the
// reference models and the number of AHB beats must be exactly N writes plus
// N - (Nx-1)*Nz reads. Samples per cycle and compression ratio are printed.
`timescale 1ns/1ps
module tb_shyloc_e_workloads;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 16, P = 3, OM = 13, J = 32;
  localparam int VW = (P + 3) * (OM + 3);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] nx; logic [10:0] ny; logic [8:0] nz;
  logic start123, s_valid, s_ready, res_valid, res_last, busy123;
  logic [D-1:0] s_data, res_data;
  logic [31:0] n_bursts, haddr, hwdata, hrdata, cw_data;
  logic hbusreq, hgrant, hwrite, hready;
  logic [1:0] htrans, hresp; logic [2:0] hsize, hburst; logic [3:0] hprot;
  c121_cfg_t cfg121;
  logic x_ready, cw_valid, cw_ready, cw_done;
  int n_waits, n_beats;

  shyloc_e_top dut (
    .clk, .rst_n, .sel_123_to_121(1'b1), .cfg_nx(nx), .cfg_ny(ny), .cfg_nz(nz),
    .cfg_custom_w(1'b0), .start123, .wload_valid(1'b0), .wload_vec('0),
    .s_valid, .s_ready, .s_data, .res_valid, .res_ready(1'b0), .res_data, .res_last,
    .sel_sa(1'b0), .sa_valid(), .sa_ready(1'b1), .sa_data(), .sa_done(), .busy123,
    .n_bursts, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata,
    .hready, .hresp, .hrdata, .cfg121, .clear121(start123), .x_valid(1'b0), .x_ready,
    .x_data('0), .x_last(1'b0), .cw_valid, .cw_ready, .cw_data, .cw_done);

  ahb_mem_model #(.AW_WORDS(18)) u_mem (
    .clk, .rst_n, .wait_pct(0), .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hresp, .hrdata, .n_waits, .n_beats);

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // amp / 2^sh, at least 1
  function automatic int step(int amp, int sh);
    return (amp >> sh) > 0 ? (amp >> sh) : 1;
  endfunction

  task automatic run(input int ix, input int iy, input int iz, input int bpp, input string name);
    u64_q img, res;
    word_q exp, got;
    longint cw[$];
    int hist[4] = '{0, 0, 0, 0};
    int i, cycles, beats0, bursts0, amp;
    amp = 1 << (bpp - 2);
    for (int n = 0; n < ix*iy*iz; n++) begin
      int z, x, y;
      z = n % iz; x = (n / iz) % ix; y = n / (iz*ix);
      img.push_back(longint'(amp + step(amp, 6)*(z % 23) + step(amp, 7)*(x % 37)
                             + step(amp, 8)*(y % 11) + int'($urandom % (2*step(amp, 4)))));
    end
    res = pred123(D, P, OM, 32, -1, 3, 6, ix, iy, iz, 0, cw, img);
    exp = enc121(D, J, 0, 1, res, hist);
    @(negedge clk);
    nx = 10'(ix); ny = 11'(iy); nz = 9'(iz); start123 = 1;
    @(negedge clk) start123 = 0;
    beats0 = n_beats; bursts0 = int'(n_bursts);
    i = 0; cycles = 0;
    while (!cw_done) begin
      s_valid  = (i < img.size());
      s_data   = (i < img.size()) ? D'(img[i]) : '0;
      cw_ready = 1;
      #1;
      if (s_valid && s_ready) i++;
      if (cw_valid && cw_ready) got.push_back(cw_data);
      cycles++;
      @(negedge clk);
    end
    s_valid = 0;
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("%s: %0d words, expected %0d", name, got.size(), exp.size()); end
    for (int n = 0; n < exp.size() && n < got.size(); n++) begin
      checks++;
      if (got[n] !== exp[n]) begin failures++; if (failures < 8) $display("%s word %0d: %h expected %h", name, n, got[n], exp[n]); end
    end
    $display("%s %0dx%0dx%0d: %0.3f samples/cycle, %0d bursts, ratio %0.2f", name, ix, iy, iz,
             real'(ix*iy*iz) / real'(cycles), int'(n_bursts), real'(ix*iy*iz*bpp) / real'(32*got.size()));
    checks++;
    if (n_beats - beats0 != 2*ix*iy*iz - (ix-1)*iz) begin
      failures++; $display("%s: bus beats %0d", name, n_beats - beats0);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    start123 = 0; s_valid = 0; s_data = '0; cw_ready = 0; cfg121 = '0; nx = 0; ny = 0; nz = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(512, 6, 224, 16, "spectrometer");
    run(512, 24, 6, 8, "multispectral");
    run(90, 135, 64, 14, "sounder");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
