// tb_shyloc_e_full: one complete compression at the top's default parameters and
// at the largest row and band count they allow (Nx = 512, Nz = 256, the
// "run-time configuration" image size), sixteen rows deep: 2,097,152 samples
// through the CCSDS-123 BIP-MEM predictor and the CCSDS-121 coder in chained mode.
// The coded words are compared with the reference models. The AHB traffic must be
// exactly what the scheme needs: every sample written once, every sample but the
// last spectral row less one pixel read back once, in 16-beat bursts.
`timescale 1ns/1ps
module tb_shyloc_e_full;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;

  localparam int D = 16, P = 3, OM = 13, J = 32;
  localparam int IX = 512, IY = 16, IZ = 256;
  localparam int VW = (P + 3) * (OM + 3);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start123, s_valid, s_ready, res_valid, res_last, busy123;
  logic [D-1:0] s_data, res_data;
  logic [31:0] n_bursts, haddr, hwdata, hrdata, cw_data;
  logic hbusreq, hgrant, hwrite, hready;
  logic [1:0] htrans, hresp; logic [2:0] hsize, hburst; logic [3:0] hprot;
  c121_cfg_t cfg121;
  logic x_ready, cw_valid, cw_ready, cw_done;
  int n_waits, n_beats;

  shyloc_e_top dut (
    .clk, .rst_n, .sel_123_to_121(1'b1), .cfg_nx(10'(IX)), .cfg_ny(11'(IY)), .cfg_nz(9'(IZ)),
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
    #150_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64_q img, res;
    word_q exp, got;
    longint cw[$];
    int hist[4] = '{0, 0, 0, 0};
    int i, cycles, last_in;
    for (int n = 0; n < IX*IY*IZ; n++) begin
      int z, x, y;
      z = n % IZ; x = (n / IZ) % IX; y = n / (IZ*IX);
      img.push_back(3000 + 8*z + 5*x + 3*y + ($urandom % 64));
    end
    res = pred123(D, P, OM, 32, -1, 3, 6, IX, IY, IZ, 0, cw, img);
    exp = enc121(D, J, 0, 1, res, hist);
    $display("reference: %0d residuals, %0d words", res.size(), exp.size());
    start123 = 0; s_valid = 0; s_data = '0; cw_ready = 0; cfg121 = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk) start123 = 1;
    @(negedge clk) start123 = 0;
    i = 0; cycles = 0; last_in = 0;
    while (!cw_done) begin
      s_valid  = (i < img.size());
      s_data   = (i < img.size()) ? D'(img[i]) : '0;
      cw_ready = 1;
      #1;
      if (s_valid && s_ready) begin i++; last_in = cycles; end
      if (cw_valid && cw_ready) got.push_back(cw_data);
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("%0d words, expected %0d", got.size(), exp.size()); end
    for (int n = 0; n < exp.size() && n < got.size(); n++) begin
      checks++;
      if (got[n] !== exp[n]) begin failures++; if (failures < 8) $display("word %0d: %h expected %h", n, got[n], exp[n]); end
    end
    $display("%0d samples in %0d cycles (%0.3f samples/cycle), %0d bursts, %0d bus beats",
             IX*IY*IZ, cycles, real'(IX*IY*IZ) / real'(cycles), n_bursts, n_beats);
    checks++;
    if (n_beats != 2*IX*IY*IZ - (IX-1)*IZ) begin failures++; $display("bus beats %0d", n_beats); end
    checks++;
    if (n_bursts != (IX*IY*IZ + 15)/16 + (IX*IY*IZ - (IX-1)*IZ + 15)/16) begin
      failures++; $display("bursts %0d", n_bursts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
