// shyloc_e_top: the two compressors of the extended SHyLoC pair, side by side and
// optionally chained.
//
//  * CCSDS-123 predictor: hyperspectral samples in, mapped prediction residuals
//    out, top-right neighbours through an AHB master with burst transfers to an
//    external memory (ports hbusreq .. hrdata). The architecture is chosen at
//    compile time: BIP-MEM (samples band-interleaved by pixel, the default) or,
//    with BIL = 1, BIL-MEM (band-interleaved by line). Both have the same ports.
//    Behind it, the CCSDS-123 sample-adaptive entropy coder.
//  * CCSDS-121 compressor: unit-delay preprocessor and block-adaptive entropy coder,
//    32-bit coded words out.
//
// With sel_123_to_121 = 0 the CCSDS-121 IP compresses its own sample stream (x_*)
// under its own configuration, and the CCSDS-123 IP gives either its mapped
// residuals on res_* (sel_sa = 0) or, through its own sample-adaptive coder, a
// packed code stream on sa_* (sel_sa = 1): the entropy coder selection of the
// CCSDS-123 IP. With sel_123_to_121 = 1 the CCSDS-121 IP is the block-adaptive
// entropy coder of the CCSDS-123 predictor: it takes the residuals, and its
// unit-delay preprocessor is bypassed whatever cfg121 says (the residuals are
// already mapped); res_*, sa_* and x_* are then idle. The two IPs are configured
// independently. The select ports, and forcing the bypass, are this design's
// choices; the configuration core, header generation and output dispatcher of
// the original cores are not part of this RTL.
module shyloc_e_top
  import shyloc_pkg::*;
#(
  parameter int unsigned NX_MAX   = 512,
  parameter int unsigned NY_MAX   = 1024,
  parameter int unsigned NZ_MAX   = 256,
  parameter int unsigned D        = 16,
  parameter int unsigned P        = 3,
  parameter int unsigned OMEGA    = 13,
  parameter int unsigned BURST    = 16,
  parameter int unsigned J        = 32,
  parameter bit          BIL      = 1'b0,   // 0: BIP-MEM predictor, 1: BIL-MEM
  parameter int unsigned XW       = $clog2(NX_MAX + 1),
  parameter int unsigned YW       = $clog2(NY_MAX + 1),
  parameter int unsigned ZW       = $clog2(NZ_MAX + 1),
  parameter int unsigned VW       = (P + 3) * (OMEGA + 3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel_123_to_121,
  // CCSDS-123 configuration and samples
  input  logic [XW-1:0] cfg_nx,
  input  logic [YW-1:0] cfg_ny,
  input  logic [ZW-1:0] cfg_nz,
  input  logic          cfg_custom_w,
  input  logic          start123,
  input  logic          wload_valid,
  input  logic [VW-1:0] wload_vec,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [D-1:0]  s_data,
  output logic          res_valid,
  input  logic          res_ready,
  output logic [D-1:0]  res_data,
  output logic          res_last,
  // CCSDS-123 sample-adaptive coder output (entropy coder selection: sel_sa)
  input  logic          sel_sa,
  output logic          sa_valid,
  input  logic          sa_ready,
  output logic [31:0]   sa_data,
  output logic          sa_done,
  output logic          busy123,
  output logic [31:0]   n_bursts,
  // AHB master to the top-right samples memory
  output logic          hbusreq,
  input  logic          hgrant,
  output logic [31:0]   haddr,
  output logic [1:0]    htrans,
  output logic          hwrite,
  output logic [2:0]    hsize,
  output logic [2:0]    hburst,
  output logic [3:0]    hprot,
  output logic [31:0]   hwdata,
  input  logic          hready,
  input  logic [1:0]    hresp,
  input  logic [31:0]   hrdata,
  // CCSDS-121 configuration, samples and codewords
  input  c121_cfg_t     cfg121,
  input  logic          clear121,
  input  logic          x_valid,
  output logic          x_ready,
  input  logic [D-1:0]  x_data,
  input  logic          x_last,
  output logic          cw_valid,
  input  logic          cw_ready,
  output logic [31:0]   cw_data,
  output logic          cw_done
);

  logic         p_valid, p_ready, p_last;
  logic [D-1:0] p_delta;

  // CCSDS-123 predictor architecture, chosen at compile time.
  if (BIL) begin : g_bil
    ccsds123_bilmem #(.NX_MAX(NX_MAX), .NY_MAX(NY_MAX), .NZ_MAX(NZ_MAX), .D(D), .P(P),
                      .OMEGA(OMEGA), .BURST(BURST)) u_ccsds123 (
      .clk, .rst_n, .cfg_nx, .cfg_ny, .cfg_nz, .cfg_custom_w, .start(start123),
      .wload_valid, .wload_vec, .in_valid(s_valid), .in_ready(s_ready), .in_sample(s_data),
      .out_valid(p_valid), .out_ready(p_ready), .out_delta(p_delta), .out_last(p_last),
      .busy(busy123), .n_bursts,
      .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata,
      .hready, .hresp, .hrdata);
  end else begin : g_bip
    ccsds123_bipmem #(.NX_MAX(NX_MAX), .NY_MAX(NY_MAX), .NZ_MAX(NZ_MAX), .D(D), .P(P),
                      .OMEGA(OMEGA), .BURST(BURST)) u_ccsds123 (
      .clk, .rst_n, .cfg_nx, .cfg_ny, .cfg_nz, .cfg_custom_w, .start(start123),
      .wload_valid, .wload_vec, .in_valid(s_valid), .in_ready(s_ready), .in_sample(s_data),
      .out_valid(p_valid), .out_ready(p_ready), .out_delta(p_delta), .out_last(p_last),
      .busy(busy123), .n_bursts,
      .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata,
      .hready, .hresp, .hrdata);
  end

  // Source selection of the CCSDS-121 IP.
  c121_cfg_t    cfg_eff;
  logic         c_valid, c_ready, c_last, q_valid, q_ready;
  logic [D-1:0] c_data;

  always_comb begin
    cfg_eff = cfg121;
    if (sel_123_to_121) cfg_eff.preproc_en = 1'b0;
    c_valid   = sel_123_to_121 ? p_valid : x_valid;
    c_data    = sel_123_to_121 ? p_delta : x_data;
    c_last    = sel_123_to_121 ? p_last  : x_last;
    x_ready   = !sel_123_to_121 && c_ready;
    // inside the CCSDS-123 IP: residuals out, or codewords of its own coder
    q_valid   = !sel_123_to_121 && sel_sa && p_valid;
    p_ready   = sel_123_to_121 ? c_ready : (sel_sa ? q_ready : res_ready);
    res_valid = !sel_123_to_121 && !sel_sa && p_valid;
  end

  ccsds123_sa_coder #(.D(D), .NX_MAX(NX_MAX), .NZ_MAX(NZ_MAX), .ORDER_BIL(BIL)) u_sa_coder (
    .clk, .rst_n, .start(start123), .cfg_nx, .cfg_nz, .in_valid(q_valid), .in_ready(q_ready),
    .in_delta(p_delta), .in_last(p_last), .out_valid(sa_valid), .out_ready(sa_ready),
    .out_word(sa_data), .done(sa_done));
  assign res_data = p_delta;
  assign res_last = p_last;

  ccsds121_ip #(.D(D), .J(J)) u_ccsds121 (
    .clk, .rst_n, .cfg(cfg_eff), .clear(clear121), .in_valid(c_valid), .in_ready(c_ready),
    .in_data(c_data), .in_last(c_last), .out_valid(cw_valid), .out_ready(cw_ready),
    .out_word(cw_data), .done(cw_done));

endmodule
