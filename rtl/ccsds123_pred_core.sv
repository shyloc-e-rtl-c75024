// ccsds123_pred_core: arithmetic of the CCSDS-123 (Issue 1) lossless predictor for
// one sample, in full prediction mode with neighbour-oriented local sums.
//
// Given the current sample s(z,y,x), its neighbours in band z (west, north,
// north-west, north-east), the central local differences of the P* = min(z, P)
// previous bands at the same pixel and the band's weight vector, it computes, in
// one combinational pass:
//   local sum     sigma = W+NW+N+NE (inner), 4W (first row), 2(N+NE) (first
//                 column), W+NW+2N (last column)
//   differences   d = 4s - sigma (central), dN, dW, dNW (directional)
//   prediction    d_hat = w . U, scaled prediction
//                 s~ = clip(floor(mod_R[d_hat + 2^OMEGA (sigma - 4 s_mid)] / 2^(OMEGA+1))
//                      + 2 s_mid + 1, 0, 2 s_max + 1), or 2 s(z-1) (2 s_mid in band 0)
//                 for the first pixel; s_hat = floor(s~/2)
//   mapping       delta from the residual s - s_hat and theta = min(s_hat, s_max - s_hat)
//   weights       w_i += floor((sgn(e) 2^-rho U_i + 1)/2), e = 2s - s~, clipped to
//                 [-2^(OMEGA+2), 2^(OMEGA+2)-1]; rho = clip(VMIN + floor((t-Nx)/2^TINC_LOG),
//                 VMIN, VMAX) + D - OMEGA. No update on the first pixel (t = 0).
// Weight vectors hold P+3 signed (OMEGA+3)-bit elements, element 0 = north,
// 1 = west, 2 = north-west, 3 + i = band z-1-i. Samples are unsigned.
// The block split (local sum, local differences, predictor, weight update, rho
// update, map) is the one of the predictor block diagram; the formulas are those of
// the CCSDS-123 standard. R, VMIN, VMAX and TINC_LOG are choices of this design.
module ccsds123_pred_core #(
  parameter int unsigned D        = 16,
  parameter int unsigned P        = 3,
  parameter int unsigned OMEGA    = 13,
  parameter int unsigned R        = 32,
  parameter int          VMIN     = -1,
  parameter int          VMAX     = 3,
  parameter int unsigned TINC_LOG = 6,
  parameter int unsigned TW       = 20,
  parameter int unsigned ZW       = 9,
  parameter int unsigned DW       = D + 3,               // local difference width
  parameter int unsigned WW       = OMEGA + 3,           // weight width
  parameter int unsigned VW       = (P + 3) * WW
) (
  input  logic [D-1:0]          s,
  input  logic [D-1:0]          s_w,
  input  logic [D-1:0]          s_n,
  input  logic [D-1:0]          s_nw,
  input  logic [D-1:0]          s_ne,
  input  logic                  first_x,
  input  logic                  first_y,
  input  logic                  last_x,
  input  logic [TW-1:0]         t,        // pixel index y*Nx + x
  input  logic [TW-1:0]         nx,
  input  logic [ZW-1:0]         z,
  input  logic [D-1:0]          prev_s,   // s(z-1) at this pixel
  input  logic [P*DW-1:0]       dprev,    // central differences of bands z-1 .. z-P
  input  logic [VW-1:0]         w_in,
  output logic [D-1:0]          delta,
  output logic signed [DW-1:0]  d_c,
  output logic [VW-1:0]         w_out
);

  typedef logic signed [63:0] s64_t;

  localparam s64_t SMID = s64_t'(1) <<< (D - 1);
  localparam s64_t SMAX = (s64_t'(1) <<< D) - 1;
  localparam s64_t WMAX = (s64_t'(1) <<< (OMEGA + 2)) - 1;
  localparam s64_t WMIN = -(s64_t'(1) <<< (OMEGA + 2));

  s64_t sv, wv, nv, nwv, nev, sigma, dn, dw, dnw, dc;
  s64_t u [P+3];
  s64_t wt [P+3];
  s64_t dhat, tmp, stil, shat, res, mag, theta, e, m, dlt, upd, nw_i;
  int   rho;

  always_comb begin
    sv = s64_t'(s); wv = s64_t'(s_w); nv = s64_t'(s_n); nwv = s64_t'(s_nw); nev = s64_t'(s_ne);
    // local sum
    if (first_y)      sigma = 4 * wv;
    else if (first_x) sigma = 2 * (nv + nev);
    else if (last_x)  sigma = wv + nwv + 2 * nv;
    else              sigma = wv + nwv + nv + nev;
    // local differences
    dc  = 4 * sv - sigma;
    dn  = first_y ? 0 : 4 * nv - sigma;
    dw  = first_y ? 0 : (first_x ? 4 * nv - sigma : 4 * wv - sigma);
    dnw = first_y ? 0 : (first_x ? 4 * nv - sigma : 4 * nwv - sigma);
    u[0] = dn; u[1] = dw; u[2] = dnw;
    for (int i = 0; i < P; i++)
      u[3+i] = (s64_t'(z) > i) ? s64_t'($signed(dprev[i*DW +: DW])) : 0;
    for (int i = 0; i < P + 3; i++) wt[i] = s64_t'($signed(w_in[i*WW +: WW]));
    // prediction
    dhat = 0;
    for (int i = 0; i < P + 3; i++) dhat = dhat + wt[i] * u[i];
    tmp = dhat + ((sigma - 4 * SMID) <<< OMEGA);
    tmp = (tmp <<< (64 - R)) >>> (64 - R);                // mod*_R
    if (t == '0) stil = (z != '0 && P > 0) ? 2 * s64_t'(prev_s) : 2 * SMID;
    else begin
      stil = (tmp >>> (OMEGA + 1)) + 2 * SMID + 1;
      if (stil < 0) stil = 0;
      if (stil > 2 * SMAX + 1) stil = 2 * SMAX + 1;
    end
    shat = stil >>> 1;
    // mapping
    res   = sv - shat;
    mag   = (res < 0) ? -res : res;
    theta = (shat < SMAX - shat) ? shat : SMAX - shat;
    m     = stil[0] ? -res : res;
    if (mag > theta)               dlt = mag + theta;
    else if (m >= 0 && m <= theta) dlt = 2 * mag;
    else                           dlt = 2 * mag - 1;
    // weight update
    e = 2 * sv - stil;
    if (t < nx) rho = VMIN;
    else if ((s64_t'(t - nx) >>> TINC_LOG) + VMIN > VMAX) rho = VMAX;
    else rho = VMIN + int'((t - nx) >> TINC_LOG);
    rho = rho + int'(D) - int'(OMEGA);
    for (int i = 0; i < P + 3; i++) begin
      upd = (e >= 0) ? u[i] : -u[i];
      if (rho >= 0) upd = (upd + (s64_t'(1) <<< rho)) >>> (rho + 1);
      else          upd = ((upd <<< (-rho)) + 1) >>> 1;
      nw_i = (t == '0) ? wt[i] : wt[i] + upd;
      if (nw_i > WMAX) nw_i = WMAX;
      if (nw_i < WMIN) nw_i = WMIN;
      w_out[i*WW +: WW] = WW'(nw_i);
    end
    delta = D'(dlt);
    d_c   = DW'(dc);
  end

endmodule
