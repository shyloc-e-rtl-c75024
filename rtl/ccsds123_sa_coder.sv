// ccsds123_sa_coder: sample-adaptive entropy coder of the CCSDS-123 IP, turning
// the mapped prediction residuals into a packed bit stream.
//
// Each band z keeps an accumulator Sigma_z and a counter Gamma_z. The first
// residual of a band is written as D raw bits, and the band's statistics are
// set to Gamma = 2^GAMMA0 and Sigma = floor((3*2^(KZ+6) - 49) * Gamma / 2^7).
// Every later residual delta is coded with the parameter k, the largest k in
// 1..D-2 with Gamma*2^k <= Sigma + floor(49*Gamma / 2^7) (0 if there is none):
// u = delta >> k zeros, a one and the k low bits of delta when u < UMAX,
// otherwise UMAX zeros and delta in D bits. Then Sigma += delta and Gamma += 1,
// or, once Gamma has reached 2^GAMMA_STAR - 1, both are halved:
// Sigma = (Sigma + delta + 1) / 2 and Gamma = (Gamma + 1) / 2.
// These are the rules of the CCSDS-123 (Issue 1) sample-adaptive coder. The
// codeword goes to bit_packer as one field when it fits in 32 bits, otherwise
// as two, so a residual is taken every cycle except after a long codeword.
//
// The band of each residual follows from the sample order: band-interleaved by
// pixel (ORDER_BIL = 0: the band changes every sample) or by line (ORDER_BIL = 1:
// every Nx samples). Statistics live in per-band registers, read and written in
// the same cycle.
//
// Interface: pulse `start` with cfg_nx and cfg_nz, then stream the residuals with
// a valid/ready handshake, in_last on the final one. The packed 32-bit words leave
// on out_*; after the last word (zero padded) `done` rises and stays high until
// the next start. No header is written. The coder parameters UMAX, GAMMA0,
// GAMMA_STAR and KZ are set at compile time; the document only names this coder,
// so their values and the field-level packing are this design's choices.
module ccsds123_sa_coder
  import shyloc_pkg::*;
#(
  parameter int unsigned D          = 16,
  parameter int unsigned NX_MAX     = 512,
  parameter int unsigned NZ_MAX     = 256,
  parameter bit          ORDER_BIL  = 1'b0,
  parameter int unsigned UMAX       = 18,   // unary length limit (8..32)
  parameter int unsigned GAMMA0     = 1,    // initial count exponent
  parameter int unsigned GAMMA_STAR = 6,    // rescaling counter size
  parameter int unsigned KZ         = 3,    // accumulator initialisation constant
  parameter int unsigned XW         = $clog2(NX_MAX + 1),
  parameter int unsigned ZW         = $clog2(NZ_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] cfg_nx,
  input  logic [ZW-1:0] cfg_nz,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [D-1:0]  in_delta,
  input  logic          in_last,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [31:0]   out_word,
  output logic          done
);

  localparam int unsigned SW   = D + GAMMA_STAR + 2;   // accumulator width
  localparam int unsigned GW   = GAMMA_STAR + 1;       // counter width
  localparam int unsigned KW   = $clog2(D);
  localparam int unsigned ZA   = (NZ_MAX > 1) ? $clog2(NZ_MAX) : 1;
  localparam logic [GW-1:0] G_INIT = GW'(1 << GAMMA0);
  localparam logic [GW-1:0] G_MAX  = GW'((1 << GAMMA_STAR) - 1);
  localparam logic [SW-1:0] S_INIT = SW'(((3 * (64'd1 << (KZ + 6)) - 49) * (64'd1 << GAMMA0)) >> 7);

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_FLUSH, S_DONE } state_e;
  state_e st_q;

  logic [XW-1:0] nx_q, x_q;
  logic [ZW-1:0] nz_q, z_q;
  logic [SW-1:0] sigma_q [NZ_MAX];
  logic [GW-1:0] gamma_q [NZ_MAX];
  logic [NZ_MAX-1:0] seen_q;

  // packer side
  logic   pk_valid, pk_ready, pk_flush, pk_flushed;
  field_t pk_field, f1, f2, pend_q;
  logic   two, pend_valid_q, fire, last_q;

  // ------------------------------------------------------------ codeword
  logic [SW-1:0] sig, rhs;
  logic [GW-1:0] gam;
  logic [KW-1:0] k;
  logic [D-1:0]  u, low;
  logic          first;

  assign sig   = sigma_q[ZA'(z_q)];
  assign gam   = gamma_q[ZA'(z_q)];
  assign first = !seen_q[ZA'(z_q)];
  assign rhs   = sig + SW'((49 * {{(SW-GW){1'b0}}, gam}) >> 7);

  always_comb begin
    k = '0;
    for (int unsigned i = 1; i <= D - 2; i++)
      if ((({{(SW-GW){1'b0}}, gam}) << i) <= rhs) k = KW'(i);
  end

  assign u   = in_delta >> k;
  assign low = in_delta & ((D'(1) << k) - 1'b1);

  always_comb begin
    f1 = '0; f2 = '0; two = 1'b0;
    if (first) begin
      f1.bits = 32'(in_delta); f1.len = LEN_BITS'(D);
    end else if (u < D'(UMAX)) begin
      if (32'(u) + 32'(k) + 1 <= 32) begin
        f1.bits = (32'd1 << k) | 32'(low);
        f1.len  = LEN_BITS'(32'(u) + 32'(k) + 1);
      end else begin
        two = 1'b1;
        f1.bits = 32'd1;     f1.len = LEN_BITS'(32'(u) + 1);
        f2.bits = 32'(low);  f2.len = LEN_BITS'(k);
      end
    end else begin
      if (UMAX + D <= 32) begin
        f1.bits = 32'(in_delta); f1.len = LEN_BITS'(UMAX + D);
      end else begin
        two = 1'b1;
        f1.bits = '0;             f1.len = LEN_BITS'(UMAX);
        f2.bits = 32'(in_delta);  f2.len = LEN_BITS'(D);
      end
    end
  end

  assign in_ready = (st_q == S_RUN) && !last_q && !pend_valid_q && pk_ready;
  assign fire     = in_valid && in_ready;
  assign pk_valid = pend_valid_q || fire;
  assign pk_field = pend_valid_q ? pend_q : f1;

  bit_packer u_packer (
    .clk, .rst_n, .in_valid(pk_valid), .in_ready(pk_ready), .in_field(pk_field),
    .flush(pk_flush), .out_valid, .out_ready, .out_word, .flushed(pk_flushed));

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; nx_q <= '0; nz_q <= '0; x_q <= '0; z_q <= '0; seen_q <= '0;
      pend_valid_q <= 1'b0; pend_q <= '0; last_q <= 1'b0; pk_flush <= 1'b0;
      for (int i = 0; i < NZ_MAX; i++) begin sigma_q[i] <= '0; gamma_q[i] <= '0; end
    end else if (start) begin
      st_q <= S_RUN; nx_q <= cfg_nx; nz_q <= cfg_nz; x_q <= '0; z_q <= '0; seen_q <= '0;
      pend_valid_q <= 1'b0; last_q <= 1'b0; pk_flush <= 1'b0;
    end else begin
      pk_flush <= 1'b0;
      if (pend_valid_q && pk_ready) pend_valid_q <= 1'b0;
      if (fire) begin
        if (two) begin pend_valid_q <= 1'b1; pend_q <= f2; end
        seen_q[ZA'(z_q)] <= 1'b1;
        if (first) begin
          sigma_q[ZA'(z_q)] <= S_INIT;
          gamma_q[ZA'(z_q)] <= G_INIT;
        end else if (gam < G_MAX) begin
          sigma_q[ZA'(z_q)] <= sig + SW'(in_delta);
          gamma_q[ZA'(z_q)] <= gam + 1'b1;
        end else begin
          sigma_q[ZA'(z_q)] <= (sig + SW'(in_delta) + 1'b1) >> 1;
          gamma_q[ZA'(z_q)] <= (gam + 1'b1) >> 1;
        end
        // band of the next residual
        if (ORDER_BIL) begin
          if (x_q == nx_q - 1'b1) begin
            x_q <= '0;
            z_q <= (z_q == nz_q - 1'b1) ? '0 : z_q + 1'b1;
          end else x_q <= x_q + 1'b1;
        end else
          z_q <= (z_q == nz_q - 1'b1) ? '0 : z_q + 1'b1;
        if (in_last) last_q <= 1'b1;
      end
      if (st_q == S_RUN && last_q && !pend_valid_q && !pk_flush) begin
        pk_flush <= 1'b1;
        st_q     <= S_FLUSH;
      end
      if (st_q == S_FLUSH && pk_flushed) st_q <= S_DONE;
    end
  end

  assign done = (st_q == S_DONE);

endmodule
