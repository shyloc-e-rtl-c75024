// ccsds123_bipmem: CCSDS-123 predictor, BIP-MEM architecture (band interleaved by
// pixel, top-right neighbours kept in external memory over AHB with bursts).
//
// Samples arrive in BIP order (band fastest, then column, then row) and go both to
// the FIFO of current samples and to the "to AHB" coupling FIFO. The AHB master
// writes them to external memory and reads them back, one spectral row behind,
// into the "from AHB" FIFO: its head is the top-right neighbour s(z,y-1,x+1) of the
// sample at the head of the current FIFO. Three on-chip delay lines of Nz samples
// derive the other neighbours: FIFO left (current -> west), FIFO top (top-right ->
// north) and FIFO top left (north -> north-west). The central local differences of
// the P previous bands of the same pixel are the last P computed, kept in a shift
// register. The weight FIFO holds one vector per band; on the first pixel the
// vector is the default initial one (7/8 * 2^OMEGA for band z-1, each next band
// 1/8 of the previous, directional weights 0) or, with cfg_custom_w, the custom
// vector loaded during configuration.
//
// The arithmetic (ccsds123_pred_core) is a single combinational step, so one
// sample is predicted per cycle whenever the current FIFO, the top-right FIFO (from
// the end of the first row on) and the output register allow; the sustained rate
// is set by the AHB traffic, two beats per sample. The FIFO of current samples is
// Nz + 4*BURST deep, so that the input can run one pixel plus two bursts ahead of
// the prediction, which the one-row gap between memory writes and reads needs.
//
// Interface: pulse `start` with the image size on cfg_* (Nx >= 2); with
// cfg_custom_w, then give Nz custom vectors on wload_*; then stream Nx*Ny*Nz
// samples on in_*. Mapped residuals leave on out_* (out_last on the final one);
// `busy` is high from start until the last residual is accepted.
// Image size is set at run time up to NX_MAX x NY_MAX x NZ_MAX.
module ccsds123_bipmem
  import shyloc_pkg::*;
#(
  parameter int unsigned NX_MAX   = 512,
  parameter int unsigned NY_MAX   = 1024,
  parameter int unsigned NZ_MAX   = 256,
  parameter int unsigned D        = 16,
  parameter int unsigned P        = 3,
  parameter int unsigned OMEGA    = 13,
  parameter int unsigned R        = 32,
  parameter int          VMIN     = -1,
  parameter int          VMAX     = 3,
  parameter int unsigned TINC_LOG = 6,
  parameter int unsigned BURST    = 16,
  parameter logic [31:0] BASE     = 32'h0000_0000,
  // derived
  parameter int unsigned XW = $clog2(NX_MAX + 1),
  parameter int unsigned YW = $clog2(NY_MAX + 1),
  parameter int unsigned ZW = $clog2(NZ_MAX + 1),
  parameter int unsigned WW = OMEGA + 3,
  parameter int unsigned VW = (P + 3) * WW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] cfg_nx,
  input  logic [YW-1:0] cfg_ny,
  input  logic [ZW-1:0] cfg_nz,
  input  logic          cfg_custom_w,
  input  logic          start,
  input  logic          wload_valid,
  input  logic [VW-1:0] wload_vec,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [D-1:0]  in_sample,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [D-1:0]  out_delta,
  output logic          out_last,
  output logic          busy,
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
  input  logic [31:0]   hrdata
);

  localparam int unsigned CW        = $clog2(NX_MAX * NY_MAX * NZ_MAX + 1);
  localparam int unsigned TW        = $clog2(NX_MAX * NY_MAX + 1);
  localparam int unsigned DW        = D + 3;
  localparam int unsigned CUR_DEPTH = NZ_MAX + 4 * BURST;
  localparam int unsigned CF_DEPTH  = 2 * BURST;
  localparam int unsigned FW        = $clog2(CF_DEPTH + 1);
  localparam int unsigned RING_LOG2 = $clog2(NX_MAX * NZ_MAX + CUR_DEPTH + 2 * CF_DEPTH);

  // Default initial weight vector of the standard.
  function automatic logic [VW-1:0] default_weights();
    logic [VW-1:0] v;
    longint w;
    v = '0;
    w = (longint'(7) <<< OMEGA) >>> 3;
    for (int i = 0; i < P; i++) begin
      v[(3+i)*WW +: WW] = WW'(w);
      w = w >>> 3;
    end
    return v;
  endfunction
  localparam logic [VW-1:0] W_DEFAULT = default_weights();

  // Image size, latched at start.
  logic [XW-1:0] nx_q;
  logic [ZW-1:0] nz_q;
  logic          custom_q;
  logic [CW-1:0] n_total_q, gap_q, n_rd_q, ne_start_q;
  logic          running_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx_q <= '0; nz_q <= '0; custom_q <= 1'b0;
      n_total_q <= '0; gap_q <= '0; n_rd_q <= '0; ne_start_q <= '0;
    end else if (start) begin
      nx_q       <= cfg_nx;
      nz_q       <= cfg_nz;
      custom_q   <= cfg_custom_w;
      n_total_q  <= CW'(cfg_nx) * CW'(cfg_ny) * CW'(cfg_nz);
      gap_q      <= CW'(cfg_nx) * CW'(cfg_nz);
      ne_start_q <= (CW'(cfg_nx) - 1'b1) * CW'(cfg_nz);
      n_rd_q     <= CW'(cfg_nx) * CW'(cfg_ny) * CW'(cfg_nz) - (CW'(cfg_nx) - 1'b1) * CW'(cfg_nz);
    end
  end

  // ---------------------------------------------------------------- input side
  logic [CW-1:0] in_cnt_q;
  logic          cur_full, cur_empty, to_full, to_empty, from_full, from_empty;
  logic [D-1:0]  cur_head;
  logic [$clog2(CUR_DEPTH+1)-1:0] cur_count;
  logic [FW-1:0] to_count, from_count;
  logic [31:0]   to_head, from_head;
  logic          accept, fire, need_ne;
  logic          wf_pop, rf_push;
  logic [31:0]   rf_data;

  assign in_ready = running_q && (in_cnt_q < n_total_q) && !cur_full && !to_full;
  assign accept   = in_valid && in_ready;

  sync_fifo #(.W(D), .DEPTH(CUR_DEPTH)) u_fifo_current (
    .clk, .rst_n, .clear(start), .push(accept), .wr_data(in_sample), .pop(fire),
    .rd_data(cur_head), .count(cur_count), .full(cur_full), .empty(cur_empty));

  sync_fifo #(.W(32), .DEPTH(CF_DEPTH)) u_fifo_to_ahb (
    .clk, .rst_n, .clear(start), .push(accept), .wr_data(32'(in_sample)), .pop(wf_pop),
    .rd_data(to_head), .count(to_count), .full(to_full), .empty(to_empty));

  sync_fifo #(.W(32), .DEPTH(CF_DEPTH)) u_fifo_from_ahb (
    .clk, .rst_n, .clear(start), .push(rf_push), .wr_data(rf_data), .pop(fire && need_ne),
    .rd_data(from_head), .count(from_count), .full(from_full), .empty(from_empty));

  logic [CW-1:0] wr_cnt, rd_cnt;

  ahb_master #(.BURST(BURST), .CW(CW), .RING_LOG2(RING_LOG2), .BASE(BASE), .FW(FW)) u_ahb (
    .clk, .rst_n, .start, .n_wr(n_total_q), .n_rd(n_rd_q), .gap(gap_q),
    .wf_count(to_count), .wf_data(to_head), .wf_pop,
    .rf_free(FW'(CF_DEPTH) - from_count), .rf_push, .rf_data,
    .wr_cnt, .rd_cnt, .n_bursts,
    .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata,
    .hready, .hresp, .hrdata);

  // ---------------------------------------------------------------- predictor
  logic [XW-1:0] x_q;
  logic [YW-1:0] y_q;
  logic [ZW-1:0] z_q;
  logic [TW-1:0] t_q;
  logic [CW-1:0] sidx_q;
  logic [D-1:0]  prev_s_q;
  logic signed [DW-1:0] dprev_q [P];
  logic [P*DW-1:0] dprev_flat;
  logic [D-1:0]  s_w, s_n, s_nw, s_ne;
  logic [VW-1:0] w_rd, w_in, w_out;
  logic [D-1:0]  delta;
  logic signed [DW-1:0] d_c;

  assign need_ne = (sidx_q >= ne_start_q);
  assign fire    = running_q && !cur_empty && (!need_ne || !from_empty) && (!out_valid || out_ready);
  assign s_ne    = need_ne ? from_head[D-1:0] : '0;

  delay_fifo #(.W(D), .MAXLEN(NZ_MAX)) u_fifo_left (
    .clk, .rst_n, .clear(start), .len(nz_q), .adv(fire), .din(cur_head), .dout(s_w));
  delay_fifo #(.W(D), .MAXLEN(NZ_MAX)) u_fifo_top (
    .clk, .rst_n, .clear(start), .len(nz_q), .adv(fire), .din(s_ne), .dout(s_n));
  delay_fifo #(.W(D), .MAXLEN(NZ_MAX)) u_fifo_top_left (
    .clk, .rst_n, .clear(start), .len(nz_q), .adv(fire), .din(s_n), .dout(s_nw));

  weight_storage #(.VW(VW), .NZ_MAX(NZ_MAX)) u_weights (
    .clk, .rst_n, .restart(start), .nz(start ? cfg_nz : nz_q), .load(wload_valid && !fire),
    .load_vec(wload_vec), .adv(fire), .upd_vec(w_out), .rd_vec(w_rd));

  assign w_in = (t_q == '0 && !custom_q) ? W_DEFAULT : w_rd;

  always_comb
    for (int i = 0; i < P; i++) dprev_flat[i*DW +: DW] = dprev_q[i];

  ccsds123_pred_core #(.D(D), .P(P), .OMEGA(OMEGA), .R(R), .VMIN(VMIN), .VMAX(VMAX),
                       .TINC_LOG(TINC_LOG), .TW(TW), .ZW(ZW)) u_core (
    .s(cur_head), .s_w, .s_n, .s_nw, .s_ne, .first_x(x_q == '0), .first_y(y_q == '0),
    .last_x(x_q == nx_q - 1'b1), .t(t_q), .nx(TW'(nx_q)), .z(z_q), .prev_s(prev_s_q),
    .dprev(dprev_flat), .w_in, .delta, .d_c, .w_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0; in_cnt_q <= '0; x_q <= '0; y_q <= '0; z_q <= '0; t_q <= '0; sidx_q <= '0;
      prev_s_q <= '0; out_valid <= 1'b0; out_delta <= '0; out_last <= 1'b0;
      for (int i = 0; i < P; i++) dprev_q[i] <= '0;
    end else if (start) begin
      running_q <= 1'b1; in_cnt_q <= '0; x_q <= '0; y_q <= '0; z_q <= '0; t_q <= '0; sidx_q <= '0;
      out_valid <= 1'b0; out_last <= 1'b0;
    end else begin
      if (accept) in_cnt_q <= in_cnt_q + 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_delta <= delta;
        out_last  <= (sidx_q == n_total_q - 1'b1);
        prev_s_q  <= cur_head;
        dprev_q[0] <= d_c;
        for (int i = 1; i < P; i++) dprev_q[i] <= dprev_q[i-1];
        sidx_q <= sidx_q + 1'b1;
        if (z_q == nz_q - 1'b1) begin
          z_q <= '0;
          t_q <= t_q + 1'b1;
          if (x_q == nx_q - 1'b1) begin
            x_q <= '0;
            y_q <= y_q + 1'b1;
          end else x_q <= x_q + 1'b1;
        end else z_q <= z_q + 1'b1;
        if (sidx_q == n_total_q - 1'b1) running_q <= 1'b0;
      end
    end
  end

  assign busy = running_q || out_valid;

  a_nx_min: assert property (@(posedge clk) disable iff (!rst_n) start |-> cfg_nx >= XW'(2));

endmodule
