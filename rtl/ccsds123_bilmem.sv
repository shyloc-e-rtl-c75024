// ccsds123_bilmem: CCSDS-123 predictor, BIL-MEM architecture (band interleaved by
// line, top-right neighbours kept in external memory over AHB with bursts).
//
// Samples arrive in BIL order (column fastest, then band, then row): sample
// s(z,y,x) has index t = (y*Nz + z)*Nx + x. As in BIP-MEM, every sample goes both
// to the FIFO of current samples and to the "to AHB" coupling FIFO; the AHB master
// writes them to external memory and reads them back in order, one spectral row
// behind, into the "from AHB" FIFO. In BIL order a spectral row is Nx*Nz samples
// and the top-right neighbour s(z,y-1,x+1) lies Nx*Nz-1 samples back, so the head
// of the "from AHB" FIFO is the top-right neighbour of the sample at the head of
// the current FIFO. The other neighbours are then very close in the stream: north
// is the top-right value of the previous sample and north-west the one before
// that (two registers), west is the previous sample (one register).
// What does need on-chip storage is the spectral context: the same pixel in the
// previous bands lies Nx, 2Nx, ... samples back. A delay line of Nx samples gives
// s(z-1,y,x), and a chain of P delay lines of Nx central local differences gives
// d(z-1..z-P, y, x).
// The weight vector of a band is used for the Nx samples of one line in a row, so
// it is kept in a working register across the line: on x = 0 it is taken from the
// weight FIFO (or is the default / custom initial vector on the first line) and on
// x = Nx-1 the updated vector is written back.
//
// The arithmetic is ccsds123_pred_core, one sample per cycle whenever the current
// FIFO, the top-right FIFO (from sample Nx*Nz-1 on) and the output register allow.
// An image costs N writes and N - (Nx*Nz - 1) reads.
//
// Interface and timing are those of ccsds123_bipmem: pulse `start` with the image
// size (Nx >= 2); with cfg_custom_w give Nz custom vectors on wload_*; stream
// Nx*Ny*Nz samples in BIL order on in_*; mapped residuals leave in the same order.
// The BIL order, the chain of FIFOs for the local differences, and the AHB master
// with bursts for the top-right FIFO follow the described architecture; the
// register/delay-line split of the neighbours and the per-line weight register
// are this design's choices.
module ccsds123_bilmem
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
  localparam int unsigned CUR_DEPTH = 4 * BURST + 4;
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
      ne_start_q <= CW'(cfg_nx) * CW'(cfg_nz) - 1'b1;
      n_rd_q     <= CW'(cfg_nx) * CW'(cfg_ny) * CW'(cfg_nz) - (CW'(cfg_nx) * CW'(cfg_nz) - 1'b1);
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
  logic [TW-1:0] t_q;         // y*Nx + x
  logic [TW-1:0] t_row_q;     // y*Nx
  logic [CW-1:0] sidx_q;
  logic [D-1:0]  w_q, n_q, nw_q, s_ne, prev_s;
  logic [P*DW-1:0] dprev_flat;
  logic [VW-1:0] w_rd, w_in, w_out, wcur_q;
  logic [D-1:0]  delta;
  logic signed [DW-1:0] d_c;
  logic          last_x;

  assign need_ne = (sidx_q >= ne_start_q);
  assign fire    = running_q && !cur_empty && (!need_ne || !from_empty) && (!out_valid || out_ready);
  assign s_ne    = need_ne ? from_head[D-1:0] : '0;
  assign last_x  = (x_q == nx_q - 1'b1);

  // same pixel, previous band: Nx samples back
  delay_fifo #(.W(D), .MAXLEN(NX_MAX)) u_fifo_band (
    .clk, .rst_n, .clear(start), .len(nx_q), .adv(fire), .din(cur_head), .dout(prev_s));

  // central local differences of bands z-1 .. z-P of the same pixel
  for (genvar i = 0; i < P; i++) begin : g_dchain
    logic [DW-1:0] din, dout;
    if (i == 0) begin : g_first
      assign din = d_c;
    end else begin : g_next
      assign din = g_dchain[i-1].dout;
    end
    delay_fifo #(.W(DW), .MAXLEN(NX_MAX)) u_fifo_diff (
      .clk, .rst_n, .clear(start), .len(nx_q), .adv(fire), .din, .dout);
    assign dprev_flat[i*DW +: DW] = dout;
  end

  weight_storage #(.VW(VW), .NZ_MAX(NZ_MAX)) u_weights (
    .clk, .rst_n, .restart(start), .nz(start ? cfg_nz : nz_q), .load(wload_valid && !fire),
    .load_vec(wload_vec), .adv(fire && last_x), .upd_vec(w_out), .rd_vec(w_rd));

  always_comb begin
    if (x_q != '0)                    w_in = wcur_q;
    else if (y_q == '0 && !custom_q)  w_in = W_DEFAULT;
    else                              w_in = w_rd;
  end

  ccsds123_pred_core #(.D(D), .P(P), .OMEGA(OMEGA), .R(R), .VMIN(VMIN), .VMAX(VMAX),
                       .TINC_LOG(TINC_LOG), .TW(TW), .ZW(ZW)) u_core (
    .s(cur_head), .s_w(w_q), .s_n(n_q), .s_nw(nw_q), .s_ne, .first_x(x_q == '0),
    .first_y(y_q == '0), .last_x, .t(t_q), .nx(TW'(nx_q)), .z(z_q), .prev_s,
    .dprev(dprev_flat), .w_in, .delta, .d_c, .w_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0; in_cnt_q <= '0; x_q <= '0; y_q <= '0; z_q <= '0; t_q <= '0;
      t_row_q <= '0; sidx_q <= '0; w_q <= '0; n_q <= '0; nw_q <= '0; wcur_q <= '0;
      out_valid <= 1'b0; out_delta <= '0; out_last <= 1'b0;
    end else if (start) begin
      running_q <= 1'b1; in_cnt_q <= '0; x_q <= '0; y_q <= '0; z_q <= '0; t_q <= '0;
      t_row_q <= '0; sidx_q <= '0; out_valid <= 1'b0; out_last <= 1'b0;
    end else begin
      if (accept) in_cnt_q <= in_cnt_q + 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_delta <= delta;
        out_last  <= (sidx_q == n_total_q - 1'b1);
        w_q    <= cur_head;
        n_q    <= s_ne;
        nw_q   <= n_q;
        wcur_q <= w_out;
        sidx_q <= sidx_q + 1'b1;
        if (last_x) begin
          x_q <= '0;
          if (z_q == nz_q - 1'b1) begin
            z_q     <= '0;
            y_q     <= y_q + 1'b1;
            t_row_q <= t_row_q + TW'(nx_q);
            t_q     <= t_row_q + TW'(nx_q);
          end else begin
            z_q <= z_q + 1'b1;
            t_q <= t_row_q;
          end
        end else begin
          x_q <= x_q + 1'b1;
          t_q <= t_q + 1'b1;
        end
        if (sidx_q == n_total_q - 1'b1) running_q <= 1'b0;
      end
    end
  end

  assign busy = running_q || out_valid;

  a_nx_min: assert property (@(posedge clk) disable iff (!rst_n) start |-> cfg_nx >= XW'(2));

endmodule
