// ccsds121_coder: CCSDS-121 block-adaptive entropy coder (adaptive Rice coder).
//
// Mapped residuals arrive one per cycle and are stored in a J-entry block buffer
// while compute_lk (FS and sample-splitting lengths, all-zero test) and
// snd_extension (gamma values into a J/2-entry buffer, second-extension length)
// accumulate in parallel. When a block is complete the input stalls, option_coder
// picks the shortest option and fs_coder writes the block; bit_packer forms 32-bit
// words.
//
// The FSM knows which blocks carry a reference sample: with the preprocessor in
// use, the first block of every r blocks (cfg.ref_interval), reference sample first.
// That sample is coded raw after the identifier and excluded from the all-zero
// test and from the gamma of the first pair (treated as zero).
// Zero blocks are not coded one by one: consecutive all-zero blocks form a run,
// closed by a block that is not all zero, by a block that carries a reference
// sample, at the end of a 64-block segment or at the end of the data. A run of
// c blocks is coded with FS value c-1 for c <= 4 and c for c >= 5; a run of five or
// more closed at the end of a segment or of the data is coded as "remainder of
// segment" (FS value 4). The reference sample of the first block of a run follows
// the run's identifier.
// An incomplete last block (in_last before J samples) is padded with zero
// residuals. After the last block the packer is flushed and `done` rises, until
// `clear` starts a new data set.
//
// Timing: J cycles to take a block, a few cycles to decide, then one cycle per
// output field; the input is held off while a block is being coded.
module ccsds121_coder
  import shyloc_pkg::*;
#(
  parameter int unsigned D = 16,   // dynamic range (bits)
  parameter int unsigned J = 32    // block size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  c121_cfg_t    cfg,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_delta,
  input  logic         in_ref,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [31:0]  out_word,
  output logic         done
);

  localparam int unsigned JW    = $clog2(J);
  localparam int unsigned PW    = $clog2(J/2);
  localparam int unsigned LEN_W = D + 8;
  localparam int unsigned GW    = 2*D + 3;
  localparam int unsigned SLW   = 2*D + 8;

  typedef enum logic [2:0] { S_RECV, S_PAD, S_WAIT, S_DECIDE, S_EMIT, S_NEXT, S_FLUSH, S_DONE } state_e;
  state_e st_q;

  logic [D-1:0]  blk_mem [J];
  logic [GW-1:0] gam_mem [J/2];

  logic [JW-1:0] samp_q;
  logic [12:0]   blkref_q;
  logic [5:0]    seg_q;
  logic [6:0]    zb_cnt_q;
  logic          zb_ref_q;
  logic [D-1:0]  zb_refv_q, refv_q;
  logic          last_q, redo_q;
  logic          ref_blk;

  // Inputs of the length units.
  logic          acc_valid, acc_ref, acc_clear;
  logic [D-1:0]  acc_delta;

  assign ref_blk   = cfg.preproc_en && (blkref_q == '0);
  assign in_ready  = (st_q == S_RECV);
  assign acc_valid = (st_q == S_RECV && in_valid) || (st_q == S_PAD);
  assign acc_delta = (st_q == S_PAD) ? '0 : in_delta;
  assign acc_ref   = ref_blk && (samp_q == '0) && (st_q == S_RECV);
  assign acc_clear = clear || (st_q == S_NEXT);

  logic [LEN_W-1:0] lk_len;
  logic [4:0]       lk_k;
  logic             all_zero;
  logic             g_valid;
  logic [GW-1:0]    g_val;
  logic [PW-1:0]    g_idx;
  logic [SLW-1:0]   se_len;

  compute_lk #(.D(D), .J(J), .LEN_W(LEN_W)) u_lk (
    .clk, .rst_n, .clear(acc_clear), .in_valid(acc_valid), .in_delta(acc_delta), .in_ref(acc_ref),
    .best_len(lk_len), .best_k(lk_k), .all_zero(all_zero));

  snd_extension #(.D(D), .J(J), .GW(GW), .SLW(SLW)) u_se (
    .clk, .rst_n, .clear(acc_clear), .in_valid(acc_valid), .in_delta(acc_delta), .in_ref(acc_ref),
    .gamma_valid(g_valid), .gamma(g_val), .gamma_idx(g_idx), .se_len(se_len));

  option_e    sel_opt;
  logic [4:0] sel_k;

  option_coder #(.D(D), .J(J), .LEN_W(LEN_W), .SLW(SLW)) u_opt (
    .all_zero, .lk_len, .lk_k, .se_len, .option(sel_opt), .k(sel_k));

  // Request to fs_coder.
  logic          fc_start, fc_done, fc_busy;
  option_e       fc_opt_q;
  logic [4:0]    fc_k_q;
  logic          fc_ref_q;
  logic [D-1:0]  fc_refv_q;
  logic [6:0]    fc_zb_q;
  logic [JW-1:0] rd_addr;
  logic [PW-1:0] rg_addr;
  logic          f_valid, f_ready;
  field_t        f_field;
  logic          pk_flush, pk_flushed;

  fs_coder #(.D(D), .J(J), .GW(GW)) u_fs (
    .clk, .rst_n, .start(fc_start), .option(fc_opt_q), .k(fc_k_q), .has_ref(fc_ref_q),
    .ref_value(fc_refv_q), .zb_code(fc_zb_q), .blk_addr(rd_addr), .blk_data(blk_mem[rd_addr]),
    .gam_addr(rg_addr), .gam_data(gam_mem[rg_addr]), .out_valid(f_valid), .out_ready(f_ready),
    .out_field(f_field), .busy(fc_busy), .done(fc_done));

  bit_packer u_pk (
    .clk, .rst_n, .in_valid(f_valid), .in_ready(f_ready), .in_field(f_field), .flush(pk_flush),
    .out_valid, .out_ready, .out_word, .flushed(pk_flushed));

  always_ff @(posedge clk) begin
    if (acc_valid) blk_mem[samp_q] <= acc_delta;
    if (g_valid)   gam_mem[g_idx]  <= g_val;
  end

  assign done = (st_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_RECV; samp_q <= '0; blkref_q <= '0; seg_q <= '0; zb_cnt_q <= '0; zb_ref_q <= 1'b0;
      zb_refv_q <= '0; refv_q <= '0; last_q <= 1'b0; redo_q <= 1'b0; fc_start <= 1'b0;
      fc_opt_q <= OPT_NC; fc_k_q <= '0; fc_ref_q <= 1'b0; fc_refv_q <= '0; fc_zb_q <= '0;
      pk_flush <= 1'b0;
    end else if (clear) begin
      st_q <= S_RECV; samp_q <= '0; blkref_q <= '0; seg_q <= '0; zb_cnt_q <= '0; last_q <= 1'b0;
      redo_q <= 1'b0; fc_start <= 1'b0; pk_flush <= 1'b0;
    end else begin
      fc_start <= 1'b0;
      pk_flush <= 1'b0;
      case (st_q)
        S_RECV: if (in_valid) begin
          if (acc_ref) refv_q <= in_delta;
          samp_q <= samp_q + 1'b1;
          if (in_last) last_q <= 1'b1;
          if (samp_q == JW'(J-1)) st_q <= S_WAIT;
          else if (in_last)       st_q <= S_PAD;
        end
        S_PAD: begin
          samp_q <= samp_q + 1'b1;
          if (samp_q == JW'(J-1)) st_q <= S_WAIT;
        end
        S_WAIT: st_q <= S_DECIDE;
        S_DECIDE: begin
          st_q     <= S_EMIT;
          fc_start <= 1'b1;
          redo_q   <= 1'b0;
          fc_k_q   <= sel_k;
          if (zb_cnt_q != '0 && (!all_zero || ref_blk)) begin
            // close the pending run, then code this block
            fc_opt_q  <= OPT_ZB;
            fc_ref_q  <= zb_ref_q;
            fc_refv_q <= zb_refv_q;
            fc_zb_q   <= (zb_cnt_q <= 7'd4) ? zb_cnt_q - 7'd1 : zb_cnt_q;
            zb_cnt_q  <= '0;
            redo_q    <= 1'b1;
          end else if (all_zero) begin
            if (zb_cnt_q == '0) begin
              zb_ref_q  <= ref_blk;
              zb_refv_q <= refv_q;
            end
            if (seg_q == 6'd63 || last_q) begin
              fc_opt_q  <= OPT_ZB;
              fc_ref_q  <= (zb_cnt_q == '0) ? ref_blk : zb_ref_q;
              fc_refv_q <= (zb_cnt_q == '0) ? refv_q : zb_refv_q;
              fc_zb_q   <= (zb_cnt_q + 7'd1 >= 7'd5) ? 7'd4 : zb_cnt_q;
              zb_cnt_q  <= '0;
            end else begin
              zb_cnt_q <= zb_cnt_q + 7'd1;
              fc_start <= 1'b0;
              st_q     <= S_NEXT;
            end
          end else begin
            fc_opt_q  <= sel_opt;
            fc_ref_q  <= ref_blk;
            fc_refv_q <= refv_q;
            fc_zb_q   <= '0;
          end
        end
        S_EMIT: if (fc_done) st_q <= redo_q ? S_DECIDE : S_NEXT;
        S_NEXT: begin
          samp_q   <= '0;
          seg_q    <= seg_q + 6'd1;
          blkref_q <= (blkref_q == cfg.ref_interval - 13'd1) ? '0 : blkref_q + 13'd1;
          if (last_q) begin st_q <= S_FLUSH; pk_flush <= 1'b1; end
          else st_q <= S_RECV;
        end
        S_FLUSH: if (pk_flushed) st_q <= S_DONE;
        S_DONE: ;
        default: st_q <= S_RECV;
      endcase
    end
  end

  // The reference samples tagged by the preprocessor fall where this FSM expects them.
  a_ref_position: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_RECV && in_valid && cfg.preproc_en) |-> (in_ref == acc_ref));

endmodule
