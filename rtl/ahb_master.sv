// ahb_master: AHB master that keeps the top-right neighbour samples of the
// CCSDS-123 BIP-MEM predictor in an external memory, with incremental bursts.
//
// Samples written by the predictor into the "to AHB" coupling FIFO are written to
// memory in order; the same samples are read back in order into the "from AHB"
// FIFO, from which the predictor takes its top-right neighbours. Reads start only
// after one spectral row (Nx*Nz samples, `gap`) is in memory, and each read burst
// keeps that distance behind the writes until all `n_wr` samples are written.
// `n_rd` samples are read in all. Memory is used as a ring of 2^RING_LOG2 words
// from BASE, one sample per 32-bit word.
//
// Read and write bursts are interleaved: after a write burst a read burst is
// preferred and the other way round. A burst is BURST beats (at most 16, a power
// of two so that bursts stay aligned and never cross a 1 KB boundary) or fewer at
// the end of the data; BURST = 1 gives single transfers. Lengths 4, 8 and 16 use
// INCR4/8/16, others INCR (or SINGLE for one beat). For every burst the master
// raises HBUSREQ, waits for HGRANT with HREADY, then issues NONSEQ and SEQ beats
// with the usual one-cycle address/data pipeline, honouring HREADY wait states.
// HRESP is not acted on. The burst support and interleaving are those of the
// extended core; the ring addressing and the arbitration details are this
// design's choices.
module ahb_master
  import shyloc_pkg::*;
#(
  parameter int unsigned  BURST     = 16,
  parameter int unsigned  CW        = 28,            // sample counter width
  parameter int unsigned  RING_LOG2 = 18,
  parameter logic [31:0]  BASE      = 32'h0000_0000,
  parameter int unsigned  FW        = 6              // FIFO count width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,      // new image: counters to zero
  input  logic [CW-1:0]  n_wr,
  input  logic [CW-1:0]  n_rd,
  input  logic [CW-1:0]  gap,
  // to-AHB FIFO (samples to write)
  input  logic [FW-1:0]  wf_count,
  input  logic [31:0]    wf_data,
  output logic           wf_pop,
  // from-AHB FIFO (samples read back)
  input  logic [FW-1:0]  rf_free,
  output logic           rf_push,
  output logic [31:0]    rf_data,
  output logic [CW-1:0]  wr_cnt,     // samples written so far
  output logic [CW-1:0]  rd_cnt,     // samples read so far
  output logic [31:0]    n_bursts,   // bursts issued (statistics)
  // AHB
  output logic           hbusreq,
  input  logic           hgrant,
  output logic [31:0]    haddr,
  output logic [1:0]     htrans,
  output logic           hwrite,
  output logic [2:0]     hsize,
  output logic [2:0]     hburst,
  output logic [3:0]     hprot,
  output logic [31:0]    hwdata,
  input  logic           hready,
  input  logic [1:0]     hresp,
  input  logic [31:0]    hrdata
);

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_BURST } state_e;

  state_e       st_q;
  logic         wr_q;         // current burst is a write
  logic         last_wr_q;    // previous burst was a write
  logic [4:0]   len_q;        // beats in the burst
  logic [4:0]   a_cnt_q;      // beats whose address phase is done
  logic         d_v_q;        // a data phase is in progress
  logic [CW-1:0] base_q;      // sample index of the first beat

  // Burst candidates.
  logic [CW-1:0] wr_left, rd_left;
  logic [4:0]    wlen, rlen;
  logic          can_wr, can_rd, go_wr, go_rd;

  always_comb begin
    wr_left = n_wr - wr_cnt;
    rd_left = n_rd - rd_cnt;
    wlen    = (wr_left >= CW'(BURST)) ? 5'(BURST) : 5'(wr_left);
    rlen    = (rd_left >= CW'(BURST)) ? 5'(BURST) : 5'(rd_left);
    can_wr  = (wr_left != '0) && (CW'(wf_count) >= CW'(wlen))
              && ((wr_cnt + CW'(wlen) - rd_cnt) <= (CW'(1) << RING_LOG2));
    can_rd  = (rd_left != '0) && (FW'(rlen) <= rf_free)
              && ((rd_cnt + CW'(rlen) + gap <= wr_cnt) || (wr_cnt == n_wr));
    go_rd   = can_rd && (last_wr_q || !can_wr);
    go_wr   = can_wr && !go_rd;
  end

  logic addr_active;
  assign addr_active = (st_q == S_BURST) && (a_cnt_q < len_q);

  assign hbusreq = (st_q == S_REQ) || addr_active;
  assign htrans  = !addr_active ? HTRANS_IDLE : (a_cnt_q == '0) ? HTRANS_NONSEQ : HTRANS_SEQ;
  logic [31:0] ring_idx;
  assign ring_idx = 32'(base_q + CW'(a_cnt_q)) & ((32'd1 << RING_LOG2) - 32'd1);
  assign haddr    = BASE + (ring_idx << 2);
  assign hwrite  = wr_q;
  assign hsize   = HSIZE_WORD;
  assign hprot   = 4'b0011;
  assign hburst  = (len_q == 5'd16) ? HBURST_INCR16 : (len_q == 5'd8) ? HBURST_INCR8 :
                   (len_q == 5'd4) ? HBURST_INCR4 : (len_q == 5'd1) ? HBURST_SINGLE : HBURST_INCR;
  assign hwdata  = wf_data;
  assign rf_data = hrdata;
  assign wf_pop  = (st_q == S_BURST) && d_v_q && hready && wr_q;
  assign rf_push = (st_q == S_BURST) && d_v_q && hready && !wr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; wr_q <= 1'b0; last_wr_q <= 1'b0; len_q <= '0; a_cnt_q <= '0; d_v_q <= 1'b0;
      base_q <= '0; wr_cnt <= '0; rd_cnt <= '0; n_bursts <= '0;
    end else if (start) begin
      st_q <= S_IDLE; last_wr_q <= 1'b0; d_v_q <= 1'b0; a_cnt_q <= '0;
      wr_cnt <= '0; rd_cnt <= '0; n_bursts <= '0;
    end else begin
      case (st_q)
        S_IDLE: begin
          if (go_wr || go_rd) begin
            st_q      <= S_REQ;
            wr_q      <= go_wr;
            last_wr_q <= go_wr;
            len_q     <= go_wr ? wlen : rlen;
            base_q    <= go_wr ? wr_cnt : rd_cnt;
            a_cnt_q   <= '0;
            d_v_q     <= 1'b0;
          end
        end
        S_REQ: if (hgrant && hready) begin
          st_q     <= S_BURST;
          n_bursts <= n_bursts + 1;
        end
        S_BURST: if (hready) begin
          if (d_v_q) begin
            if (wr_q) wr_cnt <= wr_cnt + 1'b1;
            else      rd_cnt <= rd_cnt + 1'b1;
          end
          d_v_q <= addr_active;
          if (addr_active) a_cnt_q <= a_cnt_q + 1'b1;
          else if (d_v_q || a_cnt_q == len_q) st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A burst is only started with its data (write) or its space (read) at hand,
  // and the master never leaves a burst half issued.
  a_wr_data:  assert property (@(posedge clk) disable iff (!rst_n) wf_pop |-> wf_count != '0);
  a_rd_space: assert property (@(posedge clk) disable iff (!rst_n) rf_push |-> rf_free != '0);
  a_no_busy:  assert property (@(posedge clk) disable iff (!rst_n) htrans != HTRANS_BUSY);

endmodule
