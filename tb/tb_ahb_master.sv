// tb_ahb_master: the AHB master between two coupling FIFOs and a behavioural
// memory with random wait states. A producer fills the to-AHB FIFO at a random
// rate, a consumer drains the from-AHB FIFO at a random rate. Checked: the data
// read back is the data written, in order; every burst is NONSEQ then SEQ beats
// at consecutive word addresses, with HBURST matching its length (16 except the
// last ones), never longer than 16 beats; a read burst starts only when the
// writes are one gap (spectral row) ahead of it or all done; reads and writes
// interleave; the counts of samples and bursts are right.
`timescale 1ns/1ps
module tb_ahb_master;
  import shyloc_pkg::*;
  localparam int BURST = 16, CW = 20, FW = 6, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, wf_pop, rf_push, prod_push, cons_pop, wf_full, rf_full, wf_empty, rf_empty;
  logic [CW-1:0] n_wr, n_rd, gap, wr_cnt, rd_cnt;
  logic [FW-1:0] wf_count, rf_count;
  logic [31:0] wf_data, rf_data, rf_head, prod_data, n_bursts;
  logic hbusreq, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp; logic [2:0] hsize, hburst; logic [3:0] hprot;
  int n_waits, n_beats, wait_pct;

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_wf (.clk, .rst_n, .clear(start), .push(prod_push),
    .wr_data(prod_data), .pop(wf_pop), .rd_data(wf_data), .count(wf_count), .full(wf_full), .empty(wf_empty));
  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_rf (.clk, .rst_n, .clear(start), .push(rf_push),
    .wr_data(rf_data), .pop(cons_pop), .rd_data(rf_head), .count(rf_count), .full(rf_full), .empty(rf_empty));

  ahb_master #(.BURST(BURST), .CW(CW), .RING_LOG2(10), .FW(FW)) dut (
    .clk, .rst_n, .start, .n_wr, .n_rd, .gap, .wf_count, .wf_data, .wf_pop,
    .rf_free(FW'(DEPTH) - rf_count), .rf_push, .rf_data, .wr_cnt, .rd_cnt, .n_bursts,
    .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hwdata, .hready,
    .hresp, .hrdata);

  ahb_mem_model #(.AW_WORDS(10)) u_mem (.clk, .rst_n, .wait_pct, .hbusreq, .hgrant, .haddr,
    .htrans, .hwrite, .hwdata, .hready, .hresp, .hrdata, .n_waits, .n_beats);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // bus protocol monitor
  int beat, blen, ob, nburst_seen, switches;
  logic [31:0] next_addr;
  logic last_dir;
  always @(posedge clk) if (rst_n && hready && htrans[1]) begin
    checks++;
    if (htrans == HTRANS_NONSEQ) begin
      if (beat != blen) begin failures++; $display("burst cut short"); end
      blen = (hburst == HBURST_INCR16) ? 16 : (hburst == HBURST_INCR8) ? 8 : (hburst == HBURST_INCR4) ? 4 :
             (hburst == HBURST_SINGLE) ? 1 : -1;
      ob = hwrite ? wr_cnt : rd_cnt;
      if (blen == -1) blen = hwrite ? int'(n_wr - wr_cnt) : int'(n_rd - rd_cnt);
      if (blen > BURST) begin failures++; $display("burst too long"); end
      if (!hwrite && !(rd_cnt + CW'(blen) + gap <= wr_cnt || wr_cnt == n_wr)) begin
        failures++; $display("read burst at %0d before the gap was filled (writes %0d)", rd_cnt, wr_cnt);
      end
      if (nburst_seen > 0 && hwrite != last_dir) switches++;
      last_dir = hwrite;
      nburst_seen++;
      beat = 1;
    end else begin
      if (haddr != next_addr) begin failures++; $display("address %h expected %h", haddr, next_addr); end
      beat++;
    end
    next_addr = haddr + 4;
  end

  task automatic run(int nw, int nr, int g, int wp);
    logic [31:0] data[$];
    int p = 0, c = 0, nerr = 0;
    for (int i = 0; i < nw; i++) data.push_back($urandom);
    wait_pct = wp;
    @(negedge clk) begin start = 1; n_wr = CW'(nw); n_rd = CW'(nr); gap = CW'(g); end
    @(negedge clk) start = 0;
    beat = 0; blen = 0; nburst_seen = 0; switches = 0;
    while (c < nr || wr_cnt != CW'(nw)) begin
      prod_push = (p < nw) && !wf_full && ($urandom % 3 != 0);
      prod_data = (p < nw) ? data[p] : '0;
      cons_pop  = !rf_empty && ($urandom % 3 != 0);
      #1;
      if (cons_pop) begin
        checks++;
        if (rf_head != data[c]) begin failures++; nerr++; if (nerr < 4) $display("read %0d wrong", c); end
        c++;
      end
      if (prod_push) p++;
      @(negedge clk);
      prod_push = 0; cons_pop = 0;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (rd_cnt != CW'(nr) || n_bursts != 32'((nw + BURST - 1) / BURST + (nr + BURST - 1) / BURST)) begin
      failures++; $display("reads %0d bursts %0d", rd_cnt, n_bursts);
    end
    checks++;
    if (switches == 0) begin failures++; $display("reads and writes never interleaved"); end
  endtask

  initial begin
    start = 0; n_wr = 0; n_rd = 0; gap = 0; prod_push = 0; prod_data = 0; cons_pop = 0; wait_pct = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(600, 600 - 5*9, 10*9, 30);     // Nx = 10, Nz = 9 style gap
    run(437, 437 - 3*7, 4*7, 0);       // lengths that end in short bursts
    run(300, 300 - 2*16, 3*16, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
