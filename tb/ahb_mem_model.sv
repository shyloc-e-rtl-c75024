// ahb_mem_model: behavioural model of the external top-right samples memory with
// its AHB slave port and a one-master arbiter (not synthesizable intent).
//
// HGRANT follows HBUSREQ one cycle later. Address phases (NONSEQ/SEQ with HREADY
// high) are registered; in the data phase a write stores HWDATA, a read returns
// the word. When wait_pct > 0 the slave inserts random wait states (HREADY low)
// with that probability per data-phase cycle. Out-of-range addresses are an
// error. HRESP is always OKAY.
module ahb_mem_model #(
  parameter int unsigned AW_WORDS = 18
) (
  input  int          wait_pct,
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hbusreq,
  output logic        hgrant,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic        hready,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata,
  output int          n_waits,
  output int          n_beats
);

  logic [31:0] mem [1 << AW_WORDS];
  logic        dp_q, dw_q, stall;
  logic [31:0] da_q;

  assign hresp  = 2'b00;
  assign hready = !(dp_q && stall);
  assign hrdata = mem[da_q[AW_WORDS+1:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hgrant <= 1'b0; dp_q <= 1'b0; dw_q <= 1'b0; da_q <= '0; stall <= 1'b0;
      n_waits <= 0; n_beats <= 0;
    end else begin
      hgrant <= hbusreq;
      stall  <= (wait_pct > 0) && (int'($urandom % 100) < wait_pct);
      if (dp_q && stall) n_waits <= n_waits + 1;
      if (hready) begin
        if (dp_q && dw_q) mem[da_q[AW_WORDS+1:2]] <= hwdata;
        if (dp_q) n_beats <= n_beats + 1;
        dp_q <= htrans[1];
        dw_q <= hwrite;
        da_q <= haddr;
        if (htrans[1] && haddr[31:AW_WORDS+2] != '0) $error("AHB address out of range %h", haddr);
      end
    end
  end

endmodule
