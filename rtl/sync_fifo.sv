// sync_fifo: single-clock first-in first-out buffer, used as the coupling FIFOs
// between the predictor and the AHB master and as the FIFO of current samples.
//
// DEPTH entries of W bits in a register array with read and write pointers. The
// head is visible on `rd_data` whenever `count` is not zero (first-word fall
// through); a push and a pop may happen in the same cycle. Pushing when full or
// popping when empty is a protocol error, checked by assertions.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic [W-1:0]               wr_data,
  input  logic                       pop,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;

  assign rd_data = mem[rp_q];
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; count <= '0;
    end else if (clear) begin
      wp_q <= '0; rp_q <= '0; count <= '0;
    end else begin
      if (push) wp_q <= inc(wp_q);
      if (pop)  rp_q <= inc(rp_q);
      count <= count + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
