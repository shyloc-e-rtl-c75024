// compute_lk: lengths of a CCSDS-121 block coded with the fundamental sequence
// (k = 0) and with every sample-splitting option k = 1..K_MAX, the winner L_k,
// and the all-zero test used for the zero-block option.
//
// Each mapped residual delta contributes (delta >> k) + 1 + k bits to option k.
// A reference sample is not compressed or split: it adds D bits to every option and
// is left out of the all-zero test. All options are accumulated in parallel, one
// sample per cycle; `clear` starts a new block. The winner (shortest, lowest k on a
// tie) is combinational from the accumulators, so it is valid the cycle after the
// last sample was accepted. Lengths count data bits only, without the identifier.
module compute_lk
  import shyloc_pkg::*;
#(
  parameter int unsigned D     = 16,
  parameter int unsigned J     = 32,
  parameter int unsigned LEN_W = D + 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [D-1:0]     in_delta,
  input  logic             in_ref,
  output logic [LEN_W-1:0] best_len,
  output logic [4:0]       best_k,
  output logic             all_zero
);

  localparam int unsigned KM = k_max(D);

  logic [LEN_W-1:0] len_q [KM+1];
  logic             zero_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= KM; k++) len_q[k] <= '0;
      zero_q <= 1'b1;
    end else if (clear) begin
      for (int k = 0; k <= KM; k++) len_q[k] <= '0;
      zero_q <= 1'b1;
    end else if (in_valid) begin
      for (int k = 0; k <= KM; k++) begin
        if (in_ref) len_q[k] <= len_q[k] + LEN_W'(D);
        else        len_q[k] <= len_q[k] + LEN_W'(in_delta >> k) + LEN_W'(k + 1);
      end
      if (!in_ref && in_delta != '0) zero_q <= 1'b0;
    end
  end

  always_comb begin
    best_len = len_q[0];
    best_k   = '0;
    for (int k = 1; k <= KM; k++) begin
      if (len_q[k] < best_len) begin
        best_len = len_q[k];
        best_k   = 5'(k);
      end
    end
  end

  assign all_zero = zero_q;

endmodule
