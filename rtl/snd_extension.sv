// snd_extension: second-extension option of the CCSDS-121 coder.
//
// Samples are taken in pairs (a, b) = (delta_2i, delta_2i+1) and each pair becomes
// gamma = (a + b)(a + b + 1)/2 + b, whose FS code is gamma + 1 bits long. If the
// block carries a reference sample, that sample is coded raw (D bits) and replaced
// by zero when forming the first pair. Each gamma is emitted, with its pair index,
// the cycle after the second sample of its pair is accepted, to be kept in the
// coder's gamma buffer. `clear` starts a new block; se_len is the running length
// of the data part of the block (identifier excluded).
module snd_extension
  import shyloc_pkg::*;
#(
  parameter int unsigned D     = 16,
  parameter int unsigned J     = 32,
  parameter int unsigned GW    = 2*D + 3,
  parameter int unsigned SLW   = 2*D + 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic [D-1:0]           in_delta,
  input  logic                   in_ref,
  output logic                   gamma_valid,
  output logic [GW-1:0]          gamma,
  output logic [$clog2(J/2)-1:0] gamma_idx,
  output logic [SLW-1:0]         se_len
);

  localparam int unsigned PW = $clog2(J/2);

  logic          half_q;   // first sample of a pair held
  logic [D-1:0]  a_q;
  logic [PW-1:0] pair_q;
  logic [D:0]    sum;
  logic [GW-1:0] g;

  always_comb begin
    sum = (D+1)'(a_q) + (D+1)'(in_delta);
    g   = GW'((GW'(sum) * (GW'(sum) + 1)) >> 1) + GW'(in_delta);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_q <= 1'b0; a_q <= '0; pair_q <= '0; se_len <= '0;
      gamma_valid <= 1'b0; gamma <= '0; gamma_idx <= '0;
    end else begin
      gamma_valid <= 1'b0;
      if (clear) begin
        half_q <= 1'b0; pair_q <= '0; se_len <= '0;
      end else if (in_valid) begin
        if (!half_q) begin
          a_q    <= in_ref ? '0 : in_delta;
          half_q <= 1'b1;
          if (in_ref) se_len <= se_len + SLW'(D);
        end else begin
          half_q      <= 1'b0;
          gamma_valid <= 1'b1;
          gamma       <= g;
          gamma_idx   <= pair_q;
          pair_q      <= pair_q + 1'b1;
          se_len      <= se_len + SLW'(g) + SLW'(1);
        end
      end
    end
  end

endmodule
