// option_coder: chooses the coding option of one CCSDS-121 block.
//
// Inputs are the data lengths computed by compute_lk (winner L_k over FS and the
// splitting options) and snd_extension, plus the all-zero flag. A block whose
// residuals are all zero goes to the zero-block option. Otherwise the candidates,
// with their identifier lengths added (ID_LEN + 1 for the second extension), are
// compared and the strictly shortest wins, with the preference order
// L_k winner, second extension, no compression on ties. Purely combinational.
module option_coder
  import shyloc_pkg::*;
#(
  parameter int unsigned D     = 16,
  parameter int unsigned J     = 32,
  parameter int unsigned LEN_W = D + 8,
  parameter int unsigned SLW   = 2*D + 8
) (
  input  logic             all_zero,
  input  logic [LEN_W-1:0] lk_len,
  input  logic [4:0]       lk_k,
  input  logic [SLW-1:0]   se_len,
  output option_e          option,
  output logic [4:0]       k
);

  localparam int unsigned IDL = id_len(D);
  localparam longint unsigned NC_LEN = longint'(J) * longint'(D) + longint'(IDL);

  logic [SLW:0] lk_tot, se_tot, best;

  always_comb begin
    lk_tot = (SLW+1)'(lk_len) + (SLW+1)'(IDL);
    se_tot = (SLW+1)'(se_len) + (SLW+1)'(IDL + 1);
    option = OPT_K;
    k      = lk_k;
    best   = lk_tot;
    if (se_tot < best) begin
      option = OPT_SE;
      k      = '0;
      best   = se_tot;
    end
    if ((SLW+1)'(NC_LEN) < best) begin
      option = OPT_NC;
      k      = '0;
    end
    if (all_zero) begin
      option = OPT_ZB;
      k      = '0;
    end
  end

endmodule
