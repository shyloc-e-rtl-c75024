// ccsds121_ip: the CCSDS-121 compressor, unit-delay preprocessor followed by the
// block-adaptive entropy coder.
//
// Raw samples (or, with cfg.preproc_en = 0, residuals that are already mapped,
// for instance from the CCSDS-123 predictor) enter on a valid/ready stream with a
// `in_last` flag on the final sample; coded 32-bit words leave on a valid/ready
// stream and `done` rises once the last word has been sent. The preprocessor gets
// its configuration from the same structure as the coder, so both count blocks and
// reference intervals alike. `clear` prepares both for a new data set.
module ccsds121_ip
  import shyloc_pkg::*;
#(
  parameter int unsigned D = 16,   // dynamic range, 16 in the documented build (up to 32)
  parameter int unsigned J = 32    // block size, 32 in the documented build
) (
  input  logic         clk,
  input  logic         rst_n,
  input  c121_cfg_t    cfg,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_data,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [31:0]  out_word,
  output logic         done
);

  logic         p_valid, p_ready, p_ref;
  logic [D-1:0] p_data;

  ud_predictor #(.D(D), .J(J)) u_pre (
    .clk, .rst_n, .cfg, .clear, .in_valid, .in_ready, .in_data,
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data), .out_ref(p_ref));

  ccsds121_coder #(.D(D), .J(J)) u_coder (
    .clk, .rst_n, .cfg, .clear, .in_valid(p_valid), .in_ready(p_ready), .in_delta(p_data),
    .in_ref(p_ref), .in_last, .out_valid, .out_ready, .out_word, .done);

endmodule
