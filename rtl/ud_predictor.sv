// ud_predictor: CCSDS-121 unit-delay preprocessor (predictor, residual, mapper)
// with the reference-sample bypass.
//
// The prediction of sample x_i is the previous sample x_{i-1}, held in a register.
// The residual D = x - x_hat is mapped to a non-negative integer delta (D bits) with
// theta = min(x_hat - x_min, x_max - x_hat):
//   delta = 2D          if 0 <= D <= theta
//         = 2|D| - 1    if -theta <= D < 0
//         = theta + |D| otherwise.
// The first sample of every r-th block of J samples is a reference sample: the
// predictor is bypassed, the raw sample goes out with out_ref = 1 and loads the
// register. With cfg.preproc_en = 0 every sample is passed unchanged (the input is
// then already a mapped residual). Samples may be unsigned or two's complement
// (cfg.signed_in); the bounds x_min, x_max follow.
//
// Interface: valid/ready stream in and out, combinational (zero latency): a sample
// is consumed in the cycle in which out_ready is high. `clear` restarts the sample
// and block counters for a new data set. The structure (register, subtraction,
// mapper, bypass) follows the CCSDS-121 preprocessor; the counters that decide
// where reference samples fall are this design's choice.
module ud_predictor
  import shyloc_pkg::*;
#(
  parameter int unsigned D = 16,   // dynamic range in bits
  parameter int unsigned J = 32    // block size
) (
  input  logic          clk,
  input  logic          rst_n,
  input  c121_cfg_t     cfg,
  input  logic          clear,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [D-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [D-1:0]  out_data,
  output logic          out_ref
);

  localparam int unsigned JW = $clog2(J);

  logic [D-1:0]  prev_q;
  logic [JW-1:0] samp_q;    // index of the sample inside its block
  logic [12:0]   blk_q;     // index of the block inside the reference interval
  logic          is_ref;

  logic signed [D+1:0] x, xh, xmin, xmax, delta_r, mag;
  logic        [D+1:0] theta;
  logic        [D+1:0] mapped;

  always_comb begin
    if (cfg.signed_in) begin
      x    = (D+2)'($signed(in_data));
      xh   = (D+2)'($signed(prev_q));
      xmin = -(D+2)'(signed'(1) <<< (D-1));
      xmax = ((D+2)'(1) <<< (D-1)) - 1;
    end else begin
      x    = (D+2)'(in_data);
      xh   = (D+2)'(prev_q);
      xmin = '0;
      xmax = ((D+2)'(1) <<< D) - 1;
    end
    theta   = ((xh - xmin) < (xmax - xh)) ? (xh - xmin) : (xmax - xh);
    delta_r = x - xh;
    mag     = (delta_r < 0) ? -delta_r : delta_r;
    if (delta_r >= 0 && delta_r <= $signed(theta))      mapped = 2 * delta_r;
    else if (delta_r < 0 && mag <= $signed(theta))      mapped = 2 * mag - 1;
    else                                                mapped = theta + mag;
  end

  assign is_ref    = cfg.preproc_en && (samp_q == '0) && (blk_q == '0);
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_ref   = is_ref;
  assign out_data  = (!cfg.preproc_en || is_ref) ? in_data : mapped[D-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q <= '0;
      samp_q <= '0;
      blk_q  <= '0;
    end else if (clear) begin
      samp_q <= '0;
      blk_q  <= '0;
    end else if (in_valid && out_ready) begin
      prev_q <= in_data;
      samp_q <= (samp_q == JW'(J-1)) ? '0 : samp_q + 1'b1;
      if (samp_q == JW'(J-1))
        blk_q <= (blk_q == cfg.ref_interval - 13'd1) ? '0 : blk_q + 13'd1;
    end
  end

endmodule
