// bit_packer: final packer of the CCSDS-121 coder. Concatenates variable-length
// fields MSB first into 32-bit output words.
//
// A 64-bit accumulator holds `cnt` pending bits, left aligned. A field is accepted
// while fewer than 32 bits are pending; a word leaves as soon as 32 are pending.
// A pulse on `flush` pads the last partial word with zeros, sends it, and then
// pulses `flushed`. Accepting a field and sending a word never happen in the same
// cycle. The 32-bit output width is the one of the document's implementations;
// the accumulator scheme is this design's.
module bit_packer
  import shyloc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  field_t      in_field,
  input  logic        flush,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_word,
  output logic        flushed
);

  logic [63:0] acc_q;
  logic [6:0]  cnt_q;
  logic        flush_q;
  logic [63:0] ext;

  assign in_ready  = (cnt_q < 7'd32) && !flush_q;
  assign out_valid = (cnt_q >= 7'd32) || (flush_q && cnt_q != '0);
  assign out_word  = acc_q[63:32];
  assign ext       = {32'b0, in_field.bits & ((in_field.len == LEN_BITS'(32)) ? 32'hFFFF_FFFF
                                              : ((32'd1 << in_field.len) - 32'd1))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0; cnt_q <= '0; flush_q <= 1'b0; flushed <= 1'b0;
    end else begin
      flushed <= 1'b0;
      if (flush) flush_q <= 1'b1;
      if (out_valid && out_ready) begin
        acc_q <= acc_q << 32;
        cnt_q <= (cnt_q >= 7'd32) ? cnt_q - 7'd32 : '0;
      end else if (in_valid && in_ready && in_field.len != '0) begin
        acc_q <= acc_q | (ext << (7'd64 - cnt_q - 7'(in_field.len)));
        cnt_q <= cnt_q + 7'(in_field.len);
      end else if (flush_q && cnt_q == '0) begin
        flush_q <= 1'b0;
        flushed <= 1'b1;
      end
    end
  end

endmodule
