// tb_bit_packer: random fields of 0..32 bits with random back-pressure on both
// sides, then a flush; the output words must be the fields concatenated MSB first,
// zero padded to a whole word.
`timescale 1ns/1ps
module tb_bit_packer;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, flush, out_valid, out_ready, flushed;
  field_t in_field;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  bit_packer dut (.*);

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit e[$];
    logic [31:0] got[$];
    int n = 0, lens[$];
    logic [31:0] vals[$];
    in_valid = 0; flush = 0; out_ready = 0; in_field = '0;
    for (int i = 0; i < 2000; i++) begin
      lens.push_back((i % 50 == 0) ? 32 : (i % 37 == 0) ? 0 : $urandom % 33);
      vals.push_back($urandom);
      put(e, vals[i], lens[i]);
    end
    while (e.size() % 32 != 0) e.push_back(0);
    repeat (2) @(negedge clk); rst_n = 1;
    while (!flushed) begin
      @(negedge clk);
      in_valid = (n < lens.size()) && ($urandom % 4 != 0);
      in_field.bits = (n < lens.size()) ? vals[n] : '0;
      in_field.len  = (n < lens.size()) ? LEN_BITS'(lens[n]) : '0;
      out_ready = $urandom % 3 != 0;
      flush = (n == lens.size()) && !flush;
      #1;
      if (in_valid && in_ready) n++;
      if (out_valid && out_ready) got.push_back(out_word);
    end
    checks++;
    if (got.size() * 32 != e.size()) begin failures++; $display("%0d words", got.size()); end
    for (int w = 0; w < got.size() && w*32 < e.size(); w++) begin
      logic [31:0] x;
      for (int j = 0; j < 32; j++) x[31-j] = e[w*32+j];
      checks++;
      if (got[w] != x) begin failures++; if (failures < 6) $display("word %0d %h expected %h", w, got[w], x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
