// tb_fs_coder: every option (zero-block, second extension, FS, splitting with
// several k, no compression), with and without a reference sample, is written
// for random block contents; the emitted fields are concatenated and compared bit
// by bit with the codeword built from the CCSDS-121 layout. Field back-pressure is
// random.
`timescale 1ns/1ps
module tb_fs_coder;
  import shyloc_pkg::*;
  import shyloc_ref_pkg::*;
  localparam int D = 16, J = 32, GW = 2*D + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, has_ref, out_valid, out_ready, busy, done;
  option_e option;
  logic [4:0] k;
  logic [D-1:0] ref_value;
  logic [6:0] zb_code;
  logic [4:0] blk_addr;
  logic [3:0] gam_addr;
  logic [D-1:0] blk_data;
  logic [GW-1:0] gam_data;
  field_t out_field;
  longint unsigned blk[J], gam[J/2];
  int checks = 0, failures = 0;

  assign blk_data = D'(blk[blk_addr]);
  assign gam_data = GW'(gam[gam_addr]);

  fs_coder #(.D(D), .J(J)) dut (.*);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(option_e o, int kk, bit hr, int zc);
    bit e[$], g[$];
    int m = (o == OPT_NC) ? 65536 : (o == OPT_SE) ? 3 : (kk == 0) ? 6 : (1 << (kk + 2));
    for (int i = 0; i < J; i++) blk[i] = $urandom % m;
    if (o == OPT_K && kk == 0) blk[5] = 70;      // an FS code longer than one field
    for (int i = 0; i < J/2; i++) gam[i] = $urandom % 50;
    // expected bits
    case (o)
      OPT_ZB: put(e, 0, 5);
      OPT_SE: put(e, 1, 5);
      OPT_NC: put(e, 15, 4);
      default: put(e, kk + 1, 4);
    endcase
    if (hr) put(e, 16'hA5C3, D);
    case (o)
      OPT_ZB: put_fs(e, zc);
      OPT_SE: for (int i = 0; i < J/2; i++) put_fs(e, gam[i]);
      OPT_NC: for (int i = hr ? 1 : 0; i < J; i++) put(e, blk[i], D);
      default: begin
        for (int i = hr ? 1 : 0; i < J; i++) put_fs(e, blk[i] >> kk);
        for (int i = hr ? 1 : 0; i < J; i++) put(e, blk[i], kk);
      end
    endcase
    @(negedge clk);
    start = 1; option = o; k = 5'(kk); has_ref = hr; ref_value = 16'hA5C3; zb_code = 7'(zc);
    @(negedge clk) start = 0;
    while (1) begin
      out_ready = $urandom % 4 != 0;
      #1;
      if (out_valid && out_ready) put(g, out_field.bits, out_field.len);
      if (done) break;
      @(negedge clk);
    end
    checks++;
    if (g != e) begin
      failures++; $display("option %0d k %0d ref %0d: %0d bits, expected %0d", o, kk, hr, g.size(), e.size());
    end
  endtask

  initial begin
    start = 0; option = OPT_NC; k = 0; has_ref = 0; ref_value = '0; zb_code = '0; out_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      one(OPT_ZB, 0, r, 0); one(OPT_ZB, 0, r, 4); one(OPT_ZB, 0, r, 63);
      one(OPT_SE, 0, r, 0); one(OPT_NC, 0, r, 0);
      for (int kk = 0; kk <= 13; kk += 1) one(OPT_K, kk, r, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
