// tb_ccsds123_pred_core: drives the combinational predictor arithmetic through
// small images in BIP order. The testbench keeps the image, the central local
// differences it gets back and the weight vectors the core returns, and supplies
// neighbours, previous-band differences and weights as the BIP architecture
// would. Every mapped residual is compared with the reference predictor, which
// keeps its own weights, so a wrong local sum, difference, prediction, mapping or
// weight update shows. Default and custom initial weights are both used.
`timescale 1ns/1ps
module tb_ccsds123_pred_core;
  import shyloc_ref_pkg::*;
  localparam int D = 16, P = 3, OM = 13, DW = D + 3, WW = OM + 3, VW = (P + 3) * WW;
  logic [D-1:0] s, s_w, s_n, s_nw, s_ne, prev_s, delta;
  logic first_x, first_y, last_x;
  logic [19:0] t, nx;
  logic [8:0] z;
  logic [P*DW-1:0] dprev;
  logic [VW-1:0] w_in, w_out;
  logic signed [DW-1:0] d_c;
  int checks = 0, failures = 0;

  ccsds123_pred_core #(.D(D), .P(P), .OMEGA(OM)) dut (.*);

  task automatic run(int ix, int iy, int iz, bit cust, int base, int noise);
    u64_q img, exp;
    longint cw[$], dc[];
    logic [VW-1:0] wv[];
    int o = 0;
    for (int n = 0; n < ix*iy*iz; n++) img.push_back(base + 50*(n % iz) + ($urandom % noise));
    for (int n = 0; n < iz*(P+3); n++) cw.push_back(int'($urandom % 8192) - 4096);
    exp = pred123(D, P, OM, 32, -1, 3, 6, ix, iy, iz, cust, cw, img);
    dc = new[img.size()];
    wv = new[iz];
    for (int zz = 0; zz < iz; zz++)
      for (int e = 0; e < P + 3; e++)
        wv[zz][e*WW +: WW] = cust ? WW'(cw[zz*(P+3)+e]) :
                             (e < 3) ? '0 : WW'(7168 >> (3*(e-3)));
    nx = 20'(ix);
    for (int y = 0; y < iy; y++)
      for (int x = 0; x < ix; x++)
        for (int zz = 0; zz < iz; zz++) begin
          int idx = (y*ix + x)*iz + zz;
          s = D'(img[idx]);
          s_w  = (x > 0) ? D'(img[idx - iz]) : '0;
          s_n  = (y > 0) ? D'(img[idx - ix*iz]) : '0;
          s_nw = (y > 0 && x > 0) ? D'(img[idx - ix*iz - iz]) : '0;
          s_ne = (y > 0 && x < ix - 1) ? D'(img[idx - ix*iz + iz]) : '0;
          first_x = x == 0; first_y = y == 0; last_x = x == ix - 1;
          t = 20'(y*ix + x); z = 9'(zz);
          prev_s = (zz > 0) ? D'(img[idx - 1]) : '0;
          for (int i = 0; i < P; i++) dprev[i*DW +: DW] = (zz > i) ? DW'(dc[idx - 1 - i]) : '0;
          w_in = wv[zz];
          #1;
          dc[idx] = longint'(d_c);
          wv[zz] = w_out;
          checks++;
          if (delta != D'(exp[o])) begin
            failures++;
            if (failures < 6) $display("(%0d,%0d,%0d): %0d expected %0d", zz, y, x, delta, exp[o]);
          end
          o++;
        end
  endtask

  initial begin
    run(6, 5, 4, 0, 1000, 300);
    run(9, 7, 6, 1, 20000, 4000);
    run(4, 4, 3, 0, 0, 3);
    run(5, 40, 2, 0, 60000, 5000);     // weight-exponent ramp over many pixels, values near s_max
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
