// shyloc_ref_pkg: reference models used by the testbenches, written as plain
// sequential code over whole data sets, independent of the RTL structure.
//   ud_map     CCSDS-121 unit-delay prediction and mapping of one sample
//   enc121     CCSDS-121 block-adaptive coding of a residual sequence to 32-bit words
//   pred123    CCSDS-123 (Issue 1) prediction and mapping of a BIP-ordered image
//   sa123      CCSDS-123 (Issue 1) sample-adaptive coding of residuals to 32-bit words
package shyloc_ref_pkg;

  typedef longint unsigned u64_q[$];
  typedef logic [31:0] word_q[$];

  function automatic int idl(int n);
    if (n <= 2) return 1; if (n <= 4) return 2; if (n <= 8) return 3; if (n <= 16) return 4; return 5;
  endfunction

  function automatic int kmx(int n);
    int k = (1 << idl(n)) - 3;
    if (k > n - 1) k = n - 1;
    return k;
  endfunction

  // Mapped residual of x predicted by xp (values given as integers in range).
  function automatic longint ud_map(longint x, longint xp, int D, bit sgn);
    longint xmin, xmax, th, dl;
    xmin = sgn ? -(longint'(1) << (D-1)) : 0;
    xmax = sgn ? (longint'(1) << (D-1)) - 1 : (longint'(1) << D) - 1;
    th = (xp - xmin < xmax - xp) ? xp - xmin : xmax - xp;
    dl = x - xp;
    if (dl >= 0 && dl <= th) return 2 * dl;
    if (dl < 0 && -dl <= th) return -2 * dl - 1;
    return th + (dl < 0 ? -dl : dl);
  endfunction

  // ---------------------------------------------------------------- CCSDS-121
  function automatic void put(ref bit bq[$], input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) bq.push_back(v[i]);
  endfunction

  function automatic void put_fs(ref bit bq[$], input longint unsigned v);
    for (longint unsigned i = 0; i < v; i++) bq.push_back(1'b0);
    bq.push_back(1'b1);
  endfunction

  function automatic void put_zb(ref bit bq[$], input int D, input int code, input bit hr,
                                 input longint unsigned rv);
    put(bq, 0, idl(D) + 1);
    if (hr) put(bq, rv, D);
    put_fs(bq, code);
  endfunction

  // d: residuals, reference samples (first sample of every r-th block when
  // preproc) hold the raw sample. Returns the packed words; also counts options.
  function automatic word_q enc121(input int D, input int J, input bit preproc, input int r,
                                   input u64_q d, ref int opt_hist[4]);
    bit bq[$];
    word_q wq;
    int nb, zc, IDL, KM;
    bit zr;
    longint unsigned zv;
    IDL = idl(D); KM = kmx(D);
    nb = (d.size() + J - 1) / J;
    zc = 0; zr = 0; zv = 0;
    for (int b = 0; b < nb; b++) begin
      longint unsigned blk[] = new[J];
      bit hr, az, last;
      int seg;
      for (int i = 0; i < J; i++) blk[i] = (b*J + i < d.size()) ? d[b*J + i] : 0;
      hr = preproc && (b % r == 0);
      seg = b % 64; last = (b == nb - 1);
      az = 1;
      for (int i = (hr ? 1 : 0); i < J; i++) if (blk[i] != 0) az = 0;
      if (zc > 0 && (!az || hr)) begin
        put_zb(bq, D, (zc <= 4) ? zc - 1 : zc, zr, zv); opt_hist[0]++; zc = 0;
      end
      if (az) begin
        if (zc == 0) begin zr = hr; zv = blk[0]; end
        zc++;
        if (seg == 63 || last) begin
          put_zb(bq, D, (zc >= 5) ? 4 : zc - 1, zr, zv); opt_hist[0]++; zc = 0;
        end
      end else begin
        longint unsigned lk, lbest, lse, g, a;
        int kb, opt;
        lbest = 0; kb = 0;
        for (int k = 0; k <= KM; k++) begin
          lk = hr ? D : 0;
          for (int i = (hr ? 1 : 0); i < J; i++) lk += (blk[i] >> k) + 1 + k;
          if (k == 0 || lk < lbest) begin lbest = lk; kb = k; end
        end
        lse = hr ? D : 0;
        for (int i = 0; i < J; i += 2) begin
          a = (hr && i == 0) ? 0 : blk[i];
          g = (a + blk[i+1]) * (a + blk[i+1] + 1) / 2 + blk[i+1];
          lse += g + 1;
        end
        opt = 2; lk = lbest + IDL;
        if (lse + IDL + 1 < lk) begin opt = 1; lk = lse + IDL + 1; end
        if (longint'(J) * D + IDL < lk) opt = 3;
        opt_hist[opt]++;
        case (opt)
          1: begin
            put(bq, 1, IDL + 1);
            if (hr) put(bq, blk[0], D);
            for (int i = 0; i < J; i += 2) begin
              a = (hr && i == 0) ? 0 : blk[i];
              put_fs(bq, (a + blk[i+1]) * (a + blk[i+1] + 1) / 2 + blk[i+1]);
            end
          end
          2: begin
            put(bq, kb + 1, IDL);
            if (hr) put(bq, blk[0], D);
            for (int i = (hr ? 1 : 0); i < J; i++) put_fs(bq, blk[i] >> kb);
            for (int i = (hr ? 1 : 0); i < J; i++) put(bq, blk[i], kb);
          end
          default: begin
            put(bq, (1 << IDL) - 1, IDL);
            for (int i = 0; i < J; i++) put(bq, blk[i], D);
          end
        endcase
      end
    end
    while (bq.size() % 32 != 0) bq.push_back(1'b0);
    for (int i = 0; i < bq.size(); i += 32) begin
      logic [31:0] w;
      for (int j = 0; j < 32; j++) w[31-j] = bq[i+j];
      wq.push_back(w);
    end
    return wq;
  endfunction

  // Unit-delay preprocessing of a sample sequence (values as D-bit patterns).
  function automatic u64_q pre121(input int D, input int J, input bit sgn, input int r,
                                  input u64_q x);
    u64_q o;
    longint prev, v;
    prev = 0;
    for (int i = 0; i < x.size(); i++) begin
      v = sgn ? ((x[i] >= (longint'(1) << (D-1))) ? longint'(x[i]) - (longint'(1) << D) : longint'(x[i]))
              : longint'(x[i]);
      if ((i % J == 0) && ((i / J) % r == 0)) o.push_back(x[i]);
      else o.push_back(ud_map(v, prev, D, sgn));
      prev = v;
    end
    return o;
  endfunction

  // ---------------------------------------------------------------- CCSDS-123
  // img in BIP order: index (y*nx + x)*nz + z. cw: custom weights [z*(P+3)+i]
  // (element 0 N, 1 W, 2 NW, 3+i band z-1-i), used when custom.
  function automatic u64_q pred123(input int D, input int P, input int OM, input int R,
                                   input int VMIN, input int VMAX, input int TINC_LOG,
                                   input int nx, input int ny, input int nz,
                                   input bit custom, input longint cw[$], input u64_q img);
    u64_q o;
    longint w[][];
    longint dcen[];
    longint smid, smax, wmax, wmin;
    smid = longint'(1) << (D-1); smax = (longint'(1) << D) - 1;
    wmax = (longint'(1) << (OM+2)) - 1; wmin = -(longint'(1) << (OM+2));
    w = new[nz];
    for (int z = 0; z < nz; z++) begin
      w[z] = new[P+3];
      for (int i = 0; i < P + 3; i++) begin
        if (custom) w[z][i] = cw[z*(P+3)+i];
        else if (i < 3) w[z][i] = 0;
        else begin
          longint v = (7 * (longint'(1) << OM)) / 8;
          for (int j = 3; j < i; j++) v = v / 8;
          w[z][i] = v;
        end
      end
    end
    dcen = new[img.size()];
    for (int y = 0; y < ny; y++)
      for (int x = 0; x < nx; x++)
        for (int z = 0; z < nz; z++) begin
          longint s, sg, u[], dh, sc, st, sh, dl, th, e, rho, t;
          int idx;
          idx = (y*nx + x)*nz + z;
          t = y*nx + x;
          s = img[idx];
          if (y == 0 && x > 0) sg = 4 * img[idx - nz];
          else if (y > 0 && x == 0) sg = 2 * (img[idx - nx*nz] + img[idx - nx*nz + nz]);
          else if (y > 0 && x == nx - 1) sg = img[idx - nz] + img[idx - nx*nz - nz] + 2 * img[idx - nx*nz];
          else if (y > 0) sg = img[idx - nz] + img[idx - nx*nz - nz] + img[idx - nx*nz] + img[idx - nx*nz + nz];
          else sg = 0;
          dcen[idx] = 4 * s - sg;
          u = new[P+3];
          if (y > 0) begin
            u[0] = 4 * img[idx - nx*nz] - sg;
            u[1] = (x > 0) ? 4 * img[idx - nz] - sg : 4 * img[idx - nx*nz] - sg;
            u[2] = (x > 0) ? 4 * img[idx - nx*nz - nz] - sg : 4 * img[idx - nx*nz] - sg;
          end else begin u[0] = 0; u[1] = 0; u[2] = 0; end
          for (int i = 1; i <= P; i++) u[2+i] = (z - i >= 0) ? dcen[idx - i] : 0;
          if (t == 0) st = (z > 0 && P > 0) ? 2 * img[idx - 1] : 2 * smid;
          else begin
            longint m;
            dh = 0;
            for (int i = 0; i < P + 3; i++) dh += w[z][i] * u[i];
            m = dh + (sg - 4 * smid) * (longint'(1) << OM);
            // reduce to an R-bit two's complement value
            m = m & ((R == 64) ? -1 : ((longint'(1) << R) - 1));
            if (R < 64 && m >= (longint'(1) << (R-1))) m = m - (longint'(1) << R);
            sc = (m >= 0) ? m / (longint'(1) << (OM+1)) : -((-m + (longint'(1) << (OM+1)) - 1) / (longint'(1) << (OM+1)));
            st = sc + 2 * smid + 1;
            if (st < 0) st = 0;
            if (st > 2 * smax + 1) st = 2 * smax + 1;
          end
          sh = st / 2;
          dl = s - sh;
          th = (sh < smax - sh) ? sh : smax - sh;
          if ((dl < 0 ? -dl : dl) > th) o.push_back((dl < 0 ? -dl : dl) + th);
          else if (((st % 2 == 1) ? -dl : dl) >= 0) o.push_back(2 * (dl < 0 ? -dl : dl));
          else o.push_back(2 * (dl < 0 ? -dl : dl) - 1);
          if (t > 0) begin
            e = 2 * s - st;
            if (t < nx) rho = VMIN;
            else begin
              rho = VMIN + (t - nx) / (longint'(1) << TINC_LOG);
              if (rho > VMAX) rho = VMAX;
            end
            rho = rho + D - OM;
            for (int i = 0; i < P + 3; i++) begin
              longint v, q, num, den;
              v = (e >= 0) ? u[i] : -u[i];
              // floor((v * 2^-rho + 1) / 2)
              if (rho >= 0) begin
                num = v + (longint'(1) << rho); den = longint'(1) << (rho + 1);
              end else begin
                num = v * (longint'(1) << (-rho)) + 1; den = 2;
              end
              q = (num >= 0) ? num / den : -((-num + den - 1) / den);
              w[z][i] = w[z][i] + q;
              if (w[z][i] > wmax) w[z][i] = wmax;
              if (w[z][i] < wmin) w[z][i] = wmin;
            end
          end
        end
    return o;
  endfunction

  // CCSDS-123 (Issue 1) sample-adaptive coding of a residual sequence, bands taken
  // from the order (BIP: band = i mod nz; BIL: band = (i / nx) mod nz), no header,
  // zero padded to 32-bit words.
  function automatic word_q sa123(input int D, input int UMAX, input int G0, input int GS,
                                  input int KZ, input int nx, input int nz, input bit bil,
                                  input u64_q d);
    bit bq[$];
    word_q wq;
    longint sig[], gam[];
    bit seen[];
    sig = new[nz]; gam = new[nz]; seen = new[nz];
    for (int z = 0; z < nz; z++) seen[z] = 0;
    for (int i = 0; i < d.size(); i++) begin
      int z, k;
      longint rhs, u;
      z = bil ? (i / nx) % nz : i % nz;
      if (!seen[z]) begin
        put(bq, d[i], D);
        gam[z] = longint'(1) << G0;
        sig[z] = ((3 * (longint'(1) << (KZ + 6)) - 49) * gam[z]) / 128;
        seen[z] = 1;
      end else begin
        rhs = sig[z] + (49 * gam[z]) / 128;
        k = 0;
        for (int kk = 1; kk <= D - 2; kk++) if ((gam[z] << kk) <= rhs) k = kk;
        u = longint'(d[i] >> k);
        if (u < UMAX) begin
          put_fs(bq, u);
          put(bq, d[i], k);
        end else begin
          put(bq, 0, UMAX);
          put(bq, d[i], D);
        end
        if (gam[z] < (longint'(1) << GS) - 1) begin
          sig[z] += longint'(d[i]); gam[z] += 1;
        end else begin
          sig[z] = (sig[z] + longint'(d[i]) + 1) / 2; gam[z] = (gam[z] + 1) / 2;
        end
      end
    end
    while (bq.size() % 32 != 0) bq.push_back(1'b0);
    for (int i = 0; i < bq.size(); i += 32) begin
      logic [31:0] w;
      for (int j = 0; j < 32; j++) w[31-j] = bq[i+j];
      wq.push_back(w);
    end
    return wq;
  endfunction

endpackage
