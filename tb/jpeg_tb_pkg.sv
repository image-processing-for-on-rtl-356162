// jpeg_tb_pkg: test-picture generator and reference decoder for the JPEG
// decoder testbenches.
//
// make_picture() builds a complete baseline JPEG file for a picture of a
// given size and layout, together with the RGB values a correct decoder
// must produce. Instead of encoding an image, it draws the quantised DCT
// coefficients of every block at random (a random-walk DC, sparse AC with a
// few large values, forced long zero runs, blocks that end at coefficient
// 63 without EOB), Huffman-codes them and, independently of the design,
// decodes them again in floating point: de-quantise, separable IDCT with
// real cosines, +128, clamp, replicate chroma, JFIF colour conversion.
// The file holds an APP0 segment (to be skipped), one DQT segment with two
// tables, SOF0, one DHT segment with four tables, SOS, the entropy-coded
// data (0xFF bytes stuffed) and EOI.
//
// Tables are generated by rule, not stored: quantiser steps
// q0[k] = 3 + (3k)/4 and q1[k] = 5 + k (zigzag index k); DC tables with the
// code counts {0,1,5,1,1,1,1,1,1} and {0,3,1,1,1,1,1,1,1,1,1} for categories
// 0..11; AC tables holding EOB, every (run 0..15, size 1..10) symbol ordered
// by run+size, and ZRL, with 2,4,8,16,32,64,36 codes of lengths
// 2,4,6,8,10,12,16 (table 0) or 4,8,16,32,64,38 codes of lengths
// 3,5,7,9,11,16 (table 1).
//
// Setting quality to 1..100 scales both quantiser tables the usual way:
// step = (base * S + 50) / 100, limited to 1..255, with S = 5000 / quality
// below 50 and 200 - 2 * quality from 50 on (quality 0 keeps the base
// tables). The DC values drawn are then kept within +-1024 / step, the
// range of real pixel data.
package jpeg_tb_pkg;

  // Layouts, numbered as jpeg_pkg::mode_e.
  localparam int L_GRAY = 0, L_444 = 1, L_422 = 2, L_420 = 3;

  byte unsigned file[$];          // JPEG file bytes
  int           ref_r[], ref_g[], ref_b[];   // index y*w + x
  int           n_zrl, n_eob, n_full, n_stuff, n_big;
  // Coefficient tokens a decoder must produce, in order: {1'b0, k, value}
  // for a coefficient (DC always, AC when non-zero), -1 for end of block.
  int           tokens[$];
  byte unsigned ecs_plain[$];     // entropy-coded bytes without stuffing

  // Huffman tables, index {class, id}: 0 DC0, 1 DC1, 2 AC0, 3 AC1
  int bits [4][16];
  int vals [4][256];
  int nval [4];
  int code [4][256];   // by symbol
  int clen [4][256];
  int qt   [2][64];    // zigzag order
  int quality = 0;     // 0: base tables, 1..100: scaled

  // ------------------------------------------------------------ tables
  function automatic void build_tables();
    int order[$];
    int c;
    for (int t = 0; t < 4; t++) begin
      for (int l = 0; l < 16; l++) bits[t][l] = 0;
      nval[t] = 0;
    end
    // DC
    bits[0][1] = 1; bits[0][2] = 5;
    for (int l = 3; l <= 8; l++) bits[0][l] = 1;
    bits[1][1] = 3;
    for (int l = 2; l <= 10; l++) bits[1][l] = 1;
    for (int t = 0; t < 2; t++) begin
      for (int s = 0; s < 12; s++) vals[t][s] = s;
      nval[t] = 12;
    end
    // AC symbol order
    order.push_back(8'h00);
    for (int sum = 1; sum <= 25; sum++)
      for (int s = 1; s <= 10; s++)
        if (sum - s >= 0 && sum - s <= 15) order.push_back(((sum - s) << 4) | s);
    order.push_back(8'hF0);
    bits[2][1] = 2;  bits[2][3] = 4;  bits[2][5] = 8;  bits[2][7] = 16;
    bits[2][9] = 32; bits[2][11] = 64; bits[2][15] = 36;
    bits[3][2] = 4;  bits[3][4] = 8;  bits[3][6] = 16; bits[3][8] = 32;
    bits[3][10] = 64; bits[3][15] = 38;
    for (int t = 2; t < 4; t++) begin
      foreach (order[i]) vals[t][i] = order[i];
      nval[t] = order.size();
    end
    // canonical codes
    for (int t = 0; t < 4; t++) begin
      int n;
      c = 0; n = 0;
      for (int l = 0; l < 16; l++) begin
        for (int i = 0; i < bits[t][l]; i++) begin
          code[t][vals[t][n]] = c;
          clen[t][vals[t][n]] = l + 1;
          c++; n++;
        end
        c = c << 1;
      end
    end
    for (int k = 0; k < 64; k++) begin
      qt[0][k] = 3 + (3 * k) / 4;
      qt[1][k] = 5 + k;
    end
    if (quality > 0) begin
      int sc;
      sc = (quality < 50) ? 5000 / quality : 200 - 2 * quality;
      for (int t = 0; t < 2; t++)
        for (int k = 0; k < 64; k++) begin
          qt[t][k] = (qt[t][k] * sc + 50) / 100;
          if (qt[t][k] < 1) qt[t][k] = 1;
          if (qt[t][k] > 255) qt[t][k] = 255;
        end
    end
  endfunction

  // ------------------------------------------------------------ bits out
  byte unsigned ecs[$];
  int acc, nacc;

  function automatic void put_bits(int v, int n);
    for (int i = n - 1; i >= 0; i--) begin
      acc = (acc << 1) | ((v >> i) & 1);
      nacc++;
      if (nacc == 8) begin
        ecs.push_back(8'(acc));
        ecs_plain.push_back(8'(acc));
        if (acc == 8'hFF) begin
          ecs.push_back(8'h00);
          n_stuff++;
        end
        acc = 0; nacc = 0;
      end
    end
  endfunction

  function automatic int category(int v);
    int a, s;
    a = (v < 0) ? -v : v;
    s = 0;
    while (a != 0) begin a = a >> 1; s++; end
    return s;
  endfunction

  function automatic void put_value(int v, int s);
    if (s == 0) return;
    put_bits((v < 0) ? (v + (1 << s) - 1) : v, s);
  endfunction

  // ------------------------------------------------------------ zigzag
  function automatic int zz_nat(int k);
    int r, c;
    r = 0; c = 0;
    for (int i = 0; i < k; i++) begin
      if (((r + c) % 2) == 0) begin
        if (c == 7) r++; else if (r == 0) c++; else begin r--; c++; end
      end else begin
        if (r == 7) c++; else if (c == 0) r++; else begin r++; c--; end
      end
    end
    return r * 8 + c;
  endfunction

  // ------------------------------------------------------------ IDCT
  function automatic void ref_idct(input real f[64], output int pix[64]);
    real t[64];
    real s, cu;
    for (int v = 0; v < 8; v++)
      for (int x = 0; x < 8; x++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++) begin
          cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
          s += cu * f[v * 8 + u] * $cos((2 * x + 1) * u * 3.14159265358979 / 16.0);
        end
        t[v * 8 + x] = s / 2.0;
      end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        int p;
        s = 0.0;
        for (int v = 0; v < 8; v++) begin
          cu = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
          s += cu * t[v * 8 + x] * $cos((2 * y + 1) * v * 3.14159265358979 / 16.0);
        end
        p = int'($floor(s / 2.0 + 128.5));
        pix[y * 8 + x] = (p < 0) ? 0 : (p > 255) ? 255 : p;
      end
  endfunction

  function automatic int clamp8(real v);
    int p;
    p = int'($floor(v + 0.5));
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction

  // ------------------------------------------------------------ one block
  // Draws the coefficients of one block, codes them and returns its pixels.
  function automatic void code_block(input int dctab, input int actab, input int qsel,
                                     inout int pred, output int pix[64]);
    int q[64];
    int diff, s, run, last_nz, kind, lim;
    real f[64];
    for (int k = 0; k < 64; k++) q[k] = 0;
    // DC: random walk
    kind = $urandom_range(0, 15);
    diff = (kind == 0) ? $urandom_range(0, 300) - 150 : $urandom_range(0, 40) - 20;
    lim = 1024 / qt[qsel][0];
    if (lim > 250) lim = 250;
    if (pred + diff > lim || pred + diff < -lim) diff = -diff;
    if (pred + diff > lim) diff = lim - pred;
    if (pred + diff < -lim) diff = -lim - pred;
    q[0] = pred + diff;
    // AC
    kind = $urandom_range(0, 7);
    if (kind == 0) begin
      ;                                          // DC only
    end else if (kind == 1) begin
      q[1] = 3; q[40] = -2;                      // long run: two ZRL
    end else if (kind == 2) begin
      q[63] = 1; q[5] = -4;                      // ends at 63, no EOB
    end else begin
      for (int k = 1; k < 64; k++) begin
        int pr;
        pr = (k < 6) ? 60 : (k < 20) ? 20 : 3;
        if ($urandom_range(0, 99) < pr) begin
          q[k] = $urandom_range(1, 12);
          if ($urandom_range(0, 39) == 0) begin
            q[k] = $urandom_range(100, 600);
            if (q[k] * qt[qsel][k] > 32000) q[k] = 32000 / qt[qsel][k];
            n_big++;
          end
          if ($urandom_range(0, 1) == 1) q[k] = -q[k];
        end
      end
    end
    // code DC
    s = category(diff);
    put_bits(code[dctab][s], clen[dctab][s]);
    put_value(diff, s);
    pred = q[0];
    // code AC
    last_nz = 0;
    for (int k = 1; k < 64; k++) if (q[k] != 0) last_nz = k;
    run = 0;
    for (int k = 1; k <= last_nz; k++) begin
      if (q[k] == 0) begin
        run++;
      end else begin
        while (run > 15) begin
          put_bits(code[2 + actab][8'hF0], clen[2 + actab][8'hF0]);
          run -= 16;
          n_zrl++;
        end
        s = category(q[k]);
        put_bits(code[2 + actab][(run << 4) | s], clen[2 + actab][(run << 4) | s]);
        put_value(q[k], s);
        run = 0;
      end
    end
    if (last_nz != 63) begin
      put_bits(code[2 + actab][0], clen[2 + actab][0]);
      n_eob++;
    end else begin
      n_full++;
    end
    // tokens
    for (int k = 0; k < 64; k++)
      if (k == 0 || q[k] != 0) tokens.push_back((k << 16) | (q[k] & 16'hFFFF));
    tokens.push_back(-1);
    // reference
    for (int k = 0; k < 64; k++) f[zz_nat(k)] = real'(q[k] * qt[qsel][k]);
    ref_idct(f, pix);
  endfunction

  // ------------------------------------------------------------ file
  function automatic void put16(int v);
    file.push_back(8'(v >> 8));
    file.push_back(8'(v));
  endfunction

  function automatic void make_picture(int w, int h, int layout);
    int mw, mh, mx_n, my_n, nf, yw, yh, cw;
    int yp[], cbp[], crp[];
    int pred[3];
    int pix[64];
    int len;
    build_tables();
    ecs.delete();
    ecs_plain.delete();
    tokens.delete();
    acc = 0; nacc = 0;
    nf = (layout == L_GRAY) ? 1 : 3;
    mw = (layout == L_422 || layout == L_420) ? 16 : 8;
    mh = (layout == L_420) ? 16 : 8;
    mx_n = (w + mw - 1) / mw;
    my_n = (h + mh - 1) / mh;
    yw = mx_n * mw; yh = my_n * mh; cw = mx_n * 8;
    yp  = new[yw * yh];
    cbp = new[cw * my_n * 8];
    crp = new[cw * my_n * 8];
    pred = '{0, 0, 0};
    for (int my = 0; my < my_n; my++)
      for (int mx = 0; mx < mx_n; mx++) begin
        int ny;
        ny = (layout == L_420) ? 4 : (layout == L_422) ? 2 : 1;
        for (int b = 0; b < ny; b++) begin
          int ox, oy;
          ox = mx * mw + (b % 2) * 8;
          oy = my * mh + (b / 2) * 8;
          code_block(0, 0, 0, pred[0], pix);
          for (int i = 0; i < 64; i++) yp[(oy + i / 8) * yw + ox + i % 8] = pix[i];
        end
        if (nf == 3) begin
          code_block(1, 1, 1, pred[1], pix);
          for (int i = 0; i < 64; i++) cbp[(my * 8 + i / 8) * cw + mx * 8 + i % 8] = pix[i];
          code_block(1, 1, 1, pred[2], pix);
          for (int i = 0; i < 64; i++) crp[(my * 8 + i / 8) * cw + mx * 8 + i % 8] = pix[i];
        end
      end
    while (nacc != 0) put_bits(1, 1);

    // reference RGB
    ref_r = new[w * h]; ref_g = new[w * h]; ref_b = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int yy, cb, cr, ci;
        yy = yp[y * yw + x];
        if (nf == 1) begin
          ref_r[y * w + x] = yy; ref_g[y * w + x] = yy; ref_b[y * w + x] = yy;
        end else begin
          ci = (layout == L_420) ? (y / 2) * cw + x / 2 :
               (layout == L_422) ? y * cw + x / 2 : y * cw + x;
          cb = cbp[ci] - 128; cr = crp[ci] - 128;
          ref_r[y * w + x] = clamp8(yy + 1.402 * cr);
          ref_g[y * w + x] = clamp8(yy - 0.344136 * cb - 0.714136 * cr);
          ref_b[y * w + x] = clamp8(yy + 1.772 * cb);
        end
      end

    // file
    file.delete();
    put16(16'hFFD8);
    put16(16'hFFE0); put16(16);                       // APP0, skipped
    file.push_back("J"); file.push_back("F"); file.push_back("I"); file.push_back("F");
    file.push_back(0); file.push_back(1); file.push_back(1); file.push_back(0);
    put16(1); put16(1); file.push_back(8'hFF); file.push_back(0);
    put16(16'hFFDB); put16(2 + 2 * 65);                // DQT
    for (int t = 0; t < 2; t++) begin
      file.push_back(8'(t));
      for (int k = 0; k < 64; k++) file.push_back(8'(qt[t][k]));
    end
    put16(16'hFFC0); put16(8 + 3 * nf);                // SOF0
    file.push_back(8); put16(h); put16(w); file.push_back(8'(nf));
    file.push_back(1);
    file.push_back((layout == L_420) ? 8'h22 : (layout == L_422) ? 8'h21 : 8'h11);
    file.push_back(0);
    if (nf == 3) begin
      file.push_back(2); file.push_back(8'h11); file.push_back(1);
      file.push_back(3); file.push_back(8'h11); file.push_back(1);
    end
    len = 2;
    for (int t = 0; t < 4; t++) len += 17 + nval[t];
    put16(16'hFFC4); put16(len);                       // DHT
    for (int t = 0; t < 4; t++) begin
      file.push_back(8'(((t >> 1) << 4) | (t & 1)));
      for (int l = 0; l < 16; l++) file.push_back(8'(bits[t][l]));
      for (int i = 0; i < nval[t]; i++) file.push_back(8'(vals[t][i]));
    end
    put16(16'hFFDA); put16(6 + 2 * nf);                // SOS
    file.push_back(8'(nf));
    file.push_back(1); file.push_back(8'h00);
    if (nf == 3) begin
      file.push_back(2); file.push_back(8'h11);
      file.push_back(3); file.push_back(8'h11);
    end
    file.push_back(0); file.push_back(63); file.push_back(0);
    foreach (ecs[i]) file.push_back(ecs[i]);
    put16(16'hFFD9);
  endfunction

endpackage
