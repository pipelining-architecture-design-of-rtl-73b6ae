// tb_tnq: self-checking test of the 4x4 transform and quantisation unit.
//
// The reference model here computes the forward transform as the matrix
// product Cf X Cf^T, quantises with the standard's MF table and rounding
// offsets, and rebuilds the residual with the standard's 1-D inverse
// applied to rows and columns. Blocks are issued back to back (one per cycle)
// with random QP (0..51), intra/inter rounding and random residuals; level
// outputs are checked one cycle after the input and reconstructed residuals
// two cycles after it. Decode mode (levels in, residual out) is checked the
// same way. At QP 0 the reconstruction must also be within 1 of the input,
// which does not depend on the model. Outputs are clipped to 10 bits, as
// the unit documents.
//
// The 8x8 path: the forward half against the matrix product with the
// integer 8x8 matrix and the same MF8 table; the inverse half against the
// standard's dequantisation (flat scaling, LevelScale8 = 16 x norm table,
// rounding by QP/6 below 36) and its 8-point butterfly, written out
// separately here. A DC-only level block must give a flat residual; 300
// random level blocks (decode) and 300 random residual blocks (encode) over
// all QPs follow, one per cycle, levels checked one cycle and residuals two
// cycles after the input. At QP 0 the encode reconstruction must also be
// within 1 of the input.
//
// The DC transforms are checked against matrix products with the Hadamard
// matrices: 300 luma and 300 chroma sets in encode mode and 200 in decode
// mode, levels one cycle and DC values two cycles after the input.
module tb_tnq;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic               in_valid, dec_mode, intra, lvl_valid, rec_valid;
  logic [5:0]         qp;
  logic signed [8:0]  res_in [16];
  logic signed [15:0] lvl_in [16], lvl_out [16];
  logic signed [9:0]  rec_out [16];
  logic               blk8_valid, rec8_valid, lvl8_valid;
  logic signed [8:0]  res8_in [64];
  logic signed [15:0] lvl8_in [64], lvl8_out [64];
  logic signed [9:0]  rec8_out [64];
  logic               dc_in_valid, dc_chroma, dc_lvl_valid, dc_valid;
  logic signed [15:0] dc_coef_in [16], dc_lvl_in [16], dc_lvl_out [16], dc_out [16];

  tnq dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef int blk_t [16];
  const int CF [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  const int MFT [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                           '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  const int VT [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18},
                          '{16, 25, 20}, '{18, 29, 23}};

  function automatic int pclass(int r, int c);
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic blk_t fwd_quant(blk_t x, int q, bit intr);
    blk_t o;
    int   qb, f;
    qb = 15 + q / 6;
    f  = intr ? (1 << qb) / 3 : (1 << qb) / 6;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int w;
        longint m;
        w = 0;
        for (int k = 0; k < 4; k++)
          for (int l = 0; l < 4; l++) w += CF[i][k] * x[4*k+l] * CF[j][l];
        m = (longint'(w < 0 ? -w : w) * longint'(MFT[q % 6][pclass(i, j)]) + longint'(f)) >>> qb;
        o[4*i+j] = w < 0 ? -int'(m) : int'(m);
      end
    return o;
  endfunction

  function automatic void inv1d(int a0, int a1, int a2, int a3, output int o0, output int o1,
                                output int o2, output int o3);
    int e, f, g, h;
    e = a0 + a2; f = a0 - a2; g = (a1 >>> 1) - a3; h = a1 + (a3 >>> 1);
    o0 = e + h; o1 = f + g; o2 = f - g; o3 = e - h;
  endfunction

  function automatic blk_t dequant_inv(blk_t z, int q);
    blk_t d, t, o;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) d[4*i+j] = (z[4*i+j] * VT[q % 6][pclass(i, j)]) <<< (q / 6);
    for (int i = 0; i < 4; i++)
      inv1d(d[4*i], d[4*i+1], d[4*i+2], d[4*i+3], t[4*i], t[4*i+1], t[4*i+2], t[4*i+3]);
    for (int j = 0; j < 4; j++) begin
      int o0, o1, o2, o3;
      inv1d(t[j], t[4+j], t[8+j], t[12+j], o0, o1, o2, o3);
      o[j] = (o0 + 32) >>> 6; o[4+j] = (o1 + 32) >>> 6; o[8+j] = (o2 + 32) >>> 6; o[12+j] = (o3 + 32) >>> 6;
    end
    // the unit clips to its 10-bit output range
    for (int i = 0; i < 16; i++) o[i] = o[i] > 511 ? 511 : (o[i] < -512 ? -512 : o[i]);
    return o;
  endfunction

  const int V8T [6][6] = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
                           '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
                           '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};

  function automatic int cls8(int i, int j);
    if (i % 4 == 0 && j % 4 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    if (i % 4 == 2 && j % 4 == 2) return 2;
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return 3;
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 4;
    return 5;
  endfunction

  typedef int row8_t [8];
  function automatic row8_t std_inv8(row8_t d);
    int e0, e1, e2, e3, f0, f1, f2, f3, g0, g1, h0, h1, h2, h3;
    row8_t o;
    e0 = d[0] + d[4]; e1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    e2 = d[0] - d[4]; e3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    f0 = e0 + (d[2] + (d[6] >>> 1));                  // even part
    f2 = e2 + ((d[2] >>> 1) - d[6]);
    f1 = e2 - ((d[2] >>> 1) - d[6]);
    f3 = e0 - (d[2] + (d[6] >>> 1));
    g0 = -d[1] + d[7] + d[5] + (d[5] >>> 1);          // odd part
    g1 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    h0 = e1 + (g1 >>> 2);
    h3 = g1 - (e1 >>> 2);
    h1 = e3 + (g0 >>> 2);
    h2 = (e3 >>> 2) - g0;
    o = '{f0 + h3, f2 + h2, f1 + h1, f3 + h0, f3 - h0, f1 - h1, f2 - h2, f0 - h3};
    return o;
  endfunction

  const int M8 [8][8] = '{'{8, 8, 8, 8, 8, 8, 8, 8}, '{12, 10, 6, 3, -3, -6, -10, -12},
                          '{8, 4, -4, -8, -8, -4, 4, 8}, '{10, -3, -12, -6, 6, 12, 3, -10},
                          '{8, -8, -8, 8, 8, -8, -8, 8}, '{6, -12, 3, 10, -10, -3, 12, -6},
                          '{4, -8, 8, -4, -4, 8, -8, 4}, '{3, -6, 10, -12, 12, -10, 6, -3}};
  const int MF8T [6][6] = '{'{13107, 11428, 20972, 12222, 16777, 15481},
                            '{11916, 10826, 19174, 11058, 14980, 14290},
                            '{10082, 8943, 15978, 9675, 12710, 11985},
                            '{9362, 8228, 14913, 8931, 11984, 11259},
                            '{8192, 7346, 13159, 7740, 10486, 9777},
                            '{7282, 6428, 11570, 6830, 9118, 8640}};

  localparam int NB8 = 1024;
  int e8 [NB8][64], e8l [NB8][64], e8s [NB8][64];
  bit e8q0 [NB8];
  int n8_in = 0, n8_out = 0, n8_lvl = 0;

  task automatic issue8(int lvi [64], int q, bit dec = 1'b1, bit intr = 1'b0);
    int d [64], t [64], lv [64];
    row8_t r, o;
    if (dec) lv = lvi;
    else begin
      int qb;
      longint f;
      qb = 16 + q / 6;
      f  = intr ? (longint'(1) <<< qb) / 3 : (longint'(1) <<< qb) / 6;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          longint w, m;
          w = 0;
          for (int k = 0; k < 8; k++)
            for (int l = 0; l < 8; l++) w += M8[i][k] * lvi[8*k+l] * M8[j][l];
          m = ((w < 0 ? -w : w) * MF8T[q % 6][cls8(i, j)] + (f <<< 6)) >>> (qb + 6);
          lv[8*i+j] = w < 0 ? -int'(m) : int'(m);
        end
    end
    for (int n = 0; n < 64; n++) begin e8l[n8_in][n] = lv[n]; e8s[n8_in][n] = lvi[n]; end
    e8q0[n8_in] = !dec && q == 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int ls;
        ls = 16 * V8T[q % 6][cls8(i, j)];
        d[8*i+j] = (q >= 36) ? (lv[8*i+j] * ls) <<< (q / 6 - 6)
                             : (lv[8*i+j] * ls + (1 <<< (5 - q / 6))) >>> (6 - q / 6);
      end
    for (int i = 0; i < 8; i++) begin
      for (int k = 0; k < 8; k++) r[k] = d[8*i+k];
      o = std_inv8(r);
      for (int k = 0; k < 8; k++) t[8*i+k] = o[k];
    end
    for (int j = 0; j < 8; j++) begin
      for (int k = 0; k < 8; k++) r[k] = t[8*k+j];
      o = std_inv8(r);
      for (int k = 0; k < 8; k++) begin
        int x;
        x = (o[k] + 32) >>> 6;
        e8[n8_in][8*k+j] = x > 511 ? 511 : (x < -512 ? -512 : x);
      end
    end
    n8_in++;
    blk8_valid = 1'b1; qp = 6'(q); dec_mode = dec; intra = intr;
    for (int n = 0; n < 64; n++) begin lvl8_in[n] = 16'(lvi[n]); res8_in[n] = 9'(lvi[n]); end
    @(negedge clk);
    blk8_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (lvl8_valid) begin
      for (int n = 0; n < 64; n++)
        check(int'(lvl8_out[n]) == e8l[n8_lvl][n],
              $sformatf("8x8 block %0d level %0d: %0d expected %0d", n8_lvl, n, lvl8_out[n], e8l[n8_lvl][n]));
      n8_lvl++;
    end
    if (rec8_valid) begin
      for (int n = 0; n < 64; n++) begin
        check(int'(rec8_out[n]) == e8[n8_out][n],
              $sformatf("8x8 block %0d sample %0d: %0d expected %0d", n8_out, n, rec8_out[n], e8[n8_out][n]));
        if (e8q0[n8_out])
          check(int'(rec8_out[n]) - e8s[n8_out][n] <= 1 && e8s[n8_out][n] - int'(rec8_out[n]) <= 1,
                $sformatf("8x8 block %0d: QP 0 reconstruction %0d vs %0d", n8_out, rec8_out[n], e8s[n8_out][n]));
      end
      n8_out++;
    end
  end

  const int H4 [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
  const int H2 [2][2] = '{'{1, 1}, '{1, -1}};

  // H X H for a 4x4 (luma) or 2x2 (chroma, entries 0..3) set.
  function automatic blk_t hmul(blk_t x, bit ch);
    blk_t o;
    for (int i = 0; i < 16; i++) o[i] = 0;
    if (ch) begin
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          for (int k = 0; k < 2; k++)
            for (int l = 0; l < 2; l++) o[2*i+j] += H2[i][k] * x[2*k+l] * H2[l][j];
    end else begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 4; k++)
            for (int l = 0; l < 4; l++) o[4*i+j] += H4[i][k] * x[4*k+l] * H4[l][j];
    end
    return o;
  endfunction

  localparam int NDC = 1024;
  int e_dcl [NDC][16], e_dcv [NDC][16];
  int ndc_in = 0, ndc_lvl = 0, ndc_out = 0;

  task automatic issue_dc(blk_t w, int q, bit ch, bit intr, bit dec, blk_t lvin);
    blk_t y, z, f;
    int   qb, fo, n;
    n  = ch ? 4 : 16;
    qb = 15 + q / 6;
    fo = intr ? (1 << qb) / 3 : (1 << qb) / 6;
    y  = hmul(w, ch);
    for (int i = 0; i < 16; i++) begin
      longint m;
      if (!ch) y[i] = y[i] >>> 1;
      m = (longint'(y[i] < 0 ? -y[i] : y[i]) * longint'(MFT[q % 6][0]) + 2 * longint'(fo)) >>> (qb + 1);
      z[i] = (i >= n) ? 0 : dec ? lvin[i] : (y[i] < 0 ? -int'(m) : int'(m));
    end
    f = hmul(z, ch);
    for (int i = 0; i < 16; i++) begin
      int sc;
      sc = (f[i] * VT[q % 6][0]) <<< (q / 6);
      e_dcl[ndc_in][i] = z[i];
      e_dcv[ndc_in][i] = (i >= n) ? 0 : ch ? sc >>> 1 : (sc + 2) >>> 2;
      // the unit saturates its DC values to 16 bits
      e_dcv[ndc_in][i] = e_dcv[ndc_in][i] > 32767 ? 32767
                       : (e_dcv[ndc_in][i] < -32768 ? -32768 : e_dcv[ndc_in][i]);
    end
    ndc_in++;
    dc_in_valid = 1'b1; dc_chroma = ch; intra = intr; dec_mode = dec; qp = 6'(q);
    for (int i = 0; i < 16; i++) begin dc_coef_in[i] = 16'(w[i]); dc_lvl_in[i] = 16'(lvin[i]); end
    @(negedge clk);
    dc_in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (dc_lvl_valid) begin
      for (int i = 0; i < 16; i++)
        check(int'(dc_lvl_out[i]) == e_dcl[ndc_lvl][i],
              $sformatf("DC set %0d level %0d: %0d expected %0d", ndc_lvl, i, dc_lvl_out[i], e_dcl[ndc_lvl][i]));
      ndc_lvl++;
    end
    if (dc_valid) begin
      for (int i = 0; i < 16; i++)
        check(int'(dc_out[i]) == e_dcv[ndc_out][i],
              $sformatf("DC set %0d value %0d: %0d expected %0d", ndc_out, i, dc_out[i], e_dcv[ndc_out][i]));
      ndc_out++;
    end
  end

  // Expected values in flight, indexed by block number.
  localparam int NBLK = 1024;
  int    e_lvl [NBLK][16], e_rec [NBLK][16], e_src [NBLK][16];
  bit    e_q0 [NBLK];
  string e_nm [NBLK];
  int    n_in = 0, n_lvl = 0, n_rec = 0;

  always @(posedge clk) begin
    if (lvl_valid) begin
      for (int i = 0; i < 16; i++)
        check(int'(lvl_out[i]) == e_lvl[n_lvl][i],
              $sformatf("%s level %0d: %0d expected %0d", e_nm[n_lvl], i, lvl_out[i], e_lvl[n_lvl][i]));
      n_lvl++;
    end
    if (rec_valid) begin
      for (int i = 0; i < 16; i++) begin
        check(int'(rec_out[i]) == e_rec[n_rec][i],
              $sformatf("%s residual %0d: %0d expected %0d", e_nm[n_rec], i, rec_out[i], e_rec[n_rec][i]));
        if (e_q0[n_rec])
          check(int'(rec_out[i]) - e_src[n_rec][i] <= 1 && e_src[n_rec][i] - int'(rec_out[i]) <= 1,
                $sformatf("%s: QP 0 reconstruction %0d vs %0d", e_nm[n_rec], rec_out[i], e_src[n_rec][i]));
      end
      n_rec++;
    end
  end

  task automatic issue(blk_t x, int q, bit intr, bit dec, blk_t lv, string nm);
    blk_t z, r;
    z = dec ? lv : fwd_quant(x, q, intr);
    r = dequant_inv(z, q);
    for (int i = 0; i < 16; i++) begin
      e_lvl[n_in][i] = z[i]; e_rec[n_in][i] = r[i]; e_src[n_in][i] = x[i];
    end
    e_q0[n_in] = !dec && q == 0;
    e_nm[n_in] = nm;
    n_in++;
    in_valid = 1'b1; dec_mode = dec; intra = intr; qp = 6'(q);
    for (int i = 0; i < 16; i++) begin res_in[i] = 9'(x[i]); lvl_in[i] = 16'(lv[i]); end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    blk_t x, lv;
    in_valid = 0; dec_mode = 0; intra = 0; qp = 0; blk8_valid = 0;
    dc_in_valid = 0; dc_chroma = 0;
    for (int i = 0; i < 16; i++) begin dc_coef_in[i] = 0; dc_lvl_in[i] = 0; end
    for (int n = 0; n < 64; n++) begin lvl8_in[n] = 0; res8_in[n] = 0; end
    for (int i = 0; i < 16; i++) begin res_in[i] = 0; lvl_in[i] = 0; x[i] = 0; lv[i] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // A flat block: only the DC coefficient survives.
    for (int i = 0; i < 16; i++) x[i] = 10;
    issue(x, 28, 1'b0, 1'b0, lv, "flat");
    // Extremes.
    for (int i = 0; i < 16; i++) x[i] = (i % 2) ? 255 : -255;
    issue(x, 0, 1'b1, 1'b0, lv, "checkerboard qp0");
    issue(x, 51, 1'b1, 1'b0, lv, "checkerboard qp51");
    // Random encode blocks, back to back.
    for (int k = 0; k < 600; k++) begin
      for (int i = 0; i < 16; i++) x[i] = int'($urandom_range(0, 510)) - 255;
      issue(x, (k % 5 == 0) ? 0 : int'($urandom_range(0, 51)), $urandom_range(0, 1) == 1, 1'b0, lv,
            $sformatf("encode %0d", k));
    end
    // Decode mode: levels straight in.
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 16; i++) lv[i] = int'($urandom_range(0, 16)) - 8;
      issue(x, $urandom_range(0, 51), 1'b0, 1'b1, lv, $sformatf("decode %0d", k));
    end
    repeat (3) @(negedge clk);
    check(n_lvl == n_in && n_rec == n_in, "every block produced its outputs");

    // 8x8 inverse: a DC-only block gives a flat residual.
    begin
      int lv8 [64];
      for (int n = 0; n < 64; n++) lv8[n] = 0;
      lv8[0] = 40;
      issue8(lv8, 12);
      repeat (2) @(negedge clk);
      // d0 = (40 x 20 x 16 x 4 + 0) >> 6 = 800; flat (800 + 32) >> 6 = 13
      for (int n = 0; n < 64; n++)
        check(rec8_out[n] == 10'sd13, $sformatf("8x8 DC-only sample %0d: %0d", n, rec8_out[n]));
      for (int k = 0; k < 300; k++) begin
        for (int n = 0; n < 64; n++) lv8[n] = int'($urandom_range(0, 12)) - 6;
        issue8(lv8, $urandom_range(0, 51));
      end
      for (int k = 0; k < 300; k++) begin
        for (int n = 0; n < 64; n++) lv8[n] = int'($urandom_range(0, 510)) - 255;
        issue8(lv8, (k % 5 == 0) ? 0 : int'($urandom_range(0, 51)), 1'b0, $urandom_range(0, 1) == 1);
      end
      repeat (3) @(negedge clk);
      check(n8_out == n8_in && n8_lvl == n8_in, "every 8x8 block produced its outputs");
    end

    // DC transforms: encode (DC coefficients of 4x4 blocks, |W| <= 4080),
    // then decode (levels in).
    for (int k = 0; k < 600; k++) begin
      for (int i = 0; i < 16; i++) x[i] = int'($urandom_range(0, 8160)) - 4080;
      issue_dc(x, $urandom_range(0, 51), k % 2 == 1, $urandom_range(0, 1) == 1, 1'b0, lv);
    end
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 16; i++) lv[i] = int'($urandom_range(0, 40)) - 20;
      issue_dc(x, $urandom_range(0, 51), k % 2 == 1, 1'b0, 1'b1, lv);
    end
    repeat (3) @(negedge clk);
    check(ndc_lvl == ndc_in && ndc_out == ndc_in, "every DC set produced its outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
