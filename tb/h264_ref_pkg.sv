// h264_ref_pkg: plain reference models used by the testbenches.
//
// Everything here is written from the H.264 formulas in the most direct
// form (matrix products, per-pixel prediction equations, integer
// quantisation), independent of the butterfly and pipeline structure of the
// RTL, so that the testbenches compare the hardware against a separate
// computation.
package h264_ref_pkg;

  typedef int blk_t [4][4];

  localparam int MF_T [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490},
                                 '{10082, 4194, 6554}, '{9362, 3647, 5825},
                                 '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  localparam int V_T [6][3]  = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                                 '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
  localparam int CF [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  localparam int HM [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int clsof(int r, int c);
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  // Y = A X B for 4x4 matrices
  function automatic blk_t mul(blk_t a, blk_t b);
    blk_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        y[i][j] = 0;
        for (int k = 0; k < 4; k++) y[i][j] += a[i][k] * b[k][j];
      end
    return y;
  endfunction

  function automatic blk_t transp(blk_t a);
    blk_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) y[i][j] = a[j][i];
    return y;
  endfunction

  function automatic blk_t fwd4(blk_t x);
    return mul(mul(CF, x), transp(CF));
  endfunction

  function automatic blk_t had4(blk_t x);
    return mul(mul(HM, x), HM);
  endfunction

  function automatic int satd(blk_t d);
    blk_t h;
    int s;
    h = had4(d);
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) s += iabs(h[i][j]);
    return s;
  endfunction

  function automatic int quant(int w, int qp, bit intra, int cls, bit dc);
    longint q, f, l;
    q = 15 + qp / 6;
    f = intra ? ((64'd1 << q) / 3) : ((64'd1 << q) / 6);
    if (dc) l = (longint'(iabs(w)) * MF_T[qp % 6][0] + 2 * f) >>> (q + 1);
    else    l = (longint'(iabs(w)) * MF_T[qp % 6][cls] + f) >>> q;
    return w < 0 ? -int'(l) : int'(l);
  endfunction

  function automatic int dequant(int l, int qp, int cls);
    return (l * V_T[qp % 6][cls]) <<< (qp / 6);
  endfunction

  // standard inverse transform: rows, then columns, then (x+32)>>6
  function automatic blk_t inv4(blk_t w);
    blk_t f, r;
    int e0, e1, e2, e3;
    for (int i = 0; i < 4; i++) begin
      e0 = w[i][0] + w[i][2];
      e1 = w[i][0] - w[i][2];
      e2 = (w[i][1] >>> 1) - w[i][3];
      e3 = w[i][1] + (w[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      e0 = f[0][j] + f[2][j];
      e1 = f[0][j] - f[2][j];
      e2 = (f[1][j] >>> 1) - f[3][j];
      e3 = f[1][j] + (f[3][j] >>> 1);
      r[0][j] = (e0 + e3 + 32) >>> 6; r[1][j] = (e1 + e2 + 32) >>> 6;
      r[2][j] = (e1 - e2 + 32) >>> 6; r[3][j] = (e0 - e3 + 32) >>> 6;
    end
    return r;
  endfunction

  // quantise and dequantise a residual block; dc_override replaces the DC
  // (AC-only blocks of an I16 macroblock)
  function automatic void tq_block(input blk_t res, input int qp, input bit intra, input bit ac_only,
                                   output blk_t lev);
    blk_t c;
    c = fwd4(res);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) lev[i][j] = quant(c[i][j], qp, intra, clsof(i, j), 1'b0);
    if (ac_only) lev[0][0] = 0;
  endfunction

  function automatic blk_t iqit_block(blk_t lev, int qp, bit dc_sub, int dc_val);
    blk_t w;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) w[i][j] = dequant(lev[i][j], qp, clsof(i, j));
    if (dc_sub) w[0][0] = dc_val;
    return inv4(w);
  endfunction

  // luma DC: forward Hadamard /2 and DC quantisation of a 4x4 DC matrix
  function automatic blk_t luma_dc_fwd(blk_t dcm, int qp, bit intra);
    blk_t h, l;
    h = had4(dcm);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) l[i][j] = quant(h[i][j] >>> 1, qp, intra, 0, 1'b1);
    return l;
  endfunction

  function automatic blk_t luma_dc_inv(blk_t l, int qp);
    blk_t f, d;
    f = had4(l);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (qp >= 12) d[i][j] = (f[i][j] * V_T[qp % 6][0]) <<< (qp / 6 - 2);
        else          d[i][j] = (f[i][j] * V_T[qp % 6][0] + (1 << (1 - qp / 6))) >>> (2 - qp / 6);
    return d;
  endfunction

  // chroma DC: 2x2 Hadamard by matrix product, DC quantisation, and the
  // inverse 2x2 Hadamard with the chroma DC scaling ((f*V) << qp/6) >> 1
  function automatic void chroma_dc_ref(input int c [4], input int qp, input bit intra,
                                        output int lev [4], output int dq [4]);
    int hm [2][2], f [2][2], l [2][2];
    int h2 [2][2];
    h2 = '{'{1, 1}, '{1, -1}};
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        hm[i][j] = 0;
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++)
            hm[i][j] += h2[i][a] * c[2 * a + b] * h2[b][j];
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) l[i][j] = quant(hm[i][j], qp, intra, 0, 1'b1);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        f[i][j] = 0;
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++)
            f[i][j] += h2[i][a] * l[a][b] * h2[b][j];
      end
    for (int k = 0; k < 4; k++) begin
      lev[k] = l[k / 2][k % 2];
      dq[k]  = ((f[k / 2][k % 2] * V_T[qp % 6][0]) <<< (qp / 6)) >>> 1;
    end
  endfunction

  // intra 4x4 prediction, equations of the standard (8.3.1.2)
  function automatic int p4(int top[8], int left[4], int m, int x, int y);
    if (y == -1) return (x == -1) ? m : top[x];
    return left[y];
  endfunction

  function automatic int i4pred(int mode, int top[8], int left[4], int m, bit tav, bit lav,
                                int x, int y);
    int z, s;
    case (mode)
      0: return top[x];
      1: return left[y];
      2: begin
        s = 0;
        if (tav && lav) begin
          for (int k = 0; k < 4; k++) s += top[k] + left[k];
          return (s + 4) >> 3;
        end else if (tav) begin
          for (int k = 0; k < 4; k++) s += top[k];
          return (s + 2) >> 2;
        end else if (lav) begin
          for (int k = 0; k < 4; k++) s += left[k];
          return (s + 2) >> 2;
        end
        return 128;
      end
      3: if (x == 3 && y == 3) return (top[6] + 3 * top[7] + 2) >> 2;
         else return (top[x + y] + 2 * top[x + y + 1] + top[x + y + 2] + 2) >> 2;
      4: if (x > y) return (p4(top, left, m, x - y - 2, -1) + 2 * p4(top, left, m, x - y - 1, -1) +
                            p4(top, left, m, x - y, -1) + 2) >> 2;
         else if (x < y) return (p4(top, left, m, -1, y - x - 2) + 2 * p4(top, left, m, -1, y - x - 1) +
                                 p4(top, left, m, -1, y - x) + 2) >> 2;
         else return (p4(top, left, m, 0, -1) + 2 * m + p4(top, left, m, -1, 0) + 2) >> 2;
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0)
          return (p4(top, left, m, x - (y >> 1) - 1, -1) + p4(top, left, m, x - (y >> 1), -1) + 1) >> 1;
        else if (z > 0)
          return (p4(top, left, m, x - (y >> 1) - 2, -1) + 2 * p4(top, left, m, x - (y >> 1) - 1, -1) +
                  p4(top, left, m, x - (y >> 1), -1) + 2) >> 2;
        else if (z == -1)
          return (p4(top, left, m, -1, 0) + 2 * m + p4(top, left, m, 0, -1) + 2) >> 2;
        else
          return (p4(top, left, m, -1, y - 1) + 2 * p4(top, left, m, -1, y - 2) +
                  p4(top, left, m, -1, y - 3) + 2) >> 2;
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0)
          return (p4(top, left, m, -1, y - (x >> 1) - 1) + p4(top, left, m, -1, y - (x >> 1)) + 1) >> 1;
        else if (z > 0)
          return (p4(top, left, m, -1, y - (x >> 1) - 2) + 2 * p4(top, left, m, -1, y - (x >> 1) - 1) +
                  p4(top, left, m, -1, y - (x >> 1)) + 2) >> 2;
        else if (z == -1)
          return (p4(top, left, m, -1, 0) + 2 * m + p4(top, left, m, 0, -1) + 2) >> 2;
        else
          return (p4(top, left, m, x - 1, -1) + 2 * p4(top, left, m, x - 2, -1) +
                  p4(top, left, m, x - 3, -1) + 2) >> 2;
      end
      7: if (y % 2 == 0) return (top[x + (y >> 1)] + top[x + (y >> 1) + 1] + 1) >> 1;
         else return (top[x + (y >> 1)] + 2 * top[x + (y >> 1) + 1] + top[x + (y >> 1) + 2] + 2) >> 2;
      default: begin
        z = x + 2 * y;
        if (z < 5 && z % 2 == 0) return (left[y + (x >> 1)] + left[y + (x >> 1) + 1] + 1) >> 1;
        else if (z < 5) return (left[y + (x >> 1)] + 2 * left[y + (x >> 1) + 1] + left[y + (x >> 1) + 2] + 2) >> 2;
        else if (z == 5) return (left[2] + 3 * left[3] + 2) >> 2;
        else return left[3];
      end
    endcase
  endfunction

  function automatic bit i4ok(int mode, bit tav, bit lav, bit tlav);
    case (mode)
      0, 3, 7: return tav;
      1, 8:    return lav;
      2:       return 1'b1;
      default: return tav && lav && tlav;
    endcase
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // intra 16x16 prediction (8.3.3)
  function automatic int i16pred(int mode, int top[16], int left[16], int tl, bit tav, bit lav,
                                 int x, int y);
    int s, h, v, a, b, c;
    case (mode)
      0: return top[x];
      1: return left[y];
      2: begin
        s = 0;
        if (tav && lav) begin
          for (int k = 0; k < 16; k++) s += top[k] + left[k];
          return (s + 16) >> 5;
        end else if (tav) begin
          for (int k = 0; k < 16; k++) s += top[k];
          return (s + 8) >> 4;
        end else if (lav) begin
          for (int k = 0; k < 16; k++) s += left[k];
          return (s + 8) >> 4;
        end
        return 128;
      end
      default: begin
        h = 0;
        v = 0;
        for (int k = 0; k < 8; k++) begin
          h += (k + 1) * (top[8 + k] - ((6 - k < 0) ? tl : top[6 - k]));
          v += (k + 1) * (left[8 + k] - ((6 - k < 0) ? tl : left[6 - k]));
        end
        a = 16 * (left[15] + top[15]);
        b = (5 * h + 32) >>> 6;
        c = (5 * v + 32) >>> 6;
        return clip((a + b * (x - 7) + c * (y - 7) + 16) >>> 5);
      end
    endcase
  endfunction

  // intra chroma 8x8 prediction (8.3.4), modes 0 DC, 1 H, 2 V, 3 plane
  function automatic int c8pred(int mode, int top[8], int left[8], int tl, bit tav, bit lav,
                                int x, int y);
    int s, h, v, a, b, c, xo, yo, st, sl;
    case (mode)
      1: return left[y];
      2: return top[x];
      0: begin
        xo = (x / 4) * 4;
        yo = (y / 4) * 4;
        st = 0;
        sl = 0;
        for (int k = 0; k < 4; k++) begin
          st += top[xo + k];
          sl += left[yo + k];
        end
        if ((xo == 0 && yo == 0) || (xo == 4 && yo == 4)) begin
          if (tav && lav) return (st + sl + 4) >> 3;
          if (lav) return (sl + 2) >> 2;
          if (tav) return (st + 2) >> 2;
        end else if (xo == 4) begin
          if (tav) return (st + 2) >> 2;
          if (lav) return (sl + 2) >> 2;
        end else begin
          if (lav) return (sl + 2) >> 2;
          if (tav) return (st + 2) >> 2;
        end
        return 128;
      end
      default: begin
        h = 0;
        v = 0;
        for (int k = 0; k < 4; k++) begin
          h += (k + 1) * (top[4 + k] - ((2 - k < 0) ? tl : top[2 - k]));
          v += (k + 1) * (left[4 + k] - ((2 - k < 0) ? tl : left[2 - k]));
        end
        a = 16 * (left[7] + top[7]);
        b = (34 * h + 32) >>> 6;
        c = (34 * v + 32) >>> 6;
        return clip((a + b * (x - 3) + c * (y - 3) + 16) >>> 5);
      end
    endcase
  endfunction

endpackage
