// tb_mb_engine: end-to-end test of the luma macroblock engine at its default
// parameters (a picture 45 macroblocks wide, i.e. 720 pixels, two
// macroblock rows).
//
// The testbench holds a reference encoder written directly from the H.264
// equations (h264_ref_pkg): for every macroblock it runs the intra 4x4 search
// block by block on reconstructed neighbours, the intra 16x16 search, the
// macroblock type decision against the inter cost, the final transform and
// quantisation of the chosen prediction, the coded block pattern with the
// coefficient cost rules, and the reconstruction. The engine's levels
// (including the quantised luma DC), its reconstructed pixels, macroblock
// type, 16x16 mode, 4x4 modes and luma CBP are compared with it, and the
// reconstructed picture is carried into the next macroblocks as neighbours.
//
// Macroblock content cycles through smooth gradients (favouring intra
// 16x16), block textures (favouring intra 4x4), and inter predictions with a
// tiny or a large residual, so that each mechanism is exercised: every
// macroblock type is chosen, the inter coefficient cost drops a whole luma
// CBP and single 8x8 blocks, the 16x16 DC path carries non-zero levels, the
// most probable mode is chosen for 4x4 blocks, and picture edges make
// neighbours unavailable. A mechanism that never happens counts as a failure.
// The start-to-done cycle count of every macroblock is checked against the
// engine's fixed schedule. After each macroblock, random chroma DC
// coefficients of both components go through the chroma DC ports and are
// checked against the 2x2 reference, with the rounding of the decided type.
// Each macroblock also carries chroma content (vertical, horizontal,
// plane-like or noise) and neighbours; the chroma mode, its cost and the 32
// words of the 8x8 prediction RAM are checked against a reference, and every
// chroma mode must be chosen at least once.
module tb_mb_engine;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int NC = 45, NR = 2;
  localparam int W = 16 * NC, H = 16 * NR;
  localparam int MB_CYCLES = 717;       // start to done, every macroblock

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, mb_top_av, mb_left_av, mb_tl_av, mb_tr_av, inter_en;
  logic [7:0]  mb_x, lambda;
  qp_t         qp;
  cost_t       inter_cost;
  logic        cur_we, inter_we;
  logic [5:0]  cur_waddr;
  logic [6:0]  inter_waddr;
  logic [31:0] cur_wdata, inter_wdata;
  logic        busy, done, coef_valid, coef_isdc, rec_valid;
  mbtype_e     mb_type;
  i16mode_t    i16_mode;
  i4mode_t     i4_modes [16];
  logic [3:0]  cbp_luma, coef_blk;
  logic [1:0]  coef_col;
  coef_t       coef_lvl [4];
  logic [5:0]  rec_addr;
  pix_t        rec_pix [4];
  logic        cdc_valid, cdc_lvl_valid, cdc_dq_valid;
  coef_t       cdc_in [4], cdc_lvl [4];
  qp_t         cdc_qp;
  dq_t         cdc_dq [4];
  logic        ccur_we, cpred_re;
  logic [4:0]  ccur_waddr, cpred_raddr;
  logic [31:0] ccur_wdata, cpred_rdata;
  pix_t        c_top [2][8], c_left [2][8], c_tl [2];
  logic [1:0]  c_mode;
  cost_t       c_cost;

  mb_engine dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NC * NR * 1000 + 5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // picture state of the reference
  int curp [H][W];
  int recp [H][W];
  int modep [H / 4][W / 4];
  int interp [16][16];

  // expected results of the current macroblock
  int   e_type, e_i16, e_cbp;
  int   e_modes [16];
  blk_t e_lev [16];
  blk_t e_dcl;
  int   e_rec [16][16];

  // mechanism counters
  int n_i4 = 0, n_i16 = 0, n_inter = 0, n_cbp_zero = 0, n_b8_drop = 0, n_dc = 0, n_mpm = 0,
      n_edge = 0, n_tr_off = 0, n_cdc_intra = 0, n_cdc_inter = 0;
  int n_cmode [4] = '{0, 0, 0, 0};
  int cmem [2][8][8], ctp [2][8], clp [2][8], ctl [2];

  function automatic int bxof(int b); return (b & 1) | ((b >> 1) & 2); endfunction
  function automatic int byof(int b); return ((b >> 1) & 1) | ((b >> 2) & 2); endfunction
  function automatic int bidx(int x, int y);
    return ((y >> 1) << 3) | ((x >> 1) << 2) | ((y & 1) << 1) | (x & 1);
  endfunction

  // reference encoder for macroblock (mx, my)
  task automatic ref_mb(int mx, int my, int q, int lam, bit ien, int icost);
    int x0, y0, i4sum, i4tot, i16c, i16m, best;
    int scr [16][16];
    int i4p [16][16];
    int i4m [16];
    blk_t i4l [16];
    int t16 [16], l16 [16], tl16;
    bit tav, lav, tlav;
    x0 = 16 * mx; y0 = 16 * my;
    tav = my > 0; lav = mx > 0; tlav = tav && lav;
    if (!tav || !lav) n_edge++;
    // ---- intra 4x4 search, block by block on the reconstruction ----
    i4sum = 0;
    for (int b = 0; b < 16; b++) begin
      int bx, by, px, py, top[8], left[4], m, mpm, bm, bc, up, lf;
      bit bt, bl, btl, trv;
      blk_t d, lev, r;
      bx = bxof(b); by = byof(b);
      px = x0 + 4 * bx; py = y0 + 4 * by;
      bt = py > 0; bl = px > 0; btl = bt && bl;
      if (by > 0) trv = (bx < 3) && (bidx(bx + 1, by - 1) < b);
      else        trv = bt && (bx < 3 || mx < NC - 1);
      if (bt && !trv) n_tr_off++;
      for (int k = 0; k < 4; k++) begin
        top[k]  = bt ? ((by > 0) ? scr[4 * by - 1][4 * bx + k] : recp[py - 1][px + k]) : 0;
        left[k] = bl ? ((bx > 0) ? scr[4 * by + k][4 * bx - 1] : recp[py + k][px - 1]) : 0;
      end
      for (int k = 4; k < 8; k++)
        top[k] = trv ? ((by > 0) ? scr[4 * by - 1][4 * bx + k] : recp[py - 1][px + k]) : top[3];
      m = btl ? ((bx > 0 && by > 0) ? scr[4 * by - 1][4 * bx - 1] : recp[py - 1][px - 1]) : 0;
      up = bt ? ((by > 0) ? i4m[bidx(bx, by - 1)] : modep[py / 4 - 1][px / 4]) : -1;
      lf = bl ? ((bx > 0) ? i4m[bidx(bx - 1, by)] : modep[py / 4][px / 4 - 1]) : -1;
      mpm = (up < 0 || lf < 0) ? 2 : (up < lf ? up : lf);
      bm = 2; bc = 32'h7fffffff;
      for (int md = 0; md < 9; md++) begin
        int c;
        if (!i4ok(md, bt, bl, btl)) continue;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            d[y][x] = curp[py + y][px + x] - i4pred(md, top, left, m, bt, bl, x, y);
        c = (satd(d) >> 1) + lam * (md == mpm ? 1 : 4);
        if (c < bc) begin bc = c; bm = md; end
      end
      if (bm == mpm) n_mpm++;
      i4m[b] = bm;
      i4sum += bc;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          i4p[4 * by + y][4 * bx + x] = i4pred(bm, top, left, m, bt, bl, x, y);
          d[y][x] = curp[py + y][px + x] - i4p[4 * by + y][4 * bx + x];
        end
      tq_block(d, q, 1'b1, 1'b0, lev);
      i4l[b] = lev;
      r = iqit_block(lev, q, 1'b0, 0);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          scr[4 * by + y][4 * bx + x] = clip(i4p[4 * by + y][4 * bx + x] + r[y][x]);
    end
    i4tot = i4sum + 6 * lam;
    // ---- intra 16x16 search ----
    for (int k = 0; k < 16; k++) begin
      t16[k] = tav ? recp[y0 - 1][x0 + k] : 0;
      l16[k] = lav ? recp[y0 + k][x0 - 1] : 0;
    end
    tl16 = tlav ? recp[y0 - 1][x0 - 1] : 0;
    i16m = 2; i16c = 32'h7fffffff;
    for (int md = 0; md < 4; md++) begin
      int acc;
      blk_t dm;
      bit ok;
      ok = (md == 0) ? tav : (md == 1) ? lav : (md == 2) ? 1'b1 : tlav;
      if (!ok) continue;
      acc = 0;
      for (int b = 0; b < 16; b++) begin
        blk_t d;
        int s;
        s = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            d[y][x] = curp[y0 + 4 * byof(b) + y][x0 + 4 * bxof(b) + x] -
                      i16pred(md, t16, l16, tl16, tav, lav, 4 * bxof(b) + x, 4 * byof(b) + y);
            s += d[y][x];
          end
        acc += satd(d) - iabs(s);
        dm[byof(b)][bxof(b)] = s >>> 2;
      end
      acc = (acc + satd(dm)) / 2;
      if (acc < i16c) begin i16c = acc; i16m = md; end
    end
    // ---- macroblock type ----
    best = 1;
    if (i4tot < i16c) best = 0;
    if (ien && icost <= (best == 0 ? i4tot : i16c)) best = 2;
    e_type = best;
    e_i16 = i16m;
    // ---- final pass ----
    begin
      int pred [16][16];
      blk_t dcm, dcinv;
      int c8 [4], nz [4], all;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          pred[y][x] = (best == 0) ? i4p[y][x] :
                       (best == 1) ? i16pred(i16m, t16, l16, tl16, tav, lav, x, y) : interp[y][x];
      for (int k = 0; k < 4; k++) begin c8[k] = 0; nz[k] = 0; end
      for (int b = 0; b < 16; b++) begin
        blk_t d, c;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            d[y][x] = curp[y0 + 4 * byof(b) + y][x0 + 4 * bxof(b) + x] -
                      pred[4 * byof(b) + y][4 * bxof(b) + x];
        c = fwd4(d);
        dcm[byof(b)][bxof(b)] = c[0][0];
        tq_block(d, q, best != 2, best == 1, e_lev[b]);
        begin
          // coefficient cost in zig-zag order
          int zz [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
          int run, cost;
          run = 0; cost = 0;
          for (int k = (best == 1) ? 1 : 0; k < 16; k++) begin
            int v;
            v = e_lev[b][zz[k] / 4][zz[k] % 4];
            if (v == 0) run++;
            else begin
              nz[b / 4] = 1;
              if (iabs(v) > 1) cost = 63;
              else if (run == 0) cost += 3;
              else if (run <= 2) cost += 2;
              else if (run <= 5) cost += 1;
              if (cost > 63) cost = 63;
              run = 0;
            end
          end
          c8[b / 4] += cost;
          if (c8[b / 4] > 63) c8[b / 4] = 63;
        end
      end
      e_cbp = 0; all = 0;
      for (int k = 0; k < 4; k++) begin
        if (nz[k] && !(best == 2 && c8[k] <= 4)) e_cbp |= 1 << k;
        else if (nz[k]) n_b8_drop++;
        if (best == 2 && (e_cbp >> k & 1)) all += c8[k];
      end
      if (best == 2 && all <= 5) begin
        if (e_cbp != 0) n_cbp_zero++;
        e_cbp = 0;
      end
      if (best == 1) e_cbp = (e_cbp != 0) ? 15 : 0;
      if (best == 1) begin
        e_dcl = luma_dc_fwd(dcm, q, 1'b1);
        dcinv = luma_dc_inv(e_dcl, q);
        for (int i = 0; i < 16; i++) if (e_dcl[i / 4][i % 4] != 0) begin n_dc++; break; end
      end
      for (int b = 0; b < 16; b++) begin
        blk_t r;
        bit use_r;
        use_r = (best == 1) || (e_cbp >> (b / 4) & 1);
        r = iqit_block(e_lev[b], q, best == 1, (best == 1) ? dcinv[byof(b)][bxof(b)] : 0);
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            e_rec[4 * byof(b) + y][4 * bxof(b) + x] =
              clip(pred[4 * byof(b) + y][4 * bxof(b) + x] + (use_r ? r[y][x] : 0));
      end
    end
    for (int b = 0; b < 16; b++) e_modes[b] = (best == 0) ? i4m[b] : 2;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) recp[y0 + y][x0 + x] = e_rec[y][x];
    for (int b = 0; b < 16; b++) modep[my * 4 + byof(b)][mx * 4 + bxof(b)] = e_modes[b];
    case (best)
      0: n_i4++;
      1: n_i16++;
      default: n_inter++;
    endcase
  endtask

  // monitors of the engine's outputs for the current macroblock
  int  coef_seen, dc_seen, rec_seen;
  always @(negedge clk) begin
    if (rst_n && coef_valid) begin
      checks++;
      if (coef_isdc) begin
        checks += 4;
        for (int k = 0; k < 4; k++)
          if (int'(coef_lvl[k]) != e_dcl[k][coef_col]) begin
            failures++;
            $display("DC level (%0d,%0d): %0d exp %0d", k, coef_col, coef_lvl[k], e_dcl[k][coef_col]);
          end
        dc_seen++;
      end else begin
        checks += 4;
        for (int k = 0; k < 4; k++)
          if (int'(coef_lvl[k]) != e_lev[coef_blk][k][coef_col]) begin
            failures++;
            $display("blk %0d level (%0d,%0d): %0d exp %0d", coef_blk, k, coef_col, coef_lvl[k],
                     e_lev[coef_blk][k][coef_col]);
          end
        coef_seen++;
      end
    end
    if (rst_n && rec_valid) begin
      checks++;
      checks += 4;
      for (int k = 0; k < 4; k++)
        if (int'(rec_pix[k]) != e_rec[rec_addr[5:2]][4 * rec_addr[1:0] + k]) begin
          failures++;
          $display("rec (%0d,%0d): %0d exp %0d", rec_addr[5:2], 4 * rec_addr[1:0] + k, rec_pix[k],
                   e_rec[rec_addr[5:2]][4 * rec_addr[1:0] + k]);
        end
      rec_seen++;
    end
  end

  // macroblock content
  task automatic make_mb(int mx, int my, int kind, int q);
    int x0, y0, a, gx, gy;
    blk_t lv, rs;
    x0 = 16 * mx; y0 = 16 * my;
    a = $urandom_range(40, 200);
    gx = $urandom_range(0, 6) - 3;
    gy = $urandom_range(0, 6) - 3;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        case (kind)
          0, 2: curp[y0 + y][x0 + x] = clip(a + (gx * x + gy * y) / 2 + int'($urandom_range(0, 2)) - 1);
          1: curp[y0 + y][x0 + x] = (((x / 4 + y / 4 + mx) % 2) == 0) ?
                                    clip(a + 12 * (x % 4) - 20 + int'($urandom_range(0, 4))) :
                                    clip(a + 12 * (y % 4) - 20 + int'($urandom_range(0, 4)));
          default: curp[y0 + y][x0 + x] = $urandom_range(0, 255);
        endcase
        if (kind == 2)      interp[y][x] = clip(curp[y0 + y][x0 + x] + int'($urandom_range(0, 2)) - 1);
        else if (kind == 3) interp[y][x] = clip(curp[y0 + y][x0 + x] + int'($urandom_range(0, 40)) - 20);
        else                interp[y][x] = $urandom_range(0, 255);
      end
    // inter with a tiny residual: block 0 gets the residual of two unit
    // levels (coefficient cost 3 + 2), the rest only +-1 noise
    if (kind == 2) begin
      for (int i = 0; i < 16; i++) lv[i / 4][i % 4] = 0;
      lv[0][0] = 1;
      lv[1][0] = (mx % 4 == 0) ? 0 : 1;
      rs = iqit_block(lv, q, 1'b0, 0);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) interp[y][x] = clip(curp[y0 + y][x0 + x] - rs[y][x]);
    end
  endtask

  initial begin
    start = 0; mb_x = 0; mb_top_av = 0; mb_left_av = 0; mb_tl_av = 0; mb_tr_av = 0;
    qp = 28; lambda = 4; inter_en = 0; inter_cost = '0;
    cur_we = 0; cur_waddr = '0; cur_wdata = '0; inter_we = 0; inter_waddr = '0; inter_wdata = '0;
    cdc_valid = 0; cdc_qp = '0;
    ccur_we = 0; ccur_waddr = '0; ccur_wdata = '0; cpred_re = 0; cpred_raddr = '0;
    for (int c = 0; c < 2; c++) begin
      c_tl[c] = '0;
      for (int k = 0; k < 8; k++) begin c_top[c][k] = '0; c_left[c][k] = '0; end
    end
    for (int k = 0; k < 4; k++) cdc_in[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int my = 0; my < NR; my++)
      for (int mx = 0; mx < NC; mx++) begin
        int kind, q, lam, t0, ic;
        bit ien;
        kind = (mx + 2 * my) % 5;   // 0 smooth, 1 texture, 2 inter tiny, 3 inter large, 4 noise
        q    = 12 + 5 * ((mx + my) % 6);      // 12..37, covers qp/6 = 2..6
        lam  = (kind == 0) ? 20 : 2;
        ien  = (kind == 2 || kind == 3 || (kind == 4 && mx % 2 == 0));
        ic   = (kind == 2 || kind == 3) ? 10 : 20'hFFFF0;
        make_mb(mx, my, kind, q);
        // load the current and inter prediction RAMs
        for (int w = 0; w < 64; w++) begin
          cur_we = 1; cur_waddr = 6'(w);
          inter_we = 1; inter_waddr = 7'(w);
          for (int k = 0; k < 4; k++) begin
            cur_wdata[8 * k +: 8]   = 8'(curp[16 * my + w / 4][16 * mx + 4 * (w % 4) + k]);
            inter_wdata[8 * k +: 8] = 8'(interp[w / 4][4 * (w % 4) + k]);
          end
          @(posedge clk); #1;
        end
        cur_we = 0; inter_we = 0;
        // chroma content: vertical, horizontal, plane-like or noise, by column
        for (int c = 0; c < 2; c++) begin
          int base, cst;
          base = $urandom_range(40, 210);
          cst  = (mx + c) % 4;
          ctl[c] = base;
          for (int k = 0; k < 8; k++) begin
            ctp[c][k] = clip(base + int'($urandom_range(0, 30)) - 15 + 3 * k);
            clp[c][k] = clip(base + int'($urandom_range(0, 30)) - 15 - 2 * k);
          end
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++)
              case (cst)
                0: cmem[c][y][x] = clip(ctp[c][x] + int'($urandom_range(0, 4)) - 2);
                1: cmem[c][y][x] = clip(clp[c][y] + int'($urandom_range(0, 4)) - 2);
                2: cmem[c][y][x] = clip(base + 3 * x - 2 * y + int'($urandom_range(0, 2)) - 1);
                default: cmem[c][y][x] = $urandom_range(0, 255);
              endcase
          c_tl[c] = pix_t'(ctl[c]);
          for (int k = 0; k < 8; k++) begin c_top[c][k] = pix_t'(ctp[c][k]); c_left[c][k] = pix_t'(clp[c][k]); end
        end
        for (int w = 0; w < 32; w++) begin
          ccur_we = 1; ccur_waddr = 5'(w);
          for (int k = 0; k < 4; k++) ccur_wdata[8 * k +: 8] = 8'(cmem[w / 16][(w / 2) % 8][4 * (w % 2) + k]);
          @(posedge clk); #1;
        end
        ccur_we = 0;
        ref_mb(mx, my, q, lam, ien, ic);
        mb_x = 8'(mx); mb_top_av = my > 0; mb_left_av = mx > 0; mb_tl_av = (my > 0 && mx > 0);
        mb_tr_av = (my > 0 && mx < NC - 1);
        qp = qp_t'(q); lambda = 8'(lam); inter_en = ien; inter_cost = cost_t'(ic);
        coef_seen = 0; dc_seen = 0; rec_seen = 0;
        start = 1;
        t0 = cyc;
        @(posedge clk); #1;
        start = 0;
        while (!done) @(posedge clk);
        #1;
        checks++;
        if (cyc - t0 != MB_CYCLES) begin
          failures++;
          $display("mb (%0d,%0d): %0d cycles", mx, my, cyc - t0);
        end
        checks++;
        if (int'(mb_type) != e_type || int'(cbp_luma) != e_cbp ||
            (e_type == 1 && int'(i16_mode) != e_i16)) begin
          failures++;
          $display("mb (%0d,%0d): type %0d/%0d i16 %0d/%0d cbp %h/%h", mx, my, mb_type, e_type,
                   i16_mode, e_i16, cbp_luma, e_cbp);
        end
        checks++;
        for (int b = 0; b < 16; b++)
          if (int'(i4_modes[b]) != e_modes[b]) begin
            failures++;
            $display("mb (%0d,%0d) blk %0d: mode %0d exp %0d", mx, my, b, i4_modes[b], e_modes[b]);
            break;
          end
        @(posedge clk); #1;
        checks++;
        if (coef_seen != 64 || rec_seen != 64 || dc_seen != ((e_type == 1) ? 4 : 0)) begin
          failures++;
          $display("mb (%0d,%0d): %0d coef, %0d dc, %0d rec words", mx, my, coef_seen, dc_seen, rec_seen);
        end
        // chroma 8x8 prediction: mode, cost and the 32 prediction words
        begin
          int cc [4], em, ec;
          bit ta, la, tla;
          ta = my > 0; la = mx > 0; tla = ta && la;
          for (int md = 0; md < 4; md++) begin
            cc[md] = 0;
            for (int c = 0; c < 2; c++)
              for (int b = 0; b < 4; b++) begin
                blk_t d;
                for (int y = 0; y < 4; y++)
                  for (int x = 0; x < 4; x++)
                    d[y][x] = cmem[c][4 * (b / 2) + y][4 * (b % 2) + x] -
                              c8pred(md, ctp[c], clp[c], ctl[c], ta, la, 4 * (b % 2) + x, 4 * (b / 2) + y);
                cc[md] += satd(d);
              end
            cc[md] = cc[md] / 2;
          end
          em = 0; ec = cc[0];
          if (la && cc[1] < ec) begin em = 1; ec = cc[1]; end
          if (ta && cc[2] < ec) begin em = 2; ec = cc[2]; end
          if (tla && cc[3] < ec) begin em = 3; ec = cc[3]; end
          n_cmode[em]++;
          checks++;
          if (int'(c_mode) != em || int'(c_cost) != ec) begin
            failures++;
            $display("mb (%0d,%0d): chroma mode %0d cost %0d, expected %0d %0d", mx, my, c_mode, c_cost, em, ec);
          end
          for (int w = 0; w < 32; w++) begin
            cpred_re = 1; cpred_raddr = 5'(w);
            @(posedge clk); #1;
            cpred_re = 0;
            checks++;
            for (int k = 0; k < 4; k++)
              if (int'(cpred_rdata[8 * k +: 8]) != c8pred(em, ctp[w / 16], clp[w / 16], ctl[w / 16], ta, la,
                                                          4 * (w % 2) + k, (w / 2) % 8)) begin
                failures++;
                $display("mb (%0d,%0d): chroma prediction word %0d", mx, my, w);
                break;
              end
          end
        end
        // chroma DC of both components, rounded for the decided type
        for (int comp = 0; comp < 2; comp++) begin
          int c [4], el [4], ed [4];
          for (int k = 0; k < 4; k++) c[k] = int'($urandom_range(0, 1000)) - 500;
          chroma_dc_ref(c, q, mb_type != MB_INTER, el, ed);
          if (mb_type == MB_INTER) n_cdc_inter++; else n_cdc_intra++;
          cdc_valid = 1; cdc_qp = qp_t'(q);
          for (int k = 0; k < 4; k++) cdc_in[k] = coef_t'(c[k]);
          @(posedge clk); #1;
          cdc_valid = 0;
          @(posedge clk); #1;
          checks++;
          if (!cdc_lvl_valid) begin failures++; $display("chroma DC levels late"); end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(cdc_lvl[k]) != el[k]) begin
              failures++; $display("mb (%0d,%0d) chroma DC lvl %0d: %0d exp %0d", mx, my, k, cdc_lvl[k], el[k]);
            end
          end
          @(posedge clk); #1;
          checks++;
          if (!cdc_dq_valid) begin failures++; $display("chroma DC values late"); end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(cdc_dq[k]) != ed[k]) begin
              failures++; $display("mb (%0d,%0d) chroma DC dq %0d: %0d exp %0d", mx, my, k, cdc_dq[k], ed[k]);
            end
          end
        end
      end
    $display("mechanisms: I4 %0d, I16 %0d, inter %0d, inter CBP cleared %0d, 8x8 dropped %0d, DC levels %0d, MPM chosen %0d, edge MBs %0d, above-right replaced %0d, chroma DC intra %0d, chroma DC inter %0d, chroma modes DC/H/V/plane %0d/%0d/%0d/%0d",
             n_i4, n_i16, n_inter, n_cbp_zero, n_b8_drop, n_dc, n_mpm, n_edge, n_tr_off, n_cdc_intra,
             n_cdc_inter, n_cmode[0], n_cmode[1], n_cmode[2], n_cmode[3]);
    checks++;
    if (n_i4 == 0 || n_i16 == 0 || n_inter == 0 || n_cbp_zero == 0 || n_b8_drop == 0 || n_dc == 0 ||
        n_mpm == 0 || n_edge == 0 || n_tr_off == 0 || n_cdc_intra == 0 || n_cdc_inter == 0 ||
        n_cmode[0] == 0 || n_cmode[1] == 0 || n_cmode[2] == 0 || n_cmode[3] == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
