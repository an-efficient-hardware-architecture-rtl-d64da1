// tb_intra16_pred: random macroblocks and neighbours through the 16x16
// prediction module. The reference forms the four predictions with the
// equations of the standard, takes per 4x4 block the Hadamard SAE without
// its DC term, adds the SAE of the 4x4 matrix of block DCs divided by 4, and
// halves the total; it checks the chosen mode and cost, the 64 prediction
// words, the Hadamard-transformed and halved luma DC of the chosen mode, and
// the cycle count of one macroblock.
module tb_intra16_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, top_av, left_av, tl_av, cur_rd, cost_valid, pw_valid, dcq_valid, done;
  pix_t       top [16], left [16], tl, cur_pix [4], pw_pix [4];
  logic [5:0] cur_addr, pw_addr;
  i16mode_t   best_mode;
  cost_t      best_cost;
  logic [1:0] dcq_col;
  logic signed [17:0] dcq_out [4];

  intra16_pred dut (.*);

  localparam int MB_CYCLES = 255;   // start to done

  int checks = 0, failures = 0, cyc = 0;
  int cur [16][16];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk)
    if (cur_rd)
      for (int k = 0; k < 4; k++) cur_pix[k] <= pix_t'(cur[cur_addr[5:2]][4 * cur_addr[1:0] + k]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; top_av = 0; left_av = 0; tl_av = 0; tl = '0;
    for (int k = 0; k < 16; k++) begin top[k] = '0; left[k] = '0; end
    for (int k = 0; k < 4; k++) cur_pix[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 24; n++) begin
      int t[16], l[16], tlv, bm, bc, c, t0, words, dccols;
      int dcs [4][16];
      blk_t dmat, dq, hd;
      top_av = 1'(n % 5 != 1); left_av = 1'(n % 4 != 2); tl_av = top_av & left_av & 1'(n % 7 != 3);
      for (int k = 0; k < 16; k++) begin
        t[k] = $urandom_range(0, 255); top[k] = pix_t'(t[k]);
        l[k] = $urandom_range(0, 255); left[k] = pix_t'(l[k]);
      end
      tlv = $urandom_range(0, 255); tl = pix_t'(tlv);
      c = $urandom_range(0, 3);
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          cur[y][x] = clip(i16pred(c, t, l, tlv, top_av, left_av, x, y) +
                           int'($urandom_range(0, 2 * (n % 3) * 10 + 2)) - (n % 3) * 10 - 1);
      bm = 2; bc = 32'h7fffffff;
      for (int md = 0; md < 4; md++) begin
        int acc;
        bit ok;
        ok = (md == 0) ? top_av : (md == 1) ? left_av : (md == 2) ? 1'b1 : (top_av && left_av && tl_av);
        acc = 0;
        for (int b = 0; b < 16; b++) begin
          int bx, by, s;
          blk_t d;
          bx = (b & 1) | ((b >> 1) & 2);
          by = ((b >> 1) & 1) | ((b >> 2) & 2);
          s = 0;
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              d[y][x] = cur[4 * by + y][4 * bx + x] -
                        i16pred(md, t, l, tlv, top_av, left_av, 4 * bx + x, 4 * by + y);
              s += d[y][x];
            end
          acc += satd(d) - iabs(s);
          dcs[md][b] = s;
          dmat[by][bx] = s >>> 2;
        end
        acc += satd(dmat);
        if (ok && acc / 2 < bc) begin bc = acc / 2; bm = md; end
      end
      for (int b = 0; b < 16; b++)
        dq[((b >> 1) & 1) | ((b >> 2) & 2)][(b & 1) | ((b >> 1) & 2)] = dcs[bm][b];
      hd = had4(dq);
      start = 1'b1;
      t0 = cyc;
      @(posedge clk); #1;
      start = 1'b0;
      words = 0;
      dccols = 0;
      while (!done) begin
        @(negedge clk);
        if (cost_valid) begin
          checks++;
          if (int'(best_mode) != bm || int'(best_cost) != bc) begin
            failures++;
            $display("mb %0d: mode %0d/%0d cost %0d/%0d", n, best_mode, bm, best_cost, bc);
          end
        end
        if (pw_valid) begin
          checks++;
          checks += 4;
          for (int k = 0; k < 4; k++)
            if (int'(pw_pix[k]) != i16pred(bm, t, l, tlv, top_av, left_av, 4 * pw_addr[1:0] + k,
                                           int'(pw_addr[5:2]))) failures++;
          words++;
        end
        if (dcq_valid) begin
          checks++;
          checks += 4;
          for (int k = 0; k < 4; k++)
            if (int'(dcq_out[k]) != (hd[k][dcq_col] >>> 1)) begin
              failures++;
              $display("dc (%0d,%0d): %0d exp %0d", k, dcq_col, dcq_out[k], hd[k][dcq_col] >>> 1);
            end
          dccols++;
        end
      end
      checks++;
      if (cyc - t0 != MB_CYCLES || words != 64) begin
        failures++;
        $display("done after %0d cycles, %0d words", cyc - t0, words);
      end
      repeat (2) @(negedge clk);
      if (dcq_valid) dccols++;
      checks++;
      if (dccols != 4) begin failures++; $display("dc columns %0d", dccols); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
