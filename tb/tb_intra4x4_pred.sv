// tb_intra4x4_pred: random 4x4 blocks and neighbours through the intra 4x4
// prediction module. The reference evaluates all allowed modes with the
// standard prediction equations and a matrix-product Hadamard SAE, adds the
// mode-bit rate term, and picks the cheapest mode; the chosen mode, its
// cost, the prediction and residual rows, and the schedule (rows out on
// cycles 14-17, done on cycle 17) are checked.
module tb_intra4x4_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, top_av, left_av, tl_av, cur_rd, out_valid, done;
  logic [7:0] lambda;
  i4mode_t    mpm, best_mode;
  pix_t       top [8], left [4], m, cur_pix [4], out_pred [4];
  logic [1:0] cur_row, out_row;
  cost_t      best_cost;
  coef_t      out_res [4];

  intra4x4_pred dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int curb [4][4];
  always @(posedge clk) cyc <= cyc + 1;

  // current block memory, one cycle read latency
  always @(posedge clk)
    if (cur_rd)
      for (int k = 0; k < 4; k++) cur_pix[k] <= pix_t'(curb[cur_row][k]);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; lambda = 0; mpm = '0; top_av = 0; left_av = 0; tl_av = 0; m = '0;
    for (int k = 0; k < 8; k++) top[k] = '0;
    for (int k = 0; k < 4; k++) begin left[k] = '0; cur_pix[k] = '0; end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 300; n++) begin
      int t[8], l[4], mm, bm, bc, c, t0, rows;
      blk_t d;
      lambda = 8'($urandom_range(0, 40));
      mpm = i4mode_t'($urandom_range(0, 8));
      top_av = 1'($urandom_range(0, 4) != 0);
      left_av = 1'($urandom_range(0, 4) != 0);
      tl_av = 1'($urandom_range(0, 4) != 0);
      for (int k = 0; k < 8; k++) begin t[k] = $urandom_range(0, 255); top[k] = pix_t'(t[k]); end
      for (int k = 0; k < 4; k++) begin l[k] = $urandom_range(0, 255); left[k] = pix_t'(l[k]); end
      mm = $urandom_range(0, 255); m = pix_t'(mm);
      // current block: a prediction of a random mode plus small noise
      c = $urandom_range(0, 8);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          curb[y][x] = clip(i4pred(c, t, l, mm, top_av, left_av, x, y) + int'($urandom_range(0, 16)) - 8);
      // reference decision
      bm = 2; bc = 32'h7fffffff;
      for (int md = 0; md < 9; md++) begin
        if (!i4ok(md, top_av, left_av, tl_av)) continue;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) d[y][x] = curb[y][x] - i4pred(md, t, l, mm, top_av, left_av, x, y);
        c = satd(d) / 2 + int'(lambda) * ((md == int'(mpm)) ? 1 : 4);
        if (c < bc) begin bc = c; bm = md; end
      end
      start = 1'b1;
      t0 = cyc;
      @(posedge clk); #1;
      start = 1'b0;
      rows = 0;
      while (!done) begin
        @(negedge clk);
        if (out_valid) begin
          checks++;
          if (int'(best_mode) != bm || int'(best_cost) != bc) begin
            failures++;
            $display("blk %0d: mode %0d/%0d cost %0d/%0d", n, best_mode, bm, best_cost, bc);
          end
          checks++;
          if (cyc != t0 + 14 + int'(out_row) || int'(out_row) != rows) failures++;
          for (int x = 0; x < 4; x++) begin
            int p;
            p = i4pred(bm, t, l, mm, top_av, left_av, x, int'(out_row));
            checks++;
            if (int'(out_pred[x]) != p || int'(out_res[x]) != curb[out_row][x] - p) failures++;
          end
          rows++;
        end
      end
      if (cyc != t0 + 17 || rows != 4) begin
        failures++;
        $display("done at %0d (exp %0d), rows %0d", cyc - t0, 17, rows);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
