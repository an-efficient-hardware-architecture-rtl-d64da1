// tb_cbp_calc: sixteen random 4x4 level blocks per macroblock, fed one column
// per cycle as the TQ module delivers them. Blocks are drawn sparse (mostly
// zeros, a few +-1, sometimes a larger level) so that every branch of the
// coefficient cost rules is taken. The reference scans each block in
// zig-zag order, costs each unit level by its preceding zero run (3, 2, 2,
// 1, 1, 1, then 0), treats a larger level as unbounded, and forms the 8x8 and
// macroblock decisions of the inter rules; intra macroblocks, with and
// without the DC position, use the non-zero rule. cbp_valid must pulse after
// the last column of block 15.
module tb_cbp_calc;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        mb_start, mb_inter, skip_dc, in_valid, cbp_valid;
  logic [1:0]  in_col;
  logic [3:0]  in_blk, cbp_luma;
  coef_t       in_lvl [4];
  logic [15:0] cbp_blk;
  logic [7:0]  coeff_cost_all;

  cbp_calc dut (.*);

  int checks = 0, failures = 0;
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mb_start = 0; mb_inter = 0; skip_dc = 0; in_valid = 0; in_col = '0; in_blk = '0;
    for (int k = 0; k < 4; k++) in_lvl[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      blk_t lv [16];
      int c8 [4], nz [4], blkc [16], ecbp, eblk, all, dens;
      bit inter, sdc;
      inter = n % 3 != 0;
      sdc = !inter && (n % 2 == 0);
      dens = $urandom_range(0, 40);
      for (int k = 0; k < 4; k++) begin c8[k] = 0; nz[k] = 0; end
      eblk = 0;
      for (int b = 0; b < 16; b++) begin
        int run, cost, bnz;
        for (int i = 0; i < 16; i++) begin
          int r;
          r = $urandom_range(0, 999);
          lv[b][i / 4][i % 4] = (r < dens) ? 1 : (r < 2 * dens) ? -1 : (r == 999) ? 3 : 0;
        end
        run = 0; cost = 0; bnz = 0;
        for (int k = sdc ? 1 : 0; k < 16; k++) begin
          int v;
          v = lv[b][ZZ[k] / 4][ZZ[k] % 4];
          if (v == 0) run++;
          else begin
            bnz = 1;
            if (iabs(v) > 1) cost = 63;
            else if (run == 0) cost += 3;
            else if (run <= 2) cost += 2;
            else if (run <= 5) cost += 1;
            if (cost > 63) cost = 63;
            run = 0;
          end
        end
        blkc[b] = bnz;
        if (bnz) nz[b / 4] = 1;
        c8[b / 4] = (c8[b / 4] + cost > 63) ? 63 : c8[b / 4] + cost;
      end
      ecbp = 0; all = 0;
      for (int k = 0; k < 4; k++) begin
        if (nz[k] && !(inter && c8[k] <= 4)) ecbp |= 1 << k;
        if (inter && (ecbp >> k & 1)) all += c8[k];
      end
      if (inter && all <= 5) ecbp = 0;
      for (int b = 0; b < 16; b++) if (blkc[b] && (ecbp >> (b / 4) & 1)) eblk |= 1 << b;
      mb_inter = inter; skip_dc = sdc;
      mb_start = 1;
      @(posedge clk); #1;
      mb_start = 0;
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 4; c++) begin
          in_valid = 1; in_blk = 4'(b); in_col = 2'(c);
          for (int r = 0; r < 4; r++) in_lvl[r] = coef_t'(lv[b][r][c]);
          @(posedge clk); #1;
          checks++;
          if (cbp_valid != (b == 15 && c == 3)) begin failures++; $display("cbp_valid timing"); end
        end
      in_valid = 0;
      checks++;
      if (int'(cbp_luma) != ecbp || int'(cbp_blk) != eblk || (inter && int'(coeff_cost_all) != all)) begin
        failures++;
        $display("mb %0d inter %0d: cbp %h/%h blk %h/%h all %0d/%0d", n, inter, cbp_luma, ecbp,
                 cbp_blk, eblk, coeff_cost_all, all);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
