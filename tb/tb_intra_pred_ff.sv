// tb_intra_pred_ff: walks the 16 4x4 blocks of several macroblocks. A model
// keeps the reconstructed picture around the macroblock as a plain 2-D array;
// for every block the neighbours read from the flip-flops (A-H with the
// above-right rule, I-L, and M through the M flip-flops and their read index
// table) are compared with the array, then a random reconstructed block is
// written to both.
module tb_intra_pred_ff;
  import h264_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       mb_top_av, mb_left_av, mb_tl_av, mb_tr_av;
  logic       ld_h_we, ld_v_we, upd_we;
  logic [2:0] ld_h_idx;
  pix_t       ld_h_pix [4], ld_v_pix [16], ld_tl_pix, upd_pix [4];
  logic [3:0] upd_blk, rd_blk;
  logic [1:0] upd_row;
  pix_t       top [8], left [4], m;
  logic       top_av, left_av, tl_av;

  intra_pred_ff dut (.*);

  int checks = 0, failures = 0;
  int plane [-1:15][-1:19];   // [y][x]

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_h_we = 0; ld_v_we = 0; upd_we = 0; ld_h_idx = '0; upd_blk = '0; rd_blk = '0; upd_row = '0;
    ld_tl_pix = '0;
    for (int k = 0; k < 4; k++) begin ld_h_pix[k] = '0; upd_pix[k] = '0; end
    for (int k = 0; k < 16; k++) ld_v_pix[k] = '0;
    mb_top_av = 1; mb_left_av = 1; mb_tl_av = 1; mb_tr_av = 1;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int mb = 0; mb < 8; mb++) begin
      mb_top_av = 1'(mb % 4 != 1); mb_left_av = 1'(mb % 3 != 2);
      mb_tl_av = mb_top_av & mb_left_av; mb_tr_av = 1'(mb % 2 == 0);
      for (int y = -1; y < 16; y++)
        for (int x = -1; x < 20; x++) plane[y][x] = $urandom_range(0, 255);
      // load
      for (int w = 0; w < 5; w++) begin
        ld_h_we = 1; ld_h_idx = 3'(w);
        for (int k = 0; k < 4; k++) ld_h_pix[k] = pix_t'(plane[-1][4 * w + k]);
        @(posedge clk); #1;
      end
      ld_h_we = 0;
      ld_v_we = 1;
      for (int k = 0; k < 16; k++) ld_v_pix[k] = pix_t'(plane[k][-1]);
      ld_tl_pix = pix_t'(plane[-1][-1]);
      @(posedge clk); #1;
      ld_v_we = 0;
      for (int b = 0; b < 16; b++) begin
        int bx, by;
        bit tr;
        bx = (b & 1) | ((b >> 1) & 2);
        by = ((b >> 1) & 1) | ((b >> 2) & 2);
        rd_blk = 4'(b);
        #1;
        tr = (by == 0) ? ((bx == 3) ? mb_tr_av : mb_top_av) :
             !((bx == 3) || (bx == 1 && (by == 1 || by == 3)));
        checks++;
        for (int k = 0; k < 4; k++) begin
          checks += 3;
          if (top[k] != plane[4 * by - 1][4 * bx + k]) failures++;
          if (top[4 + k] != (tr ? plane[4 * by - 1][4 * bx + 4 + k] : plane[4 * by - 1][4 * bx + 3]))
            failures++;
          if (left[k] != plane[4 * by + k][4 * bx - 1]) failures++;
        end
        checks += 2;
        if (m != plane[4 * by - 1][4 * bx - 1]) begin
          failures++;
          $display("mb %0d blk %0d: M %0d exp %0d", mb, b, m, plane[4 * by - 1][4 * bx - 1]);
        end
        if (top_av != (by > 0 || mb_top_av) || left_av != (bx > 0 || mb_left_av) ||
            tl_av != ((bx > 0 && by > 0) || (by == 0 && bx > 0 && mb_top_av) ||
                      (bx == 0 && by > 0 && mb_left_av) || (bx == 0 && by == 0 && mb_tl_av)))
          failures++;
        // write back a reconstructed block
        for (int r = 0; r < 4; r++) begin
          upd_we = 1; upd_blk = 4'(b); upd_row = 2'(r);
          for (int k = 0; k < 4; k++) begin
            plane[4 * by + r][4 * bx + k] = $urandom_range(0, 255);
            upd_pix[k] = pix_t'(plane[4 * by + r][4 * bx + k]);
          end
          @(posedge clk); #1;
        end
        upd_we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
