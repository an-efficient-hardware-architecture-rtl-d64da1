// intra_pred_ff: intra prediction flip-flops and M flip-flops of the luma
// 4x4 prediction.
//
// Holding the neighbours of the current macroblock in flip-flops lets the
// 4x4 prediction run with no memory access. The horizontal part hff[0..19]
// holds the sixteen pixels above the macroblock and the four above-right; the
// vertical part vff[0..15] holds the sixteen pixels to its left. Both are
// loaded before the macroblock starts (hff five 32-bit words at a time from
// the intra prediction SRAM, vff in one cycle from the vertical flip-flops of
// the intra prediction memory) and then updated while the 4x4 blocks are
// reconstructed: the right column of a block (pixels 3, 7, 11, 15) replaces
// vff at its rows, and its bottom row (pixels 12-15) replaces hff at its
// columns.
//
// The above-left pixel M of a block would be lost by that overwrite, so before
// the bottom row of block n is written, the old hff value at the block's
// rightmost column (position D of the block) is copied into M flip-flop n.
// Block n reads its M from flip-flop MIDX[n] (0 to 15 below). For the blocks
// on the left edge and block 0 the M value comes from the neighbouring
// macroblock; this design fills those flip-flops (5, 7, 13, 15) at load time
// from the above-left pixel and the left pixels 3, 7 and 11.
//
// Reading is combinational: for block rd_blk it gives A-H, I-L, M and the
// availability flags of its neighbours (E-H replaced by D where the
// above-right block is not yet coded or lies outside the picture).
//
// The flip-flop organisation (20 + 16 + 16) and the M read-index table follow
// the published architecture; the load-time filling of M flip-flops 5, 7, 13
// and 15 and the port widths are this design's choices. Register widths: the
// horizontal index is {column of the block, pixel} padded to five bits.
module intra_pred_ff
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // macroblock-level neighbour availability
  input  logic       mb_top_av,
  input  logic       mb_left_av,
  input  logic       mb_tl_av,
  input  logic       mb_tr_av,
  // load from the intra prediction memory
  input  logic       ld_h_we,
  input  logic [2:0] ld_h_idx,       // word 0..4 of the 20 upper pixels
  input  pix_t       ld_h_pix [4],
  input  logic       ld_v_we,
  input  pix_t       ld_v_pix [16],
  input  pix_t       ld_tl_pix,
  // update with reconstructed rows of a 4x4 block
  input  logic       upd_we,
  input  logic [3:0] upd_blk,
  input  logic [1:0] upd_row,
  input  pix_t       upd_pix [4],
  // neighbours of block rd_blk
  input  logic [3:0] rd_blk,
  output pix_t       top [8],
  output pix_t       left [4],
  output pix_t       m,
  output logic       top_av,
  output logic       left_av,
  output logic       tl_av
);

  localparam logic [3:0] MIDX [16] = '{4'd5, 4'd0, 4'd7, 4'd2, 4'd1, 4'd4, 4'd3, 4'd6,
                                       4'd13, 4'd8, 4'd15, 4'd10, 4'd9, 4'd12, 4'd11, 4'd14};

  pix_t hff [20];
  pix_t vff [16];
  pix_t mff [16];

  logic [1:0] ux, uy;
  assign ux = blk_x(upd_blk);
  assign uy = blk_y(upd_blk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 20; k++) hff[k] <= 8'd128;
      for (int k = 0; k < 16; k++) begin
        vff[k] <= 8'd128;
        mff[k] <= 8'd128;
      end
    end else begin
      if (ld_h_we)
        for (int k = 0; k < 4; k++) hff[4 * int'(ld_h_idx) + k] <= ld_h_pix[k];
      if (ld_v_we) begin
        vff     <= ld_v_pix;
        mff[5]  <= ld_tl_pix;
        mff[7]  <= ld_v_pix[3];
        mff[13] <= ld_v_pix[7];
        mff[15] <= ld_v_pix[11];
      end
      if (upd_we) begin
        vff[{uy, upd_row}] <= upd_pix[3];
        if (upd_row == 2'd3) begin
          mff[upd_blk] <= hff[5'({ux, 2'd3})];
          for (int k = 0; k < 4; k++) hff[5'({ux, 2'(k)})] <= upd_pix[k];
        end
      end
    end
  end

  logic [1:0] rx, ry;
  logic       tr_av;
  assign rx = blk_x(rd_blk);
  assign ry = blk_y(rd_blk);

  always_comb begin
    // above-right is coded for blocks 0,1,2,4,6,8,9,10,12,14 (needs the MB
    // above for row 0), for block 5 from the above-right MB, never for
    // 3,7,11,13,15
    case (rd_blk)
      4'd0, 4'd1, 4'd4: tr_av = mb_top_av;
      4'd5:             tr_av = mb_tr_av;
      4'd3, 4'd7, 4'd11, 4'd13, 4'd15: tr_av = 1'b0;
      default:          tr_av = 1'b1;
    endcase
    top_av  = (ry != 2'd0) || mb_top_av;
    left_av = (rx != 2'd0) || mb_left_av;
    if (rx != 2'd0 && ry != 2'd0) tl_av = 1'b1;
    else if (ry == 2'd0 && rx != 2'd0) tl_av = mb_top_av;
    else if (rx == 2'd0 && ry != 2'd0) tl_av = mb_left_av;
    else tl_av = mb_tl_av;
    for (int k = 0; k < 4; k++) begin
      top[k]     = hff[5'({rx, 2'(k)})];
      top[4 + k] = tr_av ? hff[5'({rx, 2'(k)}) + 5'd4] : hff[5'({rx, 2'd3})];
      left[k]    = vff[{ry, 2'(k)}];
    end
    m = mff[MIDX[rd_blk]];
  end

endmodule
