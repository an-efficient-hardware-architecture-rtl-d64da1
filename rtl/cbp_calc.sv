// cbp_calc: coefficient cost and coded block pattern of the luma component.
//
// Takes the levels of each 4x4 luma block in the column order of the TQ
// output and, once the block is complete, scans them in zig-zag order. Every
// level of magnitude one costs 3, 2, 2, 1, 1, 1 for a preceding zero run of
// 0..5 and nothing for longer runs; any larger level makes the cost
// effectively infinite (saturated at 63). For an inter macroblock an 8x8 block
// whose four 4x4 blocks cost at most 4 in total is not coded, and if the sum
// of the costs of the 8x8 blocks that remain is at most 5, no luma block is
// coded at all (cbp_luma = 0). Intra macroblocks use the plain rule: an 8x8
// block is coded when one of its levels is non-zero (the DC levels of an I16
// macroblock are excluded; skip_dc).
//
// mb_start clears the state. After the sixteen blocks, cbp_luma (one bit per
// 8x8 block) and cbp_blk (one bit per 4x4 block that has non-zero levels and
// lies in a coded 8x8 block) are valid; cbp_valid pulses with the last column.
module cbp_calc
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mb_start,
  input  logic        mb_inter,
  input  logic        skip_dc,
  input  logic        in_valid,
  input  logic [1:0]  in_col,
  input  logic [3:0]  in_blk,
  input  coef_t       in_lvl [4],
  output logic [3:0]  cbp_luma,
  output logic [15:0] cbp_blk,
  output logic [7:0]  coeff_cost_all,
  output logic        cbp_valid
);

  // zig-zag scan: position k -> {row, col}
  localparam logic [3:0] ZZ [16] = '{4'h0, 4'h1, 4'h4, 4'h8, 4'h5, 4'h2, 4'h3, 4'h6,
                                     4'h9, 4'hC, 4'hD, 4'hA, 4'h7, 4'hB, 4'hE, 4'hF};

  coef_t      lv [16];        // index {row, col}
  logic [5:0] cost8 [4];
  logic [15:0] nz_blk;
  logic [3:0] blk_cnt;

  coef_t m [16];
  logic [5:0] bcost;
  logic       bnz;
  always_comb begin
    int run;
    logic [5:0] c;
    m = lv;
    for (int r = 0; r < 4; r++) m[{2'(r), in_col}] = in_lvl[r];
    run = 0;
    c   = '0;
    bnz = 1'b0;
    for (int k = 0; k < 16; k++) begin
      if (k == 0 && skip_dc) begin
        // DC handled by the luma DC path
      end else if (m[ZZ[k]] == 0) begin
        run++;
      end else begin
        bnz = 1'b1;
        if (m[ZZ[k]] > 1 || m[ZZ[k]] < -1) c = 6'd63;
        else if (c != 6'd63) begin
          if (run == 0)      c = (c > 6'd60) ? 6'd63 : c + 6'd3;
          else if (run <= 2) c = (c > 6'd61) ? 6'd63 : c + 6'd2;
          else if (run <= 5) c = (c > 6'd62) ? 6'd63 : c + 6'd1;
        end
        run = 0;
      end
    end
    bcost = c;
  end

  logic [1:0] b8;
  assign b8 = {in_blk[3], in_blk[2]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) lv[k] <= '0;
      for (int k = 0; k < 4; k++) cost8[k] <= '0;
      nz_blk    <= '0;
      blk_cnt   <= '0;
      cbp_valid <= 1'b0;
    end else begin
      cbp_valid <= 1'b0;
      if (mb_start) begin
        for (int k = 0; k < 4; k++) cost8[k] <= '0;
        nz_blk  <= '0;
        blk_cnt <= '0;
      end else if (in_valid) begin
        for (int r = 0; r < 4; r++) lv[{2'(r), in_col}] <= in_lvl[r];
        if (in_col == 2'd3) begin
          nz_blk[in_blk] <= bnz;
          cost8[b8] <= (7'(cost8[b8]) + 7'(bcost) > 7'd63) ? 6'd63 : cost8[b8] + bcost;
          blk_cnt        <= blk_cnt + 4'd1;
          if (blk_cnt == 4'd15) cbp_valid <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    logic [3:0] c8;
    logic [7:0] all;
    all = '0;
    for (int k = 0; k < 4; k++) begin
      c8[k] = |nz_blk[4 * k +: 4];
      if (mb_inter && cost8[k] <= 6'd4) c8[k] = 1'b0;
      if (mb_inter && c8[k]) all += 8'(cost8[k]);
    end
    if (mb_inter && all <= 8'd5) c8 = '0;
    cbp_luma       = c8;
    coeff_cost_all = all;
    for (int k = 0; k < 16; k++) cbp_blk[k] = nz_blk[k] & c8[k / 4];
  end

endmodule
