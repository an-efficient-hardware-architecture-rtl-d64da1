// iqit4x4: inverse quantisation and inverse 4x4 integer transform (IQIT).
//
// Levels arrive one column per cycle, four wide, in the order the TQ module
// produces them (in_lvl[i] is the level at row i of column in_col). Each
// level is multiplied by its dequantisation factor V(QP%6, position) and
// shifted left by QP/6. When dc_sub is set with the first column, the (0,0)
// coefficient is replaced by dc_val, the already dequantised DC that the
// luma-DC or chroma-DC inverse path delivers (I16 luma and chroma blocks).
//
// The inverse transform keeps the bit-exact order of the standard: first the
// horizontal 1-D transform of each row (one row per cycle), then the vertical
// transform of all four columns in parallel, then (x+32)>>6. Residual rows
// leave one per cycle on out_row (out_row[j] is column j of row out_idx).
//
// Timing, counting the first input column as cycle 1: columns in on 1-4,
// row pass on 5-8, vertical pass on 9, residual rows out on cycles 10-13.
// A new block may start every four cycles (the coefficient store is double
// buffered). qp must stay stable while a block is inside. Widths, the
// handshake and the row-then-column structure are this design's choices; the
// arithmetic is the standard's.
module iqit4x4
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  qp_t         qp,
  input  logic        in_valid,
  input  coef_t       in_lvl [4],
  input  logic        dc_sub,
  input  dq_t         dc_val,
  output logic        out_valid,
  output logic [1:0]  out_idx,
  output coef_t       out_row [4]
);

  dq_t        ca [2][4][4];    // dequantised coefficients [bank][row][col]
  logic [1:0] in_cnt;
  logic       wbank;
  logic       rp_go;
  assign rp_go = in_valid && in_cnt == 2'd3;
  logic       rp_act;
  logic [1:0] rp_cnt;
  logic       rbank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      wbank  <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) ca[b][r][c] <= '0;
    end else begin
      if (in_valid) begin
        for (int r = 0; r < 4; r++) begin
          if (in_cnt == 2'd0 && r == 0 && dc_sub)
            ca[wbank][r][in_cnt] <= dc_val;
          else
            ca[wbank][r][in_cnt] <= dequantize(in_lvl[r], dequant_v(qp_mod6(qp), pos_class(2'(r), in_cnt)), qp);
        end
        in_cnt <= in_cnt + 2'd1;
        if (in_cnt == 2'd3) begin
          wbank <= ~wbank;
        end
      end
    end
  end

  function automatic void inv1d(input dq_t x [4], output dq_t y [4]);
    dq_t e0, e1, e2, e3;
    e0 = x[0] + x[2];
    e1 = x[0] - x[2];
    e2 = (x[1] >>> 1) - x[3];
    e3 = x[1] + (x[3] >>> 1);
    y[0] = e0 + e3;
    y[1] = e1 + e2;
    y[2] = e1 - e2;
    y[3] = e0 - e3;
  endfunction

  // horizontal pass, one row per cycle
  dq_t rp_in [4], rp_y [4];
  always_comb begin
    for (int c = 0; c < 4; c++) rp_in[c] = ca[rbank][rp_cnt][c];
    inv1d(rp_in, rp_y);
  end

  dq_t  hb [4][4];
  logic vp_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_act <= 1'b0;
      rp_cnt <= '0;
      rbank  <= 1'b0;
      vp_go  <= 1'b0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) hb[r][c] <= '0;
    end else begin
      vp_go <= 1'b0;
      if (!rp_act && rp_go) begin
        rp_act <= 1'b1;
        rp_cnt <= '0;
      end
      if (rp_act) begin
        hb[rp_cnt] <= rp_y;
        rp_cnt     <= rp_cnt + 2'd1;
        if (rp_cnt == 2'd3) begin
          rp_act <= rp_go;
          rbank  <= ~rbank;
          vp_go  <= 1'b1;
        end
      end
    end
  end

  // vertical pass on all four columns at once
  dq_t vcol_in [4][4], vcol_y [4][4];
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) vcol_in[c][r] = hb[r][c];
      inv1d(vcol_in[c], vcol_y[c]);
    end
  end

  coef_t      res [4][4];  // [row][col]
  logic       op_act;
  logic [1:0] op_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_act <= 1'b0;
      op_cnt <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) res[r][c] <= '0;
    end else begin
      if (op_act) begin
        op_cnt <= op_cnt + 2'd1;
        if (op_cnt == 2'd3) op_act <= 1'b0;
      end
      if (vp_go) begin
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) res[r][c] <= coef_t'((vcol_y[c][r] + 24'sd32) >>> 6);
        op_act <= 1'b1;
        op_cnt <= '0;
      end
    end
  end

  assign out_valid = op_act;
  assign out_idx   = op_cnt;
  assign out_row   = res[op_cnt];

endmodule
