// sae4x4: Hadamard-transformed sum of absolute errors (SATD) of a 4x4 block.
//
// The prediction error of one 4x4 block arrives one row per cycle, four
// values wide. Each row passes a 1-D 4-point Hadamard butterfly and is kept in
// a transpose register file; the four columns then go through the second 1-D
// Hadamard, one per cycle, and the absolute values of the sixteen transformed
// coefficients are summed. The result is the raw sum (no final halving); the
// caller applies its own scaling. dc reports the (0,0) Hadamard coefficient,
// which equals the sum of the sixteen inputs and is also the DC coefficient of
// the forward integer transform; the 16x16 prediction keeps it in its DC_FF.
//
// Timing follows the eleven-cycle distortion schedule: with the SRAM address
// on cycles 1-4, rows enter (in_valid) on cycles 2-5, the transpose file
// holds them on 3-6, the column inputs are on 7-10, the Hadamard outputs on
// 8-11, and sae/dc are valid (out_valid pulse) on cycle 12. A new block may
// enter on cycle 12 of the previous one at the earliest (i.e. 10 cycles
// after its last row); the input widths are this design's choice.
module sae4x4
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  coef_t       diff [4],
  output logic        out_valid,
  output cost_t       sae,
  output coef_t       dc
);

  function automatic void had1d(input coef_t x [4], output coef_t y [4]);
    coef_t s0, s1, d0, d1;
    s0 = x[0] + x[3];
    s1 = x[1] + x[2];
    d0 = x[0] - x[3];
    d1 = x[1] - x[2];
    y[0] = s0 + s1;
    y[1] = d0 + d1;
    y[2] = s0 - s1;
    y[3] = d0 - d1;
  endfunction

  coef_t      row_y [4];
  coef_t      trf [4][4];
  logic [1:0] in_cnt;
  logic       col_go;

  always_comb had1d(diff, row_y);
  assign col_go = in_valid && in_cnt == 2'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) trf[r][c] <= '0;
    end else begin
      if (in_valid) begin
        trf[in_cnt] <= row_y;
        in_cnt      <= in_cnt + 2'd1;
      end
    end
  end

  logic       col_act, col_v, h_v, h_last, col_last;
  logic [1:0] col_cnt;
  coef_t      col_r [4], col_y [4], h_r [4];
  cost_t      acc;

  always_comb had1d(col_r, col_y);

  function automatic cost_t abs4(input coef_t v [4]);
    cost_t s;
    s = '0;
    for (int k = 0; k < 4; k++) s += {4'b0, (v[k] < 0 ? 16'(-v[k]) : 16'(v[k]))};
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_act   <= 1'b0;
      col_cnt   <= '0;
      col_v     <= 1'b0;
      col_last  <= 1'b0;
      h_v       <= 1'b0;
      h_last    <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      sae       <= '0;
      dc        <= '0;
      for (int k = 0; k < 4; k++) begin
        col_r[k] <= '0;
        h_r[k]   <= '0;
      end
    end else begin
      // column read from the transpose file
      col_v    <= 1'b0;
      col_last <= 1'b0;
      if (col_go) begin
        col_act <= 1'b1;
        col_cnt <= '0;
      end else if (col_act) begin
        for (int r = 0; r < 4; r++) col_r[r] <= trf[r][col_cnt];
        col_v    <= 1'b1;
        col_last <= (col_cnt == 2'd3);
        col_cnt  <= col_cnt + 2'd1;
        if (col_cnt == 2'd3) col_act <= 1'b0;
      end
      // Hadamard output register
      h_v    <= col_v;
      h_last <= col_last;
      if (col_v) begin
        h_r <= col_y;
        if (!h_v) dc <= col_y[0];   // first column: (0,0) coefficient
      end
      // accumulation of absolute values
      out_valid <= 1'b0;
      if (h_v) begin
        if (h_last) begin
          sae       <= acc + abs4(h_r);
          acc       <= '0;
          out_valid <= 1'b1;
        end else begin
          acc <= acc + abs4(h_r);
        end
      end
    end
  end

endmodule
