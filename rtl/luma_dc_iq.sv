// luma_dc_iq: inverse 4x4 Hadamard transform and inverse quantisation of the
// sixteen luma DC levels of an I16 macroblock.
//
// The quantised DC levels arrive from the TQ module one column per cycle
// (in_lvl[i] = level at row i of column in_col, columns 0..3 in order). When
// the fourth column is in, the 4x4 Hadamard transform of the level matrix is
// taken and every result f is scaled as the standard does for luma DC:
// (f * V(QP%6,0,0)) << (QP/6 - 2) for QP >= 12, and
// (f * V + 2^(1-QP/6)) >> (2 - QP/6) below. The sixteen dequantised DC values
// are held on dc_out, indexed by 4x4 block number (scan order), from the
// cycle after the last column (out_valid pulses then) until the next set.
// They replace the DC of each luma block in the inverse transform.
module luma_dc_iq
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  qp_t        qp,
  input  logic       in_valid,
  input  logic [1:0] in_col,
  input  coef_t      in_lvl [4],
  output logic       out_valid,
  output dq_t        dc_out [16]
);

  coef_t lv [4][4];   // [row][col]

  logic signed [19:0] rh [4][4], ch [4][4];
  always_comb begin
    coef_t m [4][4];
    m = lv;
    m[0][in_col] = in_lvl[0];
    m[1][in_col] = in_lvl[1];
    m[2][in_col] = in_lvl[2];
    m[3][in_col] = in_lvl[3];
    for (int r = 0; r < 4; r++) begin
      rh[r][0] = 20'(m[r][0]) + 20'(m[r][1]) + 20'(m[r][2]) + 20'(m[r][3]);
      rh[r][1] = 20'(m[r][0]) + 20'(m[r][1]) - 20'(m[r][2]) - 20'(m[r][3]);
      rh[r][2] = 20'(m[r][0]) - 20'(m[r][1]) - 20'(m[r][2]) + 20'(m[r][3]);
      rh[r][3] = 20'(m[r][0]) - 20'(m[r][1]) + 20'(m[r][2]) - 20'(m[r][3]);
    end
    for (int c = 0; c < 4; c++) begin
      ch[0][c] = rh[0][c] + rh[1][c] + rh[2][c] + rh[3][c];
      ch[1][c] = rh[0][c] + rh[1][c] - rh[2][c] - rh[3][c];
      ch[2][c] = rh[0][c] - rh[1][c] - rh[2][c] + rh[3][c];
      ch[3][c] = rh[0][c] - rh[1][c] + rh[2][c] - rh[3][c];
    end
  end

  function automatic dq_t scale_dc(input logic signed [19:0] f, input qp_t q);
    logic signed [31:0] p;
    logic [3:0] q6;
    q6 = qp_div6(q);
    p  = 32'(f) * 32'(dequant_v(qp_mod6(q), 2'd0));
    if (q6 >= 4'd2) return dq_t'(p <<< (q6 - 4'd2));
    else            return dq_t'((p + (32'sd1 <<< (4'd1 - q6))) >>> (4'd2 - q6));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) lv[r][c] <= '0;
      for (int b = 0; b < 16; b++) dc_out[b] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < 4; r++) lv[r][in_col] <= in_lvl[r];
        if (in_col == 2'd3) begin
          out_valid <= 1'b1;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              dc_out[{r[1], c[1], r[0], c[0]}] <= scale_dc(ch[r][c], qp);
        end
      end
    end
  end

endmodule
