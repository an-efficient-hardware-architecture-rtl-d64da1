// tq4x4: forward 4x4 integer transform and quantisation (the TQ module).
//
// A 4x4 residual block enters one row per cycle, four samples wide, on four
// consecutive cycles. Each row goes through the 1-D integer transform
// butterfly (coefficients 1,2,1,1 / 1,1,-1,-2 / ...) and is written into a
// transpose register file. The register file is double-buffered so that the
// next block may follow immediately. Once the fourth row is stored, the four
// columns are read out one per cycle, pass the second 1-D transform, and four
// parallel quantisers turn them into levels. The output is one column per
// cycle: out_lvl[i] is the level at (row i, column out_col).
//
// Timing (counting the first input row as cycle 1, as in the 13-cycle
// schedule of the design, where cycle 0 is the caller's SRAM address cycle):
// rows in on cycles 1-4, column inputs on cycles 6-9, quantisation on 8-11,
// levels out (out_valid) on cycles 9-12.
//
// Mode inputs are sampled with the first row. ac_only forces the (0,0) level
// to zero (luma AC of an I16 macroblock, chroma AC) and reports the raw DC
// coefficient on dc_raw with the column-0 output. The mux input dcq_* feeds
// four already-transformed DC coefficients (one column of the luma DC
// Hadamard output of the 16x16 prediction module) straight to the quantisers
// with the DC rule; they appear on the output two cycles later with out_isdc
// set and out_col counting the DC columns 0..3 in arrival order. A dcq word
// must not coincide with a column of a 4x4 block in the quantiser stage.
// Widths, the handshake and the double buffer are this design's choices.
module tq4x4
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  qp_t         qp,
  input  logic        intra,
  input  logic        ac_only,
  input  logic        in_valid,
  input  coef_t       in_row [4],
  input  logic        dcq_valid,
  input  logic signed [17:0] dcq_in [4],
  output logic        out_valid,
  output logic [1:0]  out_col,
  output logic        out_isdc,
  output coef_t       out_lvl [4],
  output coef_t       dc_raw
);

  // ---------------- row pass ----------------
  logic [1:0] in_cnt;
  logic       wbank, rbank;
  logic       mode_ac_only [2];
  logic       mode_intra [2];
  qp_t        mode_qp [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt   <= '0;
      wbank    <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        mode_ac_only[k] <= 1'b0;
        mode_intra[k]   <= 1'b0;
        mode_qp[k]      <= '0;
      end
    end else begin
      if (in_valid) begin
        in_cnt   <= in_cnt + 2'd1;
        if (in_cnt == 2'd0) begin
          mode_ac_only[wbank] <= ac_only;
          mode_intra[wbank]   <= intra;
          mode_qp[wbank]      <= qp;
        end
        if (in_cnt == 2'd3) wbank <= ~wbank;
      end
    end
  end

  function automatic void fwd1d(input coef_t x [4], output coef_t y [4]);
    logic signed [15:0] s0, s1, d0, d1;
    s0 = x[0] + x[3];
    s1 = x[1] + x[2];
    d0 = x[0] - x[3];
    d1 = x[1] - x[2];
    y[0] = s0 + s1;
    y[1] = (d0 <<< 1) + d1;
    y[2] = s0 - s1;
    y[3] = d0 - (d1 <<< 1);
  endfunction

  coef_t row_y [4];
  always_comb fwd1d(in_row, row_y);

  // transpose register file, two banks: trf[bank][row][col]
  coef_t trf [2][4][4];
  logic  wr_bank_r;   // bank being written by the row stage
  logic  col_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank_r <= 1'b0;
      col_start <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) trf[b][r][c] <= '0;
    end else begin
      col_start <= 1'b0;
      if (in_valid) begin
        trf[wr_bank_r][in_cnt] <= row_y;
        if (in_cnt == 2'd3) begin
          wr_bank_r <= ~wr_bank_r;
          col_start <= 1'b1;
        end
      end
    end
  end

  // ---------------- column pass ----------------
  logic       col_act;
  logic [1:0] col_cnt;
  coef_t      col_r [4];
  logic       col_r_v;
  logic [1:0] col_r_idx;
  qp_t        col_r_qp, m_qp;
  logic       col_r_intra, m_intra, col_r_aco, m_aco;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_act    <= 1'b0;
      col_cnt    <= '0;
      rbank      <= 1'b0;
      col_r_v    <= 1'b0;
      col_r_idx  <= '0;
      col_r_qp   <= '0;
      col_r_intra <= 1'b0;
      col_r_aco  <= 1'b0;
      for (int k = 0; k < 4; k++) col_r[k] <= '0;
    end else begin
      col_r_v <= 1'b0;
      if (col_act) begin
        for (int r = 0; r < 4; r++) col_r[r] <= trf[rbank][r][col_cnt];
        col_r_v    <= 1'b1;
        col_r_idx  <= col_cnt;
        col_r_qp    <= mode_qp[rbank];
        col_r_intra <= mode_intra[rbank];
        col_r_aco   <= mode_ac_only[rbank];
        col_cnt    <= col_cnt + 2'd1;
        if (col_cnt == 2'd3) begin
          col_act <= col_start;   // the next block follows without a gap
          rbank   <= ~rbank;
        end
      end else if (col_start) begin
        col_act <= 1'b1;
        col_cnt <= '0;
      end
    end
  end

  coef_t col_y [4];
  always_comb fwd1d(col_r, col_y);

  // transform f/f, also the entry of the DC mux
  logic signed [17:0] m_r [4];
  logic       m_v, m_isdc;
  logic [1:0] m_idx;
  logic [1:0] dcq_cnt;   // column of the next DC word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_v    <= 1'b0;
      m_isdc <= 1'b0;
      m_idx  <= '0;
      m_qp   <= '0;
      m_intra <= 1'b0;
      m_aco  <= 1'b0;
      dcq_cnt <= '0;
      for (int k = 0; k < 4; k++) m_r[k] <= '0;
    end else begin
      m_v    <= col_r_v | dcq_valid;
      m_isdc <= dcq_valid & ~col_r_v;
      if (col_r_v) begin
        for (int k = 0; k < 4; k++) m_r[k] <= 18'(col_y[k]);
        m_idx  <= col_r_idx;
        m_qp   <= col_r_qp;
        m_intra <= col_r_intra;
        m_aco  <= col_r_aco;
      end else if (dcq_valid) begin
        m_r   <= dcq_in;
        m_idx <= dcq_cnt;
        dcq_cnt <= dcq_cnt + 2'd1;
      end
    end
  end

  // ---------------- four parallel quantisers ----------------
  qp_t  q_qp;
  logic q_intra;
  always_comb begin
    q_qp    = m_isdc ? qp : m_qp;
    q_intra = m_isdc ? intra : m_intra;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_col   <= '0;
      out_isdc  <= 1'b0;
      dc_raw    <= '0;
      for (int k = 0; k < 4; k++) out_lvl[k] <= '0;
    end else begin
      out_valid <= m_v;
      out_col   <= m_idx;
      out_isdc  <= m_isdc;
      for (int k = 0; k < 4; k++) begin
        if (m_isdc)
          out_lvl[k] <= quantize(m_r[k], quant_mf(qp_mod6(q_qp), 2'd0), q_qp, q_intra, 1'b1);
        else if (k == 0 && m_idx == 2'd0 && m_aco)
          out_lvl[k] <= '0;
        else
          out_lvl[k] <= quantize(m_r[k], quant_mf(qp_mod6(q_qp), pos_class(2'(k), m_idx)),
                                 q_qp, q_intra, 1'b0);
      end
      if (m_v && !m_isdc && m_idx == 2'd0) dc_raw <= coef_t'(m_r[0]);
    end
  end

endmodule
