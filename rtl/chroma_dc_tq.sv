// chroma_dc_tq: 2x2 Hadamard transform, quantisation and the matching
// inverse path for the four DC coefficients of one chroma component.
//
// After the 4x4 integer transform of the four 4x4 blocks of an 8x8 chroma
// component, their DC coefficients (DC16..DC19 for Cb, in raster order of
// the blocks) are collected in a small register file and handled here:
//   cycle 0  in_valid: the four DC coefficients enter the Hadamard input;
//   cycle 1  the 2x2 Hadamard result is held in the Hadamard flip-flops;
//   cycle 2  lvl_valid: four quantised levels, quantised in parallel with
//            the DC rule (offset 2f, shift qbits+1);
//   cycle 3  dq_valid: the levels after the inverse 2x2 Hadamard and chroma
//            DC scaling ((f*V) << QP/6) >> 1, ready to replace the DC of
//            each block in the inverse transform.
// A new component may enter every cycle (fully pipelined).
//
// Interface: in_dc[k] is the DC of chroma block k (k = 2*row + column);
// lvl[k] is the level at the same position of the 2x2 Hadamard output;
// dq[k] is the reconstructed DC of block k. qp is the chroma QP and intra
// selects the intra or inter rounding offset; both are sampled with
// in_valid.
//
// The four-cycle schedule (Hadamard input, Hadamard flip-flops,
// quantisation, result) follows the design's timing table for the 2x2 DC
// block. Putting the inverse path in the same unit, the 32-bit inner width
// of the inverse path and the 24-bit output are this design's choices.
module chroma_dc_tq
  import h264_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_dc [4],
  input  qp_t   qp,
  input  logic  intra,
  output logic  lvl_valid,
  output coef_t lvl [4],
  output logic  dq_valid,
  output dq_t   dq [4]
);

  // ---------------- Hadamard flip-flops ----------------
  logic signed [17:0] h [4];
  logic               h_v, h_intra;
  qp_t                h_qp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_v     <= 1'b0;
      h_intra <= 1'b0;
      h_qp    <= '0;
      for (int k = 0; k < 4; k++) h[k] <= '0;
    end else begin
      h_v <= in_valid;
      if (in_valid) begin
        h[0] <= 18'(in_dc[0]) + 18'(in_dc[1]) + 18'(in_dc[2]) + 18'(in_dc[3]);
        h[1] <= 18'(in_dc[0]) - 18'(in_dc[1]) + 18'(in_dc[2]) - 18'(in_dc[3]);
        h[2] <= 18'(in_dc[0]) + 18'(in_dc[1]) - 18'(in_dc[2]) - 18'(in_dc[3]);
        h[3] <= 18'(in_dc[0]) - 18'(in_dc[1]) - 18'(in_dc[2]) + 18'(in_dc[3]);
        h_qp    <= qp;
        h_intra <= intra;
      end
    end
  end

  // ---------------- four quantisers ----------------
  qp_t l_qp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_valid <= 1'b0;
      l_qp      <= '0;
      for (int k = 0; k < 4; k++) lvl[k] <= '0;
    end else begin
      lvl_valid <= h_v;
      if (h_v) begin
        for (int k = 0; k < 4; k++)
          lvl[k] <= quantize(h[k], quant_mf(qp_mod6(h_qp), 2'd0), h_qp, h_intra, 1'b1);
        l_qp <= h_qp;
      end
    end
  end

  // ---------------- inverse Hadamard and DC scaling ----------------
  logic signed [31:0] f [4];
  logic signed [31:0] v0;

  always_comb begin
    f[0] = 32'(lvl[0]) + 32'(lvl[1]) + 32'(lvl[2]) + 32'(lvl[3]);
    f[1] = 32'(lvl[0]) - 32'(lvl[1]) + 32'(lvl[2]) - 32'(lvl[3]);
    f[2] = 32'(lvl[0]) + 32'(lvl[1]) - 32'(lvl[2]) - 32'(lvl[3]);
    f[3] = 32'(lvl[0]) - 32'(lvl[1]) - 32'(lvl[2]) + 32'(lvl[3]);
    v0   = 32'($signed({1'b0, dequant_v(qp_mod6(l_qp), 2'd0)}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_valid <= 1'b0;
      for (int k = 0; k < 4; k++) dq[k] <= '0;
    end else begin
      dq_valid <= lvl_valid;
      if (lvl_valid)
        for (int k = 0; k < 4; k++) dq[k] <= dq_t'(((f[k] * v0) <<< qp_div6(l_qp)) >>> 1);
    end
  end

endmodule
