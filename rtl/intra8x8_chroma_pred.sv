// intra8x8_chroma_pred: intra prediction of the two 8x8 chroma components
// (Cb and Cr) of a macroblock, with mode decision and the write of the
// chosen prediction to the 8x8 prediction SRAM.
//
// The four chroma modes (0 DC, 1 horizontal, 2 vertical, 3 plane) are
// evaluated in parallel by four SAE units, in the same slot structure as
// the 16x16 luma prediction:
//   - two set-up cycles compute, per component, the DC value of each 4x4
//     quadrant (H.264 chroma DC rules) and the plane parameters a, b, c;
//   - eight slots of 11 cycles walk the 4x4 blocks (Cb blocks 0..3, then Cr
//     blocks 0..3): the block is read from the chroma current RAM one row per
//     cycle, the four predictions are subtracted, and each SAE unit adds the
//     Hadamard SAE of its mode;
//   - one cycle picks the cheapest available mode, cost = SAE sum / 2 (ties
//     to the lower mode number; H needs the left, V the top, plane all
//     neighbours);
//   - 32 cycles write the chosen prediction, four pixels per word.
// Both components always use the same mode.
//
// Interface: neighbours top[c][x], left[c][y] and tl[c] for component c
// (0 Cb, 1 Cr) with their availability, stable from start to done.
// Current RAM read port: address {c, row[2:0], column/4}, data the next
// cycle. Prediction words leave on pw_* with the same addressing. done
// pulses with the last word; start to done takes 125 cycles.
//
// That chroma prediction reuses the organisation of the 16x16 prediction
// (SAE processing elements, slot walk, prediction write into the 8x8
// prediction SRAM) follows the published design, which runs it on the
// 16x16 module itself. Making it a unit of its own, the cost without a DC
// Hadamard term, the tie rule and the cycle count are this design's choices.
module intra8x8_chroma_pred
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        top [2][8],
  input  pix_t        left [2][8],
  input  pix_t        tl [2],
  input  logic        top_av,
  input  logic        left_av,
  input  logic        tl_av,
  // chroma current RAM read port
  output logic        cur_rd,
  output logic [4:0]  cur_addr,
  input  pix_t        cur_pix [4],
  // decision
  output logic [1:0]  best_mode,
  output cost_t       best_cost,
  output logic        cost_valid,
  // prediction write to the 8x8 prediction SRAM
  output logic        pw_valid,
  output logic [4:0]  pw_addr,
  output pix_t        pw_pix [4],
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_BLK, S_SEL, S_WRITE} state_e;
  state_e state;

  logic       setup_cnt;
  logic [3:0] slot;       // 0..7 blocks, 8 = waiting for the last result
  logic [3:0] phase;      // 0..10 inside a slot
  logic [4:0] wcnt;
  logic [2:0] res_cnt;

  // ---------------- DC values and plane parameters ----------------
  pix_t               dcv [2][4];     // per component and 4x4 quadrant
  logic signed [14:0] pa [2];
  logic signed [12:0] pb [2], pc [2];
  logic signed [13:0] hsum [2], vsum [2];

  function automatic pix_t tp(input logic c, input int x);   // p[x,-1]
    return (x < 0) ? tl[c] : top[c][x];
  endfunction
  function automatic pix_t lp(input logic c, input int y);   // p[-1,y]
    return (y < 0) ? tl[c] : left[c][y];
  endfunction

  logic signed [13:0] hs [2], vs [2];
  logic [9:0]         st [2][2], sl [2][2];   // sums of four top / left pixels, per half
  pix_t               dc_n [2][4];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      hs[c] = '0;
      vs[c] = '0;
      for (int k = 0; k < 4; k++) begin
        hs[c] += 14'(k + 1) * (14'({1'b0, tp(1'(c), 4 + k)}) - 14'({1'b0, tp(1'(c), 2 - k)}));
        vs[c] += 14'(k + 1) * (14'({1'b0, lp(1'(c), 4 + k)}) - 14'({1'b0, lp(1'(c), 2 - k)}));
      end
      for (int h = 0; h < 2; h++) begin
        st[c][h] = '0;
        sl[c][h] = '0;
        for (int k = 0; k < 4; k++) begin
          st[c][h] += 10'(top[c][4 * h + k]);
          sl[c][h] += 10'(left[c][4 * h + k]);
        end
      end
      // quadrant q = 2*row + column; corner quadrants use both sides,
      // the top-right one prefers the top, the bottom-left one the left
      for (int q = 0; q < 4; q++) begin
        logic [10:0] both;
        both = 11'(st[c][q & 1]) + 11'(sl[c][q >> 1]);
        if (q == 0 || q == 3) begin
          if (top_av && left_av) dc_n[c][q] = 8'((both + 11'd4) >> 3);
          else if (top_av)       dc_n[c][q] = 8'((st[c][q & 1] + 10'd2) >> 2);
          else if (left_av)      dc_n[c][q] = 8'((sl[c][q >> 1] + 10'd2) >> 2);
          else                   dc_n[c][q] = 8'd128;
        end else if (q == 1) begin
          if (top_av)            dc_n[c][q] = 8'((st[c][1] + 10'd2) >> 2);
          else if (left_av)      dc_n[c][q] = 8'((sl[c][0] + 10'd2) >> 2);
          else                   dc_n[c][q] = 8'd128;
        end else begin
          if (left_av)           dc_n[c][q] = 8'((sl[c][1] + 10'd2) >> 2);
          else if (top_av)       dc_n[c][q] = 8'((st[c][0] + 10'd2) >> 2);
          else                   dc_n[c][q] = 8'd128;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        hsum[c] <= '0;
        vsum[c] <= '0;
        pa[c]   <= '0;
        pb[c]   <= '0;
        pc[c]   <= '0;
        for (int q = 0; q < 4; q++) dcv[c][q] <= 8'd128;
      end
    end else if (state == S_SETUP && !setup_cnt) begin
      for (int c = 0; c < 2; c++) begin
        hsum[c] <= hs[c];
        vsum[c] <= vs[c];
        pa[c]   <= 15'(16 * (int'(left[c][7]) + int'(top[c][7])));
        dcv[c]  <= dc_n[c];
      end
    end else if (state == S_SETUP && setup_cnt) begin
      for (int c = 0; c < 2; c++) begin
        pb[c] <= 13'((34 * 32'(hsum[c]) + 32) >>> 6);
        pc[c] <= 13'((34 * 32'(vsum[c]) + 32) >>> 6);
      end
    end
  end

  // prediction of the four pixels (x0..x0+3, y) of component c for one mode
  function automatic void pred4(input logic [1:0] mode, input logic c, input logic [2:0] y,
                                input logic [2:0] x0, output pix_t p [4]);
    for (int k = 0; k < 4; k++) begin
      case (mode)
        2'd0: p[k] = dcv[c][{y[2], x0[2]}];
        2'd1: p[k] = left[c][y];
        2'd2: p[k] = top[c][x0 + 3'(k)];
        default: p[k] = clip_pix(25'((32'(pa[c]) + 32'(pb[c]) * (32'(x0) + k - 3) +
                                     32'(pc[c]) * (32'(y) - 3) + 16) >>> 5));
      endcase
    end
  endfunction

  // ---------------- block walk ----------------
  logic       comp, bx, by;
  logic       dat_v;
  logic [1:0] dat_row;

  assign comp     = slot[2];
  assign bx       = slot[0];
  assign by       = slot[1];
  assign cur_rd   = (state == S_BLK) && !slot[3] && phase < 4'd4;
  assign cur_addr = {comp, by, 2'(phase), bx};
  assign dat_v    = (state == S_BLK) && !slot[3] && phase >= 4'd1 && phase <= 4'd4;
  assign dat_row  = 2'(phase - 4'd1);

  coef_t diff [4][4];
  cost_t sae [4];
  logic  sae_v [4];

  always_comb begin
    pix_t p [4];
    for (int md = 0; md < 4; md++) begin
      pred4(2'(md), comp, {by, dat_row}, {bx, 2'b00}, p);
      for (int k = 0; k < 4; k++)
        diff[md][k] = coef_t'({8'd0, cur_pix[k]}) - coef_t'({8'd0, p[k]});
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_pe
    sae4x4 u_sae (
      .clk(clk), .rst_n(rst_n), .in_valid(dat_v), .diff(diff[g]),
      .out_valid(sae_v[g]), .sae(sae[g]), .dc()
    );
  end

  logic [19:0] acc [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      setup_cnt <= 1'b0;
      slot      <= '0;
      phase     <= '0;
      wcnt      <= '0;
      res_cnt   <= '0;
      for (int md = 0; md < 4; md++) acc[md] <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state     <= S_SETUP;
          setup_cnt <= 1'b0;
        end
        S_SETUP: begin
          setup_cnt <= 1'b1;
          if (setup_cnt) begin
            state   <= S_BLK;
            slot    <= '0;
            phase   <= '0;
            res_cnt <= '0;
            for (int md = 0; md < 4; md++) acc[md] <= '0;
          end
        end
        S_BLK: begin
          phase <= (phase == 4'd10) ? 4'd0 : phase + 4'd1;
          if (phase == 4'd10 && !slot[3]) slot <= slot + 4'd1;
          if (sae_v[0]) begin
            res_cnt <= res_cnt + 3'd1;
            for (int md = 0; md < 4; md++) acc[md] <= acc[md] + 20'(sae[md]);
            if (res_cnt == 3'd7) state <= S_SEL;
          end
        end
        S_SEL: begin
          state <= S_WRITE;
          wcnt  <= '0;
        end
        S_WRITE: begin
          wcnt <= wcnt + 5'd1;
          if (wcnt == 5'd31) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- mode selection ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mode  <= 2'd0;
      best_cost  <= '0;
      cost_valid <= 1'b0;
    end else begin
      cost_valid <= 1'b0;
      if (state == S_SEL) begin
        logic [3:0]  ok;
        logic [19:0] bc;
        logic [1:0]  bm;
        ok = {top_av & left_av & tl_av, top_av, left_av, 1'b1};
        bc = '1;
        bm = 2'd0;
        for (int md = 0; md < 4; md++)
          if (ok[md] && (acc[md] >> 1) < bc) begin
            bc = acc[md] >> 1;
            bm = 2'(md);
          end
        best_mode  <= bm;
        best_cost  <= bc;
        cost_valid <= 1'b1;
      end
    end
  end

  // ---------------- prediction write ----------------
  always_comb begin
    pred4(best_mode, wcnt[4], wcnt[3:1], {wcnt[0], 2'b00}, pw_pix);
    pw_valid = (state == S_WRITE);
    pw_addr  = wcnt;
  end
  assign done = (state == S_WRITE) && wcnt == 5'd31;

endmodule
