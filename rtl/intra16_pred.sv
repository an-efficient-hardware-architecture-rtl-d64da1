// intra16_pred: 16x16 luma intra prediction with the luma DC Hadamard.
//
// Four modes are evaluated in parallel (vertical, horizontal, DC, plane), one
// Hadamard SAE unit per mode. The macroblock is walked 4x4 block by 4x4 block
// (blocks 0..15 in the scan order of the residual), eleven cycles per block:
// the SAE unit of each mode returns the Hadamard SAE of the block and its
// (0,0) coefficient, which is the sum of the block's prediction error and
// therefore also the DC coefficient of the forward integer transform. The
// AC part of the SAE (total minus |DC|) is accumulated, and the DC is kept in
// that mode's DC_FF (sixteen registers per mode). A seventeenth pass feeds the
// sixteen DC values divided by 4 through the same SAE units; its result
// completes the distortion of each mode: cost = (AC sum + DC pass) / 2.
//
// The best available mode (V needs the row above, H the left column, plane
// all neighbours) is kept, and its prediction is written out as 64 words of
// four pixels (row-major, word = 4 pixels of a row) to the 16x16 prediction
// SRAM. At the same time the luma DC transform is formed from the DC_FF of
// the chosen mode, without any further pass over the residual: the 4x4
// Hadamard transform of the sixteen DC values, halved, leaves on dcq_out one
// column per cycle (dcq_out[i] = row i of column dcq_col) for the quantisers
// of the TQ module. This is what lets IQIT of an I16 macroblock start as soon
// as the first 4x4 block has been transformed.
//
// Schedule after start (cycle 0): cycles 1-2 plane parameters a, b, c and the
// DC value; 16 blocks of 11 cycles from cycle 3 (current RAM address on the
// first four cycles of each slot, data one cycle later); the DC pass in the
// 17th slot; mode selection one cycle after the last SAE; then 64 cycles of
// prediction write with the DC Hadamard output on the first four of them.
// done pulses with the last prediction word. Neighbour inputs must be stable
// from start to done. Start to done is 255 cycles.
//
// The four parallel processing elements with DC_FF, the 17 x 11 SAE cycles,
// the one-cycle selection and the 64-cycle write follow the published
// architecture; the combinational DC Hadamard at the end (instead of a
// twelve-cycle pipeline), the plane set-up in two cycles from registered
// neighbours, and the JM cost formula are this design's choices.
module intra16_pred
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        top [16],
  input  pix_t        left [16],
  input  pix_t        tl,
  input  logic        top_av,
  input  logic        left_av,
  input  logic        tl_av,
  // current macroblock read port: address = row*4 + word, data next cycle
  output logic        cur_rd,
  output logic [5:0]  cur_addr,
  input  pix_t        cur_pix [4],
  // decision
  output i16mode_t    best_mode,
  output cost_t       best_cost,
  output logic        cost_valid,
  // prediction write to the 16x16 prediction SRAM
  output logic        pw_valid,
  output logic [5:0]  pw_addr,
  output pix_t        pw_pix [4],
  // Hadamard-transformed luma DC to the quantisers
  output logic        dcq_valid,
  output logic [1:0]  dcq_col,
  output logic signed [17:0] dcq_out [4],
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_BLK, S_SEL, S_WRITE} state_e;
  state_e state;

  logic [1:0] setup_cnt;
  logic [4:0] slot;       // 0..15 blocks, 16 = DC pass
  logic [3:0] phase;      // 0..10 inside a slot
  logic [5:0] wcnt;
  logic [4:0] res_cnt;    // SAE results received

  // ---------------- plane parameters and DC value ----------------
  logic signed [16:0] hsum, vsum;
  logic signed [12:0] pb, pc;
  logic signed [14:0] pa;
  pix_t               dcv;

  function automatic pix_t tp(input int x);  // p[x,-1], x = -1..15
    return (x < 0) ? tl : top[x];
  endfunction
  function automatic pix_t lp(input int y);  // p[-1,y], y = -1..15
    return (y < 0) ? tl : left[y];
  endfunction

  // plane gradients and border sums of the neighbours
  logic signed [16:0] hs, vs;
  logic [12:0] st, sl;
  always_comb begin
    hs = '0;
    vs = '0;
    st = '0;
    sl = '0;
    for (int k = 0; k < 8; k++) begin
      hs += 17'(k + 1) * (17'({1'b0, tp(8 + k)}) - 17'({1'b0, tp(6 - k)}));
      vs += 17'(k + 1) * (17'({1'b0, lp(8 + k)}) - 17'({1'b0, lp(6 - k)}));
    end
    for (int k = 0; k < 16; k++) begin
      st += 13'(top[k]);
      sl += 13'(left[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsum <= '0;
      vsum <= '0;
      pa   <= '0;
      pb   <= '0;
      pc   <= '0;
      dcv  <= 8'd128;
    end else if (state == S_SETUP && setup_cnt == 2'd0) begin
      hsum <= hs;
      vsum <= vs;
      pa   <= 15'(16 * (int'(left[15]) + int'(top[15])));
      if (top_av && left_av) dcv <= 8'((st + sl + 13'd16) >> 5);
      else if (top_av)       dcv <= 8'((st + 13'd8) >> 4);
      else if (left_av)      dcv <= 8'((sl + 13'd8) >> 4);
      else                   dcv <= 8'd128;
    end else if (state == S_SETUP && setup_cnt == 2'd1) begin
      pb <= 13'((5 * 32'(hsum) + 32) >>> 6);
      pc <= 13'((5 * 32'(vsum) + 32) >>> 6);
    end
  end

  // prediction of the four pixels (x0..x0+3, y) for one mode
  function automatic void pred4(input logic [1:0] mode, input logic [3:0] y,
                                input logic [3:0] x0, output pix_t p [4]);
    for (int k = 0; k < 4; k++) begin
      case (mode)
        2'd0: p[k] = top[x0 + 4'(k)];
        2'd1: p[k] = left[y];
        2'd2: p[k] = dcv;
        default: p[k] = clip_pix(25'((32'(pa) + 32'(pb) * (32'(x0) + k - 7) +
                                     32'(pc) * (32'(y) - 7) + 16) >>> 5));
      endcase
    end
  endfunction

  // ---------------- block walk ----------------
  logic [3:0] blk;
  logic [1:0] bx, by;
  assign blk = slot[3:0];
  assign bx  = blk_x(blk);
  assign by  = blk_y(blk);

  assign cur_rd   = (state == S_BLK) && !slot[4] && phase < 4'd4;
  assign cur_addr = {by, 2'(phase), bx};

  logic       dat_v;
  logic [1:0] dat_row;
  logic       dcpass_v;
  assign dat_v    = (state == S_BLK) && phase >= 4'd1 && phase <= 4'd4;
  assign dat_row  = 2'(phase - 4'd1);
  assign dcpass_v = dat_v && slot[4];

  coef_t dcff [4][16];    // DC_FF per mode, index = 4x4 block number
  coef_t diff [4][4];
  cost_t sae [4];
  coef_t sae_dc [4];
  logic  sae_v [4];

  always_comb begin
    pix_t p [4];
    for (int md = 0; md < 4; md++) begin
      pred4(2'(md), {by, dat_row}, {bx, 2'b00}, p);
      for (int k = 0; k < 4; k++) begin
        if (slot[4])   // DC pass: row dat_row of the 4x4 DC matrix, /4
          diff[md][k] = dcff[md][{dat_row[1], 1'(k >> 1), dat_row[0], 1'(k)}] >>> 2;
        else
          diff[md][k] = coef_t'({8'd0, cur_pix[k]}) - coef_t'({8'd0, p[k]});
      end
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_pe
    sae4x4 u_sae (
      .clk(clk), .rst_n(rst_n), .in_valid(dat_v || dcpass_v), .diff(diff[g]),
      .out_valid(sae_v[g]), .sae(sae[g]), .dc(sae_dc[g])
    );
  end

  logic [23:0] acc [4];
  logic [3:0]  res_blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      setup_cnt <= '0;
      slot      <= '0;
      phase     <= '0;
      wcnt      <= '0;
      res_cnt   <= '0;
      res_blk   <= '0;
      for (int md = 0; md < 4; md++) begin
        acc[md] <= '0;
        for (int b = 0; b < 16; b++) dcff[md][b] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state     <= S_SETUP;
          setup_cnt <= '0;
        end
        S_SETUP: begin
          setup_cnt <= setup_cnt + 2'd1;
          if (setup_cnt == 2'd1) begin
            state   <= S_BLK;
            slot    <= '0;
            phase   <= '0;
            res_cnt <= '0;
            res_blk <= '0;
            for (int md = 0; md < 4; md++) acc[md] <= '0;
          end
        end
        S_BLK: begin
          phase <= (phase == 4'd10) ? 4'd0 : phase + 4'd1;
          if (phase == 4'd10 && slot != 5'd16) slot <= slot + 5'd1;
          if (sae_v[0]) begin
            res_cnt <= res_cnt + 5'd1;
            res_blk <= res_blk + 4'd1;
            for (int md = 0; md < 4; md++) begin
              if (res_cnt == 5'd16) begin
                acc[md] <= acc[md] + 24'(sae[md]);
              end else begin
                acc[md] <= acc[md] + 24'(sae[md]) -
                           24'(sae_dc[md] < 0 ? 16'(-sae_dc[md]) : sae_dc[md]);
                dcff[md][res_blk] <= sae_dc[md];
              end
            end
            if (res_cnt == 5'd16) state <= S_SEL;
          end
        end
        S_SEL: begin
          state <= S_WRITE;
          wcnt  <= '0;
        end
        S_WRITE: begin
          wcnt <= wcnt + 6'd1;
          if (wcnt == 6'd63) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- mode selection ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mode  <= 2'd2;
      best_cost  <= '0;
      cost_valid <= 1'b0;
    end else begin
      cost_valid <= 1'b0;
      if (state == S_SEL) begin
        logic [3:0] ok;
        logic [23:0] bc;
        logic [1:0] bm;
        ok = {top_av & left_av & tl_av, 1'b1, left_av, top_av};
        bc = '1;
        bm = 2'd2;
        for (int md = 0; md < 4; md++)
          if (ok[md] && (acc[md] >> 1) < bc) begin
            bc = acc[md] >> 1;
            bm = 2'(md);
          end
        best_mode  <= bm;
        best_cost  <= (bc > 24'(COST_MAX)) ? COST_MAX : cost_t'(bc);
        cost_valid <= 1'b1;
      end
    end
  end

  // ---------------- prediction write ----------------
  always_comb begin
    pred4(best_mode, wcnt[5:2], {wcnt[1:0], 2'b00}, pw_pix);
    pw_valid = (state == S_WRITE);
    pw_addr  = wcnt;
  end
  assign done = (state == S_WRITE) && wcnt == 6'd63;

  // ---------------- luma DC Hadamard of the chosen mode ----------------
  // dcm[r][c]: DC of the 4x4 block at row r, column c of the macroblock
  logic signed [17:0] dcm [4][4], rowh [4][4], colh [4][4];
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        dcm[r][c] = 18'(dcff[best_mode][{r[1], c[1], r[0], c[0]}]);
    for (int r = 0; r < 4; r++) begin
      rowh[r][0] = dcm[r][0] + dcm[r][1] + dcm[r][2] + dcm[r][3];
      rowh[r][1] = dcm[r][0] + dcm[r][1] - dcm[r][2] - dcm[r][3];
      rowh[r][2] = dcm[r][0] - dcm[r][1] - dcm[r][2] + dcm[r][3];
      rowh[r][3] = dcm[r][0] - dcm[r][1] + dcm[r][2] - dcm[r][3];
    end
    for (int c = 0; c < 4; c++) begin
      colh[0][c] = (rowh[0][c] + rowh[1][c] + rowh[2][c] + rowh[3][c]) >>> 1;
      colh[1][c] = (rowh[0][c] + rowh[1][c] - rowh[2][c] - rowh[3][c]) >>> 1;
      colh[2][c] = (rowh[0][c] - rowh[1][c] - rowh[2][c] + rowh[3][c]) >>> 1;
      colh[3][c] = (rowh[0][c] - rowh[1][c] + rowh[2][c] - rowh[3][c]) >>> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcq_valid <= 1'b0;
      dcq_col   <= '0;
      for (int k = 0; k < 4; k++) dcq_out[k] <= '0;
    end else begin
      dcq_valid <= (state == S_WRITE) && wcnt < 6'd4;
      dcq_col   <= wcnt[1:0];
      for (int k = 0; k < 4; k++) dcq_out[k] <= colh[k][wcnt[1:0]];
    end
  end

endmodule
