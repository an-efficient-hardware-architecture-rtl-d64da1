// mb_engine: luma macroblock engine of an H.264 encoder - intra 4x4 and
// intra 16x16 prediction, mode decision against inter prediction, transform
// and quantisation (TQ), inverse quantisation and inverse transform (IQIT)
// and reconstruction.
//
// One macroblock is processed per start pulse, in four phases:
//  1. LOAD   (5 cycles): the 20 pixels above and above-right are read from
//     the horizontal intra prediction SRAM, the 16 left pixels come from the
//     vertical prediction flip-flops; both go into the prediction flip-flops
//     (intra_pred_ff) and into the neighbour registers of the 16x16 unit. The
//     most probable mode SRAM gives the 4x4 modes of the blocks above.
//  2. PRED: the 4x4 prediction walks the 16 blocks. Each block is predicted
//     in nine modes, the best is chosen, and the block goes through TQ, IQIT
//     and summation at once, because the next block needs its reconstructed
//     pixels; they update the prediction flip-flops. In parallel the 16x16
//     prediction evaluates its four modes, writes its chosen prediction to the
//     16x16 prediction SRAM and leaves the Hadamard transform of the luma DC
//     coefficients of that mode in the DC register (hdc).
//  3. FINAL: the best mode selection compares the I4, I16 and inter costs;
//     MUX2 picks the matching prediction SRAM; the 16 residual blocks are
//     formed by subtraction and sent back to back through TQ and IQIT. For an
//     I16 macroblock the DC levels are quantised from hdc on the very first
//     cycles of this phase and inverse-transformed before block 0 leaves TQ,
//     so IQIT starts as early as for any other macroblock type. The inverse
//     transform results go to the IDCT value SRAM, and the coded block
//     pattern (with the coefficient cost rules for inter macroblocks) is
//     formed from the levels.
//  4. RECON (64 cycles): prediction plus the IDCT values selected by the
//     coded block pattern (zeros for an 8x8 block that is not coded) are
//     clipped and sent to the loop-filter buffer; the bottom row goes to the
//     horizontal intra prediction SRAM, the right column to the vertical
//     flip-flops, and the bottom 4x4 modes to the most probable mode SRAM.
//
// Interfaces: the current macroblock (cur_*) and the inter prediction with
// its rd_cost (inter_*) are written before start; pixel k of a 32-bit word is
// bits [8k+7:8k]; word address = row*4 + column/4. Levels leave on coef_*
// (coef_blk 0..15 for the 4x4 blocks one column per cycle, coef_isdc for the
// luma DC matrix); reconstructed pixels on rec_*. busy is high from start to
// done. MB_COLS sets the picture width in macroblocks (45 for 720 pixels).
// Chroma: the 8x8 chroma prediction runs alongside the 16x16 unit on the
// chroma current RAM (ccur_*) and neighbours given on c_top/c_left/c_tl; its
// mode and cost are on c_mode/c_cost after done, and its prediction can be
// read from the 8x8 prediction RAM (cpred_*). The chroma 4x4 transform pass
// is not part of this engine; the 2x2 chroma DC unit sits on cdc_* ports:
// it takes the four DC coefficients of a component from an external chroma
// transform and returns their levels (2 cycles later) and the dequantised DC
// values (3 cycles later), with intra or inter rounding following mb_type.
//
// Timing (measured, every macroblock the same): 7 cycles of load, 35 cycles
// per 4x4 block in the intra 4x4 loop (560 in all; the 16x16 unit runs in its
// shadow), the decision 568 cycles after start, then the final TQ/IQIT pass
// and the 64-word reconstruction; done 717 cycles after start. The published
// schedule spends 34 cycles per 4x4 block and 927 cycles per macroblock
// including chroma.
//
// From the published architecture: the prediction/IDCT memories and their
// sizes, the flip-flop based 4x4 loop, TQ/IQIT in the loop, the pre-computed
// luma DC Hadamard, the IDCT value SRAM with CBP-selected summation, and the
// coefficient cost rules. This design's own choices: the phase sequencing and
// handshakes, the separate reconstruction pass, the rd_cost rate terms, and
// the port formats.
module mb_engine
  import h264_pkg::*;
#(
  parameter int MB_COLS = 45
) (
  input  logic        clk,
  input  logic        rst_n,
  // macroblock parameters, sampled at start
  input  logic        start,
  input  logic [7:0]  mb_x,
  input  logic        mb_top_av,
  input  logic        mb_left_av,
  input  logic        mb_tl_av,
  input  logic        mb_tr_av,
  input  qp_t         qp,
  input  logic [7:0]  lambda,
  input  logic        inter_en,
  input  cost_t       inter_cost,
  // current macroblock (luma current RAM)
  input  logic        cur_we,
  input  logic [5:0]  cur_waddr,
  input  logic [31:0] cur_wdata,
  // inter prediction (inter prediction RAM, luma words 0..63)
  input  logic        inter_we,
  input  logic [6:0]  inter_waddr,
  input  logic [31:0] inter_wdata,
  // results
  output logic        busy,
  output logic        done,
  output mbtype_e     mb_type,
  output i16mode_t    i16_mode,
  output i4mode_t     i4_modes [16],
  output logic [3:0]  cbp_luma,
  output logic        coef_valid,
  output logic        coef_isdc,
  output logic [3:0]  coef_blk,
  output logic [1:0]  coef_col,
  output coef_t       coef_lvl [4],
  output logic        rec_valid,
  output logic [5:0]  rec_addr,
  output pix_t        rec_pix [4],
  // chroma DC of one component (four 4x4 blocks), from the chroma TQ path
  input  logic        cdc_valid,
  input  coef_t       cdc_in [4],
  input  qp_t         cdc_qp,
  output logic        cdc_lvl_valid,
  output coef_t       cdc_lvl [4],
  output logic        cdc_dq_valid,
  output dq_t         cdc_dq [4],
  // chroma 8x8 prediction: current chroma pixels (word = c*16 + row*2 + col/4),
  // chroma neighbours (stable while busy), chosen mode and the prediction
  input  logic        ccur_we,
  input  logic [4:0]  ccur_waddr,
  input  logic [31:0] ccur_wdata,
  input  pix_t        c_top [2][8],
  input  pix_t        c_left [2][8],
  input  pix_t        c_tl [2],
  output logic [1:0]  c_mode,
  output cost_t       c_cost,
  input  logic        cpred_re,
  input  logic [4:0]  cpred_raddr,
  output logic [31:0] cpred_rdata
);

  localparam int HDEPTH = MB_COLS * 4;
  localparam int HAW    = $clog2(HDEPTH);

  typedef enum logic [2:0] {P_IDLE, P_LOAD, P_PRED, P_DECIDE, P_FINAL, P_RECON} phase_e;
  phase_e ph;

  function automatic logic [31:0] pack4(input pix_t p [4]);
    return {p[3], p[2], p[1], p[0]};
  endfunction
  function automatic void unpack4(input logic [31:0] w, output pix_t p [4]);
    for (int k = 0; k < 4; k++) p[k] = w[8 * k +: 8];
  endfunction

  // ---------------- macroblock parameters ----------------
  logic [7:0] mbx_r;
  logic       top_av_r, left_av_r, tl_av_r, tr_av_r, inter_en_r;
  qp_t        qp_r;
  logic [7:0] lambda_r;
  cost_t      inter_cost_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbx_r <= '0; top_av_r <= 1'b0; left_av_r <= 1'b0; tl_av_r <= 1'b0; tr_av_r <= 1'b0;
      inter_en_r <= 1'b0; qp_r <= '0; lambda_r <= '0; inter_cost_r <= '0;
    end else if (start && ph == P_IDLE) begin
      mbx_r <= mb_x; top_av_r <= mb_top_av; left_av_r <= mb_left_av; tl_av_r <= mb_tl_av;
      tr_av_r <= mb_tr_av; inter_en_r <= inter_en; qp_r <= qp; lambda_r <= lambda;
      inter_cost_r <= inter_cost;
    end
  end

  // ---------------- memories ----------------
  // luma current RAM, 64x32, two read ports (0: 4x4 prediction and final
  // pass, 1: 16x16 prediction)
  logic        cur_re [2];
  logic [5:0]  cur_ra [2];
  logic [31:0] cur_rd [2];
  sram_1r1w #(.DEPTH(64), .WIDTH(32), .NRD(2)) u_cur_ram (
    .clk(clk), .we(cur_we), .waddr(cur_waddr), .wdata(cur_wdata),
    .re(cur_re), .raddr(cur_ra), .rdata(cur_rd)
  );

  // 4x4 / 16x16 / inter prediction RAMs
  logic        p4_we, p16_we;
  logic [5:0]  p4_wa, p16_wa;
  logic [31:0] p4_wd, p16_wd;
  logic        pr_re [1];
  logic [5:0]  pr_ra [1];
  logic [6:0]  pri_ra [1];
  logic [31:0] p4_rd [1], p16_rd [1], pi_rd [1];
  assign pri_ra[0] = {1'b0, pr_ra[0]};

  sram_1r1w #(.DEPTH(64), .WIDTH(32)) u_p4_ram (
    .clk(clk), .we(p4_we), .waddr(p4_wa), .wdata(p4_wd), .re(pr_re), .raddr(pr_ra), .rdata(p4_rd));
  sram_1r1w #(.DEPTH(64), .WIDTH(32)) u_p16_ram (
    .clk(clk), .we(p16_we), .waddr(p16_wa), .wdata(p16_wd), .re(pr_re), .raddr(pr_ra), .rdata(p16_rd));
  sram_1r1w #(.DEPTH(96), .WIDTH(32)) u_pinter_ram (
    .clk(clk), .we(inter_we), .waddr(inter_waddr), .wdata(inter_wdata), .re(pr_re), .raddr(pri_ra),
    .rdata(pi_rd));

  // IDCT value SRAM, 64x64: word = blk*4 + row, four 16-bit residuals
  logic        idct_we;
  logic [5:0]  idct_wa;
  logic [63:0] idct_wd;
  logic        idct_re [1];
  logic [5:0]  idct_ra [1];
  logic [63:0] idct_rd [1];
  sram_1r1w #(.DEPTH(64), .WIDTH(64)) u_idct_ram (
    .clk(clk), .we(idct_we), .waddr(idct_wa), .wdata(idct_wd), .re(idct_re), .raddr(idct_ra),
    .rdata(idct_rd));

  // horizontal intra prediction SRAM (Y) and most probable mode SRAM
  logic           h_we, h_re [1];
  logic [HAW-1:0] h_wa, h_ra [1];
  logic [31:0]    h_wd, h_rd [1];
  sram_1r1w #(.DEPTH(HDEPTH), .WIDTH(32)) u_hram (
    .clk(clk), .we(h_we), .waddr(h_wa), .wdata(h_wd), .re(h_re), .raddr(h_ra), .rdata(h_rd));

  logic           mpm_we, mpm_re [1];
  logic [HAW-1:0] mpm_wa, mpm_ra [1];
  logic [3:0]     mpm_wd, mpm_rd [1];
  sram_1r1w #(.DEPTH(HDEPTH), .WIDTH(4)) u_mpm_ram (
    .clk(clk), .we(mpm_we), .waddr(mpm_wa), .wdata(mpm_wd), .re(mpm_re), .raddr(mpm_ra),
    .rdata(mpm_rd));

  // vertical intra prediction flip-flops (left column), left 4x4 modes,
  // and the above-left pixel carried from the previous macroblock
  pix_t    vram [16];
  i4mode_t left_modes [4];
  pix_t    tl_keep, tl_cur;

  // ---------------- sequencing counters ----------------
  logic [2:0] ld_cnt;
  logic       ld_dv;        // read data valid (cycle after address)
  logic [2:0] ld_didx;

  // ---------------- prediction flip-flops ----------------
  pix_t       ff_top [8], ff_left [4], ff_m;
  logic       ff_top_av, ff_left_av, ff_tl_av;
  logic       upd_we;
  logic [1:0] upd_row;
  pix_t       upd_pix [4];
  logic [3:0] i4_blk;
  pix_t       ldh_pix [4];

  always_comb unpack4(h_rd[0], ldh_pix);

  intra_pred_ff u_ff (
    .clk(clk), .rst_n(rst_n),
    .mb_top_av(top_av_r), .mb_left_av(left_av_r), .mb_tl_av(tl_av_r), .mb_tr_av(tr_av_r),
    .ld_h_we(ph == P_LOAD && ld_dv), .ld_h_idx(ld_didx), .ld_h_pix(ldh_pix),
    .ld_v_we(ph == P_LOAD && ld_cnt == 3'd0), .ld_v_pix(vram), .ld_tl_pix(tl_keep),
    .upd_we(upd_we), .upd_blk(i4_blk), .upd_row(upd_row), .upd_pix(upd_pix),
    .rd_blk(i4_blk), .top(ff_top), .left(ff_left), .m(ff_m),
    .top_av(ff_top_av), .left_av(ff_left_av), .tl_av(ff_tl_av)
  );

  // neighbour registers of the 16x16 prediction
  pix_t nb_top [16];
  i4mode_t up_modes [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt  <= '0;
      ld_dv   <= 1'b0;
      ld_didx <= '0;
      tl_keep <= 8'd128;
      tl_cur  <= 8'd128;
      for (int k = 0; k < 16; k++) nb_top[k] <= 8'd128;
      for (int k = 0; k < 4; k++) up_modes[k] <= i4mode_t'(I4_DC);
    end else begin
      ld_dv   <= (ph == P_LOAD);
      ld_didx <= ld_cnt;
      if (ph == P_LOAD) ld_cnt <= ld_cnt + 3'd1;
      else              ld_cnt <= '0;
      if (ph == P_LOAD && ld_cnt == 3'd0) tl_cur <= tl_keep;
      if (ld_dv) begin
        if (ld_didx < 3'd4) begin
          for (int k = 0; k < 4; k++) nb_top[4 * ld_didx + 3'(k)] <= ldh_pix[k];
          up_modes[ld_didx[1:0]] <= mpm_rd[0];
        end
        if (ld_didx == 3'd3) tl_keep <= ldh_pix[3];
      end
    end
  end

  always_comb begin
    logic [HAW:0] a;
    a = (HAW + 1)'(mbx_r) * (HAW + 1)'(4) + (HAW + 1)'(ld_cnt);
    if (a >= (HAW + 1)'(HDEPTH)) a = (HAW + 1)'(HDEPTH - 1);
    h_re[0]   = (ph == P_LOAD);
    h_ra[0]   = HAW'(a);
    mpm_re[0] = (ph == P_LOAD) && ld_cnt < 3'd4;
    mpm_ra[0] = HAW'(a);
  end

  // ---------------- intra 4x4 prediction loop ----------------
  logic    i4_start, i4_done;
  logic    i4_busy;         // a block is inside predict/TQ/IQIT
  logic    i4_all;          // all 16 blocks finished
  i4mode_t i4_best;
  cost_t   i4_bcost;
  logic    i4_ov;
  logic [1:0] i4_orow;
  pix_t    i4_opred [4];
  coef_t   i4_ores [4];
  logic    i4_cur_rd;
  logic [1:0] i4_cur_row;
  pix_t    cur0_pix [4], cur1_pix [4];
  i4mode_t i4m [16];
  i4mode_t mpm_cur;
  cost_t   i4_cost_sum;
  pix_t    pblk [4][4];
  logic    i4_start_hold;

  always_comb begin
    unpack4(cur_rd[0], cur0_pix);
    unpack4(cur_rd[1], cur1_pix);
  end

  // most probable mode of block i4_blk
  always_comb begin
    logic [1:0] bx, by;
    i4mode_t up, lf;
    logic up_ok, lf_ok;
    bx = blk_x(i4_blk);
    by = blk_y(i4_blk);
    if (by != 0) begin
      up = i4m[blk_idx(bx, by - 2'd1)];
      up_ok = 1'b1;
    end else begin
      up = up_modes[bx];
      up_ok = top_av_r;
    end
    if (bx != 0) begin
      lf = i4m[blk_idx(bx - 2'd1, by)];
      lf_ok = 1'b1;
    end else begin
      lf = left_modes[by];
      lf_ok = left_av_r;
    end
    mpm_cur = (!up_ok || !lf_ok) ? i4mode_t'(I4_DC) : ((up < lf) ? up : lf);
  end

  intra4x4_pred u_i4 (
    .clk(clk), .rst_n(rst_n), .start(i4_start), .lambda(lambda_r), .mpm(mpm_cur),
    .top(ff_top), .left(ff_left), .m(ff_m), .top_av(ff_top_av), .left_av(ff_left_av),
    .tl_av(ff_tl_av), .cur_rd(i4_cur_rd), .cur_row(i4_cur_row), .cur_pix(cur0_pix),
    .best_mode(i4_best), .best_cost(i4_bcost), .out_valid(i4_ov), .out_row(i4_orow),
    .out_pred(i4_opred), .out_res(i4_ores), .done(i4_done)
  );

  // ---------------- intra 16x16 prediction ----------------
  logic       i16_start, i16_done, i16_cv, i16_all;
  logic       i16_cur_rd;
  logic [5:0] i16_cur_addr;
  i16mode_t   i16_best;
  cost_t      i16_bcost;
  logic       i16_pwv;
  logic [5:0] i16_pwa;
  pix_t       i16_pwp [4];
  logic       i16_dcqv;
  logic [1:0] i16_dcqc;
  logic signed [17:0] i16_dcq [4];
  logic signed [17:0] hdc [4][4];   // DC register: [col][row]

  intra16_pred u_i16 (
    .clk(clk), .rst_n(rst_n), .start(i16_start), .top(nb_top), .left(vram), .tl(tl_cur),
    .top_av(top_av_r), .left_av(left_av_r), .tl_av(tl_av_r),
    .cur_rd(i16_cur_rd), .cur_addr(i16_cur_addr), .cur_pix(cur1_pix),
    .best_mode(i16_best), .best_cost(i16_bcost), .cost_valid(i16_cv),
    .pw_valid(i16_pwv), .pw_addr(i16_pwa), .pw_pix(i16_pwp),
    .dcq_valid(i16_dcqv), .dcq_col(i16_dcqc), .dcq_out(i16_dcq), .done(i16_done)
  );

  assign cur_re[1] = i16_cur_rd;
  assign cur_ra[1] = i16_cur_addr;
  assign p16_we    = i16_pwv;
  assign p16_wa    = i16_pwa;
  assign p16_wd    = pack4(i16_pwp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) hdc[c][r] <= '0;
    end else if (i16_dcqv) begin
      hdc[i16_dcqc] <= i16_dcq;
    end
  end

  // ---------------- mode decision ----------------
  mbtype_e sel_type;
  cost_t   sel_cost;
  cost_t   i4_total;
  assign i4_total = (i4_cost_sum + cost_t'(6 * int'(lambda_r)) < i4_cost_sum) ? COST_MAX :
                    i4_cost_sum + cost_t'(6 * int'(lambda_r));

  best_mode_sel u_best (
    .cost_i4(i4_total), .cost_i16(i16_bcost), .cost_inter(inter_cost_r), .inter_en(inter_en_r),
    .mb_type(sel_type), .mb_cost(sel_cost)
  );

  // ---------------- final pass sequencing ----------------
  logic [6:0] fp_cnt;        // row reads: blk = fp_cnt[5:2], row = fp_cnt[1:0]
  logic       fp_rd, fp_dv;
  logic [1:0] fp_dc_cnt;
  logic       fp_dc_act;
  logic [4:0] iq_blk_cnt;    // IQIT blocks finished in the final pass
  logic [6:0] rc_cnt;        // reconstruction words
  logic       rc_dv;
  logic [5:0] rc_da;

  // ---------------- TQ / IQIT ----------------
  logic  tq_in_v;
  coef_t tq_in [4];
  logic  tq_dcq_v;
  logic signed [17:0] tq_dcq [4];
  logic  tq_ov, tq_oisdc;
  logic [1:0] tq_ocol;
  coef_t tq_olvl [4];
  coef_t tq_dcraw;
  logic  is_final;
  logic  ac_only;
  logic [3:0] tq_oblk;

  assign is_final = (ph == P_FINAL);
  assign ac_only  = is_final && mb_type == MB_I16;

  tq4x4 u_tq (
    .clk(clk), .rst_n(rst_n), .qp(qp_r), .intra(!(is_final && mb_type == MB_INTER)),
    .ac_only(ac_only), .in_valid(tq_in_v), .in_row(tq_in), .dcq_valid(tq_dcq_v),
    .dcq_in(tq_dcq), .out_valid(tq_ov), .out_col(tq_ocol), .out_isdc(tq_oisdc),
    .out_lvl(tq_olvl), .dc_raw(tq_dcraw)
  );

  logic dciq_v;
  dq_t  dciq [16];
  luma_dc_iq u_dciq (
    .clk(clk), .rst_n(rst_n), .qp(qp_r), .in_valid(tq_ov && tq_oisdc), .in_col(tq_ocol),
    .in_lvl(tq_olvl), .out_valid(dciq_v), .dc_out(dciq)
  );

  logic       iq_in_v;
  logic       iq_ov;
  logic [1:0] iq_orow;
  coef_t      iq_out [4];
  logic [3:0] iq_in_blk;
  logic [3:0] iq_out_blk;

  assign iq_in_v = tq_ov && !tq_oisdc;

  iqit4x4 u_iqit (
    .clk(clk), .rst_n(rst_n), .qp(qp_r), .in_valid(iq_in_v), .in_lvl(tq_olvl),
    .dc_sub(ac_only), .dc_val(dciq[iq_in_blk]),
    .out_valid(iq_ov), .out_idx(iq_orow), .out_row(iq_out)
  );

  // CBP
  logic [3:0]  cbp_l;
  logic [15:0] cbp_b;
  logic [7:0]  cc_all;
  logic        cbp_v;
  cbp_calc u_cbp (
    .clk(clk), .rst_n(rst_n), .mb_start(ph == P_DECIDE), .mb_inter(mb_type == MB_INTER),
    .skip_dc(mb_type == MB_I16), .in_valid(is_final && iq_in_v), .in_col(tq_ocol),
    .in_blk(tq_oblk), .in_lvl(tq_olvl), .cbp_luma(cbp_l), .cbp_blk(cbp_b),
    .coeff_cost_all(cc_all), .cbp_valid(cbp_v)
  );

  // TQ input: residual of the 4x4 prediction, or of the final pass
  pix_t fp_pred [4];
  always_comb begin
    logic [31:0] w;
    case (mb_type)
      MB_I4:   w = p4_rd[0];
      MB_I16:  w = p16_rd[0];
      default: w = pi_rd[0];
    endcase
    unpack4(w, fp_pred);            // MUX2
    if (is_final) begin
      tq_in_v = fp_dv;
      for (int k = 0; k < 4; k++)
        tq_in[k] = coef_t'({8'd0, cur0_pix[k]}) - coef_t'({8'd0, fp_pred[k]});
    end else begin
      tq_in_v = i4_ov;
      tq_in   = i4_ores;
    end
    tq_dcq_v = is_final && fp_dc_act;
    tq_dcq   = hdc[fp_dc_cnt];
  end

  // block numbers at the TQ output and IQIT input / output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_oblk    <= '0;
      iq_in_blk  <= '0;
      iq_out_blk <= '0;
    end else if (ph == P_DECIDE || (ph == P_PRED && i4_start)) begin
      tq_oblk    <= (ph == P_PRED) ? i4_blk : 4'd0;
      iq_in_blk  <= (ph == P_PRED) ? i4_blk : 4'd0;
      iq_out_blk <= (ph == P_PRED) ? i4_blk : 4'd0;
    end else begin
      if (iq_in_v && tq_ocol == 2'd3) begin
        tq_oblk   <= tq_oblk + 4'd1;
        iq_in_blk <= iq_in_blk + 4'd1;
      end
      if (iq_ov && iq_orow == 2'd3) iq_out_blk <= iq_out_blk + 4'd1;
    end
  end

  // summation during the 4x4 prediction: prediction + IDCT, to the flip-flops
  always_comb begin
    upd_we  = (ph == P_PRED) && iq_ov;
    upd_row = iq_orow;
    for (int k = 0; k < 4; k++)
      upd_pix[k] = clip_pix(25'(signed'({1'b0, pblk[iq_orow][k]})) + 25'(iq_out[k]));
  end

  // ---------------- main control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph          <= P_IDLE;
      i4_blk      <= '0;
      i4_busy     <= 1'b0;
      i4_all      <= 1'b0;
      i16_all     <= 1'b0;
      i4_cost_sum <= '0;
      mb_type     <= MB_I16;
      i16_mode    <= 2'd2;
      fp_cnt      <= '0;
      fp_dc_cnt   <= '0;
      fp_dc_act   <= 1'b0;
      iq_blk_cnt  <= '0;
      rc_cnt      <= '0;
      cbp_luma    <= '0;
      for (int k = 0; k < 16; k++) begin
        i4m[k]      <= i4mode_t'(I4_DC);
        i4_modes[k] <= i4mode_t'(I4_DC);
      end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) pblk[r][c] <= '0;
    end else begin
      case (ph)
        P_IDLE: if (start) ph <= P_LOAD;
        P_LOAD: if (ld_cnt == 3'd5) begin
          ph          <= P_PRED;
          i4_blk      <= '0;
          i4_busy     <= 1'b0;
          i4_all      <= 1'b0;
          i16_all     <= 1'b0;
          i4_cost_sum <= '0;
        end
        P_PRED: begin
          if (i4_start) i4_busy <= 1'b1;
          if (i4_done) begin
            i4m[i4_blk] <= i4_best;
            i4_cost_sum <= (i4_cost_sum + i4_bcost < i4_cost_sum) ? COST_MAX : i4_cost_sum + i4_bcost;
          end
          if (i4_ov) pblk[i4_orow] <= i4_opred;
          if (iq_ov && iq_orow == 2'd3) begin
            i4_busy <= 1'b0;
            if (i4_blk == 4'd15) i4_all <= 1'b1;
            else i4_blk <= i4_blk + 4'd1;
          end
          if (i16_done) i16_all <= 1'b1;
          if (i4_all && i16_all) ph <= P_DECIDE;
        end
        P_DECIDE: begin
          mb_type    <= sel_type;
          i16_mode   <= i16_best;
          ph         <= P_FINAL;
          fp_cnt     <= '0;
          fp_dc_cnt  <= '0;
          fp_dc_act  <= (sel_type == MB_I16);
          iq_blk_cnt <= '0;
        end
        P_FINAL: begin
          if (fp_cnt != 7'd64) fp_cnt <= fp_cnt + 7'd1;
          if (fp_dc_act) begin
            fp_dc_cnt <= fp_dc_cnt + 2'd1;
            if (fp_dc_cnt == 2'd3) fp_dc_act <= 1'b0;
          end
          if (iq_ov && iq_orow == 2'd3) iq_blk_cnt <= iq_blk_cnt + 5'd1;
          if (cbp_v) cbp_luma <= (mb_type == MB_I16) ? ((|cbp_l) ? 4'hF : 4'h0) : cbp_l;
          if (iq_blk_cnt == 5'd16) begin
            ph     <= P_RECON;
            rc_cnt <= '0;
            for (int k = 0; k < 16; k++)
              i4_modes[k] <= (mb_type == MB_I4) ? i4m[k] : i4mode_t'(I4_DC);
          end
        end
        P_RECON: begin
          rc_cnt <= rc_cnt + 7'd1;
          if (rc_cnt == 7'd64) ph <= P_IDLE;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end

  assign i4_start  = (ph == P_PRED) && !i4_busy && !i4_all && !i4_start_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) i4_start_hold <= 1'b0;
    else        i4_start_hold <= i4_start;
  end
  assign i16_start = (ph == P_LOAD) && ld_cnt == 3'd5;

  // final pass reads: current RAM port 0 and the selected prediction RAM
  assign fp_rd = is_final && fp_cnt < 7'd64;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_dv   <= 1'b0;
      rc_dv   <= 1'b0;
      rc_da   <= '0;
    end else begin
      fp_dv   <= fp_rd;
      rc_dv   <= (ph == P_RECON) && rc_cnt < 7'd64;
      rc_da   <= rc_cnt[5:0];
    end
  end

  always_comb begin
    logic [1:0] bx, by;
    bx = blk_x(fp_cnt[5:2]);
    by = blk_y(fp_cnt[5:2]);
    cur_re[0] = i4_cur_rd || fp_rd;
    if (fp_rd) cur_ra[0] = {by, fp_cnt[1:0], bx};
    else       cur_ra[0] = {blk_y(i4_blk), i4_cur_row, blk_x(i4_blk)};
    pr_re[0]  = fp_rd || (ph == P_RECON && rc_cnt < 7'd64);
    pr_ra[0]  = fp_rd ? {by, fp_cnt[1:0], bx} : rc_cnt[5:0];
  end

  // 4x4 prediction SRAM write
  always_comb begin
    p4_we = (ph == P_PRED) && i4_ov;
    p4_wa = {blk_y(i4_blk), i4_orow, blk_x(i4_blk)};
    p4_wd = pack4(i4_opred);
  end

  // IDCT value SRAM write (final pass) and read (reconstruction)
  always_comb begin
    idct_we = is_final && iq_ov;
    idct_wa = {iq_out_blk, iq_orow};
    idct_wd = {iq_out[3], iq_out[2], iq_out[1], iq_out[0]};
    idct_re[0] = (ph == P_RECON) && rc_cnt < 7'd64;
    // word rc_cnt = row*4 + col4 -> block {y[3],x[3],y[2],x[2]}, row y[1:0]
    idct_ra[0] = {rc_cnt[5], rc_cnt[1], rc_cnt[4], rc_cnt[0], rc_cnt[3:2]};
  end

  // ---------------- reconstruction ----------------
  pix_t rc_pred [4];
  logic [3:0] rc_blk;
  logic       use_idct;
  always_comb begin
    logic [31:0] w;
    case (mb_type)
      MB_I4:   w = p4_rd[0];
      MB_I16:  w = p16_rd[0];
      default: w = pi_rd[0];
    endcase
    unpack4(w, rc_pred);
    rc_blk   = {rc_da[5], rc_da[1], rc_da[4], rc_da[0]};
    use_idct = (mb_type == MB_I16) || cbp_luma[rc_blk[3:2]];
    rec_valid = rc_dv;
    rec_addr  = rc_da;
    for (int k = 0; k < 4; k++)
      rec_pix[k] = clip_pix(25'(signed'({1'b0, rc_pred[k]})) +
                            (use_idct ? 25'(signed'(idct_rd[0][16 * k +: 16])) : 25'sd0));
    // bottom row to the horizontal intra prediction SRAM
    h_we = rc_dv && rc_da[5:2] == 4'd15;
    h_wa = HAW'((HAW + 1)'(mbx_r) * (HAW + 1)'(4) + (HAW + 1)'(rc_da[1:0]));
    h_wd = pack4(rec_pix);
    // bottom 4x4 modes to the most probable mode SRAM
    mpm_we = rc_dv && rc_da[5:2] == 4'd15;
    mpm_wa = h_wa;
    mpm_wd = (mb_type == MB_I4) ? i4m[blk_idx(rc_da[1:0], 2'd3)] : i4mode_t'(I4_DC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) vram[k] <= 8'd128;
      for (int k = 0; k < 4; k++) left_modes[k] <= i4mode_t'(I4_DC);
    end else if (rc_dv && rc_da[1:0] == 2'd3) begin
      vram[rc_da[5:2]] <= rec_pix[3];
      if (rc_da[3:2] == 2'd3)
        left_modes[rc_da[5:4]] <= (mb_type == MB_I4) ? i4m[blk_idx(2'd3, rc_da[5:4])]
                                                     : i4mode_t'(I4_DC);
    end
  end

  // ---------------- coefficient output ----------------
  always_comb begin
    coef_valid = is_final && tq_ov;
    coef_isdc  = tq_oisdc;
    coef_blk   = tq_oblk;
    coef_col   = tq_ocol;
    coef_lvl   = tq_olvl;
  end

  assign busy = (ph != P_IDLE);
  assign done = (ph == P_RECON) && rc_cnt == 7'd64;

  // ---------------- chroma 8x8 prediction ----------------
  // Starts with the 16x16 unit and finishes long before the luma final pass.
  logic        c_cur_re [1], c_pred_re [1];
  logic [4:0]  c_cur_ra [1], c_pred_ra [1];
  logic [31:0] c_cur_rd [1], c_pred_rd [1];
  pix_t        c_cur_pix [4], c_pwp [4];
  logic        c_pwv, c_cv, c_done;
  logic [4:0]  c_pwa;

  sram_1r1w #(.DEPTH(32), .WIDTH(32)) u_ccur_ram (
    .clk(clk), .we(ccur_we), .waddr(ccur_waddr), .wdata(ccur_wdata),
    .re(c_cur_re), .raddr(c_cur_ra), .rdata(c_cur_rd));
  sram_1r1w #(.DEPTH(32), .WIDTH(32)) u_p8_ram (
    .clk(clk), .we(c_pwv), .waddr(c_pwa), .wdata(pack4(c_pwp)),
    .re(c_pred_re), .raddr(c_pred_ra), .rdata(c_pred_rd));

  always_comb unpack4(c_cur_rd[0], c_cur_pix);
  assign c_pred_re[0] = cpred_re;
  assign c_pred_ra[0] = cpred_raddr;
  assign cpred_rdata  = c_pred_rd[0];

  intra8x8_chroma_pred u_c8 (
    .clk(clk), .rst_n(rst_n), .start(i16_start), .top(c_top), .left(c_left), .tl(c_tl),
    .top_av(top_av_r), .left_av(left_av_r), .tl_av(tl_av_r),
    .cur_rd(c_cur_re[0]), .cur_addr(c_cur_ra[0]), .cur_pix(c_cur_pix),
    .best_mode(c_mode), .best_cost(c_cost), .cost_valid(c_cv),
    .pw_valid(c_pwv), .pw_addr(c_pwa), .pw_pix(c_pwp), .done(c_done)
  );

  // ---------------- chroma DC (2x2 Hadamard) ----------------
  // Runs on its own ports; the rounding follows the type of the last
  // decided macroblock.
  chroma_dc_tq u_cdc (
    .clk, .rst_n,
    .in_valid (cdc_valid),
    .in_dc    (cdc_in),
    .qp       (cdc_qp),
    .intra    (mb_type != MB_INTER),
    .lvl_valid(cdc_lvl_valid),
    .lvl      (cdc_lvl),
    .dq_valid (cdc_dq_valid),
    .dq       (cdc_dq)
  );

endmodule
