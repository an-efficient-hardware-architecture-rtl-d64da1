// h264_pkg: types, constants and arithmetic helpers shared by the intra
// prediction, TQ/IQIT and mode decision blocks of the macroblock engine.
//
// Pixels are 8-bit unsigned; residuals, transform coefficients and levels are
// 16-bit signed; dequantised coefficients and inverse-transform internals are
// 24-bit signed. The quantisation tables (MF) and dequantisation tables (V) are
// the standard H.264 tables indexed by QP%6 and by the position class of a
// coefficient inside a 4x4 block: class A for (even,even) positions, class B
// for (odd,odd) positions and class C for the rest. Rounding offsets follow
// the JM reference encoder: f = 2^qbits/3 for intra and 2^qbits/6 for inter.
package h264_pkg;

  typedef logic [7:0]          pix_t;
  typedef logic signed [15:0]  coef_t;
  typedef logic signed [23:0]  dq_t;
  typedef logic [5:0]          qp_t;
  typedef logic [3:0]          i4mode_t;   // 0..8, H.264 Intra4x4PredMode numbering
  typedef logic [1:0]          i16mode_t;  // 0 V, 1 H, 2 DC, 3 plane
  typedef logic [19:0]         cost_t;

  typedef enum logic [1:0] {MB_I4 = 2'd0, MB_I16 = 2'd1, MB_INTER = 2'd2} mbtype_e;

  localparam cost_t COST_MAX = 20'hFFFFF;

  // intra 4x4 prediction mode numbers
  localparam int I4_V = 0, I4_H = 1, I4_DC = 2, I4_DDL = 3, I4_DDR = 4,
                 I4_VR = 5, I4_HD = 6, I4_VL = 7, I4_HU = 8;

  // block index (0..15, H.264 scan of Fig. 4) to 4x4 column / row inside the MB
  function automatic logic [1:0] blk_x(input logic [3:0] b);
    return {b[2], b[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] b);
    return {b[3], b[1]};
  endfunction

  // 4x4 column / row inside the MB to block index
  function automatic logic [3:0] blk_idx(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  // position class of coefficient (row r, column c) in a 4x4 block
  function automatic logic [1:0] pos_class(input logic [1:0] r, input logic [1:0] c);
    if (!r[0] && !c[0]) return 2'd0;      // A
    else if (r[0] && c[0]) return 2'd1;   // B
    else return 2'd2;                     // C
  endfunction

  function automatic logic [13:0] quant_mf(input logic [2:0] qrem, input logic [1:0] cls);
    logic [13:0] a, b, c;
    case (qrem)
      3'd0: begin a = 14'd13107; b = 14'd5243; c = 14'd8066; end
      3'd1: begin a = 14'd11916; b = 14'd4660; c = 14'd7490; end
      3'd2: begin a = 14'd10082; b = 14'd4194; c = 14'd6554; end
      3'd3: begin a = 14'd9362;  b = 14'd3647; c = 14'd5825; end
      3'd4: begin a = 14'd8192;  b = 14'd3355; c = 14'd5243; end
      default: begin a = 14'd7282; b = 14'd2893; c = 14'd4559; end
    endcase
    return (cls == 2'd0) ? a : (cls == 2'd1) ? b : c;
  endfunction

  function automatic logic [4:0] dequant_v(input logic [2:0] qrem, input logic [1:0] cls);
    logic [4:0] a, b, c;
    case (qrem)
      3'd0: begin a = 5'd10; b = 5'd16; c = 5'd13; end
      3'd1: begin a = 5'd11; b = 5'd18; c = 5'd14; end
      3'd2: begin a = 5'd13; b = 5'd20; c = 5'd16; end
      3'd3: begin a = 5'd14; b = 5'd23; c = 5'd18; end
      3'd4: begin a = 5'd16; b = 5'd25; c = 5'd20; end
      default: begin a = 5'd18; b = 5'd29; c = 5'd23; end
    endcase
    return (cls == 2'd0) ? a : (cls == 2'd1) ? b : c;
  endfunction

  function automatic logic [3:0] qp_div6(input qp_t qp);
    return 4'(qp / 6);
  endfunction
  function automatic logic [2:0] qp_mod6(input qp_t qp);
    return 3'(qp % 6);
  endfunction

  function automatic pix_t clip_pix(input logic signed [24:0] v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction

  // Quantise one coefficient: sign(w) * ((|w|*mf + f) >> qbits).
  // dc=1 selects the DC rule (offset 2f, shift qbits+1) used for luma DC
  // after the 4x4 Hadamard and for chroma DC after the 2x2 Hadamard.
  function automatic coef_t quantize(input logic signed [17:0] w, input logic [13:0] mf,
                                     input qp_t qp, input logic intra, input logic dc);
    logic [17:0] aw;
    logic [35:0] prod, f;
    logic [4:0]  qbits;
    logic [35:0] lev;
    aw    = w[17] ? 18'(-w) : 18'(w);
    qbits = 5'd15 + 5'(qp_div6(qp));
    f     = intra ? ((36'd1 << qbits) / 3) : ((36'd1 << qbits) / 6);
    prod  = 36'(aw) * 36'(mf);
    if (dc) lev = (prod + (f << 1)) >> (qbits + 5'd1);
    else    lev = (prod + f) >> qbits;
    return w[17] ? coef_t'(-$signed(lev[15:0])) : coef_t'(lev[15:0]);
  endfunction

  // Dequantise one AC / non-DC coefficient: level * V << (qp/6)
  function automatic dq_t dequantize(input coef_t lev, input logic [4:0] v, input qp_t qp);
    logic signed [23:0] p;
    p = 24'(lev) * 24'($signed({1'b0, v}));
    return p <<< qp_div6(qp);
  endfunction

endpackage
