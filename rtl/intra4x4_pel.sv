// intra4x4_pel: prediction pel calculation for the nine intra 4x4 modes.
//
// From the thirteen neighbouring reconstructed pixels of a 4x4 block (A-H
// above and above-right, I-L to the left, M above-left) it forms, for the row
// selected by `row`, the four predicted pixels of every one of the nine modes
// at once: 36 pixels per cycle, so one 4x4 block takes four cycles.
//
// The directional modes are computed from one edge array
// e = {L,K,J,I,M,A,B,C,D,E,F,G,H} and its two- and three-tap smoothed
// versions: f2[k] = (e[k]+e[k+1]+1)>>1 and f3[k] = (e[k-1]+2e[k]+e[k+1]+2)>>2.
// Each directional pixel picks one of these by its position, which gives the
// H.264 formulas. DC uses whichever of the above/left edges are available
// (128 if neither). mode_ok flags the modes whose neighbours exist: V, DDL
// and VL need the row above, H and HU the column to the left, DDR, VR and HD
// all three edges including M. The caller substitutes D for E-H when the
// above-right block is not available, as the standard requires.
// The module is combinational; the edge formulation is this design's choice.
module intra4x4_pel
  import h264_pkg::*;
(
  input  pix_t       top [8],      // A..H
  input  pix_t       left [4],     // I..L
  input  pix_t       m,            // M
  input  logic       top_av,
  input  logic       left_av,
  input  logic       tl_av,
  input  logic [1:0] row,
  output pix_t       pred [9][4],  // [mode][x] for row `row`
  output logic [8:0] mode_ok
);

  pix_t       e [13];
  logic [7:0] f2 [12];
  logic [7:0] f3 [13];
  pix_t       dcv;

  always_comb begin
    for (int k = 0; k < 4; k++) e[k] = left[3 - k];
    e[4] = m;
    for (int k = 0; k < 8; k++) e[5 + k] = top[k];
    for (int k = 0; k < 12; k++) f2[k] = 8'((10'(e[k]) + 10'(e[k + 1]) + 10'd1) >> 1);
    f3[0]  = e[0];
    f3[12] = e[12];
    for (int k = 1; k < 12; k++)
      f3[k] = 8'((10'(e[k - 1]) + 10'(2 * e[k]) + 10'(e[k + 1]) + 10'd2) >> 2);
  end

  logic [10:0] st, sl;
  always_comb begin
    st = '0;
    sl = '0;
    for (int k = 0; k < 4; k++) begin
      st += 11'(top[k]);
      sl += 11'(left[k]);
    end
    if (top_av && left_av) dcv = 8'((st + sl + 11'd4) >> 3);
    else if (top_av)       dcv = 8'((st + 11'd2) >> 2);
    else if (left_av)      dcv = 8'((sl + 11'd2) >> 2);
    else                   dcv = 8'd128;
  end

  always_comb begin
    int y, z;
    y = int'(row);
    for (int x = 0; x < 4; x++) begin
      pred[I4_V][x]  = top[x];
      pred[I4_H][x]  = left[y];
      pred[I4_DC][x] = dcv;
      // diagonal down left
      if (x == 3 && y == 3) pred[I4_DDL][x] = 8'((10'(e[11]) + 10'(3 * e[12]) + 10'd2) >> 2);
      else                  pred[I4_DDL][x] = f3[6 + x + y];
      // diagonal down right
      pred[I4_DDR][x] = f3[4 + x - y];
      // vertical right
      z = 2 * x - y;
      if (z >= 0 && z % 2 == 0) pred[I4_VR][x] = f2[4 + x - (y >> 1)];
      else if (z > 0)           pred[I4_VR][x] = f3[4 + x - (y >> 1)];
      else if (z == -1)         pred[I4_VR][x] = f3[4];
      else                      pred[I4_VR][x] = f3[5 - y];
      // horizontal down
      z = 2 * y - x;
      if (z >= 0 && z % 2 == 0) pred[I4_HD][x] = f2[3 - y + (x >> 1)];
      else if (z > 0)           pred[I4_HD][x] = f3[4 - y + (x >> 1)];
      else if (z == -1)         pred[I4_HD][x] = f3[4];
      else                      pred[I4_HD][x] = f3[3 + x];
      // vertical left
      if (y % 2 == 0) pred[I4_VL][x] = f2[5 + x + (y >> 1)];
      else            pred[I4_VL][x] = f3[6 + x + (y >> 1)];
      // horizontal up
      z = x + 2 * y;
      if (z < 5 && z % 2 == 0) pred[I4_HU][x] = f2[2 - y - (x >> 1)];
      else if (z < 5)          pred[I4_HU][x] = f3[2 - y - (x >> 1)];
      else if (z == 5)         pred[I4_HU][x] = 8'((10'(e[1]) + 10'(3 * e[0]) + 10'd2) >> 2);
      else                     pred[I4_HU][x] = e[0];
    end
  end

  always_comb begin
    mode_ok         = '0;
    mode_ok[I4_V]   = top_av;
    mode_ok[I4_H]   = left_av;
    mode_ok[I4_DC]  = 1'b1;
    mode_ok[I4_DDL] = top_av;
    mode_ok[I4_DDR] = top_av & left_av & tl_av;
    mode_ok[I4_VR]  = top_av & left_av & tl_av;
    mode_ok[I4_HD]  = top_av & left_av & tl_av;
    mode_ok[I4_VL]  = top_av;
    mode_ok[I4_HU]  = left_av;
  end

endmodule
