// best_mode_sel: best mode selection logic of the macroblock.
//
// Compares the rd_cost of the best intra 4x4 choice, the best intra 16x16
// choice and, in a P or B slice, the inter prediction delivered by motion
// estimation, and picks the macroblock type with the smallest cost. Ties are
// resolved in the order inter, I16, I4 (this design's choice). Combinational.
module best_mode_sel
  import h264_pkg::*;
(
  input  cost_t   cost_i4,
  input  cost_t   cost_i16,
  input  cost_t   cost_inter,
  input  logic    inter_en,
  output mbtype_e mb_type,
  output cost_t   mb_cost
);

  always_comb begin
    mb_type = MB_I16;
    mb_cost = cost_i16;
    if (cost_i4 < mb_cost) begin
      mb_type = MB_I4;
      mb_cost = cost_i4;
    end
    if (inter_en && cost_inter <= mb_cost) begin
      mb_type = MB_INTER;
      mb_cost = cost_inter;
    end
  end

endmodule
