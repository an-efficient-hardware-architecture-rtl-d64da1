// intra4x4_modesel: 4x4 mode selection logic.
//
// Adds to each mode's Hadamard SAE the rate term of its intra 4x4 pred_mode
// syntax element and picks the allowed mode with the smallest rd_cost.
// The rate is one bit when the mode equals the most probable mode (the flag
// alone) and four bits otherwise (flag plus a 3-bit remaining mode), weighted
// by lambda: rd_cost = SAE/2 + lambda * bits. Halving the SAE and the 1/4
// bit counts are this design's choice; ties go to the lower mode number.
// Combinational.
module intra4x4_modesel
  import h264_pkg::*;
(
  input  cost_t      sae [9],
  input  logic [8:0] mode_ok,
  input  i4mode_t    mpm,
  input  logic [7:0] lambda,
  output i4mode_t    best_mode,
  output cost_t      best_cost
);

  always_comb begin
    cost_t c;
    best_mode = i4mode_t'(I4_DC);
    best_cost = COST_MAX;
    for (int k = 0; k < 9; k++) begin
      c = (sae[k] >> 1) + cost_t'(lambda) * ((i4mode_t'(k) == mpm) ? cost_t'(1) : cost_t'(4));
      if (mode_ok[k] && c < best_cost) begin
        best_cost = c;
        best_mode = i4mode_t'(k);
      end
    end
  end

endmodule
