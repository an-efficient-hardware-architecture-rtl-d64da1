// intra4x4_pred: intra 4x4 prediction of one 4x4 luma block.
//
// Combines the prediction pel calculation (nine modes, one row of 36 pixels
// per cycle), nine Hadamard SAE units working in parallel, and the 4x4 mode
// selection logic. After the best mode is known the block is read again and
// the prediction of that mode and the residual (current minus prediction)
// are sent out row by row, to be written into the 4x4 prediction SRAM and fed
// to the TQ module.
//
// Cycle schedule after the start pulse (cycle 0): current-pixel RAM
// addresses on cycles 1-4, data and difference into the SAE units on 2-5,
// SAE results on cycle 12, rd_cost and mode selection on 12-13, the second
// read of the current block on 13-16, and the prediction / residual rows of
// the chosen mode on cycles 14-17 (out_valid, out_row). done pulses on cycle
// 17. The current-pixel memory is read with one cycle of latency. The
// neighbour inputs must stay stable from the start pulse to done.
//
// The split into pel calculation, nine SAE units and mode selection, the
// eleven-cycle SAE and the one-cycle selection follow the published
// architecture; reading the current block a second time instead of buffering
// it, and the exact rate term, are this design's choices. The unit's DC
// outputs of the SAE units are not needed here and are left open.
module intra4x4_pred
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] lambda,
  input  i4mode_t    mpm,
  // neighbours from the prediction flip-flops
  input  pix_t       top [8],
  input  pix_t       left [4],
  input  pix_t       m,
  input  logic       top_av,
  input  logic       left_av,
  input  logic       tl_av,
  // current block read port (row address, data one cycle later)
  output logic       cur_rd,
  output logic [1:0] cur_row,
  input  pix_t       cur_pix [4],
  // result
  output i4mode_t    best_mode,
  output cost_t      best_cost,
  output logic       out_valid,
  output logic [1:0] out_row,
  output pix_t       out_pred [4],
  output coef_t      out_res [4],
  output logic       done
);

  logic [4:0] cyc;
  logic       busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cyc  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      cyc  <= 5'd1;
    end else if (busy) begin
      cyc <= cyc + 5'd1;
      if (cyc == 5'd17) busy <= 1'b0;
    end
  end

  // reads of the current block: first pass 1-4, second pass 13-16
  assign cur_rd  = busy && ((cyc >= 5'd1 && cyc <= 5'd4) || (cyc >= 5'd13 && cyc <= 5'd16));
  assign cur_row = (cyc >= 5'd13) ? 2'(cyc - 5'd13) : 2'(cyc - 5'd1);

  logic       dat_v1, dat_v2;
  logic [1:0] dat_row;
  assign dat_v1 = busy && cyc >= 5'd2 && cyc <= 5'd5;
  assign dat_v2 = busy && cyc >= 5'd14 && cyc <= 5'd17;
  assign dat_row = dat_v2 ? 2'(cyc - 5'd14) : 2'(cyc - 5'd2);

  pix_t       pel [9][4];
  logic [8:0] mode_ok;

  intra4x4_pel u_pel (
    .top(top), .left(left), .m(m), .top_av(top_av), .left_av(left_av), .tl_av(tl_av),
    .row(dat_row), .pred(pel), .mode_ok(mode_ok)
  );

  cost_t sae [9];
  logic  sae_v [9];

  for (genvar g = 0; g < 9; g++) begin : g_sae
    coef_t d [4];
    always_comb
      for (int k = 0; k < 4; k++) d[k] = coef_t'({8'd0, cur_pix[k]}) - coef_t'({8'd0, pel[g][k]});
    sae4x4 u_sae (
      .clk(clk), .rst_n(rst_n), .in_valid(dat_v1), .diff(d),
      .out_valid(sae_v[g]), .sae(sae[g]), .dc()
    );
  end

  cost_t   sae_r [9];
  i4mode_t sel_mode;
  cost_t   sel_cost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 9; k++) sae_r[k] <= '0;
    end else if (sae_v[0]) begin
      sae_r <= sae;
    end
  end

  intra4x4_modesel u_sel (
    .sae(sae_r), .mode_ok(mode_ok), .mpm(mpm), .lambda(lambda),
    .best_mode(sel_mode), .best_cost(sel_cost)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mode <= i4mode_t'(I4_DC);
      best_cost <= '0;
    end else if (busy && cyc == 5'd13) begin
      best_mode <= sel_mode;
      best_cost <= sel_cost;
    end
  end

  always_comb begin
    out_valid = dat_v2;
    out_row   = dat_row;
    for (int k = 0; k < 4; k++) begin
      out_pred[k] = pel[best_mode][k];
      out_res[k]  = coef_t'({8'd0, cur_pix[k]}) - coef_t'({8'd0, pel[best_mode][k]});
    end
  end

  assign done = busy && cyc == 5'd17;

endmodule
