// tb_chroma_dc_tq: random chroma DC quadruples, QPs and intra/inter
// rounding through the 2x2 DC transform unit. The reference takes the 2x2
// Hadamard transform by matrix product, quantises with the DC rule, and
// rebuilds the DC values with the inverse transform and chroma DC scaling.
// Inputs are sent back to back and also with gaps; each result is checked
// at its own cycle: levels two cycles after in_valid, dequantised DC three
// cycles after it.
module tb_chroma_dc_tq;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, intra, lvl_valid, dq_valid;
  coef_t in_dc [4];
  qp_t   qp;
  coef_t lvl [4];
  dq_t   dq [4];

  chroma_dc_tq dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 2000;
  int exp_lev [N][4], exp_dq [N][4];
  int sent_at [N];
  int cyc = 0, n_lvl = 0, n_dq = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // result checkers
  always @(posedge clk) if (rst_n) begin
    #2;
    if (lvl_valid) begin
      checks++;
      if (n_lvl >= N || cyc != sent_at[n_lvl] + 2) begin
        failures++; $display("lvl_valid at cycle %0d", cyc);
      end else
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(lvl[k]) != exp_lev[n_lvl][k]) begin
            failures++; $display("set %0d lvl[%0d] %0d expected %0d", n_lvl, k, lvl[k], exp_lev[n_lvl][k]);
          end
        end
      n_lvl++;
    end
    if (dq_valid) begin
      checks++;
      if (n_dq >= N || cyc != sent_at[n_dq] + 3) begin
        failures++; $display("dq_valid at cycle %0d", cyc);
      end else
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(dq[k]) != exp_dq[n_dq][k]) begin
            failures++; $display("set %0d dq[%0d] %0d expected %0d", n_dq, k, dq[k], exp_dq[n_dq][k]);
          end
        end
      n_dq++;
    end
  end

  initial begin
    in_valid = 0; intra = 0; qp = '0;
    for (int k = 0; k < 4; k++) in_dc[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) begin
      int c [4], el [4], ed [4];
      int q, range;
      bit it;
      q  = $urandom_range(0, 51);
      it = 1'(n % 2);
      // DC of a 4x4 block of 8-bit residuals lies within +-4080
      range = (n % 4 == 0) ? 8 : (n % 4 == 1) ? 200 : 4080;
      for (int k = 0; k < 4; k++) c[k] = int'($urandom_range(0, 2 * range)) - range;
      chroma_dc_ref(c, q, it, el, ed);
      for (int k = 0; k < 4; k++) begin
        exp_lev[n][k] = el[k];
        exp_dq[n][k]  = ed[k];
      end
      in_valid = 1; qp = qp_t'(q); intra = it;
      for (int k = 0; k < 4; k++) in_dc[k] = coef_t'(c[k]);
      sent_at[n] = cyc;
      @(posedge clk); #1;
      in_valid = 0;
      if (n % 7 == 3) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
    repeat (6) @(posedge clk);
    checks++;
    if (n_lvl != N || n_dq != N) begin
      failures++; $display("results %0d %0d of %0d", n_lvl, n_dq, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
