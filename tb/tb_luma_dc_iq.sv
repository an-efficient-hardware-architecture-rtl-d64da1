// tb_luma_dc_iq: random luma DC level matrices and QPs through the inverse
// Hadamard transform and DC dequantisation. The reference takes the 4x4
// Hadamard transform by matrix product and applies the standard luma DC
// scaling for QP >= 12 and below; the check covers every block's value, its
// mapping to the block scan order, and that out_valid pulses the cycle after
// the fourth column.
module tb_luma_dc_iq;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qp_t        qp;
  logic       in_valid, out_valid;
  logic [1:0] in_col;
  coef_t      in_lvl [4];
  dq_t        dc_out [16];

  luma_dc_iq dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qp = '0; in_valid = 0; in_col = '0;
    for (int k = 0; k < 4; k++) in_lvl[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      blk_t l, e;
      int q, range;
      q = $urandom_range(0, 51);
      // levels that real residuals produce: large ones only at low QP, so
      // that the dequantised DC stays inside the 24-bit datapath
      range = (n % 3 == 0) ? 2 : (n % 3 == 1) ? 40 : 2000;
      if (range > 40 && q > 35) q = q - 18;
      for (int i = 0; i < 16; i++) l[i / 4][i % 4] = int'($urandom_range(0, 2 * range)) - range;
      e = luma_dc_inv(l, q);
      qp = qp_t'(q);
      for (int c = 0; c < 4; c++) begin
        in_valid = 1; in_col = 2'(c);
        for (int r = 0; r < 4; r++) in_lvl[r] = coef_t'(l[r][c]);
        @(posedge clk); #1;
        checks++;
        if (out_valid != (c == 3)) begin failures++; $display("out_valid at column %0d", c); end
      end
      in_valid = 0;
      checks++;
      for (int b = 0; b < 16; b++)
        if (int'(dc_out[b]) != e[((b >> 1) & 1) | ((b >> 2) & 2)][(b & 1) | ((b >> 1) & 2)]) begin
          failures++;
          $display("qp %0d blk %0d: %0d", q, b, dc_out[b]);
          break;
        end
      if (n % 7 == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
