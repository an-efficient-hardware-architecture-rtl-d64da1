// tb_iqit4x4: random level blocks through the IQIT module (one column per
// cycle, as the TQ module delivers them), compared with the dequantisation
// and row-then-column inverse transform of the standard. Checks the DC
// substitution input, back-to-back blocks and the 13-cycle schedule (first
// residual row 9 cycles after the first column).
module tb_iqit4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qp_t   qp;
  logic  in_valid, dc_sub;
  coef_t in_lvl [4];
  dq_t   dc_val;
  logic  out_valid;
  logic [1:0] out_idx;
  coef_t out_row [4];

  iqit4x4 dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int row; int v[4]; int due; } exp_t;
  exp_t expq[$];

  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        if (e.row != out_idx || e.due != cyc) begin
          failures++;
          $display("row %0d/%0d cyc %0d/%0d", out_idx, e.row, cyc, e.due);
        end
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (out_row[j] != e.v[j]) begin
            failures++;
            $display("row %0d col %0d: %0d exp %0d", e.row, j, out_row[j], e.v[j]);
          end
        end
      end
    end
  end

  task automatic send_block(int q, bit dsub, int mag);
    blk_t lev, r;
    int dv, t0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) lev[i][j] = int'($urandom_range(0, 2 * mag)) - mag;
    dv = int'($urandom_range(0, 8000)) - 4000;
    r = iqit_block(lev, q, dsub, dv);
    t0 = cyc;
    for (int i = 0; i < 4; i++) begin
      exp_t e;
      e.row = i;
      e.due = t0 + 9 + i;
      for (int j = 0; j < 4; j++) e.v[j] = r[i][j];
      expq.push_back(e);
    end
    for (int j = 0; j < 4; j++) begin
      qp = qp_t'(q); dc_sub = dsub; dc_val = dq_t'(dv); in_valid = 1'b1;
      for (int i = 0; i < 4; i++) in_lvl[i] = coef_t'(lev[i][j]);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; dc_sub = 0; dc_val = '0; qp = 20;
    for (int k = 0; k < 4; k++) in_lvl[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 60; n++) begin
      int q;
      q = $urandom_range(0, 51);
      send_block(q, 1'($urandom_range(0, 1)), (q > 40) ? 3 : 40);
      repeat ($urandom_range(0, 10)) @(posedge clk);
      #1;
    end
    for (int n = 0; n < 40; n++) send_block($urandom_range(0, 30), 1'b0, 20);
    repeat (30) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d rows missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
