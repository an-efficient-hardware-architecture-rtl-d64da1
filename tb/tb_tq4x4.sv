// tb_tq4x4: random residual blocks through the TQ module, compared with a
// matrix-product transform and integer quantisation. Checks the 13-cycle
// schedule (first level column 8 cycles after the first row), back-to-back
// blocks, the AC-only mode and the luma DC quantiser input.
module tb_tq4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qp_t   qp;
  logic  intra, ac_only, in_valid, dcq_valid;
  coef_t in_row [4];
  logic signed [17:0] dcq_in [4];
  logic  out_valid, out_isdc;
  logic [1:0] out_col;
  coef_t out_lvl [4], dc_raw;

  tq4x4 dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output columns: {isdc, col, lvl[4]} queued in order
  typedef struct { bit isdc; int col; int lvl[4]; int due; } exp_t;
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
        if (e.isdc != out_isdc || e.col != out_col || (e.due >= 0 && e.due != cyc)) begin
          failures++;
          $display("tag mismatch isdc %0d/%0d col %0d/%0d cyc %0d/%0d", out_isdc, e.isdc, out_col,
                   e.col, cyc, e.due);
        end
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (out_lvl[i] != e.lvl[i]) begin
            failures++;
            $display("lvl mismatch col %0d row %0d: %0d exp %0d", e.col, i, out_lvl[i], e.lvl[i]);
          end
        end
      end
    end
  end

  task automatic send_block(int q, bit in_intra, bit aco, int mag);
    blk_t x, lev;
    int t0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) x[i][j] = int'($urandom_range(0, 2 * mag)) - mag;
    tq_block(x, q, in_intra, aco, lev);
    t0 = cyc;
    for (int j = 0; j < 4; j++) begin
      exp_t e;
      e.isdc = 0;
      e.col  = j;
      e.due  = t0 + 8 + j;
      for (int i = 0; i < 4; i++) e.lvl[i] = lev[i][j];
      expq.push_back(e);
    end
    for (int i = 0; i < 4; i++) begin
      qp = qp_t'(q); intra = in_intra; ac_only = aco;
      in_valid = 1'b1;
      for (int j = 0; j < 4; j++) in_row[j] = coef_t'(x[i][j]);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; dcq_valid = 0; qp = 28; intra = 1; ac_only = 0;
    for (int k = 0; k < 4; k++) begin in_row[k] = '0; dcq_in[k] = '0; end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    // spaced blocks
    for (int n = 0; n < 60; n++) begin
      send_block($urandom_range(0, 51), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
                 (n % 3 == 0) ? 255 : 30);
      repeat ($urandom_range(0, 12)) @(posedge clk);
      #1;
    end
    // back-to-back blocks
    for (int n = 0; n < 40; n++) send_block($urandom_range(0, 51), 1'b1, 1'b0, 255);
    repeat (20) @(posedge clk); #1;
    // luma DC quantiser input (four columns)
    for (int n = 0; n < 20; n++) begin
      blk_t d;
      int q;
      q = $urandom_range(0, 51);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) d[i][j] = int'($urandom_range(0, 60000)) - 30000;
      for (int j = 0; j < 4; j++) begin
        exp_t e;
        e.isdc = 1; e.col = j; e.due = cyc + 2 + j;
        for (int i = 0; i < 4; i++) e.lvl[i] = quant(d[i][j], q, 1'b1, 0, 1'b1);
        expq.push_back(e);
      end
      for (int j = 0; j < 4; j++) begin
        qp = qp_t'(q); intra = 1'b1; dcq_valid = 1'b1;
        for (int i = 0; i < 4; i++) dcq_in[i] = 18'(d[i][j]);
        @(posedge clk); #1;
      end
      dcq_valid = 1'b0;
      repeat (4) @(posedge clk); #1;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
