// tb_sae4x4: random difference blocks through the Hadamard SAE unit,
// compared with sum |H D H| from a matrix product; also checks the DC output
// and the schedule (rows on cycles 2-5, result on cycle 12, i.e. 10 cycles
// after the first row) with blocks spaced 11 cycles apart.
module tb_sae4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  coef_t diff [4];
  cost_t sae;
  coef_t dc;

  sae4x4 dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int sae; int dc; int due; } exp_t;
  exp_t expq[$];

  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
      end else begin
        e = expq.pop_front();
        if (int'(sae) != e.sae || int'(dc) != e.dc || cyc != e.due) begin
          failures++;
          $display("sae %0d/%0d dc %0d/%0d cyc %0d/%0d", sae, e.sae, dc, e.dc, cyc, e.due);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    for (int k = 0; k < 4; k++) diff[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      blk_t d;
      exp_t e;
      int s;
      int mag;
      mag = (n % 4 == 0) ? 255 : 20;
      s = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          d[i][j] = int'($urandom_range(0, 2 * mag)) - mag;
          s += d[i][j];
        end
      e.sae = satd(d);
      e.dc  = s;
      e.due = cyc + 10;
      expq.push_back(e);
      for (int i = 0; i < 4; i++) begin
        in_valid = 1'b1;
        for (int j = 0; j < 4; j++) diff[j] = coef_t'(d[i][j]);
        @(posedge clk); #1;
      end
      in_valid = 1'b0;
      repeat (7 + ((n % 5 == 0) ? $urandom_range(0, 6) : 0)) @(posedge clk);
      #1;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
