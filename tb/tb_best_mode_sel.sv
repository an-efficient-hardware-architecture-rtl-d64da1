// tb_best_mode_sel: random and tied rd_costs of the intra 4x4, intra 16x16
// and inter choices, with inter prediction enabled or not. The expected
// macroblock type is the one with the smallest cost, ties going to inter,
// then intra 16x16, then intra 4x4. Combinational; each vector is checked
// after a settling delay.
module tb_best_mode_sel;
  import h264_pkg::*;

  cost_t   cost_i4, cost_i16, cost_inter, mb_cost;
  logic    inter_en;
  mbtype_e mb_type;

  best_mode_sel dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a, b, c, et, ec;
      bit en;
      a = $urandom_range(0, 1000); b = $urandom_range(0, 1000); c = $urandom_range(0, 1000);
      if (n % 4 == 1) b = a;
      if (n % 4 == 2) c = (a < b) ? a : b;
      en = n % 3 != 0;
      cost_i4 = cost_t'(a); cost_i16 = cost_t'(b); cost_inter = cost_t'(c); inter_en = en;
      #1;
      et = 1; ec = b;
      if (a < ec) begin et = 0; ec = a; end
      if (en && c <= ec) begin et = 2; ec = c; end
      checks++;
      if (int'(mb_type) != et || int'(mb_cost) != ec) begin
        failures++;
        $display("%0d %0d %0d en %0d: type %0d cost %0d", a, b, c, en, mb_type, mb_cost);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
