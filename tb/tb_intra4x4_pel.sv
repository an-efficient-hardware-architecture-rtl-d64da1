// tb_intra4x4_pel: random neighbours and availability; every row of all nine
// modes is compared with the per-pixel prediction equations of the standard,
// and the mode-availability flags with the rules for each mode. The unit is
// combinational: every row is checked one time step after it is applied.
module tb_intra4x4_pel;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  pix_t       top [8], left [4], m;
  logic       top_av, left_av, tl_av;
  logic [1:0] row;
  pix_t       pred [9][4];
  logic [8:0] mode_ok;

  intra4x4_pel dut (.*);

  int checks = 0, failures = 0;

  // watchdog (the unit is combinational; time advances 1 per row)
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int t[8], l[4], mm;
      for (int k = 0; k < 8; k++) begin t[k] = $urandom_range(0, 255); top[k] = pix_t'(t[k]); end
      for (int k = 0; k < 4; k++) begin l[k] = $urandom_range(0, 255); left[k] = pix_t'(l[k]); end
      mm = $urandom_range(0, 255); m = pix_t'(mm);
      top_av = 1'($urandom_range(0, 3) != 0);
      left_av = 1'($urandom_range(0, 3) != 0);
      tl_av = 1'($urandom_range(0, 3) != 0);
      for (int y = 0; y < 4; y++) begin
        row = 2'(y);
        #1;
        for (int md = 0; md < 9; md++) begin
          checks++;
          if (mode_ok[md] != i4ok(md, top_av, left_av, tl_av)) failures++;
          if (!i4ok(md, top_av, left_av, tl_av)) continue;
          for (int x = 0; x < 4; x++) begin
            checks++;
            if (int'(pred[md][x]) != i4pred(md, t, l, mm, top_av, left_av, x, y)) begin
              failures++;
              $display("mode %0d (%0d,%0d): %0d exp %0d", md, x, y, pred[md][x],
                       i4pred(md, t, l, mm, top_av, left_av, x, y));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
