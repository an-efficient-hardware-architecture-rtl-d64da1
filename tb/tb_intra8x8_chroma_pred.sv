// tb_intra8x8_chroma_pred: random chroma macroblocks and neighbours, under
// every combination of neighbour availability, through the chroma 8x8
// prediction unit. The reference predicts every pixel of both components
// with the per-pixel equations of the standard, sums the Hadamard SAE of the
// eight 4x4 blocks per mode, and picks the cheapest available mode (lower
// mode number on ties). The testbench checks the chosen mode, its cost,
// all 32 prediction words and the start-to-done cycle count. The current
// chroma RAM is modelled here with a one-cycle read.
module tb_intra8x8_chroma_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LATENCY = 125;   // start to done

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, top_av, left_av, tl_av;
  pix_t        top [2][8], left [2][8], tl [2];
  logic        cur_rd, cost_valid, pw_valid, done;
  logic [4:0]  cur_addr, pw_addr;
  pix_t        cur_pix [4], pw_pix [4];
  logic [1:0]  best_mode;
  cost_t       best_cost;

  intra8x8_chroma_pred dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // current chroma RAM model: mem[c][y][x]
  int mem [2][8][8];
  always @(posedge clk)
    if (cur_rd)
      for (int k = 0; k < 4; k++)
        cur_pix[k] <= pix_t'(mem[cur_addr[4]][cur_addr[3:1]][4 * cur_addr[0] + k]);

  int e_pred [2][8][8];
  int e_mode, e_cost, n_words;
  int mode_hist [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    #2;
    if (pw_valid) begin
      checks++;
      for (int k = 0; k < 4; k++)
        if (int'(pw_pix[k]) != e_pred[pw_addr[4]][pw_addr[3:1]][4 * pw_addr[0] + k]) begin
          failures++;
          $display("word %0d pixel %0d: %0d expected %0d", pw_addr, k, pw_pix[k],
                   e_pred[pw_addr[4]][pw_addr[3:1]][4 * pw_addr[0] + k]);
          break;
        end
      n_words++;
    end
  end

  initial begin
    start = 0; top_av = 0; left_av = 0; tl_av = 0;
    for (int c = 0; c < 2; c++) begin
      tl[c] = '0;
      for (int k = 0; k < 8; k++) begin top[c][k] = '0; left[c][k] = '0; end
    end
    for (int k = 0; k < 4; k++) cur_pix[k] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 400; n++) begin
      int tp [2][8], lp [2][8], tlp [2];
      int cost [4];
      bit ta, la, tla;
      int t0, style;
      ta = 1'(n % 2); la = 1'((n / 2) % 2); tla = ta & la & 1'((n / 4) % 2 == 0);
      style = (n / 8) % 5;
      for (int c = 0; c < 2; c++) begin
        int base;
        base = $urandom_range(20, 230);
        tlp[c] = base;
        for (int k = 0; k < 8; k++) begin
          tp[c][k] = (style == 4) ? $urandom_range(0, 255) : clip(base + int'($urandom_range(0, 40)) - 20 + 3 * k);
          lp[c][k] = (style == 4) ? $urandom_range(0, 255) : clip(base + int'($urandom_range(0, 40)) - 20 - 2 * k);
        end
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            case (style)
              0: mem[c][y][x] = clip(tp[c][x] + int'($urandom_range(0, 6)) - 3);    // vertical
              1: mem[c][y][x] = clip(lp[c][y] + int'($urandom_range(0, 6)) - 3);    // horizontal
              2: mem[c][y][x] = clip(base + 3 * x - 2 * y + int'($urandom_range(0, 4)) - 2);  // plane-like
              default: mem[c][y][x] = $urandom_range(0, 255);
            endcase
      end
      // reference
      for (int md = 0; md < 4; md++) begin
        cost[md] = 0;
        for (int c = 0; c < 2; c++)
          for (int b = 0; b < 4; b++) begin
            blk_t d;
            for (int y = 0; y < 4; y++)
              for (int x = 0; x < 4; x++)
                d[y][x] = mem[c][4 * (b / 2) + y][4 * (b % 2) + x] -
                          c8pred(md, tp[c], lp[c], tlp[c], ta, la, 4 * (b % 2) + x, 4 * (b / 2) + y);
            cost[md] += satd(d);
          end
        cost[md] = cost[md] / 2;
      end
      e_mode = 0;
      e_cost = cost[0];
      if (la && cost[1] < e_cost) begin e_mode = 1; e_cost = cost[1]; end
      if (ta && cost[2] < e_cost) begin e_mode = 2; e_cost = cost[2]; end
      if (ta && la && tla && cost[3] < e_cost) begin e_mode = 3; e_cost = cost[3]; end
      mode_hist[e_mode]++;
      for (int c = 0; c < 2; c++)
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            e_pred[c][y][x] = c8pred(e_mode, tp[c], lp[c], tlp[c], ta, la, x, y);
      // drive
      top_av = ta; left_av = la; tl_av = tla;
      for (int c = 0; c < 2; c++) begin
        tl[c] = pix_t'(tlp[c]);
        for (int k = 0; k < 8; k++) begin top[c][k] = pix_t'(tp[c][k]); left[c][k] = pix_t'(lp[c][k]); end
      end
      n_words = 0;
      start = 1;
      t0 = cyc;
      @(posedge clk); #1;
      start = 0;
      while (!cost_valid) @(posedge clk);
      #1;
      checks++;
      if (int'(best_mode) != e_mode || int'(best_cost) != e_cost) begin
        failures++;
        $display("set %0d (av %0d%0d%0d style %0d): mode %0d cost %0d, expected %0d %0d (costs %0d %0d %0d %0d)",
                 n, ta, la, tla, style, best_mode, best_cost, e_mode, e_cost, cost[0], cost[1], cost[2], cost[3]);
      end
      while (!done) @(posedge clk);
      #1;
      checks++;
      if (cyc - t0 != LATENCY) begin failures++; $display("start to done %0d cycles", cyc - t0); end
      @(posedge clk); #1;
      checks++;
      if (n_words != 32) begin failures++; $display("%0d prediction words", n_words); end
    end
    $display("chosen modes: DC %0d, H %0d, V %0d, plane %0d", mode_hist[0], mode_hist[1], mode_hist[2], mode_hist[3]);
    checks++;
    if (mode_hist[0] == 0 || mode_hist[1] == 0 || mode_hist[2] == 0 || mode_hist[3] == 0) begin
      failures++;
      $display("a mode was never chosen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
