// tb_sram_1r1w: the synchronous SRAM model with two read ports at the
// horizontal intra prediction line size (180 words of 32 bits). A shadow array
// tracks every write; random reads on both ports must return it one cycle
// after the address, including the old contents when the same word is
// written in that cycle.
module tb_sram_1r1w;
  localparam int DEPTH = 180, WIDTH = 32, AW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [AW-1:0]    waddr;
  logic [WIDTH-1:0] wdata;
  logic             re [2];
  logic [AW-1:0]    raddr [2];
  logic [WIDTH-1:0] rdata [2];

  sram_1r1w #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(2)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] exp_d [2];
  logic             exp_v [2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int p = 0; p < 2; p++) begin re[p] = 0; raddr[p] = '0; exp_v[p] = 0; end
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = $urandom; shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++)
        if (exp_v[p]) begin
          checks++;
          if (rdata[p] !== exp_d[p]) begin
            failures++;
            $display("port %0d: %h exp %h", p, rdata[p], exp_d[p]);
          end
        end
      for (int p = 0; p < 2; p++) begin
        re[p] = $urandom_range(0, 3) != 0;
        raddr[p] = AW'($urandom_range(0, DEPTH - 1));
        exp_v[p] = re[p];
        exp_d[p] = shadow[raddr[p]];
      end
      we = $urandom_range(0, 1);
      waddr = (n % 5 == 0) ? raddr[0] : AW'($urandom_range(0, DEPTH - 1));
      wdata = $urandom;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
