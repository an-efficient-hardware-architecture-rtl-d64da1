// sram_1r1w: on-chip synchronous SRAM with one write port and NRD read
// ports, used for every memory of the macroblock engine (current pixels,
// prediction stores, IDCT value store, intra prediction lines, most probable
// modes). Write and read are synchronous; read data appears the cycle after
// the address. A read of the address written in the same cycle returns the
// old contents. Contents are not reset. Port count is this design's choice;
// NRD = 2 gives the luma current RAM a port for the 4x4 and one for the 16x16
// prediction.
module sram_1r1w #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 32,
  parameter int NRD   = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re    [NRD],
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int p = 0; p < NRD; p++)
      if (re[p]) rdata[p] <= mem[raddr[p]];
  end

endmodule
