// deint_ram - one memory bank of the 2-D deinterleaver (M-1 or M-2, Fig. 1).
//
// Single-port synchronous RAM with the ports of the figure: data in (DIN),
// write enable (WE), address (A) and data out (DOUT). With we high, din is
// written to mem[addr]; otherwise mem[addr] is read and appears on dout one
// clock later (block-RAM style registered read). dout holds its value during
// writes. Depth is the largest block, 576 coded bits; the word width DW is
// this design's choice (1 = hard bits, wider for soft decisions).
module deint_ram #(
  parameter int unsigned DEPTH = wimax_deint_pkg::NCBPS_MAX,
  parameter int unsigned DW    = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    else    dout      <= mem[addr];
  end
endmodule
