// qam16_block - 16-QAM column term of the deinterleaver address (Fig. 2).
//
// For 16-QAM each subcarrier carries Ncpc = 4 bits and the second
// permutation of IEEE 802.16e cyclically rotates bits inside groups of
// s = 2. Mapped onto the 2-D block this becomes a permutation of the column
// index only:  i' = 2*floor(i/2) + (i + j) mod 2,
// i.e. the column's least significant bit is XORed with the row's least
// significant bit. Purely combinational; the result goes to mux M8 and is
// then scaled by d and added to j (k = d*i' + j). The formula is derived
// from the standard's permutation; the document only names the block.
// Only j[0] is used and col[5:1] are i[5:1] wired through: the full row
// index is taken so that the 16-QAM and 64-QAM blocks share one interface.
module qam16_block #(
  parameter int unsigned CW = wimax_deint_pkg::COL_W,
  parameter int unsigned RW = wimax_deint_pkg::ROW_W
) (
  input  logic [CW-1:0] i,
  input  logic [RW-1:0] j,
  output logic [CW-1:0] col
);
  always_comb begin
    col    = i;
    col[0] = i[0] ^ j[0];
  end
endmodule
