// qam64_block - 64-QAM column term of the deinterleaver address (Fig. 2).
//
// For 64-QAM (Ncpc = 6) the second permutation of IEEE 802.16e rotates bits
// inside groups of s = 3. On the 2-D block it permutes the column index:
//   i' = 3*floor(i/3) + ((i mod 3) + (j mod 3)) mod 3.
// The block splits i into its group base and its residue mod 3, reduces j
// mod 3, adds the two residues (0..4) and folds the sum back into 0..2 with
// one compare-and-subtract, so no general divider is needed. Purely
// combinational; the result goes to mux M8. The formula is derived from the
// standard's permutation; the document only names the block.
module qam64_block #(
  parameter int unsigned CW = wimax_deint_pkg::COL_W,
  parameter int unsigned RW = wimax_deint_pkg::ROW_W
) (
  input  logic [CW-1:0] i,
  input  logic [RW-1:0] j,
  output logic [CW-1:0] col
);
  logic [1:0]    i_mod3, j_mod3;
  logic [2:0]    rsum;
  logic [1:0]    rot;
  logic [CW-1:0] base;

  always_comb begin
    i_mod3 = 2'(i % CW'(3));
    j_mod3 = 2'(j % RW'(3));
    base   = i - CW'(i_mod3);
    rsum   = 3'(i_mod3) + 3'(j_mod3);
    rot    = (rsum >= 3'd3) ? 2'(rsum - 3'd3) : rsum[1:0];
    col    = base + CW'(rot);
  end
endmodule
