// column_counter - column index i of the 2-D deinterleaver block (CLC3).
//
// Counts i = 0, 1, ..., last, 0, ... advancing by one on each cycle with
// `en` high. `last` is the number of columns minus one, Ncbps/D - 1, so the
// counter covers exactly the permissible column range of the current block.
// `at_last` is high (combinationally) while i equals `last`; the row
// counter advances on en && at_last. Synchronous, active-low reset to 0.
// The column counter and its role follow the document; the reset, the
// `last` input and the `at_last` flag are this design's choices.
module column_counter #(
  parameter int unsigned W = wimax_deint_pkg::COL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] last,
  output logic [W-1:0] i,
  output logic         at_last
);
  assign at_last = (i == last);

  always_ff @(posedge clk) begin
    if (!rst_n)        i <= '0;
    else if (en)       i <= at_last ? '0 : i + W'(1);
  end
endmodule
