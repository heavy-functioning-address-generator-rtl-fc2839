// row_counter - row index j of the 2-D deinterleaver block (RWC3).
//
// Counts j = 0 .. ROWS-1 and wraps, advancing by one on each cycle with `en`
// high (the address generator drives en when the column counter wraps). The
// row index is also added straight into the address, k = D*i' + j.
// `at_last` is high while j == ROWS-1; en && at_last marks the last bit of
// a block. Synchronous, active-low reset to 0. The row count equals the
// interleaver depth d = 16 of IEEE 802.16e, giving a 4-bit counter.
module row_counter #(
  parameter int unsigned ROWS = wimax_deint_pkg::D_ROWS,
  parameter int unsigned W    = $clog2(ROWS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] j,
  output logic         at_last
);
  assign at_last = (j == W'(ROWS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)   j <= '0;
    else if (en)  j <= at_last ? '0 : j + W'(1);
  end
endmodule
