// bank_ctrl - bank select and read address of the ping-pong deinterleaver.
//
// The two banks swap roles at the end of every block: while one is written
// at the addresses k of the address generator, the other is read out in
// sequential order 0 .. Ncbps-1, which is the original (deinterleaved) bit
// order. `sel` = 0 means M-1 is read and M-2 written; `sel` = 1 the reverse.
// On `blk_done` (last bit of a block written) sel toggles and a read pass
// of the just-filled bank starts on the next cycle: rd_en is high for
// exactly blk_len_m1 + 1 cycles with rd_addr counting up from 0, and
// rd_last marks the final read. Since at most one bit is written per cycle,
// a read pass always ends no later than the next block completes; an
// assertion checks this. Reading in plain order and writing in permuted
// order is this design's choice; the document shows only the read, sel and
// write signals of the address generator.
module bank_ctrl #(
  parameter int unsigned AW = wimax_deint_pkg::ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          blk_done,
  input  logic [AW-1:0] blk_len_m1,
  output logic          sel,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          rd_last
);
  logic [AW-1:0] rd_lim;

  assign rd_last = rd_en && (rd_addr == rd_lim);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel     <= 1'b0;
      rd_en   <= 1'b0;
      rd_addr <= '0;
      rd_lim  <= '0;
    end else if (blk_done) begin
      sel     <= ~sel;
      rd_en   <= 1'b1;
      rd_addr <= '0;
      rd_lim  <= blk_len_m1;
    end else if (rd_en) begin
      rd_addr <= rd_addr + AW'(1);
      if (rd_last) rd_en <= 1'b0;
    end
  end

  // A new block may only complete once the previous read pass is finishing.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    blk_done |-> (!rd_en || rd_last))
    else $error("bank_ctrl: block completed before the previous one was read out");
endmodule
