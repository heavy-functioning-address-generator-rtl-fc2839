// wimax_deinterleaver - 2-D ping-pong channel deinterleaver for IEEE 802.16e
// (mobile WiMAX) with a floor-free address generator.
//
// Structure (Fig. 1): two memory banks M-1 and M-2, each with its own
// address mux, complementary write enables taken from `sel`, and an output
// mux selecting the bank being read. While one bank is written with the
// received bits of a block, the other is read out, and the roles swap at
// every block boundary.
// Write side: each accepted input bit n (in_valid && in_ready) is written at
// address k = d*i' + j from deint_addr_gen, i.e. at its position in the
// original bit order. Read side: the full bank is read at addresses
// 0 .. Ncbps-1, so out_data is the deinterleaved stream.
// Interface: in_valid/in_data with in_ready. in_ready is low while the
// requested configuration is illegal (cfg_err) and, as a write stall, on the
// last bit of a block while the previous, longer block is still being read
// out (the bank swap must wait for it); mod_type and nslot are sampled at
// the first bit of each block. Output: out_valid/out_data/out_last, no
// back-pressure; a block appears 2 cycles after its last input bit and then
// streams at one bit per clock for Ncbps cycles.
// PWM path: its block is not specified, so its column term is an input
// (pwm_col) and the counters it would read are brought out (cur_i, cur_j).
// The write stall and the one-cycle delayed copy of sel that steers the output mux is this
// design's additions: the stall because blocks of different sizes may follow
// each other, the delayed sel because the banks have a registered read.
module wimax_deinterleaver
  import wimax_deint_pkg::*;
#(
  parameter int unsigned DW = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  mod_t               mod_type,
  input  logic [NSLOT_W-1:0] nslot,
  output logic               cfg_err,
  // received (interleaved) bits
  input  logic               in_valid,
  input  logic [DW-1:0]      in_data,
  output logic               in_ready,
  // deinterleaved bits
  output logic               out_valid,
  output logic [DW-1:0]      out_data,
  output logic               out_last,
  // PWM path
  input  logic [COL_W-1:0]   pwm_col,
  output logic [COL_W-1:0]   cur_i,
  output logic [ROW_W-1:0]   cur_j
);
  logic              step, at_end, blk_last, sel, sel_q, rd_en, rd_last;
  logic              wr_hold;
  logic [ADDR_W-1:0] wr_addr, rd_addr, blk_len_m1, a1, a2;
  logic [COL_W-1:0]  cols_m1;
  logic [DW-1:0]     dout1, dout2;
  logic              we1, we2;

  deint_addr_gen u_agen (
    .clk, .rst_n, .en(in_valid && !wr_hold), .mod_type, .nslot, .col_pwm(pwm_col),
    .step, .cfg_err, .i(cur_i), .j(cur_j), .k(wr_addr), .at_end, .blk_last,
    .cols_m1
  );

  // Write stall: the last bit of a block may only be written once the read
  // pass of the previous block is in its final cycle, because that bit
  // swaps the banks. It only bites when a block is shorter than the one
  // before it.
  assign wr_hold    = at_end && rd_en && !rd_last;
  assign in_ready   = !cfg_err && !wr_hold;
  // Ncbps - 1 = D * (cols_m1 + 1) - 1
  assign blk_len_m1 = (ADDR_W'(cols_m1) + ADDR_W'(1)) * ADDR_W'(D_ROWS) - ADDR_W'(1);

  bank_ctrl #(.AW(ADDR_W)) u_bank (
    .clk, .rst_n, .blk_done(blk_last), .blk_len_m1, .sel, .rd_en, .rd_addr,
    .rd_last
  );

  // Address muxes and write enables: sel = 0 reads M-1 and writes M-2.
  assign a1  = sel ? wr_addr : rd_addr;
  assign a2  = sel ? rd_addr : wr_addr;
  assign we1 = step &&  sel;
  assign we2 = step && !sel;

  deint_ram #(.DEPTH(NCBPS_MAX), .DW(DW), .AW(ADDR_W)) u_m1 (
    .clk, .we(we1), .addr(a1), .din(in_data), .dout(dout1)
  );
  deint_ram #(.DEPTH(NCBPS_MAX), .DW(DW), .AW(ADDR_W)) u_m2 (
    .clk, .we(we2), .addr(a2), .din(in_data), .dout(dout2)
  );

  // Output mux, aligned with the registered bank read.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q     <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      sel_q     <= sel;
      out_valid <= rd_en;
      out_last  <= rd_last;
    end
  end
  assign out_data = sel_q ? dout2 : dout1;
endmodule
