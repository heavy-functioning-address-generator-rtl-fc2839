// deint_addr_gen - address generator of the WiMAX 2-D deinterleaver (Fig. 2).
//
// Column counter i (0 .. Ncbps/d-1) and row counter j (0 .. d-1) step once
// per accepted input bit, the row counter advancing when the column counter
// wraps, so bit n = (Ncbps/d)*j + i of the received block is being handled.
// The QPSK path (i itself), the 16-QAM and 64-QAM blocks and the external
// PWM term feed mux M8; the chosen term is multiplied by d and j is added:
//   k = d*i' + j,  i' = s*floor(i/s) + (i + j) mod s,  s = Ncpc/2.
// This is the IEEE 802.16e deinterleaver mapping with its floor functions
// removed: k is the position of received bit n in the original order.
//
// Configuration: mod_type and nslot (number of 48-subcarrier slots, 1..6)
// give Ncbps = 48*Ncpc*nslot and 3*Ncpc*nslot columns. They are sampled when
// the first bit of a block is accepted and held for the whole block.
// A configuration whose block exceeds NCBPS_MAX, or nslot = 0, raises
// cfg_err and no bit is accepted (step stays low).
// Timing: i, j and k are valid in the cycle the bit is presented (k is
// combinational from the counter registers); one address per clock.
// `at_end` is high while the counters point at the last bit of a block and
// `blk_last` when that bit is accepted; `cols_m1` is the column count minus
// one of the block in progress.
// Follows the document: counters, the per-modulation blocks, M8, x d, + j.
// This design's choices: the nslot-based configuration, the hold of the
// configuration over a block, cfg_err, and handling of the PWM term as an
// input (its block is not specified).
module deint_addr_gen
  import wimax_deint_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,        // a bit is presented this cycle
  input  mod_t               mod_type,
  input  logic [NSLOT_W-1:0] nslot,
  input  logic [COL_W-1:0]   col_pwm,   // column term from the PWM path
  output logic               step,      // bit accepted, counters advance
  output logic               cfg_err,
  output logic [COL_W-1:0]   i,
  output logic [ROW_W-1:0]   j,
  output logic [ADDR_W-1:0]  k,
  output logic               at_end,    // next accepted bit ends the block
  output logic               blk_last,
  output logic [COL_W-1:0]   cols_m1
);
  localparam int unsigned CALC_W = COL_W + 4;

  logic               at_start, col_last, row_last;
  mod_t               mod_q, mod_cur;
  logic [COL_W-1:0]   cols_m1_q;
  logic [CALC_W-1:0]  cols_new;
  logic [COL_W-1:0]   col16, col64;

  // Columns of a block of the requested configuration: 48 * Ncpc * nslot / d.
  always_comb begin
    cols_new = CALC_W'(SLOT_CARR * ncpc_of(mod_type) / D_ROWS) * CALC_W'(nslot);
  end

  assign at_start = (i == '0) && (j == '0);
  assign cfg_err  = at_start && ((nslot == '0) || (cols_new > CALC_W'(COLS_MAX)));
  assign step     = en && !cfg_err;
  assign mod_cur  = at_start ? mod_type : mod_q;
  assign cols_m1  = at_start ? COL_W'(cols_new - CALC_W'(1)) : cols_m1_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_q     <= MOD_QPSK;
      cols_m1_q <= '0;
    end else if (step && at_start) begin
      mod_q     <= mod_type;
      cols_m1_q <= COL_W'(cols_new - CALC_W'(1));
    end
  end

  column_counter #(.W(COL_W)) u_clc (
    .clk, .rst_n, .en(step), .last(cols_m1), .i, .at_last(col_last)
  );

  row_counter #(.ROWS(D_ROWS), .W(ROW_W)) u_rwc (
    .clk, .rst_n, .en(step && col_last), .j, .at_last(row_last)
  );

  assign at_end   = col_last && row_last;
  assign blk_last = step && at_end;

  qam16_block #(.CW(COL_W), .RW(ROW_W)) u_qam16 (.i, .j, .col(col16));
  qam64_block #(.CW(COL_W), .RW(ROW_W)) u_qam64 (.i, .j, .col(col64));

  addr_combine #(.D(D_ROWS), .CW(COL_W), .RW(ROW_W), .AW(ADDR_W)) u_comb (
    .mod_type(mod_cur), .i, .j, .col_qam16(col16), .col_qam64(col64),
    .col_pwm, .k
  );
endmodule
