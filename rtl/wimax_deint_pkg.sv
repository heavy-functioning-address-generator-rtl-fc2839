// wimax_deint_pkg - shared types and constants of the WiMAX (IEEE 802.16e)
// 2-D channel deinterleaver and its address generator.
//
// The deinterleaver block is viewed as a matrix of D rows (row index j) by
// Ncbps/D columns (column index i). Received bit n = (Ncbps/D)*j + i is
// stored at address k = D*i' + j, where i' is i permuted inside groups of
// s = Ncpc/2 columns:  i' = s*floor(i/s) + (i + j) mod s.
// D = 16 and the 48-subcarrier slot come from IEEE 802.16e; the largest block,
// 576 coded bits, is the size the design is exercised at.
package wimax_deint_pkg;

  // Interleaver depth d: rows of the 2-D block (IEEE 802.16e uses 16).
  localparam int unsigned D_ROWS     = 16;
  // Largest number of coded bits per interleaver block.
  localparam int unsigned NCBPS_MAX  = 576;
  // Data subcarriers per OFDMA slot.
  localparam int unsigned SLOT_CARR  = 48;

  localparam int unsigned COLS_MAX   = NCBPS_MAX / D_ROWS;     // 36
  localparam int unsigned COL_W      = $clog2(COLS_MAX);       // 6
  localparam int unsigned ROW_W      = $clog2(D_ROWS);         // 4
  localparam int unsigned ADDR_W     = $clog2(NCBPS_MAX);      // 10
  localparam int unsigned NSLOT_W    = 3;                      // 1..6 slots

  // Modulation type: the select of mux M8.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_QAM16 = 2'd1,
    MOD_QAM64 = 2'd2,
    MOD_PWM   = 2'd3
  } mod_t;

  // Columns of the block, Ncbps/D = (48 * Ncpc * nslot) / 16 = 3 * Ncpc * nslot.
  // The PWM path is given the QPSK geometry (Ncpc = 2).
  function automatic int unsigned ncpc_of(mod_t m);
    case (m)
      MOD_QAM16: return 4;
      MOD_QAM64: return 6;
      default:   return 2;
    endcase
  endfunction

endpackage
