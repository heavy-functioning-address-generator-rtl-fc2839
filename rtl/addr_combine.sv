// addr_combine - mux M8, multiplier ML3 and adder of the address generator.
//
// Mux M8 picks the column term of the current modulation type:
//   QPSK  : i itself (s = 1, the QPSK block leaves the column unchanged)
//   16-QAM: col_qam16, 64-QAM: col_qam64, PWM: col_pwm (external input).
// Multiplier ML3 scales the chosen column term by the interleaver depth d and
// the adder adds the row index j, giving the deinterleaver address
//   k = d * col + j.
// Purely combinational. The structure (mux, x d, + j) follows Fig. 2 of the
// design description; d is a parameter here rather than a port, and the
// mux encoding (QPSK, 16-QAM, 64-QAM, PWM = 0..3) is this design's choice.
module addr_combine
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D  = D_ROWS,
  parameter int unsigned CW = COL_W,
  parameter int unsigned RW = ROW_W,
  parameter int unsigned AW = ADDR_W
) (
  input  mod_t          mod_type,
  input  logic [CW-1:0] i,
  input  logic [RW-1:0] j,
  input  logic [CW-1:0] col_qam16,
  input  logic [CW-1:0] col_qam64,
  input  logic [CW-1:0] col_pwm,
  output logic [AW-1:0] k
);
  logic [CW-1:0] col;     // M8 output
  logic [AW-1:0] scaled;  // ML3 output

  always_comb begin
    unique case (mod_type)
      MOD_QPSK:  col = i;
      MOD_QAM16: col = col_qam16;
      MOD_QAM64: col = col_qam64;
      MOD_PWM:   col = col_pwm;
      default:   col = i;
    endcase
    scaled = AW'(col) * AW'(D);
    k      = scaled + AW'(j);
  end
endmodule
