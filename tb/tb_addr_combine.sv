// tb_addr_combine - random test of mux M8, the x d multiplier and the + j
// adder: for each modulation type k must equal 16 * (selected term) + j,
// where QPSK selects the column index itself.
module tb_addr_combine;
  import wimax_deint_pkg::*;
  mod_t       mod_type;
  logic [5:0] i, c16, c64, cp;
  logic [3:0] j;
  logic [9:0] k;
  int checks = 0, failures = 0;
  int per_mod [4];

  addr_combine dut (
    .mod_type, .i, .j, .col_qam16(c16), .col_qam64(c64), .col_pwm(cp), .k
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int sel_col, expect_k;
      mod_type = mod_t'($urandom % 4);
      i   = 6'($urandom_range(0, 35));
      c16 = 6'($urandom_range(0, 35));
      c64 = 6'($urandom_range(0, 35));
      cp  = 6'($urandom_range(0, 35));
      j   = 4'($urandom);
      #1;
      case (mod_type)
        MOD_QPSK:  sel_col = int'(i);
        MOD_QAM16: sel_col = int'(c16);
        MOD_QAM64: sel_col = int'(c64);
        default:   sel_col = int'(cp);
      endcase
      expect_k = 16 * sel_col + int'(j);
      per_mod[int'(mod_type)]++;
      checks++;
      if (int'(k) != expect_k) begin
        failures++;
        $display("mod=%0d i=%0d j=%0d k=%0d expected %0d", mod_type, i, j, k, expect_k);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (per_mod[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
