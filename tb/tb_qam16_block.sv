// tb_qam16_block - exhaustive check of the 16-QAM column permutation over
// every column i < 36 and row j < 16 against i' = s*floor(i/s) + (i+j) mod s
// with s = 2, and a check that each row's mapping is a permutation.
module tb_qam16_block;
  logic [5:0] i, col;
  logic [3:0] j;
  int checks = 0, failures = 0;

  qam16_block dut (.i, .j, .col);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int jj = 0; jj < 16; jj++) begin
      bit seen [36];
      for (int ii = 0; ii < 36; ii++) seen[ii] = 0;
      for (int ii = 0; ii < 36; ii++) begin
        int expect_col;
        i = 6'(ii); j = 4'(jj);
        #1;
        expect_col = 2 * (ii / 2) + (ii + jj) % 2;
        checks++;
        if (int'(col) != expect_col) begin
          failures++;
          $display("i=%0d j=%0d col=%0d expected %0d", ii, jj, col, expect_col);
        end
        if (col < 36) seen[col] = 1;
      end
      for (int ii = 0; ii < 36; ii++) begin
        checks++;
        if (!seen[ii]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
