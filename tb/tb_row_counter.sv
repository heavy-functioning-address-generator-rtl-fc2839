// tb_row_counter - self-checking test of the row counter: random enables,
// j and at_last compared each cycle with a reference count modulo 16.
module tb_row_counter;
  logic       clk = 0, rst_n = 0, en = 0;
  logic [3:0] j;
  logic       at_last;
  int         checks = 0, failures = 0, ref_j = 0, wraps = 0;

  row_counter dut (.clk, .rst_n, .en, .j, .at_last);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (j != 4'(ref_j) || at_last != (ref_j == 15)) begin
        failures++;
        $display("mismatch cycle %0d: j=%0d ref=%0d at_last=%b", c, j, ref_j, at_last);
      end
      en = ($urandom % 3) != 0;
      @(posedge clk);
      #1;
      if (en) begin
        if (ref_j == 15) begin ref_j = 0; wraps++; end
        else ref_j++;
      end
    end
    checks++;
    if (wraps < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
