// tb_column_counter - self-checking test of the column counter.
// Drives random enables and a range limit that changes only when the count
// is at zero, and compares i and at_last each cycle with a reference count.
module tb_column_counter;
  logic       clk = 0, rst_n = 0, en = 0;
  logic [5:0] last = 6'd35, i;
  logic       at_last;
  int         checks = 0, failures = 0, ref_i = 0, wraps = 0;

  column_counter dut (.clk, .rst_n, .en, .last, .i, .at_last);

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
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (i != 6'(ref_i) || at_last != (ref_i == int'(last))) begin
        failures++;
        $display("mismatch cycle %0d: i=%0d ref=%0d at_last=%b", c, i, ref_i, at_last);
      end
      if (ref_i == 0 && ($urandom % 8) == 0) last = 6'($urandom_range(0, 35));
      en = ($urandom % 4) != 0;
      @(posedge clk);
      #1;
      if (en) begin
        if (ref_i == int'(last)) begin ref_i = 0; wraps++; end
        else ref_i++;
      end
    end
    checks++;
    if (wraps < 10) begin failures++; $display("too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
