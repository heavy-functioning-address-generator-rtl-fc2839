// tb_bank_ctrl - pulses blk_done at block boundaries (back to back and with
// idle gaps, various block lengths) and checks that sel toggles, that a read
// pass of exactly blk_len_m1 + 1 sequential addresses follows, and that
// rd_last marks its final cycle.
module tb_bank_ctrl;
  logic       clk = 0, rst_n = 0, blk_done = 0;
  logic [9:0] blk_len_m1 = '0, rd_addr;
  logic       sel, rd_en, rd_last;
  int checks = 0, failures = 0;

  bank_ctrl dut (.clk, .rst_n, .blk_done, .blk_len_m1, .sel, .rd_en,
                            .rd_addr, .rd_last);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sel_before;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (sel != 0 || rd_en != 0) failures++;
    for (int b = 0; b < 12; b++) begin
      int len, gap;
      len = 16 * $urandom_range(1, 36);
      gap = (b % 3 == 0) ? $urandom_range(1, 20) : 0;
      sel_before = sel;
      blk_done = 1; blk_len_m1 = 10'(len - 1);
      @(negedge clk);
      blk_done = 0; blk_len_m1 = '0;
      checks++;
      if (sel == sel_before) begin failures++; $display("sel did not toggle"); end
      for (int a = 0; a < len; a++) begin
        checks++;
        if (!rd_en || int'(rd_addr) != a || rd_last != (a == len - 1)) begin
          failures++;
          $display("block %0d step %0d: rd_en=%b rd_addr=%0d rd_last=%b", b, a, rd_en, rd_addr, rd_last);
        end
        // the next block may complete on the last read cycle
        if (a == len - 1 && gap == 0) break;
        @(negedge clk);
      end
      if (gap != 0) begin
        checks++;
        if (rd_en) begin failures++; $display("read pass too long"); end
        repeat (gap - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
