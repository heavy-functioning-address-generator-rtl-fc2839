// tb_deint_ram - writes random words to random addresses of a 576-deep bank,
// reads them back and checks the one-cycle read latency and that dout holds
// during writes.
module tb_deint_ram;
  logic       clk = 0, we = 0;
  logic [9:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] model [576];
  bit         valid [576];
  int checks = 0, failures = 0;

  deint_ram #(.DEPTH(576), .DW(8), .AW(10)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 576; a++) valid[a] = 0;
    for (int t = 0; t < 6000; t++) begin
      int a;
      a = $urandom_range(0, 575);
      @(negedge clk);
      if (($urandom % 2) == 0 || !valid[a]) begin
        logic [7:0] held;
        held = dout;
        we = 1; addr = 10'(a); din = 8'($urandom);
        @(posedge clk); #1;
        model[a] = din; valid[a] = 1;
        checks++;
        if (dout != held) begin failures++; $display("dout changed during write"); end
      end else begin
        we = 0; addr = 10'(a);
        @(posedge clk); #1;
        checks++;
        if (dout != model[a]) begin
          failures++;
          $display("addr %0d read %h expected %h", a, dout, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
