// tb_wimax_64qam_576 - the 576-bit, 64-QAM block size at full rate.
// Streams eight such blocks into the deinterleaver (default parameters) with
// in_valid held high, and checks:
//  - the addresses around the first row boundary (n = 30..41, rows j = 0
//    and j = 1) against the standard's deinterleaver formula;
//  - the output equals the original bits of every block;
//  - in_ready never drops and the output runs without a single idle cycle
//    from the first output bit of block 0 to the last of block 7, i.e. one
//    bit per clock sustained; the first output bit comes 577 cycles after
//    the first input bit (2 cycles after the block's last input bit).
module tb_wimax_64qam_576;
  import wimax_deint_pkg::*;
  import wimax_ref_pkg::*;

  localparam int N = 576, S = 3, BLOCKS = 8;

  logic       clk = 0, rst_n = 0;
  logic       cfg_err, in_valid = 0, in_ready, out_valid, out_last;
  logic [0:0] in_data = '0, out_data;
  logic [5:0] cur_i;
  logic [3:0] cur_j;
  int checks = 0, failures = 0;
  bit orig [BLOCKS][N];
  bit tx   [BLOCKS][N];
  longint cycle = 0, first_in = -1, first_out = -1, last_out = -1;
  int n_out = 0;

  wimax_deinterleaver dut (
    .clk, .rst_n, .mod_type(MOD_QAM64), .nslot(3'd2), .cfg_err, .in_valid,
    .in_data, .in_ready, .out_valid, .out_data, .out_last, .pwm_col(cur_i),
    .cur_i, .cur_j
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int b, k;
    b = n_out / N; k = n_out % N;
    if (first_out < 0) first_out = cycle;
    last_out = cycle;
    checks++;
    if (out_data[0] != orig[b][k]) begin
      failures++;
      if (failures < 10) $display("block %0d bit %0d wrong", b, k);
    end
    n_out++;
  end

  initial begin
    for (int b = 0; b < BLOCKS; b++)
      for (int k = 0; k < N; k++) begin
        orig[b][k] = 1'($urandom);
        tx[b][ref_interleave(k, N, S)] = orig[b][k];
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < BLOCKS; b++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1; in_data = tx[b][n];
        if (first_in < 0) first_in = cycle;
        #1;
        checks++;
        if (!in_ready || cfg_err) begin failures++; $display("stall at block %0d bit %0d", b, n); end
        if (b == 0 && n >= 30 && n < 42) begin
          checks++;
          if (int'(dut.wr_addr) != ref_deinterleave(n, N, S)) begin
            failures++;
            $display("n=%0d (j=%0d i=%0d): k=%0d expected %0d", n, cur_j, cur_i, dut.wr_addr,
                     ref_deinterleave(n, N, S));
          end
        end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (N + 10) @(negedge clk);
    checks++;
    if (n_out != BLOCKS * N) begin failures++; $display("%0d bits out", n_out); end
    checks++;
    if (first_out - first_in != N + 1) begin
      failures++; $display("fill latency %0d", first_out - first_in);
    end
    checks++;
    if (last_out - first_out != longint'(BLOCKS * N - 1)) begin
      failures++; $display("output had idle cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
