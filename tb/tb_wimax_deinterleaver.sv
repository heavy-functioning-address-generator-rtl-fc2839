// tb_wimax_deinterleaver - end-to-end test of the ping-pong deinterleaver at
// its default parameters (576-bit banks, 1-bit words).
// Each block of random original bits is interleaved by the reference model
// of the IEEE 802.16e interleaver (wimax_ref_pkg), streamed in, and the
// output must return the original order. Blocks cover every modulation
// (QPSK, 16-QAM, 64-QAM and the PWM path, whose column term is fed back as
// the column index), every slot count that fits, back-to-back blocks (a bank
// written while the other is read), input gaps, idle time between blocks and
// rejected illegal configurations, and a short block after a long one,
// which must wait for the write stall. It checks the output latency (first bit
// 2 cycles after the last input bit), one output bit per clock for Ncbps
// cycles, and out_last, and counts each mechanism, failing one never seen.
module tb_wimax_deinterleaver;
  import wimax_deint_pkg::*;
  import wimax_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  mod_t       mod_type = MOD_QPSK;
  logic [2:0] nslot = 3'd1;
  logic       cfg_err, in_valid = 0, in_ready, out_valid, out_last;
  logic [0:0] in_data = '0, out_data;
  logic [5:0] pwm_col, cur_i;
  logic [3:0] cur_j;

  wimax_deinterleaver dut (
    .clk, .rst_n, .mod_type, .nslot, .cfg_err, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_last, .pwm_col, .cur_i, .cur_j
  );

  assign pwm_col = cur_i;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  // expected output stream and per-block bookkeeping
  bit  exp_q [$];
  int  len_q [$];
  longint last_in_q [$];
  int  out_in_blk = 0, cur_len = 0, blocks_out = 0;
  longint blk_start_cycle = 0;
  // mechanism counters
  int n_mod [4];
  int n_swap01 = 0, n_swap10 = 0, n_stall = 0, n_overlap = 0, n_reject = 0,
      n_idle_gap = 0, n_cfg_change = 0, n_hold = 0;
  int prev_mod = -1, prev_ns = -1;
  logic prev_sel = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: data, rate, latency and out_last.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_bank.sel != prev_sel) begin
      if (prev_sel == 0) n_swap01++; else n_swap10++;
      prev_sel = dut.u_bank.sel;
    end
    if (in_valid && in_ready && out_valid) n_overlap++;
    if (out_valid) begin
      bit e;
      if (out_in_blk == 0) begin
        cur_len = len_q.pop_front();
        blk_start_cycle = cycle;
        checks++;
        if (cycle - last_in_q.pop_front() != 2) begin
          failures++;
          $display("block %0d: latency not 2 cycles", blocks_out);
        end
      end
      e = exp_q.pop_front();
      checks++;
      if (out_data[0] != e) begin
        failures++;
        if (failures < 10) $display("block %0d bit %0d: got %b expected %b", blocks_out, out_in_blk, out_data, e);
      end
      checks++;
      if (cycle - blk_start_cycle != longint'(out_in_blk)) begin
        failures++; $display("output not one bit per clock");
      end
      checks++;
      if (out_last != (out_in_blk == cur_len - 1)) begin
        failures++; $display("out_last wrong at bit %0d", out_in_blk);
      end
      out_in_blk++;
      if (out_in_blk == cur_len) begin out_in_blk = 0; blocks_out++; end
    end
  end

  task automatic send_block(int m, int ns, int gaps, int idle_after);
    int ncbps, s, n;
    bit orig [576];
    bit tx [576];
    ncbps = 48 * ref_ncpc(m) * ns;
    s = ref_ncpc(m) / 2;
    for (int k = 0; k < ncbps; k++) begin
      orig[k] = 1'($urandom);
      tx[ref_interleave(k, ncbps, s)] = orig[k];
    end
    for (int k = 0; k < ncbps; k++) exp_q.push_back(orig[k]);
    len_q.push_back(ncbps);
    if (prev_mod >= 0 && (prev_mod != m || prev_ns != ns)) n_cfg_change++;
    prev_mod = m; prev_ns = ns;
    n_mod[m]++;
    n = 0;
    while (n < ncbps) begin
      @(negedge clk);
      if (n == 0) begin mod_type = mod_t'(m); nslot = 3'(ns); end
      else begin mod_type = mod_t'($urandom % 4); nslot = 3'($urandom); end
      in_valid = !(gaps != 0 && ($urandom % 4) == 0);
      in_data  = tx[n];
      #1;
      checks++;
      if (cfg_err) begin failures++; $display("legal block refused"); end
      if (!in_valid) begin n_stall++; continue; end
      if (!in_ready) begin
        n_hold++;
        checks++;
        if (n != ncbps - 1) begin failures++; $display("write stall before the last bit"); end
        continue;
      end
      if (n == ncbps - 1) last_in_q.push_back(cycle);
      n++;
    end
    @(negedge clk);
    in_valid = 0;
    if (idle_after > 0) begin
      n_idle_gap++;
      repeat (idle_after - 1) @(negedge clk);
    end
  endtask

  task automatic try_illegal(int m, int ns);
    @(negedge clk);
    mod_type = mod_t'(m); nslot = 3'(ns); in_valid = 1; in_data = 1'($urandom);
    #1;
    checks++;
    if (in_ready || !cfg_err) begin failures++; $display("illegal config accepted"); end
    else n_reject++;
  endtask

  // The send task returns one cycle after a block's last bit with in_valid
  // low; to get truly back-to-back blocks the next one starts in that cycle.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // the 576-bit 64-QAM block, then every legal configuration
    send_block(2, 2, 0, 0);
    for (int m = 0; m < 4; m++)
      for (int ns = 1; ns <= 6; ns++)
        if (48 * ref_ncpc(m) * ns <= 576) send_block(m, ns, (ns % 2), (ns == 3) ? 700 : 0);
    try_illegal(0, 0);
    try_illegal(2, 3);
    send_block(1, 3, 0, 0);   // 576 bits, then a 96-bit block
    send_block(0, 1, 0, 0);
    for (int b = 0; b < 6; b++) begin
      int m, ns;
      m = $urandom % 4;
      ns = $urandom_range(1, 576 / (48 * ref_ncpc(m)));
      send_block(m, ns, b % 2, 0);
    end
    repeat (700) @(negedge clk);
    in_valid = 0;
    // every block came out
    checks++;
    if (exp_q.size() != 0 || len_q.size() != 0 || out_in_blk != 0) begin
      failures++; $display("%0d bits never came out", exp_q.size());
    end
    $display("blocks out %0d; mods %0d/%0d/%0d/%0d; swaps %0d/%0d; stalls %0d; overlap %0d; rejects %0d; idle gaps %0d; cfg changes %0d; write stalls %0d",
             blocks_out, n_mod[0], n_mod[1], n_mod[2], n_mod[3], n_swap01, n_swap10,
             n_stall, n_overlap, n_reject, n_idle_gap, n_cfg_change, n_hold);
    foreach (n_mod[m]) begin checks++; if (n_mod[m] == 0) failures++; end
    checks++; if (n_swap01 == 0 || n_swap10 == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_reject == 0) failures++;
    checks++; if (n_idle_gap == 0) failures++;
    checks++; if (n_cfg_change == 0) failures++;
    checks++; if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
