// tb_deint_addr_gen - checks the address generator against the floor-based
// IEEE 802.16e deinterleaver formula for every modulation and every slot
// count whose block fits in 576 bits, with random idle cycles between bits
// and the configuration inputs scrambled in mid-block (they must be held).
// Also checks one address per accepted bit, blk_last on the final bit, that
// each block's addresses are a permutation, the PWM path (fed back with the
// column index, it must reproduce the QPSK mapping), and that illegal
// configurations raise cfg_err and accept nothing.
module tb_deint_addr_gen;
  import wimax_deint_pkg::*;
  import wimax_ref_pkg::*;

  logic       clk = 0, rst_n = 0, en = 0;
  mod_t       mod_type = MOD_QPSK;
  logic [2:0] nslot = 3'd1;
  logic [5:0] col_pwm, i;
  logic [3:0] j;
  logic [9:0] k;
  logic [5:0] cols_m1;
  logic       step, cfg_err, at_end, blk_last;
  int checks = 0, failures = 0, blocks = 0, stalls = 0;

  deint_addr_gen dut (.clk, .rst_n, .en, .mod_type, .nslot, .col_pwm, .step,
                      .cfg_err, .i, .j, .k, .at_end, .blk_last, .cols_m1);

  assign col_pwm = i;  // PWM path stand-in: identity column term

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int m, int ns);
    int ncbps, s, n;
    bit seen [576];
    ncbps = 48 * ref_ncpc(m) * ns;
    s = ref_ncpc(m) / 2;
    for (int a = 0; a < 576; a++) seen[a] = 0;
    n = 0;
    while (n < ncbps) begin
      @(negedge clk);
      if (n == 0) begin
        mod_type = mod_t'(m); nslot = 3'(ns);
      end else begin
        mod_type = mod_t'($urandom % 4); nslot = 3'($urandom);
      end
      en = ($urandom % 5) != 0;
      #1;
      if (!en) begin stalls++; continue; end
      checks++;
      if (!step || cfg_err) begin failures++; $display("bit refused"); end
      checks++;
      if (int'(k) != ref_deinterleave(n, ncbps, s)) begin
        failures++;
        $display("mod %0d nslot %0d n=%0d: k=%0d expected %0d", m, ns, n, k,
                 ref_deinterleave(n, ncbps, s));
      end
      checks++;
      if (blk_last != (n == ncbps - 1) || at_end != (n == ncbps - 1)) begin failures++; $display("blk_last wrong at n=%0d", n); end
      if (k < 576) seen[k] = 1;
      n++;
    end
    @(negedge clk);
    en = 0;
    for (int a = 0; a < ncbps; a++) begin
      checks++;
      if (!seen[a]) begin failures++; $display("address %0d never produced", a); end
    end
    blocks++;
  endtask

  task automatic check_illegal(int m, int ns);
    @(negedge clk);
    mod_type = mod_t'(m); nslot = 3'(ns); en = 1;
    #1;
    checks++;
    if (!cfg_err || step) begin failures++; $display("illegal config %0d/%0d accepted", m, ns); end
    @(negedge clk);
    checks++;
    if (i != 0 || j != 0) begin failures++; $display("counters moved on illegal config"); end
    en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++)
      for (int ns = 1; ns <= 6; ns++)
        if (48 * ref_ncpc(m) * ns <= 576) run_block(m, ns);
    check_illegal(0, 0);
    check_illegal(1, 4);
    check_illegal(2, 3);
    run_block(2, 2);   // the 576-bit 64-QAM block once more after the errors
    checks++;
    if (blocks != 18 || stalls == 0) begin failures++; $display("blocks=%0d stalls=%0d", blocks, stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
