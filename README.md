# Floor-free address generator and 2-D deinterleaver for IEEE 802.16e (mobile WiMAX)

The channel interleaver of IEEE 802.16e scatters the coded bits of one block
(Ncbps bits) with two permutations. Both are written in the standard with
`floor()` and `mod` over the block size. Evaluating these formulas directly
in hardware needs dividers. The usual alternative stores the permutation in
look-up tables, one per modulation and block size.

This design needs neither. It views a block as a matrix of **d = 16 rows by
Ncbps/16 columns**. It walks that matrix with two plain counters: a column
counter `i` and a row counter `j`. The deinterleaver address of each
received bit then reduces to

    k = d * i' + j,        i' = s * floor(i / s) + (i + j) mod s,   s = Ncpc / 2

Here Ncpc is the number of bits per subcarrier (2, 4 or 6). `i'` is a small
permutation of the column index inside groups of `s` columns:

* for QPSK it is `i` itself;
* for 16-QAM it flips the lowest bit of `i` on odd rows;
* for 64-QAM it rotates the residue `i mod 3` by `j mod 3`.

A multiplier by d and an adder then give the address. In the whole
datapath, only the 64-QAM path has a (constant, mod-3) reduction.

The address generator drives a classic ping-pong deinterleaver with two
memory banks. While one bank fills with a received block, the other is read
out in the original bit order.

## Where the address formula comes from

The standard's deinterleaver maps received index `n` to original index `k`:

    m = s*floor(n/s) + (n + floor(d*n/Ncbps)) mod s
    k = d*m - (Ncbps - 1)*floor(d*m/Ncbps)

Let R = Ncbps/d be the number of columns, and write `n = R*j + i` with
`0 <= i < R` and `0 <= j < d`. Then:

* `floor(d*n/Ncbps)` is just `j`.
* R is always a multiple of s (R = 3*Ncpc*nslot), so `n mod s = i mod s`.
* The first step becomes `m = R*j + i'`, with `i'` the column permutation above.
* `floor(d*m/Ncbps)` is again `j`, so `k = d*R*j + d*i' - (d*R - 1)*j = d*i' + j`.

Each floor is replaced by the counter that already holds its value. As a
result, the received bits arrive row by row: `j` is the slow counter and `i`
the fast one.

Worked example: 64-QAM, Ncbps = 576, so R = 36 and s = 3. Take received
bit n = 37, which gives j = 1 and i = 1.

* The column term is `i' = 0 + (1 + 1) mod 3 = 2`.
* So `k = 16*2 + 1 = 33`.
* The standard's formula agrees: m = 36 + 38 mod 3 = 38, and k = 608 - 575 = 33.

## Address generator (`deint_addr_gen`)

| part | module | what it does |
|---|---|---|
| column counter `i` | `column_counter` | 0 .. R-1, steps on every accepted bit |
| row counter `j` | `row_counter` | 0 .. 15, steps when `i` wraps |
| QPSK path | in `addr_combine` | `i' = i` |
| 16-QAM block | `qam16_block` | `i' = {i[5:1], i[0]^j[0]}` |
| 64-QAM block | `qam64_block` | `i' = 3*floor(i/3) + ((i mod 3)+(j mod 3)) mod 3`, built with one compare-and-subtract |
| PWM path | input `pwm_col` | fourth mux input; see below |
| mux M8, multiplier, adder | `addr_combine` | `k = D * mux(mod_type) + j` |

**Configuration.** The block size is given as a number of 48-subcarrier
slots `nslot`, so that Ncbps = 48 * Ncpc * nslot and R = 3 * Ncpc * nslot.
The code rate has no input of its own: it affects the address sequence only
through which block sizes are allowed.

`mod_type` and `nslot` are sampled with the first bit of a block and held
until its last bit. Changing them in mid-block has no effect. The generator
raises `cfg_err` and accepts nothing when either of these holds:

* `nslot` is 0;
* the block would exceed the 576-bit banks. For example, 16-QAM with more
  than 3 slots, or 64-QAM with more than 2.

All 802.16e OFDMA convolutional-code block sizes fit within that limit:
QPSK up to 6 slots, 16-QAM up to 3, and 64-QAM up to 2.

**Timing.** `k` is combinational from the counter registers. One address is
produced per clock, for the bit presented in that cycle.

## Ping-pong banks (`wimax_deinterleaver`, `bank_ctrl`, `deint_ram`)

There are two single-port banks, M-1 and M-2 (`deint_ram`, 576 x DW, with a
registered read). A bank select `sel` decides their roles:

* `sel = 0`: M-1 is read and M-2 is written.
* `sel = 1`: the reverse.

Each bank has an address mux choosing the write address `k` or the read
address. The two write enables are complementary, both gated by an accepted
input bit. An output mux picks the bank being read.

* **Write**: received bit `n` goes to address `k(n)`, which is its position
  in the original order.
* **Swap**: writing the last bit of a block toggles `sel`. `bank_ctrl` then
  starts a read pass over addresses 0 .. Ncbps-1 of the bank just filled.
* **Read**: one bit per clock. `out_valid` rises 2 cycles after the cycle
  of the last input bit: one cycle for the swap and one for the RAM read.
  `out_last` marks the final bit of the block. A one-cycle delayed copy of
  `sel` steers the output mux, to line up with the registered read.
* **Write stall**: a block can be shorter than the one before it, for
  example 96 bits after 576. Such a block could otherwise finish filling
  while the previous block is still being read from the other bank.
  `in_ready` therefore drops on the *last* bit of a block until the read
  pass reaches its final cycle. Bits before the last one are never held
  back. For equal-size blocks at full rate the stall never occurs, and
  blocks stream back to back. An assertion in `bank_ctrl` checks that no
  swap happens in the middle of a read pass.

## Top-level interface (`wimax_deinterleaver`, parameter `DW = 1`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `mod_type` | in | 2 | 0 QPSK, 1 16-QAM, 2 64-QAM, 3 PWM path (`wimax_deint_pkg::mod_t`) |
| `nslot` | in | 3 | slots per block (1..6) |
| `cfg_err` | out | 1 | requested block does not fit / nslot = 0 |
| `in_valid`, `in_data`, `in_ready` | in/in/out | 1/DW/1 | received (interleaved) bits; a bit is taken when valid and ready |
| `out_valid`, `out_data`, `out_last` | out | 1/DW/1 | deinterleaved bits, no back-pressure |
| `pwm_col` | in | 6 | column term of the PWM path (mux input 3) |
| `cur_i`, `cur_j` | out | 6/4 | current column and row counters, for the PWM path |

Shared constants live in `wimax_deint_pkg`:

* `D_ROWS = 16`;
* `NCBPS_MAX = 576`;
* `SLOT_CARR = 48`;
* the derived widths: 6-bit column, 4-bit row, 10-bit address.

## Departures and open points

* **Unspecified insides.** The counters, the M8 / x d / + j datapath and
  the two-bank structure follow the original description. That description
  gives no formulas for the modulation blocks. The 16-QAM and 64-QAM blocks
  here are derived from the 802.16e permutation as shown above. Their
  testbenches check every one of them against the standard's floor-based
  formula.
* **PWM path.** The original design has a fourth, "PWM" path into the
  modulation mux, with its own 4-bit counter. What it computes is not
  specified. Here its column term is a top-level input and the counters
  are exported. When `pwm_col` is driven with `cur_i`, it behaves like
  QPSK, and the testbenches use it that way. In PWM mode the block geometry
  is that of QPSK (Ncpc = 2).
* **The depth d.** d is a parameter (`D` / `D_ROWS`), not a run-time input.
* **This design's own choices.** None of the following is taken from the
  original: the handshake, the reset, the held configuration, `cfg_err`,
  the write stall, the delayed output select, and the sequential read with
  permuted write (rather than the opposite).
* **Not included.** A Walsh-Hadamard generator, a bi-orthogonal
  demodulator with ML decoder, and an extra latency-reducing block RAM are
  mentioned alongside the original design. They are not described in any
  usable detail and are not part of this RTL.
* **No timing or power closure.** The original reports FPGA figures
  (Spartan-3E XC3S100E: 4.655 ns latency, 34 mW). Nothing here reproduces
  or checks them.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
model `tb/wimax_ref_pkg.sv` implements the standard's interleaver and
deinterleaver formulas directly, with the floor functions.
`tb_wimax_deinterleaver` runs the top at its default parameters:

* it interleaves random blocks with that model for every modulation and
  legal slot count (including the 576-bit 64-QAM block);
* it streams them in, with gaps, idle time and illegal configurations;
* it checks that the original order comes back, the 2-cycle latency, the
  one-bit-per-clock output and `out_last`;
* it counts bank swaps in both directions, write stalls and overlapped
  read/write cycles.

With Verilator 5, run from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/wimax_deint_pkg.sv tb/wimax_ref_pkg.sv tb/tb_wimax_deinterleaver.sv \
        --top-module tb_wimax_deinterleaver -o sim
    ./obj_dir/sim

`tb_wimax_64qam_576` streams eight 576-bit 64-QAM blocks at full rate. It
checks that input and output both sustain one bit per clock with no stall
and no idle output cycle.

Replace the testbench name to run another one. Every testbench finishes in
well under a second.
