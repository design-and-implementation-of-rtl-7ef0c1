# Reconfigurable RSA exponentiator (512 / 1024 / 2048 / 4096 bits)

This is a small-area RSA engine. It computes `M^E mod N` for a block size picked
at run time: 512, 1024, 2048 or 4096 bits. Everything passes through one 16-bit
datapath. Operands are kept in five 256 x 16-bit memories, not in 4096-bit
registers. The arithmetic is a chain of 16 processing elements (PEs). Each PE
performs one radix-2 Montgomery step on a stream of 16-bit words. The chain sits
in a loop closed by a programmable delay line, so one chain serves every block
size: a larger block only makes the word stream longer.

The architecture follows a published reconfigurable RSA design for smart-card
use: the five memories, the 16-element two-stage PE array, the loop FIFO, the
adjustment adder, the key-length detector, the 16-bit host bus and its mode
word. That design does not fully specify the sequencing, the PE internals, the
Montgomery radix or the host data order, so those are this implementation's own
choices. They are listed in "Where this departs from the source design" below.

## Host interface

| pin | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high |
| `enable` | in | 1 | `data_in` is valid; a rising edge marks a mode word |
| `data_in` | in | 16 | mode word, then operand words, least significant word first |
| `busy` | out | 1 | engine is occupied |
| `out_enable` | out | 1 | a result is ready to be read |
| `out_valid` | out | 1 | `data_out` carries a result word |
| `data_out` | out | 16 | result words, least significant first (0 when not valid) |

The engine has 19 input pins and 19 output pins. Every transaction is one
`enable` burst. The first word of a burst is the mode word: `data_in[5:4]` is
the operation and `data_in[3:0]` is the one-hot block size (`0001`=512,
`0010`=1024, `0100`=2048, `1000`=4096 bits). Let L = n/16 be the number of
words in an n-bit block.

| operation | `data_in[5:4]` | rest of the burst | behaviour |
|---|---|---|---|
| configuration | `01` | N (L words), R² mod N (L words), key E or D (L words) | `busy` falls one cycle after `enable` falls |
| en/decryption | `00` | message M (L words; missing words read as 0) | `busy` stays high; `out_enable` rises when the result is ready |
| result | `10` | none | accepted only while `out_enable` is high; L words follow with `out_valid`, then `busy`, `out_enable` and `out_valid` fall |

Requirements on the operands:

* N must be odd and below 2^n.
* M must be below N. The one exception is M = N, which gives 0.
* The host supplies **R² mod N = 2^(2n+30) mod N**. The reason is explained in the next section.

While a result is waiting (`out_enable` high), the engine ignores any mode word
other than Result.

## Arithmetic

### The Montgomery step

The multiplier A is scanned one bit per iteration, starting from the least
significant bit. Each iteration does

    t = S mod 2
    S = (S + a_i * 2B + t * N) / 2

The multiplicand enters doubled. 2B is even, so `S + a_i*2B` has the same low
bit as S. The reduction bit t is therefore known as soon as the lowest word of S
arrives. It does not have to wait for an addition, and in a word-serial pipeline
that saves a cycle of dependency. The doubling costs one extra iteration.

Each product scans I = 16(L+1) = n+16 multiplier bits, which is L+1 passes of
16 iterations. The product is therefore `A*B*2^-(n+15) mod N`, so the Montgomery
radix is R = 2^(n+15). This is why the coefficient the host loads is
R² mod N = 2^(2n+30) mod N.

Range argument, with inputs A, B < 2N and N < 2^n:

* Every intermediate S stays below 2B + N < 5N < 2^(n+3). An intermediate value
  therefore fits in L+1 words.
* The final value is below A·B/R + N < 2N.

Products can be chained without any intermediate subtraction. S and P can
exceed 2^n, so their bit n is kept in a flip-flop (`s_ext`, `p_ext`) beside each
256-word memory.

### Exponentiation

The exponent is processed right to left, with S kept outside the Montgomery domain:

    P = MM(M, R² mod N)          -- P = M·R mod N  (Montgomery form)
    S = 1                        -- plain form
    for i = 0 .. k-1:
        if e_i:  S = MM(S, P)    -- plain · Montgomery = plain
        P = MM(P, P)
    result = S >= N ? S - N : S

S starts as the plain value 1, so each `MM(S, P)` keeps it in plain form. No
conversion back is needed at the end.

k is the effective key length: the position of the highest set bit of the key,
plus one. The complete detector (`rsa_key_length`) records it while the key is
loaded, so the loop stops at the top set bit. For example, E = 65537 costs 17
iterations, not n.

**Both products of one exponent bit run in the same pass.** `S·P` and `P·P` share
the multiplicand P. Each PE therefore has two accumulator lanes:

* lane 0 has multiplier S;
* lane 1 has multiplier P.

Both lanes see the same 2B and N words. One exponent bit therefore costs one
product time. The lane-0 result is written back only when e_i = 1. Lane 1 is
written back always.

## The word-serial array and its loop

### A pass

A value travels as a stream of 16-bit words, least significant first, one word
per clock. A **pass** lasts T = L+4 cycles. Cycle w of a pass carries the
following:

* word w of 2B;
* word w of N;
* word w of both accumulators;
* on word 0 only, the two 16-bit multiplier words of the pass. These are word p
  of S and word p of P, and PE k uses bit k.

Words above L are zero.

Each word has a 3-bit tag (`valid`, `first`, `last`) that travels with it.
`first` restarts each PE's carry and latches its a and t bits. `last` marks the
final pass of a product, whose output is written back.

### Inside a PE (`rsa_pe`)

Stage 1 adds `S_w + a·2B_w + t·N_w + carry` into an 18-bit sum. It keeps the
2-bit carry for the next word.

Stage 2 holds the previous word's sum. The division by 2 spans two words: the
output word j is `{sum_{j+1}[0], sum_j[15:1]}`. That is why word j leaves the PE
only once word j+1 has been added, which gives two cycles per PE. At a pass
boundary, or after an empty slot, the bit shifted in is 0.

### The loop

The 16 PEs take 32 cycles (`rsa_pe_array`). Their accumulator output goes into
two ring-buffer delay lines (`rsa_loop_fifo`, one per lane). Each line delays
its word by T − 32 = L − 28 cycles: 4, 36, 100 or 228 for the four sizes. A word
therefore returns to PE 0 exactly one pass after it entered. The delay is
programmed from the block size, and this is the whole of the reconfiguration:
the PEs do not depend on the size.

### Schedule of one product (`rsa_ctrl`)

| phase | cycles | what happens |
|---|---|---|
| PRO | 1 | read the key word holding e_i; read word 0 of S and P (multiplier words of pass 0) |
| RUN | (L+1)·(L+4) | pass p, cycle w: read word w of P (or of R² in the first product) and of N; in cycle T−2, a slot that never carries data, read word p+1 of S and P for the next pass; in pass 0 the accumulator input is 0, afterwards it is the FIFO output |
| DRAIN | 34 | the last pass leaves the array and is written back to S and P |

The memories have one read port and one write port each. The free slot at
cycle T−2 is what lets P serve both the multiplicand stream and the
multiplier-word reads. DRAIN makes sure the write-back ends before the next
product reads S and P.

After the last exponent bit, ADJ streams S and N (L+1 words) through the
adjustment subtractor (`rsa_adjust_adder`) and writes S−N into the P memory. The
final borrow selects which memory the Result mode reads from.

## Timing and throughput

One exponentiation with key length k takes

    (k+1) · (1 + (L+1)(L+4) + 34) + (L+1)  cycles

plus 2 to 3 cycles of protocol, from the end of the message burst to
`out_enable`. Measured in simulation, with a full-length key (k = n):

| block | cycles | kb/s at 116.7 MHz | kb/s at 370 MHz | source design's figures (FPGA / 0.18 µm cells) |
|---|---|---|---|---|
| 512 | 627,435 | 95.2 | 302 | 99 / 314 |
| 1024 | 4,566,443 | 26.2 | 83.0 | 26 / 83 |
| 2048 | 34,962,219 | 6.8 | 21.7 | 6.8 / 21 |
| 4096 | 273.9 M (from the formula, not simulated) | 1.75 | 5.5 | 1.7 / 5.4 |

The source counts L·(L+4) cycles per product. This design spends (L+1)(L+4)+35:
one more pass and the drain. That is about 6 % slower at 512 bits and under 1 %
at 4096 bits. No clock frequency has been established for this RTL. The
frequencies in the table are the source design's, used only for comparison.

## Files

| file | content |
|---|---|
| `rtl/rsa_pkg.sv` | widths, mode-word encoding, `tag_t`, `pe_link_t` (the bundle between PEs), size decoder |
| `rtl/rsa_pe.sv` | one two-lane, two-stage Montgomery PE |
| `rtl/rsa_pe_array.sv` | 16 PEs in series (32-cycle latency) |
| `rtl/rsa_loop_fifo.sv` | programmable ring-buffer delay, depth 228 |
| `rtl/rsa_mem.sv` | 256 x 16 memory, one write port, one registered read port |
| `rtl/rsa_adjust_adder.sv` | word-serial S − N with borrow register |
| `rtl/rsa_key_length.sv` | effective key length detector |
| `rtl/rsa_ctrl.sv` | mode decoding, loading, product sequencing, adjustment and read-out |
| `rtl/rsa_top.sv` | the engine: memories, operand muxing, write-back, bit-n flip-flops |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_rsa_workloads.sv` | full-length keys at 512/1024/2048 bits, with cycle counts and throughput |
| `tb/tb_rsa_roundtrip.sv` | real key pairs (generated primes) at 512 and 1024 bits: encrypt with E, decrypt with D |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/rsa_pkg.sv tb/tb_rsa_top.sv --top-module tb_rsa_top
    ./obj_dir/Vtb_rsa_top

Replace the testbench name to run another one. `tb_rsa_top` uses the engine
exactly as built, with no parameter overrides. It covers:

* random moduli at all four sizes;
* exponents 0, 3, 65537, random 32/64-bit and a full 512-bit exponent;
* the directed case M = N, the only practical way to make S reach N and exercise
  the final subtraction.

It runs in a few seconds. `tb_rsa_workloads` takes about half a minute.
`tb_rsa_roundtrip` generates two primes per block size, then encrypts with
E = 65537 and decrypts with the matching private exponent D. It takes about
ten seconds. The
reference results come from plain shift-and-add modular arithmetic in the
testbench, not from a Montgomery model.

Assertions in the RTL check two things:

* a product's write-back never has bits above bit n, which is the range argument
  above;
* `out_valid` is only raised while a result is available.

## Where this departs from the source design

* **Radix and iteration count.** The source's algorithm scans n+1 bits with an
  operand width two bits wider than the modulus, and loads 2^(2n) mod N. Here
  every product makes L+1 full passes, and the host loads 2^(2n+30) mod N.
* **Cycles per product:** (L+1)(L+4)+35 instead of L(L+4). See the timing section.
* **FIFO depth:** 228 words, against the source's 224. The pass here is L+4
  cycles, not L. There are two FIFOs, one per lane.
* **PE contents:** the source gives each PE one 16-bit ripple adder and five
  16-bit registers, with 34 adders in total. These PEs hold two lanes, each
  with a three-operand 18-bit addition written as `+`, and they pass the
  multiplier words along. The synthesis tool picks the adder structure.
* **Bit n of S and P** lives in two flip-flops, so the memories stay 256 words.
* **Host order of configuration data** (N, then R² mod N, then the key) and
  zero-filling of short messages are choices made here.
* **Result selection:** the final subtraction writes S − N into the P memory,
  and the borrow picks the memory to read. The data is not corrected while it
  streams out.

## Limits

* R² mod N, and any CRT or key handling, is the host's job.
* The 4096-bit datapath is simulated with a 17-bit exponent only. The full
  4096-bit exponent case follows from the formula.
* No timing closure or area figure exists for this RTL. Memories are inferred
  arrays.
* Behaviour with an even N, or with M greater than N, is undefined. The design
  does not check for either.
