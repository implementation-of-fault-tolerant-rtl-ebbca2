# Fault-tolerant FSM with an embedded signature analyzer

A microprogrammed finite state machine keeps its whole transition function in
a memory, addressed by the primary inputs and the present state. Such memories
usually have spare cells. This design puts a small signature analyzer into those
spare cells. The analyzer is the decoder of an error-detecting code: it
compresses everything the FSM does into a 2-bit signature. A built-in self-test
then drives the FSM with a known input sequence. It checks the FSM by comparing
the final signature with the fault-free one. No analyzer logic is added: only
memory columns and the 2-bit signature register.

The analyzer can work with either of two codes:

- **algebraic:** polynomial division over GF(2), as in a classic signature
  analyzer;
- **arithmetic:** a residue modulo a check base, as used to check arithmetic
  units.

The code is chosen only by what is stored in the memory. The memory size and the
speed are the same for both codes.

Next to the FSM, the RTL includes the residue generators that arithmetic codes
are built from:

- a bit-serial generator;
- a generator that takes several bits per clock;
- the low-cost generator for check bases of the form b^r − 1;

It also has a stand-alone 2-bit parallel signature analyzer.

## Files

| file | contents |
|---|---|
| `rtl/esa_pkg.sv` | widths, the address/word structs, the code enum, the analyzer step functions, the example FSM and the control-store image |
| `rtl/control_store.sv` | the FSM memory (32 words × 4 bits) with a write port |
| `rtl/mp_fsm.sv` | Moore microprogrammed FSM: control store + state register + signature register |
| `rtl/bist_ctrl.sv` | self-test sequencer, LFSR test pattern, signature compare |
| `rtl/sig_analyzer2.sv` | stand-alone 2-bit parallel signature analyzer |
| `rtl/mod5_serial.sv` | serial residue generator, mod G (default 5) |
| `rtl/mod5_parallel.sv` | K-bit parallel residue generator, mod G (default 3 bits, mod 5) |
| `rtl/mod_br1_residue.sv` | residue generator mod b^r − 1 (end-around carry) |
| `rtl/esa_top.sv` | top level: all of the above |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_esa_top` runs the whole design |
| `tb/esa_ref_pkg.sv` | independent reference models used by the testbenches |

## How the analyzer lives in the control store

The control store is addressed by `{x, y, s}` and each word holds `{y_next, s_next}`:

```
address (5 bits)            word (4 bits)
+----+-------+-------+      +----------+----------+
| x  | y 1:0 | s 1:0 |  ->  | y_next   | s_next   |
+----+-------+-------+      +----------+----------+
 input state  signature      next state next signature
```

On every clock, `y <= y_next` and `s <= s_next`. The FSM part (`y_next`)
depends only on `x` and `y`. The analyzer part (`s_next`) depends on `s` and on
the *present* state `y`:

- algebraic code: `s_next = (s·x + y) mod (x² + x + 1)`. In bits, this is
  `{y1 ^ s1 ^ s0, y0 ^ s1}`.
- arithmetic code: `s_next = (4·s + y) mod 3`. This equals `(s + y) mod 3`.

After N clocks, `s` therefore holds one of two values:

- algebraic code: the remainder of the state sequence `y0 … yN−1`, read as a
  polynomial, divided by x² + x + 1;
- arithmetic code: the value of that sequence, read as a base-4 number, modulo 3.

Why this detects faults in the memory:

- The present state is an address field, so the analyzer always compresses the
  state the register really holds.
- If a stored `y_next` is wrong, the FSM enters a wrong state. That state is
  compressed on the next clock, and from then on the trajectory usually differs.
- If a stored `s_next` is wrong, the signature changes directly.

A fault can still escape if the faulty word is never read during the test. It
can also escape if the wrong sequence happens to give the same 2-bit signature,
which is a chance of about 1 in 4 with a 2-bit register.

The FSM is an output-coded Moore machine: the state register drives the
outputs. This is why compressing the state covers every response of the FSM.
The example application is a 4-state up/down counter in Gray code: input `x=1`
counts up (00→01→11→10) and `x=0` counts down. To use another FSM, edit
`app_next` in `esa_pkg`, or load new words through the write port. The
analyzer columns are computed by `cs_init_word`, which is the formula above.

The memory is a writable array. Reset loads it with the image for the `CODE`
parameter (`cs_image`). The `prog_*` port can rewrite any word at run time. This
is how the FSM can be changed after the fact. It is also how the analyzer can be
switched from one code to the other: write the other image.

## Self-test sequence (`bist_ctrl`)

| state | clocks | what happens |
|---|---|---|
| IDLE | – | FSM runs on `x_in`; `start` is accepted |
| CLEAR | 1 | `fsm_clear`: state ← 0, signature ← 0; LFSR reseeded |
| RUN | `TEST_LEN` (16) | FSM input = bit 0 of a 4-bit LFSR, x⁴+x³+1, seed 0001 |
| CHECK | 1 | `pass`/`fail` ← (`sig` == `ref_sig`); `done` pulses on the next clock |

`done` is sampled high at the (TEST_LEN + 3)th rising edge after the edge that
took `start`. `pass` and `fail` hold until the next `start`. `test_mode` (CLEAR
and RUN) switches the FSM input from `x_in` to the LFSR. `ref_sig` is the
signature of the fault-free FSM. For the default image and test it is computed
by `test_signature()` in `tb/tb_esa_top.sv`: run the FSM from state 0 for 16
clocks on the LFSR bits and compress the states visited. Assertions check two
rules: `pass` and `fail` are never both high, and `done` follows `start` after
exactly TEST_LEN + 3 clocks.

## Residue generators

All residue generators read the number most significant part first. Each has a
synchronous `clear` and an `en`. Each output is always the residue of the
number read so far, and is ready one clock after the last input.

- **`mod5_serial` (G = 5):** one bit per clock, `r' = (2r + u) mod G`. Since
  2r + u < 2G, a single compare-and-subtract reduces it.
- **`mod5_parallel` (G = 5, K = 3):** one K-bit digit per clock,
  `r' = (2^K·r + d) mod G`. 2^K is first replaced by C = 2^K mod G (3 for the
  default). A chain of compare-and-add-two's-complement steps, for G·2^i from
  the top down, then reduces `C·r + d`. This is a restoring division remainder.
  For the default, this means subtracting 10 and then 5 from a sum of at most 19.
  A K-bit number takes one clock instead of K clocks.
- **`mod_br1_residue` (b = 2^B_BITS, r = R, default b = 2, r = 2, g = 3):**
  because b^r ≡ 1 (mod g), the residue of a number is the residue of the sum of
  its r-digit groups. The circuit is a W = B_BITS·R bit accumulator whose carry
  out is added back in (one's-complement addition). The all-ones pattern is the
  second code for zero and is shown as 0. Groups may be added in any order.

`sig_analyzer2` is the same 2-bit parallel analyzer as the embedded one. Here it
is built as logic: shift once per enabled clock and fold in the word `d`. It
uses the polynomial x² + x + 1.

## Top level (`esa_top`)

| parameter | default | meaning |
|---|---|---|
| `CODE` | `CODE_ALGEBRAIC` | image loaded into the control store at reset |
| `TEST_LEN` | 16 | self-test length in clocks |
| `B_BITS`, `R` | 1, 2 | b = 2^B_BITS and r of the mod b^r − 1 generator |

Port groups (all share `clk` and the asynchronous active-low `rst_n`):

| group | ports |
|---|---|
| FSM | `x_in`, `fsm_y`, `fsm_sig` |
| control-store write | `prog_we`, `prog_addr` (`cs_addr_t`), `prog_data` (`cs_word_t`) |
| self-test | `test_start`, `ref_sig`, `test_busy`, `test_done`, `test_pass`, `test_fail` |
| stand-alone analyzer | `sa_clear`, `sa_en`, `sa_d`, `sa_sig` |
| serial mod-5 generator | `m5s_clear`, `m5s_en`, `m5s_u`, `m5s_residue` |
| parallel mod-5 generator | `m5p_clear`, `m5p_en`, `m5p_d`, `m5p_residue` |
| mod b^r − 1 generator | `mg_clear`, `mg_en`, `mg_d`, `mg_residue` |

The residue generators and the stand-alone analyzer are independent circuits.
They sit next to the FSM with their own ports.

## What follows the published scheme and what is this design's choice

These parts follow the published scheme:

- the PROM-based Moore FSM;
- the analyzer held in spare memory cells;
- the use of an algebraic or an arithmetic code, chosen by the memory contents
  alone;
- a 2-bit parallel signature analyzer;
- serial and 3-bit parallel generators modulo 5, generalised to any check base;
- a low-cost generator for check base b^r − 1;
- a self-test that compares the signature with the fault-free one.

These are this design's own choices, because the scheme does not fix them:

- the generator polynomial x² + x + 1;
- that the present state is the word being compressed;
- the output-coded example FSM and its size (1 input, 4 states);
- the writable memory that is loaded at reset;
- the LFSR test-pattern generator, the 16-clock test length and the handshake;
- the bit and digit order (most significant first), and clear/enable/reset
  behaviour;
- the defaults b = 2, r = 2 for the b^r − 1 generator;
- the inside of every residue generator, since only their functions are
  specified.

The parallel mod-5 generator is specified by correction signals (C2, C1, C0)
that add the 8's complement of the modulus. Here, the correction is computed by
comparison instead. The residue is the same, but the gate structure is not that
of the original correction logic. No Mealy variant is provided.

## Verification

Each testbench checks its module against a model in `tb/esa_ref_pkg.sv`, or
against integer arithmetic, that does not share code with the RTL:

- the signature models use long division over GF(2);
- the residue models use `%` on 64-bit integers;
- the FSM model uses a Gray-code position table.

Each testbench covers the following:

- **`tb_sig_analyzer2`:** random streams with hold cycles and clears, checked
  after every word.
- **`tb_mod5_serial`:** 200 random numbers of up to 60 bits, modulo 5 and 7,
  checked after every bit.
- **`tb_mod5_parallel`:** every residue × digit step modulo 5, plus random
  numbers modulo 5 (3-bit digits), 7 (4-bit digits) and 9 (2-bit digits).
- **`tb_mod_br1_residue`:** g = 3 and g = 15 (b = 4, r = 2). The inputs are
  biased to all-ones groups, to exercise the end-around carry.
- **`tb_control_store`:** both images word by word, random writes read back, and
  reload on reset.
- **`tb_mp_fsm`:** both codes on random inputs, checking the state and signature
  every clock, and a reprogrammed word.
- **`tb_bist_ctrl`:** the clear/run sequencing, the LFSR pattern, the latency,
  and the pass/fail verdicts, at TEST_LEN = 16 and 5.
- **`tb_esa_top`:** the whole design at its default parameters. It covers:
  - normal operation;
  - a passing self-test;
  - a memory fault on the test path that the self-test must detect;
  - repair of that word;
  - a switch of the whole memory to the modulo-3 code, followed by passing and
    failing tests;
  - reset back to the default image;
  - the stand-alone analyzer and all three residue generators on shared random
    numbers.

  It counts each of these mechanisms and fails if any of them never happened.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. Each
one also fails against a deliberately broken copy of its module.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/esa_pkg.sv tb/esa_ref_pkg.sv tb/tb_esa_top.sv --top-module tb_esa_top -o sim
./obj_dir/sim
```

Replace `tb_esa_top` with any other `tb_<module>` to run that unit's test. Each
run takes well under a second.

`bist_ctrl` gives one lint warning (SYNCASYNCNET). It comes from the assertions'
`disable iff (!rst_n)` using the asynchronous reset, and it is harmless.
