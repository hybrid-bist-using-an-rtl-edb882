# Hybrid BIST with an incrementally guided LFSR

Pseudo-random built-in self-test is cheap, but some faults are hard to hit
with random patterns. The usual fixes are to store top-up vectors on the
tester or to add test points to the logic. This design needs neither.
It is an ordinary STUMPS self-test: one LFSR fills many scan chains in
parallel and a MISR compacts what comes out. The only change is one XOR gate
in the LFSR feedback (or a few, with more channels). At the start of a test
vector the tester drives one bit into that gate. The bit is chosen off line,
so that after enough vectors the LFSR reaches a state whose output contains a
wanted *test cube*. A test cube is a vector in which only the bits that
detect a hard fault are specified; all other bits are don't-cares.

The tester therefore stores about one bit per vector instead of whole
deterministic vectors. The test length is traded against tester storage by
changing how many bits enter per vector: several channels per vector, or
one bit only every few vectors.

## How a guide bit steers the LFSR

Every guide bit is a *free variable*. The LFSR is linear over GF(2). After
some injections, each bit of each following vector is therefore an XOR of
some free variables plus a constant. Take a small example with a 4-stage LFSR
(feedback = stage 2 XOR stage 3), start state 1011, and three chains of four
cells fed from stages 0, 1 and 2. With guide bits a, b and c entering the
first three vectors, the third vector's first chain holds `a'+c, a+b, a,
a'+b+c` (`'` is inversion, `+` is XOR). A cube such as "first chain reads
x1xx" is then one linear equation. A cube with s specified bits gives s
equations. Once enough variables have been injected, the equations have a
solution. The tester then stores the solved values and gets the cube in that
vector. After that, the LFSR state is fully known again and the next cube
starts from there.

`tb/tb_guided_lfsr.sv` checks this example for all eight values of (a, b, c).

The off-line part is not hardware and is not in this RTL. It consists of
symbolic simulation of the LFSR, Gaussian elimination over GF(2), fault
simulation and ATPG for the cubes, and optionally *lookahead*. With
lookahead, the variables for cube i are fixed with the next k cubes' equations
solved together. `tb/tb_hybrid_bist_top.sv` contains a small version of the
off-line step with no lookahead. It can serve as a reference for the
equations.

Rules of thumb for sizing:

- The LFSR should be about 20 stages longer than the largest number of
  specified bits in any cube. The default 64-stage LFSR suits cubes of up
  to about 44 specified bits.
- Tester storage is at most (test length) × (bits per vector). Fewer bits
  are needed when the cubes are embedded before the test ends.

## Hardware

```
                 tester_data[N_CH]     guide_rom (stand-alone option)
                        \                 /
                         guide_src mux
                              |  (only on the first shift of a vector)
                              v
   bist_ctrl ---------> guided_lfsr --scan_in[k] = next state of stage k--> scan chains (CUT)
   (shift/capture,                                                               |
    injection timing)                                                         scan_out
        \_________________________________________________________________> misr -> signature
```

| file | role |
|---|---|
| `rtl/bist_pkg.sv` | controller state enum, guide-source enum, default polynomials, counter widths |
| `rtl/guided_lfsr.sv` | Fibonacci LFSR. N_CH guide bits are XORed into stages 0, LEN/N_CH, 2·LEN/N_CH, … on a step with `inject_en` |
| `rtl/bist_ctrl.sv` | session sequencer: m shift cycles plus 1 capture cycle per vector, injection timing, MISR enable, final unload |
| `rtl/guide_rom.sv` | optional ROM of guide bits, one N_CH-bit word per injection |
| `rtl/misr.sv` | multiple-input signature register with one input per chain |
| `rtl/hybrid_bist_top.sv` | connects the blocks above; the scan chains connect through ports |

### Injection points and chain taps

Channel 0 always enters at the feedback, which is the single extra XOR of the
basic scheme. Further channels enter at evenly spaced stages.

Scan chain k is fed from the value that stage k takes on the current step
(the D side of its flip-flop), not from the flip-flop output. As a result, the
bits injected on a step already appear in the bit shifted into chain 0 on
that step. This reproduces the worked example exactly.

### A property of direct chain taps

No phase shifter sits between the LFSR and the chains. Chain k+1 therefore
sees chain k's bit one cycle later: cell i of chain k always equals cell
i+1 of chain k+1. Each diagonal (chain + cell index) carries a single LFSR
output bit. A cube that needs different values on two cells of one diagonal
cannot be produced, whatever the guide bits. The end-to-end test picks cubes
with at most one specified bit per diagonal.

A real design with long chains would normally insert a phase shifter (an
XOR network) at `scan_in`. The equations stay linear, so the method still
works, but the off-line tool must then model that network. This RTL leaves
the phase shifter out.

### Session timing

1. Optionally load a seed (`seed_we` while idle); otherwise the LFSR starts
   from its reset state `0…01`, or from where the last session stopped.
2. Pulse `start` with `num_vectors` = L and `inj_period` = P. P = 1 gives
   one injection per vector; P = 4 gives one every fourth vector, i.e.
   0.25 bit per vector. P = 0 counts as 1.
3. For each vector v = 0 … L−1:
   - There are `CHAIN_LEN` shift cycles (`scan_en`). The LFSR steps on each.
   - On the first shift of a vector with v mod P = 0, `guide_req` is high
     and `tester_data` is XORed in that cycle.
   - From v = 1 on, the MISR compacts the previous response during the
     shifts.
   - Then one `capture` cycle follows.
4. One more `CHAIN_LEN`-cycle shift unloads the last response with the LFSR
   stopped. Then `done` rises and `signature` is final.

A session lasts L·(CHAIN_LEN+1)+CHAIN_LEN cycles from `start`. The tester
has no back-pressure: it must present its bits in the cycle `guide_req` is
high. For one bit per vector with the 4-channel default, drive the unused
channels with 0.

With `guide_src = GUIDE_ROM`, the bits come from `guide_rom`, addressed by
the injection index, and `guide_req` stays low. The ROM's contents are the
top's `ROM_CONTENTS` parameter (word i at bits `[i*N_CH +: N_CH]`). The
all-zero default makes the ROM mode plain pseudo-random BIST. Addresses past
the ROM depth read zero.

## Parameters of `hybrid_bist_top`

| parameter | default | note |
|---|---|---|
| `LFSR_LEN`, `LFSR_TAPS` | 64, taps 64,63,61,60 | the stage count is a choice made here; the LFSR needs about 20 stages more than the largest cube |
| `LFSR_RESET` | 1 | start state when no seed is loaded |
| `N_CH` | 4 | guide channels; 4 bits per vector is the highest rate used in the evaluation below |
| `NUM_CHAINS`, `CHAIN_LEN` | 32, 52 | 1664 cells; must have `NUM_CHAINS ≤ LFSR_LEN` and `≤ MISR_LEN` |
| `MISR_LEN`, `MISR_TAPS` | 32, taps 32,22,2,1 | |
| `ROM_DEPTH`, `ROM_ADDR_W`, `ROM_CONTENTS` | 256, 16, zeros | stand-alone option |

Taps are bit masks: bit k set means stage k (0-based) feeds the XOR. The
defaults are maximal-length polynomials; the testbench confirms this for the
8- and 16-bit masks in `bist_pkg`.

## Sizes of the evaluated circuits

The scheme was evaluated on four ISCAS-89 circuits with 611 to 1664 scan
cells. It used 0.25, 1 and 4 guide bits per vector and test lengths of
about 550 to 85,000 vectors. Tester storage was roughly 1,500 to 22,500 bits.

At the default parameters, this RTL can hold all of these configurations:

- Up to 1664 cells.
- A 32-bit vector counter.
- Up to 4 channels, with any injection period up to 255 vectors.

The guide data streams in from the tester. Whether a 64-stage LFSR is long
enough depends on the cubes' largest number of specified bits, and that
number is not known for these circuits. The on-chip ROM (1024 bits at the
default size) is far smaller than those tester volumes. The stand-alone mode
suits smaller data sets, or a larger `ROM_DEPTH`.

## Choices made in this RTL, not in the scheme itself

- LFSR length and polynomial, Fibonacci form, reset state and asynchronous
  active-low reset.
- Chains fed from the next-state value of adjacent stages, with no phase
  shifter.
- A separate capture cycle, a final unload pass, clearing the MISR at
  `start`, and the start/done handshake.
- MISR length, polynomial and form.
- ROM organisation: one word per injection, asynchronous read, contents as
  a parameter.
- Chain count and chain length.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT` line.

| testbench | what it shows |
|---|---|
| `tb_guided_lfsr` | The worked example for every (a, b, c). Maximal period of the 8- and 16-bit polynomials. The default 64-bit, 4-channel LFSR against a model over 3000 random cycles of seed loads, shifts and injections. |
| `tb_misr` | Default and 8-bit/3-input MISRs against a bit-level model, including clear. A single flipped response bit changes the signature. |
| `tb_guide_rom` | Every word of a 64-word ROM against its formula. Zero beyond the depth and in the default. |
| `tb_bist_ctrl` | Cycle-by-cycle schedule for several L and P values, with 5- and 52-cell chains. Session length, injection count, L = 0, P = 0, and restart. |
| `tb_hybrid_bist_top` | The full default design. It runs three tester sessions (4 bits per vector, 1 bit per vector, 1 bit every 4 vectors) that embed 12 random cubes of 8–30 bits, then a ROM session. Every loaded vector is compared with a separately computed one, and every cube bit is checked. Also checked: cycle counts, guide requests and the MISR signature. |

| `tb_hybrid_bist_rom` | A reduced top (16-stage LFSR, 8 chains of 6 cells) with a 16-word ROM of known contents. ROM sessions use the words in order, then zeros past the end, with `guide_req` low. A tester session in between shows the source select switching. Each shift cycle is checked against a model, and the signature too. |
| `tb_workloads_table1` | The twelve (test length, bits per vector) points of the benchmark evaluation, as complete sessions on the default design with random guide bits: guide-bit count against the reported tester storage, session length, per-cycle `scan_in`/`guide_req` against a model, and the signature. The longest is 85,093 vectors (4.5 M cycles). |

At 0.25 bit per vector the design injects on vectors 0, 4, 8, … It therefore
takes ⌈L/4⌉ bits. When L is not a multiple of 4 this is one more than L·n
rounded down.

`tb/cut_scan_model.sv` is a behavioural stand-in for the circuit under test:
shift registers plus a non-linear capture function.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bist_pkg.sv rtl/guided_lfsr.sv rtl/misr.sv rtl/guide_rom.sv \
    rtl/bist_ctrl.sv rtl/hybrid_bist_top.sv tb/cut_scan_model.sv \
    tb/tb_hybrid_bist_top.sv --top-module tb_hybrid_bist_top
./obj_dir/Vtb_hybrid_bist_top
```

The other testbenches need `rtl/bist_pkg.sv` plus their block's file. The
full-size end-to-end test runs in well under a second; the workload test
takes about ten seconds.
