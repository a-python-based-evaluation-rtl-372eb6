# bitpack: an evaluation core for stochastic-computing circuits

Stochastic computing (SC) represents a number by the fraction of '1's in a
bitstream. A unipolar bitstream in which 30 % of the bits are '1' carries 0.3,
and multiplying two independent unipolar streams takes nothing more than an
AND gate. That makes SC circuits tiny. It also means they cannot be tried out on
their own: every input must first be turned into a bitstream by a *stochastic
number generator* (SNG), and every output must be counted back into a binary
number. Because the result is random, a test also has to be repeated with
different random seeds.

This core provides that environment in hardware. It puts SNGs in front of an SC
circuit (the *user circuit*) and counters behind it. A processor drives it
through two AXI ports, as on a Zynq-class FPGA SoC:

* The processor writes an **input array** to memory, with one `{value, seed}` pair
  of 32-bit words per SNG. It then programs the bitstream length `l`, the array
  addresses, and a start bit over AXI4-Lite.
* The core fetches the array over its AXI4 master. It loads every SNG and runs
  the user circuit for exactly `l` clocks. It then writes one 32-bit count per
  user-circuit output bit back to an **output array**.
* Software divides each count by `l` to get the output value.

The SystemVerilog follows the block structure of the published framework
"A Python-based evaluation framework for stochastic computing circuits on FPGA
SoC". That framework has an AXI-Lite interface, an AXI interface with FIFOs, and
a wrapper holding `sn_gen`, the user circuit and `count`. Its signal names
`ACLK`, `ARESETN` and `proc_en` are kept, and so are its two-bit encoding codes
and its example circuits. Where that description stops (the register map, the
number scaling, the LFSR polynomial, burst sizes, the phase sequencing), the
choices below are this design's own. Each is marked as such.

```
            AXI4-Lite (GP port)                       AXI4 (HP port)
                  |                                          |
        +---------v---------+   start, l, SRC, DST   +-------v-----------------+
        |    axil_ctrl      |----------------------->|       axi_master        |
        |  register file    |<-- done ---+           |  read FIFO   write FIFO |
        +-------------------+            |           +----|-------------^------+
                                         |                | words       | words
                                 +-------+----------------v-------------+------+
                                 |  user_wrapper  (LOAD -> RUN -> UNLOAD)      |
                                 |  sn_gen x NUM_SRC -> user circuit ->        |
                                 |                      sn_count x NUM_DST     |
                                 +---------------------------------------------+
```

## Programming model

All registers are 32 bits wide, at byte offsets on the AXI4-Lite slave:

| offset | name    | access | meaning |
|--------|---------|--------|---------|
| 0x00   | CTRL    | W: bit 0 = start. R: bit 0 busy, bit 1 done | A start written while busy is ignored. `done` stays set until the next start. |
| 0x04   | CYCLE   | R/W    | bitstream length `l` (clocks of the user circuit) |
| 0x08   | SRC     | R/W    | byte address of the input array (4-byte aligned) |
| 0x0C   | DST     | R/W    | byte address of the output array (4-byte aligned) |
| 0x10   | NUM_SRC | R      | number of SNGs = number of user-circuit input bits |
| 0x14   | NUM_DST | R      | number of counters = number of user-circuit output bits |

Memory layout:

* Input array: `2*NUM_SRC` words. Word `2k` is the value of SNG `k` and word
  `2k+1` is its LFSR seed.
* Output array: `NUM_DST` words, output bit 0 first.

Input and output bits are numbered across the user circuit's ports in
declaration order. For `bit_addmul` the SNGs are `A[0..3]` then `SEL[0..1]`, and
the counters are `PROD` then `AVG`.

A run is:

1. Write SRC, DST and CYCLE.
2. Write the input array. Use fresh random seeds for each repetition.
3. Write 1 to CTRL.
4. Poll CTRL until bit 1 is set.
5. Read the output array.

## Number encodings

The hardest part to get right is what a 32-bit word means to an SNG and to a
counter. Every SNG and every counter has a two-bit configuration (`sn_cfg_e` in
`bitpack_pkg`). The codes are those of the original framework; the scaling is
this design's choice:

| code | encoding | input word `din` | SNG output | counter step | result |
|------|----------|------------------|------------|--------------|--------|
| 00 | unipolar, p in [0,1) | unsigned, `p = din / 2^32` | `sn[0] = lfsr < din` | +1 per '1' | `p = count / l` |
| 01 | bipolar, v in [-1,1) | signed, `v = din / 2^31` | `sn[0] = lfsr < din ^ 0x8000_0000`, so P('1') = (v+1)/2 | +1 per '1', -1 per '0' | `v = count / l` |
| 10 | two-line | signed, `v = din / 2^31` | one comparison `lfsr < 2|v|*2^31` drives `sn[0]` (the `_p` line) if v >= 0 or `sn[1]` (the `_m` line) if v < 0; the other line stays 0 | +1 per '1' on `_p`, -1 per '1' on `_m` | `v = count / l` |
| 11 | reserved for a user encoding | treated as unipolar | | | |

Choosing ±1 steps for the bipolar and two-line counters means the counter value
divided by `l` is the result in every encoding. The counter is a signed 32-bit
number in two's complement.

The LFSR is 32 bits wide, Fibonacci form, with polynomial `x^32 + x^22 + x^2 + x + 1`:
`s' = {s[30:0], s[31]^s[21]^s[1]^s[0]}`. A maximal 32-bit LFSR never produces 0,
so P('1') is `(din-1)/(2^32-1)` rather than exactly `din/2^32`. The difference
is far below SC's own noise. A seed of 0 would lock the LFSR, so it is replaced
by 1.

## Stochastic number generator and counter (`sn_gen`, `sn_count`)

`sn_gen` is a value register, a 32-bit LFSR and a comparator. Its output is
combinational from the two registers. While `en` (`proc_en`) is high, the LFSR
steps every clock. The bit produced in the k-th enabled clock therefore comes
from the k-th LFSR state, starting with the seed itself.

`sn_count` adds the current bit to its register in every enabled clock. For
unloading, the counters of a wrapper form a chain towards counter 0: with
`shift` high, each counter takes the value of the next one. The chain acts as a
shift register whose head is read into the write FIFO. The priority in one clock
is clear, then shift, then count.

## The wrapper and its timing (`user_wrapper`)

The wrapper instantiates `NUM_SRC` SNGs, the user circuit and `NUM_DST`
counters, and runs one phase at a time:

* **LOAD**: pops `2*NUM_SRC` words from the read FIFO and routes word `i` to SNG
  `i/2` (the value if `i` is even, the seed if odd). It waits while the FIFO is
  empty. All counters are cleared at start.
* **RUN**: `proc_en` is high for exactly `l` clocks, with `l = 0` allowed.
* **UNLOAD**: pushes `NUM_DST` words into the write FIFO, one per clock, while
  shifting the counter chain. It waits while the FIFO is full.

Without waits, a run takes `1 + 2*NUM_SRC + l + 1 + NUM_DST` clocks from `start`
to the wrapper's `done`. For the default circuit that is `l + 16`. The memory
write that follows adds the AXI latency. The testbenches check both the exact
`l` enabled clocks and this formula.

The user circuit is chosen by the `USER` parameter. The original flow instead
generates a new wrapper for each circuit from its port list. To add a circuit:

1. Extend `user_circuit_e`, `num_src` and `num_dst` in `bitpack_pkg`.
2. Add a branch to the `g_user` generate block in `user_wrapper.sv`.
3. Add a case to `user_eval` in `tb/tb_sc_ref_pkg.sv` so the testbenches can
   check it.

The wrapper also has the per-port `SRC_CFG`/`DST_CFG` arrays. The three built-in
circuits have single-line ports only. So an SNG set to two-line drives only its
`_p` line into them, and every counter's `_m` input is tied low. A circuit with
real `_p`/`_m` port pairs needs both lines wired in its branch.

## Moving the arrays (`axi_master`, `sync_fifo`)

`axi_master` holds a read FIFO and a write FIFO, 512 words each by default. It
starts a read engine and a write engine together on `start`:

* Bursts are INCR, with 32-bit beats, at most `MAX_BURST` beats long (16, so
  they are also legal on AXI3 ports), and never cross a 4 KB boundary.
* Each engine keeps one burst outstanding.
* `RREADY` drops while the read FIFO is full.
* The write address of a burst may be issued before its data exists. `WVALID`
  then waits for the wrapper to fill the write FIFO.
* `wr_done` pulses after the last write response.
* Response codes are not checked.

The top sets `CTRL.done` when both the wrapper and the write engine have
finished. Arrays larger than the FIFOs simply stream through them. With 610
SNGs, the 1,220-word input array passes through the 513-word read FIFO.

`sync_fifo` is written as an array with a registered read port, so it maps onto
block RAM. A prefetch register in front of that port gives first-word
fall-through. The capacity is `DEPTH + 1` words, and a word pushed is visible at
the output two clocks later.

## User circuits

* `bit_addmul` is the framework's example, with ports `CLK, A[3:0], SEL[1:0], PROD, AVG`.
  * `PROD` is the AND of the four `A` bits (the product).
  * `AVG` is a two-level 2:1 multiplexer tree. `SEL[0]` picks within the pairs
    A0/A1 and A2/A3, and `SEL[1]` picks between the pairs. With both selects
    fed 0.5, `AVG` is the arithmetic mean.
  * Which input a '1' on a select picks is this design's choice; the mean is
    the same either way.
  * `CLK` is present but unused, because the circuit is combinational.
* `sc_prod #(N)` is an N-input AND (product of N values).
* `sc_eprod #(N)` is N/2 two-input ANDs (element-wise product of two N/2-vectors).

`sc_prod` and `sc_eprod` are the two circuits used to measure how the core
grows with the number of ports.

## Size

Each SNG holds 64 flip-flops: the 32-bit value register and the 32-bit LFSR.
Each counter holds 32. The wrapper therefore grows by 64 flip-flops per
user-circuit input bit and 32 per output bit. On top of that its sequencer needs
about 73: the latched length, the run counter, the phase and the word indices.
This growth is the same as that measured for the original framework on a Zynq
XC7Z020, which was 64 flip-flops per input and 32 per output. With its default
bit_addmul circuit, the whole core synthesises to about 900 flip-flop bits. Each
FIFO array adds 512 x 32 bits, which is half of a 36-kbit block RAM.

## Parameters of `bitpack_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `USER` | `UC_ADDMUL` | user circuit: `UC_ADDMUL`, `UC_PROD`, `UC_EPROD` |
| `N` | 4 | port count for `UC_PROD` / `UC_EPROD` |
| `FIFO_DEPTH` | 512 | words per FIFO array (plus one prefetch word) |
| `MAX_BURST` | 16 | beats per AXI burst |
| `NUM_SRC`, `NUM_DST` | derived from `USER`, `N` | SNG and counter counts; leave at their defaults |
| `SRC_CFG`, `DST_CFG` | all unipolar | per-SNG / per-counter encoding |

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The bit-level
reference model in `tb/tb_sc_ref_pkg.sv` is written independently of the RTL. It
covers the LFSR recurrence, the three encodings and the three user circuits, so
the end-to-end tests compare every output word exactly, not statistically.

Testbenches of the whole core:

* `tb_bitpack_top` is the default core, running the framework's example.
  * Inputs are A = {0.9, 0.8, 0.7, 0.6} and SEL = {0.5, 0.5}, with `l = 10,000`.
  * It makes five runs, each with fresh seeds. The input array straddles a 4 KB
    boundary.
  * It checks exact counts, exactly 10,000 enabled clocks, and the estimates
    against the exact product 0.3024 and mean 0.75. One run printed products
    0.2939/0.2936/0.3007/0.3094/0.2951 and means 0.7436/0.7509/0.7458/0.7472/0.7475.
* `tb_bitpack_top_mech` uses `sc_eprod` (N = 8) with mixed encodings, 2-word
  FIFOs and 4-beat bursts.
  * It makes twelve random runs, including `l = 0`.
  * It requires that each of these happens at least once: a 4 KB split, a
    multi-burst read, the wrapper waiting on an empty read FIFO and on a full
    write FIFO, a write beat waiting for data, a start ignored while busy, and
    all three encodings.
* `tb_bitpack_top_eval` runs eleven cores side by side:
  * `sc_prod` and `sc_eprod` at n = 4, 8, 16, 24 and 32;
  * `sc_eprod` at n = 610, about the largest circuit estimated to fit an
    XC7Z020 device.

The unit tests (`tb_sn_gen`, `tb_sn_count`, `tb_sync_fifo`, `tb_axil_ctrl`,
`tb_axi_master`, `tb_user_wrapper`, `tb_bit_addmul`, `tb_sc_prod`, `tb_sc_eprod`)
check their block against the reference model or a queue model. They cover
random traffic and the corner cases listed in each file's header.

`tb_axi_mem` and `tb_axil_master` are behavioural stand-ins for the processor's
memory and bus master. The memory inserts random wait states and flags burst-rule
violations. `tb_core_env` bundles one core with both stand-ins.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bitpack_pkg.sv tb/tb_sc_ref_pkg.sv tb/tb_bitpack_top.sv \
    --top-module tb_bitpack_top
./obj_dir/Vtb_bitpack_top
```

Replace `tb_bitpack_top` with any other testbench name. All of them finish in
well under a second of simulation time, apart from compiling
`tb_bitpack_top_eval`, which takes about a minute.

## Scope and trust

What is here:

* The synthesizable core: control slave, AXI master with FIFOs, wrapper, SNG,
  counter.
* The three user circuits named above.

What is not here:

* The processor system.
* The AXI interconnects and the reset generator, which the vendor tools create
  around the core.
* The software side: the generator that writes a wrapper and a Python driver
  class from a user circuit's port list.
* The benchmark least-squares circuit used as a further example. It is
  third-party and its logic is not reproduced.

Its closest stand-in here is the `USER` parameter together with the
`NUM_SRC`/`NUM_DST`/`*_CFG` parameters.

The RTL passes Verilator lint and elaborates in a second SystemVerilog front
end. It has been simulated only; it has not been run on an FPGA or checked for
timing closure.

The remaining lint warnings are deliberate:

* unused AXI response inputs;
* the unused low address bits of the control slave;
* the unused `CLK` of `bit_addmul`;
* the SNGs' negative lines, which the single-line built-in circuits do not use.
