# Generic-LFSR memory scrambler

A DDR memory controller can scramble the data it writes to DRAM by XORing each
beat with a keystream from an LFSR. The LFSR's start state is formed from a
random per-boot seed and the transaction address. Doing so costs a few
flip-flops and no clock cycles. With a *fixed* feedback polynomial, though,
the XOR of two boots' keystreams for the same address is the XOR of two runs
of one linear recurrence. That difference is the same, or nearly the same,
for every address. An attacker who dumps the DRAM after two cold boots can
therefore find repeating chunks in the difference of the dumps ("stencil
attack"), rebuild the keystream and unscramble memory.

This design makes the LFSR's *structure* depend on the address and the
seed. For each transaction it forms

    P = Address XOR Seed

P is used twice. It is the LFSR's start state. It also switches the LFSR's
inner feedback taps on and off. The two end taps are always present. The
keystream of every address therefore comes from a different recurrence, and
the cross-boot difference no longer repeats from address to address. The data
path is still one XOR per bit, with no added latency.

## Blocks

| module | role |
|---|---|
| `rtl/glfsr_pkg.sv` | default sizes: 64-bit LFSR/data bus, 32-bit address, burst of 8, 64 LFSR steps per beat |
| `rtl/generic_lfsr.sv` | the tap-configurable LFSR |
| `rtl/lfsr_scrambler.sv` | one channel: forms P, loads the LFSR per burst, XORs the beats |
| `rtl/seed_reg.sv` | captures the boot-time seed from the RNG and holds it for the session |
| `rtl/mem_scrambler_top.sv` | seed register + write-path scrambler + read-path de-scrambler |

Three parts are not included, and their signals are ports of the top:

- the random number generator, an entropy source;
- the rest of the memory controller (command scheduling and DRAM timing);
- the DRAM device.

`tb/dram_model.sv` is a behavioural burst memory used only by the top-level
testbench.

## The generic LFSR

The state bits are `x[N-1]` (where feedback enters) down to `x[0]`. One step
shifts the register right and writes the feedback bit into `x[N-1]`:

    F = x[0] ^ (a[1] & x[1]) ^ (a[2] & x[2]) ^ ... ^ (a[N-2] & x[N-2]) ^ x[N-1]
    a[i] = P[i-1]          (i = 1 .. N-2; P[N-2] and P[N-1] select no tap)

Each inner tap costs one AND gate in hardware. On `load`, the module latches
`P[N-3:0]` as the tap vector for the rest of the burst. It also sets the
state to P advanced by `STEPS` steps.

The bit order `a[i] = P[i-1]` puts `P[0]` next to `x[0]`. This order
reproduces the scheme's published 6-bit example, as the table below
shows. A mirrored order (`a[i] = P[N-2-i]`) is also plausible, but it does
not reproduce the example. Note that only the order of P's bits changes
between the two; the security argument is the same either way.

6-bit example, states after each step, `STEPS = 1` (checked in `tb_generic_lfsr`):

| seed | address | P | first eight states |
|---|---|---|---|
| 110010 | 1000 | 111010 | 011101 101110 010111 101011 010101 101010 110101 011010 |
| 001011 | 1000 | 000011 | 000001 100000 110000 111000 111100 011110 001111 100111 |
| 110010 | 1010 | 111000 | 011100 101110 110111 111011 111101 111110 011111 001111 |
| 001011 | 1010 | 000001 | 100000 110000 111000 111100 111110 011111 001111 000111 |

The x[0] tap is always present, which makes the step function invertible. Every
state therefore lies on a cycle. Most tap vectors are not primitive
polynomials, so cycles are shorter than 2^N-1. A burst, however, uses only
`BURST_LEN*STEPS` steps (512 at the defaults), far below typical cycle lengths.
`tb_cycle_length` measured about 16,000 to 18,000 steps on average for N = 16
and about 260,000 to 320,000 for N = 20, over random tap vectors.

If P is all zero (the address equals the low seed bits), the state is zero and
stays zero, so that burst is stored unscrambled. The scheme allows this case,
and the design keeps it. With a 64-bit random seed and 64-byte-aligned
addresses it happens with probability about 2^-64 per line.

## From LFSR states to keystream words: the `STEPS` parameter

This is the one setting that decides whether the scheme actually defeats the
stencil attack, so it deserves care.

Each data beat (64 bits) is XORed with one keystream word, the LFSR state at
that moment. Between two beats the LFSR advances `STEPS` steps. The
`lfsr_steps` function unrolls those steps into a single clock cycle. Word `j`
of a burst is the state after `(j+1)*STEPS` steps from P.

- **`STEPS = 1`** makes the words consecutive LFSR states, as in the 6-bit
  example above. This is cheap: one step of feedback logic per LFSR. But a state
  reached after only `j` steps is mostly P shifted right by `j`. So for the
  first beats of every burst, the cross-boot difference is mostly
  `seed1 XOR seed2`, whatever the address. With 64-bit words and 8 beats, the
  cross-boot difference of two different addresses differs in only about 4%
  of its bits. That is exactly the repetition the attack looks for.
- **`STEPS = N` (default, 64)** makes the keystream the LFSR's serial
  one-bit-per-step output, 8K bits for K bytes. The first N bits, which are P
  itself, are shifted out before the first word is used. Every word is then a
  nonlinear function of address and seed. The cross-boot difference of two
  addresses differs in about 50% of its bits. `tb_mem_scrambler_top`
  checks all 2016 pairs of 64 lines and measures a mean of 0.50 and a minimum
  of about 0.43. With `STEPS = 8` the mean is about 0.28.

The price of the default is area. Each LFSR contains two 64-step unrolled
feedback networks: 128 AND/XOR-reduction trees per channel, plus the
multiplexers that pick between them.

## Data path and timing

`lfsr_scrambler` has this interface:

- `req_valid`/`req_addr` start a burst. The request must come at least one
  cycle before the first beat. In a DDR controller the CAS latency or CAS
  write latency separates the command from its data, so this is free.
- Each `in_valid` beat leaves on `out_data = in_data ^ key` **in the same
  cycle**: the channel adds no clock cycle to the data path.
- The LFSR advances after each beat, with any number of idle cycles between
  beats.
- `armed` is high from the request until `BURST_LEN` beats have passed. An
  assertion flags a beat outside a burst.
- A new request may arrive in the cycle of the last beat.

The same module serves as the scrambler and the de-scrambler, because
`(T ^ K) ^ K = T`. The read channel regenerates K from the same address and
seed.

`seed_reg` captures the first valid RNG word after reset and ignores all later
words. The read path needs the write path's seed for the whole session, so the
seed must not change mid-session. Reset (a new boot) clears the seed. Data left
in DRAM by the previous boot then decodes to noise, which defeats replay of
old ciphertext and warm-boot reading. `mem_scrambler_top` asserts that no
request arrives before `seed_ready`.

Top-level ports:

- RNG: `rng_valid`, `rng_data`, `seed_ready`
- write path: `wr_req_valid`, `wr_req_addr`, `wr_valid`, `wr_data` → `dram_wr_valid`, `dram_wr_data`, `wr_armed`
- read path: `rd_req_valid`, `rd_req_addr`, `dram_rd_valid`, `dram_rd_data` → `rd_valid`, `rd_data`, `rd_armed`

All resets are synchronous and active-low.

## Sizes

The default parameters are set in `glfsr_pkg`; every module also takes them
as parameters.

| parameter | default | notes |
|---|---|---|
| `N` (LFSR = data = seed width) | 64 | DDR3 DIMM data width; one keystream word per beat; an 8-byte seed |
| `ADDR_W` | 32 | zero-extended to N bits before the XOR with the seed |
| `BURST_LEN` | 8 | DDR3/DDR4 BL8; 8 × 64 bits = 512 keystream bits = one 64-byte line. Use 16 for DDR5 |
| `STEPS` | 64 | see above; 1 reproduces the small worked example |

At the defaults the top has 325 flip-flops:

- per channel: 64 state bits + 62 tap bits + a 4-bit beat counter, two channels;
- 64 seed bits + 1 ready bit.

A published FPGA implementation of this scheme reports 256 registers and
about 250 LUTs. That figure is consistent with fewer stored bits and one step
per word. It was not reproduced here, and this RTL is larger in logic
because of the unrolled steps.

## Where this RTL goes beyond or departs from the scheme as published

- **Bit order of P.** The taps use `a[i] = P[i-1]`, chosen because it
  matches the worked 6-bit example. One textual example reads P in the
  mirrored order.
- **Steps per beat.** The default is 64, the serial keystream with the
  initial load discarded. The short worked example uses 1. The choice is
  explained above.
- **Stored taps.** Taps are latched at load, so the address inputs may change
  during the burst.
- **Design choices.** These are this design's own, because the scheme does
  not specify them:
  - the request/beat handshake, the burst counter and `armed`;
  - seed capture on the first RNG word;
  - synchronous reset;
  - the bus, address and seed widths.
- **Not covered.** Two things are outside this RTL: how the controller
  tracks the address of returning read data, and DRAM command timing.

## Testbenches

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog.

- `tb_generic_lfsr`:
  - the four 6-bit example sequences above;
  - random 9-bit (1 step) and 16-bit (16 steps) configurations against a
    bit-level reference, with idle cycles.
- `tb_lfsr_scrambler`: 400 bursts at the defaults and with `STEPS = 1`.
  - random seeds, addresses and gaps;
  - every beat is checked against the reference in its own cycle (zero
    latency);
  - `armed` is checked to open on a request and close after the last beat;
  - in every third burst the next request shares the last beat's cycle.
- `tb_seed_reg`: five boots; capture of the first word, later words ignored,
  cleared on reset.
- `tb_mem_scrambler_top`: the whole unit at its default parameters, with the
  DRAM model.
  - boot 1: write 64 lines, check the DRAM contents and read them back;
  - reboot: replayed old lines must not decode, new writes must differ from
    the old snapshot, and a second read-back;
  - the cross-boot differential test above.
  - It counts writes, reads, reboots, ignored RNG words, corrupted replays
    and differential pairs, and fails if any count is zero.
- `tb_image_scramble`: a 64×64 8-bit synthetic image is scrambled and
  de-scrambled line by line. The test checks:
  - every pixel comes back unchanged;
  - |Pearson r| < 0.08 between plain and scrambled bytes;
  - MSE > 5000;
  - the chi-square of the scrambled histogram is below 400;
  - the image's 505 repeated 8-byte beats leave no repeat after scrambling.
- `tb_cycle_length`: the cycle lengths of the generic LFSR for random tap
  vectors, N = 16 and 20.

Run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/glfsr_pkg.sv tb/tb_mem_scrambler_top.sv --top-module tb_mem_scrambler_top
    ./obj_dir/Vtb_mem_scrambler_top

Replace the testbench name to run another. All of them finish in seconds;
`tb_cycle_length` is the longest, at a few seconds. To try the cheap variant,
set `STEPS` to 1 in `glfsr_pkg`. The differential test in
`tb_mem_scrambler_top` then fails, which demonstrates the weakness described
above.
