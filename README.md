# A single-chip pseudo-random IC tester

Conventional automatic test equipment applies stored, deterministic test
patterns to a chip and compares every response bit with a stored expected
value. That needs large pattern memories and an expensive machine. This design
takes the other route. It generates the test patterns on chip with a linear
feedback shift register (LFSR). It compresses the chip's responses into one
32-bit signature per test set. At the end of each set it compares that
signature with a reference. The only data a test needs is this, per test set:

- a 32-bit seed,
- a test length,
- a 32-bit reference signature.

Up to four test sets are allowed. A PC loads these values over a serial line,
starts the test and reads back the result.

The RTL implements the tester's digital core. The blocks are:

- a compact UART,
- a controller,
- an information register,
- three small RAMs,
- the pattern generator,
- a buffer register that sits between the generator and the circuit under test,
- the signature analyzer.

The tester can drive a circuit under test (CUT) that has:

- up to 32 primary inputs,
- up to 32 primary outputs,
- one scan path of up to 128 cells.

A test set can be up to 2^24 vectors long (16,777,216, about 1.7x10^7).

## Block map

```
            +-----------+     +------------------------------------------+
  PC <----> | micro_uart| <-> | controller                               |
  rxd/txd   +-----------+     |  host_cmd_fsm   (load / read back)       |
                              |  test_seq_fsm   (seed, shift, capture,   |
  info_reg  <---------------> |                  count, compare)         |
  RAM_TL  RAM_SD  RAM_SG <--> |                                          |
                              +--+---------+----------+---------+--------+
                                 |         |          |         | scan_en, cnm
                                 v         v          v         v
                           +---------+  +--------+  +-----+   +--------------+
                           | lfsr_pg |->| buffer |->| SA  |   |     CUT      |
                           |  (PG)   |  |  reg   |r0|     |<--| scan-out     |
                           +----+----+  +---+----+  +-----+ r1|              |
                                |           | cut_pi   ^      |              |
                                |           +--------------->| inputs       |
                                |           <----------------| outputs      |
                                +--------------------------->| scan-in      |
                                                             +--------------+
```

The data path is serial and moves one bit per clock. The LFSR's serial output
goes to two places: the buffer register (BR) and the CUT's scan-in. The BR
drives the CUT's primary inputs in parallel. The BR captures the CUT's primary
outputs in parallel and shifts them out into signature analyzer (SA) input
`r0`. The CUT's scan-out goes into SA input `r1`.

## How one test vector is applied

This is the core of the design. The information register (IR) holds three
counts of the CUT:

- `pi`: the number of primary inputs,
- `po`: the number of primary outputs,
- `sp`: the length of the scan path, in cells.

From these counts the IR derives three shift lengths:

| length | value            | what is enabled for that many clocks            |
|--------|------------------|-------------------------------------------------|
| `pg`   | max(pi, sp)      | the LFSR, so enough new bits exist for BR and scan path |
| `br`   | max(pi, po)      | the buffer register, so it fills the inputs and empties the outputs |
| `sa`   | max(pi, po, sp)  | the signature analyzer; also the length of the whole shift phase |

Each test vector takes `sa + 1` clocks: a SHIFT phase followed by one CAPTURE
clock.

- **SHIFT** lasts `L = max(pi, po, sp)` clocks. In clock `k` of the phase:
  - The LFSR steps if `k < max(pi, sp)`.
  - The BR shifts if `k < max(pi, po)`.
  - The scan path shifts (`cut_scan_en`) if `k < sp`.
  - The SA compresses `r0` and `r1`. `r0` is the BR's serial output, gated by
    the BR enable. `r1` is the scan-out, gated by the scan enable.

  So in one pass, the new pattern moves into the BR and the scan path while
  the response to the previous vector moves out into the SA. In the first
  vector of a set there is no response yet, so the SA stays idle.
- **CAPTURE** lasts one clock, with `cut_cnm = 1` (the CUT runs in normal mode
  for this clock). The BR captures the CUT outputs. The scan cells capture
  their functional next state. The test counter increments.

The BR is a 32-bit shift register of variable length. While it shifts, stage
`len-1` (with `len = max(pi, po)`) takes the new bit. Every lower stage takes
its upper neighbour, and stage 0 is the serial output. After `len` shifts,
`cut_pi[pi-1:0]` holds fresh pattern bits. The same shifts have sent the
captured outputs `po-1..0` to the SA, least significant bit first. On capture,
stages at or above `po` are cleared. This stops unconnected output pins from
reaching the signature.

When the counter reaches the set's test length, one more SHIFT phase runs.
It unloads the last response. Then a COMPARE clock checks the SA against the
reference signature. One test set therefore takes

    2 + TL*(L + 1) + L + 1   clocks

The 2 clocks are the RAM read and the seed load. `TL` is the test length. A
test length of 0 stands for 2^24 vectors.

Example: 32 inputs, 32 outputs, no scan path and 10 vectors give
2 + 10*33 + 32 + 1 = 365 clocks per set.

## Pattern generator and signature analyzer

Both are 32-bit LFSRs with the primitive feedback polynomial
`1 + X + X^27 + X^28 + X^32`.

- **Pattern generator (`lfsr_pg`)**: Fibonacci form. The feedback is the XOR
  of bits 31, 27, 26 and 0. It enters bit 0, and the register shifts towards
  the MSB. The serial output is bit 31. `set_seed` loads a seed; `clr`
  clears the state to zero. An all-zero seed locks the LFSR at zero, so use
  non-zero seeds.
- **Signature analyzer (`sig_analyzer`)**: the same register with two serial
  inputs. Its state follows `S(t+1) = T.S(t) + R(t)`. `T` is the LFSR's
  transition matrix. `R(t)` has `r0` in bit 0 and `r1` in bit 1. Because the
  two streams enter different stages, errors in both streams in the same clock
  cannot cancel each other. Any single-bit error in either stream changes
  the signature. The probability that a random multi-bit error goes undetected
  is about 2^-32.

The pattern generator is cleared at the start of each set and then seeded. The
BR and the SA are also cleared at the start of each set. So each set's
signature depends only on that set's seed, test length and the CUT.

## Test sets, signatures and the two modes

The controller walks through `num_sets` test sets (1 to 4). For each set it
reads the test length from `RAM_TL`, the seed from `RAM_SD` and the reference
signature from `RAM_SG`, all at the set's index.

- **Compare mode** (`sig_gen = 0`): at the end of the set, `set_fail[s]` is set
  if the signature differs from the reference.
- **Signature-generation mode** (`sig_gen = 1`): the SA result is written into
  `RAM_SG[s]` and no comparison is made. Run this once on a known-good device,
  then read the signatures back with `RD_SG`. This gives references without
  simulating the CUT.

`set_end` pulses once at the end of each set (this is e_set). After the last
set, `test_done` (e_test) goes high and stays high until the next start. The
tester then returns to idle, ready for the next test.

Whether a fault is caught depends on the seed and the test length, as with any
pseudo-random test. For example, in the end-to-end test a stuck-at-0 on output
bit 5 of a multiplier is missed by 10 vectors from seed 10. It is caught from
seeds 20, 30 and 40. Choosing good seeds is how a pseudo-random tester reaches
high fault coverage with short tests.

## Host protocol

The host sends 8N1 bytes at `CLKS_PER_BIT` clocks per bit (default 434, which
is 115200 baud from 50 MHz). Each message is a command byte followed by its
arguments. Multi-byte values are sent most significant byte first.

| byte | command      | arguments                                  | reply |
|------|--------------|--------------------------------------------|-------|
| 0x01 | WR_IR        | pi, po, sp, {sig_gen, 0000, num_sets[2:0]} | -     |
| 0x02 | WR_TL        | set, test length (3 bytes)                 | -     |
| 0x03 | WR_SD        | set, seed (4 bytes)                        | -     |
| 0x04 | WR_SG        | set, reference signature (4 bytes)         | -     |
| 0x05 | TEST_ON      | -                                          | -     |
| 0x06 | RD_STATUS    | -                                          | status byte |
| 0x07 | RD_SG        | set                                        | RAM_SG word (4 bytes) |

The status byte, from bit 7 down to bit 0:

| bit(s) | field    | meaning |
|--------|----------|---------|
| 7      | busy     | a test is running |
| 6      | done     | the last test has finished |
| 5      | any_fail | some set failed |
| 4      | sig_gen  | the current mode |
| 3..0   | set_fail | one mismatch flag per set |

While a test runs:

- The RAMs belong to the test sequencer, so WR_TL, WR_SD, WR_SG, WR_IR and
  TEST_ON are ignored.
- RD_STATUS is answered at once.
- RD_SG waits until the test ends.

Unknown command bytes are dropped. Out-of-range IR values are clamped:

- pi and po at most 32,
- sp at most 128,
- num_sets between 1 and 4.

## Connecting a CUT

| port           | dir | meaning |
|----------------|-----|---------|
| `cut_pi[31:0]` | out | primary inputs; only bits `pi-1..0` carry pattern bits |
| `cut_po[31:0]` | in  | primary outputs; sampled when `cut_cnm` is high; bits at or above `po` are ignored |
| `cut_scan_en`  | out | shift the scan path by one cell this clock |
| `cut_scan_in`  | out | scan-in (LFSR serial output) |
| `cut_scan_out` | in  | last cell of the scan path |
| `cut_cnm`      | out | one clock of normal mode: the scan cells capture |

The CUT is clocked by the tester's `clk`. The CUT inputs change during the
shift phase. A combinational CUT is therefore only observed in the capture
clock. A sequential CUT must only update its scan cells when `cut_scan_en`
or `cut_cnm` is high.

A CUT with more than 32 inputs or outputs cannot be connected directly. The
status outputs `test_busy`, `test_done`, `set_end` and `set_fail[3:0]` are
meant for LEDs on a test board. The same structure can also check board
interconnects: drive nets from `cut_pi` and read them back on `cut_po`.

## Files

| file | content |
|------|---------|
| `rtl/ict_pkg.sv` | limits, IR and shift-length structs, command codes, status byte |
| `rtl/ic_tester_top.sv` | top level |
| `rtl/micro_uart.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial link |
| `rtl/controller.sv`, `rtl/host_cmd_fsm.sv`, `rtl/test_seq_fsm.sv` | controller: host command decoder, test sequencer, RAM port sharing |
| `rtl/info_reg.sv` | information register and shift lengths |
| `rtl/tester_ram.sv` | RAM used three times (24-bit test lengths, 32-bit seeds and signatures, four words each) |
| `rtl/lfsr_pg.sv`, `rtl/buffer_reg.sv`, `rtl/sig_analyzer.sv` | PG, BR, SA |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end one |
| `tb/cut_pkg.sv`, `tb/cut_model.sv` | behavioural CUT: a 16x16 multiplier XORed with a 128-cell scan path, with switchable faults |

The top has one parameter, `CLKS_PER_BIT`. The limits in `ict_pkg` are the
tester's specification:

- 32 pins,
- 128 scan cells,
- 4 sets,
- 24-bit test length.

The LFSR taps need a width of at least 28.

## Where this design makes its own choices

The original tester fixes the following:

- the block structure,
- the 32-bit LFSR and its polynomial,
- the 32-bit BR and SA,
- the SA state equation with two inputs,
- the three RAMs and the information register,
- the step-by-step test procedure, including the three max() enable lengths
  and the `cnm` normal-mode step,
- the specification limits.

The following are this design's own choices:

- The serial, one-bit-per-clock organisation of the data path. The LFSR feeds
  both the BR and the scan-in.
- Which SA stages take the two inputs.
- Clearing BR and SA at every set. Delaying the response shift-out into the
  next vector's shift phase, with a final unload phase.
- The signature-generation mode's behaviour. The original only shows a mode
  switch in its host program.
- The whole host byte protocol and the status byte.
- The UART frame format and baud rate.
- IR clamping and reset values.
- Ignoring host writes during a test.
- The single-port synchronous RAM. The original used FPGA vendor RAM blocks.

The RTL also leaves some things out:

- There is only one scan path. How several scan paths would be fed is not
  described.
- No gate-level fault simulation is included. Fault coverage figures for
  benchmark circuits cannot be reproduced from RTL simulation.

## Verification

Every block has a self-checking testbench. Each one compares against a model
written independently of the RTL:

- **`tb_lfsr_pg`**: checks the state against the bit recurrence that the
  polynomial defines.
- **`tb_buffer_reg`**: checks against a bit-array model.
- **`tb_sig_analyzer`**: checks against the matrix form `T.S + R` over GF(2).
  It also checks that single-bit errors are always detected.
- **`tb_info_reg`**: checks the maxima and the clamping.
- **`tb_tester_ram`**: checks against an array, including read-before-write.
- **`tb_micro_uart`**: tests the receiver at ±2% baud error and with a framing
  error. It checks the transmitter's frames bit by bit.
- **`tb_controller`**: drives byte-level commands. It counts every enable per
  vector and per set, checks the cycle formula above, and covers the
  pass/fail flags, signature write-back and read-back, and writes ignored
  during a test.
- **`tb_ic_tester_top`**: end to end, at the default parameters, through the
  real serial line. It uses a behavioural CUT. It replays the whole procedure
  in software to predict every signature. It covers:
  - the host program's example configuration (32/32 pins, no scan, four sets
    of 10 vectors, seeds 10/20/30/40) in generation mode and in compare mode,
  - an output stuck-at fault,
  - a scan configuration (20 in, 16 out, 40 cells) with and without a
    scan-cell fault,
  - a 128-vector run of a 16x16 multiplier (the size of the ISCAS85 C6288
    benchmark),
  - commands issued during a test,
  - eight random configurations: pin counts, scan lengths up to 128, one to
    four sets, random test lengths and seeds.

  It counts each mechanism and fails if one never happens. The mechanisms are:
  seed load, LFSR shift, BR shift, scan shift, capture, SA compression, passed
  and failed compare, signature write-back, end of set, end of test, status
  read, and a write ignored while busy.

Run one testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/ict_pkg.sv tb/cut_pkg.sv \
    tb/tb_ic_tester_top.sv --top-module tb_ic_tester_top
./obj_dir/Vtb_ic_tester_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The
end-to-end run takes about two seconds. Signals that nothing initialises start
at random values in a two-state simulator, so every register that is read is
reset.

## Fit of benchmark circuits

The pin counts below are those of the ISCAS85 benchmarks. The vector counts
are published pseudo-random test lengths for these circuits.

| circuit | inputs/outputs | vectors | fits 32/32 pins, 2^24 vectors |
|---------|----------------|---------|-------------------------------|
| C432    | 36/7           | 288     | no (inputs) |
| C499    | 41/32          | 928     | no (inputs) |
| C880    | 60/26          | 384     | no (inputs) |
| C1355   | 41/32          | 1300    | no (inputs) |
| C1908   | 33/25          | 2208    | no (inputs) |
| C5315   | 178/123        | 1408    | no |
| C6288   | 32/32          | 128     | yes: 2 + 128*33 + 33 = 4259 clocks |

The vector counts are far below the 2^24 limit in every case. The pin count is
the limit.
