# Integrating an 8-point FFT core behind a DSP: interface unit and core RTL

A DSP and a hardware IP core must agree on more than wire widths. They must
also agree on the order in which data cross the link, and on when each word
may cross. This design shows such an integration for a small area-optimised
8-point complex FFT core.

- The core takes its eight input samples as two parallel groups of four words
  and gives its eight results back as two groups of four.
- The DSP moves one 16-bit word at a time over a single point-to-point link.

An *interface unit* sits between them. It holds four 16-bit registers, a
1-to-4 demultiplexer and a 4-to-1 multiplexer, and an 11-state controller. It
turns the DSP's serial word stream into the core's group transfers and back,
so neither side has to change.

```
            serial, 16 bit                 4 x 16 bit, parallel
   DSP  <------------------>  interface  <--------------------->  FFT core
        call, w*, r*          unit         din*, dout*            (CU + MMU + PU)
                              demux 1->4
                              4 x 16-bit registers
                              mux 4->1
                              11-state FSM
```

## The transfer order both sides agree on

Each complex sample is one 16-bit word: the real part sits in bits 15:8 and
the imaginary part in bits 7:0. Both parts are signed 8-bit two's complement.

One frame on the DSP link is:

| step | direction   | words                    | core-side group  |
|------|-------------|--------------------------|------------------|
| 1    | DSP -> core | x0, x2, x4, x6           | S1, ports 0..3   |
| 2    | DSP -> core | x1, x3, x5, x7           | S2, ports 0..3   |
| 3    | core -> DSP | X0, X1, X2, X3           | S3, ports 0..3   |
| 4    | core -> DSP | X4, X5, X6, X7           | S4, ports 0..3   |

The DSP sends the even-indexed samples first. That is the order a
decimation-in-time FFT wants: the core can run two 4-point transforms in place
on its two halves. The results come back in natural order.

`X[k]` is the 8-point DFT `sum_n x[n] * exp(-j*2*pi*n*k/8)` divided by 8. See
"Numerics" below.

## Timeline of one frame

The DSP-side handshakes and the core-side handshakes work the same way. A
transfer happens on a rising clock edge when both of its signals are high.

| DSP side         | meaning                                              |
|------------------|------------------------------------------------------|
| `call`           | one-cycle pulse that starts a frame (the "IP call")  |
| `wvalid`/`wready`| one sample word from the DSP                         |
| `rvalid`/`rready`| one result word to the DSP; `rdata` is held until taken |

| core side              | meaning                                        |
|------------------------|------------------------------------------------|
| `din_valid`/`din_ready`| one input group into the core                  |
| `dout_valid`/`dout_ack`| one result group out of the core; held until acknowledged |

With a DSP that never stalls, a frame takes 33 clock cycles from the `call`
edge to the edge that hands over the last result word:

| cycles | controller state | what happens                                   |
|--------|------------------|------------------------------------------------|
| 1      | IDLE             | `call` seen                                    |
| 4      | RX0..RX3         | x0, x2, x4, x6 written into registers 0..3     |
| 1      | CALL             | S1 handed to the core                          |
| 4      | RX0..RX3         | x1, x3, x5, x7                                 |
| 1      | CALL             | S2 handed to the core; the core starts computing |
| 13     | WAIT             | 12 butterfly cycles, then S3 captured into the registers |
| 4      | TX0..TX3         | X0..X3 sent                                    |
| 1      | WAIT             | S4 captured (the core has held it)             |
| 4      | TX0..TX3         | X4..X7 sent                                    |

Each controller state that waits for a handshake stays put until it comes. A
stalling DSP or a busy core therefore only stretches the timeline. The order
never changes.

A new `call` is accepted in the cycle after the last result word.

## Interface unit (`interface_unit`, `iu_controller`, `iu_buffer`)

**The four registers.** The same four registers serve both directions. They
drive the core's four input ports. They are filled one word at a time through
the demultiplexer (the select is the RX state's index). After a result group
is captured, they are emptied one word at a time through the multiplexer
(the select is the TX state's index).

A group transfer between the registers and the core costs one clock. A DSP
word costs one clock.

**Eleven states, two halves.** There are eleven controller states: IDLE,
RX0-RX3, CALL, WAIT and TX0-TX3. Each frame has two input halves and two
output halves. A one-bit group flag tells them apart:

- After the first CALL the controller returns to RX0. After the second it
  goes to WAIT.
- After the first TX3 it returns to WAIT. After the second it goes to IDLE.

**Assertions.** `interface_unit` checks two rules:

- A result word offered to the DSP stays unchanged until it is taken.
- An input group offered to the core stays unchanged until it is accepted.

## FFT core (`fft_core`, `fft_cu`, `fft_mmu`, `fft_pu`)

The core is built for area. It has one butterfly and eight sample registers,
and computes the transform in place over twelve clock cycles.

- **`fft_mmu`**: eight 16-bit registers. It has three ways in or out:
  - a four-word group load into registers 0..3 (S1) or 4..7 (S2);
  - two read buses and two write buses to the butterfly;
  - a flat read-out of all eight registers.
- **`fft_pu`**: one radix-2 butterfly, purely combinational. It computes
  `a' = (a + W*b)/2` and `b' = (a - W*b)/2`, with `W = W8^k`.
- **`fft_cu`**: the control unit. Its states are LOAD_S1, LOAD_S2, BFLY,
  OUT_S3 and OUT_S4. In BFLY, a 4-bit step counter indexes a fixed table
  that gives both register addresses and the twiddle index. The MMU writes
  the result back to the same two addresses.

After S1 and S2 are loaded, registers 0..7 hold x0 x2 x4 x6 x1 x3 x5 x7. The
twelve butterflies are:

| step | registers | W8^k | produces                                    |
|------|-----------|------|---------------------------------------------|
| 0-3  | (0,2) (1,3) (4,6) (5,7) | k=0 | first stage of both 4-point DFTs   |
| 4, 6 | (0,1) (4,5) | k=0 | E0, E2 / O0, O2                            |
| 5, 7 | (2,3) (6,7) | k=2 | E1, E3 / O1, O3                            |
| 8    | (0,4)     | 0    | X0 -> r0, X4 -> r4                           |
| 9    | (2,6)     | 1    | X1 -> r2, X5 -> r6                           |
| 10   | (1,5)     | 2    | X2 -> r1, X6 -> r5                           |
| 11   | (3,7)     | 3    | X3 -> r3, X7 -> r7                           |

Here E is the 4-point DFT of the even samples and O that of the odd ones. The
results end in registers 0,2,1,3 (S3) and 4,6,5,7 (S4). `fft_core` picks each
output group out of those registers by fixed wiring.

S3 is valid 12 cycles after S2 is taken. It is held until `dout_ack`. S4
follows in the next cycle and is likewise held until its `dout_ack`.

### Numerics

Twiddle factors are 10-bit signed values with 8 fraction bits:

- 1.0 is 256;
- 1/sqrt(2) is 181.

The twiddle product is rounded to the nearest integer. Every butterfly output
is halved with an arithmetic shift, which rounds toward minus infinity. After
three stages, the core therefore delivers `DFT/8`.

The result is within 2 LSB of the exact `DFT/8` whenever no stage overflows.
No stage overflows if every input part lies in [-63, 63]. Outside that range,
a stage can leave the 8-bit range; the butterfly then saturates to -128 or
127 instead of wrapping.

## What follows the source design and what does not

**Taken from the FFT integration example this RTL implements:**

- an 8-point complex FFT core, optimised for area;
- 8-bit real and imaginary parts in a 16-bit word;
- eight 16-bit sample registers;
- four 16-bit buses between the processing unit and the memory;
- the two-group input and output order shown in the table above;
- serial transfers to the DSP, parallel transfers to the core;
- an interface of four 16-bit registers, a 4-to-1 multiplexer, a 1-to-4
  demultiplexer and an 11-state FSM;
- one cycle per DSP word and one cycle per interface-to-core transfer.

**Choices made here, where the example gives no detail:**

- **Handshakes.** The valid/ready signal names, the `call` pulse, and the
  split of the bidirectional DSP link into a write direction and a read
  direction.
- **Controller states.** What each of the eleven states does. Only their
  number is given.
- **Register sharing.** One set of four registers is used for both
  directions.
- **Core internals.** The single-butterfly schedule, the twiddle format,
  the per-stage halving and the saturation.
- **Reset.** An active-low asynchronous reset clears every register and puts
  both controllers in their first state.

**Known departures:**

- In the example, the processing unit reads the inputs and writes the final
  results on its own I/O ports. Here, input groups are loaded straight into
  the register file and results are read from it. The butterfly only ever
  works register to register.
- The example's memory is also quoted as sixteen 16-bit registers. Eight are
  built, which is exactly one frame.
- The example's delay model waits 9 ns between reading the inputs and
  posting the outputs. With no clock period given, that number is not used.
  The core takes 12 cycles. Reaching 9 ns would need a clock of about
  1.33 GHz.
- Result groups are held until they are acknowledged. They are not posted at
  fixed dates regardless of the interface. The core's own schedule is fixed.

**Not included:**

- the DSP itself;
- a bus-functional model for co-simulation;
- the generic system-on-chip around the core (system bus, arbiter, shared
  memory, other accelerators).

## Files

| file                  | contents                                              |
|-----------------------|-------------------------------------------------------|
| `rtl/ipi_pkg.sv`      | sample and group types, sizes, state encodings        |
| `rtl/ipi_fft_soc.sv`  | top: interface unit plus FFT core, DSP-side ports     |
| `rtl/interface_unit.sv` | controller plus buffer, handshake assertions        |
| `rtl/iu_controller.sv`| the 11-state FSM                                      |
| `rtl/iu_buffer.sv`    | four registers, demultiplexer, multiplexer            |
| `rtl/fft_core.sv`     | control unit, register file, butterfly, output wiring |
| `rtl/fft_cu.sv`       | core sequencing and butterfly schedule                |
| `rtl/fft_mmu.sv`      | eight-register file                                   |
| `rtl/fft_pu.sv`       | butterfly                                             |
| `tb/tb_ref_pkg.sv`    | direct DFT reference and helpers for the testbenches  |
| `tb/tb_*.sv`          | one self-checking testbench per module                |

## Verification

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

- **`tb_ipi_fft_soc`** runs the whole design at its only size.
  - The testbench plays the DSP for 301 frames.
  - Every result is compared with a direct DFT / 8.
  - The first frame has no stalls and must take exactly 33 cycles.
  - The other frames stall both DSP directions at random, and every third
    frame starts right after the previous one.
  - It counts S1/S2 handovers, S3/S4 captures, write stalls, read stalls and
    cycles spent waiting for the core. It fails if any of these never
    happened.
- **`tb_interface_unit`** pairs the interface unit with a core model that
  refuses groups and delays results at random. It checks the word-to-port
  mapping in both directions.
- **`tb_iu_controller`** checks the exact order of the controller's actions
  in each frame, and the 21-cycle frame when nothing stalls.
- **`tb_fft_core`** checks 200 random frames against the DFT and checks the
  12-cycle latency.
- **`tb_fft_cu`** runs the control unit's schedule on an exact real-valued
  model. The model must end up holding the DFT. This proves the schedule
  independently of the fixed-point arithmetic.
- **`tb_fft_pu`** compares the butterfly with real arithmetic, including
  saturating cases.
- **`tb_fft_mmu`** and **`tb_iu_buffer`** compare the register files with
  simple models.

Running one testbench with Verilator 5 (`ipi_pkg.sv` has to come first):

```
verilator --binary --timing --assert --top-module tb_ipi_fft_soc \
    rtl/ipi_pkg.sv rtl/fft_pu.sv rtl/fft_mmu.sv rtl/fft_cu.sv rtl/fft_core.sv \
    rtl/iu_buffer.sv rtl/iu_controller.sv rtl/interface_unit.sv rtl/ipi_fft_soc.sv \
    tb/tb_ref_pkg.sv tb/tb_ipi_fft_soc.sv
./obj_dir/Vtb_ipi_fft_soc
```

Replace the top module and the last file to run another testbench.
Simulation takes well under a second.

Lint gives two kinds of warning:

- `SYNCASYNCNET` comes from using the asynchronous reset in the assertions'
  `disable iff`.
- `UNUSEDPARAM` marks package constants that a given module does not use.

## Changing it

- **The 8-point size is fixed.** The butterfly schedule and the output
  wiring are written out for eight points.
- **Twiddle format.** Change `TW_W`/`TW_FRAC` in `ipi_pkg` together with the
  constants in `fft_pu`.
- **Sample format.** Sample width is `PART_W` in `ipi_pkg`. The twiddle
  constants in `fft_pu` and the testbenches' random samples assume 8-bit
  parts.
