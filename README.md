# ASP100: an associative processor chip for image processing

ASP100 is a SIMD chip built for low-level vision. It has 1024 processing
elements, and each one is a 72-bit word of content-addressable memory (CAM).
One image pixel and its working fields sit in each word. The chip does not
compute with an ALU. It repeats two primitives over all 1024 words at once:

* **COMPARE**: every word checks the masked bits of the comparand. The words
  that match set their TAG bit.
* **WRITE**: the comparand's masked bits are written into every word whose
  TAG is set.

Any word-parallel arithmetic can be built from these two as a sequence of
truth-table passes. Addition, for example, takes four compare/write pairs per
bit, covering the input combinations (A, carry, B) that change the result:
010, 011, 101, 100, in that order. Each pass writes a new carry and sum bit.
Beside the array sit:
* a TAG shift network for neighbourhood operations;
* a response counter for histograms and sums;
* a select-first circuit for reading responders one at a time;
* a some/none flag (RSP) to control loops.

Part of the array also works as an image FIFO, so a new frame can stream in
and the previous result stream out while the rest of the array computes.
Several chips chain into one long array, with 1024 pixels per chip.

The RTL in `rtl/` describes one chip at its real size (`asp100`) and a board
of eight chained chips (`asp_system`, the top level). The testbenches in
`tb/` check every block, run one chip through a complete image job, and run
the eight-chip chain at full size.

## Block map

```
             DBUS (instruction operand)                  VIN
                  |                                       |
   ctl ---> asp_ctl_pipe --(uir1,d1)--> asp_top_regs  (MASK, COMPARAND,
                  |                      CONFIFO, FIFO input register)
                (uir2,d2)                      | mask, comp
                  v                            v
   SHBUS <-> asp_side  <--- ml ---------  asp_matrix  <--- fifo_wl -- asp_fifo_ctrl
  (TAG, shifts,         ---- tag/wl --->  1024 x 72 CAM              (token, FFUL)
   counter, select first,                      | bl (3 blocks)
   RSP)  -> CTAG, RSP                          v
                                         asp_bottom (resolver, output register,
                                          READ mux) -> DBUS/SHBUS, VOUT
```

| File | Block |
|---|---|
| `asp_system.sv` | top level: NCHIPS chips chained into one array of NCHIPS x 1024 words |
| `asp_pkg.sv` | sizes, instruction group enums, the `uinstr_t` micro-instruction, FIFO column mask |
| `asp100.sv` | the chip: wiring, pipeline timing, SHBUS direction, SETAG word lines |
| `asp_matrix.sv` | CAM array: compare, masked write, FIFO word port, bit lines of the 3 physical blocks |
| `asp_tag_reg.sv` | 1024 TAG flip-flops, each behind an 8-input multiplexer: the shift network |
| `asp_resp_count.sv` | bit-serial pipelined response counter |
| `asp_select_first.sv` | select-first chain |
| `asp_rsp.sv` | registered some/none flag and per-block responder flags |
| `asp_side.sv` | SIDE: the four blocks above plus their sequencing |
| `asp_top_regs.sv` | TOP: mask/comparand registers and the group 1 load instructions |
| `asp_ctl_pipe.sv` | on-chip instruction pipeline (IntMicroIR, IntMicroIR2) and the NOP bit |
| `asp_fifo_ctrl.sv` | FIFO address token, FENB/FFUL handshake |
| `asp_bottom.sv` | BOTTOM: read resolver, 72-bit output register, READ sector multiplexer, VOUT |

## The array and its fields

The 72 columns form three 24-bit sectors:
* Sectors 0 and 1 are always *ARRAY* (processing) columns.
* Sector 2 holds the FIFO. The CONFIFO instruction takes a 3-bit mask of
  8-bit granules (bits 0-7, 8-15, 16-23) and makes those granules FIFO
  columns. The rest of sector 2 becomes ARRAY. After reset all 24 bits are
  FIFO.
* VIN and VOUT carry the FIFO bits, with the low granule on bit 0.

Physically the rows form three blocks of 342 words (340 in the last block).
Each block has its own bit lines and read sense amplifier. The rows are one
logical column for compare, write and shifting. A read therefore yields three
candidate words, and BOTTOM resolves between them:
* **READ** takes the lowest block that holds a tagged word.
* **FIFO output** takes the block that holds the FIFO address token.

In the model, a block in which several words are tagged reads the AND of
those words' bits, the way a precharged bit line behaves. Software is expected
to narrow to one word with FIRSEL first.

The CAM contents have no reset. A program starts by writing the fields it
uses.

## Instructions and timing

The chip is controlled by an external microcoded controller. Each clock the
controller presents:
* one decoded horizontal micro-instruction (`uinstr_t` on `ctl`);
* a DBUS word: bit 31 is the NOP bit and bits 23:0 are the operand.

The micro-instruction has one field per instruction group, so compatible
groups issue together, for example a mask load + SETAG + WRITE.

| Group | Instructions | Cycles |
|---|---|---|
| 1 | LM, LC, LMC, LMCC, LMCCXX, LCSM, LMX, LCX, LMSC, SMX, SCX: load mask and/or comparand of sector `s`, with "X" forms clearing the other sectors | 1 |
| 2 | SETAG, RESETAG | 1 |
| 3 | SHUP, SHDN (1 word), LGUP, LGDN (16 words) | 1 |
| 4 | COMPARE, WRITE | 1 |
| 5 | READ `s` | 3 |
| 5 | COUNTAG | 31 |
| 5 | FIRSEL | 23 |
| 5 | CONFIFO | 1 |

**Pipeline.** The pins are registered into IntMicroIR. Group 1 acts in that
stage, and everything else one stage later, in IntMicroIR2. An instruction
sampled on the pins in cycle *t* updates the mask and comparand at the end of
*t+1*, and compares, writes or shifts at the end of *t+2*. Because group 1
is one stage ahead, a load issued right after an instruction only takes
effect once that instruction has executed. A controller can therefore issue
one micro-instruction per clock with no bubbles. The exception is a
multi-cycle group 5 operation: the controller waits for `busy` to fall. An
assertion in `asp100` catches COUNTAG or FIRSEL issued while busy. The NOP
bit turns the whole micro-instruction into a no-op at the first stage.

**SETAG and WRITE.** SETAG sets every TAG and also raises every write word
line, so `SETAG + WRITE` writes all words. This is how a field is cleared
before a bit-slice copy.

**READ** (3 cycles):
1. The execute cycle loads the 72-bit output register from the resolved bit
   lines.
2. The next cycle registers the selected sector.
3. The third cycle drives it on DBUS[23:0] and SHBUS[23:0] (`dbus_oe`).

## The SIDE circuits

**TAG register and shift network.** Every TAG flip-flop has an 8-input
multiplexer:

| Input | Source |
|---|---|
| hold | its own TAG |
| GND | reset |
| match line | COMPARE |
| near north | word j+1 |
| near south | word j-1 |
| far north | word j+16 |
| far south | word j-16 |
| select first | the select-first result |

Word 0 is the low ("south") end. SHUP moves TAG towards higher words and
LGUP does the same by 16 words. Words near the chip ends exchange with the
neighbouring chip over SHBUS:
* On an upward shift, the chip drives its top 16 TAG bits on SHBUS[31:16].
  The bits that enter its bottom come from SHBUS[15:0], which carries the
  chip below.
* A downward shift is the mirror image.

In a chain, SHBUS[15:0] of one chip connects to SHBUS[31:16] of the chip
below it. LIN and HIN gate the words entering at the low and high end, so a
zero enters at the chain ends. With an image stored line by line, near
shifts move pixels along a line. Far shifts move them between lines, taking
N/16 cycles for a line of N pixels.

**Response counter (COUNTAG).** The counter works on the 1024 TAG bits. They
are split over three arrays of 18 stages of 19 cells, which covers 3 × 342.

1. In the first cycle each stage loads the number of ones among its 19
   inputs.
2. After that, every cycle each stage adds the serial sum bit coming down
   from the stage above and passes its own least significant bit downward.
   This is a pipelined bit-serial adder tree.
3. A final stage adds the bits of the three arrays and puts the total on
   CTAG, least significant bit first, with `ctag_valid`.

The 11 count bits leave in cycles 20 to 30 of the operation, for 31 cycles
in total. A system adds the CTAG streams of all chips in an external
summation unit.

**Select first (FIRSEL).** Each cell computes:
* TagOut = TagIn AND NOT FirIn
* FirOut = TagIn OR FirIn

The chain runs from word 0 upward, so only the lowest tagged word keeps its
TAG. The model evaluates the chain in 21 segments, one per cycle, and loads
the result into TAG in the 23rd cycle. FIRSTIN feeds the start of the chain.
In a system it carries the OR of the RSP outputs of the chips below: when it
is 1, a lower chip already has the first responder and this chip clears all
its TAGs.

**FIRCNTEN** disconnects TAG from the counter and from select first. With it
low, COUNTAG returns 0 and FIRSEL clears every TAG.

**RSP** is the OR of the match lines. It is registered when COMPARE executes
and holds until the next COMPARE.

## Image I/O through the FIFO

1. While FENB is high, the FIFO controller moves one word per clock. VIN is
   loaded into the FIFO section of the comparand register, which acts as the
   FIFO input register.
2. The next cycle writes it into the word that holds the one-hot address
   token. In the same cycle, that word's old FIFO bits go through the output
   register to VOUT (`vout_oe`).
3. After 1024 words the controller raises FFUL. In a chain, FFUL of one chip
   is the FENB of the next.
4. Dropping FENB resets the token for the next frame.

During I/O the FIFO columns are removed from the array's compare and write
masks. The word lines of those columns follow the token, not TAG. This is
how computation continues on the ARRAY columns while a frame moves.

Between frames, the FIFO columns are ordinary CAM columns. A bit slice is
moved between FIFO and ARRAY with three micro-instructions:
1. `LMCCXX dst; SETAG; WRITE`: clear the destination.
2. `LMC src; COMPARE`: tag the words whose source bit is 1.
3. `LMC dst; WRITE`: set the destination in those words.

## Chaining chips

`asp_system` wires NCHIPS chips (default 8) into one array. They share the
control bus, VIN, VOUT and DBUS. Word 0 of chip k+1 follows word 1023 of
chip k, and the chips are linked as follows:

| Signal | Connection between chips |
|---|---|
| SHBUS | Chip k+1's SHBUS[15:0] meets chip k's SHBUS[31:16], so shifts cross chip boundaries. |
| FENB/FFUL | FFUL of chip k is FENB of chip k+1, so a frame fills the chips in order. |
| FIRSTIN | FIRSTIN of chip k is the OR of the RSP outputs of all lower chips, so FIRSEL keeps one word in the whole system. |
| RSP | The system RSP is the OR of all RSP outputs. |
| CTAG | The eight CTAG streams come out side by side for an external adder. |

A chip drives READ data on the shared DBUS only if it holds a tagged word.
Assertions check that at most one chip drives DBUS and at most one drives
VOUT. LIN of the first chip and HIN of the last one gate the chain ends,
and the inner boundaries are always enabled.

## Departures and open points

These are the places where this RTL makes a choice that the original design
either leaves open or does not settle.

* **Clock.** There is one rising-edge clock. The original uses two clocks
  (CLK and a delayed DCLK) for four-phase timing of the analog CAM events. An
  active-low reset `rst_n` is added for the control state.
* **TAG set.** The set of the TAG flip-flop is synchronous. The original uses
  the flip-flop's asynchronous set.
* **Control interface.** The chip takes decoded control fields. Opcode
  values and the `uinstr_t` layout are this design's own.
* **Operand pipeline.** The operand passes through two on-chip stages. The
  original speaks of three; here the controller's output register counts as
  the first.
* **FIRSTIN polarity.** The original text describes it both ways. The RTL
  follows the select-first gates and the chaining rule: 1 clears all TAGs.
* **FIRSTIN in a chain.** The chain uses the OR of all lower chips' RSP,
  not only the RSP of the preceding chip. The two agree for two chips.
* **LIN/HIN on a board.** The two pins are not shared between chips, so
  they do not gate the inner boundaries.
* **RSP.** RSP is registered, not instantaneous.
* **Cell-level circuits.** Sense amplifiers, precharge and pads are not
  modelled at circuit level:
  * Compare and read are combinational functions of the stored bits.
  * The three-state buses are `_o`/`_oe` output pairs.
* **Priorities.** The resolver's priority for several responding blocks, the
  TAG multiplexer's priority when several sources are requested, and the
  CONFIFO encoding are this design's own.
* **Not included.** The microcoded controller and the CTAG summation unit
  are not part of the RTL. The system top brings out every signal they
  connect to.

## Fitting the vision workloads

With 48 always-ARRAY bits per word (64 with an 8-bit FIFO):
* **Histogram** of an 8-bit image: 256 × (COMPARE + COUNTAG) = 8192 cycles.
  This is 410 µs at 20 MHz.
* **3×3 convolution** of 8-bit pixels with 8-bit coefficients needs about
  29 bits of fields.
* **Contour labelling** of a 512 × 512 image needs about 37 bits.
* **Canny edge detection** fits only just: about 47 bits.
* **Horn–Schunck optical flow** needs more than 48 bits unless fields are
  reused.

The default system of eight chips holds 8192 pixels. A 512 × 512 image needs
NCHIPS = 256.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_asp100 \
    -y rtl -y tb +libext+.sv rtl/asp_pkg.sv tb/tb_asp100.sv
./obj_dir/Vtb_asp100
```

Replace `tb_asp100` with any other testbench name to run it.

| Testbench | What it checks |
|---|---|
| `tb_asp_system` | Eight full-size chips (default parameters). 1. A frame of 8192 pixels crosses the FENB/FFUL chain. 2. An IMAGE IN copy runs on all chips. 3. A histogram sums the eight CTAG streams, with system RSP checks. 4. LGUP, SHUP and SHDN cross chip boundaries. 5. FIRSEL leaves a single word in the lowest matching chip, and READ brings it out on DBUS from that chip alone. 6. A second frame returns the first on VOUT. |
| `tb_asp100` | One chip at full size (1024 words, default parameters). 1. A frame enters over VIN. 2. An IMAGE IN bit-slice copy fills fields A and B. 3. Associative addition B = A + B runs with a carry column. 4. An IMAGE OUT copy follows. 5. CONFIFO switches to a 16-bit FIFO, and a second frame brings the sums out on VOUT while the array computes a histogram with RSP checks. Then: all four shifts across SHBUS with LIN/HIN; FIRSEL with and without FIRSTIN; READ of the first responder; FIRCNTEN; the NOP bit. It checks the cycle counts of COUNTAG (31), FIRSEL (23) and READ (3), and fails if any of these mechanisms never occurred. |
| `tb_asp_matrix` | random compares, masked writes, FIFO writes and block reads against a reference model |
| `tb_asp_tag_reg` | every multiplexer input and all four shifts, including the chip-end inputs |
| `tb_asp_resp_count` | full-size counts of random and edge-case tag patterns; bit timing and the 31-cycle length |
| `tb_asp_select_first` | full-size first-responder selection, FIRSTIN, 23-cycle length |
| `tb_asp_rsp` | RSP changes only on COMPARE; block responder flags |
| `tb_asp_top_regs` | all eleven group 1 loads, CONFIFO, FIFO input register protection |
| `tb_asp_ctl_pipe` | the two pipeline stages and the NOP bit |
| `tb_asp_fifo_ctrl` | token walk, one transfer per cycle, FFUL, restart |
| `tb_asp_bottom` | resolver choice, output register, 3-cycle READ, sector multiplexer, VOUT |
| `tb_asp_side` | random mixes of COMPARE, shifts, SETAG/RESETAG, COUNTAG and FIRSEL at reduced size |

The one-chip testbench runs in a few seconds and the eight-chip one in
about 20 seconds.
