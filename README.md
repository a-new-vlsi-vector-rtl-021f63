# SPU: an exact dot-product coprocessor for IEEE doubles

The scalar product unit (SPU) computes dot products `s = a1*b1 + ... + an*bn`
of IEEE 754 double vectors **without any intermediate rounding**. Every product
is formed to its full 106-bit length and added into a 4288-bit fixed-point
register, the *long accumulator* (LA), that is wide enough to hold the sum of
any products of doubles exactly. Only when the host asks for the result is the
LA rounded, once, to a double in one of the four IEEE rounding modes. A
floating-point loop rounds 2n-1 times and can lose all leading digits to
cancellation; the SPU's result is the correctly rounded exact value.

This RTL models the SPU chip (MIM XPA3233) as a 32-bit, 33 MHz PCI target
that the host drives with plain memory reads and writes into a 4 KB window.
It accepts one product every 9 clocks, or every 11 when the product's carry
has to be carried further up the LA. At 33 MHz that is 6 MFLOPS (a multiply
and an add per product).

## The long accumulator

For doubles (53-bit significand, exponents -1022..1023) the LA needs
`k + 2*emax + 2*|emin| + 2*53` bits. With k = 92 guard bits against
intermediate overflow this is 4288 bits, stored as **67 words of 64 bits** in a
dual-ported RAM (`la_ram`). The value is two's complement; bit 4287 is the
sign.

LA bit *i* has the weight 2^(i-2150). A finite double has the value
`m * 2^(e-1075)`, with the 53-bit significand `m` (hidden bit included) and
the biased exponent `e` (1 for denormals). So the product of two doubles is
`mx*my * 2^(ex+ey-2150)`, and its least significant bit lands at **LA bit
ex+ey**. The 11-bit exponent adder thus delivers the LA position directly:
bits 11:6 of the sum are the word address *w*, bits 5:0 the bit offset in
that word. The smallest product (2^-2148) and the largest (below 2^2048) both
fit, with about 90 bits of headroom above.

### The all-0 / all-1 flags

Next to the RAM, `carry_logic` keeps two flags per word: *all bits are 0* and
*all bits are 1*. They are recomputed on every write of a word. They are the
key to the design:

* **Carry resolution without a carry chain.** A 106-bit product shifted by up
  to 63 bits covers at most three LA words, w, w+1 and w+2. If the third add
  produces a carry, it runs up through all the words above that are all ones
  and stops at the first word that is not. That word is found from the flags
  by a priority search starting at w+3, in parallel with the three adds. The
  words the carry passes over change from all ones to all zeros, and only
  their flags are updated; the RAM keeps its stale contents. One more
  load/add/store on the stopping word finishes the job. A borrow, from
  subtracting a product, is the mirror image: it stops at the first word
  that is not all zeros, and the words it passes become all ones.
* **Reads go through the flags.** Because of flag-only updates, a word's
  value is `0` if its all-0 flag is set, `~0` if its all-1 flag is set, and
  the RAM word otherwise. Every read of the LA (data path or host) applies
  this rule.
* **Clearing the LA** sets every all-0 flag in one clock.
* **Rounding** uses the flags to find the leading nonzero word of the
  magnitude without scanning the RAM (see below).

Example: the LA words, from high to low, are `..0110 | 1110 | 1111 | 1111 | 1111 | x | x | x`
and the three adds of a product into the three low words carry out. The
flags show that the carry stops at the `1110` word. In the cycle of the third
store, the three all-ones words are flagged all-zero. Then `1110` is loaded,
incremented to `1111` and stored.

A carry or borrow that runs past the top word wraps the LA modulo 2^4288.
The 92 guard bits make that unreachable in practice.

## Adding one product

`shifter` produces the 64-bit slice of the shifted product for word w+j
(j = 0, 1, 2). Its input multiplexer builds a 128-bit window from the two
64-bit chunks of the zero-padded product: {lo, 0} for j = 0, {hi, lo} for
j = 1, {0, hi} for j = 2. A barrel shifter then moves the
window left by the bit offset, in a coarse stage (multiples of 8) and a fine
stage (0..7), and keeps the upper 64 bits. `csel_adder`, a 64-bit
carry-select adder with 8-bit blocks, adds the slice to the LA word. For
subtraction it adds the inverted slice with a carry-in of 1. The carry
between the three words is kept in a register.

## Pipeline and timing

`spu_engine` (the data path control) runs two stages that overlap.

| clock | multiplication stage (product n+1) | accumulation stage (product n) |
|---|---|---|
| 0 | decode: last operand write accepted | load word w |
| 1 | test x (NaN / inf / zero, unpack) | add |
| 2 | test y | store w, load w+1 |
| 3 | act on exceptions, start multiplier | add |
| 4 | multiply LL (27x27) | store w+1, load w+2 |
| 5 | multiply LH | add |
| 6 | multiply HL | store w+2; flags of the words passed by the carry |
| 7 | multiply HH | load carry word (only if a carry is left) |
| 8 | product into the shifter input latch, if the accumulation stage is free | add +1 / -1 |
| 9 | | store carry word |

So a product is taken every 9 clocks when it leaves no carry, and every 11
when it does (8 + 3 clocks of accumulation). The multiplication stage only
hands a product over when the accumulation stage is idle. The host can load
the next operand pair while a product is being processed. A 32-bit write
takes 2 PCI clocks, so four writes (8 clocks) keep up with the 9-clock rate.

**Multiplier.** `multiplier` forms the 53x53-bit product in four clocks on one
27x27-bit core (`booth_mul27`). The core uses radix-4 (modified Booth)
recoding and carry-save reduction, and it has an addend input. The
significands are split into a 27-bit low and a 26-bit high half. The running
sum is fed back into the addend in the order LL, LH, HL, HH. After LL and
after HL the low 27 bits are final and move into the product register, so
the feedback stays within 55 bits. The exponents are added by an 11-bit
ripple-carry adder.

## Rounding the LA

A round instruction (mode 0 nearest-even, 1 toward zero, 2 toward +inf,
3 toward -inf) runs when both stages are idle and takes 6 clocks:

1. Read the top word for the sign.
2. From the flags and the sign, `carry_logic` derives for each word whether
   its *magnitude* is zero. For a negative LA the magnitude of word i is
   `~word + c`, where c = 1 only if every word below i is zero. This gives
   the leading nonzero magnitude word t (at least 1), whether any magnitude
   bits lie below word t-1 (sticky), and the carry-ins.
3. Read words t and t-1 and convert each to magnitude through the same
   64-bit adder.
4. `rounder` finds the leading one P in the 128-bit window. It places the
   last result bit at LA bit `q = max(P-52, 1076)`; 1076 is the position of
   2^-1074, the smallest denormal, so denormal results need no special path.
   The 53 result bits are the window bits from `rs = q - 64(t-1)` upward.
   The rounder gets them from the product shifter, which is idle during
   rounding. It drives the shifter's window select and shift width:
   * rs = 0: select {lo, 0}, shift 0;
   * rs = 1..64: select {hi, lo}, shift 64-rs;
   * rs = 65..127: select {0, hi}, shift 128-rs.

   It takes the guard bit and the sticky bit from the words directly and
   applies the mode. The exponent field and the significand are added as one integer,
   so a rounding carry moves into the exponent. Results past the largest
   double become infinity or the largest finite number, depending on the
   mode. An LA of zero gives +0.

The result goes to register 0.

## Exceptional operands

During the two test clocks each operand is classified. NaN operands and
inf x 0 set a sticky NaN flag. An infinite product sets a sticky +inf or -inf
flag (sign of x, sign of y, and subtract combined). These products are not
accumulated, and neither are products with a zero operand. If a flag is set,
rounding returns a quiet NaN (also when both infinities were seen) or the
infinity. The flags form the status register (bit 0 NaN, bit 1 +inf,
bit 2 -inf). Clearing the LA also clears them. There are no traps or
interrupts.

## Host interface

`pci_target` implements the configuration space:

* vendor and device ID (placeholders 0xFFFE / 0x0001);
* class code (co-processor);
* command register bit 1 (memory enable);
* BAR0, which asks for a 4 KB memory window.

It claims memory reads and writes in the window with fast DEVSEL#. It turns
each data phase into a request to the SPU, and holds TRDY# off (wait states)
until the SPU can complete it. Bursts advance linearly. A write needs 2
clocks. A read needs 3 clocks because of the bus turnaround. Not
implemented: STOP# (retry or disconnect), parity error reporting,
interrupts, I/O space. The AD, PAR, TRDY#, DEVSEL# and STOP# pins come out
as separate input, output and enable signals. Assertions in `pci_target`
check that TRDY# comes only with DEVSEL#, that AD is driven only in read
data phases, and that a request to the SPU stays unchanged until it is
taken.

`instr_decode` maps the word address to an instruction:

| offset | read | write |
|---|---|---|
| 0x000-0x01C | 32-bit register k = half k%2 of 64-bit register k/2 | same |
| 0x020 | status | status (restore) |
| 0x040 | - | clear LA and status |
| 0x080-0x09C | register | register write, then **add** x*y of pair k/4 |
| 0x0C0-0x0DC | register | register write, then **subtract** x*y of pair k/4 |
| 0x100-0x10C | - | round, mode = offset bits 3:2 |
| 0x800 + 8w + 4h | LA word w, half h | LA word w, half h (read-modify-write, flags updated) |

Registers 0/1 (x, y) and 2/3 form two operand pairs. A host program
alternates between them:

```
write 0x040                      ; clear
for each i:                      ; p = 0 or 1, alternating
  write 0x000+16p  x_i[31:0];  write 0x004+16p  x_i[63:32]
  write 0x008+16p  y_i[31:0];  write 0x08C+16p  y_i[63:32]   ; starts the product
write 0x100                      ; round to nearest
read 0x000, 0x004                ; result
```

The host never has to poll. An access that the SPU cannot take yet is
stretched with wait states:

* register writes to the pair under test;
* a product instruction while the multiplication stage is busy;
* rounding, status and LA accesses until everything is idle;
* register reads while a rounding runs.

Reading all 67 LA words and the status register, then writing them back,
saves and restores the full SPU state.

## Files

| file | role |
|---|---|
| `rtl/spu_pkg.sv` | LA size, instruction and rounding-mode types, status bits |
| `rtl/spu_top.sv` | top level: PCI pins |
| `rtl/pci_target.sv` | PCI target, configuration space, request port |
| `rtl/instr_decode.sv` | address map |
| `rtl/reg_file.sv` | 4 x 64 bit register file, 32-bit host view |
| `rtl/spu_engine.sv` | data path control: both stages, rounding and LA host access sequencing |
| `rtl/operand_check.sv` | NaN / inf / zero classification and unpacking |
| `rtl/multiplier.sv`, `rtl/booth_mul27.sv` | four-step multiplier and its 27x27 Booth core |
| `rtl/shifter.sv` | 64-out-of-128 shifter: product slices, and the mantissa when rounding |
| `rtl/csel_adder.sv` | 64-bit carry-select adder |
| `rtl/la_ram.sv` | 67 x 64 bit LA RAM (1 write + 1 read port) |
| `rtl/carry_logic.sv` | flags, carry resolve address, rounding support |
| `rtl/rounder.sv` | leading-one detection and IEEE rounding |

## Simulation

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. The reference model `tb/spu_ref_pkg.sv`
keeps the exact sum as a 4400-bit integer. It rounds by dividing by the unit
in the last place and comparing the remainder with half a unit, a different
method from the RTL's guard and sticky bits. Example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spu_pkg.sv tb/spu_ref_pkg.sv \
          tb/tb_spu_top.sv --top-module tb_spu_top -Mdir obj_top
./obj_top/Vtb_spu_top
```

Unit testbenches (`tb_<module>.sv`) exist for every module except
`operand_check`, which the end-to-end tests cover. Beyond them:

* `tb_spu_engine` checks the control against the reference. After every
  vector it compares the whole LA word by word. It checks the cycle counts
  of the table above: 8 clocks from decode to the shifter latch, 7 or 10
  clocks of accumulation, and 9 or 11 clocks between streamed products.
* `tb_spu_top` runs everything through the PCI pins at full size:
  configuration, byte enables, cancellation (2^70 + 1 - 2^70), long borrow
  and carry chains, random vectors, denormal and overflowing results,
  NaN/inf, LA save and restore, and the product rate. It counts that every
  mechanism occurred: carry and borrow resolution, flag-only updates,
  exceptions, zero skipping, waits for the accumulation stage, PCI wait
  states and all rounding modes.
* `tb_spu_dot100` runs dot products of length 100 through the pins and
  reports their clock count, about 930 clocks or 28 us at 33 MHz.

## What follows the original design and what does not

Taken from the published SPU:

* LA size and layout;
* the 67 x 64 dual-ported RAM and the two flags per word;
* flag-based carry resolution with flag-only updates;
* the 64-out-of-128 shifter with coarse and fine stages;
* the carry-select adder;
* the four-step 27x27 Booth multiplier with feedback and the ripple-carry
  exponent adder;
* the clock-by-clock pipeline, with 9 or 11 clocks per product;
* rounding from the two leading words with sign-magnitude conversion in the
  adder;
* the 4 x 64 register file seen as eight 32-bit registers;
* a PCI memory window of 4 KB with instructions encoded in the address.

Choices of this RTL, where the original gives no detail:

* the address map and the rounding-mode encoding;
* the use of two operand pairs and register 0 as the result;
* the status register layout and the handling of exceptional values;
* skipping products with a zero operand;
* the valid/ready handshake with wait states;
* the PCI configuration contents;
* the one-clock RAM read latency;
* the 8-bit carry-select blocks;
* the 27/26-bit split of the multiplier. Its feedback reaches 55 bits,
  where the original speaks of a 54-bit feedback.

Departures in structure:

* The Booth core reduces its rows with a linear array of carry-save adders,
  not a balanced Wallace tree.
* The shifter's tristate-inverter multiplexers are written as shift
  operators.

Not modelled:

* the second host interface of the chip (a Weitek EMC socket used for
  testing), whose protocol is not specified here;
* anything analog or layout-related.
