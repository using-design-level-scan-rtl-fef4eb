# Design-level scan for FPGA designs

Debugging a design on an FPGA runs thousands of times faster than simulating
it, but an FPGA shows you almost none of its internal state and lets you change
none of it. Design-level scan fixes that by putting every memory element of
the user design (flip-flops, LUT RAMs, BlockRAMs) on one serial shift chain
that is switched in by a `scan_en` pin. With `scan_en` high, the entire state
of the design leaves bit by bit on `scan_out` while a new state enters on
`scan_in`. With `scan_en` low the design runs normally from whatever state it
holds. This gives the host the two things a software debugger gives: it can
read every state bit (observability) and it can set every state bit
(controllability), with no new bitstream for each new set of signals.

The scan logic is temporary. It is added for verification and left out of the
production build, so its area and speed cost is paid only while debugging.
That cost is high on an FPGA. Each scan mux takes a whole LUT, so full scan
typically adds well over half again to a design's logic elements and costs
about a fifth of its clock speed.

This repository holds synthesizable SystemVerilog for the scan cells (one for
each kind of memory element), the shared address generator, the system-level
guards, and a wrapper that instruments a small example design end to end.

## Blocks

| module | role |
|---|---|
| `scan_ff` | flip-flop with scan mux, forced clock enable and masked set |
| `scan_lutram` | asynchronous-read / synchronous-write LUT RAM that acts as a FIFO segment of the chain |
| `scan_bram` | synchronous dual-port BlockRAM with output register, serialised one bit per cycle |
| `scan_addr_gen` | one counter that drives the scan addresses of every RAM |
| `bram_readback_shadow` | keeps a BlockRAM output register valid across a device readback |
| `ext_mem_guard` | stops external memory writes during scan and buffers accesses that were in flight |
| `scan_reg` | a register of `scan_ff` cells with a shared enable and reset |
| `cnt_scan` | 4-bit up-counter built from `scan_ff` |
| `mult_scan` | 16x16 fully pipelined multiplier keeping the upper product half, every register scannable |
| `cordic_scan` | 16-bit, 16-stage pipelined rotation-mode CORDIC, every register scannable |
| `scan_top` | wrapper: scan pins, the chain through all of the above, user pins |
| `scan_pkg` | the `scan_mode_e` type |

## The chain and a scan session

`scan_top` chains its elements in this order:

```
scan_in -> LUT RAM (16 x 1) -> BlockRAM (output register + 256 x 16)
        -> CORDIC (768 FFs) -> multiplier (648 FFs) -> counter bit0..bit3 -> scan_out
```

Chain length = `LUT_DEPTH*LUT_WIDTH + (BRAM_DEPTH+1)*BRAM_WIDTH + FF_LEN`, where
`FF_LEN = CNT_W + 3*DW*DW + DW*(2*DW+1) + DW*(DW-1)/2`. That is 5548 bits at
the default sizes.

A **session** is exactly chain-length cycles with `scan_en` high. The
`scan_mode` pin says what kind of session it is. Set it at least one cycle
before `scan_en` rises and hold it for the whole session:

* **scan-out** (`scan_mode = 0`): `scan_out` delivers the state, the bit
  nearest `scan_out` first. At the defaults the order is:
  1. counter bits 3..0;
  2. the multiplier registers, last stage first: the stage's valid bit, then
     `a` and the running sum, each MSB first, then, for stages before the
     last, the `b` bits still to be used;
  3. the CORDIC registers, last stage first: `z`, `y`, `x`, each MSB first;
  4. the BlockRAM output register, MSB first;
  5. BlockRAM words 0..255, each MSB first;
  6. the LUT RAM words 0..15 (for a `WIDTH`-bit LUT RAM: bit `WIDTH-1` of every
     word, then bit `WIDTH-2` of every word, and so on).
* **scan-in** (`scan_mode = 1`): feed a state image on `scan_in`, in the order a
  scan-out produces it. When the session ends, every bit is back in its own
  element and at its own RAM address. The design continues from that state.

Between two sessions `scan_en` must be low for at least one cycle. The
BlockRAM uses that cycle for its last write, and the user design takes one
clock in it.

A scan-out shifts the chain, so it leaves the design in a scrambled state. To
observe and then continue, scan out and then scan the same image back in. To
modify state, scan in an edited image. The end-to-end testbench does exactly
this round trip.

## How each element joins the chain

### Flip-flops (`scan_ff`)

Three gates sit in front of an ordinary flip-flop with clock enable and set:

* a mux on D chooses `scan_in` during scan;
* an OR forces the clock enable during scan, so a held register still shifts;
* an AND with inverted `scan_en` blocks the set pin, so scanning cannot
  disturb the state it moves.

`q` is also the cell's `scan_out`. In this design the set pin is synchronous
and has priority over the enable. The `SR_VALUE` parameter chooses whether the
pin sets the flip-flop to 1 or resets it to 0, so the same cell also serves as
a resettable flip-flop.

### LUT RAMs (`scan_lutram`)

A RAM holds many bits behind one port, so during scan it works as a FIFO:

* the address is muxed to the shared scan counter, which visits every word in
  turn;
* the write enable is ORed with `scan_en`, so a word is written every cycle;
* each data input is muxed to a shifted copy of the word being read, which has
  `scan_in` at bit 0. Because the read is asynchronous, the word can be read,
  shifted and written back in one cycle.

Each visit moves a word up one bit, and its top bit leaves on `scan_out`.
After `DEPTH` cycles every word has moved one place. After `DEPTH*WIDTH`
cycles the old contents have all left and the new contents are all in.

The overhead is `log2(DEPTH)` address muxes, `WIDTH` data muxes and one OR
gate. The counter is shared between all RAMs.

### BlockRAMs (`scan_bram`)

This is the hardest element. A fully synchronous RAM cannot read a word and
overwrite it in the same cycle, its data path is wider than one bit, and its
output register cannot be loaded directly. The solution has these parts:

* **Dual port.** Port A is the user's port. During scan it also does the scan
  reads. Port B is used only for scan writes. A single-port BlockRAM is
  replaced by its dual-port form when it is instrumented.
* **Slots of WIDTH cycles.** The shared counter gives a bit index
  (`pos mod WIDTH`) and a word address (`(pos / WIDTH) mod DEPTH`). At the
  first cycle of each slot the block does four things:
  1. it puts the output register's MSB on `scan_out`;
  2. it copies the rest of that register into a parallel-to-serial register
     (`sh`), which sends it out over the next `WIDTH-1` cycles;
  3. it reads the slot's word on port A into the output register;
  4. it writes the word assembled by the serial-to-parallel register
     (`in_sr`) during the previous slot to the previous slot's address. This
     write is one address behind the read.
* **First cycle and last slot.** In the first cycle of a session there is no
  previous slot, so the write is suppressed. The last slot's word is written
  in the first cycle after `scan_en` falls. In that one cycle a user write on
  port A must not target the same word.
* **The result is a FIFO of `(DEPTH+1)*WIDTH` bits.** In a scan-out session the
  counter starts at 0. The block sends the user's output register, then words
  0..DEPTH-1.
* **Scan-in.** The counter starts at an offset, described below. The image's
  output-register word is stored in the RAM at first. The session's final scan
  read then loads it into the real output register, and it is overwritten in
  the RAM by the last word. When the session ends, user logic sees the same
  output-register value it would have seen before the state was captured.

Port A is write-first: on a write, `dout` takes `din`.

At 256x16 the instrumentation adds 41 flip-flops: the two 16-bit converters,
the delayed `scan_en` and the delayed 8-bit slot address. That is within the
20 to 80 extra flip-flops usually quoted per instrumented BlockRAM. BlockRAMs
are the most expensive element to scan.

### The shared address generator (`scan_addr_gen`)

The counter advances once per scan cycle and is held while `scan_en` is low.
Its start value depends on the session:

* **scan-out:** it starts at 0, so RAM bits leave in a fixed, documented order;
* **scan-in:** it starts at `(-CHAIN_LEN) mod 2**POS_W`, so that the session ends
  with the counter at a multiple of every RAM size.

Work backwards from the end of a scan-in session to see why this offset is
needed. The bits that belong to a RAM arrive in the session's last cycles. For
them to land at their own addresses, the counter has to finish at a multiple of
the RAM size. The scan-out order fixes the start, and the scan-in condition
fixes the end; the only way to meet both is for the two sessions to start at
different values.

All RAM depths, and `DEPTH*WIDTH` for every BlockRAM, must be powers of two
no larger than `2**POS_W`.

## System-level protections

* **External memory (`ext_mem_guard`).** The user logic's registers hold
  meaningless values while they are being shifted, so anything it asks of an
  external memory during scan is ignored. The active-low write-enable pin is
  tri-stated (`mem_we_n_oe = 0`), and a weak pull-up on the board holds it high.
  Requests go to the pins one cycle after they are accepted. A request still
  waiting when scan starts is held and issued on the first cycle after scan.
  Read data that returns during scan (the memory has a fixed latency, `RD_LAT`)
  is queued and handed to the user once scan ends. A read takes `RD_LAT + 2`
  cycles from request to `rvalid`.
* **Readback shadow (`bram_readback_shadow`).** The FPGA's configuration
  readback can already observe flip-flops and RAMs, but it overwrites the
  BlockRAM output registers. Used with readback instead of full scan, this
  block gives full observability for one register and a mux per BlockRAM:
  * in normal operation the shadow copies the output register;
  * during readback it holds, and user logic is fed from it;
  * the substitution ends at the next user read, which refills the real
    register. With full scan, a scan also ends it, because a scan-in reloads
    the register. A flip-flop-only scan does not.

  A full scan-out reads the real register, not the shadow. After a readback,
  do one user read before a full scan-out, or the image holds the corrupted
  value. Readback and full scan are normally used as alternatives.

* **Flip-flop-only scan (`SCAN_RAMS = 0`).** The FPGA's bitstream
  modification can set RAM contents but not flip-flops. Combined with it,
  scanning only the flip-flops gives full controllability at a lower cost than
  full scan. With `SCAN_RAMS = 0`:
  * both RAMs are built with `IN_CHAIN = 0`, so they leave the chain (`scan_in`
    passes straight to `scan_out`);
  * their ports are blocked while `scan_en` is high, so their contents and the
    BlockRAM output register stay as they were;
  * the chain is the 1420 flip-flops only.

  With the readback shadow, this gives full observability and
  controllability. The default is full scan.

## The example wrapper (`scan_top`)

The instrumented user design gives at least one instance of each kind of
element. It also includes the three small library circuits whose scan costs
are the usual reference: a 4-bit counter, a pipelined 16x16 multiplier and a
pipelined 16-bit CORDIC. All of its ports are brought out to pins next to the
scan pins:

* the 4-bit counter (`cnt_*`);
* the multiplier (`mul_*`). One operand pair per cycle, and the upper 16 bits
  of `a*b` come out 16 cycles later with `mul_out_valid`;
* the CORDIC (`cor_*`). One vector and angle per cycle, and the rotated vector
  comes out 16 cycles later. Angles are two's complement with 2^15 = pi.
  `|z|` must not exceed pi/2, and the output carries the CORDIC gain 1.6468;
* a 16x1 LUT RAM (`lr_*`);
* a 256x16 BlockRAM, whose output reaches the user through the readback
  shadow (`br_*`, `readback`);
* an external memory port behind the guard (`xm_*` on the user side, `mem_*`
  on the pins).

Parameters and defaults: `CNT_W = 4`, `DW = 16` (multiplier and CORDIC
width), `LUT_DEPTH = 16`, `LUT_WIDTH = 1`, `BRAM_DEPTH = 256`,
`BRAM_WIDTH = 16`, `MEM_AW = MEM_DW = 16`, `RD_LAT = 2`, `SCAN_RAMS = 1`.

The multiplier adds one partial-product row per stage. Once row k is added,
product bits 0..k are final and only feed the unused lower half, so each stage
keeps just 16 running-sum bits, next to the skewed operands. That makes 648
flip-flops. The CORDIC registers x, y and z in each of its 16 stages, 768
flip-flops in all. Its arctangent constants are computed when the design is
elaborated: pi/4 for stage 0, and for stage i the series
atan(2^-i) = sum of (-1)^n 2^(-i(2n+1))/(2n+1), scaled by 2^15/pi and rounded.
The RAM sizes match the LUT RAMs and 4-kbit BlockRAMs of XC4000/Virtex-class
parts.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/scan_pkg.sv \
          tb/tb_scan_top.sv --top-module tb_scan_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_scan_ff` | random comparison with a reference model; a 3-stage chain shifts while set and enable are held |
| `tb_scan_addr_gen` | start values of both session kinds; a scan-in session ends at 0 |
| `tb_scan_lutram` | a 16x3 RAM: the old contents leave in the stated order while a new image enters |
| `tb_scan_bram` | a 16x4 BlockRAM between testbench flip-flops, driven by the real counter: scan-out order, scan-in placement including the output register, round trip |
| `tb_bram_readback_shadow` | the output value survives a readback that corrupts the register |
| `tb_ext_mem_guard` | read latency, a held write, buffered in-flight reads, no write during scan |
| `tb_cnt_scan` | counting, and 300 scan-out/scan-in exchanges |
| `tb_mult_scan` | a stream of random products with latency check, paused mid-stream (described below) |
| `tb_cordic_scan` | a stream of random rotations, compared bit-exactly with an independent model and roughly with sin/cos, paused the same way |
| `tb_scan_top` | the whole wrapper at default sizes (5548-bit chain), described below |
| `tb_scan_top_ffonly` | `SCAN_RAMS = 0`: a readback corrupts the BlockRAM output register, then the flip-flops are exchanged 20 times while garbage user writes to both RAMs are ignored. The user keeps seeing the old output through the shadow |

The two pipeline testbenches pause the stream as a debugger would:

1. a loopback scan (`scan_out` fed back into `scan_in`) reads the state and
   leaves it unchanged. The last stage seen in the stream must match the
   outputs;
2. a changed image is scanned in, and the change must show on the outputs;
3. the original image is scanned back, and every result still in flight must
   come out correct.

`tb_scan_top` runs the full design:

1. user operation fills the RAMs and runs the counter;
2. a device readback corrupts the BlockRAM output register (the testbench
   forces it). The user must keep seeing the old value until the next read;
3. a scan-out is started while an external write waits and a read is in
   flight;
4. a random image is scanned in, scanned out again and compared, and scanned
   in once more. The pipelines run during the cycle between sessions, so the
   comparison covers the RAMs and the counter;
5. every user port is checked against the image. The counter counts on, and
   the multiplier and CORDIC compute correctly again.

It counts each mechanism (both session kinds, the first-cycle write
inhibit, the post-session write, the write-enable tri-state, the held write,
the buffered read, the readback substitution) and fails if one never
happened. It runs in well under a second.

Because the simulator has only two states, the testbenches write or reset
everything they later read.

## Where this RTL makes its own choices

The scan scheme fixes what each cell must do: the mux, OR and AND gates, the
FIFO behaviour of RAMs, the one-behind BlockRAM writes with the first write
inhibited, the converters and the output-register capture, the shared
counter, and the guarded external memory. These points are this design's own
choices:

* **Session timing.** A session has a fixed length, and scan-in uses a start
  offset in the counter. An arbitrary-length session, or one that sends the
  chain straight back to `scan_in`, does not restore RAM contents unless the
  chain length is a multiple of every RAM size.
* **LUT RAM word shifting.** For a multi-bit LUT RAM, the word shifts one bit
  per visit.
* **BlockRAM slot timing.** This covers the post-session write, the path that
  restores the output register through the RAM, and write-first port
  behaviour.
* **Flip-flop details.** The set/reset is synchronous.
* **Chain order.** Elements are chained in the order shown above.
* **Scan ports.** Only the address generator takes `scan_mode`. The cells and
  the example circuits take `scan_en`, `scan_in` and `scan_out`, and the RAM
  cells also take the shared counter value.
* **External memory interface.** It is a fixed-latency synchronous SRAM with
  one request per cycle, a one-entry request register and a small read FIFO.
  Requests during scan are dropped.
* **Readback shadow.** With full scan, the substitution is released by the
  next read or by a scan. With `SCAN_RAMS = 0` a scan leaves the output
  register untouched, so only the next user read releases it.
* **Example user design.** The RAMs and memory port of `scan_top` are only an
  example. The counter, multiplier and CORDIC match only the size and function
  of the reference circuits. Their internal structure is this design's own,
  so the multiplier has 648 flip-flops rather than the 615 of its reference.
  Number formats and chain order are also this design's own.
* **Register outside the chain.** The readback shadow register is not on the
  chain. Outside a readback it only mirrors the output register. In full scan
  a scan releases it. In the flip-flop-only configuration it keeps the value
  from before the readback, which the device readback has already captured.
