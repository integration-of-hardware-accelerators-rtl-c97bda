# Shared hardware accelerators for a multiprocessor video encoder

This RTL is the hardware side of an MPEG-4 Simple Profile video encoder that runs
on several processors. One master CPU and a few slave CPUs encode QCIF frames
(176x144 pixels) in parallel, each slave working on its own slice of
macroblocks. Two fixed-function accelerators take over the heaviest work of the
slaves:

* a **motion-estimation (ME) accelerator**. It does a full search of a 16x16
  macroblock in a 48x48 reference area and returns the best SAD, the motion
  vector and the best-matching macroblock.
* a **DCT-Q-IQ-IDCT (DQ) accelerator**. It transforms and quantizes the six
  8x8 blocks of a macroblock, then inverse-quantizes and inverse-transforms
  them again.

All parts talk over one **HIBI** bus segment. HIBI is an OR-resolved bus with a
FIFO interface at every attached block. The accelerators were not designed for
this bus or for being shared, so the design adds four things:

| block | module | role |
|---|---|---|
| HIBI wrapper | `hibi_wrapper` | one per attached block: FIFOs, round-robin bus access, address decoding |
| DQ wrapper | `dq_wrapper` | turns HIBI messages into the DQ's sample/column handshakes and back |
| ME wrapper | `me_wrapper` (+ `me_addr_handler`, `me_mb_loader`, `me_result_block`) | takes a 3-word request, fetches the pixels from SDRAM itself (a small DMA), reorders the results |
| resource manager (RM) | `resource_manager` | a hardware mutex: hands each accelerator to one CPU at a time, queues or refuses the others |
| hardware monitor | `hw_monitor` | counts busy cycles of the wrappers and accelerators, read over HIBI |

`video_encoder_soc` is the top level. It instantiates all of these on one HIBI
segment. Some parts are outside the design: the processors, the SDRAM
controller and the two accelerators. Their ports are top-level ports. The
testbenches connect behavioural stand-ins for them.

## The system

```
   master CPU   slave CPU 1 .. NUM_SLAVES   SDRAM controller        (outside: top-level ports)
       |              |                           |
  +----+----+    +----+----+                 +----+----+
  |  HIBI   |    |  HIBI   |                 |  HIBI   |
  +----+----+    +----+----+                 +----+----+
       |              |                           |
  =====+==============+===========================+======+==========+===========+======  OR bus
                                                        |          |           |
       +-----------+----------+                    +----+----+ +---+----+ +----+----+
       |  HIBI     |  HIBI    |                    |  HIBI   | | HIBI   | |  HIBI   |
       +----+------+----+-----+                    +----+----+ +---+----+ +----+----+
            |           |                               |          |           |
      resource mgr   ME wrapper -- ME accelerator    hw_monitor  DQ wrapper -- DQ accelerator
                                  (outside)             ^                     (outside)
                                                        |  busy of both wrappers and both accelerators
```

Agent numbering on the segment (this is also the round-robin order): CPU 0
(master), CPUs 1..NUM_SLAVES, then the SDRAM controller, RM, ME wrapper,
monitor and DQ wrapper.

HIBI addresses (`hibi_pkg`). Each block owns a 512-word window. The low 9 bits
are the block's own to interpret.

| target | address | low bits |
|---|---|---|
| SDRAM (16 MB) | `0x0000_0000` | 22-bit word address |
| resource manager | `0x0100_0000` | type, release, blocking |
| ME wrapper | `0x0100_0200` | 0 request, 1 SDRAM replies, 2 image width |
| DQ wrapper | `0x0100_0400` | ignored |
| hardware monitor | `0x0100_0600` | ignored |
| CPU k | `0x0100_1000 + k*0x200` | free for the CPU |

A typical accelerated macroblock from a slave's point of view:

1. Ask the RM for the ME (blocking). The reply carries the ME wrapper's address.
2. Send the ME wrapper the SDRAM addresses of the current macroblock and of
   the reference area, plus its own return address. The ME wrapper fetches
   640 words from SDRAM, runs the search and sends back 66 words.
3. Release the ME at the RM.
4. Ask the RM for the DQ. Send the DQ wrapper the two return addresses, a
   control word and 384 samples. Receive 6 x (64 + 64) results and one
   zero-check word.
5. Release the DQ. Each wrapper can instead release itself as soon as its
   input has been taken (`USE_SELF_REL`).

## HIBI segment (`hibi_wrapper`)

The agent (the attached block) is always the active side. It writes words into
the wrapper's TX FIFO: `agent_we_in`, with `agent_av_in` = 1 marking an address
word. It reads the RX FIFO, which is first-word-fall-through:
`agent_empty_out` = 0 means the word is valid, and `agent_re_in` takes it.
Address words are delivered to the agent too, because several blocks use the
low address bits.

Bus behaviour, cycle by cycle:

* **Drive.** Every wrapper drives `bus_*_out`, and the top ORs them into the
  `bus_*_in` that all wrappers see. A wrapper that does not own the bus drives
  zeros. A word is on the bus when `bus_comm` is not `CMD_IDLE`.
* **Arbitration.** Distributed round robin. Every wrapper counts the same
  `turn`, which advances in each cycle in which nobody holds `bus_lock`. When
  `turn` equals a wrapper's `ID` and its TX FIFO is not empty, that wrapper
  takes the bus in the next cycle. It holds `bus_lock` for one transfer, one
  word per clock.
* **End of a turn.** The owner lets go of the bus in three cases: its TX FIFO
  runs dry, the next word is a new address, or the target raises `bus_full`.
  If it was cut off in the middle of a transfer, it sends the address word
  again first the next time it gets the bus. A receiver may therefore see
  the same address word more than once.
* **Decoding.** A wrapper takes an address word whose bits above `ADDR_OFS_W`
  match its `ADDR_BASE`, and all data words after it until the next address
  word. If its RX FIFO is full it raises `bus_full_out` in the same cycle.
  The sender sees this combinationally, keeps the word and retries later.

An uncontended 8-word transfer to a ready receiver takes 9 bus cycles: the
address word plus one cycle per data word. An assertion checks that at most
one wrapper drives a word in any cycle.

## Resource manager (`resource_manager`)

The RM takes two-word messages. The address word is:

```
 31            9 8          2    1        0
+---------------+------------+---------+----------+
| RM base       | type (7 b) | release | blocking |
+---------------+------------+---------+----------+
```

For a request, the data word is the requester's return address. For a
release, it is the address of the accelerator being released.

* Each **type unit** (one per type, `NUM_TYPES`) has a FIFO of waiting return
  addresses. It also has one reserve register per accelerator instance
  (`SLOT_COUNT`, with the addresses in `RES_ADDR`). It raises write-enable
  when its FIFO is not empty and a slot is free.
* A **blocking** request goes into its type FIFO. If that FIFO is full, it is
  refused.
* A **non-blocking** request is refused unless it can be served at once: the
  FIFO is empty and a slot is free.
* A request for an unknown type is refused.
* **Refusals** go to a separate FIFO of return addresses. They are answered
  with a zero data word.
* A **release** takes effect in the cycle its data word arrives.
* The **sender** visits the type units round robin. On a grant it reserves the
  lowest free slot and sends {return address, accelerator address}. Only when
  no type unit is ready does it send a pending zero reply.

With HIBI free, the grant's address word leaves 2 cycles after the request's
data word was read.

## DQ wrapper (`dq_wrapper`)

Input: first a HIBI address word, then three configuration words:

1. return address for the quantized results,
2. return address for the IDCT results,
3. a control word: bits 4..0 = QP, bit 5 = intra.

After these come 384 samples, one 9-bit sample in the low bits of each word.
The samples are the six 8x8 blocks: four luminance, then two chrominance.
Address words in the middle are ignored, so the CPU may split the data into
any number of transfers. The two addresses are kept in small FIFOs, so the
next macroblock can be loaded while results are still leaving.

Towards the accelerator:

* A column of eight samples is started only while `dct_ready4column` is high.
* One cycle after the 64th sample of a block, `loadQP` is pulsed together with
  QP, intra, and chroma (blocks 4 and 5). The accelerator allows up to 30
  cycles for this.

Results go into two 64-entry FIFOs. The wrapper pulses `quant_ready4column` or
`idct_ready4column` for one cycle when a FIFO has room for eight values and no
column is already on its way.

Output order, for each block: the quantized address and its 64 values, then
the IDCT address and its 64 values. All values are sign-extended to 32 bits.
After the sixth quantized block comes one more word, the zero check: bit b is
1 when block b quantized to all zeros. The CPU can then skip entropy coding
of those blocks.

## ME wrapper (`me_wrapper` and its three parts)

The ME accelerator wants its input as 128-bit words of 16 pixels:

* the 16x16 current macroblock (16 words),
* then the reference area, as three vertical slices of 16x48 pixels.

That makes 10 macroblocks, 160 input words in all. The wrapper fetches all of
this itself, so a CPU sends only three words:

* the SDRAM address of the current macroblock,
* the SDRAM address of the top-left corner of the reference area,
* the return address for the results.

**Address handler** (`me_addr_handler`). Stores the three addresses in FIFOs
and outputs the address a sub-block selects:

* reference address + 0, 4 or 8 words for slice 0, 1 or 2,
* the current-macroblock address,
* the *base* of the SDRAM controller (the address bits above `IP_ADDR_W`),
* the result address.

**Macroblock loader** (`me_mb_loader`). Speaks the SDRAM controller's read
protocol as this design defines it. All words go to the controller's HIBI
address, and replies come back to ME-wrapper offset 1.

1. Request a read port by sending the return address.
2. The reply is the port's HIBI address, or 0 if no port is free. On 0 the
   request is repeated (`port_retries_out` counts the repeats).
3. Configure the port with four words:
   * source address,
   * width = 4 words,
   * height = 16 or 48 rows,
   * line offset = image width in words − 4.
4. Receive the pixels. Four 32-bit words are packed into one 128-bit word.

The image width starts at 176 pixels (QCIF). A word sent to offset 2 changes
it at run time. SDRAM words are little-endian, so the leftmost pixel is in
bits 7..0. On the 128-bit bus the leftmost pixel is in bits 127..120.
`BIG_ENDIAN` flips the byte order of the 32-bit words.

**Result block** (`me_result_block`). When the ME announces a result, the
result block sends the return address, then a SAD word (16-bit SAD,
zero-extended), then a motion-vector word ({x, y} as two signed bytes in bits
15..0).

The best match arrives from the ME as 16 blocks of 4x4 pixels, 128 bits
each. The result block turns them into pixel rows with a 4x4 matrix of 32-bit
registers:

* Each 128-bit word fills one column of the matrix. Its first 32-bit quarter
  goes to the top register.
* When four words have arrived, the matrix holds four pixel rows of 16
  pixels. They are read out row by row.

This repeats four times, giving 64 words of four pixels each.

The macroblock loader and the result block share the HIBI output through an
arbiter. The block that starts first keeps the output until its transfer ends.
If both start in the same cycle, the result block wins.

## Hardware monitor (`hw_monitor`)

`NUM_SIG` counters of 32 bits. In the top level they count the cycles in which
each of these is busy: the DQ wrapper, the DQ accelerator, the ME wrapper and
the ME accelerator. Counters saturate at all ones.

Commands are data words sent to the monitor. Bits 1..0 select the command:

| bits 1..0 | command |
|---|---|
| 0 | clear |
| 1 | start |
| 2 | stop |
| 3 | report |

After a report command, the next data word is a return address. The monitor
then sends that address followed by the counter values. The values are
sampled in the cycle in which the return address arrives.

## What is outside the design, and what is this design's own

Not included:

* the processors (Nios II, with their HIBI DMA, timers and memories),
* the SDRAM controller, which is an existing block of the platform,
* the two accelerators,
* the off-chip memories and the PLL.

The processors, the SDRAM controller and the accelerators connect through
top-level ports of `video_encoder_soc`. The off-chip memories sit behind the
SDRAM controller. The design has a single clock input where the PLL would be.

The DQ accelerator was a third-party soft core and the ME accelerator a
netlist. Only their interfaces are known. The testbench models in `tb/`
implement those interfaces:

* `dq_accel_model` uses an identity "transform" with H.263-style
  quantization, which is enough to check data order and parameter handling.
* `me_accel_model` does a real full search.

Choices made here where the original design gives no detail:

* the cycle-level HIBI protocol, the command codes, and re-sending the address
  word after losing the bus,
* the address map and the ME wrapper's offsets,
* the SDRAM controller's port protocol words,
* the DQ control-word layout and the zero-check bit order,
* the DQ result order (block by block, quantized then IDCT),
* the SAD and motion-vector word layouts,
* the monitor's command encoding,
* all FIFO depths,
* the RM's behaviour for unknown types and for a full null FIFO.

Each module's opening comment lists what it takes from the original
description and what it chooses.

How far to trust it:

* The wrappers' logic, the RM and the monitor are checked against
  independent reference calculations, including stalls, split transfers and
  contention.
* The accelerator handshakes are built from the signal names and their
  described order only. Before connecting the real cores, check the cycle
  timing of `dct_ready4column`, `loadQP`, `*_stored` and `target_ready`
  against their data sheets.
* The HIBI used here is a reduced version of the original network: one
  segment, round-robin access only (no priority-based arbitration), no
  bridges, and one clock domain.
* The original system gave the accelerators a clock of their own. Here the
  wrappers and the accelerator ports run on the one system clock; a
  different accelerator clock needs clock-domain crossings at those ports.

The system uses CPU release by default (`USE_SELF_REL = 0`, the wrappers'
default). `me_repeat_delivery_out` is tied to 0: the wrapper always accepts a
result at once, so it never asks the ME to repeat it.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_video_encoder_soc` | Whole top at default parameters (master + 2 slaves). Two slaves compete for the ME: one waits in the RM queue. The master's non-blocking request is refused. Each slave runs ME (SAD, motion vector and 64 best-match words against a full search) and DQ (768 results and the zero word). The first SDRAM port request is refused and retried. The monitor report must equal the busy cycles counted by the testbench. Every mechanism is counted and must occur. |
| `tb_hibi_wrapper` | 4 agents exchange random-length transfers while receivers stall at random. Checks that no word is lost, doubled or misrouted, that order is kept per source, and that an uncontended 8-word transfer takes at most 10 bus cycles (9 measured). |
| `tb_resource_manager` | Two instances of one type and one of another. Grants, queueing, arrival order, null replies (no slot free, unknown type, full FIFO), releases, grant latency. |
| `tb_dq_wrapper` | 3 macroblocks (intra, inter, mostly zero) with random HIBI gaps and full. Checks every output word and the self-release. |
| `tb_me_wrapper` | Two copies of `me_wrapper_bench` run side by side, each with 3 HIBI agents (CPU, SDRAM model, ME wrapper). One uses little-endian memory and burst replies. The other uses big-endian memory and single data mode: every SDRAM word arrives as its own transfer, at irregular times. Each sends two requests, the second after changing the image width to 352. Checks the full result, the port retry, the self-release, and that the input phase takes at least 640 cycles. One QCIF operation takes 944 cycles in burst mode and 4124 in single data mode. |
| `tb_hw_monitor` | Random activity signals. Counts, pause while stopped, clear, report address and report length. |

To run the top-level test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hibi_pkg.sv rtl/me_pkg.sv rtl/sync_fifo.sv rtl/hibi_wrapper.sv \
  rtl/me_addr_handler.sv rtl/me_mb_loader.sv rtl/me_result_block.sv rtl/me_wrapper.sv \
  rtl/dq_wrapper.sv rtl/resource_manager.sv rtl/hw_monitor.sv rtl/video_encoder_soc.sv \
  tb/cpu_bfm.sv tb/sdram_ctrl_model.sv tb/me_accel_model.sv tb/dq_accel_model.sv \
  tb/tb_video_encoder_soc.sv --top-module tb_video_encoder_soc -o sim
./obj_dir/sim
```

The other testbenches build the same way with their own files and
`--top-module`. Adding `-y rtl -y tb +libext+.sv` lets Verilator find the
modules a testbench needs by itself.

The top-level test runs in well under a second. In it, one ME call keeps the
ME wrapper busy for about 1570 cycles and one DQ macroblock keeps the DQ
wrapper busy for about 1530 cycles. That is about 3 ms each per QCIF frame
(99 macroblocks) at 50 MHz.

## Changing it

* **More slaves:** set `NUM_SLAVES`. The CPU ports are packed arrays indexed
  0..NUM_SLAVES, and the segment grows by itself.
* **More accelerator instances:** raise `MAX_SLOTS` and `SLOT_COUNT` of
  `resource_manager` and list the addresses in `RES_ADDR`.
* **Another image width:** write the width in pixels to ME-wrapper offset 2.
* **Self-release:** set `USE_SELF_REL = 1` on the top. The RM addresses are
  already derived from `RM_BASE` and the type numbers.
