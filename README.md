# PDTC: a Program & Data Trace Checker

Radiation can flip bits in a processor's data and in its control flow. Software
hardening handles most data errors: every variable is kept in several copies and
voted on. It is weak against control-flow errors, such as a corrupted branch
target, a wild memory access that ends in an exception, or a main loop that
silently hangs. The PDTC closes that gap from outside the processor. It listens
to the processor's debug trace port, which already reports every branch target
and any value the program chooses to export. From that trace it checks, in
parallel with the program and without slowing it down:

* **where the program runs.** Every traced PC must lie in one of up to eight
  allowed code regions.
* **whether the main loop keeps coming round.** The loop's first instruction
  must be traced again within a set number of cycles. This is the *loop
  watchdog*.
* **the hardened results.** The program exports each result as a control value
  and three data copies. The control value must equal a golden value, and the
  three copies must all be equal.

Any failed check sets a sticky error flag. Software reads the flags and clears
them through a small APB register block.

This RTL implements the checker described by Peña-Fernandez, Lindoso, Entrena
and Garcia-Valderas in "Error Detection and Mitigation of Data-Intensive
Microprocessor Applications using SIMD and Trace Monitoring". That description
gives the checker's architecture and what each check does. It does not give
bus protocols, widths, encodings or timing. Everything of that kind here is
this implementation's own choice, and is marked as such below and in each
file's header.

## How the software side uses it

The checker makes sense only next to the software technique it was built for.
The processor has a 128-bit SIMD unit. Each protected 32-bit variable becomes
one SIMD register of four 32-bit lanes:

```
 127        96 95         64 63         32 31          0
+-------------+-------------+-------------+-------------+
| lane 3:     | lane 2:     | lane 1:     | lane 0:     |
| copy 2      | copy 1      | data        | control     |
+-------------+-------------+-------------+-------------+
```

(`pdtc_pkg::hardened_word_t`). A single SIMD instruction runs the same
operation on all four lanes. Lanes 1 to 3 therefore compute the result three
times, and software can correct a single upset by majority vote. Lane 0 starts
from a fixed *control* value. Its result depends only on the sequence of
operations, so it can be known in advance. A wrong control result means the
wrong instructions ran, including the case where one bad SIMD instruction
corrupted all three data lanes the same way.

The program exports what it wants checked by writing to stimulus ports of the
processor's instrumentation trace unit. The checker gives each port a meaning.

| ITM port | register | check |
|---|---|---|
| 0 | golden control value | kept until rewritten |
| 1 | control value | compared with the golden value on every write |
| 2, 3, 4 | D1, D2, D3 | once all three have been written since the last check: D1≠D2, D1≠D3, D2≠D3 |

The port numbers are parameters of `pdtc` and `data_checker`:
`DUAL_REF_PORT`, `DUAL_CHK_PORT` and `TRIPLE_BASE_PORT`. To check one hardened
result, the program writes the golden lane 0 to port 0, its own lane 0 to port
1 and lanes 1 to 3 to ports 2 to 4. The testbench `tb_pdtc` does this for
every element of a hardened matrix multiplication.

## Structure

```
 8-bit trace port                                             APB3
       |                                                        |
+------v-----------+  (id, byte)  +----------------+   +-------v-------+
| tpiu_deformatter |------------->| trace_decoder  |   |  pdtc_regs    |
|  frames -> bytes |              |  ptm_decoder --+-->| config, status|
+------------------+              |  itm_decoder --+-+ +---+-------^---+
                                  +----------------+ |     | cfg   | event pulses
                   PC                                |     v       |
        +--------------------------------------------+--> program_checker
        |                                            |      range_checker (x8)
        |                                            |      loop_watchdog
        |                                            +--> data_checker
        |                                                   dual_value_checker
        |                                                   triple_value_checker
```

| module | job |
|---|---|
| `pdtc` | top; wires the blocks and brings out the sticky flags `err_range`, `err_watchdog`, `err_control` and `err_triple`, their OR `error`, and one-cycle `event_pulse`s |
| `tpiu_deformatter` | aligns on sync packets; unpacks 16-byte trace port frames into bytes tagged with a 7-bit source ID |
| `trace_decoder` | sends bytes of `PTM_ID` to `ptm_decoder` and bytes of `ITM_ID` to `itm_decoder`; drops all other sources |
| `ptm_decoder` | program trace packets → executed PC |
| `itm_decoder` | instrumentation packets → (port, 32-bit value) |
| `program_checker` | `range_checker` plus `loop_watchdog` on each PC |
| `data_checker` | the port registers above, plus `dual_value_checker` and `triple_value_checker` |
| `pdtc_regs` | APB3 register block, sticky status and event counter |
| `pdtc_pkg` | shared types, the event encoding and the register map |

## The trace, byte by byte

This is the part most likely to need adapting to a real system. The packet
formats come from the usual ARM CoreSight protocols. They are **reduced
subsets**, written from general protocol knowledge, and have not been checked
against real processor output.

**Trace port frames** (`tpiu_deformatter`). The port is 8 bits wide and is
sampled on the checker clock, at most one byte per clock. The bytes `FF FF FF
7F` form a sync packet. The first frame starts right after it, and any bytes
before the first sync are dropped. A frame is 16 bytes long:

* **Even bytes 0–14.** If bit 0 is 1, the byte is an ID change and the new ID is
  `bits[7:1]`. If bit 0 is 0, the byte is data, and its bit 0 comes from the
  auxiliary byte.
* **Odd bytes.** Always data.
* **Byte 15.** The auxiliary byte. Bit *k* belongs to byte 2*k*.

For an ID change, the auxiliary bit sets when the new ID applies. If it is 0,
the new ID applies at once. If it is 1, it applies after the next byte, and that
byte still belongs to the old ID. The current ID carries over from one frame to
the next. A `0xFF` where a frame would begin starts a new sync packet. Halfword
syncs and triggers are not supported.

A frame is unpacked during the 15 clocks after its last byte, while the next
frame is being received. Full-rate input is therefore sustained. An assertion
flags an overrun.

**Program trace** (`ptm_decoder`, ARM state only):

* **A-sync.** `00 … 00 80`. Resynchronises and gives no PC.
* **I-sync.** `08 A0 A1 A2 A3 INFO`. Gives a full 32-bit PC, little endian. Bit
  0 of A0 (Thumb) is dropped.
* **Branch address.** First byte has bit 0 = 1. Bit 7 of each byte says another
  byte follows, up to 5 bytes. B0[6:1] = PC[7:2], B1 = PC[14:8], B2 = PC[21:15],
  B3 = PC[28:22], B4[2:0] = PC[31:29]. Bits that are not sent are kept from the
  previous PC.
* **Anything else** is a one-byte packet and is ignored. This covers atoms,
  for example. Exception bytes, cycle counts and context IDs are not handled.

**Instrumentation trace** (`itm_decoder`):

* **Header.** `H[1:0]` is the payload size: 1, 2 or 4 bytes. `H[2]` is 0 for a
  software port. `H[7:3]` is the port number.
* **Payload.** Little endian, zero-extended to 32 bits.
* **Skipped packets.** Hardware-source packets are skipped. So are protocol
  packets (`H[1:0]=0`) and their continuation bytes, which carry bit 7 set.

## Program checks

**Ranges.** `range_checker` holds `N_RANGES` = 8 regions. Each has an enable
bit and an *inclusive* `[low, high]` pair. For each PC it produces one
"out of range #i" flag per region. `range_err` pulses when the PC lies outside
every enabled region. With no region enabled, nothing is flagged. The last PC's
per-region flags can be read back (`LAST_OOR`).

**Loop watchdog.** The watchdog counts checker clock cycles. A traced PC equal
to `WD_LOOP_PC` resets the count. When the count reaches `WD_TIMEOUT`,
`wd_err` pulses once, and the counter then stops until the loop PC is seen
again. A hang therefore gives exactly one event, and it is detected at most
one loop time late. A timeout of 0 disables expiry. Counting starts when the
watchdog is enabled. There is one watchdog, as in the original architecture.

## Registers (APB3, 8-bit byte address, 32-bit data)

| addr | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] range check enable, [1] watchdog enable, [2] data check enable |
| 0x04 | STATUS | rw1c | sticky events: [0] range, [1] watchdog, [2] control, [3] triple |
| 0x08 | RANGE_EN | rw | one enable bit per region |
| 0x0C | WD_LOOP_PC | rw | loop start address |
| 0x10 | WD_TIMEOUT | rw | maximum loop time, clock cycles |
| 0x14 | LAST_PC | ro | last decoded PC |
| 0x18 | EVENT_CNT | ro | number of error events since reset |
| 0x1C | WD_COUNT | ro | current watchdog count |
| 0x20 | LAST_OOR | ro | per-region out-of-range flags of the last PC |
| 0x80+8i | RANGE_LO[i] | rw | region *i* low bound |
| 0x84+8i | RANGE_HI[i] | rw | region *i* high bound |

* **Wait states.** There are none: `pready` is always 1.
* **Errors.** Unmapped addresses answer with `pslverr`.
* **Event against clear.** An event in the same cycle as a write-1-to-clear
  wins, so the flag stays set.
* **Reset.** Synchronous and active low (`rst_n`). It clears everything,
  including all enables.

## Timing

All numbers are in checker clocks.

* **Trace port.** A byte in a frame leaves the deformatter 1 to 15 clocks
  after the frame's last byte.
* **Decoders.** A PC or ITM write leaves the decoder 1 clock after the last
  byte of its packet.
* **Range check.** `range_err` / `event_pulse[0]` follows 1 clock after the PC.
* **Data checks.** A control or triple error pulses 2 clocks after the
  completing ITM write.
* **Flags.** `err_*` and `error` follow their pulse by 1 clock.

From the last port byte of the frame that carries an illegal PC to the range
event takes at most 17 clocks. `tb_pdtc` checks this bound.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_RANGES` | 8 | original architecture (eight range checkers) |
| `PTM_ID`, `ITM_ID` | 1, 2 | chosen; must match the trace IDs software programs into the trace units |
| `DUAL_REF_PORT`, `DUAL_CHK_PORT`, `TRIPLE_BASE_PORT` | 0, 1, 2 | chosen |

The data width (32-bit integers) and the 4×32-bit lane layout follow the
original method. All other widths are chosen: the 32-bit watchdog counter,
7-bit IDs and 5-bit port numbers.

## Where this departs from, or goes beyond, the original description

* **Chosen interfaces.** The trace port width, the frame and packet subsets,
  the APB3 bus, the register map, the ITM port assignment, the sticky
  write-1-to-clear flags and the event counter are all this design's own
  choices. The original says only that the checker has configuration and trace
  interfaces, configurable range and watchdog registers, and data registers
  tied to dual and triple checks.
* **Golden value.** The golden control value arrives through the trace (port
  0), not through the register bus. The benchmark computes it at run time.
* **Checking rules.** Inclusive range bounds, "no region enabled means no range
  check", a counter that stops after an expiry, and a triple check that waits
  for all three copies are interpretations. The original text does not settle
  them.
* **One watchdog.** Only one loop watchdog is built. The original text once
  mentions "main loop(s)".
* **Around the checker.** The processor, its SIMD unit, its trace units
  (program trace, instrumentation trace, trace port formatter) and the FPGA
  configuration scrubber are outside this design. The testbenches model the
  processor's trace output.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| testbench | what it exercises |
|---|---|
| `tb_tpiu_deformatter` | random multi-source byte runs packed by a formatter model (`tb/trace_port_pkg.sv`), with both ID-change forms, sync packets between frames and garbage before the first sync; in-order check of every byte and its ID |
| `tb_trace_decoder` | encoder for I-sync, 1–5-byte compressed branches, atoms, A-sync; ITM 1/2/4-byte writes, hardware and protocol packets; random interleaving; exact one-clock output timing |
| `tb_range_checker` | random regions, PCs on and around the bounds, disabled regions |
| `tb_loop_watchdog` | cycle-exact reference model; on-time loop, hang, re-arm, disable |
| `tb_program_checker` | both checks together on a program model |
| `tb_dual_value_checker`, `tb_triple_value_checker` | random values with single and double upsets; pairwise flags |
| `tb_data_checker` | golden/control and triple exports in varying order, upsets in each lane |
| `tb_pdtc_regs` | every register, `pslverr`, sticky status, clear vs. event race |
| `tb_pdtc` | the whole checker at default parameters, driven through the trace port and APB (details below) |

`tb_pdtc` runs a hardened matrix multiplication. The matrices are int32x4
lanes with random data and random control values. It first runs 8×8 and
injects one error of each kind: an upset data lane, an upset copy, an upset
control lane, a jump outside the code, and a hung loop. It checks each flag and
clears it over APB. It then runs 8×8, 16×16, 32×32, 64×64 and 128×128, two
loop iterations each, with one injected upset per size. These are the matrix
sizes the method was evaluated with. The test fails if any of the four error
mechanisms never fires, or if either form of trace ID change is never used.
It simulates about 1.4 M clocks in a few seconds.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pdtc_pkg.sv tb/trace_port_pkg.sv tb/tb_pdtc.sv --top-module tb_pdtc
./obj_dir/Vtb_pdtc
```

Replace `tb_pdtc` with any other testbench name. `tb/trace_port_pkg.sv` is
needed only by `tb_tpiu_deformatter` and `tb_pdtc`. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/pdtc_pkg.sv rtl/pdtc.sv`.

**How far to trust it.** The checking logic is small and is tested against
independent models, including cycle-exact timing. The trace-side protocol
subsets are the weak point. They are consistent between the RTL and the
testbench models, but they come from protocol knowledge rather than from
captured processor trace. Check them against real trace before relying on
them.
