# CSHIA: PUF-keyed code and data authentication on an AHB bus

A small embedded processor usually trusts whatever it reads from external
memory. CSHIA takes that trust away without changing the processor. It sits
in the processor's AHB master port. Every 256-bit memory line the processor
reads (a *SEC Line*, one cache line of eight 32-bit words) is first checked
against a 64-bit keyed tag, the *PTAG*. Only then does the processor see the
line. A line the processor has modified gets a new PTAG before it goes back
to memory.

The tag key never leaves the chip and is never stored. After each reset it
is derived again from physically unclonable functions (PUFs). So a memory
image tagged on one chip is worthless on another. An attacker who changes
code or data in external memory cannot produce matching tags.

This repository holds synthesizable SystemVerilog for the chassis: the bus
handler, the security engine with its SipHash-2-4 tag generator and key
derivation, the PTAG memory management unit and the on-chip PTAG memory. It
also holds self-checking testbenches for each block and for the whole
chassis at full size. The PUFs with their fuzzy extractor and the anti-replay
Merkle-tree controller are not included. They connect through ports, as
described below.

```
 processor AHB master ──► bus_hdlr ──► AHB bus (arbiter, SDRAM, peripherals)
                            │  ▲
             ptag_sec_req_t │  │ ptag_sec_val_t
                            ▼  │
                          sec_eng ◄── fe_r[4], fe_valid      (fuzzy extractor)
                          (ptag_gen)──► tree_req / tree_resp (Merkle-tree control)
                            │
                          pmmu ──► ptag_mem  line PTAGs, 18816 x 64 bit
                               ──► ptag_mem  tree PTAGs,   8192 x 64 bit ◄── tree_m* port
```

## The PTAG and the key

A PTAG is `SipHash-2-4(K, address || line)`. Here `K` is a 128-bit key,
`address` is the 32-byte-aligned line address zero-extended to 64 bits, and
`line` is the 256-bit SEC Line. The message is five 64-bit words: the
address, then line bits [63:0], [127:64], [191:128] and [255:192]. Each word
is taken little-endian in the usual SipHash way. Because the address is part
of the message, a valid line moved to another address no longer matches.

`ptag_gen` computes one tag in **10 cycles** from `start` to `done`:

| Cycle | Work |
|---|---|
| 1 | Load the state from the key. |
| 2–7 | Absorb the five message words and the constant length block, two SipRounds per cycle. |
| 8–9 | Finalisation, four SipRounds over two cycles. |
| 10 | Register the tag and raise `done`. |

The key is derived from four 64-bit strings `r1..r4`. These come out of the
fuzzy extractor, stable copies of PUF responses. The engine uses its own tag
generator twice, with constants in place of an address:

```
K1 = SipHash(key = r4||r3, address = C1, line = 0 || r2 || r1)
K2 = SipHash(key = r2||r1, address = C2, line = 0 || r4 || r3)
K  = K2 || K1          (K1 is SipHash k0)
```

This design uses C1 = 1 and C2 = 2. Real line addresses are multiples of
32, so they can never collide with these constants. The key takes two tag
times (about 20 cycles) after `fe_valid`. `key_ready` then rises, and only
after that does the engine accept lines.

## Bus handler: a buffer the processor cannot bypass

To the processor, `bus_hdlr` is the bus. It parks `hgrant` high, accepts
every address phase, and stretches the data phase with `hready` until it can
answer. To the bus, it is the only master behind that port.

The handler keeps a buffer of `NLINES` = 4 SEC Lines (128 bytes). Each entry
holds three flags:

- `valid`: the entry holds a line.
- `verified`: the security engine has accepted the line.
- `dirty`: the processor has written into the line.

A processor transfer is completed from the buffer only when its line is
present *and verified*. Reads and writes work the same way. Byte and
halfword writes are merged with big-endian lane order, as on SPARC.

The state machine:

| State | What happens |
|---|---|
| `IDLE` | Looks at the waiting processor transfer. A buffered line goes to `SERVE_LEON`. A missing line goes to `READ_GRANT`. While a check is still running, the handler stays here with the processor held. |
| `READ_GRANT` | Requests the bus. Once it owns the bus, it picks a victim entry: a free entry first, otherwise round robin. A dirty victim is sent to the engine for a new PTAG, and the handler goes to `WAIT_PTAG_WRITE`. A clean victim is dropped, and the handler goes to `READ_LINE`. |
| `READ_LINE` | Reads the line as one INCR8 burst. The complete line goes to the engine, and the state returns to `IDLE`. During enrollment it goes to `UNSAFE` instead. |
| `WAIT_PTAG_WRITE` | Waits until the victim's new PTAG is stored. |
| `WRITE_LINE` | Writes the victim back as an INCR8 burst, then returns to `IDLE`. The missing line is then fetched as usual. |
| `SERVE_LEON` | Completes processor transfers back to back while they hit verified lines. |
| `UNSAFE` | Enrollment only: waits until the line's PTAG is stored. |
| `PASS`, `PASS_DONE` | Handles an address outside external RAM (peripherals). It is sent as a single transfer of the processor's own size, without buffering or checking. |
| `HALT` | Entered when a line fails its check, or when the watchdog runs out. The processor is never answered again, and `violation` is high. Only reset leaves this state. |

The order matters here. The processor is answered only from a verified
buffer entry. A modified line leaves the chip only after its new PTAG is
stored. So a line whose check fails never reaches the processor, and memory
and PTAG memory stay consistent.

Control inputs:

- `bypass_in` wires processor and bus straight together. This is the
  unprotected baseline, kept for comparison. Set it statically.
- `log_in` enables the four activity counters in `log_out`: buffer hits,
  line fills, write-backs and peripheral passes.
- `watchdog_en_in` halts the processor if an engine answer is more than
  `WDOG_CYCLES` = 1024 cycles late.

## Security engine

`sec_eng` takes one line at a time. It uses a `ready`/`valid` request, and
its answer is a one-cycle `valid` strobe carrying `line_secure`.

| State | Work |
|---|---|
| `KEY_WAIT`, `KEY1`, `KEY2` | Derive K after reset. |
| `IDLE` | Register the request and start the tag. |
| `CALC` | Wait for the tag. For a check, read the stored PTAG through the PMMU in the same cycle the tag is ready. |
| `VALIDATE` | Compare the two tags, and answer. |
| `WRITE_PTAG` | Store the new tag, and answer "secure". |
| `WAIT_TREE` | With `MERKLE_EN` only: hand the stored PTAG to the tree controller, and wait for its verdict before `VALIDATE`. |
| `WRITE_TREE` | With `MERKLE_EN` only: store the new tag and let the tree controller update the tree. Answer once it is done. |

A check without the tree is answered in cycle 12, counting the cycle the
request is taken as cycle 1: the tag is ready in cycle 10, the stored PTAG
is read in cycle 11, and the comparison is registered. With the tree, the
controller's response time is added.

A line is secure only if both hold:

- its freshly computed tag equals the stored PTAG;
- with `MERKLE_EN`, the tree controller confirms that the stored PTAG is the
  current one.

The second condition defeats *replay*. In a replay, an attacker puts back an
old line together with its old, genuine PTAG.

Until `enroll_done`, every line is tagged, whatever the request says. Lines
outside the protected windows are reported secure without any PTAG access.
This is the same as memory the PTAG memory has no room for.

### Merkle-tree port contract

The tree controller itself is not part of this RTL. It uses these signals:

- `tree_req_out.valid` is high for one cycle.
  - With `we = 1`, it carries a newly stored PTAG, so the controller updates
    the tree.
  - With `we = 0`, it carries the PTAG just read from PTAG memory, for the
    controller to confirm.
- The controller answers with a one-cycle `tree_resp_in.done`, any number of
  cycles later. `ok` carries its verdict on checks.
- The controller reaches its own 8192-word PTAG bank through the `tree_m*`
  port of the top: `req`, `we`, word address and data, with a one-cycle read.

## PMMU and PTAG memory map

The PMMU turns a line address into a word of the line-PTAG bank:

| Window | Lines | PTAG words |
|---|---|---|
| Code, `CODE_BASE` = 0x4000_0000 | `CODE_LINES` = 2432 (76 KB) | 0 … 2431 |
| Data, `DATA_BASE` = 0x4001_3000 | `DATA_LINES` = 16384 (512 KB) | 2432 … 18815 |

This gives 18816 line PTAGs, plus 8192 tree PTAGs in a separate bank. That
makes 216,064 bytes of on-chip PTAG memory, about 36 % of the 588 KB it
protects. `covered` tells the engine whether a line has a PTAG word at all.

To place data at 0x4002_3000, for programs with more code, set
`DATA_BASE = 32'h4002_3000` and `CODE_LINES = 4480`. The line bank grows
accordingly.

## Enrollment and runtime

**Enrollment.** With `enroll_in` high at reset, the following happens:

1. The handler waits for the key.
2. It fetches every protected line, all code lines and then all data lines,
   and has each one tagged.
3. It raises `enroll_done`.

Meanwhile a processor transfer simply waits. At full size with a bus of 0–2
wait states per beat, enrolling 18816 lines took about 753,000 cycles in
simulation, around 15 ms at 50 MHz.

**Later resets.** The PTAG memory keeps its contents, so later resets run
with `enroll_in` low. The key is derived again from the same PUF strings,
and the existing PTAGs stay valid.

**Runtime.** Each buffer miss costs the following:

- bus arbitration;
- an 8-beat burst;
- about 12 cycles of checking, plus the tree controller's time;
- for a dirty victim, first a tagging round (12+ cycles) and an 8-beat write.

Buffer hits are answered with no wait state.

## Interfaces

All record types are in `rtl/cshia_pkg.sv`:

- `ahb_mst_out_t` and `ahb_mst_in_t` are the AHB master bundles. They keep
  only the signals the handler uses; there are no interrupt or scan fields.
- `ptag_sec_req_t` carries `cache_line`, `base_addr`, `valid` and `wr_ptag`.
  Word i of the line sits in `cache_line[32*i +: 32]`, and word 0 is at
  `base_addr`.
- `ptag_sec_val_t` carries `ptag`, `valid`, `line_secure` and `ready`.
- `ptag_mreq_t` and `ptag_mresp_t` carry requests to the PTAG memory and its
  read data.
- `tree_req_t` and `tree_resp_t` carry the tree requests and answers.
- `bh_log_t` holds the activity counters.

Everything uses one clock, with an active-low asynchronous reset (`rstn`).
The PTAG memory arrays are not reset, as with block RAM.

## Where this design departs from the published one, or fills gaps

- **Message layout and key constants.** The order of the SipHash message
  words and the values of C1 and C2 are this design's choice.
- **Bursts and replacement.** Lines move as INCR8 word bursts. Buffer
  replacement takes a free entry first, otherwise round robin.
- **Added states.** `PASS`/`PASS_DONE` (peripheral pass-through) and `HALT`
  are explicit states. The engine has `KEY_*` states for key derivation.
- **Enrollment start.** Enrollment is started by the `enroll_in` pin and run
  by the handler. The original has the security engine order the walk; the
  effect is the same.
- **Response to an attack.** The handler isolates the processor. It does not
  raise a non-maskable interrupt.
- **Bus responses.** Split, retry and error responses from the bus are not
  handled. The arbiter must not break an 8-beat burst.
- **Watchdog length.** The 1024-cycle watchdog length is chosen.
- **PTAG memory location.** The PTAG memory is on chip, as in the FPGA
  prototype. The PTAG cache, timestamp memory and Merkle-tree controller of
  the anti-replay extension are absent.

## Files

| File | Contents |
|---|---|
| `rtl/cshia_pkg.sv` | Types, memory map, constants |
| `rtl/ptag_gen.sv` | SipHash-2-4 tag generator, 10 cycles |
| `rtl/sec_eng.sv` | Security engine, key derivation |
| `rtl/pmmu.sv` | Address decode for the PTAG banks |
| `rtl/ptag_mem.sv` | One PTAG bank, single port, 1-cycle read |
| `rtl/bus_hdlr.sv` | Bus handler with the SEC Line buffer |
| `rtl/cshia_top.sv` | The chassis |
| `tb/tb_siphash_pkg.sv` | Byte-level SipHash-2-4 reference, checked against the published test vector |
| `tb/tb_<block>.sv` | One self-checking testbench per block |

After coarse synthesis the chassis has about 660 word-level cells and 2,600
flip-flop bits. Most of the flip-flops are the 4 × 256-bit line buffer, the
request register and the generator state. The chassis also has 1.73 Mbit of
PTAG memory.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cshia_pkg.sv tb/tb_siphash_pkg.sv tb/tb_cshia_top.sv --top-module tb_cshia_top
./obj_dir/Vtb_cshia_top
```

Replace `tb_cshia_top` with `tb_bus_hdlr`, `tb_sec_eng`, `tb_ptag_gen`,
`tb_pmmu` or `tb_ptag_mem` to run a block's testbench.

`tb_cshia_top` runs the chassis with every parameter at its default, and
finishes in about a second. It covers the following, and fails if any of
these never happens:

- key derivation, compared with the reference model;
- enrollment of all 18816 lines while a processor read waits, followed by a
  check of PTAGs sampled against the reference;
- random reads and writes (word, halfword, byte) over code lines, both ends
  of the data window and unprotected RAM: buffer hits, misses, evictions,
  and write-backs with new PTAGs;
- a final comparison of memory and PTAG memory with independently computed
  values;
- peripheral pass-through;
- a tampered line, which must halt the processor;
- a replayed line with a forged but matching PTAG, which only the tree
  catches;
- a silent engine, which the watchdog catches;
- bypass mode.

The block testbenches use reduced memory maps where that shortens the run:

- `tb_bus_hdlr` uses 4+4 lines and models the engine.
- `tb_sec_eng` runs the engine with and without the tree, and checks the
  12-cycle latency.
