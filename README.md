# Reconfigurable coprocessors for a Leon3 SMP

Each core of a multi-core SPARC V8 (Leon3) system gets its own coprocessor. The
coprocessor sits in a partially reconfigurable region of the FPGA. The processor
drives it directly with the coprocessor instructions that SPARC V8 reserves, so one
program controls both, and moving data between them costs no more than a load or a
store. Any core can load a new partial bitstream into any region while the system
runs Linux. The processor is shielded from the region while the region is being
rewritten.

This RTL covers the part of that system that is specific to it:

| module | role |
|---|---|
| `rcmc_top` | one coprocessor tile per core (`NCPU`, default 4) and the shared reconfiguration controller |
| `cp_pipe` | the coprocessor's side of the reduced coprocessor interface: it follows the processor pipeline |
| `des_coproc` | the coprocessor in each region: a DES encryption core and a DES decryption core |
| `des_core` | iterative DES, one block in 17 cycles |
| `cp_glue` | hides a disabled or disconnected region from its processor |
| `icap_ctrl` | AHB slave that streams bitstream words into the ICAP and connects the regions |
| `cp_pkg`, `des_pkg` | interface records, opcodes, DES tables |

The Leon3 cores, the AMBA AHB bus, the DDR2 controller, Ethernet, the debug unit,
the FPU and the ICAP primitive are not included. They are standard library or vendor
parts. The top brings their connections out as ports. The testbenches use
behavioural stand-ins for the Leon3 pipeline, the ICAP and an AHB master.

## The reduced coprocessor interface

Leon3's native coprocessor port was made for its FPU. It exposes almost the whole
integer pipeline (about 500 signals), and all of those signals would have to be
routed into a reconfigurable region. The interface used here carries only what a
coprocessor needs: 124 signals towards the coprocessor and 38 back, 162 in all
(`cp_pkg::cp_in_t` and `cp_pkg::cp_out_t`).

Processor to coprocessor (`cp_in_t`):

- `holdn`: the pipeline advances when it is high.
- `flush`: pipeline flush.
- `exack`: the processor has taken the coprocessor exception.
- `d`: the decode stage's `pc`, `inst`, `cnt`, `trap`, `annul` and `pv`.
- `a`, `e`, `m`, `x`: `cnt`, `trap`, `annul` and `pv` of the register-access, execute,
  memory and exception stages.
- `lddata`: load data.

Coprocessor to processor (`cp_out_t`):

- `stdata`: store data.
- `exc`: an exception is pending.
- `cc`, `ccv`: the condition codes for `CBccc`, and whether they are valid.
- `ldlock`: interlock.
- `holdn`: stall request.

The idea is that only the instruction word crosses the boundary. It leaves the
processor in decode. The coprocessor then keeps its own copy of the instruction in
each later stage (`cp_pipe`), and those copies advance when `holdn` is high. Whether
a stage holds a live instruction is never copied. It is read every cycle from the
processor's `pv`/`annul`/`trap` bits for that stage. This way the coprocessor never
has to know about branches, annulment or traps.

```
stage        processor                     coprocessor (cp_pipe)
decode       inst ------------------------> (registered at end of decode)
reg. access                                 a: ldlock checked here
execute                                     e: store register read
memory       <------------- stdata -------- m: stdata register
exception    lddata ----------------------> x: loads written, CPOPs act (x_fire)
write-back                                  (results visible)
```

Rules that follow from this timing:

- **Commit point.** Every side effect happens when a live instruction leaves the
  exception stage (`x_fire = x valid & holdn & !flush`). Effects therefore happen in
  program order, and an annulled or trapped instruction never acts.
- **Stores** read their coprocessor register in execute. The value is registered and
  driven in memory.
- **Interlock.** A store can be in register access while an older load or CPOP is in
  execute or memory. That older instruction would update the register only after the
  store had read it. So `ldlock` holds the store back: the processor keeps decode and
  register access and sends a bubble into execute. `cp_pipe` mirrors this in its own
  copies.
- **Stall.** A store may read the result of a busy DES core, or a CPOP in the
  exception stage may want to start a busy core. Either way the coprocessor pulls
  `holdn` low until the core is done. The DES cores run whatever `holdn` is, so the
  stall always ends.
- **Double transfers.** `LDDC`, `STDC` and `STDCQ` pass through the pipeline twice.
  Pass `cnt=0` moves register `rd` and pass `cnt=1` moves `rd+1`. This mapping is
  this design's convention. Check it against your Leon3 version's `cnt` sequence
  before you connect a real core.

## Instructions

SPARC V8 reserves these opcodes for the coprocessor (`op` is `inst[31:30]`, `op3` is
`inst[24:19]`):

| instr | op | op3 | | instr | op | op3 |
|---|---|---|---|---|---|---|
| LDC | 11 | 110000 | | STCSR | 11 | 110101 |
| LDCSR | 11 | 110001 | | STDCQ | 11 | 110110 |
| LDDC | 11 | 110011 | | STDC | 11 | 110111 |
| STC | 11 | 110100 | | CPOP1 | 10 | 110110 |
| CB (op2=111) | 00 | - | | CPOP2 | 10 | 110111 |

The processor works out the address of a load or store. The coprocessor uses only
`rd`. For CPOP the suggested format is `op(2) rd(5) op3(6) rs1(5) opc(9) rs2(5)`,
which leaves 25 bits for the coprocessor to define. `CBccc` is decided entirely in
the processor, from `cc`.

## The DES coprocessor

Its programmer's model is this design's own:

| `rd` | LDC/LDDC | STC/STDC |
|---|---|---|
| 0, 1 | key, high/low word | key |
| 2, 3 | data block, high/low | data block |
| 4, 5 | - | last encryption result |
| 6, 7 | - | last decryption result |

- `CPOP1 opc=1`: encrypt the data block with the key.
- `CPOP1 opc=2`: decrypt the data block with the key.
- Any other CPOP raises a coprocessor exception. `exc` stays high until `exack`.
  `STDCQ` then returns the address and then the word of the offending instruction,
  and empties the queue.
- `STCSR` returns `{exc, 25'b0, queue_valid, dec_busy, enc_busy, 3'b0}`.
- `LDCSR` with bit 31 set clears a pending exception.
- `cc = {dec_busy, enc_busy}`. A program can poll with `CBccc`, or it can simply
  store the result and let the stall wait for it. `ccv` is low while a CPOP is in
  flight.

A core copies the key and the data block when it starts. The next block can
therefore be loaded while the current one is being ciphered. A typical loop is:
`LDDC data; CPOP1 enc; LDDC next data; STDC result(4); CPOP1 enc; ...`.

`des_core` is the standard DES (FIPS 46-3) with one round per clock. The cycle that
samples `start` applies the initial permutation and PC-1. Then come 16 round cycles,
and the last one writes the final permutation to `dout`. That makes 17 cycles per
block. The key schedule is computed on the fly. The decryption core (`DECRYPT=1`)
runs the schedule backwards, with right rotations and no rotation before the first
round. At the 70 MHz system clock the reference system was built for, one core can
cipher 70e6/17 × 8 B ≈ 33 MB/s. The measured application rate on the reference
system was about 7 MB/s per core. That rate is set by moving the data through memory
and the AHB bus, not by the core.

The loop above sustains one block every 21 cycles when memory answers at once: 17
cycles in the core, plus 4 for the result store's second pass and the next CPOP to
reach the commit point. That is 26.7 MB/s at 70 MHz. `tb_des_stream` measures this
and checks it.

## Glue logic and reconfiguration

While a region is being rewritten its outputs are garbage. `cp_glue` lets a region's
outputs through only when two conditions hold:

- the core's PSR enable-coprocessor bit (bit 13, EC) is set; SPARC traps every
  coprocessor instruction (`cp_disabled`) while EC is clear;
- the region's bit in the controller's CONNECT register is set.

Otherwise the processor sees an idle coprocessor: no stall, no interlock, no
exception, valid zero condition codes. `rcmc_top` also holds a disconnected region in
reset, so a freshly loaded coprocessor starts clean. Both the CONNECT bit and the
reset are this design's way of letting the enable and disable requests of the kernel
driver "connect" the region. The driver's interface is: enable, disable, status,
program.

`icap_ctrl` registers (AHB-Lite slave, word accesses):

| offset | name | access |
|---|---|---|
| 0x0 | DATA | write: one bitstream word for the ICAP. Read: the ICAP's last output |
| 0x4 | STATUS | bit 0: ICAP busy. Bit 1: a word is waiting |
| 0x8 | COUNT | words sent since the last write to COUNT |
| 0xC | CONNECT | bit i connects region i |

A DATA write goes into a one-word buffer, which drains into the ICAP on the first
edge where BUSY is low. A write that finds the buffer still full gets wait states
(`HREADYOUT` low). The controller therefore moves one word per cycle when the ICAP
is ready, and never loses a word when it is not. Bits are reversed within each byte
on their way to the ICAP, as the Virtex-5 port expects (`BITSWAP`). Software must
make sure only one core programs at a time. It must also disconnect a region, by
clearing EC and CONNECT, before rewriting it.

The reference system reconfigured a 79,964-byte bitstream in 4.58 ms (16.6 MB/s),
with the processor copying the bitstream over the bus. The controller by itself
would take 19,991 cycles (0.29 ms at 70 MHz). The end-to-end testbench measures
21,052 cycles for that bitstream when 5 % of the cycles have the ICAP busy.

## Departures and limits

- The programmer's model is this design's own: the register map, the opc codes, the
  status word, the queue contents and the exception clearing. So are the
  double-transfer pass mapping and the reading of `ldlock`/`holdn`.
- The reference controller used four block RAMs and the DES coprocessor one. Their
  use is not specified, and this RTL needs no memories.
- The reference system used two DES cores. Here each region holds one encryption and
  one decryption core.
- The ICAP controller is a slave only. It has no bitstream cache and no bus-master
  fetch.
- The changes needed inside Leon3 are not part of this RTL: honouring the
  coprocessor's hold, and writing coprocessor store data to memory.
- The reduced interface has no debug path. A debug unit cannot read coprocessor
  registers through it (Leon3's `dbg.data`).
- The DES cores were checked against 8 known-answer vectors and random
  encrypt/decrypt round trips. They were not checked against a 250-vector suite.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_rcmc_top \
  -Irtl -Itb -y rtl -y tb rtl/cp_pkg.sv rtl/des_pkg.sv tb/tb_rcmc_top.sv
./obj_dir/Vtb_rcmc_top
```

Replace the top with `tb_des_core`, `tb_des_coproc`, `tb_cp_pipe`, `tb_cp_glue`,
`tb_icap_ctrl` or `tb_des_stream` to run another testbench.

`tb_rcmc_top` runs the default four-core design through these steps:

1. coprocessor instructions while disabled, which all trap;
2. the full 79,964-byte bitstream through the controller into an ICAP model;
3. all four cores encrypting and decrypting at once, under random stalls;
4. a disconnect/reconnect.

It counts every mechanism (trap, masking, ICAP wait states, stall, interlock,
flush, exception acknowledge, double transfer, concurrent ciphering, region reset)
and fails if any of them never happens.

Testbench helpers:

- `leon3_cp_model`: a pipeline model of the processor side of the interface.
- `des_prog_runner`: DES programs for one core.
- `icap_model`: the ICAP.
- `ahb_master_bfm`: an AHB-Lite master.
