# Fault tolerance on demand: on-the-fly ALU repair by partial reconfiguration

A processor implemented on an SRAM-based FPGA can suffer permanent faults in
its *combinational* logic: an upset in the configuration memory rewires a
LUT, and no register-level protection will notice. The classical answer,
duplicating the processor, doubles the area. This design takes a different
route. It keeps **no spare hardware on the chip** while everything works:

* The processor's ALU (a *critical* unit) sits in the static part of the
  FPGA and is watched by a cheap concurrent error checker.
* A reconfigurable area of the FPGA is used, in normal operation, by a
  *non-critical* peripheral: a DES crypto-core on the APB bus.
* When the ALU fails permanently, a **Reconfiguration Manager** freezes the
  pipeline, overwrites the DES core with a spare ALU by dynamic partial
  reconfiguration, points the Execute stage at the spare and lets the
  processor continue exactly where it stopped. DES from then on runs in
  software, slower but correct.

The processor takes no part in the repair and needs no rollback: its
pipeline registers are simply disabled while the fault is examined and the
area is rewritten. A transient fault costs only the few cycles it lasts.

The RTL here contains the modified Execute stage, the error checker, the
complete Reconfiguration Manager, the two reconfigurable modules (DES
peripheral and spare ALU), a behavioural model of the reconfigurable area
with its configuration port, and a top level that wires them together. The
rest of the processor (a LEON3, SPARC V8, 7-stage pipeline), the AMBA buses,
the memory controller and the memory holding the bitstreams are outside; their
signals are ports of the top.

## What happens on an ALU error

```
 cycle  0   operation in Execute, checker raises error  -> freeze (combinational)
            the wrong result is NOT written into the Execute/Memory register
 1..N       detection window (DETECT_CYCLES = N, default 8)
            error gone?  -> freeze drops with it, next edge continues   (transient)
 N+1        error still there -> permanent: manager takes over freeze,
            RASR := blank, bitstream transfer starts
 ...        AHB reads -> 16-word buffer -> ICAP, up to one word per cycle
            (17204 words for the 67.2 KB spare-ALU bitstream)
 end        area now holds the spare ALU; select_alu := external,
            RASR := External-ALU signature, freeze released,
            the frozen operation completes with the spare's result
```

Three rules make this work, and they are the part most worth understanding:

1. **Freeze is combinational from the error.** `freeze = (error and not
   repaired) or (manager is reconfiguring)`. The checker looks at the
   operation held in the Register-Access/Execute register, so the cycle in
   which a wrong result appears is the cycle in which both pipeline registers
   are disabled. Nothing wrong is ever stored; nothing needs to be undone.
   The processor front end must hold its own state while `freeze_o` is high
   (in the original processor, all pipeline registers share the enable).
2. **Freezing also classifies the fault.** While frozen, the ALU inputs stay
   constant. A transient fault clears, the error drops, and the operation is
   recomputed correctly in the next cycle. A permanent fault keeps the error
   up for the whole window.
3. **During reconfiguration the manager holds freeze itself.** A
   half-written area produces garbage on its outputs (the model drives
   pseudo-random values); since freeze no longer depends on the error
   signal, none of it can reach a register. After the repair, the error of
   the now unused internal ALU is ignored, or the pipeline would stay frozen
   forever.

Timing, from `rm_freeze_ctrl`: with the error sampled high at clock edge 0
and at every edge up to edge `DETECT_CYCLES`, the transfer request is issued
in the cycle after edge `DETECT_CYCLES`. The full-size end-to-end test
measures 20,025 cycles for the whole reconfiguration over a bus with about
10 % random wait states, i.e. 0.30 ms at 66 MHz (an ideal bus gives 17,212
cycles for 17,204 words). The prototype this design follows reported about
0.5 ms for the same bitstream.

## Concurrent error detection (`alu_checker`)

Instead of a hand-designed parity-prediction circuit, a **second copy of the
ALU** computes the same operation and only the parity of its result and
condition codes is kept. A synthesis tool prunes the copy down to the logic
parity needs, so the cost is well below a full duplicate. Two further parity
checks compare each operand with a parity bit recorded when the operand was
written into the Execute-stage register. `error` is the OR of the three.

Limits: parity detects an odd number of wrong bits; an even number escapes
(the testbench shows a 2-bit flip passing). A fault that hits the internal
ALU and its checker copy identically also escapes. A Berger-code checker
would be stronger and is not built.

## The modified Execute stage (`ex_stage_ft`)

* Register-Access/Execute register (operation, operands, operand parity)
  and Execute/Memory register (result, N/Z/V/C), both enabled by `!freeze`.
* Internal ALU/shifter (`alu_shift`): AND, NAND, OR, NOR, XOR, XNOR, ADD,
  SUB, SLL, SRL, SRA; 4-bit operation code from `ft_pkg::alu_op_e`.
  Multiply and divide are not part of it.
* The operation and operands leave the stage (`alu_op_o`, `alu_a_o`,
  `alu_b_o`) towards the reconfigurable area; the spare's result comes back
  on `ext_result_i`/`ext_icc_i`.
* A 2-way multiplexer picks the result: `select_alu = 1` internal ALU,
  `0` external (spare) ALU.
* `fault_mask_i` XORs onto the internal result. It exists only to inject
  faults in simulation; tie it to zero.

Latency: an operation presented on `ex_*` in one cycle has its result on
`mem_*` after the second clock edge, one operation per cycle when not frozen.

## Reconfiguration Manager (`reconfig_manager`)

Three parts, one per concern:

| part | module | job |
|---|---|---|
| freeze control | `rm_freeze_ctrl` | detection window, freeze override, multiplexer switch |
| bitstream transfer | `rm_ahb_master`, `rm_buffer`, `rm_icap_writer` | storage memory -> buffer -> configuration port |
| software support | `rm_apb_regs` | status register and bitstream table over APB |

**AHB master.** AMBA AHB 2.0 with bus request/grant. Reads are issued as an
undefined-length incrementing burst (NONSEQ at the start, after any gap and
at every 1 KB boundary, SEQ otherwise), pipelined so that a zero-wait memory
delivers one word per cycle. A new address phase starts only if the buffer
has room for every read in flight, so the buffer cannot overflow however the
ICAP side behaves. Error, retry and split responses are not handled.

**Buffer.** 16-word first-word-fall-through FIFO (`BUF_DEPTH`). It absorbs
bus wait states and arbitration gaps.

**ICAP writer.** Drives the 32-bit Virtex-4-style configuration port
(`icap_ce_n`, `icap_write_n` active low, `icap_busy`): one word per cycle, a
word presented while busy is held. It signals completion after the
programmed number of words.

**APB registers** (byte offsets):

| offset | register | access | content |
|---|---|---|---|
| 0x00 | RASR | RO | signature of the core in the area |
| 0x04 | STATUS | RO | [1:0] state 0 idle / 1 detecting / 2 reconfiguring / 3 repaired, [2] select_alu, [3] reconfiguring |
| 0x10+16*i | table entry i: +0 address, +4 length in words, +8 signature | RW | entry 0 External ALU (loaded on a permanent fault), 1 DES, 2 blanking |

Reset contents of the table: addresses 0x40100000, 0x40120000, 0x40140000;
lengths 17204, 21607 and 13108 words (67.2, 84.4 and 51.2 KB); signatures
0x0A1E (External ALU), 0x0DE5 (DES), 0 (blank). The RASR starts as DES,
reads blank from the start of a reconfiguration and takes the signature of
entry 0 when it ends. The manager loads only entry 0, and only on a permanent
fault; there is no path back to DES other than reset.

## The reconfigurable area

Every module that can be placed in the area has **the same ports**
(`ft_pkg::ra_in_t` / `ra_out_t`): the dynamic part of an APB slave (select,
enable, address, write, data, read data, interrupt) *and* the ALU operands and
result. DES ignores the ALU half and drives it to zero; the spare ALU ignores
the APB half. This is what lets one module replace the other behind a fixed
set of boundary nets. The static plug-and-play part of the APB slave stays
outside the area and is not modelled.

**`des_apb` / `des_core`.** DES (FIPS 46-3), one round per cycle, 17 cycles
per 64-bit block including the load. Registers: 0x00/0x04 key, 0x08/0x0C
input block, 0x10 control (bit 0 start, bit 1 decrypt), 0x14 status (bit 0
busy, bit 1 done), 0x18/0x1C result. `pirq` pulses when a block is done.

**`ext_alu_rm`.** The same `alu_shift` as the internal ALU, combinational,
without a checker of its own.

**`reconfig_area` (behavioural model, not for synthesis).** On the FPGA the
area is fabric rewritten by a partial bitstream. The model contains both
modules and exposes one. A configuration sequence on the ICAP port starts
with the sync word `0xAA995566`; the word after it is taken as the signature
of the module being loaded (a convention of this model standing in for real
frame data, so the test bitstreams in storage follow it). While a sequence is
being written the outputs are pseudo-random; when the port is deselected the
new module becomes active from reset. After power-up the area holds DES.

## Software view

A driver for a peripheral that may disappear reads the RASR before it starts
and again when it has finished. If the signature is not the expected one at
either point, it uses the software routine instead (here: DES in software).
While the area is being rewritten the processor is frozen, so a driver never
observes a half-configured peripheral mid-transfer.

## Files

| file | content |
|---|---|
| `rtl/ft_pkg.sv` | shared types (ALU operation, condition codes, area boundary structs), signatures, bitstream table defaults, AHB encodings |
| `rtl/des_pkg.sv` | DES tables and round function |
| `rtl/alu_shift.sv`, `rtl/alu_checker.sv`, `rtl/ex_stage_ft.sv` | Execute stage |
| `rtl/rm_*.sv`, `rtl/reconfig_manager.sv` | Reconfiguration Manager |
| `rtl/des_core.sv`, `rtl/des_apb.sv`, `rtl/ext_alu_rm.sv` | reconfigurable modules |
| `rtl/reconfig_area.sv` | behavioural model of the area and its configuration port |
| `rtl/ft_soc_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ft_soc_top` (end to end) and `tb_workload_des20k` |
| `tb/tb_ref_pkg.sv` | reference ALU model, storage-memory contents, DES test vectors |
| `tb/ahb_mem_model.sv` | AHB storage memory with random wait states, grant withdrawal and a protocol checker |

Parameters of the top: `DETECT_CYCLES` (8) and `BUF_DEPTH` (16). The
bitstream addresses and lengths are run-time registers, not parameters.

## Simulating

With Verilator 5 (any testbench, here the end-to-end one):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ft_pkg.sv rtl/des_pkg.sv tb/tb_ref_pkg.sv \
    -y rtl -y tb +libext+.sv \
    tb/tb_ft_soc_top.sv --top-module tb_ft_soc_top -Mdir obj
./obj/Vtb_ft_soc_top
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. All run in well under a minute.

What is verified:

* `tb_ft_soc_top`, all defaults: random ALU stream checked result by result
  against a reference model; hardware DES with presence checks; a 3-cycle
  transient ALU fault and a 5-cycle board-switch error absorbed without
  reconfiguration; a permanent ALU fault leading to the full 17,204-word
  reconfiguration (every ICAP word checked), garbage on the area outputs held
  off, RASR blank then External ALU, hundreds of results from the spare ALU
  afterwards, DES falling back to software. Each of these mechanisms is
  counted and must occur.
* `tb_workload_des20k`: 20 KB (2560 blocks) encrypted and decrypted through
  the APB peripheral of the full design; 84,480 cycles per direction
  (1.28 ms at 66 MHz, driver overhead included).
* Module testbenches: ALU against a 64-bit reference on all operations;
  checker on single-bit result, flag and operand errors; freeze timing and
  window length; FIFO against a queue; AHB master against a protocol-checking
  memory with wait states and grant loss (and one word per cycle on an ideal
  bus); ICAP writer with a busy port; APB register map; DES against published
  and independently computed vectors in both directions.

## Where this departs from, or goes beyond, the original prototype

* The processor itself is not included; only its Execute stage, with the
  modifications the scheme requires, is. The ALU operation encoding, the
  shift kinds and the N/Z/V/C flags are chosen here, not taken from SPARC
  encodings.
* Chosen here because the original gives no value: the detection window
  (8 cycles), the buffer depth (16 words), signatures, register maps,
  storage addresses, the bitstream header convention of the area model, how
  operand parity is used, and ignoring the error after the repair.
* Freezing is done with register enables; the clock keeps running. The
  original describes freezing both as stopping the processor clock and as
  disabling the pipeline registers' enables. Both keep the ALU inputs
  constant, and the enable form needs no gated clock.
* The spare is loaded only for a permanent ALU fault; DES is never restored
  by hardware, and the blanking and DES table entries are held but not used
  by the manager.
* The reconfigurable area is a simulation model. On a real device the
  boundary nets go through vendor-specific bus macros, the ICAP is a vendor
  primitive, and real bitstreams replace the header convention used here.
  Multiplexing boundary nets to save bus macros is not built.
* Resource figures (slices) of the original cannot be compared: they need
  the vendor tool flow and include the whole processor.
