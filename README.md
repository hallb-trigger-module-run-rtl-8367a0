# Hall B trigger module (CLAS, March 2010 configuration)

This is RTL for a programmable first-level trigger used by the CLAS detector
in Hall B. The board (a CAEN V1495 general-purpose VME module) takes the
discriminated detector signals of the six CLAS sectors. It combines them per
sector and evaluates twelve independent trigger equations. These go to the
Trigger Supervisor as TRIGGER[1:12], and a ten-bit pattern goes to the
level-2 latch. All of it runs on one 200 MHz clock, so every delay, width
and window is a whole number of 5 ns steps. The trigger equations are held
in lookup tables (LUTs) that can be reloaded over VME at any time. Every
stage has a scaler. A built-in logic analyser ("scope") can record 103
internal signals around a pattern, without disturbing the trigger.

The RTL covers all the logic of the board's FPGA. It does not cover the VME
bridge or the NIM/ECL/LVDS mezzanines, because those are vendor parts. The
top module exposes the inputs as plain logic signals, plus a simple
synchronous register bus where the VME bridge would connect.

## Signal flow

```
 ST[1:24] TOF CC ECinP ECtotP ECinE ECtotE (x6 sectors)   MORA MORB
      |       each: 0-155 ns delay + scaler                   | delay + scaler
      v                                                       v
 +-------------------- sector_logic x6 -------------+   +- common_logic -+
 | STS = ST0|ST1|ST2|ST3     ECP = ECinP & ECtotP   |   | MORA, MORB     |
 | ECE = ECinE & ECtotE                             |   | ST multiplicity|
 | STOF = (STS|STS_DIS) & (TOF|TOF_DIS) & STOF_EN   |   | window test    |
 | ECC  = (ECE|ECE_DIS) & (CC|CC_DIS)   & ECC_EN    |   +-------+--------+
 +---------------+----------------------------------+           |
         STOF[6:1] ECP[6:1] ECC[6:1]                            |
                 |                                              |
                 v                                              v
 +--------------------------- trig_bit x12 --------------------------+
 | ECP LUT[{ECP,STOF}] | ECC LUT[{ECC,STOF}]  -> OR  -> AND MOR        |
 |   -> AND ST_MULT (unless disabled) -> stretch 0-35 ns -> prescale  |
 +--------------------------------+-----------------------------------+
                                  | TRIG[12:1] -> trigger_n (inverted)
                                  v
 +---------------------------- l2_latch ------------------------------+
 | stretch 0-1275 ns (triggers and STOF/ECP/ECC of every sector)       |
 | bits 6-9: L2TRG LUT[TRIG[12:1]]   bits 0-5: L2SEC[{ECC,ECP,STOF}]_x |
 | delay 10-5115 ns                    -> l2latch_bits[9:0]            |
 +--------------------------------------------------------------------+
```

Beside this flow sit `trig_regs` (the register file), `trig_scope` (the
logic analyser) and about 150 scalers.

## Sector logic

Each sector has ten inputs: four start-counter paddles (ST0..ST3), TOF, and
the EC inner and total signals for photons (ECinP, ECtotP) and electrons
(ECinE, ECtotE), plus CC. Start counter ST[4s+1..4s+4] belongs to sector
s+1. Each input first passes a programmable delay of 0..31 steps (0-155 ns).
The delay is a shift register with a tap multiplexer (`prog_delay`). After
the delay, a 32-bit scaler counts the input's rising edges.

The sector then forms three outputs:

* STOF: start counter and TOF coincidence. Either side can be replaced by
  "always true" with STS_DIS / TOF_DIS, and STOF_EN switches the output on.
  So each bit of the three registers selects AND, STS only, TOF only, always
  1 or always 0.
* ECP: ECinP AND ECtotP (no options).
* ECC: (ECE or ECE_DIS) AND (CC or CC_DIS) AND ECC_EN, where ECE is
  ECinE AND ECtotE.

In the sector registers, bit 0 is sector 1 and bit 5 is sector 6. STS, ECP
and ECE have 32-bit scalers. STOF and ECC have 16-bit scalers that saturate
at 65535.

## Trigger bits and LUT addressing

Each of the twelve trigger bits (`trig_bit`) has two 4096 x 1 LUTs. Each LUT
sees all six sectors:

| LUT | address bits 0-5 | address bits 6-11 |
|-----|------------------|-------------------|
| ECP LUT | STOF1..STOF6 | ECP1..ECP6 |
| ECC LUT | STOF1..STOF6 | ECC1..ECC6 |

Address bit 0 is sector 1. A LUT file therefore lists, for each combination
of sectors, whether it is a trigger. For example, "STOF and ECC in the same
sector" sets every ECC LUT entry whose address has both bit x-1 and bit x+5
set for some sector x. The bits of the
LUT loaded at word w, bit b are address 32*w + b.

The two LUT outputs are ORed (LUT). This is ANDed with the MOR condition
(LUT_MOR):

```
MOR = (MORA_EN & MORA) | (MORB_EN & MORB) | MOR_DIS      (one bit per trigger)
```

Then, unless the trigger's STMULT_DIS bit is set, it is ANDed with ST_MULT.
ST_MULT is true when the number of the 24 start-counter paddles that are on
lies in the window [min, max], with both ends included. The window is set by
TS_STMULT_THRESHOLD bits 0-4 (min) and 5-9 (max).

The result is stretched by 0-7 clocks (0-35 ns) by a retriggerable
persistence counter, and then prescaled. The prescaler passes the Nth,
2Nth, 3Nth ... pulse whole. A prescale value of 0 disables the
trigger. A disabled trigger drives its output high. TRIGGER outputs are
active low (`trigger_n`), to match the cable to the Trigger Supervisor.
Scalers (16-bit, saturating) sit after the LUT OR, after the MOR AND, after
the persistence and after the prescaler.

## Time alignment

This is the part that needs the most care when changing the pipeline.
Everything after the input delays runs as one pipeline. Sector signals,
MOR and multiplicity must reach each trigger bit in the same clock
that their originating pulses would have met at the pins. The latencies are
constants in `trig_pkg`:

| stage | cycles after the delay-line outputs |
|-------|------------------------------------|
| STOF/ECP/ECC (`LAT_SECTOR`) | 2 |
| LUT OR, where MORA/MORB join (`LAT_MOR`) | 4 |
| multiplicity gate, where ST_MULT joins (`LAT_STMULT`) | 5 |

`common_logic` pipes MORA, MORB and ST_MULT by exactly these amounts.
Therefore the same delay setting aligns a start-counter pulse for the STOF
coincidence and for the multiplicity count. If you add a register in
`sector_logic` or `trig_bit`, change the constants, and the MOR and ST_MULT
paths will follow.

End-to-end, with every programmable delay at 0:

| path | this RTL | board figure |
|------|----------|--------------|
| any sector input or MORA/MORB to TRIGGER | 10 clocks = 50 ns | 52 ns (TOF 59 ns) |
| TRIGGER to L2LATCHBITS (minimum L2 delay) | 7 clocks = 35 ns | 35 ns |

The 2 ns gap covers board input and output buffers, which are not part of
this logic. TOF has the same latency here as the other inputs. The extra
7 ns of the board's TOF path is not reproduced, because no cause for it is
known. A pulse is only seen at the edges of a 5 ns clock, so outputs have
5 ns of jitter against the inputs.

## Level-2 latch bits

`l2_latch` builds ten bits for an external latch, which decides whether
level 2 starts. All twelve trigger decisions, and STOF/ECP/ECC of all six
sectors, are first stretched by a shared persistence of 0-255 clocks
(0-1275 ns, register TS_L2_OUTPUTWIDTH). Then:

* bits 6-9 come from a 4096 x 4 "L2TRG" LUT addressed by TRIGGER[12:1]
  (address bit 0 = trigger 1). It is loaded as 512 32-bit words; each word
  holds eight 4-bit entries, with the lowest address in the lowest nibble.
* bit x-1 (x = 1..6) comes from an 8-entry "L2SEC" table held in
  TS_L2_SECLOGIC. It is addressed by {ECC_x, ECP_x, STOF_x}, with STOF as
  address bit 0, and the same table serves every sector.

The ten bits are delayed by 2-1023 clocks (10-5115 ns, TS_L2_OUTPUTDELAY;
values below 2 act as 2) and registered to the pins.

## Scope

`trig_scope` records a 103-bit sample every clock into a 128-entry circular
buffer. Writing 1 to TRIG_STATUS bit 0 arms it. Once 60 samples have been
stored, it triggers on the first sample where every bit not masked by
IGNORE equals VALUE. It then records 60 more samples, which gives ±300 ns
around the trigger at 5 ns. TRIG_STATUS reads {done, triggered, armed} in
bits 2..0. The buffer is read at TRIG_BUFFER (0x7FFC) or anywhere in
0x0000-0x0FFC, which suits a block transfer. Each read returns the next
word: 121 samples, oldest first, each as 4 words (bits 31:0 first).

The signals are deskewed, which means each is delayed to the pipeline column
of the trigger decision it feeds. One row of the capture therefore shows
cause and effect together. The sample bit order is:

| bits | signals |
|------|---------|
| 0-23 | ST1-ST24 (after their delays) |
| 24-29, 30-35, 36-41 | TOF1-6, ECinP1-6, ECtotP1-6 |
| 42-47, 48-53, 54-59 | ECinE1-6, ECtotE1-6, CC1-6 |
| 60, 61 | MORA, MORB |
| 62-67, 68-73, 74-79 | STOF1-6, ECP1-6, ECC1-6 |
| 80 | ST_MULT |
| 81-92 | TRIG1-12 (after prescaler) |
| 93-102 | L2 latch bits 0-9 (recorded as they leave, not deskewed) |

VALUE3..0 and IGNORE3..0 hold bits 127:96 down to 31:0; bits above 102 are
unused.

## Registers and bus

The register file uses the board's register addresses (byte addresses,
32-bit words):

| address | contents |
|---------|----------|
| 0x0000-0x0FFC, 0x7FFC | scope buffer (reads advance) |
| 0x1000-0x1268 | scalers (read-only, listed below) |
| 0x1300 / 0x1304 / 0x130C | board IDs, firmware revision, scaler enable |
| 0x2000 + 4i | input delay i (5 bits) |
| 0x2100 + 4t, 0x2200 + 4t | persistence (3 bits) and prescale (10 bits) of trigger t+1 |
| 0x2300-0x2314 | STOF_EN, TOF_DIS, STS_DIS, ECE_DIS, CC_DIS, ECC_EN (bit = sector) |
| 0x2408-0x2410 | MORA_EN, MORB_EN, MOR_DIS (bit = trigger) |
| 0x2414 / 0x2418 | ST multiplicity window; STMULT_DIS (bit = trigger) |
| 0x2500-0x2508 | L2 SECLOGIC, output delay, output width |
| 0x3000 / 0x3004-0x3010 / 0x3014-0x3020 | scope status/arm, VALUE3..0, IGNORE3..0 |
| 0x4000 + 0x200 t | ECC LUT of trigger t+1 (128 words, write only) |
| 0x5800 + 0x200 t | ECP LUT of trigger t+1 (128 words, write only) |
| 0x7000 | L2TRG LUT (512 words, write only) |

TS_ERRORS (0x1308) has no defined contents and reads 0, as do the
unassigned scaler words 0x10F8-0x1124 and any other unmapped address.

Input delay index i: 0 MORA, 1 MORB, 2-7 TOF1-6, 8-13 ECinP1-6, 14-19
ECinE1-6, 20-25 ECtotP1-6, 26-31 ECtotE1-6, 32-37 CC1-6, 38-61 ST1-24.
Scalers follow the same order from 0x1000 (62 inputs). After them come, per
trigger, LUT (0x1128), LUT_MOR (0x1158), persistence (0x1188) and prescaler
(0x11B8). Then, per sector, STS (0x11E8), STOF (0x1200), ECP (0x1218), ECE
(0x1230) and ECC (0x1248). Last come the reference count (0x1260), MORA|MORB
(0x1264) and ST_MULT (0x1268).

Scalers count only while TS_ENABLE_SCALERS is 1, and are cleared when it
goes from 0 to 1. The intended sequence is: disable, read, re-enable. The
reference scaler counts 25 ns ticks while scalers are enabled, so it gives
the gate time.

The bus is a simple synchronous interface. `bus_we` is a one-cycle write
strobe with `bus_addr` and `bus_wdata`. `bus_re` is a one-cycle read strobe,
answered on the next clock by `bus_rdata` with `bus_rvalid`. An assertion
forbids `bus_we` and `bus_re` in the same cycle. After reset, every register
is zero. In particular, all prescalers are 0, so every trigger output is
idle (high) until it is configured. The LUTs are not cleared by reset.

## Departures from the board description, and choices made here

* **LUT bit order.** The register listing's address tables put the
  ECP/ECC sector bits on LUT address 0-5 and STOF on 6-11. The LUT
  drawings put STOF on 0-5. This RTL follows the drawings, and so does the
  table above. If your LUT files assume the other order, swap the two 6-bit
  halves of the address in `trig_bit`.
* **Second LUT input.** One drawing labels the second LUT's sector inputs
  ECE. This RTL addresses it with ECC, the sector output that the register
  notes define.
* **Level-2 width range.** The level-2 stretch is 0-255 clocks added to the
  pulse, taken from the "0 to 1275 ns" description. Another note gives
  1-255 x 5 ns.
* **Latencies.** See the time alignment section: 50 ns instead of 52 ns,
  and no extra TOF delay.
* **ST to sector wiring**, the scope signal order before CC5, the bus
  protocol, reset values, scaler widths other than the 16/32 split shown,
  and all pipeline registers are this design's own choices.

## Source files

| file | block |
|------|-------|
| `rtl/trig_pkg.sv` | constants, register addresses, config structs, latencies |
| `rtl/prog_delay.sv`, `rtl/fixed_delay.sv` | programmable and fixed delay lines |
| `rtl/edge_scaler.sv` | rising-edge counter, wrapping or saturating, clear on enable |
| `rtl/pulse_persist.sv` | retriggerable pulse stretcher |
| `rtl/prescaler.sv` | 1-of-N pulse prescaler, 0 = off |
| `rtl/trig_lut.sv` | LUT written as 32-bit words, read as AW-bit address |
| `rtl/sector_logic.sv` | one sector |
| `rtl/common_logic.sv` | MORA/MORB and ST multiplicity |
| `rtl/trig_bit.sv` | one trigger bit |
| `rtl/l2_latch.sv` | level-2 latch bits |
| `rtl/trig_scope.sv` | logic analyser |
| `rtl/trig_regs.sv` | register file |
| `rtl/hallb_trigger_top.sv` | the whole board logic |

Each block has a self-checking testbench `tb/tb_<module>.sv`. These compare
the block against a cycle-level reference model written independently
inside the testbench, and end with a `TB_RESULT checks=N failures=M` line.
`tb/tb_hallb_trigger_top.sv` drives the complete design at its real
parameters through the register bus only. It programs delays, sector modes,
LUTs, MOR, the multiplicity window, persistence, prescalers, the level-2
tables and the scope. It then checks the trigger and level-2 outputs, the
50 ns and 35 ns latencies, the scalers and a scope capture. It also counts
how often each mechanism was exercised:

* delays
* MOR blocking and passing
* multiplicity blocking and passing
* prescaler drops and fires
* disabled triggers
* persistence
* L2TRG and L2SEC bits
* long level-2 delays
* scope triggers
* mode switches

`tb/tb_latency_paths.sv` measures the delay-path table on the full design.
It takes every input of every sector (all 24 ST paddles, and TOF, ECinP,
ECtotP, ECinE, ECtotE and CC of each sector), plus MORA and MORB. For each
one it sets the configuration so that TRIGGER1 depends on that input alone.
It then counts clocks from the input edge to TRIGGER1, and from TRIGGER1 to
level-2 bit 6. It checks 10 and 7 clocks on every path.

## Simulating

With Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/trig_pkg.sv tb/tb_hallb_trigger_top.sv --top-module tb_hallb_trigger_top
./obj_dir/Vtb_hallb_trigger_top
```

Replace the testbench name to run a single block. The package file must come
first on the command line. The full-design test simulates about 110 µs of
board time and finishes in seconds.

## Synthesis notes

Everything is written for synthesis. Delay lines and LUTs are plain arrays,
and map to shift-register primitives and block or distributed RAM. The
largest of these are the level-2 delay (1023 x 10 bits), the 24 trigger LUTs
and the L2TRG LUT (4 Kbit each, 16 Kbit), and the scope buffer (128 x 103
bits).
