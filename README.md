# Self-adaptive SEU mitigation with a block-RAM radiation sensor

SRAM-based FPGAs in orbit collect single event upsets (SEUs). How many depends
on solar activity, and the rate can change by several orders of magnitude.
Protecting a module with triple modular redundancy (TMR) all the time costs
three times the area, even in the long quiet periods when the module is
reliable enough on its own. This design measures the radiation on the chip
itself and adds redundancy only while it is needed:

* **Sensor.** The sensor is a set of ordinary ECC block RAMs. BRAM cells are
  far more sensitive to upsets than the configuration memory, so they make a
  usable particle counter. Each sensor BRAM is swept continuously. Every word
  the ECC finds wrong is repaired and counted.
* **Decision.** The counts give an estimate of the BRAM upset rate. The
  BRAM rate maps onto the configuration-memory upset rate, which in turn
  gives the module's probability of failure per hour (PFH). From this the
  design picks a redundancy level *l*: 0 (none), 1 (channel 1 duplicated,
  DMR) or 2 (channel 1 triplicated, TMR).
* **Action.** A partial reconfiguration swaps the modules of a three-slot
  region. At *l* = 0 the slots run three independent channels. At *l* = 1 the
  slot of channel 2 carries a second copy of channel 1. At *l* = 2 all three
  slots carry channel 1, behind a voter.

The rest of this file describes each part, how to simulate the design, and
where it departs from the published system.

## Structure

```
seu_mitigation_top
├── bram_fault_detector  x N_BFD (64)        BRAM sensor subsystem
│   ├── bram_scrubber
│   │   └── ecc_bram            512 x 72 bit, SECDED (72,64)
│   ├── address_generator       pattern fill + cyclic read sweep
│   ├── err_counter x2          SBITERR / DBITERR counts
│   ├── mbu_detector            multiple-bit upsets per time window
│   ├── fault_memory            latest error record + counter copies
│   └── bus_access_control      star-bus slave
├── fault_management_unit
│   ├── bus_poller              polls all detectors
│   ├── seu_rate_estimator      mean of last three times between upsets
│   ├── redundancy_calc         rate -> level l
│   └── uart_tx                 radiation reports
└── adaptive_subsystem                       adaptive subsystem
    ├── reconfig_control_unit   bitstream header + ext. memory -> ICAP
    ├── channel_mux             channel inputs -> slots
    ├── error_detector          DMR compare
    └── voter                   TMR majority
```

`seu_pkg` holds the shared types: the level enum, the star-bus structs, the
fault-memory word map, the SECDED encoder/decoder and the sensor pattern.

Four things stay outside the RTL and appear as ports of the top:

* The ICAP configuration primitive (`icap_*`).
* The external memory that holds the partial bitstreams (`mem_*`).
* The signal-processing modules in the three slots (`slot_*`). In the
  reference system these are QPSK demodulators, whose insides are not
  specified.
* The user BRAM controllers (`usr_*`), for detectors used in integrated mode.

## The BRAM fault detector

Each detector owns one 512 x 72 bit ECC BRAM: 64 data bits and 8 check bits
per word. The ECC corrects a single-bit error and detects a double-bit error,
but only at the read port. The cell itself stays wrong. The scrubber delays
the read address and enable by one clock, to line up with the ECC flags. When
SBITERR is set, it writes the corrected word straight back to that address.
Only the damaged word line is touched, and the corrected data goes to the
reader without extra delay.

There are two modes:

* **Standalone** (`standalone_cfg` = 1, the reset default). The address
  generator first writes a known pattern into all 512 words, one per clock.
  It then reads one word per clock, wrapping around, so the whole BRAM is
  checked every 512 clocks. A double-bit error cannot be corrected, but here
  the original content is known. The scrubber therefore writes the pattern
  word back, and the error is counted once instead of once per sweep.
* **Integrated.** The BRAM is ordinary user memory. Reads and writes come
  from the `usr_*` port, and errors are found only in the words the user
  reads. A scrub write-back takes priority over a user write; `usr_wr_ready`
  goes low for that clock. A double-bit error stays in place and is counted
  on every read.

Every error event increments the SBITERR or DBITERR counter. The counters are
16 bits wide and saturate. The event also stores an error record in the
fault memory: address, data, check bits and flags. The fault memory is read
over a star bus. Each detector has its own link, data flows only toward the
manager, and the handshake is a request (`valid`, 3-bit word address) with
an acknowledge and data one clock later (`seu_pkg::FM_*` gives the word map).

Two or more corrupted bits in one BRAM within one scrub cycle, a period of
seconds, count as a multiple-bit upset (MBU). `mbu_detector` splits time
into fixed windows of `MBU_WINDOW` clocks, one second in the top. It adds up
the bits reported in each window: one per SBITERR and two per DBITERR. A
window that closes with two or more bits increments the MBU count, which is
fault-memory word 6. An MBU that straddles a window edge is counted as two
single upsets. The level decision does not use the MBU count; it is there
for the radiation report.

`ecc_bram` has an extra `upset_*` port that XORs a mask into a stored word.
It stands in for radiation in simulation. Tie it to zero in hardware.

## From counts to a redundancy level

`bus_poller` walks over all detectors. For each one it reads the SBITERR and
DBITERR counters and subtracts the values from the previous round. A round
takes 4 clocks per detector, so 256 clocks for 64. The differences added
together are the number of new events. One event is one SBITERR or one
DBITERR.

`seu_rate_estimator` measures time in ticks of `TICK_DIV` clocks, 1 s by
default. Each event closes the current interval between upsets. When several
events arrive in one round, the later ones count as zero-length intervals. The
estimate is the mean of the last three intervals. The block outputs their
**sum** (`sum3`), so that no division is needed. When upsets stop, the
still-open interval replaces the oldest closed one as soon as it is larger.
The estimate then decays instead of freezing at the last burst.

`redundancy_calc` compares `sum3` with three times two time thresholds:

| condition              | level        |
|------------------------|--------------|
| sum3 <= 3 * T_TMR      | 2 (TMR)      |
| sum3 <= 3 * T_DMR      | 1 (DMR)      |
| otherwise              | 0 (none)     |

The default thresholds come from the reference case. The module *demod1*
uses 691,354 essential configuration bits out of 34,087,072. It must meet
SIL 1, with a DMR trigger at PFH 3e-6 and a TMR trigger at PFH 1e-5. That
requires DMR from a configuration-memory upset rate of 4.11e-8 /s and TMR
from 1.37e-7 /s:

    mu_CFG = -ln(1 - PFH) / 3600 s * n_FPGA / n_e

The BRAM and configuration-memory upset rates are both tabulated for five
solar conditions. Interpolating log-linearly between them turns the two
thresholds into BRAM rates: 1.023e-4 and 3.976e-4 upsets/s for all 298
device BRAMs. For 64 sensor BRAMs that is 2.196e-5 and 8.538e-5 upsets/s,
so **T_DMR = 45532 s** and **T_TMR = 11712 s**. For another module, SIL
target or sensor size, recompute the two parameters with the same steps.

For scale, these are the expected mean times between upsets of a 64-BRAM
sensor in geostationary orbit behind 4.5 mm of aluminium:

| condition | mean time between upsets | level |
|-----------|--------------------------|-------|
| Solar Maximum | about 3.2e5 s | 0 |
| Solar Minimum | about 1.0e5 s (28 h) | 0 |
| Worst Week | about 900 s | 2 |
| Worst Day | about 220 s | 2 |
| Peak 5 Minutes | about 60 s | 2 |

Level 1 covers only the transition between these conditions.

Around these blocks the FMU does a few more things:

* It registers `standalone_cfg` and forwards it to all detectors.
* It turns `clear` into a one-clock clear of all counters.
* After every polling round with new events, and after every level change,
  it sends a 4-byte UART frame (8N1, 115200 baud at 100 MHz): `A5`, *l*,
  then the event total since the last clear, high byte first.

## Reconfiguration and the three channels

When the requested level differs from the loaded one, `reconfig_control_unit`
does the following:

1. It latches the target level and raises `reconf_busy`.
2. It writes a 13-word partial-bitstream header to the ICAP, one word per
   clock: dummy word, sync word `AA995566`, RCRC, the frame address
   `FAR_ADDR` of the region, WCFG, and an FDRI packet with the word count.
3. It streams the `BS_WORDS` words of that level's bitstream from external
   memory. The bitstream of level *l* starts at word *l* x `BS_WORDS`, and one
   read is outstanding at a time, with any latency.
4. It writes a DESYNC trailer.
5. It switches `level_active` and pulses `reconf_done`.

A request that changes during this is served by another reconfiguration
afterwards.

While `reconf_busy` is high, some slots are held in reset (`slot_rst`): the
slots whose module is replaced, and every slot that will carry a channel-1
replica. The replicas are released together, so they start from the same
state. The multiplexer already routes for the target level. A slot that is
not touched keeps running; channel 3 keeps running between *l* = 0 and 1.

| level | slot 1 | slot 2 | slot 3 | channel outputs |
|-------|--------|--------|--------|-----------------|
| 0 | ch 1 | ch 2 | ch 3 | all three |
| 1 | ch 1 | ch 1 | ch 3 | ch 1 (slot 1, compared by `error_detector`), ch 3 |
| 2 | ch 1 | ch 1 | ch 1 | ch 1 (bitwise 2-of-3 `voter`) |

In DMR, `dmr_err` marks a clock in which the two replicas disagree, and
`dmr_err_count` counts such clocks. In TMR, `tmr_mismatch` marks the replica
that was outvoted.

## Timing summary

* Sensor BRAM read: 1 clock. Scrub write-back: the clock after the failing
  read's data. A full sensor sweep takes 512 clocks.
* Counter and record update: 2 clocks after the failing read's data.
  Polling round: 4 x `N_BFD` clocks.
* MBU count: 1 clock after its window closes.
* Level decision: 2 clocks after the round that saw the event.
* Reconfiguration: 13 header words, then per word one request plus the
  memory latency, then 4 trailer words and 1 clock to switch.

## Departures from the published system

* The published FMU is software on a fault-tolerant soft processor. Here the
  polling, rate estimate, level decision and reporting are logic. The UART
  only transmits: no command set is defined for its receive side.
* The FMU in the published system looks up the configuration-memory rate and
  compares it with PFH thresholds. This design folds both steps into two
  precomputed time thresholds, which is equivalent because the mapping is
  monotonic.
* The SECDED code is a standard extended Hamming code, not the vendor
  primitive's matrix. The sensor pattern, the DBITERR pattern repair, the
  star-bus handshake, the fault-memory depth (only the latest record),
  counter widths, UART frame and baud rate, and the slot-reset policy are
  this design's own.
* The ICAP header uses the packet format of the Virtex-5 device family. Bit
  ordering inside bytes, the real frame address and the bitstream size come
  from the implementation tools. The default `BS_WORDS` = 65536 is an
  estimate: the triplicated *demod1* has 2,074,062 essential bits, at least
  64,815 32-bit words. Three levels then take 768 KiB of the 1 Gbit
  bitstream memory.
* The published FMU determines the rate once per observation interval and
  passes *l* on through a GPIO. Here the rate estimate is updated on every
  polling round with new events, and on every tick while the open interval
  grows. *l* is a direct signal to the reconfiguration controller.
* The FMU's "extended fault statistics" are not specified. Besides the
  counters, this design keeps only the latest error record and the MBU
  count of each detector. The FMU reads only the two counters.
* The reliability of the voter, error detector and multiplexer is not
  modelled. The configuration-memory scrubber that the scheme relies on is
  assumed to be present elsewhere.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`,
which prints `TB_RESULT checks=N failures=M`. `tb/tb_models_ext.sv` (bitstream
memory) and `tb/tb_models_slot.sv` (a stand-in for a slot module) are
behavioural models used by the system-level benches. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/seu_pkg.sv tb/tb_seu_mitigation_top.sv --top-module tb_seu_mitigation_top
./obj_dir/Vtb_seu_mitigation_top
```

* `tb_seu_mitigation_top` runs the whole design end to end at reduced size:
  4 detectors, 16-clock ticks, small thresholds, 8-word bitstreams. It
  injects upsets at a medium rate (DMR), then at a high rate with double
  upsets (TMR; these must also register as multiple-bit upsets), corrupts
  replicas, waits until the system falls back to level 0, uses a detector
  in integrated mode, and clears the counters. It counts each of these
  mechanisms and fails if any of them never happened.
* `tb_fmu_solar_conditions` feeds the fault management unit, at its default
  size and thresholds, with upsets at the mean rate of each solar condition
  (table above, plus one rate between the limits). It checks the estimate
  and the level each produces, and that a Peak 5 Minutes burst after a quiet
  period brings TMR within the 300 s the peak lasts; it takes about 256 s,
  the fourth upset plus one polling round. One second is 16 clocks there.
* `tb_seu_mitigation_top_full` keeps every default (64 detectors, 1 s
  ticks, 65536-word bitstreams, 115200 baud). It injects a burst of four
  upsets and follows it through polling, the TMR decision, reconfiguration
  and voted operation.
