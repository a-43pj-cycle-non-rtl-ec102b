# Non-volatile microcontroller memory subsystem with resistive RAM

A sensor node that wakes for each sample should draw no power between
samples. Flash takes milliseconds to erase and write, so a chip that keeps its
state in Flash cannot afford to switch itself off for a 2 ms gap. This design
keeps its code and its results in on-chip resistive RAM (RRAM) instead. An RRAM
word is written in 5 cycles at 10 MHz. The chip can therefore save its state,
cut the power to the core, the memory controllers and the memories, and
resume 2 cycles after data arrives.

RRAM writes are unreliable. Some words fail now and then (temporary write
failures), and others wear out and never take a write again (permanent write
failures). Most of the logic here exists to hide these failures from software:

* **write-verify with retries**: every write is read back and retried up to
  4 times;
* **dynamic address remapping**: a word that still fails is moved to a
  spare backup array, and a small table records the move;
* **a non-volatile copy of that table**: it is saved in RRAM before shutdown
  and restored after wake-up;
* **ENDURER**: every 30 minutes the data is moved under a new random address
  mapping, so that heavily written addresses do not wear out one physical
  word.

The RTL covers the memory and power side of the chip. The 16-bit
MSP430-compatible core is not included; it connects through ports.

## Structure

```
            core (not included)                     sensor / peripherals
   ifetch_*  |        core_req_i/core_rsp_o               |  periph_*
             |                 |                          |
     +-------v------+   +------v---------------+          |
     |  imem_ctrl   |   |  mem_interconnect    |----------+
     | 12 KB RRAM   |   |  (address decoder)   |
     | fetch + prog |   +--+----------------+--+
     +--------------+      |                |
                    +------v------+   +-----v------+
                    | scratchpad  |   |  endurer   |  (always-on)
                    | SRAM 8 KB   |   | XOR key    |
                    +-------------+   +-----+------+
                                            |
                                 +----------v-----------+
                                 |   data_rram_ctrl     |
                                 |  write-verify (4)    |
                                 |  remap_lut (128 FF)  |
                                 |  data RRAM 2048 w    |
                                 |  backup RRAM 256 w   |
                                 +----------^-----------+
                                            | save / restore
                                 +----------+-----------+
 shutdown_req, wake_evt -------->|   power_scheduler    |---> core_pwr_en, mem_pwr_en,
                                 |   (always-on)        |     iso_en, core_rst_n
                                 +----------------------+
```

`mlc_weight_codec` sits beside these blocks, on its own ports of the top.

| Module | Role |
|---|---|
| `nvmcu_top` | Wires everything together. All parameters default to the chip's sizes. |
| `nvmcu_pkg` | Bus structs, address map, power-mode enum, 5-input majority function. |
| `power_scheduler` | Hardware scheduler for shutdown and wake-up. |
| `data_rram_ctrl` | Data-RRAM controller: write-verify, remapping, table save and restore. |
| `remap_lut` | The 128-entry volatile remap table, held in flip-flops. |
| `rram_write_verify` | The write, read-back and retry sequencer. |
| `rram_macro` | Behavioural model of an RRAM array, with write-failure injection. |
| `imem_ctrl` | Instruction RRAM with a fetch port and a verified program port. |
| `scratchpad_sram` | 8 KB SRAM for temporaries. |
| `mem_interconnect` | Data-bus address decoder. |
| `endurer` | Periodic random remapping for wear levelling. |
| `mlc_weight_codec` | Coding of a signed weight into multi-level cells. |

## Shutdown and wake-up

`power_scheduler` lives in the always-on domain. Its modes are `PM_ACTIVE`,
`PM_SAVE`, `PM_OFF`, `PM_WAKE_PWR` and `PM_WAKE_RST`.

* **Shutdown.** Software first writes its results to the data RRAM (5 cycles
  per word). It then raises `shutdown_req`. The scheduler asserts `save_req`
  until the data-RRAM controller answers `save_done`. It then drops
  `core_pwr_en` and `mem_pwr_en`, turns isolation on and holds the core in
  reset. A shutdown request waits while ENDURER is moving data.
* **Wake-up.** `wake_evt` (data arrival) starts the wake-up. The supplies come
  on in the first cycle. Reset and isolation are released in the second. The
  core runs from the third cycle, which is a 2-cycle (200 ns) wake-up. A
  reset of the chip runs the same sequence.
* **Table restore.** Wake-up also pulses `restore_req`. The volatile remap
  table is reloaded from RRAM in 129 cycles. Meanwhile the core already
  executes, and only its data-RRAM accesses wait.

The remap table is lost whenever the memory domain is off. In the RTL this
is modelled by `pwr_en` low clearing `remap_lut`. The RRAM arrays keep their
contents. The SRAM contents are not cleared in simulation, but software must
treat them as lost.

## How a write survives a failing RRAM word

This is the core of the design; it lives in `data_rram_ctrl`.

1. **Write-verify.** `rram_write_verify` applies one write pulse, waits a
   cycle, reads the word back and compares it. A clean write ends 5 cycles
   after the request, and each retry adds 4 cycles. After the first attempt
   and 4 retries the word counts as failed.
2. **Remap.** The controller takes the next free slot *i* of the 256-word
   backup array (slots 0-127 hold data). It writes entry *i* of `remap_lut`
   with the word's address and writes the data into slot *i*, again with
   write-verify. A remapped write takes 26 cycles. If the slot itself fails,
   its entry is invalidated and the next slot is tried.
3. **Lookup.** Every access compares its address against all 128 entries in
   the same cycle. A hit sends the access to the backup slot, so a remapped
   word costs no extra cycle. Reads always take 2 cycles, request to answer.
4. **Table full.** When all 128 slots are used, a failing write ends with
   `err` and `lost_evt`, and the data is lost.
5. **Save.** At shutdown each table entry changed since the last save is
   written to backup word 128+*i* as `{valid x5, address[10:0]}`. A save with
   no change costs 2 cycles; each changed entry costs about 6.
6. **Table-word failure.** If a table word cannot be written, the controller
   overwrites it with an all-zero (invalid) word. The mapping is then lost,
   and after the next wake-up the failed main-array word is read again.
7. **Restore.** Each of the 128 table words is read back. A majority vote
   over its five valid copies decides whether the entry is valid, so a
   partly failed invalidation still reads as invalid.

Two points differ from a literal reading of the published scheme, and both
are deliberate.

* **Only changed entries are saved.** Copying the whole 128-entry table at
  every shutdown would take 640 cycles (64 µs). The published shutdown time
  is 4.7 µs on average and 8 µs at most. Saving only changed entries stays
  within that.
* **The table is restored after every wake-up, not only at boot.** Here the
  table is power-gated with the memory controllers. The reload runs in the
  background, so the 2-cycle wake-up is kept.

## ENDURER: random remapping against wear

`endurer` translates logical data-RRAM word *l* to physical word *l* XOR
*key*. Every `PERIOD_CYCLES` it changes the key:

* The new key is *key* XOR *D*, where *D* is a nonzero value from a 16-bit
  LFSR. The default period is 1.8·10¹⁰ cycles, which is 30 minutes at 10 MHz.
* Under an XOR change of *D*, the words form pairs (*p*, *p* XOR *D*) that
  swap places. The block reads 4 pairs into its 8-word buffer and writes each
  word to its partner's address. It repeats this until all 1024 pairs are
  swapped.
* A move costs 2048 reads and 2048 verified writes, about 1.4 ms every 30
  minutes.
* A move starts only in active mode. It starts either when no core access
  is open or in the cycle the open access completes, so a core that issues
  back-to-back accesses cannot hold it off. Core accesses wait while it
  runs.
* Its writes pass through the data-RRAM controller, so they are verified and
  remapped like any other write.

The published text gives the period, the buffer size and the fact that the
remapping is random. The XOR mapping, the LFSR and the pair swap are this
design's own. In the measured chip, ENDURER ran on an FPGA in front of the
chip. Here it sits in the always-on domain, so its key survives shutdown.

## Instruction RRAM

`imem_ctrl` holds 6144 words, which is 12 KB.

* **Fetch port.** The core fetches one word per cycle by byte address
  0xD000-0xFFFF on `ifetch_*`.
* **Program port.** `prog_*` writes the program image with write-verify. It
  allows 8 retries, because the instruction memory is written only when
  programmed and uses stronger programming. The published design gives no
  retry count, so 8 is a choice.
* **No remapping.** The instruction RRAM is not remapped at run time. The
  published chip has 18 KB of RRAM in all, which implies a 256-word backup
  array for each 4 KB instruction bank as well. Remapping is used only for
  the data RRAM, so those arrays are not built here. Spare instruction words
  are avoided in software (dummy instructions over worn words).

## Data bus and address map

The core's data bus is `bus_req_t {req, we, addr, wdata}` with the response
`bus_rsp_t {ready, err, rdata}`. The requester holds the request until
`ready` pulses for one cycle. Addresses are byte addresses and accesses are
16-bit words. The map is this design's choice:

| Range | Target |
|---|---|
| 0x0000-0x01FF | peripheral port (`periph_*`), answered by the outside |
| 0x2000-0x3FFF | scratchpad SRAM, 1-cycle |
| 0xC000-0xCFFF | data RRAM (through ENDURER) |
| anything else | `err` in the next cycle |

Data-bus reads of the instruction RRAM are not supported.

## Multi-level cell weights

The chip stores up to 5 resistance levels per RRAM cell, about 2.3 bits. It
stores a neural-network weight as three cells:

* two 5-level cells for the magnitude (0-24 = 5·hi + lo);
* one 2-level cell for the sign.

`mlc_weight_codec` encodes a signed 6-bit weight this way, saturating at
±24. It also decodes three cell levels back into a weight, clamping a level
above 4 to 4. The analog part is not modelled: programming a cell to one of 5
resistance windows (wordline and bitline voltage, pulse width), and sensing
those levels. `rram_macro` stores plain binary words.

## What is modelled and what is not

* **RRAM array model.** `rram_macro` is a behavioural model, not hardware. A
  read or a write takes one cycle (23 ns and 50 ns fit in a 100 ns cycle).
  A failed write leaves the word with `FAIL_MASK` (bit 0) flipped.
  Failures are injected per word through `inj_*`: a count of failing writes,
  with 15 meaning permanent. The top brings this hook out; tie `inj_we` low
  in a real system.
* **Not included.** The MSP430 core, the power switches, the isolation cells,
  the sensors and the level-programming algorithm are not part of this
  RTL.
* **Not modelled.** Energy is not modelled. Cells do not wear out on their
  own: a cell fails only when a failure is injected. `tb_endurer_wear`
  counts writes per physical word to show how evenly ENDURER spreads them,
  but the ten-year lifetime figure cannot be checked in simulation.
* **Timing choices.** The cycle timings above are the design's own where the
  published design gives only totals: the 5-cycle write and the 2-cycle
  wake-up are matched exactly, and everything else is a choice.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`, which ends
by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/nvmcu_pkg.sv tb/tb_data_rram_ctrl.sv --top-module tb_data_rram_ctrl \
    -Mdir obj -o sim && obj/sim
```

* **Block tests.** Each checks its block against values computed in the
  testbench, including the cycle counts above: 5-cycle writes, 4 cycles per
  retry, 26-cycle remapped writes, the 2-cycle wake-up and the 129-cycle
  restore.
* **`tb_nvmcu_top`.** Runs the whole subsystem end to end with ENDURER's
  period cut to 20000 cycles. It programs and fetches code and runs a
  sense-accumulate-store loop over the peripheral port, SRAM and data RRAM.
  It injects temporary and permanent write failures and shuts down and wakes
  up three times. It checks every stored word after each wake-up. It counts
  each mechanism and fails if one never happened: programming retry, data
  write retry, remap, bad backup slot, table save, table-word invalidation,
  shutdown, wake-up, restore, ENDURER move, unmapped access, lost write and
  MLC coding.
* **`tb_nvmcu_full`.** Does one complete program, run, shutdown and wake-up
  cycle with every parameter at its default.
* **`tb_failure_rates`.** Injects failures at the rates the data RRAM is
  meant to tolerate, at full size: temporary failures in 17.3% of words and
  permanent failures in 2%. It writes all 2048 words and reads them back
  before and after a shutdown. In a typical run 42 words need a backup slot,
  out of 128. Saving 42 new table entries at once takes about 210 cycles.
* **`tb_endurer_wear`.** Replays an inference-like write stream: 258 writes
  per inference over an assumed 32-word hot set. ENDURER's period is
  shortened to 40000 cycles. Over 2000 inferences the most-written physical
  word took 1000 writes, against 16125 under a fixed mapping.

Parameters worth changing:

* the sizes, for example `DMEM_WORDS`, `LUT_ENTRIES` and `BACKUP_WORDS`
  (which must be at least 2 × `LUT_ENTRIES`);
* `DMEM_RETRIES` and `IMEM_RETRIES`;
* `ENDURER_PERIOD` and `ENDURER_BUF`, which must be a power of two.

The non-volatile table word packs the address into 11 bits next to the five
valid copies, so the data RRAM can be at most 2048 words.
