# Radiation-tolerant FPGA configuration path for the RPC Link Box Control System

The RPC muon trigger of CMS reads its chambers through Link Boards whose
SRAM-based FPGAs sit in a radiation field. Single-event upsets slowly corrupt
an SRAM FPGA's configuration, so these FPGAs must be reconfigured after power-up
and then periodically. The control link to the boards (CCU25 rings) is far too
slow to resend a 3.2 Mbit bitstream each time, so every board keeps its
bitstreams in a local FLASH and a controller on the board loads them.

This RTL implements that configuration path as described for the RPC Link Box
Control System (RLBCS):

* FLASH contents are protected by a per-word checksum that catches the typical
  radiation error (a 0 turning into 1) and by a parity word per three data
  words, which rebuilds one corrupted word;
* the FLASH holds two configuration sets; if one is damaged the controller
  loads the other, and if both are damaged it falls back to an *emergency mode*
  in which the bitstream comes over the control link;
* a background scanner keeps reading both sets and reports corruption early,
  so a set can be erased and rewritten while the other one stays in use;
* all state of the controllers lives in triple-modular-redundant (TMR)
  registers with majority voting, written in a portable style that synthesis
  tools cannot optimise away.

The top, `rlbcs_top`, holds two copies of the controller (`cfg_ctrl`): one in
the role of the Control Board Initialization Controller (CBIC), one in the role
of the Link Board Controller (LBC), which configures the Link System FPGA
(Xilinx XC3S1000, 3,223,488 configuration bits). Next to them sits
`tmr_fsm_example`, a small state machine that shows the TMR coding style.

## Protected configuration storage

A FLASH word is 32 bits:

```
 31      27 26                                   0
+----------+--------------------------------------+
| checksum |        27 configuration bits         |
+----------+--------------------------------------+
checksum = number of zero bits among bits 26..0
```

Why a zero count: in FLASH, radiation almost always turns a programmed 0 into
a 1. Such a flip in the data field lowers the zero count; in the checksum
field it can only raise the stored value. No combination of 0-to-1 flips can
therefore leave a word whose checksum still matches. An erased word (all ones)
has 0 zeroes but a stored checksum of 31, so blank FLASH reads as invalid.

Three data words and one parity word form a **block**:

| word | contents                                   |
|------|--------------------------------------------|
| 0..2 | data words, each with its checksum         |
| 3    | XOR of the three 27-bit data fields, with its own checksum |

`cfg_block_decoder` checks all four checksums:

* none fails and the four fields XOR to zero: **OK**;
* exactly one fails: **RECOVERED**. A failed data word is rebuilt as the XOR of
  the other three fields. A failed parity word is ignored;
* two or more fail, or none fails but the parity does not match (only possible
  with errors in both directions): **BAD**.

A bitstream of `CFG_BITS` bits is cut into 27-bit words, MSB first (stream
bit 0 is bit 26 of word 0). The last word is padded with zeroes, and so is the
last block. For the XC3S1000 that gives 119,389 words in 39,797 blocks, which
is 159,188 FLASH words per set. Set *s* starts at word `s * 2**(AW-1)`, and
block *b* takes words `4b .. 4b+3` of its set. With `AW = 19` each set has
262,144 words.

## Loading an FPGA: fall-back and emergency mode

`cfg_loader` drives the FPGA's slave-serial configuration pins (`prog_b`,
`init_b`, `cclk`, `din`, `done`). A load starts after reset, on
`cmd_reconfig`, or when `reconfig_timer` fires. It runs like this:

1. Pick the preferred set (control register bit). If the scanner has already
   marked that set bad and the other one good, pick the other set. If both are
   marked bad, go straight to emergency mode.
2. Hold `prog_b` low for `PROG_CYC` cycles, then wait up to `INIT_TO` cycles
   for `init_b`.
3. For each block, read its four words, decode them and shift the three data
   words out MSB first until `CFG_BITS` bits have gone out. Each bit takes two
   clocks: `din` changes while `cclk` is low, and the FPGA samples it on the
   rising edge. The serializer holds one word while the next block is read, so
   a load takes about `2 * CFG_BITS` cycles. At full size the simulation
   measured 6,447,076 cycles, or 161 ms at 40 MHz.
4. Wait up to `DONE_TO` cycles for `done`.

A BAD block, or a time-out on `init_b` or `done`, ends the attempt. The loader
then pulses `prog_b` again and tries the other set. Once both sets have failed
it switches to emergency mode, unless that is disabled. In emergency mode the
same 27-bit words are taken from the control-link stream (`host_valid`,
`host_data`, `host_ready`) and shifted out the same way. `ld_set_failed` shows
which sets failed, and `ld_emergency`, `ld_loaded` and `ld_failed` give the
outcome.

## Scanning and refreshing the FLASH

`flash_scanner` reads every block of set 0, then of set 1, over and over. It
has the lowest FLASH priority, so it only uses cycles that loading and
programming leave free. After each full pass over a set it publishes that
set's count of recovered and unusable blocks. It marks the set checked, and
marks it bad if any block was unusable. If anything was corrupted it pulses
`sc_notify` and sets the sticky `sc_alarm`; `alarm_clr` clears the alarm. The
loader uses the bad marks to skip a set.

`flash_programmer` rewrites a set from the control link. The words arrive
slowly and in bursts, so they are queued in a FIFO (`FIFO_DEPTH`, 16). Each
group of three is encoded and programmed as one block:

* `cmd_erase` with `cmd_set` erases a whole set;
* `cmd_prog_start` with `cmd_set` selects the set and rewinds to block 0;
* data words are then pushed on the host stream;
* `cmd_flush` writes out a last, partly filled block, padded with zeroes.

Writing more blocks than a set holds is refused and sets `pg_overflow`. While
the loader is in emergency mode, the host stream feeds the loader instead of
the programmer.

All three clients share the board's FLASH port through `flash_arbiter`, in
fixed priority order: programmer, then loader, then scanner.

## TMR registers and the coding style

`tmr_ff` keeps three copies of a flip-flop and outputs their 2-of-3 majority.
Each copy has its **own** active-low synchronous reset line, `rst_n[i]`. On the
board the three lines are tied together, but inside the chip they are separate
inputs, so no synthesis tool can prove the copies identical and merge them.
This works without tool-specific "keep" attributes. A shared active-low
asynchronous reset `arst_n` and an `init` value complete the cell. `tmr_reg`
is the W-bit version.

Every state machine and counter follows the pattern of `tmr_fsm_example`:

* all state of a module is one packed struct, stored in one `tmr_reg`;
* a single `always_comb` computes the next state;
* that block first assigns the voted current state as the default next
  state (`s_d = s_q`).

So on every clock all three copies are rewritten with the voted value, and a
single upset disappears within one cycle. The FIFO memory inside the
programmer is an ordinary array; only its pointers and count are triplicated.

Registers written from an asynchronous bus have no system clock to scrub them.
`tmr_bus_regs` clocks its three copies with the rising edge of the chip select
`ncs` (write when `nwr` is low). Each copy has its own asynchronous reset
`nreset[i]`. The host has to rewrite these registers from time to time. Inside
`cfg_ctrl` their voted outputs pass through a two-stage TMR synchroniser into
the clock domain.

## Control interface of `cfg_ctrl`

| register (async bus) | bits |
|---|---|
| REG1, address 0 | [0] scan disable, [1] emergency disable, [2] preferred set, [3] periodic reconfiguration enable |
| REG2, address 1 | period of reconfiguration in ticks of `PRESCALE` clocks (1 s at 40 MHz); 0 = off |

After reset both registers are zero: scanning on, emergency mode allowed, set 0
preferred, no periodic reconfiguration. The controller loads the FPGA once,
right after reset.

**Commands.** `cmd_reconfig`, `cmd_prog_start`, `cmd_erase`, `cmd_flush` and
`alarm_clr` are one-cycle pulses, synchronous to `clk`. `cmd_set` qualifies
`cmd_prog_start` and `cmd_erase`. The programmer takes `cmd_prog_start` and
`cmd_erase` only while `pg_busy` is low. It remembers `cmd_flush` whenever it
arrives.

**FLASH port.** The controller raises `fl_req` together with `fl_op` (read,
program or erase-set), `fl_addr` and `fl_wdata`. It holds them until the
memory answers with a one-cycle `fl_done`; read data comes on `fl_rdata` in
that same cycle. Programming must only clear bits, as in NOR FLASH. An erase
clears the whole set that contains `fl_addr`.

**Resets.** Each board takes `arst_n` plus a three-line `rst_n`, all active
low. The async bus has its own three reset lines, `bus_nreset`.

## Module map

```
rlbcs_top
 |- cfg_ctrl  (x2: Control Board, Link Board)
 |   |- tmr_bus_regs          REG1/REG2 on the asynchronous bus
 |   |- tmr_reg (x2)          synchroniser; tmr_reg -> tmr_ff
 |   |- reconfig_timer
 |   |- flash_arbiter
 |   |- cfg_loader
 |   |   |- flash_block_reader -> cfg_block_decoder
 |   |   '- cfg_serializer
 |   |- flash_scanner
 |   |   '- flash_block_reader -> cfg_block_decoder
 |   '- flash_programmer
 |       |- sync_fifo
 |       '- cfg_block_encoder
 '- tmr_fsm_example
rlbcs_pkg: word format, checksum function, block status and FLASH op types
```

Every per-board port of `rlbcs_top` is an unpacked array `[NB]` with `NB = 2`.
Index 0 is the Control Board (CBIC role), and index 1 is the Link Board (LBC
role). Each board has its own clock, resets, async bus, command inputs, host
stream, FLASH port and FPGA configuration pins. The scanner counters
`sc_recov_cnt` and `sc_bad_cnt` are indexed `[board][set]`. The example state
machine has its own `ex_*` clock, resets, input and outputs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CFG_BITS` | 3,223,488 | bitstream length (XC3S1000) |
| `AW` | 19 | FLASH word address width; one set is `2**(AW-1)` words |
| `PRESCALE` | 40,000,000 | clocks per reconfiguration-timer tick |
| `FIFO_DEPTH` | 16 | programmer buffer, words (power of two) |
| `PROG_CYC` | 64 | `prog_b` low time, cycles |
| `INIT_TO`, `DONE_TO` | 65,535 | time-outs for `init_b` and `done`, cycles |

`CFG_BITS` must fit in one set: `ceil(ceil(CFG_BITS/27)/3) <= 2**(AW-3)`.

## Simulation

The testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
Two behavioural models in `tb/` stand for the external parts:

* `flash_model` is the FLASH. It has a fixed latency and programs by AND-ing
  bits. Tasks fill a set and flip bits from 0 to 1;
* `fpga_cfg_model` is the slave-serial port. It checks every received bit
  against the reference bitstream `tb_pkg::bit_at` and raises `done` only
  after a clean load.

Example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_rlbcs_top -y rtl -y tb +libext+.sv \
  rtl/rlbcs_pkg.sv tb/tb_pkg.sv tb/tb_rlbcs_top.sv -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_tmr_ff`, `tb_tmr_reg` | voting, single and double upsets, per-copy resets |
| `tb_tmr_fsm_example` | the example sequence, upset in the state register and its scrubbing |
| `tb_tmr_bus_regs` | writes on the `ncs` edge, ignored cycles, upsets, refresh by rewrite |
| `tb_cfg_block_encoder`, `tb_cfg_block_decoder` | checksum, parity, recovery of any one word, BAD detection |
| `tb_flash_scanner` | per-set counts, bad flags, notify/alarm, re-scan after repair |
| `tb_cfg_loader` | clean load and its cycle count, set fall-back, recovered words, skipping a known-bad set, emergency mode with a bursty stream, giving up |
| `tb_flash_programmer` | erase, FIFO back-pressure, flush of a partial block, exact FLASH contents, overflow |
| `tb_reconfig_timer` | request interval, off when disabled |
| `tb_cfg_ctrl` | one controller end to end at 1000 bits |
| `tb_rlbcs_top` | both boards end to end at 1000 bits, plus the example FSM. Counts each mechanism: power-up load, scan alarm, erase, programming, FIFO stall, recovery, bus writes, periodic reconfiguration, fall-back, emergency load, FLASH arbitration conflict |
| `tb_rlbcs_full` | default parameters: both boards load the full 3,223,488-bit bitstream from FLASH and the scanners pass set 0 (about one minute) |

## Where this RTL goes beyond or departs from the original description

These parts follow the original description:

* the word format (27 data bits plus a 5-bit zero-count checksum);
* the block of three data words plus one parity word;
* single-word recovery;
* two configuration sets, with fall-back to the second;
* emergency mode over the control link;
* continuous scanning with notification;
* buffered programming;
* periodic reconfiguration;
* TMR flip-flops with three separate synchronous resets;
* voted state registers looped back through combinational next-state logic;
* bus registers clocked by the chip-select edge.

The following are this design's own choices:

* the bit positions in the word;
* XOR as the parity function, and the parity cross-check in the decoder;
* the set layout in FLASH;
* the slave-serial FPGA interface and its time-outs;
* the order of load attempts;
* the register map and command pulses;
* the FIFO depth and flush padding;
* the FLASH request protocol and its fixed priority;
* the reconfiguration period in seconds.

Not built:

* the Control Bus (CBus) between a Control Board and its up to nine Link
  Boards;
* the CCU25 interface;
* the Link Board's internal interface bus;
* the I2C function of the Control Board's programmable controller.

None of these protocols is specified, so their traffic appears as plain ports
on each `cfg_ctrl`. The CBIC-role controller configures a single FPGA. A real
CBIC configures the Control Board controller and each Link Board Controller,
which would take one loader per target or a target selector. The CBIC's
targets are assumed to be the same size as the Link System FPGA.

An alternative bus register is not built either: a register that refreshes its
asynchronously written copies on every system clock. It is not used in the
chosen design, and its structure is not specified.
