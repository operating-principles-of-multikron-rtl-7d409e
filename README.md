# MultiKron II performance instrumentation chip — SystemVerilog model

The MultiKron II is a measurement chip for one node of a shared-memory
multiprocessor. Instrumented software marks an event with a single 64-bit
store into the chip's address block. That one store is all the measured
program pays: the chip stamps the event with a 56-bit global timestamp,
adds the identity of the processor and process that wrote it, queues the
result, and ships it out byte by byte on a separate collection network, off
the machine's own buses. Sixteen resource counters accumulate
high-frequency events (clock cycles, cache-miss pins, software tallies)
that are too frequent to trace one by one, and can be attached to a sample
so that counts are tied to a point in the program.

This repository holds synthesizable SystemVerilog for the whole chip logic
and a self-checking testbench for every block.

## What a sample is

A **Trace sample** is 20 bytes, sent in this order:

| bytes | field |
|---|---|
| 1 | header: CPU ID (3 bits), sample type (2), shadow-overrun flag, FIFO-overrun flag, 0 |
| 7 | timestamp at the moment the sample was taken |
| 4 | Source Address register of the writing processor ("node.process") |
| 8 | the 64 bits the processor stored |

A **Resource sample** is the same 20 bytes followed by the sixteen 32-bit
resource counters (counter 0 first, each most significant byte first):
84 bytes. Sample type is `11` for Trace and `10` for Resource.

The processor that wrote the sample is identified by eight one-hot CPU ID
pins (C0–C7); the encoded number goes into the header and selects one of
eight Source Address registers, which the operating system rewrites on every
context switch.

Samples are triggered by writes to addresses 96–111 (Trace) and 112–127
(Resource). The low four address bits are a *filter level*: a sample is
taken only if sampling is enabled in the CSR and the matching bit of the
16-bit Filter register is set. Otherwise the write is acknowledged and
nothing happens, at the same cost to the processor, so instrumentation can
stay compiled in and be switched per group at run time.

## Where samples wait, and what happens when there is no room

This is the part of the chip with the most rules.

- The **sample FIFO** holds the 160-bit Trace part of each sample plus a
  161st bit that marks a Resource sample. It is 8 entries deep here
  (`FIFO_DEPTH`).
- The **shadow registers** are a single rank of sixteen 32-bit registers.
  A Resource sample copies all counters into them at the instant it is
  taken (the counters keep running) and marks them *busy*; they stay busy
  until the network has sent the sample's last counter byte. They are in
  effect a one-entry FIFO for the counter half of Resource samples.

A sample needs a free FIFO entry; a Resource sample also needs idle shadow
registers. When what it needs is not free, the CSR "wait on overrun" option
decides:

| option | sample | FIFO | shadow | result |
|---|---|---|---|---|
| wait | any | free | free | taken |
| wait | Trace | full | any | ACKB held until a FIFO entry frees up |
| wait | Resource | either full or busy | | ACKB held until both are free |
| discard | Trace | free | any | taken |
| discard | Resource | free | busy | discarded, shadow-overrun flag set |
| discard | any | full | free | discarded, FIFO-overrun flag set |
| discard | Resource | full | busy | discarded, both flags set |

Every Node clock spent holding ACKB adds one to the **Wait Error Counter**;
every discarded sample adds one to the **Overrun Error Counter**. The two
overrun flags are written into the header of the next sample that is taken
and then cleared, so the reader of the sample stream sees where samples were
lost. Both counters are 32 bits and wrap.

## Resource counters

Each counter is configured through three 64-bit registers, each split into
sixteen 4-bit fields (field *i* in bits 4i+3..4i controls counter *i*). A
field written as 0000 is left unchanged, so different users can manage
different counters without read-modify-write.

- **Mode** (address 10): bits 2..0 choose the source — `001` an internal
  clock, `010` software increments, `011` the internal clock only while the
  counter's external pin X*i* is high, `100` rising edges on X*i* (reset
  value); `101`–`111` repeat `001`–`011`. Bit 3, on an even counter, joins
  it with the next odd counter into one 64-bit counter (even = low word)
  that follows the even counter's settings.
- **Clock Select** (address 12): `001` Node clock, `010` Node clock / 10,
  `011` Node clock / 100, `100` Timestamp clock (reset value).
- **Enable** (address 8): `01` disable (reset value), `10` enable, `11`
  clear and enable.

Counters saturate at all ones instead of wrapping. They are written at
addresses 64–79 and incremented by software at 80–95.

All counter **reads** go through the shadow registers:

- *read-with-copy* (64–79) copies all sixteen counters to the shadow
  registers and returns counter *j*. If a Resource sample holds the shadow
  registers, the CSR "wait on read" option either holds ACKB until they are
  free (counted as wait cycles) or returns the held shadow value without
  copying — stale data, as specified.
- *read-without-copy* (80–95) returns the shadow value as it stands. One
  read-with-copy followed by fifteen reads-without-copy gives all counters
  at a single instant, which is what a context switch needs to save a
  process's counters. Because the shadow registers share a bus with the
  network output, a read-without-copy while they are busy holds the network
  back for two Node clocks.

External pins and the Timestamp clock pass a two-flop synchronizer, so a
pin can change at most every other Node clock and the Timestamp clock must
stay at or below one third of the Node clock.

## Processor bus

The processor sees a 64-bit memory-mapped device with a 7-bit address
(the low two byte-address bits and the device decode are outside the chip).

- An interaction starts on a Node clock edge where STARTB is low and READB
  or WRITEB is low. Tie STARTB low to let READB/WRITEB alone control access.
  Address and data are captured at that edge and the strobes are ignored
  until the interaction ends; they must be released before ACKB.
- After 0 or 1 wait states (the WAITSTATE pin, sampled while RESETB is low)
  the request is carried out, possibly delayed further by the waits above.
- ACKB is low for one Node clock, or for as long as HOLDB is held low;
  read data is valid exactly while ACKB is low.
- With no wait states a read returns ACKB two clocks after the request
  edge, with one wait state three.
- Unused read bits return 1. Write-only and unused addresses read as all 1s.
- **32-bit mode** (CSR bit 14): the upper half of every write is taken
  from the High Order 32 bit register (address 7), which the processor
  writes first. The upper half of every read is always copied into that
  register, so a 32-bit processor reads it afterwards. Nothing makes the
  two accesses atomic.

### Address map

| address | write | read |
|---|---|---|
| 0 | software reset (all but the timestamp) | – |
| 1 | CSR | CSR |
| 2 | timestamp (test mode) | timestamp, 56 bits |
| 4 | Filter register | Filter register |
| 5, 6 | clear Wait / Overrun Error Counter (test mode: load) | counter |
| 7 | High Order 32 bit register | same |
| 8, 10, 12 | Enable, Mode, Clock Select | same |
| 16, 17, 18 | test: increment timestamp / wait / overrun counter | – |
| 19, 20 | test: disable / enable network output | – |
| 21 | test: drop FIFO head, free shadow registers | – |
| 25–29 | test: push a FIFO entry, word copied to all groups | FIFO head, groups A–E (MSB first) |
| 32–39 | Source Address register 0–7 | same |
| 64–79 | write counter *j* | read counter *j* with copy |
| 80–95 | software increment of counter *j* | read counter *j* without copy |
| 96–111 | Trace sample, filter level = addr[3:0] | – |
| 112–127 | Resource sample, filter level = addr[3:0] | – |

### CSR (address 1)

Control bits come in pairs; writing 1 commands the action and writing 0
changes nothing. Read value: bit 0 sampling on, 2 wait on overrun, 4 wait on
read, 6 FIFO full, 7 shadow busy, 8 FIFO-overrun flag, 9 shadow-overrun
flag, 10 the 161st bit of the FIFO head (head is a Resource sample), 12 wait
states, 14 32-bit mode, 15 64-bit mode. Writing 1 to bits 1, 3, 5 and 15
turns the corresponding option off. After reset sampling is off, both wait
options are off and the chip is in 64-bit mode.

## Collection network output

The chip drives NETCLK at half the Node clock. For each network clock it
either puts a byte on N[7:0] with its odd-parity bit and EOM (set on a
sample's last byte) and pulls FIFODAB low, or leaves FIFODAB high. It sends
only while NETRDY is high. Outputs change on the falling edge of NETCLK;
the receiver takes the byte on the rising edge. A Trace sample takes 20
network clocks and a Resource sample 84 (168 Node clocks) when NETRDY stays
high, one byte per network clock.

## Test mode

With TESTB low, hardware counting stops (timestamp and resource counters),
the timestamp and both error counters become writable and incrementable,
software increments always count, the network can be switched off, and the
FIFO can be written directly and stepped by the processor. Outside test mode
those commands are ignored.

## Resets and clocks

RESETB is asynchronous, active low, must be held at least five Node clocks,
and is the only thing that clears the timestamp, so that all chips of a
machine reset together and fed one Timestamp clock agree on time. The
software reset (write to address 0) clears everything else except the
latched wait-state count. All logic runs on the Node clock.

## Source files

| file | contents |
|---|---|
| `rtl/mk2_pkg.sv` | address map, CSR bit positions, sample layout, field codes, FIFO entry type |
| `rtl/multikron2.sv` | top level: pins and wiring |
| `rtl/mk2_proc_if.sv` | bus handshake, wait states, HOLDB, High Order 32 bit register |
| `rtl/mk2_controller.sv` | address decode, read mux, Filter register, take/wait/discard decisions, test commands |
| `rtl/mk2_csr.sv` | Control and Status Register |
| `rtl/mk2_error_counter.sv` | Wait / Overrun Error Counter (two instances) |
| `rtl/mk2_sample_assembler.sv` | sample word and header overrun flags |
| `rtl/mk2_sample_fifo.sv` | sample FIFO |
| `rtl/mk2_net_out.sv` | byte-serial network output |
| `rtl/mk2_clk_enables.sv` | Timestamp clock synchronizer, Node clock /10 and /100 enables |
| `rtl/mk2_timestamp.sv` | 56-bit timestamp counter |
| `rtl/mk2_rc_ctrl_regs.sv` | Enable, Mode, Clock Select registers |
| `rtl/mk2_resource_counters.sv` | the sixteen counters |
| `rtl/mk2_shadow_regs.sv` | shadow registers |
| `rtl/mk2_source_regs.sv` | Source Address registers and CPU ID encoder |

The 64-bit data pins are split into `d_in`, `d_out` and `d_oe`; a pad ring
adds the tri-state drivers and honours `out_en` (OUTDISB). The pads, the
package and the eight internal test outputs T0–T7 are not part of this RTL.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mk2_pkg.sv tb/tb_multikron2.sv \
          --top-module tb_multikron2 -Mdir obj -o sim
./obj/sim
```

Replace `tb_multikron2` with any `tb_mk2_*` to test one block; `-Irtl`
lets Verilator find the modules by name. `tb_multikron2` runs the whole
chip at its default parameters in about a second. It checks every received
byte against a scoreboard. It also counts how often each mechanism above
happened (both sample types, filtering, both overruns, all waits, stale
reads, network stalls, NETRDY back-pressure, every counting source and clock,
64-bit pairs, saturation, HOLDB, wait states, 32-bit mode, the test
commands, software reset) and fails if any never happened.
`tb_mk2_resource_counters` compares all sixteen counters every cycle with a
reference model under random stimulus. `tb_mk2_net_out` checks the
84-network-clock Resource sample and the one-network-clock cost of a stall.
`tb_mk2_usage` runs the chip the way it is meant to be used: a software
and a hardware stop-watch, two processes sharing counters 0–3 as virtual
counters saved and restored at each context switch, and a burst of Trace
samples from eight processors faster than the network can drain, first
waiting on overrun (nothing lost; one sample accepted per 40 Node clocks
once the FIFO is full) and then discarding (every loss counted and flagged).

## Choices this model makes

The chip's published description leaves the following open. The model
chooses as follows; each is easy to change:

- FIFO depth: 8 entries (`FIFO_DEPTH`).
- Bus timing: the request is captured on the first Node clock edge that
  sees it, and ACKB follows one clock after completion.
- Network timing: outputs change on the NETCLK falling edge and NETRDY is
  sampled there.
- Counter field *i* sits at bits 4i+3..4i of the control registers. The
  Enable register reads back `0010`/`0001`.
- 64-bit pairs keep the low word in the even counter. An increment to either
  address of a pair steps the pair.
- Enable code `11` (clear, then enable) clears the counter on the first
  enabled cycle, so a stop-watch started with it reads one less than the
  number of Node clocks between the two Enable writes.
- A software increment counts only when the counter is enabled and set to
  the software source, except in test mode.
- Several CPU ID lines high: the lowest wins. None high: processor 0.
- The Filter register resets to 0. The network output resets enabled.
- A direct FIFO write in test mode pushes one entry with the written word in
  all five groups.
- The sample type codes follow the prose description (Trace `11`, Resource
  `10`); one of the published format tables shows them swapped.
- Reads of address 7 do not overwrite the High Order register.
- A sample is refused when the FIFO is full even if the network frees an
  entry in the same clock.

No timing, area or power figures come with this model. The original chip
was built in 1 µm CMOS standard cells for a 50 MHz Node clock.
