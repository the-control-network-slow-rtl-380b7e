# Board Controller slow control for TPC front-end cards

Each front-end card (FEC) of the ALICE TPC readout carries eight ALTRO
readout chips and a Board Controller (BC). The readout control unit (RCU)
that drives a branch of cards needs to know, card by card, whether the
supplies are healthy, whether every trigger and command arrived, and
whether the ALTRO multi-event buffers are still in step. It gets this over a
*control network* that is separate from the ALTRO data bus: a two-wire I2C
bus for register access, plus one extra INT line on which a card asks for
attention when it detects an error.

This RTL is the slow-control logic of the Board Controller. It

* answers register reads and writes from the RCU on I2C,
* keeps the card's temperature, supply voltages and currents, checks them
  against bands set by the RCU, and switches regulators and power switches,
* watches the ALTRO bus between the RCU and the chips as a passive observer:
  it checks the bus protocol and parity, counts triggers, readouts and data
  strobes, mirrors the multi-event buffer (MEB) pointers of all eight chips,
  and records the control lines of the last instruction like a small logic
  analyser,
* notices when the readout or sampling clock stops,
* collects all of this in a 16-flag error logbook and raises INT.

The register set, register widths and meanings, the list of errors, the
commands and the INT handshake follow the published control-network
specification for these cards. That specification does not give the wire
format on I2C, register addresses, ALTRO bus rules, timeouts, reset values
or clock rates; those are choices made here, and each one is listed in
"Choices and departures" below.

## Block diagram

```
          I2C (SCL, SDA)                INT / acknowledge
               |                               ^
        +--------------+    bytes    +---------------+
        | bc_i2c_slave |<----------->| bc_reg_access |---- CNTRST, BCRST, RERLBK
        +--------------+             +---------------+
                                       |  ^ all registers (bc_regs_t)
                          write strobe v  |
   ADC samples --> bc_monitor ----------------------------+
   RCLK ---------> bc_clk_monitor --(tick)--+             |
   SCLK ---------> bc_clk_monitor           |             v
   BD, CSTB, ... -> bc_sync -> bc_altro_monitor --> bc_meb_mirror   bc_errlog --> INT
                            -> bc_scope     |  --> bc_stats  <-- L1, L2, GRST
```

`board_controller` (`rtl/board_controller.sv`) is the top and only wires
these together; `bc_pkg` holds the shared register map, error bit order,
ALTRO instruction layout and the `bc_regs_t` record of all readable values.

## Talking to the card: register access over I2C

The BC is an I2C slave at 7-bit address `{2'b10, HWADD[4:0]}`, so the 32
cards of a branch occupy 0x40-0x5F. Every register is moved as one 32-bit
word, most significant byte first, right-aligned (unused upper bits read 0):

```
write:  S  addr+W  REG  D3 D2 D1 D0  P
read:   S  addr+W  REG  Sr  addr+R  D3 D2 D1 D0(NACK)  P
```

The write takes effect after the fourth data byte; a shorter write does
nothing. A read snapshots the whole register when the slave is addressed
for reading, so a counter cannot change between its bytes.

The three commands are addresses of their own and act as soon as the address
byte is written (`S addr+W CMD P`):

| address | command | effect |
|---|---|---|
| 0x40 | CNTRST | clears NBRL1, NBRL2, NBRRS, NBRDO, NDSTB |
| 0x41 | BCRST | returns every BC register, the logbook, buffer mirror, scope and counters to reset; the I2C interface itself is not reset, so the transfer carrying the command completes |
| 0x42 | RERLBK | clears the error logbook and drops INT |

### Register map

| addr | name | R/W | bits | content |
|---|---|---|---|---|
| 0x00 | TEMP | R | 10 | last temperature conversion |
| 0x01 | VOLTREG | R/W | 4 | write: regulator enables; read: regulator state reported by the hardware (1 = ON) |
| 0x02 | PWSW | R/W | 2 | same for the two power switches |
| 0x03-0x06 | ANVOLT, DGVOLT, ANCUR, DGCUR | R | 10 | last conversions |
| 0x07-0x0A | AVOLTHR, ACURTHR, DVOLTHR, DCURTHR | R/W | 20 | acceptance band: [9:0] lower, [19:10] upper limit, inclusive |
| 0x0B | TPTHR | R/W | 10 | temperature upper limit |
| 0x10 | ERRLOG | R | 16 | error logbook, see below |
| 0x20 | NBRL1 | R | 16 | L1 triggers received |
| 0x21 | NBRL2 | R | 16 | L2 triggers received |
| 0x22 | NBRRS | R | 16 | global resets received |
| 0x23 | NDSTB | R | 9 | data strobes in the last channel readout |
| 0x24 | NBRDO | R | 16 | channel readout commands to this card |
| 0x25 | HWADD | R | 8 | hardware address pins |
| 0x30 | WRPTER | R | 3x8 | write pointer of chip c in bits [3c+2:3c] |
| 0x31 | MEVBF | R | 4x8 | occupied buffers of chip c in bits [4c+3:4c] |
| 0x32 | RDPTER | R | 3x8 | read pointer of chip c |
| 0x33-0x36 | DSTBSC, WRSC, ACKSC, TRSFSC | R | 10 | control-line scope, bit i = i-th RCLK period |
| 0x80 + 16c + h | RBUFF | R | 4 | free buffers seen by channel h of chip c |

Unmapped addresses read 0 and ignore writes. Reset values: bands fully open
(0..1023), TPTHR = 1023, all regulators and switches ON, everything else 0.

## The error logbook and INT

| bit | flag | set when |
|---|---|---|
| 0 | RDERR | a read instruction to this card breaks the bus protocol |
| 1 | WRERR | a write instruction to this card breaks the bus protocol |
| 2 | ROERR | a channel readout breaks the protocol |
| 3 | PERR | an instruction word fails parity |
| 4 | BEMPY | a channel readout is asked from a chip whose buffer is empty |
| 5 | BSYERR | at an L2 trigger the chips do not all hold the same number of events |
| 6 | BFULL | an L2 trigger or WPINC finds a chip's buffer full |
| 7 | TROVP | two L1 triggers less than 100 us apart |
| 8 | AVERR | analogue voltage outside AVOLTHR |
| 9 | DVERR | digital voltage outside DVOLTHR |
| 10 | DCERR | digital current outside DCURTHR |
| 11 | ACERR | analogue current outside ACURTHR |
| 12 | RCKERR | no RCLK edge for 64 BC cycles |
| 13 | SCKERR | no SCLK edge for 64 BC cycles |
| 14 | ISTERR | an instruction to this card carries a code that is no ALTRO register or command |
| 15 | TPERR | temperature above TPTHR |

Flags are sticky. Conditions that are levels (the bands, temperature, a
stopped clock) set their flag again right after a RERLBK if they are still
present, so a clear "sticks" only once the cause is gone.

INT (`int_o`) rises whenever a flag goes from 0 to 1. The RCU acknowledges by
pulling the INT line low; here that is the input `int_ack_i`, whose rising
edge (after a synchronizer) drops `int_o`. The intended RCU sequence is:
see INT, acknowledge, read ERRLOG, read the register behind the flag (for
example ANVOLT for AVERR), fix the cause, RERLBK. A new flag after the
acknowledge raises INT again. There is no interrupt mask.

## Watching the ALTRO bus

This is the least obvious part of the design, because the BC only listens:
it never drives the ALTRO bus, and it has to reconstruct what happened from
the lines it sees.

**Sampling.** The BC runs on its own clock (assumed 40 MHz). RCLK, the 40
bus lines (BD) and the control lines CSTB, WRITE, ACK, TRSF, DSTB go through
2-flop synchronizers (`bc_sync`); the RCLK watchdog (`bc_clk_monitor`) turns
each synchronized RCLK rising edge into a one-cycle `tick`. Because RCLK and
the bus pass through synchronizers of equal depth, the bus value seen on a
tick is the one present at that RCLK edge, provided the bus changes around
the RCLK falling edge and RCLK is no faster than about a quarter of the BC
clock (the testbenches use 5 MHz RCLK with a 40 MHz BC clock). If RCLK and
the BC clock are the same 40 MHz clock in a system, this front end has to be
replaced by direct sampling in the RCLK domain.

**Instruction word.** An instruction begins on the tick on which CSTB is seen
rising; BD then holds

```
39   38     37     36:32  31:29  28:25   24:20  19:0
par  bcast  bc/al  FEC    chip   channel code   data
```

with even parity over all 40 bits. This is the ALTRO chip's own layout.

**Checks** (`bc_altro_monitor`). Parity is checked for every instruction on
the bus, whichever card it is for. An instruction is *for this card* when
bc/al is 0 and it is broadcast or its FEC field equals `HWADD[4:0]`. For
those:

* a code outside 0x00-0x0D, 0x10-0x12, 0x18-0x1D gives ISTERR;
* a non-broadcast instruction must see ACK within 16 RCLK periods while
  CSTB stays high; otherwise RDERR (WRITE low) or WRERR (WRITE high);
* a broadcast read gives RDERR; broadcast writes and commands expect no ACK;
* after the ACK of a channel readout (CHRDO, code 0x1A), TRSF must rise
  within 32 periods and fall within 1024; otherwise ROERR. A broadcast CHRDO
  is also ROERR.

Every RCLK period with DSTB and TRSF high during this card's readout counts
one 40-bit word; the count at the end of the readout becomes NDSTB. Only
parity-clean, valid instructions are passed on as events: WPINC (0x18),
RPINC (0x19) and CHRDO, with their chip number and broadcast bit.

**Scope** (`bc_scope`). From the tick on which CSTB rises, DSTB, WRITE, ACK
and TRSF are recorded for 10 RCLK periods into DSTBSC, WRSC, ACKSC and
TRSFSC (bit 0 = the CSTB period). The record stays until the next
instruction, so the RCU can see, for example, that ACK came two periods late.

## Multi-event buffer mirror

Each ALTRO stores accepted events in a multi-event buffer with a write and a
read pointer. `bc_meb_mirror` keeps a copy per chip (depth 8):

* an L2 trigger takes one buffer in every chip; WPINC takes one in the
  addressed chip or, broadcast, in all chips;
* RPINC frees one buffer in the addressed chip (or all);
* a channel readout changes nothing but must find the chip's buffer
  non-empty (else BEMPY);
* a global reset or BCRST empties all buffers.

WRPTER and RDPTER advance modulo the depth, MEVBF is the number of occupied
buffers, and RBUFF holds the free buffers for each of the 128 channels.
An overflowing write sets BFULL and leaves that chip unchanged; an RPINC on
an empty chip is ignored. BSYERR is checked at every L2, the moment when all
chips must hold the same number of events.

## Monitoring and counters

`bc_monitor` stores the ADC conversions. The ADC (a 5-channel 10-bit
AD7417 on the card) is outside this RTL: conversions arrive on
`adc_valid_i / adc_ch_i / adc_data_i` with channel 0 temperature, 1 analogue
voltage, 2 digital voltage, 3 analogue current, 4 digital current. Error
levels are registered one cycle after a value or a limit changes.

`bc_stats` counts rising edges of L1, L2 and global reset, CHRDO commands
and readout data strobes. The 16-bit counters wrap, NDSTB saturates at 511.
Trigger overlap is a distance counter: an L1 that arrives fewer than
`TROVP_CYCLES` (4000 = 100 us at 40 MHz) after the previous one sets TROVP.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| I2C_PREFIX | 2'b10 | upper two bits of the I2C address |
| MEB_DEPTH | 8 | buffers per ALTRO multi-event buffer |
| TROVP_CYCLES | 4000 | L1 overlap window in BC cycles |
| ACK_TIMEOUT | 16 | RCLK periods allowed between CSTB and ACK |
| TRSF_TIMEOUT | 32 | RCLK periods allowed between CHRDO ACK and TRSF |
| XFER_TIMEOUT | 1024 | longest readout transfer in RCLK periods |
| CLK_TIMEOUT | 64 | BC cycles without an RCLK/SCLK edge before an error |

Sizes fixed in `bc_pkg`: 8 chips, 16 channels, 10-bit ADC, 16-bit counters,
9-bit NDSTB, 10-sample scope, 16 logbook flags.

## Choices and departures

What the specification states is implemented as stated; where it is silent
or inconsistent, this RTL decided:

* Wire format, register addresses, 4-byte words, command-as-address: own.
* Clocking: one BC clock of assumed 40 MHz; all card inputs synchronized
  and the ALTRO bus oversampled (see above).
* INT is an output plus a separate acknowledge input rather than one shared
  open-drain line.
* ALTRO instruction layout, valid codes and the protocol rules with their
  timeouts come from the ALTRO chip, not from the BC specification, which
  only says that the protocol is checked.
* The 100 us overlap window is read as microseconds.
* The DSTB scope records DSTB (one table entry calls it a CSTB scope).
* The sampling-clock watchdog watches SCLK (its description mentions the
  readout clock).
* A "4 bit x 8" MEB mirror register is also described under the statistics
  under another name and for 16 chips; it is the MEVBF register here, for 8
  chips.
* RBUFF counts free buffers per channel; readout commands do not change it,
  only RPINC frees buffers, so all channels of a chip read the same value.
* MEB depth 8, inclusive bands, reset values, counter wrap, no interrupt
  mask: own choices.
* Not included: the ADC read-out sequencer (the AD7417 interface), access to
  BC registers over the ALTRO bus, and the analogue parts (regulators,
  switches).

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/bc_pkg.sv tb/board_controller_tb.sv --top-module board_controller_tb
./obj_dir/Vboard_controller_tb
```

Replace the testbench name for a single block (`bc_i2c_slave_tb`,
`bc_reg_access_tb`, `bc_monitor_tb`, `bc_errlog_tb`, `bc_stats_tb`,
`bc_altro_monitor_tb`, `bc_meb_mirror_tb`, `bc_scope_tb`,
`bc_clk_monitor_tb`). Add `+verilator+rand+reset+2` at run time to start
uninitialised state at random values; the testbenches pass that way.

`board_controller_tb` runs the top at its default parameters, in well under
a second: an I2C master model at 400 kHz, an ALTRO bus model on a 5 MHz
RCLK and an ADC model. It provokes each of the 16 logbook flags once and
checks it through ERRLOG together with the INT handshake, reads back every
kind of register, runs readouts of 37 and 200 words, fills, skews and
empties the buffers, stops both clocks, and uses all three commands. A
mechanism that never happened counts as a failure.

`control_network_tb` puts two cards with different hardware addresses on
one I2C bus and one ALTRO bus and checks that addressing, registers,
commands, errors and INT stay per card, and that broadcasts reach both.

Concurrent assertions (run by `--assert`) guard the main rules: one command
or write strobe per register access, SDA released when the slave is neither
acknowledging nor sending, bus events only right after an RCLK tick, and the
buffer mirror never exceeding its depth or disagreeing with RBUFF.

## How far to trust it

All modules pass Verilator lint and synthesize with Yosys. All testbenches
pass, and each fails against a deliberately broken copy of its module. What
is not verified: operation against real ALTRO chips or a real RCU, I2C at
rates above 400 kHz, and the case where RCLK equals the BC clock. The
protocol rules for RDERR, WRERR and ROERR are a reasonable reading of the
ALTRO bus, not a specified behaviour; check them against your RCU firmware
before relying on those flags.
