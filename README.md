# 100BASE-T1 automotive Ethernet PHY controller (TJA1101B-class)

An automotive single-pair Ethernet PHY spends much of its life asleep. It
has to wake up on a pin or on a frame from its link partner. It has to agree
with that partner before both go back to sleep, and it has to watch its own
supplies and temperature while a host programs it over MDIO. This RTL is the
digital core of such a PHY, modelled on the NXP TJA1101B. It sits between a
MAC (MII or RMII) and the 100BASE-T1 coding and line interface, and it holds:

- the **power-mode state machine**: POWER OFF, DISABLE, RESET, STANDBY,
  NORMAL, SLEEP REQUEST, SILENT and SLEEP, with the device's timers;
- the **sleep handshake**: low-power-sleep (LPS) frames exchanged with the
  link partner, in the manner of OPEN Alliance TC10;
- **local and remote wake-up**, with forwarding of a wake-up in either
  direction;
- the **SMI (MDIO) slave** and its register file, with the side effects of
  reads and writes;
- **interrupts** on INT_N, **undervoltage/overtemperature** supervision and
  **pin strapping**;
- **frame forwarding**, the internal, external and remote **loopbacks**, and
  the 4 KiB / 16 KiB **payload limit**;
- two **header sniffers** that record Ethernet, IPv4, TCP and UDP header
  fields of every frame crossing the MII.

The PCS (4B3B, 3B2T, scrambler), the PAM3 PMA, the analog front end, the PLL
and link training are **not** here. Where they would connect, the top has a
**frame byte stream** (`mdi_tx`, `mdi_rx`) and three status inputs
(`link_up`, `sym_err_ev`, `link_fail_ev`). A frame on that stream is what a
PCS would hand over after decoding: destination address first, no preamble.
So the core can be simulated against a link-partner model, and a PCS can
later be put behind it.

## Block map

| file | block |
|------|-------|
| `rtl/tja_pkg.sv` | states, register indices and bit positions, POWER_MODE codes, frame codes, the `byte_stream_t` frame byte, sniffer record structs |
| `rtl/tja1101.sv` | top: microsecond prescaler, wiring, interrupt event map |
| `rtl/power_fsm.sv` | power-mode state machine and all its timers |
| `rtl/wake_ctrl.sv` | local wake-up filter, remote wake-up, forwarding |
| `rtl/mdio_slave.sv` | SMI frame decoder, oversampling MDC |
| `rtl/smi_regs.sv` | registers 0-3 and 15-28 and their callbacks |
| `rtl/irq_ctrl.sv` | REG21 interrupt source latch, REG22 mask, INT_N |
| `rtl/env_monitor.sv` | undervoltage, overtemperature and warning comparators |
| `rtl/pin_strap.sv` | capture of CONFIG0-3, PHYAD1-2, SEL_1V8 |
| `rtl/mii_tx_deser.sv` | TXD nibbles/dibits to frame bytes, preamble removal, TXER |
| `rtl/mii_rx_ser.sv` | frame bytes to RXD nibbles/dibits, preamble, RXDV/RXER, FIFO |
| `rtl/frame_classifier.sv` | length/type of received frames: LPS 0x0900, wake-up 0x0842 |
| `rtl/frame_gen.sv` | the PHY's own LPS and wake-up frames |
| `rtl/phy_datapath.sv` | routing MII<->medium, loopbacks, size limit, control-frame insertion |
| `rtl/eth_sniffer.sv` | header recorder |

Data flow: the MAC's TXD is gathered by `mii_tx_deser` and passed to
`phy_datapath`, which sends it to `mdi_tx` or loops it back. `mdi_rx` goes
to `frame_classifier`, which sees every frame whatever the state (this is how
a wake-up frame is heard in SLEEP), and to `phy_datapath`. From there it
goes to `mii_rx_ser` and out on RXD. `frame_gen` slots LPS and wake-up
frames onto `mdi_tx` between other frames. One `eth_sniffer` watches each
MII direction.

## Power modes

This state machine is the heart of the design and the part that needs the
most care.

### What each state allows

| state | SMI | MII/medium data | registers | INH | other |
|-------|-----|-----------------|-----------|-----|-------|
| POWER OFF | off | off | held at default | low | straps sampled |
| DISABLE | off | off | kept | high | |
| RESET | off | off | held at default | high | straps sampled |
| STANDBY | on, 2 ms after entry from POWER OFF/DISABLE/RESET | off | kept | high | |
| NORMAL | on | on, 2 ms after entry (link initialisation) | kept | high | |
| SLEEP REQUEST | on | off (frames dropped, but seen) | kept | high | sleep handshake |
| SILENT | on | on | kept | high | waiting for partner's LPS |
| SLEEP | POWER_MODE read only | off | kept | low | wake-up detection only |

"SMI off" means the slave does not answer: MDIO stays undriven. In SLEEP a
read of REG17 returns the POWER_MODE field, every other read returns 0, and
writes are ignored.

### Transitions

Evaluated every clock, highest priority first:

1. Battery undervoltage: go to POWER OFF, from any state. When the battery
   recovers, POWER OFF goes to STANDBY and raises the PWON interrupt (plus
   UV_ERR if a supply is still low).
2. RST_N low, or REG0.RESET written: go to RESET. RESET leaves for STANDBY
   once RST_N has been high for 20 µs.
3. EN low: go to DISABLE. DISABLE leaves for STANDBY once EN has been high
   for 20 µs.
4. Supply undervoltage that has lasted 670 ms: go to SLEEP. This timer runs
   in STANDBY, NORMAL, SLEEP REQUEST and SILENT. It is armed only once all
   supplies have been present after power-on, so a board that powers up
   with a missing supply stays in STANDBY.
5. Supply undervoltage or overtemperature in NORMAL, SLEEP REQUEST or
   SILENT: go to STANDBY. STANDBY refuses to go to NORMAL while either lasts.
6. Commands and events:
   - STANDBY: the normal command, autonomous mode (AUTO_OP) or a wake-up
     gives NORMAL. The sleep command gives SLEEP, the silent command SILENT.
   - NORMAL: the standby command gives STANDBY. The sleep command, a
     received LPS frame, or 1 s without data in autonomous mode gives SLEEP
     REQUEST. The silent command gives SILENT.
   - SLEEP REQUEST: described in the next section.
   - SILENT: the partner's LPS gives SLEEP. The normal command, or expiry
     of the request timer, gives NORMAL.
   - SLEEP: a local or remote wake-up gives STANDBY. The pending wake-up
     then carries it to NORMAL on the next clock.

Entering NORMAL from STANDBY or SLEEP raises the WAKEUP interrupt. So does
a data-detected abort of a sleep request, when REMWUPHY is set. POWER_MODE commands are
written to REG17 bits 14:11 with these codes:

| command | code |
|---------|------|
| normal | 0011 |
| standby | 1100 |
| sleep | 1010 |
| silent | 1001 |
| no change | 0000 |

Any other code raises CONTROL_ERR.

### The sleep handshake

Two PHYs only sleep when both agree. Both directions use the same frame: a
60-byte broadcast frame with length/type **0x0900** (LPS). A frame with
length/type **0x0842** is a wake-up request.

```
 PHY A (asked to sleep)                     PHY B (link partner)
 NORMAL --sleep cmd--> SLEEP REQUEST
        start t_req
        send LPS  ---------------------->  NORMAL --LPS--> SLEEP REQUEST
 SILENT <-- LPS sent                                      send LPS
        <--------------------------------  LPS             SILENT
 SLEEP  <-- partner's LPS                  ... SLEEP <-- A's LPS seen earlier
```

On entering SLEEP REQUEST, the request timer `t_req` starts. What happens
next depends on SLEEP_ACK (REG28 bit 0):

- **SLEEP_ACK = 0.** The LPS frame is queued at once. A MAC frame or a
  medium frame that starts before the LPS frame has fully gone aborts the
  request. The PHY goes back to NORMAL and raises SLEEP_ABORT and
  DATA_DET_WU, plus WAKEUP if REMWUPHY is set. An LPS frame already on the wire still finishes.
- **SLEEP_ACK = 1.** The acknowledge timer `t_ack` runs first, and data is
  ignored during it. A wake-up in that window returns to NORMAL. When
  `t_ack` expires the LPS frame is sent.

Once the LPS frame has left, the PHY is in SILENT. If the partner's LPS
arrives before `t_req` expires, the PHY goes to SLEEP. Otherwise it returns
to NORMAL with SLEEP_ABORT. SLEEP_REQUEST_TO (REG19 bits 1:0) selects the
pair of times:

| SLEEP_REQUEST_TO | t_req | t_ack |
|---|---|---|
| 00 | 400 µs | 200 µs |
| 01 (default) | 1 ms | 500 µs |
| 10 | 4 ms | 2 ms |
| 11 | 16 ms | 8 ms |

### Timers

All timers count microseconds from one shared tick. Set `CLK_MHZ` on the top
to the clock frequency: 25 for MII, 50 for RMII. The timer lengths are
parameters of `power_fsm` and `wake_ctrl`.

| timer | default | parameter |
|---|---|---|
| start-up before SMI (t_SPon) | 2 ms | `T_SPON_US` |
| link initialisation (t_init) | 2 ms | `T_INIT_US` |
| EN / RST_N detection | 20 µs | `T_DET_EN_US`, `T_DET_RST_US` |
| undervoltage time-out | 670 ms | `T_UVD_US` |
| autonomous power-down | 1 s | `T_PD_AUTN_US` |
| local wake-up filter | 20 ms / 500 / 200 / 40 µs | `wake_ctrl.T_LWU0..3_US` |

## Wake-up

The three settings below live in REG18 and REG28; the filter time is chosen
by LOC_WU_TIM (REG27 bits 9:8).

- **Local wake-up.** With LOCWUPHY set, WAKE_IN_OUT must stay high for the
  filter time, and then one event fires. The pin must fall before the next
  event can fire.
- **Remote wake-up.** With REMWUPHY set, a received 0x0842 frame is a remote
  wake-up.
- **Forwarding.**
  - FWDPHYLOC: a remote wake-up drives WAKE_IN_OUT high for 50 µs. The PHY
    ignores its own pulse.
  - FWDPHYREM: a local wake-up sends a wake-up frame to the partner.

## SMI and registers

The SMI slave decodes standard clause-22 frames:

- 32 preamble ones, start 01;
- opcode 10 for read, 01 for write;
- PHY address, register address;
- turnaround (Z0 on reads), then 16 data bits, MSB first.

Bits are sampled on MDC rising edges. MDC is oversampled by the core clock,
which must be at least four times faster. The PHY address is PHYAD in REG19,
with a strapped default.

Registers and the behaviour attached to them:

| reg | name | notes |
|-----|------|-------|
| 0 | basic control | bit 15 RESET (self-clearing, software reset), bit 14 LOOPBACK |
| 1, 15 | status, extended status | fixed capability bits, link status |
| 2, 3, 16 | PHY identifiers | parameters |
| 17 | extended control | 14:11 POWER_MODE (reads the current mode), 4:3 LOOPBACK_MODE, 2 CONFIG_EN |
| 18 | configuration 1 | 15 MASTER_SLAVE, 14 FWDPHYLOC, 11 REMWUPHY, 10 LOCWUPHY, 9:8 MII_MODE; writable only while CONFIG_EN = 1 |
| 19 | configuration 2 | 15:11 PHYAD, 2 JUMBO_ENABLE, 1:0 SLEEP_REQUEST_TO; low bits default 0x245 |
| 20 | symbol error counter | saturating |
| 21 | interrupt source | cleared by a read |
| 22 | interrupt enable | default 0xFFFF |
| 23 | communication status | 15 link up, 4 RECEIVE_ERR, 3 TRANSMIT_ERR (latched, cleared by a read) |
| 24 | general status | 15 INT_STATUS, 13 LOCAL_WU, 12 REMOTE_WU, 11 DATA_DET_WU, 10 EN_STATUS, 9 RESET_STATUS; bits 13, 12 and 10 cleared by a read |
| 25 | external status | 15/14/13/11 undervoltage on VDDD3V3/VDDA3V3/VDDD1V8/VDDIO, 10 TEMP_HIGH, 9 TEMP_WARN |
| 26 | link fail counter | cleared by a read |
| 27 | common configuration | 15 AUTO_OP, 12 LDO mode, 9:8 LOC_WU_TIM |
| 28 | configuration 3 | 1 FWDPHYREM, 0 SLEEP_ACK |

REG21 bits:

| bit | interrupt |
|---|---|
| 15 | PWON |
| 14 | WAKEUP |
| 13 | WUR_RECEIVED |
| 12 | LPS_RECEIVED |
| 5 | CONTROL_ERR |
| 3 | UV_ERR |
| 2 | UV_RECOVERY |
| 1 | TEMP_ERR |
| 0 | SLEEP_ABORT |

INT_N is low while any latched source is enabled in REG22. It is
registered, so it follows a new source by one clock. Reading REG21 clears
every source and releases INT_N. An event in the same clock as the
read survives it.

Some values can be used to check a simulation:

- Power-on with the supplies still low reads REG21 = 0x8008.
- A local wake-up from SLEEP reads 0x4000.
- At 200 °C, REG25 reads 0x0600.

## Supervision and straps

`env_monitor` compares digitised sense inputs (mV, °C) every clock:

| condition | threshold |
|---|---|
| battery undervoltage | below 3.3 V |
| VDDIO, VDDD3V3, VDDA3V3 undervoltage | below 3.3 V |
| VDDD1V8 undervoltage | below 1.8 V |
| overtemperature | 180 °C and above |
| temperature warning | 155 °C and above |

It raises UV_ERR when a supply first drops and UV_RECOVERY when all are back.
All thresholds are parameters.

Straps are sampled continuously in POWER OFF and RESET, and the last sample
is kept:

| pins | setting |
|---|---|
| CONFIG0 | master/slave |
| CONFIG1 | autonomous operation |
| CONFIG3:2 | MII_MODE: 00 MII, 01/10 RMII, 11 reverse MII |
| PHYAD2:1 | PHY address bits 2:1 |
| SEL_1V8 | LDO mode |

`rx_oe` is low while straps are sampled, so the shared RXD pins can be
released to their strap resistors.

## Frame path

`byte_stream_t` is `{valid, sof, eof, err, data[7:0]}`, one byte per clock
when `valid`.

- **MII/RMII transmit.** MII takes one nibble per clock, low nibble first.
  RMII takes one dibit per clock, low dibit first, at 50 MHz.
  - The preamble is dropped; bytes after 0xD5 form the frame.
  - A byte sent with TXER high is marked `err`. A frame ending on a partial
    byte also gets `err`.
  - Bytes leave one byte time late, because the last byte is only known
    when TXEN falls.
- **MII/RMII receive.** Each frame gets seven 0x55 bytes and 0xD5 in front.
  - RXER is high on `err` bytes, and RXDV (CRSDV) frames the whole thing.
  - A 16-entry FIFO absorbs bursts. An underrun ends the frame early and
    drops the rest of it. An overflow sets RECEIVE_ERR.
- **Routing** is decided on each frame's first byte and kept to its end.
  Data passes in NORMAL (after t_init) and SILENT; otherwise frames are
  dropped. Data detection, which wakes or aborts, still sees them.
  - LOOPBACK with LOOPBACK_MODE 00 (internal), 01 or 10 (external): MAC
    frames come back on RXD, and medium frames are dropped.
  - LOOPBACK_MODE 11 (remote): medium frames go back out, and MAC frames
    are dropped.
  - Without a PCS, internal and external loopback behave the same.
- **Size limit.** Payload is counted as frame length minus 18 (header and
  FCS). Past 4096 bytes, or 16384 with JUMBO_ENABLE, every further byte is
  marked `err` and TRANSMIT_ERR is set, whichever way the frame travels.
- **Control frames** from `frame_gen` are sent in any state, between other
  frames. A frame for the medium that starts while one is being sent is
  dropped.

## Sniffers

Each `eth_sniffer` counts frames from 1 and time-stamps each frame's first
byte in ns since reset. At the end of a frame it publishes the following
records:

| record | fields | kept when |
|---|---|---|
| data link | destination and source address (vendor and host halves), length/type, last 4 bytes as FCS | always |
| IPv4 | all header fields and the first option word | type 0x0800, version 4 |
| TCP | ports, sequence and acknowledgment numbers, header length, flags, window, checksum, urgent pointer, first 12 option bytes | IP protocol 6 |
| UDP | ports, length, checksum | IP protocol 17 |

A record keeps its last value until a frame of its kind comes. Its
`frame_no` says which frame it belongs to.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5 (package first):

```
verilator --binary --timing -Wno-fatal rtl/tja_pkg.sv \
  $(ls rtl/*.sv | grep -v tja_pkg) tb/tb_tja1101.sv --top-module tb_tja1101
./obj_dir/Vtb_tja1101
```

`tb_tja1101` runs the whole PHY at its default parameters. The timers run at
full length, so it covers about 1.7 s of device time in about 40 s of
simulation. It drives:

- the SMI with a bit-level MDIO master;
- the MII from a MAC model;
- the medium port from a link-partner model that answers LPS frames.

It walks the 16-step transition sequence: POWER OFF, STANDBY, RESET,
STANDBY, DISABLE, STANDBY, NORMAL, STANDBY, SLEEP, STANDBY, NORMAL, SLEEP
REQUEST, SILENT, SLEEP, STANDBY, NORMAL. Then it covers:

- sleep abort on time-out and on data, the 1 s autonomous power-down,
  SLEEP_ACK timing and both kinds of wake-up forwarding;
- control errors, overtemperature and interrupt masking;
- all loopbacks, TXER, both payload limits exactly at the boundary, and
  FIFO overflow;
- RMII after a strap change, software reset, the 670 ms undervoltage
  time-out and battery loss;
- the sniffer, on a TCP/IPv4 frame.

Each mechanism is counted, and the test fails if one never happened.
`tb_power_fsm` uses shortened timers so every duration can be measured in
clocks.

## Where this departs from the reference behaviour, and limits

- **REG23 error bits** are latched by error events and **cleared** by a
  read. The reference model says they are set to 1 by a read, which would
  carry no information.
- **Register bit positions** and the POWER_MODE codes follow the public
  TJA1101 register map. They reproduce the register values of the reference
  simulations (REG21 0x8008 and 0x4000, REG25 TEMP_HIGH 0x0400, REG19
  0x0245), with one exception. The reference overtemperature run shows
  REG21 = 0x4022, which includes bit 5 (CONTROL_ERR here). This design sets
  only TEMP_ERR (bit 1) for an overtemperature.
- **Times:**
  - The autonomous power-down uses 1 s, from a 1-2 s range.
  - LOC_WU_TIM = 00 uses 20 ms, from 10-20 ms.
  - The forwarded WAKE pulse length (50 µs) is this design's choice.
- **SLEEP_ACK = 1:** on acknowledge expiry the LPS frame is sent and the
  normal handshake follows (SILENT, then SLEEP on the partner's LPS). The
  PHY does not go straight to SLEEP.
- **Leaving SLEEP:** the PHY spends one clock in STANDBY on the way to
  NORMAL.
- **Entering SLEEP** happens as soon as the partner's LPS arrives within
  the request time. The PHY does not wait out the full request time.
- **Not built:**
  - the coding and line side (PCS, PMA, hybrid, PLL, link training);
  - the configurable INH behaviour;
  - SQI and cable test features;
  - the reverse-MII clock direction (MII_MODE 11 behaves as MII on the data
    pins).
- **Control frames** carry no FCS. A PCS placed behind `mdi_tx` would need
  to append one.
