# CCB main logic: clock and control for a CSC peripheral crate

A crate of cathode strip chamber (CSC) electronics needs the LHC clock and the
LHC trigger and timing signals. These include Level-1 accepts, bunch-crossing
zero, resets and calibration requests. Every board in the crate must get them
on the same clock edge. The Clock and Control Board (CCB) sits in one slot.
It receives the signals from a TTCrx receiver mezzanine and from the VME crate
controller. It turns them into:

- the bussed "fast control", reload and special-purpose lines of the custom
  backplane;
- a point-to-point 40 MHz clock to every slot.

It also listens to the other boards: configuration-done flags, status pulses,
L1A requests and releases. It can hold back triggers until a board says it is
ready.

This repository is the main programmable logic of the CCB in its
peripheral-crate form, written as synthesizable SystemVerilog. Everything
runs in one 40 MHz clock domain (25 ns per clock). The top module is
`ccb_top`.

## Block map

```
             TTCrx outputs ──► ttc_q ─┬─► ccb_ttc_latch (CSR12..16, counters)
                                      ├─► ccb_cmd_decoder u_dec_ttc ─┐ (raw TTC commands)
                                      └─► ccb_fast_ctrl ──► ccb_cmd/ccb_data bus ──► backplane
 VME ─► ccb_vme_slave ─► internal bus ┬─► ccb_csr (CSR1..17, command pulses "cmd")
                                      └─► ccb_i2c_bridge ─► PCF8584 (programs the TTCrx)
                 ccb_cmd bus ─► ccb_cmd_decoder u_dec_sel ─► resets, BC0, L1 reset, send-counter
        decoded commands + cmd ─► ccb_reload_ctrl   (hard / soft resets)
                                ─► ccb_special_bus  (calibrate, ADB pulses, direct pretriggers)
                                ─► ccb_l1a_ctrl     (L1ACC sources, delays, hold, counter)
                                ─► ccb_aux_pulses   (reserved lines, L1 reset, TTCrx reset)
 quartz / TTCrx / front-panel clocks ─► ccb_clock_select ─► ccb_clock40 and core clock
```

`ccb_pkg` holds the structs for every boundary bundle. These are
`ttcrx_t`, `bp_in_t`, `bp_out_t`, `fp_in_t`, `fp_out_t` and `led_t`. The package
also holds the command codes and the register map. Helper modules used
throughout are:

- `ccb_pulse_gen`, a retriggerable pulse stretcher;
- `ccb_delay_line`, a 255-stage shift register with a tap;
- `ccb_sync_edge`, a two-flop synchroniser with a rising-edge detector;
- `ccb_l1a_counter`.

## Two sources of commands: "TTCrx" and "VME" mode

The backplane has a six-bit command bus `ccb_cmd[5:0]` with a strobe. It also
has an eight-bit data bus `ccb_data[7:0]` with its own strobe, plus
`ccb_bcntres` and `ccb_evcntres`. CSR1 bit 0 chooses who drives them.

| CSR1[0] | ccb_cmd / strobe | ccb_bcntres / evcntres | ccb_data / strobe |
|---|---|---|---|
| 1, "TTCrx" | TTCrx Brcst<7:2> / BrcstStr1 | TTCrx BCntRes / EvCntRes | Dout when DoutStr comes with DQ = 0 |
| 0, "VME" | CSR2[7:2], strobe on every CSR2 write | CSR2[0] / CSR2[1] on a CSR2 write | CSR3[7:0], strobe on every CSR3 write |

In both modes, commands 20–23 (hex) put one byte on `ccb_data` with a data
strobe:

- 20: bunch count [7:0];
- 21: event count [7:0];
- 22: event count [15:8];
- 23: event count [23:16].

The counts are the ones last latched from the TTCrx counter outputs, the same
values CSR12–CSR14 show. The front-panel BCNTRES edge also pulses
`ccb_bcntres`.

Two command decoders are instantiated. They separate two groups of commands:

- **`u_dec_sel`** decodes the *selected* `ccb_cmd` bus, whatever CSR1[0]
  chooses. It drives:
  - the hard and soft resets (04, 10–13, 1C–1F);
  - BC0 (01) and L1 reset (03);
  - the send-counter commands.

  In VME mode a write of command 04 to CSR2 therefore resets every board.
- **`u_dec_ttc`** decodes the TTCrx broadcast directly. It drives the special
  purpose buses:
  - calibrate (14–16) and dmb_cfeb_initiate (17);
  - ADB sync/async (18, 19, 25);
  - direct pretriggers (1A, 1B).

  These must work in both modes, so in VME mode the selected-bus decode is
  ORed in as well. This lets a CSR2 write also reach them.

Every VME write-only address also makes a one-clock command pulse of its own.
These are the `vme_cmd_t` fields. They reach the same logic as the decoded
commands.

## L1ACC, pretriggers and hold mode (`ccb_l1a_ctrl`)

This is the part with the most interplay. It decides when the backplane
`ccb_l1accept` and the two pretriggers fire. The pretriggers are
`clct_external_trigger` and `alct_external_trigger`.

**Sources.** There are six L1ACC request sources. Each has a CSR1 mask bit,
where 1 means disabled:

| source | mask |
|---|---|
| TTCrx L1Accept | CSR1[3] |
| VME write to Base+2a | CSR1[4] |
| backplane `tmb_l1a_request` | CSR1[5] |
| front-panel External L1ACC edge | CSR1[7], and the front panel must be enabled by CSR1[8] |
| any ALCT ADB *sync* request (TTC 18/25, Base+40/3e, front panel) | CSR1[11] |
| any ALCT ADB *async* request (TTC 19/25, Base+42/3e, front panel) | CSR1[12] |

**Delays.** The OR of the enabled sources is the L1ACC request. It feeds:

- the 32-bit request counter;
- the L1ACC delay line, set by CSR5[7:0] = n;
- the pretrigger delay line, set by CSR5[15:8] = m.

Both delays count from the same request. Each line is a 255-stage shift
register read through a tap, so any mix of requests already in flight is kept.

A request registered at clock t reaches the backplane at:

- t + n + 1 for the L1ACC;
- t + m + 1 for the pretriggers.

The TTCrx input register adds one clock in front of this. A delay of 0 acts
as 1. The delayed pretrigger to ALCT and the one to CLCT have their own masks,
CSR1[9] and CSR1[10].

**Direct pretriggers.** These come from:

- TTC commands 1A / 1B;
- VME Base+44 / 46;
- front-panel pulses.

They skip the delay line and the hold. They come out one clock after the
request.

**Hold.** A `hold` flag stops the delayed L1ACC and the delayed pretriggers
from reaching the backplane. Requests are still counted.

The flag is set by:

- dmb_cfeb_initiate, from TTC command 17 or VME Base+5a;
- when CSR1[13] = 0, the first L1ACC actually sent to the backplane. The
  crate then takes one trigger and waits.

The flag is cleared by:

- backplane `dmb_l1a_release`, unless CSR4[9] = 1;
- backplane `tmb_l1a_release`, unless CSR4[8] = 1;
- a VME write to Base+5c.

If a release and a set arrive in the same clock, the release wins.

**Counter.** The counter counts every enabled request, whether or not it is
sent. Its controls:

- after power-up and after a CCB reset it is cleared and disabled;
- Base+9c enables it, Base+9e disables it and Base+9a clears it;
- reading Base+96 returns the low 16 bits and latches the high 16 bits;
- Base+98 then returns the latched high half, so a 32-bit read is consistent.

## Reload, special-purpose and reserved lines

**Hard resets.** Commands 10–13, or writes to Base+2c/2e/30/32, pulse the
TMB, DMB, ALCT or MPC reload line for 16 clocks (400 ns). Command 04,
Base+34 or the front-panel hard-reset edge pulses all four. The front-panel
source can be masked by CSR1[15].

**Soft resets.** These are 25 ns pulses from:

- commands 1D/1E/1F or Base+6a/7e/64, for DMB, TMB and MPC;
- command 1C or Base+3c, for all three.

**Calibrate.** `dmb_cfeb_calibrate[2:0]` are 25 ns pulses. They come from
commands 14–16, Base+48/4a/4c, or front-panel edges.

**ADB pulses.**

- `alct_adb_pulse_sync` is stretched to 20 clocks (500 ns).
- `alct_adb_pulse_async` is one clock long from TTC or VME.
- The front-panel async input is passed straight through, gated only by the
  front-panel enable, so it keeps the length of its source.
- Every ADB source also makes an L1ACC request, as described above.
- Command 25 and Base+3e make both pulses.

**Reserved lines.** Each of these lines gives a 25 ns pulse on a write to its
address:

- `ccb_reserved[3:1]`;
- `tmb_reserved0` and `tmb_reserved_out[2:0]`;
- `dmb_reserved[1:0]` and `dmb_reserved_out[4:0]`;
- `mpc_reserved[1:0]`;
- the front-panel reserved output.

**L1 reset** is pulsed by command 03 or Base+88.

**TTCrx reset.** Base+26 holds the TTCrx `Reset_b` low for 16 clocks.

**ccb_clock40_enable.** A write to Base+58, or a front-panel edge, makes a
pulse CSR4[7:0] clocks long. It lets boards pause parts of their logic.

## Clocks and resets (`ccb_clock_select`)

CSR1[2:1] chooses the clock sent to every slot:

| CSR1[2:1] | clock sent to every slot |
|---|---|
| 00 | on-board 80 MHz quartz ÷ 2 |
| 01 | TTCrx Clock40Des1 |
| 10 | front-panel clock |
| 11 | a single 25 ns pulse per VME write to Base+38 |

The CCB's own logic runs on the selected clock. The exception is single-pulse
mode, where it runs on the quartz/2 clock: the logic must keep running to make
the pulse. The switch is a plain multiplexer, so changing the source can give
one short or long clock phase.

**Resets.**

- `por_n` is the board power-up reset. It clears the divide-by-two flop and
  everything else.
- A write to Base+28 ("reset CCB internal logic") resets everything except
  the VME slave, so that the write cycle can finish. The I2C controller is
  held in reset during either reset.

**Register reset values.**

- CSR1 resets to 2000 (hex):
  - VME mode;
  - quartz clock;
  - all sources enabled;
  - front panel off;
  - hold-after-first-L1ACC off.
- CSR2–CSR5 reset to 0.

## Register map (byte offsets from the board base)

| offset | register | notes |
|---|---|---|
| 00–08 | CSR1–CSR5 | read/write |
| 0a, 0c, 0e | CSR6–CSR8 | configuration-done flags. TMB and ALCT have 9 bits each; DMB has 9 bits plus the MPC flag |
| 10, 12 | CSR9, CSR10 | sticky CLCT / ALCT status bits. CSR9[11:9] are the live TTCrx ready, single-error and double-error |
| 14 | CSR11 | sticky DMB/TMB reserved inputs; front-panel FP_RSV in [9:8] |
| 16–1e | CSR12–CSR16 | TTCrx snapshots: bunch count, event count low and high, broadcast and DQ, Dout and SubAddr |
| 20, 22 | PCF8584 | register A0 = 0 / A0 = 1 |
| 24 | | PCF8584 reset |
| 5e | CSR17 | firmware date: day [4:0], month [8:5], year − 2000 [11:9] |
| 4e, 50, 52 | | clear CSR9 / CSR10 / CSR11 |
| 96, 98 | | L1ACC counter low (latches high) / high |
| 26–8a, 9a–9e | | the commands listed above |

## VME and I2C

**VME slave (`ccb_vme_slave`).**

- It accepts A24/D16 cycles with address modifiers 39, 3A, 3D and 3E.
- The board is selected when A[23:19] matches the slot's geographical
  address. With the `geo_mode` strap off, it matches the fixed base C00000
  instead.
- A[18:8] must be zero, and A[7:1] picks the register.
- Strobes are synchronised to the core clock. DTACK is asserted once the
  addressed register has answered, and held until the data strobes go away.

**I2C bridge (`ccb_i2c_bridge`).** The TTCrx is programmed over I2C through a
PCF8584 controller in its 68000 bus mode.

- Base+20/22 reads and writes become PCF8584 cycles.
- Each cycle is a full four-phase handshake on CS and DTACK.
- If DTACK never comes, a time-out of 255 clocks ends the access, with read
  data FF.
- The controller's 8 MHz reference clock is the 40 MHz clock divided by 5.

## Front panel and LEDs

- Front-panel inputs are active high and asynchronous. Each one goes through
  a synchroniser and acts on its rising edge.
- All of them except the clock are gated by CSR1[8]. Some also have their own
  masks: BC0 CSR1[6], L1ACC CSR1[7], BCNTRES CSR1[14], hard reset CSR1[15].
- Front-panel outputs are active low. They mirror:
  - the CLCT and ALCT status lines;
  - BC0, L1ACC and the command strobe;
  - the reserved output.
- The backplane lines are active low in both directions, following the GTLP
  convention.

The LEDs are one-shots, stretched to 2,000,000 clocks (50 ms):

- L1A sent;
- BC0;
- any hard reset;
- I2C access;
- VME access;
- TTCrx single error;
- TTCrx double error.

Mode (CSR1[0]) and TTC ready are shown as static levels.

## Where this RTL makes its own choices

The following follow the board specification:

- the register map;
- the command codes;
- the pulse lengths;
- the masks;
- the source lists;
- the hold and release rules;
- the clock options.

The following are this design's own choices:

- **Latency.** Exact cycle latencies follow from one register per stage.
  TTCrx input → command decode → output is about 3 clocks.
- **Rounding.** 400 ns is rounded to 16 clocks (399 ns at 40.08 MHz). 500 ns
  is 20 clocks.
- **Pulse lengths.** The TTC/VME ADB-async pulse is one clock. The TTCrx reset
  is 16 clocks. The PCF8584 reset is 64 clocks. The LED one-shot is 50 ms.
- **Release priority.** A release wins over a set of the hold flag in the
  same clock.
- **CSR4[7:0] is the clock40_enable length.** This CSR4 field is also given
  as an L1A-request delay for the front panel, but that use exists only in the
  Track Finder crate firmware, which is not built here.
- **Decoder wiring.** The selected-bus decode (resets, BC0) is split from the
  raw TTCrx decode (special buses) as described above.
- **Send-counter source.** The "counter registers" sent by commands 20–23 are
  the TTCrx counts latched in CSR12–CSR14.
- **Sticky bits.** CSR9–CSR11 keep the OR of every pulse since the last
  clear.
- **I2C bridge details.** The A0 mapping, the handshake and the time-out.

The following are not in this RTL, by design:

- the Track Finder crate variant: L1A-request forwarding to the front panel
  and CSR4[11:10];
- the electrical parts: GTLP transceivers, LVDS clock drivers, ECL
  receivers and drivers;
- the TTCrx and PCF8584 themselves;
- the configuration EPROM.

The TTCrx and the PCF8584 appear only as ports. The bench in `tb/` contains a
bus model of the PCF8584.

## Simulating

Each module has a self-checking bench `tb/tb_<module>.sv`. Each bench ends by
printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/ccb_pkg.sv tb/tb_ccb_top.sv --top-module tb_ccb_top -Mdir obj -o sim
./obj/sim
```

**`tb_ccb_top`.** This bench runs the whole board at its default parameters.
It drives the board only through its pins:

- an 80 MHz quartz;
- TTCrx outputs;
- VME cycles;
- backplane and front-panel inputs;
- the PCF8584 model.

It walks through 38 mechanisms. These include:

- both command modes and the switch between them;
- 400 ns hard resets;
- L1ACC and pretrigger delays;
- masks, hold and all three releases;
- the counter;
- ADB pulses;
- send-counter;
- I2C;
- sticky bits;
- geographical addressing;
- all four clock sources;
- the CCB reset.

It counts each mechanism it sees work, and fails if any one never happened.

**Unit benches.** These cover each block in more depth. Examples:

- all 64 command codes;
- every delay from 0 to 255;
- random TTCrx traffic against CSR12–CSR16;
- VME address filtering;
- the I2C handshake against a slow or silent controller.

**Assertions.** The VME slave and the I2C bridge carry concurrent assertions
for their handshake rules. Add `--assert` to the command above to check them
while simulating.

**Changing parameters.** Top-level parameters are the firmware date and the
LED one-shot length. Block parameters hold the pulse lengths, in clocks.
