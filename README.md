# aEUART: a UART that keeps time with its own oscillation

A UART needs a time reference: bit times of, say, 1/19200 s have to be produced
and measured. A synchronous UART divides a crystal clock. This design has no
clock at all. It is an **asynchronous**, delay-insensitive circuit in
**Four State Logic (FSL)**, and its registers form a closed ring that keeps switching
on its own. One pass through the ring is one **tick**. How long a tick takes depends on
gate delays, temperature, supply voltage and even on the data being processed, so a
tick is not a unit of real time. The UART still works at an exact baud rate, because
it measures the bus master's synchronisation pattern in ticks. From then on it produces
its bit times in ticks of that same oscillation. It resynchronises on every later
pattern, which cancels slow drift of the oscillation.

The function is that of an *enhanced* UART (EUART) for time-triggered field buses such
as TTP/A and LIN. It provides:

- automatic baud rate detection from a synchronisation pattern, with continuous
  resynchronisation;
- a fractional baud rate setting (12 integer and 4 fraction bits);
- three-sample oversampling of received bits;
- a spike filter on the bus input;
- a timer with time stamps of received frames, and transmissions scheduled for a timer
  value;
- parity, framing, overrun and bus-collision detection;
- a memory-mapped host interface with eight 16-bit registers.

The architecture follows the asynchronous EUART (aEUART) of the thesis *Self-Oscillation as a Time-Reference
in Asynchronous Logic – the UART Example*. That thesis describes:

- the FSL coding;
- the register and its switching conditions;
- the units and the order in which they fire;
- the busdriver;
- the synchronisation rules.

It leaves out the logic inside the units, the register map and the exact wiring. Those
parts are this design's own. The section "Departures and own choices" at the end lists
them.

## 1. Four State Logic in one page

Every logical bit travels on two rails, `a` and `b`. Each value has two codes, one for
each of two **phases**:

| value | phase 0 (a,b) | phase 1 (a,b) |
|-------|---------------|---------------|
| LOW   | (0,0)         | (0,1)         |
| HIGH  | (1,1)         | (1,0)         |

- **Value and phase.** The value is rail `a` and the phase is `a XOR b`.
- **Data waves.** Successive data waves alternate phase. A changed phase therefore marks new data even when
  the value is the same as before.
- **Cheap phase change.** Moving from one phase to the other flips exactly one rail per bit.
- **Consistency.** A word is
  *consistent* when all its bits are in the same phase: it is then one complete wave.

`fsl_pkg` defines the two-rail type `fsl_t` and the helpers `fsl_enc`, `fsl_phase` and
`fsl_flip`.

**Gates** (`fsl_gate2`: OR, AND, XOR) compute only when their inputs are consistent.
The output is then in the inputs' phase. While the inputs are in mixed phases the gate
holds its last output, so half-arrived waves never produce glitches.

**Register** (`fsl_register`) is the only element that takes part in the handshake. It
contains two phase detectors (`fsl_phase_det`):

- the input detector holds the phase of the last consistent input word;
- the output detector reads the stored word.

The register captures a new word when both of these conditions hold:

1. the input phase differs from the stored phase, so a new wave is waiting;
2. the `pass` input equals the stored phase, so everything downstream has already taken
   the word that is about to be overwritten.

The register's handshake output `c_done` is simply the stored phase.

**Phase inverter** (`fsl_phase_inv`) flips rail `b` of every bit. The value stays the
same and the wave moves to the other phase. The inverters are what make feedback
possible:

- A register that reads its own output directly sees its own phase, and never sees a new
  wave.
- Through an inverter it sees the opposite phase, so it always has a "new" wave waiting.

**Handshake join** (`fsl_sync`) is used when a register has several readers. Its `pass`
is the C-element of their `c_done` lines, that is an AND with hysteresis. The output
changes only when all inputs agree and otherwise holds. Where a data path carries a
phase inverter, its handshake line is inverted too (`INV_MASK`).

`fsl_pipeline` shows these rules on a plain chain of registers:

- **Empty pipeline.** All stages start in one phase, and a word from the source runs
  straight through.
- **Full pipeline.** Neighbouring stages start in opposite phases. The stages hold waves
  the sink has not taken yet, so the sink sets the pace.

`aeuart_top` holds a four-stage full pipeline as a separate demonstration. It is not
connected to the UART and has its own `pl_*` ports. Its stages start in phases φ1, φ0,
φ1, φ0 from the source side, and the sink's `c_done` starts at 1. The sink first
receives the four initial words, last stage first, and then the source's words in
order.

## 2. The ring: six units that clock each other

Each aEUART unit (`aeuart_transmitter`, `aeuart_timing`, `aeuart_errctr`,
`aeuart_receiver`, `aeuart_ebr_generator`, `aeuart_uartctr`) has the same structure:

- a logic cloud computes the next state from the unit's own state and the states of other
  units;
- one wide FSL register stores that next state.

`fsl_unit` is the shared shell:

- it feeds the state back through a phase inverter;
- it detects the common phase of all cloud inputs;
- it encodes the cloud's result in that phase for the register.

Each unit's logic is an ordinary synchronous-style `always_comb` block over a packed
struct (`tx_t`, `tim_t`, …, all defined in `aeuart_pkg`). The FSL machinery around it
decides when that block's result is stored.

### Firing order

All six registers start in phase 0. The wiring fixes the order in which they fire:

```
      transmitter ──► timing ─┐
           │    ├───► errctr ─┤
           │    └───► receiver ──► ebr_generator ──► uartctr
           ▲                                            │
           └────────────── next tick ◄──────────────────┘
```

Rule: a unit reads every unit that fires **before** it in the tick directly. It reads
every unit that fires **at or after** it, itself included, through a phase inverter.

Take the situation at the start of a tick, when every register holds phase *p*:

- **Transmitter.** It reads only later units and itself, all inverted. Its whole input
  is therefore in phase *¬p* and consistent, so it fires first.
- **Timing, errctr and receiver.** They read the transmitter directly. Their input turns
  consistent in *¬p* only once the transmitter holds *¬p*.
- **Baud rate generator.** It also reads the receiver directly, so it has to wait for
  the receiver.
- **Control unit.** It reads all the others directly and fires last.

After the control unit has fired, the transmitter's inverted inputs are consistent in
*p* again, and the next tick begins. The control unit's `c_done` (`tick_o`) toggles
once per tick.

### Handshakes in the ring

Each register's `pass` is the `fsl_sync` of the `c_done` lines of all units that read
it. Lines are inverted where the reader sees the data through an inverter.

| register    | readers (direct)                  | readers (inverted)             |
|-------------|-----------------------------------|--------------------------------|
| transmitter | timing, errctr, receiver, uartctr | –                              |
| receiver    | ebr_generator, uartctr            | –                              |
| ebr_gen.    | uartctr                           | transmitter, timing, errctr, receiver |
| uartctr     | –                                 | all five others                |
| timing, errctr | uartctr                        | –                              |

A unit whose data must still be read by a later unit cannot overwrite it. Because of
this, no state is lost, however unevenly the gate delays vary.

### Cost of the ring

The data path of a tick runs through all six units in turn. A tick is therefore slow
compared with a single register loop, and its length varies with the operation being
performed. Both are acceptable:

- serial baud rates are hundreds of ticks per bit;
- the jitter is absorbed by sampling in the middle of each bit (section 4).

## 3. The busdriver

`aeuart_busdriver` is a 3-bit FSL register that is **not** part of the ring:

- Its `c_done` drives its own `pass`, so it captures as fast as it can, all the time.
- Bit 0 takes the bus level, which is converted to FSL in whatever phase the register
  expects next.
- Bits 1 and 2 take the previous samples through phase inverters.

Five FSL gates form the majority of the three samples. Their result is the filtered bus
level `bus_o`. A spike shorter than two samples never reaches the units. The units read
`bus_o` as a plain single-rail value.

## 4. Making time out of ticks

### EUBRS

The baud rate setting EUBRS is a 16-bit fixed-point number: 12 integer bits and 4
fraction bits. It is defined by

  t_bit = EUBRS / 16 · ½ tick,  i.e. EUBRS = 32 × (ticks per bit).

The baud rate generator (`aeuart_ebr_generator`) turns EUBRS into events with phase
accumulators:

- **Free-running channel.** It gains 32 per tick and wraps at EUBRS. Each wrap is a
  `bit_tick`, used by the transmitter and the timer. Crossing EUBRS/2 gives `tx_mid`,
  used by the error unit.
- **Receive channel.** It restarts at the receiver's start pulse. It gives three one-tick
  pulses per bit, at 7/16, 8/16 and 9/16 of the bit time (`rx_smp`).

When EUBRS is not a multiple of 32, some bit times are one tick shorter than others.
Over a frame, the fraction is kept exactly on average.

### Synchronisation

The bus master sends a synchronisation pattern, for example the byte 0x55, whose bits
alternate. The generator measures the pattern as follows:

1. A falling bus edge starts a measurement.
2. A counter measures each bit cell, that is the ticks from one edge to the next.
3. Each cell must match the previous one within 1/16 (6.25 %), computed as a shift.
4. A cell outside that tolerance, or an edge that does not come within it, aborts the
   measurement. The next falling edge starts a new one.
5. After 8 equidistant cells, EUBRS := 4 × (sum of the 8 cells), which is 32 × the mean
   cell. `sync_done` then pulses once.

The measurement never stops, so every later pattern re-synchronises the UART. It takes
only a few dozen cells of very little hardware and compensates long-term drift of the
oscillation.

The 6.25 % tolerance has bounds on both sides:

- It must be **larger** than one tick of difference between the first and the last cell.
  Otherwise a slowly drifting oscillation would fail to synchronise.
- It must be **small** enough that ordinary data, for example a slot of k zeros and k+1
  ones, is never taken for a pattern. For 13-bit TTP/A slots the usable window is about
  4 % to 16.6 %.

The control unit starts in state SYNC. `sync_done` takes it to READY, and only then
does the receiver listen. The control unit can also load EUBRS directly.

### What the oscillation may do

The receiver samples a bit at 7/16, 8/16 and 9/16 and takes the majority. A bit is
therefore read correctly as long as the timing error accumulated since the start edge
stays below about half a bit.

**Jitter.** If the tick period changes by *j* between synchronisation and reception,
the error after *n* bits is *n·j*. The condition is therefore *j·n < 50 %*. Two cases:

- **10-bit frame with 3.78 % jitter** (the value measured on the FPGA prototype of the
  original): 37.8 %, which works.
- **Longest frame this design allows** (start, 16 data bits, parity and 2 stop bits, 20
  bits in all): it needs the jitter to stay below 2.5 %.

The end-to-end test makes the ring about 3.4 % slower after synchronisation and then
receives a 10-bit frame correctly without a new pattern.

**Drift.** A slow drift, for example 7.74 % from a change in temperature, breaks
reception by about the seventh bit if nothing is done. A new synchronisation pattern
measures the new tick rate, and the UART works again. Every pattern re-synchronises,
so drift only has to stay small *between* patterns.

**Ranges.** At the prototype's ~6.45 MHz tick rate, 19200 bit/s is about 336 ticks per
bit (EUBRS ≈ 10750).

- The 16-bit EUBRS allows at most 2047 ticks per bit, so the slowest rate at that tick
  rate is about 3150 bit/s.
- The 12-bit cell counter limits a sync cell to 4095 ticks.

## 5. Units

- **Transmitter.** A `go` pulse from the control unit builds a frame in a shift
  register:
  - a start bit;
  - 1–16 data bits, LSB first;
  - an optional even or odd parity bit;
  - one or two stop bits.

  It sends one bit per `bit_tick`, so every bit lasts a whole bit time. A `done` pulse
  follows the last stop bit. A `go` while busy is ignored.
- **Receiver.** It runs only when the control unit is READY and CONFIG bit 0 is set.
  - **Start.** A falling edge starts a frame (`start` pulse).
  - **Samples.** The bit value is the majority of the three samples of each bit.
  - **False start.** A start bit whose majority is 1 is a false start, and the
    receiver returns to idle.
  - **End of frame.** After the stop bit it reports the data, `perr` (parity error),
    `ferr` (stop bit not 1) and a `done` pulse.
  - **Sync pattern.** A `sync_done` during a frame aborts it, because the "frame" was a
    synchronisation pattern.
- **Timing unit.** A 16-bit timer that counts bit times. It can be loaded by the host.
  It gives a one-tick `match` pulse while the armed match value equals the timer.
- **Error control unit.** While the transmitter sends, it compares the filtered bus with
  the transmitted level in the middle of each bit. A difference, meaning another node
  drove the bus or the line is faulty, sets a sticky collision flag.
- **Control unit.** It holds the registers below and the SYNC/READY state, and turns host
  requests into one-tick pulses for the other units: `go`, `timer_wr`, `eubrs_wr` and
  `clr_err`.

## 6. Host interface

### Register map

| addr | name   | read                                   | write |
|------|--------|----------------------------------------|-------|
| 0 | STATUS | bit 0 rxfull, 1 perr, 2 ferr, 3 overrun, 4 txbusy, 5 collision, 6 ready, 7 tx pending | any value clears rxfull, perr, ferr, overrun, collision |
| 1 | CONFIG | stored value (reset 0x0001)            | bit 0 enables the receiver |
| 2 | MSG    | last received message; clears rxfull   | message to send; starts a transmission |
| 3 | EUBRS  | current baud rate setting              | loads it |
| 4 | TIMER  | timer value                            | loads the timer |
| 5 | TS/TM  | time stamp (timer at the last start edge) | match value, arms the match |
| 6 | UCFG   | [4:0] data bits 1–16, [6:5] parity 0 none / 1 even / 2 odd, [7] two stop bits (reset 8N1) | same |
| 7 | CMD    | stored value                           | bit 0: a written message waits for the next timer match; bit 1: back to SYNC (self-clearing) |

Two register behaviours need a note:

- **Overrun.** A message that arrives while rxfull is still set sets overrun. The new
  message replaces the old one.
- **Scheduled send.** With CMD bit 0 set, writing MSG arms the transmission, and the
  next timer match starts it. That is the "action at a point in time" of the enhanced
  UART.

### Host wrapper timing

`aeuart_top` contains a small wrapper that connects a synchronous host to the ring.
The host interface works like this:

- **Request.** The host holds `host_valid`, `host_we`, `host_addr` and `host_wdata`.
- **Wrapper.** It presents the request to the control unit in the phase the control
  unit expects next, the complement of its `c_done`. It waits until `c_done` changes,
  which means the request has been consumed in that tick.
- **Answer.** The wrapper raises `host_ready` for one clk cycle. `host_rdata` then holds
  the value read.

When no request is pending, the wrapper still presents an idle word in the right phase.
It is a non-blocking source and never slows the ring down. One request is consumed per
tick.

## 7. Simulating the asynchronous circuit with a clock

The RTL is a **clocked emulation** of the delay-insensitive circuit. It is written so
that standard simulators and synthesis tools take it.

| Element | Emulation |
|---|---|
| One gate delay | One `clk` edge |
| Latch in a register | Flip-flop that loads on an edge where the switching conditions hold |
| Hold state of a gate, phase detector or C-element | Flip-flop |

`clk` is therefore not a design clock in the usual sense: the tick rate is not
derived from it by division.

`stall` (per register; `stall_i[6:0]` on the top) postpones a register's capture by
whole cycles. It stands for extra and varying gate delay. The circuit must work for any
stall pattern. The testbenches stall at random, which gives the tick period a
realistic jitter, and they also change the stall rate to emulate drift.

The assertions in `fsl_register` check two things:

- a stored word is always consistent;
- a capture only ever takes a consistent word.

Both properties hold for any stall pattern.

### Files

| file | content |
|------|---------|
| `rtl/fsl_pkg.sv` | two-rail type and encode/phase helpers |
| `rtl/fsl_phase_det.sv`, `fsl_phase_inv.sv`, `fsl_sync.sv`, `fsl_gate2.sv`, `fsl_register.sv` | FSL primitives |
| `rtl/fsl_pipeline.sv` | empty/full register pipeline (stand-alone demonstration) |
| `rtl/fsl_unit.sv` | shell of one ring unit (cloud inputs, feedback inverter, register) |
| `rtl/aeuart_pkg.sv` | constants, register addresses, unit state structs |
| `rtl/aeuart_*.sv` | the six units, the busdriver and the top `aeuart_top` |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_fsl_util.svh` holds shared encode/decode helpers |

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fsl_pkg.sv rtl/aeuart_pkg.sv tb/tb_aeuart_top.sv --top-module tb_aeuart_top
./obj_dir/Vtb_aeuart_top
```

Every testbench ends with the line `TB_RESULT checks=<n> failures=<m>` and has a
watchdog that counts a failure if the design hangs.

## 8. What the testbenches show

- **`tb_aeuart_top`** (end to end, top at its defaults):
  - **Bus.** A bus master with a bit time of 800 clk cycles drives the bus as a wired-AND
    with the UART's `txd`. Every register is stalled at random in 10 % of the cycles.
  - **Ring.** The test checks the firing order. It checks that synchronisation on a 0x55
    pattern gives an EUBRS within 10 % of 32 × (bit time / measured tick period).
  - **Reception.** Frames are received, with good and bad even parity, a framing error
    and an overrun.
  - **Filtering.** A 1-cycle spike is filtered, and a short low pulse is rejected as a
    false start.
  - **Transmission.** The bit time is checked against the master's. A transmission
    scheduled for a timer match starts at the right time, and a collision is detected.
  - **Small tick change.** After synchronisation every unit loses one cycle in 32. The
    tick rate measured over 20 bit times drops by about 3.4 %, and a frame is still
    received correctly.
  - **Drift and resynchronisation.** Drift makes every unit a third slower. Reception then
    fails until a new pattern re-synchronises, and EUBRS changes accordingly. A CMD
    resync is also checked.
  - **Pipeline.** Alongside the UART, the stand-alone pipeline of the top passes more
    than a hundred words from source to sink under random stalls, all in order.
  - **Coverage.** Each mechanism is counted and must occur at least once.
- **Unit testbenches.** Each plays all of the unit's neighbours. The inputs are presented
  in the opposite phase of `c_done`, so each firing is one tick, and random stalls are
  applied. The checks are:
  - the transmitter: frames bit by bit for several formats;
  - the timing and error units: against reference models;
  - the receiver: frames, errors, a glitch, a false start and abort;
  - the baud rate generator: EUBRS values, bit and sample positions, the tolerance
    accept/reject and the fractional rate;
  - the control unit: every register and pulse.
- **Primitive testbenches.** They check the gate truth tables, the phase detector and
  the C-element against models. They also check the register's switching conditions
  against a model under protocol-respecting random input, and the empty and full
  pipelines for losslessness and order.

## 9. Departures and own choices

**Wiring and initial phases.** The original assigns its own initial phases to the units.
Here every unit starts in phase 0, and the inverter placement of section 2 produces the
same firing order: transmitter → {timing, errctr, receiver} → ebr_generator → uartctr.

**Register widths.** The original's six unit registers total 388 bits. Here they are
28 + 17 + 2 + 48 + 101 + 156 = 352 bits, because the state layout of each unit is this
design's own.

**Wide registers.** The original split registers into slices of at most 31 bits, because
of a synthesis tool limit. Here each unit has one wide register whose phase is detected
over the whole word. This is equivalent to the recommended remedy of evaluating the
phase of stacked slices together, and it avoids the lock-ups of independently switching
slices.

**Own choices.** The following are this design's own:

- the contents of each unit's logic;
- the register map, bit positions and reset values;
- the accumulator form of the fractional baud rate;
- the sample positions 7/16, 8/16 and 9/16;
- the majority filters;
- the read-back collision check;
- the single event/action pair (send at timer match);
- the SYNC/READY handling.

**Handshake lines.** Each handshake line (`c_done`, `pass`) is a single wire here. The
original carried it on two rails with the same value.

**Host side.** The host is a synchronous interface through the wrapper. The original
connects the UART to an asynchronous processor over an FSL interface with handshake.

**Emulation.** Everything is emulated with a clock as described in section 7. A
clockless implementation would replace the flip-flops with latches and C-elements and
needs no `clk`.
