# Event timing for a pulse-to-pulse modulated injector LINAC

This is synthesizable SystemVerilog for the event-based timing system of an
electron/positron injector LINAC. Every 20 ms pulse can go to a different ring
with different beam properties. The system has two masters that do not agree:

* **The 50 Hz AC line.** Klystron modulators and kicker supplies want every
  pulse at the same phase of the mains.
* **The 44.1 Hz bucket selection cycle (BSC, 22.68 ms) of the positron rings.**
  Injection into a chosen RF bucket of the damping ring (DR) and the main
  positron ring (LER) needs a fixed time distance to this fiducial.

The design groups pulses into *sequences*. A sequence starts on a BSC tick and
lasts a whole number of BSC periods. Inside it, 20 ms pulses run freely from
the start. Two sequence lengths make the AC phase inside a pulse step up or
down, and a controller picks the next length from a 1 ns measurement of where
the AC edge landed. The rest is event distribution:

* A generator turns triggers and sequence RAMs into an 8-bit event code per
  event clock.
* Receivers turn chosen codes into delayed, gated device triggers.

All logic runs on the 114.24 MHz event clock (8.75 ns). The only exception is a
1 GHz time-to-digital converter.

## The event link

One 18-bit frame (`timing_pkg::evt_frame_t`) moves per event clock. It holds:

* an 8-bit event code (0x00 means nothing);
* an 8-bit data byte;
* a 2-bit `kind` that says what the byte is.

The `kind` field replaces the 8b10b control characters of a real serial link,
because there is no serialiser here.

The data byte is normally the *distributed bus* (DBus): eight level signals
sampled by the generator and rebuilt by every receiver. This design uses the
DBus bits as beam gates: bit 1 is LER injection, bit 3 HER injection, bit 4 the
DR kicker and bit 5 the DR septum. When the 2 kB *data buffer* is enabled, odd
slots carry buffer bytes, so the DBus updates only every other clock.

Reserved codes:

| Code | Meaning |
|---|---|
| 0x70 / 0x71 | Shift a 0 / 1 into the receiver's seconds register |
| 0x7A | Heartbeat |
| 0x7B | Reset dividers |
| 0x7C | Timestamp tick |
| 0x7D | Timestamp reset; latches the seconds |
| 0x7F | End of sequence; never sent |

Beam modes use blocks of ten codes: KBE 30–39, KBP 40–49, PFE 50–59, and so on
(`beam_mode_base_code`).

## Event generator (`evg`)

Event sources:

* **Eight trigger events.** Each sends its code when its stimulus pulses. The
  stimulus can be an external input, the AC input or the multiplexed counter.
* **Two sequencers.**
* **A host "software event".**

A fixed-priority encoder (`evg_event_mux`) passes one code per clock in this
order: trigger events, then sequencers, then software. A source that loses
keeps its code pending. A new request that replaces a still-pending code
pulses `dropped`.

**Sequencer (`evg_sequencer`).** The sequencer holds up to 2048 pairs of event
code and timestamp.

* On its trigger, a counter starts, prescaled from the event clock.
* Each entry's code is sent when the counter reaches the entry's timestamp.
* The code 0x7F stops the sequence.
* A new trigger restarts the sequence from entry 0.

The RAM has two banks:

* The host always writes the *software* bank, plus its trigger-source selection.
* A `load` pulse swaps the banks, so the written program becomes the
  *hardware* bank that plays on the next trigger.

A swap is used instead of a 2048-word copy, so the host rewrites the whole
program after each load.

**Trigger sources** of the sequencer, by `trig_sel`:

| `trig_sel` | Source |
|---|---|
| 0 | External input 0 |
| 1 | External input 1 |
| 2 | AC input |
| 3 | Multiplexed counter |
| 4 | Software trigger |

External inputs pass through two-flop synchronisers.

**Latency.** A software trigger in cycle T puts the frame for a timestamp-d
entry on the link in cycle T+4+d (prescale 1).

## Event receiver (`evr`)

The receiver works in these stages:

1. `evr_link_rx` registers the frame. It gives an event strobe, holds the DBus
   value, and stores data-buffer blocks.
2. A 256-entry mapping RAM, written by the host, turns each code into one bit
   per pulse generator plus a "log it" bit.
3. Each `evr_pulse_gen` has a delay, width and polarity. It can optionally be
   ANDed with a chosen DBus bit, which is how a closed beam gate suppresses a
   device trigger while events keep flowing.
4. Logged events go into `evr_event_fifo` as 80-bit words: {8'h00, code,
   32-bit seconds, 32-bit timestamp}. The FIFO holds 511 entries (512 words,
   one kept free). It refuses pushes when full and sets a sticky `overflow`.
5. `evr_timestamp` maintains the seconds and timestamp registers from the
   reserved codes. It also flags a missing heartbeat after 1.6 s.

**Latency.** A frame arriving in cycle t fires the pulse generators in t+2. A
pulse with delay D starts at t+3+D.

The sub-nanosecond fine delay of real receivers is analog and is not modelled.

## The main timing station (`linac_timing_top`)

The top wires three generators and three receivers into the station:

```
bsc_in ─► seq_shift_ctrl ─seq_start─► upper EVG (sequencer, software trigger)
                                          │ main event + pre-event per pulse
                                          ▼
                                     middle EVR ── pulse 0: TDC start
                                          │        pulse 1: lower trigger, 3.5 ms later
                                          │        pulse 2: pre_event_irq to host
ac50_in ─► ac50_regulator ─► TDC stop 0 ──┘ first hit ─► seq_shift_ctrl (AC delay)

middle EVR pulse 1 ─┬─► upstream EVG   ─► upstream EVR   ─► up_trig
pf_coinc_in ────────┴─► downstream EVG ─► downstream EVR ─► dn_trig
                                                └ pulse 3 = readback ─► load both
                                                  lower EVGs' hardware sequencers
```

### Order of work in one pulse

1. The upper generator sends the **main event** at the start of the pulse. The
   middle receiver starts the TDC at once and triggers the two lower
   generators 3.5 ms later. The 3.5 ms is a register value of middle-receiver
   pulse generator 1.
2. Shortly after, the upper generator sends the **pre-event**. It reaches the
   host as `pre_event_irq`, and the host writes the *next* pulse's beam mode
   (its codes, timestamps and beam-gate DBus values) into the software banks of
   both lower generators. This includes the trigger source:
   * source 0 (the middle receiver's pulse) for most beam modes;
   * source 1 (`pf_coinc_in`, the LINAC/PF RF coincidence) for PF and PF-AR.
3. The lower generators play the **current** beam mode.
4. Their program ends with a code that the downstream receiver maps to pulse 3.
   This is the **readback**. Its rising edge swaps the banks of both lower
   generators, so the next pulse plays what the host wrote at step 2.

`host_lower_load` performs the first swap after reset. The upper generator's
program holds the 18 pulses of a long sequence. A short sequence is simply cut
off by the next `seq_start`, which restarts it.

### Host interface

All host actions are plain strobes on the top's ports:

* writing sequences and trigger selections;
* mapping RAMs and pulse-generator settings;
* reading the two local receivers' FIFOs and the TDC.

The top also brings out three calculators the host uses, described below.

## Following the AC line: the sequence shift (`seq_shift_ctrl`)

This is the heart of the station.

**Sequence lengths.** With a BSC period of 22.678 ms:

| Type | BSC periods | Pulses | Sequence length | Pulse time | Difference |
|---|---|---|---|---|---|
| Short | 14 | 16 | 317.50 ms | 320 ms | Next sequence starts 2.50202 ms early |
| Long | 16 | 18 | 362.85 ms | 360 ms | Next sequence starts 2.85483 ms late |

Because the TDC starts with the pulse:

* after a short sequence, the AC edge appears **2.50202 ms later** inside the
  pulse;
* after a long sequence, it appears **2.85483 ms earlier**.

**Decision.** At the first pulse of each sequence the controller takes the
measured AC delay `d` and the known shift of the *running* sequence:

* E = d + shift(current type);
* E < T_REF (9.85 ms) → next sequence short (moves the edge later);
* E ≥ T_REF → next sequence long.

The AC arrival therefore oscillates around the middle of the pulse.

**Race.** Any measurement outside 4.5–15 ms raises `race`, the region where
the pulse logic can no longer tell which pulse an AC edge belongs to. The first
sequence after reset is short.

**Where this departs from the published description:**

* **Direction of the rule.** The prose of the original description states the
  rule the other way round ("estimate below the reference → longer
  sequence"). Its worked example and its simulation code use the rule above,
  which is the only one that keeps the delay bounded, so that rule is built.
* **Tie.** At exactly E = T_REF, the reference code picks the short sequence
  and this design picks the long one. This is a 1 ns corner.
* **Reference value.** T_REF is 9.85 ms. One hand-worked example elsewhere uses
  10 ms.

**Behaviour under drift** (`tb_seq_shift_drift`). With the AC period drifting
the AC delay by ±40 µs per pulse, the loop holds the delay inside 4.5–15 ms for
300 sequences (about 100 s). At ±60 µs per pulse it enters the race within a
few seconds: 10.6 s at +60 µs and 1.6 s at −60 µs, with the AC edge starting
10 ms into the first pulse. Both limits match the published failure study
qualitatively. The exact time to failure depends on the start phase.

**Drift compensation (option, `DRIFT_COMP=1`).** Set this parameter on the
controller or on the top to add the mean recent drift to the estimate:

* the controller keeps the last nine AC delays of each sequence;
* their mean step, (newest − oldest)/8, is the drift per pulse;
* at the next decision, E also includes that drift times the running
  sequence's pulse count.

The default is off, which is the scheme in present operation. Averaging
recent drift is the proposed improvement; the window and the extrapolation are
this design's choice.

In `tb_seq_shift_drift_comp`, compensation holds ±60 µs per pulse for 300
sequences. At ±100 µs per pulse the 16/18-pulse loop still fails. Its step
(2.5 or 2.9 ms) still exceeds the drift of one sequence (at most 1.8 ms), but
the delay keeps drifting for 16–18 pulses between two corrections. With the
step added, the swing reaches the 4.5 or 15 ms limit. Shorter 8/9-pulse
sequences halve the swing. `tb_seq_shift_89` sets the controller
to 8/9 pulses (below). With or without compensation it holds ±40 µs and
±120 µs per pulse for 300 sequences without a race. At ±160 µs it fails
whatever it decides: a sequence's step, 1.43 ms over 9 pulses or 1.25 ms over
8, is then less than the drift it must undo (about 158 µs per pulse). The
published failure study puts the 8/9 threshold near 120 µs; in this model it
lies between 120 and 160 µs.

## AC regulator (`ac50_regulator`)

The regulator keeps the trigger interval handed to the TDC within
20 ms ± 40 µs.

* **Synchronous mode.** The AC edge passes through after about 500 ns, provided
  it is not early.
* **Switch to asynchronous mode.** This happens when an AC edge is early
  (before 20 ms − 40 µs), or missing at 20 ms + 40 µs. The regulator then makes
  its own edges, every 20 ms − 40 µs or 20 ms + 40 µs, stepping toward the AC
  phase.
* **`pf_gate_close`.** While asynchronous, this output asks for the beam gate
  of the ring whose kicker depends on the AC phase to be closed.
* **Return to synchronous mode.** The regulator returns when an AC edge falls
  inside the window and the AC line's own interval is legal.

The direction rule and the return condition are this design's choice. The
window, the two fixed intervals and the mode switch follow the original.

## TDC (`tdc`)

The TDC is common-start and multi-stop, with 16 channels and up to 4 hits per
channel. It is a 32-bit counter on a 1 GHz clock, which gives 1 ns resolution
and a 4.29 s range.

* Start and stop edges pass through identical two-flop synchronisers, so their
  latency cancels.
* Hits of one chosen channel (`ann_chan`) are announced through a toggle, so a
  slower domain can fetch them safely. The top uses channel 0, the regulated
  AC edge, and turns the first hit of each pulse into `ac_valid` / `ac_delay`
  about three event clocks later.

The top wires the stop channels as follows:

| Channel | Signal |
|---|---|
| 0 | Regulated AC edge |
| 1 | Upstream receiver pulse 0 |
| 2 | Downstream receiver pulse 0 |
| 3 | Lower-generator trigger |
| 4–15 | Spare, from `tdc_stop_aux` |

## Bucket arithmetic

The LINAC and ring RF coincide every 49 ring buckets. That is 11 event clocks,
96.3 ns, called an *opportunity* here. Opportunity i fills:

* LER bucket 49·i mod 5120;
* DR bucket 49·i mod 230.

The pattern repeats after 23 × 5120 opportunities (11.34 ms).

**`bucket_calc`.** This calculator works in both directions:

* **Forward:** from an opportunity to its LER and DR buckets.
* **Inverse:** from a wanted LER bucket and a cycle 0..22 to the opportunity,
  the delay in event clocks, and the DR bucket used. The inverse uses
  209 = 49⁻¹ mod 5120.

Stepping through the 23 cycles lists the 23 DR buckets that can feed one LER
bucket.

**`rf_phase_shift_calc`.** Shifting the downstream LINAC RF by n ring buckets
and the trigger by k event clocks makes other DR buckets usable. It computes:

* the new delay, clock₁ = clock₀ + k − Delay[m₀+n] + Delay[m₀], where
  Delay[m] = 11·(209·m mod 5120);
* the DR bucket d₂ = (49·q₁ + n) mod 230, where q₁ is the opportunity count of
  clock₁;
* the timing error ΔT = n·T_rf − k·T_event, as 11n − 49k in units of
  T_event/49 (0.179 ns).

The published formula for d₂ divides the delay by 96.3 ns and leaves the
rounding open. No rounding reproduces the published bucket table, so the
exact integer form above is used instead. It agrees with every readable cell
of that table.

`cyc_off` moves the result by whole 493 µs cycles. Choosing that cycle (the
one nearest the AC edge) and checking the bucket against the 2-bunch and
2-pulse restrictions are left to host software.

**`pretrigger_calc`.** The DR kicker supply must be charged 12 ms before its
main trigger. The preparation trigger of the next pulse is therefore computed
in the current pulse, in one of two ways:

* mode 0, counted at the receiver: D_pre = D_next − D_cur + 20 ms − 12 ms;
* mode 1, counted at the generator: D_pre = D_next + 20 ms − 12 ms.

A negative result is flagged.

## Parameters and sizes

Defaults are the machine's values.

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `evg_sequencer` | `DEPTH` | 2048 | Sequence entries |
| link | `BUF_BYTES` | 2048 | Data buffer size |
| FIFO | — | 511 × 80 bit | Event FIFO size |
| `tdc` | `NCH` / `NHIT` / `W` | 16 / 4 / 32 | Channels, hits per channel, counter width |
| `ac50_regulator` | `PERIOD` | 2,284,800 | 20 ms in event clocks |
| `ac50_regulator` | `TOL` | 4,570 | 40 µs |
| `ac50_regulator` | `PROC_DELAY` | 57 | 500 ns |
| `ac50_regulator` | `OUT_W` | 1,142 | 10 µs; own choice |
| `seq_shift_ctrl` | `SHIFT_SHORT` / `SHIFT_LONG` | +2,502,020 / −2,854,830 ns | Shift per sequence type |
| `seq_shift_ctrl` | `T_REF` | 9,850,000 ns | Reference delay |
| `seq_shift_ctrl` | `RACE_LO` / `RACE_HI` | 4.5 / 15 ms | Race limits |
| `seq_shift_ctrl` | `N_BSC_SHORT` / `N_BSC_LONG` | 14 / 16 | BSC periods per sequence |
| `seq_shift_ctrl` | `PULSES_SHORT` / `PULSES_LONG` | 16 / 18 | pulses per sequence |
| `pretrigger_calc` | `T_CHARGE` | 1,370,880 | 12 ms |

The top passes the AC regulator, sequence-shift and preparation-trigger values
through as parameters (`AC_*`, `T_REF`, `PT_*`, …). That lets the end-to-end
test run at a 2000-clock "pulse". The older 8/9-pulse scheme is
`N_BSC_SHORT=7`, `N_BSC_LONG=8`, `PULSES_SHORT=8`, `PULSES_LONG=9`,
`SHIFT_SHORT=1_251_010`, `SHIFT_LONG=-1_427_415` (the exact values of the
rounded +1.25 / −1.4 ms), with the upper program cut at 9 pulses. The
controller is simulated this way under drift (`tb_seq_shift_89`), and the whole
top at the scaled pulse (`tb_linac_timing_top_89`).

Width choices that are this design's own:

* 32-bit timestamps, delays and widths;
* 4 pulse outputs per receiver;
* one multiplexed counter;
* two external trigger inputs per generator.

## Other departures and open points

* The RF phase-shift and bucket calculators are separate host-facing blocks.
  In the machine their results travel through the reflective memory and
  control software. Neither is modelled.
* Not part of the RTL:
  * the AC comparator;
  * master oscillators and PLLs;
  * the serial PHY;
  * VME CPUs;
  * reflective memory;
  * the receiver fine delay;
  * the fill-pattern software that chooses buckets.

  Their signals enter as ports (`ac50_in`, `bsc_in`, `pf_coinc_in`, the clocks
  and the host strobes).
* The lower generators need the order pre-event → readback in every pulse.
  The lower program's timestamps, and with them the readback, are host values
  that normally include the AC-dependent bucket delay. Two faults follow when
  the order breaks:
  * **Mode skipped.** If a strongly drifted AC delay pushes the readback past
    the next pre-event, the readback loads the mode written for the following
    pulse, so one mode is skipped.
  * **Extra trigger.** If a wrong bucket delay makes the readback come too
    early, the swapped-in mode can re-trigger the same pulse from another
    source, for example the PF coincidence.

  The RTL reproduces both faults faithfully. It does not guard against them.
* Lint lists some unconnected sub-block outputs in the top (receiver buffers,
  timestamps, spare pulses, second sequencers). The station does not use them.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. Stimulus is random through
`$urandom`. Notable tests:

* **`tb_evg_sequencer`** plays the four-entry example (0x20@500, 0x2a@1000,
  0x24@1001, 0x3c@2000) and checks each code at timestamp + 2 cycles.
* **`tb_bucket_calc`** reproduces the 23 DR buckets that feed LER bucket 0.
* **`tb_rf_phase_shift_calc`** checks:
  * the 25 published shift types (n, k, ΔT to 1 ps);
  * the published DR bucket table, 21 types × 5 cycles. One printed cell, 220,
    contradicts its row's 50-bucket step and is taken as 10;
  * 3000 random cases against a brute-force search.
* **`tb_seq_shift_ctrl`** closes the loop with a nanosecond model of BSC, AC
  and pulses for 300 sequences. **`tb_seq_shift_drift`** and
  **`tb_seq_shift_drift_comp`** add AC drift, without and with compensation;
  **`tb_seq_shift_89`** runs the drift tests with 8/9-pulse sequences.
* **`tb_linac_timing_top`** runs 8 sequences at reduced time constants. It
  counts every mechanism and fails if one never happens:
  * short and long sequences, decisions and race;
  * pre-events, readbacks and the beam mode played in each pulse;
  * PF-coincidence triggering;
  * beam gate open and closed;
  * the asynchronous AC regulator and its return to synchronous mode;
  * FIFO overflow;
  * all three calculators.
* **`tb_linac_timing_top_89`** repeats that test with the top set to 8/9-pulse
  sequences, over 14 sequences.
* **`tb_linac_timing_top_full`** runs the top with all defaults through one
  pulse of a real sequence:
  * BSC tick, then the AC edge 7 ms into the pulse, then the TDC reading
    7,000,434 ns;
  * the estimate 9,502,454 ns, which gives a short next sequence;
  * the lower trigger 3.5 ms after the main event, then pre-event and readback.

  It takes about 12 s of simulation.

To run one test with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl \
    rtl/timing_pkg.sv tb/tb_evg.sv --top-module tb_evg
./obj_dir/Vtb_evg
```

Replace `tb_evg` with any testbench name. `-y rtl` finds the other modules by
name.

## Files

| File | Contents |
|---|---|
| `rtl/timing_pkg.sv` | Frame type, special codes, beam modes, DBus bits, ring constants |
| `rtl/sync_edge.sv` | Two-flop synchroniser with rising-edge pulse |
| `rtl/evg*.sv` | Generator and its parts: sequencer, mux, counter, link transmitter |
| `rtl/evr*.sv` | Receiver and its parts: link receiver, pulse generator, FIFO, timestamp |
| `rtl/tdc.sv` | Time-to-digital converter |
| `rtl/ac50_regulator.sv` | AC regulator |
| `rtl/seq_shift_ctrl.sv` | Sequence-shift controller |
| `rtl/bucket_calc.sv`, `rtl/rf_phase_shift_calc.sv`, `rtl/pretrigger_calc.sv` | Calculators |
| `rtl/linac_timing_top.sv` | The station |
| `tb/tb_<module>.sv` | Testbench of each module; `tb_linac_timing_top_full.sv`, `tb_linac_timing_top_89.sv`, the two drift tests and `tb_seq_shift_89.sv` as above |
