# CMCVT — one baseband, eight IEEE 802.15.4 radios

A multi-channel radio normally copies its baseband processing unit (BBPU)
once per channel. This design uses a single BBPU for both directions and
shares it among up to 8 channels. It is IEEE 802.15.4 O-QPSK at 2.4 GHz:
250 kb/s, 2 Mchip/s, 8 MS/s per channel.

The BBPU runs N times faster than one channel needs, at N × 8 MHz for N
channels. It works on one channel for a short slot called a *tick*. At the
end of the tick it saves that channel's state and loads the next channel's.
This is context switching, done the way a CPU switches between processes,
but without losing a clock cycle.

A wideband front-end at 64 MS/s carries all channels together, each on its
own frequency offset. Per-channel up- and down-converters sit between the
shared BBPU and that front-end. Ping-pong RAMs connect them, so the
time-sliced BBPU and the continuously running converters never wait on each
other.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It comprises:

- `mcvt`: the virtual transmitter.
- `mcvr`: the virtual receiver.
- `cmcvt_top`: the two side by side.

The defaults are 8 channels. The full 8-channel transmitter, looped back
into the receiver, is simulated end to end. It delivers all eight frames
byte-exact, including FCS values that match published reference frames.

## Clocks and the real-time budget

| clock      | rate         | used by                                                          |
|------------|--------------|------------------------------------------------------------------|
| `clk_ctrl` | 100 MHz      | host side: data RAM ports, go/done, interrupts                   |
| `clk_bbpu` | N × 8 MHz    | the two BBPUs (64 MHz for 8 channels)                            |
| `clk_rf`   | 64 MHz       | DUC and DDC banks, DAC/ADC samples; ÷8 strobe gives the 8 MS/s rate |

`clk_bbpu` and `clk_rf` must have the exact ratio N : 8 (equal for N = 8).
Their phase relation is free. Every single-bit signal crossing a domain
goes through `sync_2ff`. Every multi-bit value (frames, samples) crosses
through a dual-clock RAM.

The budget is a single equation per direction:

- **Transmit.** A tick is 256 BBPU cycles. In that tick the chain produces
  one byte of one channel. A byte is 2 symbols, 64 chips, and 256 samples
  at 8 MS/s, which is 32 µs of air time. One round of N ticks takes
  N × 256 cycles at N × 8 MHz, which is also 32 µs. Every channel gets its
  next byte just in time.
- **Receive.** A tick is 8 BBPU cycles, one per sample, so one tick
  consumes 1 µs of one channel. A round of N ticks takes N × 8 cycles,
  which is also 1 µs.

The full-size test checks both round lengths cycle by cycle: 2048 and 64
cycles at N = 8.

## Context switching without lost cycles (`cs_fsm`, `ctx_ram`)

`cs_fsm` has three states: Idle, State0 and State1.

- Enable takes it from Idle into the alternation of State0 and State1.
- It moves to the other state at every tick boundary.
- An 8-bit channel register counts 0 … `num_ch`−1 and wraps.
- Dropping Enable returns it to Idle.

The FSM has the same three states for any number of channels; only the
wrap value changes.

Each module that holds state keeps it in a small per-channel context RAM
(`ctx_ram`):

- On the last cycle of a tick, `cs_fsm` issues a read of the *next*
  channel's context, so the context is at the RAM output when that
  channel's tick starts.
- The module writes its own context back at the moment it finishes with a
  channel.
- A write and a read of the same entry in the same cycle return the new
  value. This happens when only one channel is active.
- While the BBPU is idle, all contexts are cleared, so every channel starts
  from reset.

Pipelined stages hold different channels at the same moment. Each item
therefore travels with a tag `{occ, first, last, ch}` (`cmcvt_pkg::tag_t`).
A stage reads the tag to know which channel's context to restore, and when.

## Transmitter (`mcvt`)

```
host ──► Tx data RAM ──► M0 data FSM+CRC ─► M1 byte→symbol ─► M2 symbol→chip ─► M3 chip→sample ──► ping-pong RAMs ──► DUC bank ──► DAC
         (N×128 B)        [context]                                              [context]        (N × 512×4)      (N DUCs + Σ)
```

**Pipeline.** `mcvt_bbpu` is a four-stage pipeline with one tick per
stage. A byte of channel c passes through:

- M0 in tick c;
- M1 in tick c+1;
- M2 in tick c+2;
- M3 in tick c+3.

All four stages are busy with different channels in the same tick. Only M0
and M3 have state worth saving.

**M0: data FSM, CRC and output multiplexer (`tx_data_fsm`, `crc16`).**

- When `go[c]` is set, M0 emits one byte per tick in this order:
  - 4 preamble bytes `00`;
  - SFD `A7`;
  - PHR, the length L;
  - L−2 payload bytes read from the Tx data RAM;
  - the two FCS bytes, low byte first.
- The FCS is the 802.15.4 CRC-16: reflected polynomial 0x8408, initial
  value 0.
- The context is the FSM state, the byte count, the length and the running
  CRC.
- A channel with nothing to send emits an "off" item, so its samples are
  silence.
- `done[c]` is set after the last FCS byte. It is cleared when the host
  drops `go[c]`.

**M1 and M2 (`byte_to_symbol`, `symbol_to_chip`).** These stages are
stateless.

- M1 splits the byte into two symbols, low nibble first.
- M2 spreads each symbol into 32 chips with the 802.15.4 table. The table
  is generated from symbol 0 in `cmcvt_pkg::pn_chips`:
  - symbols 1–7 are symbol 0 cyclically delayed by 4·k chips;
  - symbols 8–15 are symbols 0–7 with the odd chips inverted.

**M3 (`chip_to_sample`).** M3 writes 256 samples per tick, one per cycle,
into the channel's half of its ping-pong RAM.

- Each chip lasts 8 samples.
- Even chips go on I and odd chips on Q. Q is delayed by half a chip
  (4 samples), as O-QPSK requires.
- So the first 4 Q samples of a byte belong to the *previous* byte's last Q
  chip. That chip, plus an "on air" flag, is M3's 2-bit context.

A stored sample is 4 bits: an on flag and a chip value per branch. The
pulse shape is not stored; it is applied in the DUC.

**Ping-pong (`tx_pingpong_bank`).** Each channel has a 512 × 4 RAM.

- During one 32 µs window the BBPU writes locations 256–511 of every
  channel while the DUCs play 0–255. In the next window the roles swap.
- The DUC bank owns the read schedule and exports the half bit.
- The BBPU waits for the first swap it sees, then alternates halves once
  per round.
- A channel's DUC stays silent until the first swap after the BBPU has
  written that channel's first samples. A per-channel "live" flag marks
  this and is synchronised to the RF clock. Because of the pipeline fill,
  this can take up to 3 rounds after start-up, and a half is never played
  before it has been filled.

**DUC bank (`duc_bank`, helper `duc`).** Each DUC works at 64 MHz.

- It evaluates the half-sine pulse directly from the sample's position
  within its 8-sample chip period:
  - I uses phase `{addr[2:0], sub}`;
  - Q uses the same phase advanced by half a pulse.
- It multiplies the result by a 7-bit-phase NCO, so a phase step of 5
  equals 2.5 MHz at 64 MHz.
- The channels are summed and saturated to 12 bits for the one DAC.
  Transmit power per channel therefore falls as channels are added.

Channel frequency offsets alternate around the centre, 5 MHz apart:

| channel | 6     | 4     | 2    | 0    | 1    | 3    | 5     | 7     |
|---------|-------|-------|------|------|------|------|-------|-------|
| MHz     | −17.5 | −12.5 | −7.5 | −2.5 | +2.5 | +7.5 | +12.5 | +17.5 |

The formula is in `cmcvt_pkg::nco_inc`.

## Receiver (`mcvr`)

```
ADC ──► DDC bank (N × NCO, 40-tap FIR, ÷8, AGC) ──► ping-pong RAMs (N × 16×12) ──► sample mux ──► shift delay ─► complex mult ─► serial→parallel ─► cross corr ─► decode FSM ──► Rx data RAM ──► host
                                                                                                 [context]                       [context]                     [context]       (N×256 B)
```

**DDC bank (`ddc_bank`, helpers `ddc`, `agc`).** For each channel:

1. An NCO mixes the channel down to 0 Hz.
2. A 40-tap FIR filters it, and the output is decimated by 8 to 8 MS/s.
   The FIR is a Hamming-windowed sinc with cutoff 2.5 MHz and 8-bit
   coefficients in `cmcvt_pkg::fir_coef`. It attenuates the other channels,
   which are 5 MHz or more away.
3. A digital AGC brings the channel into 6 bits per branch. It is needed
   because the front-end's analog AGC sees only the wideband sum, so a weak
   channel next to a strong one would be lost. The AGC measures the peak
   over 64 samples and picks a right shift 0–7 for the next 64 samples.
4. The sample, packed `{I6, Q6}` into 12 bits, is written into the
   channel's 16 × 12 ping-pong RAM. There are two halves of 8 samples, and
   they swap every microsecond.

**Receive BBPU (`mcvr_bbpu`).** In each tick, the sample reading
multiplexer selects one channel's RAM and reads its 8 samples. The chain is
a differential chip detector followed by a symbol correlator.

- `shift_delay` gives the sample of one chip (4 samples) earlier.
  - Context: the last 4 samples.
- `complex_mult` forms r[n] · conj(r[n−4]).
  - For O-QPSK with half-sine pulses, the sign of the imaginary part at the
    centre of chip k is d_k = c_k ⊕ c_{k−1} ⊕ (k odd).
  - This holds whatever the carrier phase, so no carrier recovery is
    needed.
  - Stateless.
- `serial_to_parallel` keeps the last 128 such bits, which is 32 chips at
  4 samples per chip.
  - Context: those 128 bits.
- `cross_corr` compares chips 1–31 of the history (every 4th bit) with the
  16 differential templates and reports the best symbol and how many chips
  agree.
  - Chip 0 is skipped because it depends on the previous symbol.
  - Stateless.
- `fsm_dec` decodes the frame.
  - Context: its state, byte counter, length and nibble.
  - Acquisition starts when symbol 0 scores ≥ 26/31.
  - The best of the next three sample positions fixes the symbol timing.
  - After that it takes one symbol every 128 samples.
  - It waits for the SFD (symbols 7, A), then reads the PHR and L bytes.
  - A symbol scoring below 20 abandons the frame.
  - For every frame it writes to the Rx data RAM at `{channel, index}`:
    the channel number, the length, then the L bytes of PSDU (payload and
    FCS, not checked). It then toggles `rx_pkt[c]`.

## Host interface (own choice)

Transmitter (`mcvt`, or `tx_*` on the top):

1. Write channel c's frame at byte address `c·128`: byte 0 is L, bytes
   1 … L−2 are the payload.
2. Set `cfg_num_ch` and `cfg_enable`.
3. Raise `tx_go[c]`.
4. `tx_done[c]` rises at the end of the frame, and `irq` pulses once. The
   last bytes are then still on their way to the DAC, about 4 byte times
   (4 × 32 µs).
5. Drop `tx_go[c]` to clear `tx_done[c]`.

Receiver (`mcvr`, or `rx_*` on the top):

1. Set `cfg_num_ch` and `cfg_enable`.
2. Each received frame toggles `rx_pkt[c]` and pulses `irq`.
3. Read the frame at `c·256`: channel, L, then the L PSDU bytes. Read
   latency is one `clk_ctrl` cycle.

`cfg_num_ch` is a quasi-static setting and must not change while enabled.

## Where this RTL departs from, or adds to, the original design

The following are taken from the original: the channel count, BBPU clock
rule, tick lengths, RAM geometries (512×4 TX and 16×12 RX per channel),
three-state context FSM, stage partitioning, 2-flop synchronisers and
dual-port RAMs for crossings, FIR attenuation target, channel ordering, and
received-frame layout. The following were not specified there and are this
design's choices:

- the 4-bit TX sample encoding and the `{I6,Q6}` RX packing;
- the DUC pulse evaluation, replacing an interpolation filter;
- the FIR coefficients; only the target response was known;
- the AGC method;
- the receiver's acquisition and tracking rule and its thresholds;
- the start-up alignment of the BBPUs to the ping-pong halves;
- the host registers, RAM layouts and interrupts;
- the sample widths.

The "8 MHz" DUC read clock of the original becomes a ÷8 strobe on the
64 MHz RF clock.

Not built:

- **The analog RF front-end** (DAC, ADC, analog AGC). Its digital sample
  ports are the top's `dac_*`/`adc_*`.
- **The processor running the MAC.** Its paths are the host ports above;
  there is no DMA engine.

The FCS of received frames is stored but not checked.

Known limits:

- Acquisition is hard-decision, with no frequency-offset tolerance beyond
  what differential detection gives.
- It is tested on looped-back and synthesised signals with mild noise.
  Receiver sensitivity over a real channel has not been measured.

## Files

- `rtl/cmcvt_pkg.sv`: shared types, plus the chip, sine, FIR and NCO
  tables, all computed from formulas.
- `rtl/cmcvt_top.sv` → `mcvt.sv`, `mcvr.sv` → the blocks described above.
- `dp_bram`: the generic dual-clock RAM used for all data and ping-pong
  memories.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=… failures=…` and has a watchdog.
  - `tb_mcvt` demodulates the DAC stream with floating-point maths and
    requires every chip of two frames to be correct.
  - `tb_mcvr` synthesises concurrent O-QPSK bursts with random amplitude,
    phase and timing and requires byte-exact frames.
  - `tb_cmcvt_top` is the full 8-channel loopback. It also counts context
    switches, ping-pong swaps, acquisitions, AGC changes and interrupts.
  - `tb_cmcvt_workloads` runs the same loopback with 1, 2 and 4 active
    channels, each at its own BBPU clock, with 20-byte packets.

Simulate with Verilator 5 from the directory that contains `rtl/` and
`tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/cmcvt_pkg.sv tb/tb_cmcvt_top.sv \
          --top-module tb_cmcvt_top -Mdir obj -o sim && obj/sim
```

Replace `cmcvt_top` with any block name to run that block's testbench.
Exceptions: `mcvt_bbpu` and `mcvr_bbpu` are exercised by `tb_mcvt` and
`tb_mcvr`, and the data RAMs by `tb_dp_bram`. The full-size run takes under
a second of wall time.

Synthesised generically with the default 8 channels, the top is about 3400
cells and 10 k flip-flop bits. Most of the flip-flop bits are the 8 × 2 × 40
FIR delay lines of the DDC bank. It also has 62 kbit of RAM.
