# A 2.5 Gb/s serial-link transceiver with an all-digital CDR

This is a point-to-point serial link that sends 10-bit parallel words over one
differential pair at 2.5 Gb/s and recovers them at the other end. The design is as
digital as possible. The transmitter is a shift-register serializer. The receiver's
clock and data recovery (CDR) uses no charge pump, loop filter or VCO: a bang-bang
phase detector, a one-hot "confidence counter" and a small state machine steer a
digitally controlled phase interpolator. Only the multi-phase PLL is mixed-signal.
Every clock in the chip comes from that PLL, which runs at 1.25 GHz with 8 phases.

The RTL is SystemVerilog. The digital blocks are synthesizable. The four analog parts
(PLL, phase interpolator, output driver and receiver front-end) are event-driven
behavioural models with `#` delays. Because of them, the full transceiver can be
simulated with real picosecond timing: frequency offsets, phase steps and lock.

## Block diagram

```
            +------+   10   +-----+  10  +-------------+ 2.5 Gb/s +-------------+
            | PRBS |------->| mux |----->| serializer  |--------->| lvds_driver |==> tx pads
            +------+        +-----+      |   10:1      |          +-------------+
                   loopback ---^  ^      +-------------+
                                  |             ^ tx_clk = ck[0]
                               10 |    +------------+     +------------+
                                  |    | phase_xor4 |<----| pll_8phase |<-- 100 MHz ref
                                  |    +------------+  8  +------------+
                                  |        | 4 x 2.5 GHz, 100 ps apart
            +--------------+      |    +---v---------------------------+   +-------------+
 rx_word <--| deserializer |<-----+----|  cdr: APD -> CC -> FSM -> PI  |<--| rx_frontend |<== rx pads
            |    1:10      |<----------|  recovered clock / data       |   +-------------+
            +--------------+           +-------------------------------+
```

| Module | Kind | Role |
|---|---|---|
| `transceiver_top` | structural | whole transceiver, two test modes |
| `prbs16_gen` | RTL | 2^16-1 PRBS test source, 10 bits per word |
| `serializer_10to1` | RTL | shift-register 10:1 serializer |
| `lvds_driver` | model | differential output driver |
| `rx_frontend` | model | differential slicer with hysteresis |
| `cdr` | structural | CDR loop |
| `alexander_pd` | RTL | bang-bang phase detector |
| `confidence_counter` | RTL | one-hot token counter (loop filter) |
| `phase_ctrl_fsm` | RTL | coarse/fine phase control |
| `phase_interp` | model | 25 ps step phase interpolator |
| `deserializer_1to10` | RTL | 1:10 deserializer |
| `pll_8phase` | model | 8-phase 1.25 GHz PLL |
| `phase_xor4` | RTL | XOR doubler, 8 phases of 1.25 GHz to 4 of 2.5 GHz |
| `trx_pkg` | package | constants, `pd_dec_t`, `pi_ctrl_t` |

## Clocking

The PLL gives eight 1.25 GHz phases, `ph[k]`, each 100 ps (45 degrees) after the
previous one. `phase_xor4` XORs pairs a quarter period apart, `ck[k] = ph[k] ^ ph[k+2]`.
This gives four 2.5 GHz clocks with 50 % duty cycle, again 100 ps apart. One 2.5 GHz
period is one bit time (UI, 400 ps), so the four phases cut the bit time into four
100 ps intervals. `ck[0]` clocks the whole transmitter. All four phases feed the
interpolator, whose output is the receiver's recovered clock.

The original circuit runs the serializer and deserializer chains on half-rate and tenth-rate
clocks taken from the PLL. In this RTL each of them runs on its one bit clock instead,
and the slower clocks become clock enables from a 0..9 bit counter. The bit sequence at
the pins is the same. The design is simpler to simulate and has no derived clocks.

## The CDR loop (the part that needs the most explanation)

```
din --> alexander_pd --lead/lag/hold--> confidence_counter --lead_ov/lag_ov--> phase_ctrl_fsm
             ^                                   ^                                 | sel_a, sel_b, fine[3:0]
             |                                   |                                 v
             +------------------- rclk ----------+------------------------- phase_interp <-- ck[3:0]
```

Everything in the loop is clocked by the interpolator's own output. The loop has three
parts:

**Phase detector** (`alexander_pd`). It samples the data at every rising edge of
`rclk` (the bit centre) and at every falling edge (the expected bit boundary). Take two
consecutive centre samples A and C, and the boundary sample B between them:

| A, B, C | decision | meaning |
|---|---|---|
| A = B != C | lead | the transition came after the falling edge: the clock is early |
| A != B = C | lag | the transition came before the falling edge: the clock is late |
| A = B = C | hold | no transition, no information |
| A = C != B | none | two transitions in one bit (glitch) |

The decision is registered and comes two clocks after C. The recovered bit is the
rising-edge sample.

**Confidence counter** (`confidence_counter`). This is the loop filter. A single token
sits in a one-hot chain of 11 flip-flops and starts in the middle. Each lead moves it
one place one way and each lag one place the other way. When it would leave the chain,
it goes back to the middle and a one-clock `lead_ov` or `lag_ov` pulse is sent. So six
more leads than lags, in any order, make one phase step, and isolated wrong decisions
average out. The size (`HALF = 6` steps from the middle) sets a trade-off:

- A larger counter gives less output jitter, because it filters more.
- A smaller counter can follow a larger frequency offset.

With transition density 0.5 (PRBS data), one step needs about 12 bits. That is 25 ps
per 12 x 400 ps, or about 5200 ppm of trackable offset. It just covers the 5000 ppm
target.

**Phase control and interpolator** (`phase_ctrl_fsm`, `phase_interp`). The sampling
phase has 16 positions per bit time: four 100 ps intervals, each cut into four 25 ps
steps. `lead_ov` moves one step later and `lag_ov` one step earlier. Position 15 wraps
to 0 and back, so a constant frequency offset can be followed forever, one wrap per UI
of slip.

The interpolator mixes two neighbouring phases, an even one (Ph0 or Ph2, `sel_a`) and
an odd one (Ph1 or Ph3, `sel_b`), through two banks of four tri-state inverters. The
4-bit thermometer word `fine` gives the number of legs on the odd side. The phase
control keeps `fine` in a shift register, shifting in a 1 or a 0 per step. The
thermometer fills while moving through even intervals and empties through odd ones:

```
position p : 0    1    2    3  | 4    5    6    7  | 8  ... | 12   13   14   15
fine       : 0000 0001 0011 0111 | 1111 0111 0011 0001 | 0000 ... | 1111 0111 0011 0001
sel_a/sel_b: Ph0/Ph1             | Ph2/Ph1             | Ph2/Ph3 | Ph0/Ph3
```

So `sel_a = seg[1]^seg[0]` and `sel_b = seg[1]`, where `seg = p/4`. Switching from one
interval to the next therefore changes only the input whose weight is zero at that
moment, and the recovered clock never jumps or glitches.

`lock` goes high when a step reverses the direction of the previous step: at the
optimum, the phase toggles between two neighbouring positions. Two steps in the same
direction clear it. Under a steady frequency offset every step goes the same way, so
`lock` stays low while the loop is tracking correctly.

Loop timing: a decision reaches the counter 2 clocks after its sample. An overflow is
registered 1 clock after the deciding input. The interpolator setting changes on the
next clock, and its new phase applies from the next selected input edge.

## Serializer and deserializer

`serializer_10to1`: a holding register samples the word once every 10 bits. The
`word_take` output is high in the cycle at whose end the sample is taken, so a source
that updates on that edge (as `prbs16_gen` does with `en = word_take`) is paced
correctly. On the last bit of each word the holding register is loaded into two 5-bit
chains, even bits D0 D2 .. D8 and odd bits D1 .. D9. Both chains shift every second
bit, filling with zeros. The odd chain's output is retimed by one bit. An output mux
takes even and odd bits in turn, and a final flip-flop drives `out`. D0 leaves first,
6 clocks after the sampling edge, and D9 15 clocks after it.

`deserializer_1to10`: even bits go to register A, odd bits to register C, and A is
re-sampled into B beside its odd partner. Each B/C pair shifts into an even chain and
an odd chain. Every 10 bits the chains are loaded, interleaved, into `word`, and
`word_valid` pulses for one clock. The first received bit of a frame lands in
`word[0]`. Frames start at reset. Finding a character boundary is left to the decoder
that would follow.

## Test modes

- **PRBS mode** (`loopback = 0`): the transmitter sends a 16-bit LFSR sequence,
  x^16+x^15+x^13+x^4+1, period 65535. This lets the transmitter be tested alone, or
  through a channel back into the receiver.
- **Loop-back mode** (`loopback = 1`): words from the deserializer are sent straight
  back out. An external bit-error-rate tester can then drive the receiver and check
  the transmitter's output. The word crosses from the recovered clock to the transmit
  clock with no synchronizer. This only works when the tester and the local reference
  have the same frequency. With an offset, a word is repeated or dropped once per
  slipped word.

## Interfaces and reset

- `transceiver_top` ports:
  - pads are `real` voltages in millivolts: `tx_vop_mv`, `tx_von_mv`, `rx_vip_mv`,
    `rx_vin_mv`;
  - parallel outputs: `rx_word[9:0]` and `rx_word_valid`;
  - observation outputs: `tx_clk`, `tx_bit`, `rx_clk`, `rx_bit`, `cdr_lock`,
    `cdr_lead_ov`, `cdr_lag_ov` and `cdr_pos`.
- Reset order: release `pll_rst_n` first. Wait for `pll_locked`, then hold `rst_n`
  low for a few bit clocks. All digital resets are synchronous, so they need running
  clocks.
- Parameters with defaults: `WORD_W = 10` and `CC_HALF = 6`. The interpolator
  resolution (4 phases x 4 steps) is fixed by the `pi_ctrl_t` type.

## How far this follows the source design

Taken from the source design:
- the block structure and both test modes;
- the even/odd shift-register serializer;
- the A/B/C deserializer split;
- the Alexander phase-detector truth table;
- the one-hot token counter, which restarts in the middle and has registered overflow
  outputs and a NOR hold output;
- six counter steps from the middle to an overflow;
- 2-bit coarse and 4-bit thermometer fine control;
- 100 ps phase spacing and 25 ps interpolation steps;
- 8 phases at 1.25 GHz from 100 MHz, and the XOR doubling;
- the 16-stage PRBS.

Choices made here, because the source gives no detail:
- The PRBS taps. A single two-input XOR cannot make a maximal 16-bit sequence.
- Reset behaviour.
- The single-clock, clock-enable form of the serializer and deserializer, and the
  `word_take` / `word_valid` handshakes.
- The exact coarse/fine encoding and the zig-zag thermometer order.
- Wrap-around of the phase position.
- The lock flag's clearing rule.
- The treatment of the 010/101 phase-detector patterns (no decision).
- Which PLL phases the XOR pairs. Which 2.5 GHz phase clocks the transmitter.
- All analog values: driver swing 350 mV at 1.2 V common mode, 20 mV receiver
  hysteresis, pad delays, PLL lock time.

The analog models are ideal. They have no intrinsic jitter, no interpolator
non-linearity, no supply or common-mode effect and no PLL loop dynamics. Random jitter
can be put on the incoming data (see `tb_cdr_jitter`), but jitter transfer and eye
quality cannot be judged from these simulations. The original design reports about
2 LSB (50 ps) of recovered-clock jitter at 0.6 UI input jitter. Here the error rate at
that input is zero, but the recovered phase covers 4 LSB over 20,000 bits. That count
includes rare excursions, so it is an upper bound, and it is wider than the reported
figure. The same holds under a 5000 ppm frequency offset. The original reports about
2 LSB of tracking jitter. Here the sampling edge wanders 118 to 131 ps peak to peak
(about 5 LSB), still with no bit errors. At that offset the loop has almost no slew
margin: one 25 ps step per about 12 bits against 24 ps of drift. It therefore falls
behind and catches up in bursts. At 0 ppm the wander is one step (25 ps). That is within the 32 ps that the original
reports for its laid-out receiver.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The checks are:

- `tb_prbs16_gen`: against a bit-serial reference LFSR, plus balance and the
  2^16-1 period.
- `tb_serializer_10to1`: random words, each bit at its exact clock, one word per
  10 clocks.
- `tb_deserializer_1to10`: random bits, each word checked against its frame, latency
  and rate.
- `tb_alexander_pd`: data edges before and after the falling edge, each decision
  predicted bit by bit.
- `tb_confidence_counter`: against an integer model over biased random streams. It
  also measures the loop-filter bandwidth. With equal lead and lag probability the mean
  is 36.0 decisions per overflow. At 2.5 Gb/s with transition density 0.5 that is about
  34.7 MHz, the value expected from a first-passage analysis of the counter.
- `tb_phase_ctrl_fsm`: against the arithmetic position-to-control mapping above, over
  several full turns.
- `tb_phase_interp`: measured output phase for all 16 positions, up and down.
- `tb_pll_8phase` and `tb_phase_xor4`: measured periods, duty cycles and phase
  offsets.
- `tb_lvds_driver` and `tb_rx_frontend`: levels, delays, hysteresis and
  common-mode independence.
- `tb_cdr`: closed loop at 0, +2500 and ±5000 ppm, with a 170 ps data phase step
  before one 0 ppm case. It checks lock at 0 ppm, the sampling edge within 75 ps of the
  bit centre with at most 25 ps peak-to-peak wander, error-free data and phase wrap in the
  right direction.
- `tb_cdr_jitter`: the CDR with random, uniformly distributed jitter on every data
  edge: 0, 0.2, 0.4 and 0.6 UI peak to peak, 20,000 bits each. It requires zero bit
  errors and a steadily toggling stream. The span of interpolator positions visited may
  be at most 3 LSB up to 0.4 UI and at most 4 LSB at 0.6 UI. The measured spans are
  1, 2, 3 and 4 LSB.
- `tb_transceiver_top`: the full chip at default parameters, in three phases.
  1. PRBS mode through a channel.
  2. Loop-back from an external PRBS source at 0 ppm, checking both received words
     and the retransmitted stream.
  3. The same source at +5000 ppm, then at -5000 ppm.

  It also checks the word rate. It counts lead and lag overflows, lock, phase wraps in
  both directions, coarse phase changes and both transmit sources, and fails if any of
  them never happened.

Data checks use a property of the PRBS rather than a stored copy:
`b[n] = b[n-16]^b[n-15]^b[n-13]^b[n-4]` holds for the sequence whatever the seed or
word alignment. Run from the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/trx_pkg.sv \
          tb/tb_transceiver_top.sv --top-module tb_transceiver_top -o sim
./obj_dir/sim
```

The whole end-to-end test simulates about 37 µs in under a second. The testbench
channel delay is kept below one bit time. A longer delay corrupted the received
data in this simulator, so the channel model does not queue overlapping transitions.
