# 1200 b/s BPSK modem with a built-in satellite-link loopback

This is a complete digital BPSK modem for amateur-radio satellite telemetry
at 1200 b/s, together with the test harness that exercises it. A PC
bit-error tester sends a block of 10,000 bits to the modem over a 1200 baud
RS-232 link. The modem stores the block, then plays it through a
simulated satellite link: differential encoding, BPSK modulation of a 4800 Hz
carrier, an optional noise channel, and a Costas-loop demodulator. An
early-late gate recovers the bit clock, and a differential decoder follows.
The recovered block is stored again and sent back over RS-232, so the tester
can count bit errors.

All logic runs on one 100 MHz clock. The signal processing advances on a
2 MHz sample strobe, and the bits move at 1200 b/s.

```
 rxd ─► uart_rx ─► buffer_control ─► rx_buffer ─► diff_encoder ─► bpsk_modulator ─┐
                        ▲    │          (alert)                                    │ + awgn_lfsr
 txd ◄─ uart_tx ◄───────┘    └──────── tx_buffer ◄─ diff_decoder ◄─ early_late_gate ◄─ costas_loop ◄┘
```

`modem_top` holds the RS-232 modules, the controller and `satcom`.
`satcom` is everything from `rx_buffer` to `tx_buffer`.

## Rates and number formats

| quantity | value | how it is made |
|---|---|---|
| system clock | 100 MHz | input `clk` |
| sample rate | 2 MHz | `clock_gen`: a one-clock enable every 50 clocks |
| carrier | 4800 Hz | DDS, increment round(2^32·4800/2e6) = 10307922 |
| bit rate | 1200 b/s | phase accumulator, increment 2576980 (`bit_clock`, `nco_elg`) |
| RS-232 | 1200 baud, 8N1, LSB first | `uart_rx`, `uart_tx` |
| block | 10,000 bits = 1250 characters | `NBITS` |
| transmitted / received sample | 12-bit signed | |
| NCO I/Q | 12-bit signed, 4096-entry table | |
| mixer products | 24-bit signed | |
| arm-filter outputs | 16-bit signed | the top 16 bits of a 40-bit sum |
| phase error | 32-bit signed | |

The sine tables for the DDS blocks are computed when simulation or
synthesis starts: entry i = round((2^(W-1)−1)·sin(2πi/N)). The arm-filter
coefficients are computed the same way (see below). No data files are used.

## Transmit side

**rx_buffer** stores characters as the controller hands them over. When it
is full and the controller says start, it does two things. It sends a
one-clock `alert` to the transmit buffer. It then sends the 10,000 bits, LSB
first, one per tick of the 1200 Hz bit clock. Between blocks it sends 1s.
After the differential encoder, those 1s become a steady alternation, so both
receive loops can lock before real data arrives.

**diff_encoder** computes y[n] = x[n] ⊕ y[n−1]. **diff_decoder**, on the
receive side, computes y[n] = x[n] ⊕ x[n−1]. A Costas loop can lock with
either sign, and this pair makes the data independent of that sign.

**bpsk_modulator** drives a 4800 Hz DDS. It sends the carrier for a 1 and
the negated carrier for a 0. The sample rate is not a multiple of the
carrier, so a polarity change is held pending and applied where the carrier
phase crosses 0° or 180°. That point is the change of the accumulator MSB.
Phase reversals therefore always happen near a zero crossing.

**awgn_lfsr** is the noise source:
- LFSR_1 (16 bits) steps on every sample. Its low bit is a random enable for
  LFSR_2 (31 bits).
- LFSR_2 advances 12 positions each time it is enabled, producing a fresh
  12-bit uniform word.
- The word shifts through four registers, and their sum is the noise sample.

The result is bell-shaped with zero mean. LFSR_2 pauses on about half the
samples, so neighbouring registers often hold the same word. The standard
deviation is therefore about 3400 LSB, not the 2365 LSB four independent
words would give. In `satcom`, noise >>> `NOISE_SHIFT` is added to the
modulated signal when `noise_en` is high, and the sum saturates to 12 bits.

## Costas loop (carrier recovery and demodulation)

The datapath has five stages, and `costas_control` sequences them:

1. **costas_multiply** multiplies the received sample by the NCO's sine (I)
   and cosine (Q). Each product is 12×12 → 24 bits.
2. **arm_filter** has two 31-tap low-pass FIR filters with a 9600 Hz cutoff.
   - The coefficients are a Hamming-windowed sinc. They are scaled to 12-bit
     unsigned integers with 4095 at the centre, and they are symmetric.
   - One multiply-accumulate runs per 100 MHz clock, so a sample takes 31
     clocks. The result is ready 32 clocks after the input, inside the
     50-clock sample period.
   - The 40-bit sum is shifted right by 24, which gives a DC gain of about
     2^−8.
3. **phase_detector** computes e = y_I · y_Q (16×16 → 32 bits). That is
   proportional to sin 2θ, so it is blind to the data sign.
4. **loop_filter** is a PI filter written with shifts:
   integral += e >>> 14, adj = (e >>> 5) + integral.
5. **costas_nco** is a DDS whose increment is the 4800 Hz centre increment
   plus `adj`.

`costas_control` holds everything in reset until the first sample. It then
releases the NCO, clears and enables the arm filters, and releases the loop
filter once the filters hold 32 samples. This avoids a large startup
transient.

At lock, y_I is the demodulated data: about ±8200 for a full-scale input.
y_Q is near zero. In simulation the loop locks within 5 ms from a 60° phase
offset and from a +200 Hz frequency offset.

## Early-late gate (bit timing recovery)

This is the least obvious part. It recovers the bit clock and decides the
bits from the demodulated baseband `demod`.

- **nco_elg** is a 1200 Hz DDS. Its increment is 2576980 plus the timing
  correction. An 8-bit sine output goes through a bang-bang comparator:
  1 if positive, 0 if negative, unchanged at zero. The comparator output is
  the recovered clock `clk_out`.
- Two integrate-and-dump accumulators sum `demod` at 2 MHz:
  - the **early** one dumps on the rising edge of `clk_out`;
  - the **late** one dumps on the falling edge, half a bit later.
  Each holds one bit's worth of signal.
- At every rising edge, the summer forms |early| − |late|.
  - When the clock is aligned with the bits, the early window covers a whole
    bit and the late window straddles a transition, so the difference is
    largest and stable.
  - A timing error makes the early energy fall on one side, which drives the
    correction.
- **elg_pid** filters the difference as
  y[n] = y[n−1] + (2·x[n] − x[n−1]) >>> 8. This is a PI controller with
  integral gain 1/256 and proportional gain 1/256. Its output is the
  correction fed to `nco_elg`.
- **nrz_decoder** integrates `demod` over a bit window, holds the sum and
  takes its sign as the bit.
  - The window starts `DELAY_SAMPLES` (1/4 bit, 416 samples) after each
    rising edge of `clk_out`.
  - That offset was found by simulation. It puts the window on the data bit
    given where the loop settles.

In simulation the loop locks during the idle alternation that precedes a
block. It then decides every bit correctly, both on a clean channel and at
the default noise level.

## RS-232 side and the buffer controller

**uart_rx** synchronises `rxd` and checks the start bit at mid-bit. It then
samples 8 data bits at their centres and raises `rdy`. `rdy` stays high until
the controller resets the receiver.

**uart_tx** shifts out a 10-bit frame.

**buffer_control** is an eleven-state machine:

| state | name | action | LED |
|---|---|---|---|
| 0 | RX_RESET | reset the RS-232 receiver | 0 |
| 1 | RX_ARM | release it | 0 |
| 2 | RX_WAIT | wait for a character | 0 |
| 3 | RX_STORE | write it to rx_buffer; full → 5, else → 4 | 0 |
| 4 | RX_ACK | finish the write handshake → 0 | 0 |
| 5 | DISPENSE | start rx_buffer (alert + bit stream); when it has finished → 6 | 0 |
| 6 | LOOPBACK | wait for tx_buffer to fill | 1 |
| 7 | TX_IDLE | wait until uart_tx is free | 2 |
| 8 | TX_FETCH | ask tx_buffer for a character; empty → 0, ready → 9 | 2 |
| 9 | TX_TAKE | acknowledge it to tx_buffer | 2 |
| 10 | TX_SEND | start uart_tx and wait for busy → 7 | 2 |

LED3 is lit while either RS-232 module is busy.

**tx_buffer** restarts on `alert`. It discards the first `DELAY_BITS`
recovered bits, then packs the next 10,000 into characters, LSB first. The
discarded bits cover the latency of the loopback: the encoder and decoder
pair, the filters, and the bit decision. One bit is what this chain needs.
The buffer then hands the characters out on request.

## Where this design departs from the original modem

- **Costas loop gains.** The original gives K_p = 2^−6 and K_I = 2^−8.
  Those values were derived for an 8-bit model whose filter gain is 2^−16.
  At the 12/16/32-bit widths used here they give far too much loop gain, and
  the loop does not settle. This design uses shifts of 5 and 14
  (`KP_SHIFT`, `KI_SHIFT`).
- **Timing loop coefficients.** The original gives a = b = 1/15 for
  y[n] = a·x[n] + b·x[n−1] + y[n−1]. That did not settle here either.
  This design uses a = 2/256 and b = −1/256 (`PID_A_NUM`, `PID_B_NUM`,
  `PID_SHIFT`).
- **Early and late windows.** In the original, the late branch dumps on "a
  delayed version" of the recovered clock, and the delay is not given. Here
  it dumps on the falling edge, a half-bit delay.
- **NRZ decision window.** The 1/4-bit offset of the decision window is this
  design's own choice.
- **Bit-clock centre frequency.** The original describes it both as 2400 Hz
  and as the increment 2576980. That increment is 1200 Hz at 2 MHz, which
  matches the bit rate, so 1200 Hz is used.
- **Alert timing.** The alert to the transmit buffer is sent when the
  receive buffer starts dispensing, as in the original's transmit-delay
  sequence. The original's state-5 description places it at the end.
- **Transmit delay.** The transmit delay is counted in recovered bits, not
  in time.
- **State 7.** It waits while the transmitter is busy.
- **Arm-filter latency.** The arm filters compute serially, so their latency
  is 32 clocks rather than 28.
- **NCO latency.** The DDS output is registered once, not twice.
- **Blocks that are not included.**
  - The forward-error-correction chain is absent: the (2,1,7) convolutional
    encoder with its serializer, the soft-decision quantizer and the Viterbi
    decoder. The original dropped it from its final modem.
  - The external DAC interface is absent. The signals it would show are top
    ports instead: `tx_sample`, `demod` and `rec_clk`.
- **Noise source.** The noise source was left out of the original's final
  hardware. Here it is present, behind `noise_en`.

## Parameters

All defaults are the original modem's numbers where it gives one:
`CLK_HZ` = 100e6, `SAMPLE_HZ` = 2e6, `BAUD` = 1200, `BIT_HZ` = 1200,
`CARRIER_HZ` = 4800 and `NBITS` = 10000.

These are this design's own choices:
- `DELAY_BITS` = 1;
- `NOISE_SHIFT` = 2: noise sd of about 850 against a 2047 carrier peak;
- the loop gains above;
- `FILL_SAMPLES` = 32.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The models are written
independently of the RTL: exact products, a separate FIR, the UART frame,
and the difference equations.

- `tb_costas_loop` starts from a 60° phase offset and from a +200 Hz
  frequency offset. It checks the loop's frequency estimate and the sign of
  the demodulated data.
- `tb_early_late_gate` drives a synthetic baseband with a random timing
  offset and a small rate error. It checks every recovered bit once the
  loop has locked on a preamble.
- `tb_satcom` runs 48-bit blocks through the whole link, clean and with
  noise.
- `tb_modem_top` is the end-to-end test. It plays the bit-error tester over
  RS-232 with `NBITS` = 160: one clean block, then one noisy block. It
  checks that every returned bit is correct. It also checks that every
  controller state, every LED, the alert, the transmit delay, the noise and
  the carrier phase reversals all occurred.

A full 10,000-bit block takes about 29 s of modem time: about 8.3 s through
the link and about 10 s each way over RS-232. That is roughly 3·10^9 clock
cycles, which is too long to simulate routinely. The largest block simulated
end to end is 160 bits. `NBITS` only sets the buffer depth. All timing
parameters stay at their defaults in the tests.

### Known limitations

A 2400-bit link-only run (about 2 s of modem time, a few minutes of
simulation) found two problems. The 48- and 160-bit tests are too short to
show either of them.

- **Bit-clock drift on a clean channel.** With noise off, the early-late
  gate loop drifts after roughly 0.9 s. The recovered bit rate falls to
  about 880 b/s, and the 2400-bit block never fills. With noise on, the
  loop stays at 1200 b/s. The cause is probably the small, noise-free error
  signal from the summer combined with the proportional-integral filter's
  shift of 8. This has not been fixed.
- **Block alignment.** The alert goes out when `start` arrives, and the
  first bit goes out on the next bit tick. The number of recovered bits
  between the alert and bit 0 can therefore differ by one, depending on the
  bit clock's phase. When it does, every character of the block comes back
  shifted by one bit. A fixed `DELAY_BITS` (1) is right for the tested
  cases but not for every phase. Sending the alert on the same tick as the
  first bit would remove the uncertainty. It was tried, but it needs
  `DELAY_BITS` to be recalibrated, and that was not finished.

## Simulating

Everything is plain SystemVerilog with one package, `modem_pkg`, which holds
the DDS helper functions and the controller state type. For example:

```
verilator --binary --timing -Irtl rtl/modem_pkg.sv tb/tb_modem_top.sv --top tb_modem_top
./obj_dir/Vtb_modem_top
```

Any other testbench runs the same way. The end-to-end test takes about a
minute.
