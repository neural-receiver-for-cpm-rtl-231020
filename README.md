# Bit-serial neural receiver for GMSK signals

This RTL is a demodulator for GMSK, the continuous-phase modulation of GSM.
It decides each transmitted bit with a small multilayer perceptron instead
of a Viterbi sequence estimator. The receiver takes one baseband sample
per bit for each of I and Q. It first removes the quarter turn that GMSK
adds to the phase in every bit. A window of the last m = 5
samples of each component gives ten network inputs. Ten hidden neurons
process them, and one output neuron follows. The decided bit is 1 when the
output neuron's sum is non-negative and 0 when it is negative.

The network is never trained in hardware. An external processor runs
back-propagation on stored samples and writes the finished weights into an
on-chip weight memory. The logic then only evaluates the network. All numbers
are 5 bits wide, and every neuron is built from bit-serial multipliers, so
each weight costs only a few flip-flops and gates. A new result comes out
every 6 clocks.

The architecture follows a published FPGA design: a 10-10-1 network, 5-bit
sign-magnitude numbers, bit-serial "basic neural elements", a
two's-complement serial adder, a 32-word activation table and a 121-word
weight RAM loaded by a DSP. The section "Choices and departures" lists what
this implementation adds or decides where that description is silent.

## Number format

Every input sample, weight and neuron output is a 5-bit **sign-magnitude**
number in `<5,2>` format:

| bit | 4    | 3   | 2   | 1    | 0    |
|-----|------|-----|-----|------|------|
|     | sign | 2   | 1   | 1/2  | 1/4  |

So the value is `(-1)^s * mag / 4`, with a range of -3.75 to +3.75. The type
is `nr_pkg::sm5_t` (`{s, mag[3:0]}`).

Inside a neuron, values become two's complement:

* **product** `p = sign(x)·sign(w) · floor(|x|·|w| / 8)`. The 8-bit product
  of the two magnitudes is cut to its 5 most significant bits, so the unit is
  1/2 and the range is -28 to +28.
* **sum** `h = Σ p`, kept as a **6-bit** two's-complement word in units of
  1/2. A sum outside -32 to +31 (-16.0 to +15.5) **wraps around**. Nothing
  detects this. The weights must be trained or scaled so that the sums stay
  in range (see "Choices and departures").
* **activation** `y = f(a)` with `a = floor(h / 2)`, the five upper bits of
  h, and `f(a) = (1 - e^-a)/(1 + e^-a) = tanh(a/2)`. The table stores
  `round(4·|f(a)|)` and passes the sign of `a` straight through, since f is
  odd. With 5-bit outputs, f has only four magnitude levels:

  | \|a\|        | 0 | 1   | 2    | ≥ 3 |
  |--------------|---|-----|------|-----|
  | \|y\| (value) | 0 | 0.5 | 0.75 | 1.0 |

  A hidden neuron's output is therefore one of the nine values -1.0 to +1.0
  in steps of 1/4. It feeds the output neuron in the same `<5,2>` format as
  the samples.

`tb/nr_ref_pkg.sv` holds these rules as a few lines of integer code. It is
the quickest way to see what the hardware computes.

## The serial word

All neuron arithmetic runs on **words of 6 clocks**. `frame_timer` marks the
first clock (`first`) and the last clock (`last`) of every word, and every
neuron shares them. In a word the bits run LSB first:

```
clock in word     0     1     2     3     4       5
X into multiplier x0    x1    x2    x3    0 (pad) -
BNE output        c0    c1    c2    c3    c4      c5 = sign extension
```

A neuron is a pipeline of two words.

1. **Word k: multiply.** Each of the 11 BNEs (`bne.sv`) sends the magnitude
   of its input X into `serial_mult`, one bit per clock, LSB first. The
   weight magnitude is held in parallel. The multiplier adds the shifted
   weight for every 1 bit of X. At `last`, it keeps the 5 most significant
   bits of the 8-bit product. The BNE also stores the product sign,
   `sign(x) XOR sign(w)`.
2. **Word k+1: convert, add, look up.**
   * **Convert.** Each BNE sends its product out serially in two's
     complement. A magnitude bit is inverted when the sign is negative, and
     a carry that starts at the sign bit adds the +1. The sixth bit comes
     from a zero pad above the 5-bit magnitude. After the conversion it is
     the sign of the word.
   * **Add.** `c2_adder` counts the 1s among the 11 BNE bits of each clock
     and adds the carry left over from the previous clock. Bit 0 of that
     count is the sum bit for the clock, and the rest is carried on. The
     carry is cleared at `first`, so the 6-bit result is the sum modulo 64.
   * **Look up.** `activation_lut` shifts the sum bits into a 5-bit
     register. In the last clock it forms the address `h[5:1]` from four
     stored bits and the bit now arriving. It reads the 32-word table, held
     as two 2-bit halves (LC1 for the upper magnitude bits, LC2 for the
     lower), and registers `y`.

Words overlap: while a BNE sends out word k's product, it multiplies word
k+1. Each neuron therefore gives one result per word, two words after its
input.

## The network and its timing

```
in_i ─┐            ┌─► tapped_delay_line (5 taps) ─┐
      ├─► derotator┤                               ├─► 10 hidden neurons ─► output neuron ─► out_y
in_q ─┘  (-j)^k    └─► tapped_delay_line (5 taps) ─┘       (11 BNEs each,      (11 BNEs)      out_bit = ~out_y.s
                                                            bias input +1.0)
weight_ram (121 × 5 bit) ──► every BNE has its own weight word
sample_buffer (148 I/Q pairs) ◄── every derotated pair, read by the training processor
```

`neural_receiver` is the top level.

* **Input handshake.** `in_ready` is high in the last clock of each word. A
  pair (`in_i`, `in_q`) is taken when `in_valid && in_ready`, so the
  receiver takes at most one pair per 6 clocks. A pair that is waiting must
  stay unchanged, and an assertion in the top checks this.
* **Derotation.** Pair k is multiplied by (-j)^k before it enters the
  window. On sign-magnitude values this is exact and needs no arithmetic.
  It is a swap of I and Q plus sign changes, chosen by a 2-bit phase
  counter: (I, Q), (Q, -I), (-I, -Q), (-Q, I). A zero always comes out as
  +0. The phase advances with every taken pair. `derot_clear` resets it to
  0 at the clock edge, for the first sample of a burst. `derot_phase` shows
  the quarter turn the next pair will get. The direction of the turn has to
  match the modulator. A receiver that derotates the wrong way sees the
  phase turn by π per bit and cannot be trained.
* **Window.** A taken pair enters tap 0 of both delay lines at the end of
  the word, and the older samples move down. The hidden neurons see I taps
  0 to 4 on inputs 0 to 4, Q taps 0 to 4 on inputs 5 to 9, and the bias on
  input 10. The hardware does not choose the symbol that the window is
  centred on; that is set by the training. For a window centred on its
  symbol, the window whose newest sample is pair k decides bit k-2.
* **Output.** `out_valid` pulses for one clock, **25 clocks after the clock
  in which the pair was taken**. That is the first clock of the fifth word
  after it: one word to enter the delay line, two words in the hidden
  layer, two in the output neuron. `out_y` and `out_bit` then hold the
  result until the next word. Words without a new sample recompute the same
  window and raise no `out_valid`.
* **Throughput.** There is one decision per word, so the sample rate is the
  clock divided by 6. GSM needs 270.833 ksample/s, which takes a 1.625 MHz
  clock. The original FPGA estimate was about 33 MHz, or 5.5 Msample/s.

### Weights

`w_we`, `w_addr` and `w_wdata` write one weight per clock.
`w_raddr`/`w_rdata` read one back one clock later.

| address           | weight                                               |
|-------------------|------------------------------------------------------|
| `j*11 + i`, j 0-9 | hidden neuron j, input i (0-4 I taps, 5-9 Q taps, 10 bias) |
| `110 + i`         | output neuron, input i (0-9 hidden neuron i, 10 bias) |

The weights drive the BNEs directly, and there is no second weight bank. A
write takes effect on the next clock, so reload the weights between bursts,
not in the middle of a stream. Reset clears all weights.

### Capture buffer

While `buf_capture` is high, every accepted pair is written to
`sample_buffer` at `buf_wr_ptr`, and the pointer then wraps after 148
entries (one GSM burst). The training processor lowers `buf_capture`, reads
the stored burst through `buf_raddr` → `buf_rdata_i/q` (one clock of read
latency) and trains on it while the network keeps running on live samples.

## Demodulation performance

`tb/tb_gsm_ber.sv` checks that a trained 5-bit network demodulates GMSK.
The testbench builds the link and trains the network itself.

* **Link.** Random bits are differentially encoded and GMSK-modulated with
  BT = 0.3 and h = 1/2. White Gaussian noise is added, and the signal is
  sampled once per bit at mid-bit and rounded to `<5,2>`. The receiver's
  derotator is cleared at the start of each test stream.
  The testbench computes the derotated samples, rounds them and turns them
  back, so the hardware derotator must undo that turn exactly.
* **Training.** The float network is trained on-line with back-propagation
  and momentum on 14 800 bits at Eb/N0 = 8 dB: learning rate 0.2, halved
  every 3 700 bits, and momentum 0.9. The weights are kept within ±3.75.
  Three networks are trained from different random starts. Each is rounded
  to `<5,2>` and tried on a separate 1 000-bit burst, and the best one is
  written into the receiver.
* **Check.** Every hardware decision must equal the integer model, and the
  bit error rate is measured at 4, 6 and 8 dB and without noise.

Four cases run in one simulation of about 20 s:

| window | build | 4 dB | 6 dB | 8 dB |
|---|---|---|---|---|
| m = 5 (10-10-1) | default, `M_WIN = 5` | 1.7-2.9 % | 0.5-1.0 % | 0.07-0.33 % |
| m = 3 (6-10-1) | default, `M_WIN = 5` | 1.5-2.7 % | 0.5-0.9 % | 0-0.23 % |
| m = 9 (18-10-1) | `M_WIN = 9` | 1.5-4.9 % | 0.7-3.3 % | 0.1-1.4 % |
| m = 7 (14-10-1) | `M_WIN = 9` | 1.6-5.2 % | 0.5-3.3 % | 0.1-1.2 % |

The ranges cover eight random seeds. A shorter window runs on a longer
build with the weights of its outer taps written as zero. None of the runs
made an error without noise, and no neuron sum overflowed. The wider
windows vary more, because the 5-bit rounding of their larger weight sets
sometimes costs more. The testbench fails a case above 10 % at 4 dB, 5 % at
6 dB, 2 % at 8 dB or 1 % without noise.

For comparison, the published error-rate curves for the same network sizes,
with a floating-point network and a receive filter in the link, lie
roughly at 2 % at 4 dB, 0.5 % at 6 dB and 0.1-0.2 % at 8 dB. The 5-bit
hardware with the default window lands in the same range. This link model
has no receive filter, so it has less intersymbol interference, and the
comparison is only a rough one.

In this link model the phase change of bit k is centred on sample k+2. The
window used for bit k is therefore samples k to k+4, and its decision comes
with the window whose newest sample is k+4. The receive filter of a real
GSM front end is not modelled.

## What is not in the RTL

* **The training processor.** Back-propagation with momentum runs as
  software on a separate DSP. Its connections are the top's weight and
  buffer ports.
* **The transmit side and channel of a test link:** differential encoder,
  GMSK modulator and filter, noise channel and receive filter. The receiver
  expects sampled, 5-bit I/Q values with the carrier and timing already
  recovered, one pair per bit.
* **Several samples per bit.** The word rate would allow up to about 20
  samples per GSM bit. The derotator, however, turns once per taken pair,
  so the window and the derotation are built for one sample per bit.

## Choices and departures

* **Bias input.** The network equation has no bias term. The 121-word weight
  memory, however, only works out as 11 neurons × 11 inputs. So every neuron
  here has an eleventh input held at +1.0, weighted like the others.
* **Sum overflow.** The sum word stays at 6 bits, as in the original serial
  design. With up to 11 products of ±14 that range is easy to exceed, and
  the sum then wraps and does not saturate. Trained weights of about ±3 on
  unit-size inputs can overflow. Keep the weights small enough, or widen
  the word. Widening means changing `WORD` in `nr_pkg`, the adder and the
  table address together.
* **Multiplier structure.** The original multiplier is a chain of delayed AND
  gates and serial adders. This one is a shift-and-add accumulator with the
  same serial input, parallel weight, truncation and word rate. Its result
  is handed to the BNE in parallel, and the BNE makes the serial stream.
* **Table contents.** The 32 entries are `round(4·tanh(|a|/2))`, computed at
  elaboration from the formula in `nr_pkg`. Here the sign bit is part of
  both table halves' address. In the original, the sign selects between two
  logic cells.
* **Control.** The two word strobes replace a single enable pulse. The
  valid/ready input handshake, the latency, the weight address map, the
  read-back ports, the capture buffer's depth and organisation, and the
  synchronous active-low reset are all choices made for this
  implementation.
* **Derotation inside the receiver.** In the original block diagram the
  derotation sits in the link, outside the receiver box. Here it is part of
  the receiver, in front of the delay lines. So `in_i`/`in_q` are samples
  before derotation, and the capture buffer stores them after derotation,
  which are the values the network actually sees. The direction (-π/2 per
  bit) and the clear input are this design's choices.
* **Sign-magnitude throughout.** The original text calls `<5,2>` a
  two's-complement format in one place, but its multiplier takes
  sign-magnitude operands, and its table gives a sign-magnitude output to
  the next layer. Sign-magnitude is used for all inputs, weights and
  neuron outputs.
* **Decision for a zero output.** A zero output decides 1.
* **Window length.** The default build has m = 5. A 3-sample window runs on
  it with zero weights on the newest and the oldest tap of each delay line.
  Windows of 7 or 9 need `M_WIN` raised, and the weight memory then grows
  to `(N_HID+1)·(2·M_WIN+1)` words. The address map keeps the same pattern:
  I taps, then Q taps, then the bias, 2·M_WIN+1 words per neuron.
* **Size.** A BNE here holds about 31 flip-flops: the input serializer, the
  multiplier's accumulator and shifted weight, the product register and the
  conversion state. The original fits one BNE into about six logic blocks
  with two flip-flops each, and estimates at least 863 blocks for the whole
  network. Generic synthesis of the default top gives about 4300
  flip-flops and 2800 other cells, plus the 148 × 10-bit capture memory.
  The 121 weights sit in flip-flops rather than a RAM, because every BNE
  reads its own weight in every clock.

## Files

| file | contents |
|------|----------|
| `rtl/nr_pkg.sv` | sizes, `sm5_t`, bias constant, activation table function |
| `rtl/frame_timer.sv` | 6-clock word strobes |
| `rtl/serial_mult.sv` | bit-serial × parallel truncating multiplier |
| `rtl/bne.sv` | basic neural element: multiplier, sign XOR, serial SM→C2 |
| `rtl/c2_adder.sv` | bit-serial multi-operand two's-complement adder |
| `rtl/activation_lut.sv` | 5-bit shift register and 32-word activation table |
| `rtl/neuron.sv` | 11 BNEs, adder and table |
| `rtl/derotator.sv` | quarter-turn-per-bit derotation of the input pairs |
| `rtl/tapped_delay_line.sv` | 5-tap sample window |
| `rtl/weight_ram.sv` | 121-word weight memory, all words read in parallel |
| `rtl/sample_buffer.sv` | capture buffer for training data |
| `rtl/neural_receiver.sv` | top level |
| `tb/nr_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_gsm_ber.sv` | GMSK link, training and bit-error-rate run on the top level |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each one also has a watchdog. From the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nr_pkg.sv tb/nr_ref_pkg.sv tb/tb_neural_receiver.sv \
    --top-module tb_neural_receiver -o sim
./obj_dir/sim
```

Use the same command with `tb_neuron`, `tb_bne` and so on for the other
modules. Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/nr_pkg.sv
rtl/<module>.sv`.

What the testbenches cover:

* The multiplier, the BNE and the activation table are tested exhaustively:
  all 256 magnitude pairs, all 1024 signed pairs and all 64 sums.
* The adder, the neuron, the derotator, the delay line, the weight RAM, the
  buffer and the timer are tested with random stimulus against models, including the
  per-word rate and the latency.
* `tb_neural_receiver` runs the top at its default sizes. It loads four
  random weight sets, streams 1600 sample pairs with random stalls and
  gaps, and compares every decision and its 25-clock latency with the
  integer model of the whole network, derotation included. Sum wraps, table
  saturation, both decisions, weight reloads, capture-buffer wrap and
  freeze, derotation clears and all four derotation phases occur during the
  run.

* `tb_gsm_ber` runs the demodulation test described above. It takes about
  20 s.
