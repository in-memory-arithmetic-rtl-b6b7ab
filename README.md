# Stochastic in-memory divider, with a Retinex image pipeline around it

Binary division is expensive in hardware: it iterates, needs control, and
takes many cycles. Stochastic computing sidesteps it. A number p in [0, 1] is
carried as a bit-stream in which a fraction p of the bits are 1, and a
divider becomes a two-input multiplexer with one bit of memory:

    Q(k) = Y(k) ? X(k) : Q(k-1)

If the X and Y streams are built from the *same* random numbers, every 1 of
X falls on a 1 of Y (for X <= Y). Q then copies X at the Y = 1 positions and
holds otherwise, so the fraction of 1s in Q tends to X / Y.

This RTL builds that divider out of magnetic logic-in-memory (LIM) gates,
where each gate stores its inputs in magnetic tunnel junctions (MTJs) during
one clock phase and evaluates them during the other. The MUX is written as
`Q = (Q & ~Y) | (X & Y)`, with the two AND gates on one clock phase and the
OR gate on the opposite phase. Because the OR result reaches the AND gate
half a cycle later, the feedback needs no flip-flop: the clock phases do the
delaying. Around this core the design adds what a complete unit needs: a
generator that turns binary numbers into correlated bit-streams, a counter
that turns the quotient stream back into a number, and, as an application,
a Retinex image-enhancement pipeline that divides every pixel by a Gaussian
estimate of its illumination.

## Module map

| module | file | role |
|---|---|---|
| `sc_retinex` | `rtl/sc_retinex.sv` | top: frame buffers, pixel controller, one filter and one divider per colour channel |
| `gauss3x3` | `rtl/gauss3x3.sv` | binary 3x3 Gaussian, illumination estimate L |
| `sc_div_unit` | `rtl/sc_div_unit.sv` | binary in, binary out: generator + LIM divider + counter + sequencer |
| `sc_sng` | `rtl/sc_sng.sv` | correlated bit-stream generator pair |
| `sc_divider` | `rtl/sc_divider.sv` | the three-gate LIM divider |
| `lim_gate` | `rtl/lim_gate.sv` | logic-level model of one MTJ logic-in-memory gate |
| `sc_counter` | `rtl/sc_counter.sv` | counts the 1s of the quotient stream |
| `sc_pkg` | `rtl/sc_pkg.sv` | `bit_reverse()` helper |

## The LIM gate (`lim_gate`)

The physical gate has two MTJs that are written with X and Y, a third,
fixed MTJ in series, and two sense amplifiers. While CLK = 0 (preparation)
write transistors set the MTJ free layers to the input values; while CLK = 1
(evaluation) a read current flows through the three MTJs and the voltage at
the node between them depends on how many input MTJs hold a 1. One sense
amplifier compares it with a low reference (OR/NOR), the other with a high
one (AND/NAND).

`lim_gate` models this at logic level. That is the one place where this
code is a behavioural model rather than a circuit: it has no resistances,
currents, power or variability, but it keeps the two published delays as
parameters. Its rules:

* The MTJs take the inputs present at the rising edge of `clk` (the end of
  preparation).
* Writing takes `PREP_DELAY` (1.8 ns). A write counts from the start of
  the CLK = 0 phase or from the last input change, whichever is later; if
  less than 1.8 ns has passed at the rising edge, the MTJs keep their old
  state. This is modelled as a delay from the write drive to the free
  layer, which synthesis ignores. With the 10 ns clock used throughout
  (5 ns per phase) there is ample margin.
* The sense-amplifier outputs settle `EVAL_DELAY` (2.3 ps) after the
  rising edge.
* The node voltage is represented by the count of stored 1s (0, 1 or 2);
  OR is "count > 0", AND is "count > 1".
* The outputs are held from one evaluation until the next one.
* `clr` writes 0 into both MTJs instead of the inputs. The physical gate has
  no such pin; it stands for an initialisation write and is used to start
  every division with Q = 0.

A gate that must evaluate while CLK = 0 simply receives the inverted clock.

## Two clock phases instead of a flip-flop (`sc_divider`)

This is the part that needs care. The three gates are

* `u_and1`: Q AND (NOT Y), clock `clk`;
* `u_and2`: X AND Y, clock `clk`;
* `u_or`: AND1 OR AND2, clock `~clk`, output `q`.

Stream bit k is applied just after rising edge k and held for a cycle.

    edge                     what happens
    rising  k+1              AND1, AND2 store Q(k-1), Y(k), X(k); evaluate
    falling k+1 (half later) OR stores AND1, AND2; q = Q(k) from here on
    rising  k+2              AND1 stores Q(k) for the next bit

So each quotient bit appears 1.5 cycles after its inputs were first applied,
and an N-bit division is complete N + 1/2 cycles after the first input bit
started. The feedback Q -> AND1 crosses one half-cycle boundary each way,
which is exactly the one-bit memory of the MUX divider. `and1` and `and2` are
brought out so the internal phases can be watched.

The classic example: X = 1010101010101010 (8/16) and
Y = 1111111011101110 (13/16) give Q = 1010101110111011, 11 ones out of 16,
against the exact 8/13 = 10.4/16.

## Making the streams (`sc_sng`) and reading them back (`sc_counter`)

The divider only works on correlated streams, so both streams come from one
random number r per cycle and two comparators, `x_bit = r < X` and
`y_bit = r < Y`. For r this design uses a LOG_N-bit counter read with its
bit order reversed (the van der Corput sequence 0, N/2, N/4, 3N/4, ...).
Over one period of N = 2^LOG_N cycles it takes every value once, so a stream
carries *exactly* X ones (after scaling), and it spreads those ones evenly.
A maximal-length LFSR was also tried: its successive states are shifted
copies of each other, which the divider's feedback is sensitive to, and its
mean error at N = 256 was about 8 % instead of 2.7 %.

Operands are DATA_W = 8 bits and are shifted to LOG_N bits. The counter
counts the quotient's 1s over the N bits; a result M means M / N.

Mean absolute error against exact X / Y, 8-bit operands, random X < Y
(from `tb/tb_table1_mae.sv`; the right column is the accuracy published for
the MTJ divider, for comparison):

| N | 16 | 32 | 64 | 128 | 256 | 512 | 1024 |
|---|---|---|---|---|---|---|---|
| this RTL, MAE % | 10.57 | 7.31 | 5.10 | 3.41 | 2.70 | 2.70 | 2.70 |
| published, MAE % | 12.51 | 8.46 | 6.07 | 4.24 | 2.92 | 2.15 | 1.61 |

Up to N = 256 this generator does slightly better than the published
figures. Beyond it the error stops falling: with 8-bit operands and a
bit-reversed counter, the longer streams repeat the same interleaving. If
long streams matter, a generator with more randomness is the thing to
change; only `sc_sng` and the reference sequence in `tb/tb_ref_pkg.sv`
need to be edited.

Edge cases, which follow from the MUX rule and are tested: X > Y makes Q
copy a 1 at every Y = 1 position and hold it in between, so the result is
N minus the number of bits before the first Y = 1. The bit-reversed counter
starts at 0, so the first Y bit is 1 whenever Y > 0 and the result is
exactly N. Y = 0 leaves Q at its cleared value 0.

## The binary divider (`sc_div_unit`)

A small sequencer (IDLE, RUN, DRAIN) wraps the generator, the LIM divider
and the counter.

* `start` is taken while idle; `x_val`/`y_val` are latched then.
* RUN lasts N cycles, one stream bit each. The streams are forced to 0
  outside RUN, and the LIM gates are held cleared while idle.
* The counter samples q one cycle behind each input bit (q is valid from the
  falling edge in between). DRAIN waits for the last bit.
* `done` pulses for one cycle N + 2 cycles after the start edge, with
  `q_count` (LOG_N + 1 bits, 0..N) valid from then until the next start.

The handshake and result format are choices of this design.

## Retinex pipeline (`sc_retinex`, top)

Retinex models an image as I = R * L (reflectance times illumination) and
recovers R = I / L. L is estimated by a Gaussian low-pass of I in ordinary
binary arithmetic (`gauss3x3`, kernel [1 2 1; 2 4 2; 1 2 1] / 16, rounded);
the division is the stochastic one, N = 256.

* Input frame buffer: `IMG_W x IMG_H` words of `CHANNELS x DATA_W` bits
  (default 600 x 400 RGB, the size of the LOL low-light images), written
  through `in_we`/`in_addr`/`in_pix` while idle. Address = y * IMG_W + x.
* `start` processes the whole frame in raster order. For each pixel the
  controller reads the 3x3 neighbourhood (9 reads, border pixels
  replicated), computes L per channel, starts the three dividers together
  with X = I and Y = L, and writes the result to the output buffer.
* Result per channel: `min(M * 2^DATA_W / N, 2^DATA_W - 1)`, so R = 1.0
  reads as 255. Pixels brighter than their surroundings (I > L) saturate at
  255, and L = 0 gives 0.
* Output frame buffer: read through `out_addr`, data on `out_pix` one cycle
  later.
* Timing: a pixel takes N + 13 cycles (9 reads, 2 set-up cycles, N + 2 for
  the divider); a frame takes `IMG_W * IMG_H * (N + 13) + 1` cycles from the
  start edge to the `done` pulse, 64.56 M cycles at the defaults.

Two assertions in the top check that the three dividers are idle when
started and finish in the same cycle.

## What is modelled and what is chosen here

Taken from the design this RTL follows: the MUX division rule, the
AND1/AND2/OR decomposition with the inverted Y at AND1, the opposite clock
phases of the AND and OR gates, the two-reference sense scheme of the LIM
gate, the N + 1/2 cycle latency, N = 256 for the application, 8-bit
operands, the binary Gaussian filter before the division.

Chosen here (and easy to change): the bit-stream generator and its
correlation, the `clr` initialisation of the LIM gates, the counter, the
start/done handshake, the Gaussian kernel size and weights, border
replication, the frame buffers and their ports, the image size, the
sequential (non-overlapped) pixel schedule, and the mapping of the count to
an 8-bit pixel.

Where the results differ from the published ones: the divider's accuracy
matches or beats the published figures up to N = 256 but stops improving
beyond it (see the table above), because of the generator chosen here. The
two published delays are figures for the whole N = 16 divider; the model
applies them to every gate.

Not modelled: the analog circuit itself. Power, the spread of the delays
under process variation, and the write and sense currents belong to circuit
simulation; `lim_gate` is a logic-level stand-in that only keeps the two
nominal delays. The conventional CMOS divider
(MUX plus D flip-flop) is not included as a module; its rule is the
reference model in the testbenches.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sc_retinex` | `IMG_W`, `IMG_H` | 600, 400 | frame size |
| `sc_retinex` | `CHANNELS` | 3 | colour channels, one filter and divider each |
| all SC blocks | `LOG_N` | 8 | stream length N = 2^LOG_N (4..16) |
| all SC blocks | `DATA_W` | 8 | operand / pixel width |
| `lim_gate` | `PREP_DELAY`, `EVAL_DELAY` | 1.8 ns, 2.3 ps | minimum write time, output delay |

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. They need `--timing`. For example:

    verilator --binary --timing --assert -Wno-fatal \
        --top-module tb_sc_retinex -y rtl -y tb +libext+.sv \
        rtl/sc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sc_retinex.sv
    ./obj_dir/Vtb_sc_retinex

| testbench | what it shows |
|---|---|
| `tb_lim_gate` | AND/NAND/OR/NOR at each evaluation, outputs hold while inputs change, `clr`, 2.3 ps output delay, a too-short write leaves the state unchanged |
| `tb_sc_divider` | bit-exact against the MUX rule, q valid exactly at the falling edge, the 8/16 by 13/16 example, N + 1/2 latency |
| `tb_sc_sng` | exact 1-counts for all 256 values, correlation, scaling to N = 16 |
| `tb_sc_counter` | counting with gaps and clears |
| `tb_sc_div_unit` | bit-exact results incl. saturation and Y = 0, N + 2 cycle latency, MAE at N = 256 |
| `tb_gauss3x3` | filter against the reference |
| `tb_table1_mae` | the accuracy sweep above, N = 16..1024 |
| `tb_sc_retinex` | a 7 x 5 RGB frame end to end, every pixel checked, frame cycle count, each mechanism (border, saturation, zero L, hold, copy) seen |
| `tb_sc_retinex_full` | the same on a synthetic 600 x 400 frame at default parameters (a few minutes); also prints the PSNR of the stochastic result against exact division |

`tb/tb_ref_pkg.sv` holds the reference models (random sequence, MUX
divider, Gaussian, count-to-pixel mapping), written from the definitions
above rather than from the RTL.

Lint notes: Verilator reports unconnected gate outputs (the unused NAND,
NOR and OR/AND outputs of the LIM gates) and that `rst_n` appears both in
flip-flop resets and in assertion `disable iff` clauses; both are intended.
