# QPSK modulator built from reversible gates

This is a small digital QPSK (quadrature phase shift keying) modulator. It
takes an 8-bit word and sends it as four symbols of two bits each. Each
symbol is a stretch of a sampled sine carrier whose phase is 0, 90, 180 or
270 degrees, depending on the two bits. There is no table of I and Q
amplitudes and no multiplier. The carrier is an eight-position *phase ring*
that steps 45 degrees per clock. Each symbol's phase is added to the ring
position, and the sum is turned into a sample.

The multiplexers, the counter and the adders are built out of reversible
logic primitives: the Feynman, Toffoli and Fredkin gates. Every one of these
gates has as many outputs as inputs, and its inputs can be recovered from its
outputs. Outputs that the function does not need are *garbage outputs*. Here
they are left unconnected inside the modules. A synthesis tool folds the gates
back into ordinary logic, so on an FPGA or in a standard-cell flow the
reversible style shows up only in the netlist's structure. It gives no
physical reversibility.

## Signal chain

```
 data_in[7:0] ──► data_controller ──data_out[1:0]──► data_state_encoder ──state[2:0]──┐
 start ─────────►  (FSM + Toffoli   ──enable──────────────────────────────────────┐     │
 clk, rst ──────►   wait counter)                                                  ▼     ▼
                                                          gin ──► qpsk_wave_gen (phase ring) ──► gout
                                                                        │ degree[9:0]
                                                                        ▼
                                                                wave_sample_gen ──► qpsk_wave[7:0]
```

| module | what it does | clocked |
|---|---|---|
| `data_controller` | captures the word on `start`, puts out one dibit per symbol period, and holds `enable` high for the whole word | yes |
| `data_state_encoder` | maps dibit to ring state: 00→0, 01→2, 10→4, 11→6 (0/90/180/270°) | no |
| `qpsk_wave_gen` | phase ring; angle = 45° × ((ring + state) mod 8), 10-bit signed | yes |
| `wave_sample_gen` | angle → round(127·sin(angle)), 8-bit two's complement | no |
| `qpsk_top` | wires the four together | |

Helpers, all combinational:

- `feynman_gate`: P = A, Q = A⊕B.
- `toffoli_gate`: P = A, Q = B, R = AB⊕C.
- `fredkin_gate`: P = A, and B and C swap when A = 1.
- `rev_mux2`: a 2:1 multiplexer with one Fredkin gate per bit.
- `rev_adder`: a ripple adder; each bit uses two Feynman and two Toffoli gates.
- `toffoli_counter`: a ripple up-counter with a Toffoli carry chain and a Feynman sum per bit.

Shared types and constants are in `qpsk_pkg`.

## The phase ring

This is the part that needs the most explanation. `qpsk_wave_gen` holds a
3-bit register `ring` with one of eight positions, 45 degrees apart.

- While `enable` is high, the ring moves one position on every clock edge.
- With `gin = 1` it moves to the next position (+1, clockwise). With `gin = 0` it moves to the previous one (−1, anticlockwise).
- While `enable` is low, the ring is cleared to 0 and the angle output is forced to 0.

The step is picked by a Fredkin multiplexer: +1 is `001` and −1 is `111`. A
reversible adder then adds it to the ring.

So eight clocks make one carrier period, and the carrier frequency is
f_clk / 8. A second reversible adder adds the symbol's phase state to the
ring position, modulo 8. That sum is the instantaneous phase of a
phase-modulated carrier:

    angle(t) = 45° · ((±t + 2·dibit) mod 8)
    qpsk_wave(t) = round(127 · sin(angle(t)))

Changing `gin` reverses the carrier's rotation, which is the conjugate
carrier. It does not reverse the symbol phases. `gout` is `gin` returned
through the pass-through output of a Feynman gate: the garbage line that lets
the direction be recovered from the outputs. In the top it is simply a copy
of `gin`.

The angle leaves `qpsk_wave_gen` as a 10-bit two's-complement number of whole
degrees (0, 45, …, 315). `wave_sample_gen` compares it with the eight ring
angles. It also accepts the negative equivalents −45 … −315. It outputs

    0, 90, 127, 90, 0, −90, −127, −90   (for 0°, 45°, …, 315°)

127·sin 45° = 89.8 rounds to 90. Any other angle gives 0. A sine is used
rather than a cosine, so the idle angle 0 gives an output of exactly
`00000000`.

## Data controller timing

The controller is a four-state machine: `INITIAL`, `DATA_OUT`, `WAIT` and `HALT`.

1. In `INITIAL` it waits for `start = 1`. On the clock edge that samples `start` high, it captures `data_in` and moves to `DATA_OUT`. Note that `start` is treated as a trigger. The original flow chart's start condition reads "Start=LSB", which is unclear. One could read it as requiring `start` to equal `data_in[0]`, but this design does not.
2. `DATA_OUT` lasts one cycle. It shows the current dibit and clears the wait counter.
3. `WAIT` holds the dibit while the Toffoli counter counts. After `SYMBOL_CYCLES` cycles in total, the FSM returns to `DATA_OUT` for the next dibit. After the fourth dibit it goes to `HALT`.
4. `HALT` goes back to `INITIAL` once `start` is low. A `start` held high therefore sends the word only once.

Dibits go out least-significant pair first: `data_in[1:0]`, `[3:2]`, `[5:4]`, `[7:6]`.

The current dibit is picked from the captured word by a 4:1 tree of Fredkin
multiplexers. A last Fredkin multiplexer forces `data_out` to `00` while
`enable` is low.

`enable` is high for exactly 4 × `SYMBOL_CYCLES` cycles. It rises on the edge
that samples `start`. With the default `SYMBOL_CYCLES = 8`, each symbol is
exactly one carrier period, and a word takes 32 clocks. Sample n of symbol j
appears on `qpsk_wave` j·8 + n cycles after the start edge. There is no
pipeline delay, because the encoder and the sample generator are
combinational.

Example: with `gin = 1`, the word `00100100` is sent as the dibits 00, 01, 10, 00. The output is:

| symbol | samples |
|---|---|
| 1 | 0 90 127 90 0 −90 −127 −90 |
| 2 | 127 90 0 −90 −127 −90 0 90 |
| 3 | 0 −90 −127 −90 0 90 127 90 |
| 4 | same as symbol 1 |

After that the output returns to 0.

## Ports of `qpsk_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | asynchronous reset, active high |
| `start` | in | 1 | start sending `data_in` (sampled while idle) |
| `data_in` | in | 8 | word to send |
| `gin` | in | 1 | ring direction: 1 clockwise, 0 anticlockwise |
| `gout` | out | 1 | garbage output (copy of `gin`) |
| `qpsk_wave` | out | 8 | signed sample, 0 while idle |

Parameter: `SYMBOL_CYCLES` (default 8, at least 2) is the number of clocks per
symbol. Use a multiple of 8 to keep a whole number of carrier periods in each
symbol.

## How far to trust it, and where it departs from the original description

The block chain is taken from the original description of this modulator, and
so is the port list: 8-bit input, 2-bit dibit, 3-bit state, 10-bit signed
degree, 8-bit sample, start, enable, gin and gout. The following are also
taken from it:

- the three gate equations;
- the four controller states;
- the eight 45° ring states and the gin direction rule;
- the use of a reversible multiplexer for data selection and for the encoder, and of a Toffoli counter for the wait time.

The following are this design's own choices. The description gives only
their function, or nothing:

- the controller's transitions and its LSB-first order;
- the symbol period of 8 clocks;
- stepping the ring once per clock and adding the symbol state to it;
- what gout carries;
- the sine mapping and its amplitude of 127;
- the reset style (asynchronous);
- the internal structure of the counter, the multiplexer and the adder.

Known differences:

- **State codes.** The original symbol table gives the states 0, 3, 5, 7 and, in the same rows, the phases 0°, 90°, 180°, 270°. On the eight-state ring, the states 3, 5 and 7 are 135°, 225° and 315°. This design follows the phases, so it uses the states 0, 2, 4, 6. The table is the `STATE_TABLE` parameter of `data_state_encoder` and can be changed.
- **Reported output.** The original reports the value `01010011` (83) in the output stream for the word `00100100`. This design never produces that value, because its samples are 0, ±90 and ±127. The original angle-to-sample mapping is not known.
- **Resources.** The original reports 5 registers and 12 I/O pins for its reversible version. This design has 20 flip-flops: an 8-bit word buffer, a 3-bit counter, a 3-bit ring, a 2-bit FSM state and a 2-bit dibit index. It has 21 I/O bits. The reported clock rates (about 356 MHz against 298 MHz for a conventional version) were not evaluated.
- The conventional (non-reversible) modulator that the original compares against is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Gates** (`tb_feynman_gate`, `tb_toffoli_gate`, `tb_fredkin_gate`): exhaustive truth tables. The Fredkin test also checks that the gate is a permutation.
- **`tb_rev_mux2`**: all 128 input combinations at width 3.
- **`tb_toffoli_counter`**: random enable and clear against a reference count, including wrap-around.
- **`tb_data_state_encoder`**: the default table, plus a second instance with a different table.
- **`tb_wave_sample_gen`**: every one of the 1024 input angles against `$sin`.
- **`tb_qpsk_wave_gen`**: random enable, gin and state against a reference ring. Checks both directions and both wraps.
- **`tb_data_controller`**: random words through instances with 8- and 3-cycle symbols. Checks every cycle of `enable` and `data_out`, and that a held `start` does not resend the word.
- **`tb_qpsk_top`**: the top at its default parameters, end to end.
  - It sends `00100100` with both ring directions, a word with all four phases, and 30 random words. In some of them `gin` changes every cycle.
  - It compares every output sample with 127·sin(45°·(carrier + 2·dibit)), computed independently.
  - It checks that each word is active for exactly 32 cycles and that the output is 0 while idle.
  - It counts clockwise and anticlockwise steps, each of the four phases, idle cycles and held starts, and fails if any of them never happened.
- **`tb_qpsk_top_sym16`, `tb_qpsk_top_sym3`**: the same end-to-end test with symbol periods of 16 and 3 clocks. With 16, a symbol lasts two carrier periods. With 3, symbol boundaries fall at other ring positions.

Assertions check that `data_out` and `qpsk_wave` are zero whenever `enable` is low.

To simulate with Verilator (version 5):

```
verilator --binary --timing --assert -Wno-fatal rtl/qpsk_pkg.sv rtl/*.sv tb/tb_qpsk_top.sv --top-module tb_qpsk_top
./obj_dir/Vtb_qpsk_top
```

Use `tb/tb_<module>.sv` and `--top-module tb_<module>` to test a single block.
The package file must come first on the command line.
