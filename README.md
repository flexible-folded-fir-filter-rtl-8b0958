# Flexible folded bit-plane FIR filter

A single, fixed-size hardware array that can run FIR filters of different
shapes: few long coefficients or many short ones, and fast or slow. The
number of coefficients `k_c`, the coefficient length `m_c` (in bits) and the
folding factor `N` are set at run time. The only rule is

    k_c * m_c = K * N

where `K` is the number of processing sections built into the array (8 by
default). The filter computes

    y[n] = sum_{i=0}^{k_c-1} c_i * x[n-i]

and produces one output every `N` clock cycles. A small `N` gives high
throughput with short or few coefficients. A large `N` gives a long filter at
lower throughput. The hardware does not change.

The design is a folded *bit-plane* array. The filter is split into one-bit
multiply-accumulate steps. Those steps are time-multiplexed over a ring of
`K` identical rows of AND gates and full adders.

## 1. Operations: the filter as a chain of one-bit steps

Multiplying a data word by a coefficient bit takes only AND gates. Call one such
multiply, plus adding its product into the running result, an *operation*. An
output sample needs `L = k_c * m_c` operations, one per coefficient bit. They
run as a chain in this order:

| operation p                  | coefficient bit  | data word |
|------------------------------|------------------|-----------|
| 0 .. m_c-1                   | c_{k_c-1}, bits 0 .. m_c-1 | x[w]      |
| m_c .. 2m_c-1                | c_{k_c-2}, bits 0 .. m_c-1 | x[w+1]    |
| ...                          | ...              | ...       |
| (k_c-1)m_c .. L-1            | c_0, bits 0 .. m_c-1       | x[w+k_c-1]|

In general, operation `p = m_c*(k_c-1-i) + j` multiplies by bit `j` of
coefficient `c_i`. The chain that starts with sample `x[w]` therefore ends
with `y[w+k_c-1]`. One pass through the chain is called a *wave* below.

Within one coefficient, the data word doubles at every step. Operation `j` sees
`2^j * x`, so a one-bit product is added with the right weight. At the first
bit of the next coefficient, the data path is reloaded with the next, younger
sample at weight 1.

The running result is kept in carry-save form: a sum vector and a carry
vector. Each step is then one row of full adders with no carry propagation.
That row is one pipeline stage (`basic_cell`, `fir_section`). All arithmetic is
unsigned and modulo `2^YW` (27 bits by default). See section 6.

## 2. Folding the chain onto K sections

Operation `p` of every wave runs in section `S_{p mod K}`. A wave enters
`S_0`, then moves through `S_1 ... S_{K-1}` one section per clock. The sum,
carry and data words then fold from `S_{K-1}` back to `S_0`. The wave goes
round the ring `N` times (`L = K*N`) and leaves `S_{K-1}` finished. A new
wave starts in `S_0` every `N` cycles. Therefore about `K` waves are in
flight at once, and every section does useful work in every cycle.

**Collisions and the fold-path registers.** A new wave may only enter `S_0`
if no earlier wave is arriving there in the same cycle. The fold path from
`S_{K-1}` back to `S_0` can hold `e` extra register stages (0..`E_MAX`,
chosen at configuration). The ring is then `K + e` stages long. The waves that
enter `S_0` every `N` cycles use distinct ring slots if and only if

    gcd(K + e, N) = 1.

With this condition, the slot a wave leaves after its last operation reaches
`S_0` exactly when the next wave needs it.

- With `e = 0`, operation `p` of a wave runs `p` cycles after the wave starts.
  It always falls in time slot `p mod N` of its section. This is the plain
  folding and needs `K` and `N` to be coprime (for example `K = 3`, `N = 4`).
- With `K = 8` and `N = 16, 8, 4` (the main settings of this design), `K` and
  `N` share a factor. One extra register (`e = 1`, ring length 9) makes every
  power-of-two `N` legal. `N = 6` or `12` needs `e = 3`. `E_MAX = 3` covers
  every `N <= 16` for `K = 8`.

With `e` extra registers, operation `p` runs

    tau(p) = p + e * floor(p / K)

cycles after its wave started. Its section is still `p mod K`, and its time
slot within the `N`-cycle period is `tau(p) mod N`. Everything that
controls the array repeats every `N` cycles. So the controls are computed once,
during initialization, and then replayed by rotating storage.

The controller rejects any configuration that breaks these rules, and sets
`cfg_err`:

- `gcd(K+e, N) = 1`
- `k_c * m_c = K * N`
- `N <= N_MAX`
- `k_c <= K`

The limit `k_c <= K` keeps `m_c >= N`. That way each sample has arrived
before a wave needs it.

## 3. Coefficient bit supply (`cbsm`)

This module is a `K x N_MAX` array of bits. Row `s` feeds section `S_s`.
Row `s`, column `r` holds the coefficient bit of the operation that `S_s`
performs in slot `r`.

In **initialization mode**, the coefficient bits arrive one per clock, in
operation order:

- `c_{k_c-1}` first, least significant bit first;
- then `c_{k_c-2}`;
- and so on, ending with the MSB of `c_0`.

This takes `K*N` cycles. The controller (`fir_ctrl`) walks `p` with modulo
counters. It writes each bit straight to row `p mod K`, column
`tau(p) mod N`. Because `gcd(K+e, N) = 1`, the `K*N` bits fill the
`K x N` region exactly once.

In **run mode**, every row is a circular shift register over its first `N`
columns. Bits move one column to the left each cycle, and column 0 is the row
output.

## 4. Input data entering (`idem`)

A sample is accepted only in phase 0 of the `N`-cycle period (`x_ready`). It
is used at once by the new wave in `S_0`. It then enters a delay line of
`K + E_MAX` words.

A later wave needs that sample in whichever section and slot holds the first
bit of a coefficient. That position depends on `k_c`, `m_c`, `N` and `e`, but
it repeats every `N` cycles. So during initialization, each operation also
stores two values next to its coefficient bit, in per-section rotating rows:

- a *load* flag, set for the first bit of a coefficient;
- a *tap*, which says how many sample periods back the needed sample was
  accepted:

      tap = floor(tau(p) / N) - (k_c - 1 - i)

When the flag is set, the section takes `x = delay_line[tap]` instead of the
doubled word from its predecessor. In the acceptance cycle, tap 0 is the
sample on the input pins (bypass).

## 5. Final adder, latency and throughput (`final_adder`)

The carry-save result leaving `S_{K-1}` goes through a bit-level pipelined
ripple-carry adder. That adder has one stage per output bit (`YW = 27`
stages). It accepts a new operand pair every cycle.

- **Throughput:** one output per `N` cycles.
- **Latency,** from accepting `x[n]` to `y_valid` with `y[n]`:

      k_c*m_c - (k_c-1)*N + e*(N-1) + YW   cycles

  For two coefficients and `e = 0`, this is `2*m_c - N + YW`.

| N  | k_c | m_c | e | latency [clk] | y_valid every |
|----|-----|-----|---|---------------|---------------|
| 16 | 2   | 64  | 1 | 154           | 16            |
| 16 | 4   | 32  | 1 | 122           | 16            |
| 8  | 2   | 32  | 1 | 90            | 8             |
| 8  | 4   | 16  | 1 | 74            | 8             |
| 4  | 2   | 16  | 1 | 58            | 4             |
| 4  | 4   | 8   | 1 | 50            | 4             |

The first valid output after a configuration is `y[k_c-1]`, the first one
whose inputs are all real samples.

## 6. Arithmetic range

Data and coefficients are unsigned. The output word, the carry-save registers
and the data path are all `YW` bits wide. Results are exact modulo `2^YW`.
A full-precision result needs `XW + m_c + ceil(log2 k_c)` bits. With the
default 8-bit input and 27-bit output, that is guaranteed only for
`m_c <= 17` (k_c = 4) or `m_c <= 18` (k_c = 2). For longer coefficients, the
coefficient values must be small enough, or the top bits are lost. Widen `YW`
if that matters.

## 7. Using it

Ports of `ffir_top` (widths at the defaults):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_start` | in | 1 | pulse: latch `cfg_*` and start initialization |
| `cfg_n` | in | 5 | folding factor N, 1..16 |
| `cfg_kc` | in | 4 | number of coefficients, 1..8 |
| `cfg_mc` | in | 8 | coefficient length in bits, `8*N/k_c` |
| `cfg_wrap` | in | 2 | extra fold-path registers e, 0..3 |
| `cfg_err` | out | 1 | last configuration rejected (filter idle) |
| `mode` | out | 2 | `MODE_IDLE`, `MODE_INIT`, `MODE_RUN` (`ffir_pkg::mode_e`) |
| `cb_valid`, `cb_bit`, `cb_ready` | in/in/out | 1 | serial coefficient bits (section 3 order) |
| `x_valid`, `x_data`, `x_ready` | in/in/out | 1/8/1 | input samples, taken when both valid and ready |
| `y_valid`, `y_data` | out | 1/27 | one-cycle pulse with each output |

The usual sequence is:

1. Set the `cfg_*` inputs and pulse `cfg_start` for one cycle.
2. Hold `cb_valid` high and send `K*N` bits; gaps are allowed. `mode` then
   becomes `MODE_RUN`.
3. Offer samples. `x_ready` rises once every `N` cycles.

If no sample is offered while `x_ready` is high, the whole array **stalls**.
Sections, rotating rows and the phase counter all hold. No data is lost, but
outputs come later. To drain the last outputs, keep feeding samples (for
example, zeros). A new `cfg_start` at any time discards all work in flight and
starts a new initialization.

Parameters (all in `ffir_pkg`, overridable on `ffir_top`):

- `K = 8`: sections.
- `N_MAX = 16`: columns of the rotating rows, so the largest `N`.
- `XW = 8`: input width.
- `YW = 27`: output width and adder stages.
- `E_MAX = 3`: fold-path registers.

Any `K` works. Choose `E_MAX` so that for every `N` you want to run, some
`e <= E_MAX` gives `gcd(K+e, N) = 1`.

## 8. How this implementation relates to the original architecture

The following follow the original description of the folded bit-plane filter:

- the folding-set rule `s = p mod K`;
- the ring of sections with both paths folding from the last section to the
  first;
- the AND + full-adder rows;
- the coefficient bit supply module as a `K x N` array with initialization and
  run modes, whose rows rotate right to left;
- `K*N` initialization cycles;
- a final adder whose pipeline depth equals the output width;
- the default sizes (8 sections, N up to 16, 8-bit input, 27-bit output).

Where this design adds to it or departs from it:

- **Fold-path registers.** Plain folding (operation `p` in slot
  `p mod N`) only works when `K` and `N` are coprime. The optional extra
  registers make the 8-section, N = 16/8/4 settings work, at a cost of
  `e*(N-1)` cycles of latency. The original description states the latency as
  `2*m_c - N` plus the adder latency, for every setting. Here that holds only
  for `k_c = 2` with `e = 0`. The table in section 5 gives this design's
  figures. Throughput is unchanged.
- **Input data entering module.** Its purpose (supply each section with the
  right sample) is from the original description. The delay line with stored
  load flags and taps is this design's own.
- **LSB truncation.** The bit-plane family of arrays can drop low-order bits
  of intermediate results once they are final. This implementation does not:
  every section carries full `YW`-bit sum, carry and data words.
- **Storage type.** The original array uses latches. Here it uses flip-flops,
  and bits are written by address during initialization instead of being
  shifted into place.
- **This design's own choices:**
  - the handshakes, stall behaviour and configuration check;
  - the IDLE mode and reset behaviour;
  - carry-save registers between sections;
  - modulo-`2^YW` arithmetic and unsigned numbers.

## 9. Verification

Each block has a self-checking testbench in `tb/`. Each compares against values
computed independently in the testbench and ends with a `TB_RESULT` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_ffir_top` | Whole filter at the default size: the six (N, k_c, m_c) settings of the table in section 5, coprime settings with e = 0 (N = 3, 5, 1, 7), an `e = 3` setting, rejected configurations, reconfiguration and stalls. Checks every output value, the exact latency, the output spacing and the init length. It also counts that each mechanism happened. |
| `tb_ffir_fig3` | A 3-section array (`K = 3`, `N_MAX = 4`) running k_c = 2, m_c = 6, N = 4 with plain folding. Checks values and the `2*m_c - N + YW` latency. |
| `tb_folded_array` | The ring alone, driven from an independently computed schedule, with random stalls. |
| `tb_fir_ctrl` | Configuration acceptance against a gcd model, every initialization write, the run-mode phase, stall and last-operation signals. |
| `tb_cbsm`, `tb_idem` | Addressed writes and rotation for several N; tap selection including the bypass. |
| `tb_fir_section`, `tb_basic_cell`, `tb_final_adder` | Row arithmetic, flags and stall; the full-adder cell exhaustively; the adder's results and exact 27-cycle latency. |

To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl rtl/ffir_pkg.sv tb/tb_ffir_top.sv --top-module tb_ffir_top
    obj_dir/Vtb_ffir_top

Every testbench finishes in well under a second.

Files in `rtl/`:

- `ffir_pkg.sv`: defaults and mode type;
- `ffir_top.sv`: top level;
- `fir_ctrl.sv`: controller;
- `cbsm.sv`: coefficient bit supply;
- `idem.sv`: input data entering;
- `folded_array.sv`: ring of sections;
- `fir_section.sv`: one section;
- `basic_cell.sv`: AND + full adder;
- `final_adder.sv`: pipelined carry merge.
