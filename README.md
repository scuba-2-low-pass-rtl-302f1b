# Per-row low-pass filter for SCUBA-2 first-stage feedback

In a SCUBA-2 multichannel readout (MCE) column, the first-stage feedback
calculation produces one feedback value per detector row per frame. With a
50 MHz clock, 100 clocks per row and 41 rows, every row is sampled at
50 MHz / (100 · 41) ≈ 12195 Hz. Before those values are read out over the
wishbone bus they are low-pass filtered, one filter per row. This RTL
implements that filter: a 4-pole Butterworth low-pass with a 100 Hz cut-off,
built as two second-order sections in series, time-shared across all rows of a
column.

Time-sharing works because the only per-row state of a second-order section is
its two most recent interim values. That state lives in small RAMs indexed by
row. The arithmetic exists once per section and is applied to whichever row
has just delivered a sample.

## Data path

```
fsfb_i ──>>>11──► x (18 b) ──► section 1 ──► y1 (31 b) ──>>>11──► x2 (20 b) ──► section 2 ──► y (31 b → 32 b)
                                  ▲ │                                              ▲ │
                         w_{n-1},w_{n-2} w_n                              w_{n-1},w_{n-2} w_n
                                  │ ▼                                              │ ▼
                         fsfb_filter_regs #1                              fsfb_filter_regs #2
                                                                                        │
                                                     fsfb_fltr_queue (64 x 32) ◄────────┘ y, row
                                                              │
                                    fsfb_fltr_rd_align ◄──────┘  ──► rd_dat_o, rd_row_o, rd_valid_o
```

### One section (`fsfb_fltr_biquad`)

Each section is a direct-form-II biquad with transfer function

    H(z) = (1 + 2 z^-1 + z^-2) / (1 + b1 z^-1 + b2 z^-2)

It keeps one delay line, w, and computes for every new sample

    w_n = x_n − (b1 · w_{n-1} + b2 · w_{n-2}) / 2^14
    y_n = w_n + 2 · w_{n-1} + w_{n-2}

The numerator of a Butterworth low-pass section is always 1, 2, 1, so y_n
needs only a shift and two adders. The only multipliers are the two in the
feedback term.

| section | b1                   | b2                  | stored \|b1\| | stored \|b2\| |
|---------|----------------------|---------------------|-------------|-------------|
| 1       | −1.9587428340882587  | 0.96134553442399129 | 32092       | 15750       |
| 2       | −1.9066292518523014  | 0.90916270571237567 | 31238       | 14895       |

### Fixed-point format: read this before changing a number

* **Coefficients** are 15 bits with 14 fraction bits (format 1.14). A signed
  15-bit 1.14 number cannot hold −1.96, so the coefficient ports carry the
  **magnitudes** |b1| and |b2| as unsigned numbers. The section's datapath
  fixes the signs: it computes `w_temp = |b2|·w_{n-2} − |b1|·w_{n-1}`. Every
  Butterworth low-pass section has b1 < 0 < b2, so no generality is lost. A
  filter with other signs would need a 16-bit signed coefficient.
* The stored values are the coefficients × 2^14, **truncated** towards zero.
  This matters. The poles lie within about 0.02 of z = 1, and the DC gain of
  a section, 4·2^14 / (2^14 − |b1| + |b2|), depends on a difference of 42 or
  41 LSBs. Truncation gives a chain gain of 1216 (measured 1216.6). Rounding
  would give about 1161. The unquantized filter would give 1184.
* **Division by 2^14** is an arithmetic right shift, which rounds towards
  minus infinity.
* **w** is 29 bits (`FLTR_DLY_WIDTH`). There is no saturation logic: w wraps
  on overflow. Overflow is avoided by scaling. The input is at most 18 bits
  and a section's w has a DC gain of about 390 (2^8.6). The output of section
  1 is divided by 2^11 before section 2, so both sections keep w below 2^26
  for any in-range DC input.
* **Scaling.** The feedback value is shifted right by 11 on entry, giving the
  18-bit x. The section-1 output is shifted right by 11 (the factor k3 = 2^11)
  before section 2. The per-section gains 1/k1 and 1/k2 (≈ 1/1537, 1/1579)
  are not applied. The filter output is therefore the low-passed input
  multiplied by about 1216.
* **y** of a section is 31 bits, enough for w_n + 2w_{n-1} + w_{n-2}. The
  final value is sign-extended to the 32-bit queue width.

Measured at the default sizes (`tb_fsfb_fltr`):

| input                  | gain                                               |
|------------------------|----------------------------------------------------|
| DC                     | 1216.6 (for +1000), 1217.9 (for −50000)            |
| 100 Hz sine            | 837, 0.69 of the DC gain; ideal −3 dB is 0.707     |
| 2 kHz sine             | 0.023; the ideal 4th-order roll-off is ≈ 1216/20^4 |

## Per-row history (`fsfb_filter_regs`)

Each section owns two single-port RAMs of 64 words × 29 bits, one word per
row. RAM 1 holds w_{n-1} and RAM 2 holds w_{n-2}. Both RAMs share the address
and the write enable. RAM 1 is written with the new w_n. RAM 2 is written
with RAM 1's output. The RAMs read before they write, so a single write
pulse shifts the row's history by one sample.

`initialize_window_i` resets the filter. While it is high:

* RAM 1's data input is forced to zero.
* RAM 1's output (w_{n-1}, which is also RAM 2's data input) is forced to
  zero.

Every row processed while the window is open therefore ends with a cleared
history. The RAMs have no other reset, so after power-up one full frame must
be processed with the window open. w_{n-2} is not masked during the window,
so the outputs computed in that frame are not a clean filter response.

## Result queue and frame-aligned read-out

`fsfb_fltr_queue` is a 64 × 32 two-port RAM with registers on all inputs and
on its output. A read returns data two cycles after the address. The filter
writes each row's latest output into it. The queue is not double-buffered,
which keeps it small. The cost is that a read-out started mid-frame would mix
rows of two frames.

`fsfb_fltr_rd_align` prevents this. A read request (one-cycle pulse) is held
until the next `frame_start_i`. The block then reads rows 0 … 40 on
consecutive cycles. The words appear on `rd_dat_o` with their row number,
starting three cycles after the frame start. The read-out takes one cycle per
row while samples arrive 100 cycles apart, so it stays ahead of the filter.
Every word comes from the previous frame, provided row r's sample of the new
frame arrives no earlier than r − 2 cycles after the frame start. Timing of
requests:

* A request made on the frame-start cycle starts at once.
* A request made during a read-out is served at the following frame.

## Timing of one row (`fsfb_fltr`)

A `calc_valid_i` pulse with `row_addr_i` and `fsfb_i` starts a four-cycle pass:

| cycle | state  | action                                                          |
|-------|--------|-----------------------------------------------------------------|
| 0     | IDLE   | row and x = fsfb_i >>> 11 registered                            |
| 1     | READ   | the history RAMs of both sections read the row                  |
| 2     | ST1    | section 1 evaluated; its history written; x2 = y1 >>> 11 registered |
| 3     | ST2    | section 2 evaluated; its history written; y sent to the queue   |
| 4     | –      | `y_o`, `y_row_o`, `y_valid_o`                                   |

`busy_o` is high during cycles 1–3. A `calc_valid_i` during a pass is a usage
error, and an assertion flags it. At 100 clocks per row it cannot happen.
Each section is evaluated in a single cycle: a 15 × 29 multiply-add followed
by an add. Whether that meets timing depends on the target. If it does not,
the FSM has room for more pipeline stages.

## Top-level interface (`fsfb_fltr`)

| port                  | dir | width | meaning                                           |
|-----------------------|-----|-------|---------------------------------------------------|
| `clk_i`, `rst_i`      | in  | 1     | clock, synchronous reset (control logic only)     |
| `calc_valid_i`        | in  | 1     | one pulse per row sample                          |
| `row_addr_i`          | in  | 6     | row of the sample                                 |
| `fsfb_i`              | in  | 29    | signed feedback value, before the 2^-11 scaling   |
| `initialize_window_i` | in  | 1     | level; clears the history of rows processed       |
| `frame_start_i`       | in  | 1     | pulse at the start of every frame                 |
| `y_o`, `y_row_o`, `y_valid_o` | out | 32, 6, 1 | filtered value of the row just processed |
| `busy_o`              | out | 1     | a pass is running                                 |
| `rd_req_i`            | in  | 1     | read request from the bus side                    |
| `rd_dat_o`, `rd_row_o`, `rd_valid_o`, `rd_done_o` | out | 32, 6, 1, 1 | read-out stream |
| `rd_pending_o`        | out | 1     | a request is waiting for a frame start            |

Parameters are `FSFB_WIDTH` (29), `NUM_WORDS` (64) and `NUM_ROWS` (41).
Widths, coefficients and shifts are in `fsfb_fltr_pkg`.

## What follows the original design and what does not

These follow the SCUBA-2 filter design note:

* the filter type, order, cut-off and sample rate;
* the two-section direct-form-II structure and its equations;
* the coefficient values and widths, the 29-bit w, 18-bit input and 32-bit
  output;
* the 2^-11 input scaling and the 2^11 scaling between sections;
* the two 64-word history RAMs per section and their wiring;
* the initialize-window reset;
* the registered 64 × 32 queue;
* starting reads at the next frame.

These are choices of this implementation:

* Coefficient handling: magnitudes with signs fixed in the datapath, and
  truncation. Truncation was chosen because it reproduces the note's
  simulated gain of 1216.
* Floor rounding and wrap-around instead of saturation.
* The 29-bit width of the incoming feedback value.
* The four-cycle sequencing FSM and all handshakes.
* The polarity of the initialize multiplexers.
* Read-before-write RAMs.
* The behaviour of requests made during a read-out.

In the original system the filter sits inside the first-stage feedback
calculation block and shares that block's multipliers. Here it stands alone
with its own four multipliers. The feedback calculation and the wishbone
frame-data slave are not included: their signals are the top's ports. The
wishbone protocol is reduced to a one-cycle request and a stream of words.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test runs 1000
frames at full size in about two seconds:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/fsfb_fltr_pkg.sv tb/tb_fsfb_fltr.sv --top-module tb_fsfb_fltr
./obj_dir/Vtb_fsfb_fltr +verilator+rand+reset+2
```

The unit testbenches work the same way: `tb_fsfb_fltr_biquad`,
`tb_fsfb_filter_regs`, `tb_fsfb_fltr_queue` and `tb_fsfb_fltr_rd_align`.

`tb_fsfb_fltr` compares every output, and every word read out, against a
64-bit integer model of the two sections. It checks the gains listed above.
It makes each of these happen at least once:

* the initialize window, at power-up and again later;
* a read deferred to a frame start;
* a read started on a frame start;
* a read held during a read-out.

To change the filter, edit the coefficient constants in `fsfb_fltr_pkg`. Then
update the gain limits in `tb_fsfb_fltr` and the coefficients in its model
(`section()`).
