# Reprogrammable channel filtering in front of a base-station receiver

A TETRA/TEDS base-station receiver normally selects its channels with fixed
analog band-pass filters, so where a carrier may sit in the band is decided when
the board is built. This design moves that job into an FPGA: a 24-bit
delta-sigma ADC digitises the band at 3.78 Msamples/s. Two long, linear-phase
FIR band-pass filters run in the FPGA, one per carrier, and their outputs are
added. Changing a channel then only means loading new coefficients.

For evaluation, the filtered stream is stored in an external 32 MB SDRAM. A PC
reads it back over USB. The RTL here covers everything between the ADC's serial
pins and the SDRAM controller and USB endpoints.

```
 ADC serial ─► adc_rx ─► source select ─► sym_fir_filter ×2 ─► Σ ─► capture_ctrl
 (sclk)        24 bit    ADC/impulse/1     (8 mult × 24 cyc)         │ 64 bit
                 │                                                    ▼
          minmax_tracker                         FIFO IN (64 in, 16 out, 2048 words)
                                                                      │ sdram_clk
                           sdram_negotiator ◄──── page commands ────► SDRAM controller
                                                                      │ (external)
          transfer_ctrl (mode A/B, status) ◄─ USB triggers            ▼
                                                 FIFO OUT (16/16, 2048 words) ─► USB pipe
```

## The filter: one multiplier bank, reused every cycle of a sample

The key constraint is multipliers. The chosen filters have order 383, so they
have 384 taps. A fully parallel filter would need 384 multipliers per carrier,
but the target FPGA has only 32. Two ideas bring the number down.

**Symmetric folding.** A linear-phase FIR of odd order L has mirrored
coefficients, so pairs of delayed samples share one coefficient:

    y(n) = Σ_{k=0}^{T-1} f[k] · ( x(n-k) + x(n-L+k) ),   L = 2T − 1

First the two samples are added (the *tapsum*), then the sum is multiplied
once. This halves the multiplications to T = 192.

**Time sharing.** The ADC delivers one bit per shift-clock cycle and a sample
every 24 cycles. The filter runs on that same shift clock (about 90 MHz), so
it has 24 cycles per sample. With `MULTS` multipliers and `CYCLES` = 24 cycles,
`T = MULTS × CYCLES`. Eight multipliers give T = 192, which is order 383.
`MULTS` may be any even number; 12 gives order 575.

In cycle c of a sample pass, lane m computes

    f[c·MULTS + m] · ( x(n − c·MULTS − m) + x(n − L + c·MULTS + m) )

The coefficient memory (`fir_coef_mem`) holds one word per cycle, and each word
holds the `MULTS` coefficients of that cycle side by side. One word is read
per clock.

The datapath (`sym_fir_filter`) has six registered steps:

| step | work |
|------|------|
| 1 | select the two samples per lane from the 384-entry delay line and add them; read coefficient word c |
| 2 | `MULTS` 18×18 signed products |
| 3 | first adder-tree level: product[m] + product[m + MULTS/2] |
| 4 | sum of the remaining MULTS/2 values |
| 5 | accumulate the 24 per-cycle sums of one sample |
| 6 | register the result, shifted left by `FRAC_SHIFT` |

Nothing is rounded. The 17-bit input, 18-bit tapsum and 18-bit coefficients
give 36-bit products and a 45-bit accumulator. The result is sign-extended to
64 bits.

`FRAC_SHIFT` exists because filters designed separately usually have their
coefficients scaled to different radix points. Each filter's output is shifted
so the two binary points line up before they are added. At the top these are
`SHIFT_A` and `SHIFT_B`.

**Timing.**
- A one-cycle `new_data` strobe shifts the sample into the delay line and
  starts a pass of `CYCLES` cycles.
- `result_ready` follows `CYCLES + 5` clock edges later. That is 29 cycles,
  about 320 ns at 90.7 MHz: one sample period plus the adder pipeline.
- Passes overlap: while steps 3–6 finish one sample, step 1 already works on
  the next.
- A sample that arrives before the current pass ends restarts the pass. It
  also sets the sticky `overrun` flag.

The filter input is the top 17 bits of the ADC word. In this mode the ADC
does not drive the LSB, so only 23 bits carry information, and the multiplier
needs one bit of headroom for the tapsum.

## Receiving the ADC stream

`adc_rx` runs on the ADC's own shift clock. The ADC marks the first 2–4
cycles of each 24-cycle frame with DRDY and sends the word MSB first.

The receiver is a five-state machine: init → skip → idle → sample → data.
- It discards the first frame after reset, or after it loses sync, because
  the converter's first result is not trustworthy.
- It shifts in bits 23..1 and ignores the undriven LSB.
- At the frame boundary it publishes the word for a full frame with a
  one-cycle `sample_valid` strobe.
- If DRDY does not return right on time, it falls back to init and pulses
  `resync`.

`minmax_tracker` keeps the signed extremes of all received words.
`impulse_gen` is an on-board test source. It emits a single "1" on sample
4096 after reset (counting from zero), so the stored output is the filter's impulse
response. A constant-1 source gives the step response. The `src_sel` input
chooses among ADC data, impulse and constant. With `store_raw` high, the
capture path stores the unfiltered ADC samples instead, sign-extended to 64
bits, one per sample period.

## Capture, SDRAM pages and the two transfer modes

- **Write mode (A).** `capture_ctrl` waits 4000 cycles after reset for the
  SDRAM to come up. It then writes every filter result (the 64-bit sum) into
  FIFO IN, until 2^22 results (32 MB) have been stored. The results arrive
  at 3.75 MHz, which is 15 M 16-bit words/s on FIFO IN's read side.
- **Page negotiation.** The SDRAM side runs at 100 MHz in 512-word pages.
  `sdram_negotiator` is a four-state machine (idle, write-ack wait, read-ack
  wait, busy).
  - In write mode it issues a page write as soon as FIFO IN holds a whole
    page.
  - In read mode it issues a page read as soon as FIFO OUT has room for a
    whole page.
  - It holds the command until the controller acknowledges, advances that
    direction's own row pointer, and waits for done.
  - Reads and writes are never mixed.
- **Read mode (B).** The PC switches modes with two USB trigger bits. In
  read mode, pages flow from row 0 upward into FIFO OUT, and the PC drains
  FIFO OUT through a 16-bit pipe at 48 MHz. Each 64-bit result arrives as
  four words, most significant first.
- **Status word.** `transfer_ctrl` holds the mode and builds a 24-bit status
  word for the PC: `{0, row address[14:0], 8'h0A or 8'h0B}`. Printed in hex,
  the last two digits show the state letter, A or B.
- **Buttons.** Holding one push-button alone replaces the status word by the
  minimum (left) or maximum (right) ADC sample. Holding both resets the
  design.

Both FIFOs (`async_fifo`) are dual-clock with Gray-coded pointers. FIFO IN's
write port is four read words wide. Its write pointer counts whole write
entries, so its Gray code stays single-bit even though it advances four read
words at a time.

`fifo_faults` keeps four sticky alarms, one for each FIFO misuse. Each alarm
is clocked in the domain of the access it watches:
- write to a full FIFO IN;
- read from an empty FIFO IN;
- write to a full FIFO OUT;
- read from an empty FIFO OUT.

A healthy run never raises any of them. One LED shows whether any alarm is
set.

## Clocks, resets and pins

| clock | rate | used by |
|-------|------|---------|
| `sclk` | 90 MHz (3 × 30 MHz ADC clock, generated by the ADC) | receiver, filters, capture, FIFO IN write side |
| `sdram_clk` | 100 MHz | negotiator, FIFO IN read, FIFO OUT write |
| `ti_clk` | 48 MHz (USB interface) | mode machine, FIFO OUT read |

The button reset enters each domain through its own reset bridge: assertion is
asynchronous, release is synchronised. The mode enables and the row address
cross domains through two-flip-flop synchronisers. The row address only feeds
the status display.

The ADC control pins are driven constant:
- not powered down;
- internal shift clock;
- LVDS outputs;
- wide-bandwidth filter path with the low-latency configuration pin high;
- data-rate code `101`;
- chip selected;
- START = not reset, i.e. converting continuously.

LEDs:
- 0–2 blink from dividers of the three clocks.
- 3 shows "no FIFO alarm".
- 4–7 show FIFO IN not empty / not full and FIFO OUT not empty / not full.

## What is outside the RTL

These parts are reached through top-level ports:
- **ADC, LVDS input buffers and board PLL/clock manager.** They are analog
  parts or FPGA primitives. `drdy`, `dout` and the three clocks enter as
  plain inputs.
- **SDRAM controller.** It is a vendor example design. The top brings out its
  page command handshake (`cmd_pagewrite`/`cmd_pageread`, `rowaddr`,
  `cmd_ack`, `cmd_done`) and its FIFO-side strobes.
- **USB host interface.** It is vendor IP. The top brings out the two
  trigger bits, the pipe read strobe and data, and the 24-bit `hi_data` value
  that the PC reads through two 16-bit registers.
- **Coefficient source.** The downstream DSP was meant to supply
  coefficients. It gets a plain write port instead: `coef_we`, `coef_sel`
  (which filter), `coef_addr` (cycle word), `coef_lane` and `coef_data`.
  Coefficient k goes to word k / MULTS, lane k mod MULTS.

## Where this design departs from the original system

- **Coefficients are in RAM.** The original used ROMs with hard-coded
  coefficients and named rewritable memory as the next step. Memory contents
  reset to zero, so coefficients must be loaded before results mean
  anything.
- **Test source and raw storage.** The original chose the filter input, and
  whether filtered or raw data is stored, by rebuilding the FPGA; here
  `src_sel` and `store_raw` choose them at run time.
- **Stage contents and overrun.** The contents of pipeline steps 1–5, the
  `overrun` flag, the exact bit-sampling edges of the receiver, the ADC
  `resync` strobe, the handshake details and the write priority of the
  negotiator are this design's own choices.
- **Capture only in mode A.** Capture writes only in write mode, so nothing
  piles up in FIFO IN while the PC reads. The counter does not restart
  without a reset.
- **Button and LED assignment.** Which button shows the minimum, and the LED
  assignment, are this design's own choices.
- **Status word in mode B.** In read mode, the status word shows the row most
  recently commanded.

## Sizes the design holds

- **Single or dual carrier.** At the defaults, one or two order-383 filters
  fit: 192 coefficient pairs each.
- **Higher orders.** Order 417 (209 pairs) needs `MULTS = 10`. Order 600
  (301 pairs) and order 724 (363 pairs) exceed the largest configuration,
  which is order 575.
- **Capture.** A full capture is 2^22 results × 8 bytes = 32 MB, exactly the
  15-bit row space of 512-word pages. A typical read-out of 16384 results
  (128 kB) is 256 pages.

## Simulating

Every module in `rtl/` except the two synchroniser helpers (`bit_sync`,
`reset_sync`) has a self-checking testbench `tb/tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpp_top \
    rtl/fpp_pkg.sv $(ls rtl/*.sv | grep -v fpp_pkg) tb/*.sv
./obj_dir/Vtb_fpp_top
```

**Block testbenches.**
- The filter test runs at full size (order 383). It checks the impulse
  response (coefficients forward, the centre one twice, then backward), 300
  random full-scale samples against a direct evaluation of the folded sum,
  the 29-cycle latency, the output shift and the overrun flag.
- `tb_fir_order417` runs the minimum-order (417) channel filter in the
  largest configuration (12 multipliers, order 575). Its 209 coefficient
  pairs follow 79 zero pairs.
- The FIFO test covers both widths with random traffic in unrelated clocks.

**End-to-end testbenches.** Both use behavioural models of the ADC
(`adc_model`) and of the SDRAM controller (`sdram_ctrl_model`), with the
checks in `fpp_top_env`.

`tb_fpp_top` runs at reduced size: order 95, 64-word pages, 2^9 results,
the impulse at sample 64, fast LEDs. In one run it:
- loads coefficients;
- feeds ADC data (storing 16 of the samples raw), then the impulse, then
  ADC data with a pause in the stream (forcing a resync), then the step;
- fills the SDRAM to the capture limit;
- switches to read mode and reads everything back through the pipe;
- compares every result with a reference model;
- switches back, provokes the FIFO-OUT-empty alarm, and checks the min/max
  buttons, status word and LEDs.

It counts each of these mechanisms and fails if one never happened.

`tb_fpp_top_full` runs the same environment with every parameter at its
default: two order-383 filters, 512-word pages, 2048-word FIFOs, the 4000-cycle
wait and the impulse at sample 4096. It stores and reads back 40 pages
(5120 results), covering the impulse and step responses. It takes a few
seconds. The 2^22-result limit and the 0.5 s LED dividers are only reached in
the reduced test.

## Trust and limits

- **Verification scope.** Everything is verified in simulation only, against
  independent reference models. The design has not been run on hardware.
- **Unchecked interfaces.** The behaviour of the SDRAM controller and USB
  interface is modelled, not checked against the vendor parts. Their
  handshakes should be verified before connecting real IP.
- **Row address crossing.** The row-address synchroniser is safe only
  because the value is informational.
- **Filter input rate.** The filter assumes samples no faster than one per
  `CYCLES` clocks; a faster stream shows up as `overrun`.
