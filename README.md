# Statistic-based mismatch calibration for a 4-channel, 5 GS/s time-interleaved ADC

A time-interleaved ADC (TIADC) reaches 5 GS/s by letting four 1.25 GS/s ADC
cores sample the same input in turn. The cores are never quite alike. Each
has its own offset and gain, and its sampling instant is slightly early or
late (timing skew). These mismatches add spurs to the spectrum at fs/4, at
fs/2 and at fs/4 ± f_in.

This RTL is the FPGA side of a data acquisition system that removes these
mismatches. It implements the method described in "A Statistic-Based
Calibration Method for TIADC System" (Yang, Tian, Ye, Zhang, Zheng). The
method needs no dedicated measurement hardware and no filters. It uses only
three running statistics of the sample stream, built from additions and
multiplications:

| mismatch    | statistic per channel k (N samples)                        | correction sent to the ADC                      |
|-------------|------------------------------------------------------------|-------------------------------------------------|
| offset      | mean of x_k                                                | offset DCW -= (mean_k - mean_0) / 0.2 LSB       |
| gain        | S_k = sum of abs(x_k - O_k)                                | gain DCW += (1 - S_k/S_0) / 0.14 %              |
| timing skew | P_k = sum of x_k[n] * x_{k+1}[n] (adjacent sampling instants) | phase DCW ± one 110 fs step per pass, iterated |

Corrections are not applied in the digital domain. The ADC (an EV8AQ160-class
part) has offset, gain and phase adjustment elements in every core. The FPGA
writes their digital control words (DCWs) over SPI. Calibration is therefore
a closed loop through the converter: measure, write DCWs, measure again.

## Why these statistics work

Assume a sine input. Channel k then delivers
x_k[n] = G_k·sin(w0·(4n + k + dt_k) + phi) + O_k.

* **Offset.** Over many samples the sine averages to zero, so the mean is O_k.
  Channel 0 is the reference. The offset error of channel k is
  mean_k − mean_0.
* **Gain.** The sum of |x_k − O_k| over many samples is proportional to the
  amplitude G_k. It does not depend on the phase of the sine, provided the
  samples are spread over the period. That holds unless f_in = fs/(4n). So
  S_k/S_0 is the gain of channel k relative to channel 0.
* **Timing.** After offset and gain are corrected, the mean product of two
  neighbouring samples is ½·G²·cos(w0·T), where T is the true interval
  between the two sampling instants. Cosine decreases on [0, π], so a larger
  product means a shorter interval. The product metric does not give the skew
  itself, but it shows in which direction each interval is wrong. That is all
  an iterative loop needs. The finite sum contains a residual term. This term
  does not average out when w0 = nπ/4, that is, at f_in = n·625 MHz. The
  method cannot work at those frequencies.

## The timing loop (cal_ctrl)

This is the least obvious part of the design. Let T_k be the interval from
channel k to channel k+1, and T_3 the interval from channel 3 to the next
sample of channel 0. Channel 0 never moves. Each step below is one full
measurement pass of N = 20000 samples per channel, followed by a DCW write.

1. **Equalise T_1 with T_0.** Compare P_1 (channels 1·2) with P_0 (channels
   0·1). If P_1 > P_0, T_1 is too short, so channel 2 moves later by one
   phase step. Otherwise channel 2 moves earlier. Repeat.
2. **Equalise T_2 with T_0** by moving channel 3 in the same way.
   T_0 = T_1 = T_2 now hold. Channel k sits k·δ away from its ideal instant,
   for some common δ.
3. **Close the last interval.** Compare P_3 (channel 3 and the next channel 0)
   with P_0. If P_3 > P_0, T_3 is too short and d = −1; otherwise d = +1.
   Move every channel k by k·d steps. This changes T_0, T_1 and T_2 by the
   same amount, so they stay equal, and T_3 changes by −3·d steps.

With whole DCW steps the metrics are rarely exactly equal. A stage therefore
ends in one of three cases:

* the two metrics are equal;
* the direction reverses, meaning the metric has crossed its reference and is
  within one step of it;
* after `MAX_ITER` = 511 steps. This case also sets the error flag.

A stage whose first comparison already shows a crossing costs no pass of its
own. The next stage reuses the same measurement.

Example with the default test mismatches (skews 0, 0.02, 0.03, −0.03 Ts). The
three stages take 24, 175 and 41 passes.

The whole sequence:

| pass(es)  | statistic used   | action                                                                  |
|-----------|------------------|-------------------------------------------------------------------------|
| 1         | sums             | offset DCWs of channels 1..3 −= round(5·(sum_k − sum_0)/N)               |
| 2         | sums             | O_k = round(16·sum_k/N), passed to the engine (4 fraction bits)          |
| 3         | absolute sums    | gain DCWs += round((S_0 − S_k)·5000 / (7·S_0))                           |
| 4 …       | products         | timing stages 1, 2, 3 as above, one phase step per pass                  |

After each batch of DCW writes, the sequencer waits until the SPI master is
idle and then another `SETTLE` = 64 clocks. Only then does it start the next
pass, so every pass sees the new settings.

Each pass works on a fresh record. The sequencer clears the four FIFOs and
lets them fill. When all are full, it starts the statistics engine and reads
the first N/2 + 1 words of every FIFO into it. The extra first word only
provides x_3[−1] for the wrap-around product. A pass therefore takes about
FIFO_DEPTH + N/2 clocks.

## Data path

```
            ┌──────────── FPGA (tiadc_cal_top, one clock: ADC data clock) ───────────┐
 ADC core k │ iddr_rx ──► 2 samples/clk ──► sample_fifo k (16384 × 16 bit) ─┬─────┐ │
 DDR 8 bit ─┤  (×4)                                                        │     │ │
            │                       stat_engine: Σx, Σ|x−O|, Σx·x'  ◄──────┘     │ │
            │                        ▲ start, record read │ results              │ │
            │                        │                    ▼                      ▼ │
            │  adc_spi_ctrl ◄── DCW requests ── cal_ctrl (+ seq_div) ◄──► dsp_if ◄─┼──► DSP bus, irq
 SPI to ADC ◄──┘                                                                   │
            └──────────────────────────────────────────────────────────────────────┘
```

* **iddr_rx.** Registers a core's DDR bus on both clock edges. On the next
  rising edge it hands over the pair: q[0] is the earlier sample x_k[2j] and
  q[1] is x_k[2j+1]. It inverts the MSB, turning offset binary into two's
  complement. Latency is one clock.
* **sample_fifo.** One block-RAM FIFO per channel, with synchronous read.
  A capture clears the four FIFOs and fills them in parallel. Once they are
  full, further samples are dropped. The FIFOs have two users. The DSP
  starts captures, gets an interrupt when they are full, and pops the
  words. The calibration sequencer captures one record per pass and streams
  it into the statistics engine. While a calibration runs, it owns the
  FIFOs.
* **stat_engine.** The adder/multiplier unit, the job DSP48E slices do in an
  FPGA. Per channel it keeps three 48-bit accumulators and adds 2 samples per
  clock. The wrap-around product pairs x_3[n−1] with x_0[n]. The first valid
  beat after `start` only loads x_3[−1]. A pass of N samples per channel ends
  with `done`, N/2 + 3 clocks after the edge that took `start` when data
  arrive every clock.
* **seq_div.** A shared signed divider for the few divisions per pass. It is
  a restoring divider, produces one bit per clock and rounds to nearest.
  Its 64-bit result arrives 67 clocks after `start`.
* **cal_ctrl.** The sequencer described above. It holds the 12 DCWs, which
  reset to mid-scale 512. While idle, it also forwards a DCW written by hand
  from the DSP.
* **adc_spi_ctrl.** Sends one SPI mode-0 frame per DCW, MSB first, at
  clk/8. From acceptance to `cs_n` rising takes 49·CLK_DIV clocks. The frame
  is 24 bits:
  `0 | address[6:0] = {001, kind[1:0], channel[1:0]} | data[15:0]`, with kind
  0 = offset, 1 = gain, 2 = phase.
* **dsp_if.** A synchronous register bus: 8-bit word address, 32-bit data,
  read data one clock after `dsp_rd`.

### Register map (dsp_if)

| addr        | access | content                                                                 |
|-------------|--------|-------------------------------------------------------------------------|
| 0x00        | W      | bit0 start calibration, bit1 start capture (both ignored while calibrating) |
| 0x01        | R      | bit0 cal busy, bit1 cal done*, bit2 cal error, bit3 capture active, bit4 capture done*, bits 8+k FIFO k full, bits 16+k FIFO k empty |
| 0x02        | RW     | bit0 receivers enabled (1 after reset)                                   |
| 0x03        | W      | write 1 to bit1 / bit4 to clear the sticky flags (*)                     |
| 0x04        | W      | hand-written DCW: bits 9:0 value, 17:16 channel, 21:20 kind (ignored while calibrating) |
| 0x08+k      | R      | pop FIFO k: {x_k[2j+1], x_k[2j]} in bits 15:0, two's complement (no pop while calibrating) |
| 0x10/14/18+k | R     | offset / gain / phase DCW of channel k                                   |
| 0x20/24/28+k | R     | sum / absolute sum / product sum of channel k (bits 31:0; wide enough for N = 20000) |
| 0x30+i      | R      | steps taken by timing stage i                                            |

`dsp_irq` is high while either sticky flag is set. After a calibration, the
skew estimate of channel k is its phase-DCW change × 110 fs. The sign is that
of the design's convention: a larger code samples later.

## Parameters

| parameter (top) | default | meaning                                                    | origin                          |
|-----------------|---------|------------------------------------------------------------|---------------------------------|
| `M_P`           | 4       | interleaved channels                                       | published system                |
| `DATA_W_P`      | 8       | sample width                                               | resolution of the EV8AQ160 class |
| `N_CAL_P`       | 20000   | samples per channel per statistic                          | published simulation            |
| `FIFO_DEPTH`    | 16384   | words (2 samples each) per channel FIFO; at least N/2 + 1 | this design                     |
| `SPI_DIV`       | 4       | SCLK = clk / (2·SPI_DIV)                                   | this design                     |
| `SETTLE`        | 64      | clocks between the last SPI frame and the next pass        | this design                     |
| `MAX_ITER`      | 511     | step limit per timing stage                                | this design                     |

The adjustment steps (0.2 LSB, 0.14 %, 110 fs) are those of the ADC. They
enter `tiadc_pkg` as the constants 5 and 5000/7. The DCWs are 10 bits wide,
which is this design's choice. The channel fields are 2 bits wide, so
`M_P` > 4 needs wider fields in `dcw_req_t` and in the SPI address.

## Where this design departs from, or adds to, the published system

* **The calibration sequence runs in FPGA logic** (`cal_ctrl`). In the
  published system, the DSP controls the system and the FPGA performs the
  additions and multiplications. Here the DSP only starts the calibration
  and reads the results.
* **Stopping rule.** Besides stopping on equal metrics, a timing stage stops
  when the direction reverses or after `MAX_ITER` steps. The equations
  require exact equality, which whole DCW steps rarely reach.
* **Which channel moves in timing stage 1.** The general update formula
  names channel k for the pair (k, k+1). The worked example of the method
  moves channel k+1, and so does this design. Moving channel k would also
  disturb the interval already equalised.
* **O_k for the gain statistic** is measured in a separate pass after the
  offset correction. It is kept with 4 fraction bits.
* **Gain element model.** One gain code is read as 0.14 % of the nominal
  gain, an additive step. With that model, one correction brings a 13 % gain
  error below 0.2 %.
* **Own choices.** The ADC's output coding (offset binary), the SPI frame
  and register addresses, the register bus, the FIFO depth, a single clock
  domain and the synchronous active-low reset. The real converter's SPI map
  comes from its data sheet; only `tiadc_pkg::dcw_addr` and the frame in
  `adc_spi_ctrl` would change.
* **Not in the RTL.** The ADC itself, the PLL and crystal, the analog front
  end and the DSP. The testbenches use a behavioural ADC model
  (`tb/ev8aq160_model.sv`). It has the published mismatch model: a gain,
  then an offset, then a skewed sampling instant, then an 8-bit quantiser.
  It also has DCW-controlled adjustment elements.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

| testbench            | what it establishes                                                                 |
|----------------------|-------------------------------------------------------------------------------------|
| tb_iddr_rx           | pairing of the two edges, code conversion, one-clock latency, enable                |
| tb_sample_fifo       | queue-model comparison with overflow, underflow, flags, count, clear                |
| tb_stat_engine       | all three sums against a reference model, wrap-around product, gaps in valid, latency |
| tb_seq_div           | rounding for both signs and exact halves, random operands, latency                  |
| tb_adc_spi_ctrl      | frame content and length at two clock dividers, back-to-back requests               |
| tb_dsp_if            | every register, the capture flow, interrupts, FIFO pops                             |
| tb_cal_ctrl          | exact offset and gain DCWs from the formulas, record capture and read-out per pass, closed loop against an arithmetic plant, iteration limit and error flag |
| tb_tiadc_cal_top     | full design at default sizes with the ADC model (see below)                          |
| tb_workload_sweep    | four copies of the design at 600 MHz / 20 dB, 600 MHz / 60 dB, 150 MHz / 45 dB, 350 MHz / 45 dB |

`tb_tiadc_cal_top` uses the default parameters and the mismatches of the
published simulation: offset 0, 0.5, 1.6, −2.2 LSB; gain 1, 1.06, 1.13,
0.91; skew 0, 0.02, 0.03, −0.03 Ts; a 600 MHz, 100 LSB sine at 45 dB SNR.
The testbench:

* writes and reads back a DCW;
* shows that nothing is captured while the receivers are off;
* captures a 131072-sample record and matches it word for word against the
  ADC's output;
* calibrates, checking that a capture request is ignored meanwhile and that
  every statistics pass ran on its own FIFO record;
* captures again.

Results:

* The largest mismatch spur falls from −26 dBc to −64 dBc.
* The residual offset is within 0.1 LSB, the residual gain within 0.1 %, and
  the residual skew within 3.5 phase steps (≈ 0.002 Ts).
* The sweep shows similar residuals at 20 and 60 dB SNR.
* At 150 MHz the skew residual is larger, up to 0.0075 Ts. There the product
  metric is flatter and the finite-sum bias term larger.

### Simulating

No vendor primitives are used. With Verilator 5, from the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/tiadc_pkg.sv tb/tb_tiadc_cal_top.sv \
  --top-module tb_tiadc_cal_top -Mdir obj_top
./obj_top/Vtb_tiadc_cal_top
```

Replace the testbench name for any other bench. The end-to-end bench runs
about 3 million clocks and takes a few seconds. `tiadc_pkg.sv` must come
first, because every module imports it.
