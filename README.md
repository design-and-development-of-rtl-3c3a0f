# Qubit readout signal processing platform

A superconducting qubit is read out by sending a microwave tone through a
resonator coupled to it. Depending on the qubit state, the resonator's
frequency shifts slightly, so the transmitted signal changes phase (one tone)
or the surviving frequency changes (two tones). After amplification and down
conversion, two ADCs sample the in-phase (I) and quadrature (Q) parts of that
signal at 100 MHz. The noise is large, and the qubit decays within about a
microsecond. So the state has to be found either by averaging many repeated
experiments, or from one shot by a matched-filter receiver that decides well
within a microsecond.

This RTL implements an FPGA application with both paths:

* **Averager.** It sums the I and Q samples of every sample position over N
  repetitions of the experiment (up to 2^18 − 1; 200000 is the largest count
  exercised). It then copies the sums, or the means sum/N, into the board's
  external ZBT SRAM, where a host program picks them up after the run.
* **Single-shot receiver.** A demodulator correlates each measurement window
  with stored reference signals. A detector then decides which of two
  reference scores the result is nearer to. The decision comes 60 ns after
  the window closes.

Around this DSP core sits a small wrapper: a boot loader that starts things
in the right order, and one controller per SRAM bank.

```
 adc_a (I) ─┐    ┌──────────── DSP core ─────────────────────────────┐
 adc_b (Q) ─┼─►reg─┬─► averager ──► result_writer ──┬─► zbt_ctrl A ──► SRAM bank A
 meas_window┘    │ │   (2x dual_port_ram)           └─► zbt_ctrl B ──► SRAM bank B
                 │ └─► demodulator ──► detector ──► q_hat, q_valid
                 │     (ref store)     (lambda0/1)
                 └────────────────────────────────────────────────────┘
 rst_in, clk_locked ─► boot_loader ─► ram_en (controllers), dsp_run/dsp_start (core)
```

Everything runs in one clock domain at 100 MHz and takes one sample per
channel per cycle. Nothing in the design stalls the sample stream.

## Files

| file | content |
|---|---|
| `rtl/qr_pkg.sv` | shared widths and types: `iq_t` sample, `ref_t` reference sample, `score_t` score, `scheme_e`, `zbt_req_t` |
| `rtl/qubit_readout_top.sv` | top level, wires everything below |
| `rtl/boot_loader.sv` | start-up sequencing |
| `rtl/averager.sv` | repetition averager, two channels |
| `rtl/dual_port_ram.sv` | RAM with one read and one write port, used by the averager and the reference store |
| `rtl/result_writer.sv` | copies averaged traces (sums or means) into the SRAM banks |
| `rtl/seq_divider.sv` | sequential signed divider, forms the means in the result writer |
| `rtl/zbt_ctrl.sv` | one ZBT SRAM bank controller |
| `rtl/demodulator.sv` | complex multiply-accumulate scoring against the references |
| `rtl/detector.sv` | minimum-distance decision |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_single_shot_workload.sv` | readout experiment at realistic sizes, with calibration (whole design) |
| `tb/tb_averager_workload.sv` | two averaging experiments (whole design) |
| `tb/zbt_sram_model.sv` | behavioural model of a pipelined ZBT SRAM bank (simulation only) |

## The single-shot receiver

This is the least obvious part. The readout is treated as sending one bit
through a noisy channel. For qubit state q the noise-free sampled response is
s_q[k]. The optimal receiver for this channel has two parts:

1. **Demodulator.** It computes a score by correlating the received samples
   with the references:

       score_r = Σ_k s_out[k] · conj(s_r[k])        r = 0 (one tone) or r = 0, 1 (two tone)

   Here s_out[k] = I[k] + jQ[k]. In hardware this is two complex
   multiply-accumulates per cycle (one per reference), each a 14×16-bit
   product pair into 48-bit accumulators. The usual 1/N normalisation is left
   out. This is harmless because the reference points below are given in the
   same unnormalised scale.
2. **Detector.** Given reference points λ0 and λ1, the scores a noise-free
   measurement would produce for q = 0 and q = 1, it decides

       q_hat = 0  if ‖score − λ0‖ < ‖score − λ1‖,  otherwise 1

   It compares exact squared distances of up to 100 bits. No threshold is
   precomputed, and a tie decides 1.

The two schemes differ only in the references and in how many score
components the detector uses:

* **One tone.** The drive is at the bare resonator frequency. The two states
  shift the phase by ±Δφ, so s_0 and s_1 are nearly antipodal. Only
  reference s_0 is needed, and the score is a point in the complex plane:
  λ0 ≈ +|s|², λ1 ≈ −|s|². Set `scheme = 0`. Component 1 of the score is then
  ignored.
* **Two tone.** The drive holds two frequencies, and the resonator
  suppresses one of them depending on the state. The references are the two
  tones at their intermediate frequencies. These are orthogonal when the
  window spans a whole number of periods of their difference frequency, and
  nearly orthogonal when it spans more than about five. The score is a point
  in C²: λ0 ≈ (1, 0), λ1 ≈ (0, 1) in units of |s|². Set `scheme = 1`.

The reference samples are loaded through the `ref_*` write port: two stores
of 1024 complex 16-bit samples, one per reference. λ0 and λ1 are inputs. In
practice both come from calibration. Averaging many shots with a known
prepared state yields the references (the averager on this same board does
exactly that), and the mean scores of such shots are good reference points.
Mean scores also track the shift that qubit decay during the window causes.

Timing: `q_valid` pulses 6 cycles (60 ns) after the first cycle in which
`meas_window` is low at the pins. The cycles are 1 input register, 3 in the
demodulator and 2 in the detector. Windows may follow each other with a
single low cycle in between. A window longer than the reference store is
scored over its first 1024 samples, and `score_overflow` is set.

## The averager

Each channel has a dual-port RAM with one 32-bit word per sample position.
When sample k of a window arrives, port A reads the running sum of position
k. In the next cycle, port B writes sum + sample back. A position is read
again only in the next window, and a window must be low for at least one
cycle, so a write always lands before the next read of the same word. No
forwarding path is needed. In the first repetition the write ignores the old
contents, so the RAM is never cleared explicitly.

* A run starts with `avg_arm`, or automatically at boot, for `n_reps`
  repetitions. A window that is already open at the arm is not counted.
* The first window sets the record length (at most 4096 samples, 40.96 µs).
  Longer windows are clipped, and `avg_overflow` is set. Later windows of
  another length set `avg_len_mismatch`: the sums are then no longer
  comparable position by position.
* A repetition is counted at the falling edge of its window. One cycle after
  the N-th falling edge, `avg_done` is high and the result writer starts.
* The RAM holds sums. 14-bit samples over up to 2^18 repetitions fit in 32
  bits, which is also the SRAM word width. The division by N happens on the
  way out, see below.

### Result layout in SRAM

| bank A (I) | bank B (Q) |
|---|---|
| word 0: repetitions N | word 0: bit 31 = mean mode, bits 30..0 = record length L |
| word 1+k: result for I at position k | word 1+k: result for Q at position k |

The top-level input `avg_mean` is read when the run completes and selects
what the result words hold:
* `avg_mean = 0`: the 32-bit sums. The copy streams one word per bank per
  cycle and takes L + 2 cycles.
* `avg_mean = 1`: the means sum/N as signed fixed point with 18 fractional
  bits (Q13.18, value = word / 2^18), truncated toward zero. One sequential
  divider per channel produces one quotient bit per cycle, so each word takes
  54 cycles: L·54 + 2 cycles in total, 2.2 ms for a full 4096-sample record.
  For more than 54 repetitions that is shorter than the run itself, and it
  costs two small dividers instead of 50-bit array dividers.

`dump_done` (and LED 2) stays high until the next run is armed.

## Wrapper: boot and memory

**Boot loader.** Reset release and the clock manager's lock indication are
each synchronised by two flip-flops. Once both hold, `ram_en` turns on the
memory controllers. One cycle later the DSP core leaves reset and gets a
start pulse. From lock to `ram_en` is 3 edges. Loss of lock or a new reset
stops everything again.

**ZBT controller.** ZBT SRAM needs no idle cycle between reads and writes,
so each bank moves one 32-bit word per cycle. The controller timing assumes
pipelined ZBT parts:
* address and control go out on edge 0 and are sampled on edge 1;
* the data transfer happens on edge 3;
* read data is available to the user after edge 3.

The bidirectional data bus appears as `zbt_dq_o`, `zbt_dq_oe` and
`zbt_dq_i`; the pad buffer belongs in the board-specific pin wrapper. The
address is 21 bits (2M words = 8 MB per bank).

**LEDs.** 0 = core running, 1 = averaging, 2 = results in SRAM,
3 = last q_hat.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `ADC_W` (package) | 14 | ADC resolution |
| `ZBT_DW`, `ZBT_AW` (package) | 32, 21 | SRAM word and address width |
| `REF_W`, `SCORE_W` (package) | 16, 48 | reference sample and score accumulator width |
| `AVG_DEPTH` | 4096 | averager positions per channel |
| `REF_DEPTH` | 1024 | reference store depth, longest scored window |
| `REP_W` | 18 | repetition counter width, up to 262143 repetitions |
| `FRAC` (result writer) | 18 | fractional bits of a stored mean |

What is fixed by the board: the 100 MHz clock, the two 14-bit ADCs, two SRAM
banks of 32-bit words at 8 MB each, and the two-channel averager with a
read-add-write dual-port RAM.

This design's own choices: RAM depths, the 16- and 48-bit widths, the
control handshakes, the SRAM result layout, the fixed-point mean format, and the pin-level configuration
ports. The platform has no command channel from the host, so `n_reps`,
`scheme`, `lambda0/1` and the reference write port are top-level inputs. A
real build would drive them from registers behind whatever host link is
added.

Sizing checks against typical use:
* a 2 µs measurement window is 200 samples;
* its score stays below 2^37, well inside the 48-bit accumulators;
* 200000 repetitions of full-scale samples sum to 1.64·10^9 < 2^31;
* in mean mode, sum·2^18 stays below 4.3·10^14 < 2^49, inside the 50-bit
  dividend, and a mean of at most 2^13 fits 32 bits with 18 fractional bits.

## Where this departs from, or goes beyond, the platform as described

* The averager's RAM holds sums, and the division by N is done while the
  results are copied out. It can also be skipped (sum mode) to keep the
  full integer sums.
* The single-shot receiver was studied in simulation as the intended use of
  the platform. Here it is built as hardware next to the averager, sharing
  its samples.
* The original memory controller and clock manager were vendor-supplied
  wrapper parts. The controller here is written from its stated function
  (one word per bank per cycle). The clock manager, the separate clock FPGA
  (10 MHz reference to 100 MHz, deskewed), the ADCs, the unused DACs, the
  SRAM chips and the host software are outside the RTL. The clock arrives on
  `clk`, and lock on `clk_locked`.
* Not built: a PCI link to the host, on-chip calibration of λ0/λ1, and
  loading the references directly from the averager or from SRAM.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/qr_pkg.sv tb/tb_qubit_readout_top.sv --top-module tb_qubit_readout_top
./obj_dir/Vtb_qubit_readout_top
```

Replace the testbench name to run another one. `tb_qubit_readout_top` runs
the whole design at its default parameters with two SRAM models. It covers:
* boot;
* 16 one-tone shots and 20 two-tone shots, every decision compared with a
  bit-exact model and with the prepared state, and its 6-cycle latency
  checked;
* the two averaging runs over those shots, read back from the SRAM models,
  one storing sums and one storing means;
* the overflow and length-mismatch paths;
* a complete 200000-repetition run.

It prints how often each of these happened and takes about a second. The
block testbenches use smaller RAM depths to stay short.

Two more testbenches run the whole design, at default parameters, through
the experiments it is meant for:
* `tb_single_shot_workload` covers the readout itself. For each scheme, the
  references are first calibrated by averaging 256 prepared shots in mean
  mode and loading the stored means. The reference points are set to the
  mean hardware scores of 32 more shots. Then 28 test shots per state are
  played. The noise is Gaussian at an SNR of −10 dB, and excited qubits
  decay with a 10 µs mean lifetime. One tone uses a 2 µs (200-sample)
  window; two tone uses a 250-sample window, 5 periods of a 2 MHz tone
  spacing. Every score and decision must match a bit-exact model. Every
  shot whose qubit did not decay inside the window must be decided
  correctly.
* `tb_averager_workload` averages a noisy synthetic signal 100 times. The
  noise must shrink by √100. It then averages 2000 square pulses whose
  lengths are exponentially distributed with a 1 µs mean, and checks that
  the result is the expected exponential decay. The simulator is
two-state, so the testbenches reset or write everything they read.
