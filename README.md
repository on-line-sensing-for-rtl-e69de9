# On-line sensing of delay, leakage, power and temperature on an FPGA

An FPGA die isn't uniform. Transistor and wire delays vary from place to place, leakage varies even more, and the running application heats and loads the power grid unevenly. This design measures those effects in the field, using the same reconfigurable logic the application is built from. It spreads an array of very small sensors over the die. Each sensor is a ring oscillator and a counter. Each one reports how fast its own patch of silicon runs in the conditions of the moment.

A single snapshot of oscillator frequencies maps the delay across the die. Other quantities come from comparing snapshots:

| snapshot pair | what the difference shows |
|---|---|
| idle die at two temperatures | local leakage (leakage causes local voltage drop, which slows the oscillators nearby) |
| application running vs. paused a moment later | dynamic power (local voltage drop from switching current) |
| idle die, plus the supply voltage from the pins | temperature, through a per-sensor fitted model |

Every sensor counts at the same time, so one snapshot captures the whole die. The array is read out afterwards over one scan chain, which takes about 92 µs.

## The sensor

```
 timer ──► control ──► ring oscillator ──► RNS ring counter ──► scan out
 scan in ─►  (sync, clock gate)                 (49+17+16 bits)
 scan enable ►
```

### Ring oscillator (`ring_oscillator`)

The oscillator has three stages. Each stage is a LUT used as an inverter, then a latch held permanently open, then a stretch of routing. The first LUT also takes the on/off control. The open latch adds transistor delay to the loop, and this makes the frequency more sensitive to temperature.

An oscillator is a combinational loop, so it can't be synthesizable RTL. `ring_oscillator.sv` is a behavioural model with `#` delays. It keeps the real part's structure and ports. The default delays (250 + 250 + 167 ps per stage) give a period of 4.002 ns, about 250 MHz. While switched off, the model rests with its output low. On the FPGA this part is placed as a hand-routed netlist.

### RNS ring counter (`rns_ring_counter`)

A binary counter large enough to count 10,000 oscillator periods costs 14 LUTs and flip-flops. This counter instead uses a residue number system:

* It has three rings of lengths 49, 17 and 16, which share no common factor.
* Each ring holds a single hot bit. Every counted edge moves each hot bit one place further around its ring.
* The hot bit's position in ring *i* is the count modulo *m<sub>i</sub>*.

The three residues only repeat after 49·17·16 = **13,328** edges. On a Virtex-class FPGA each ring fits in a shift-register LUT, so the whole counter costs about two LUTs.

The same shift registers are also the scan path. With `scan_mode` high the rings open and chain together, in this order:

`scan_in → ring1[0..48] → ring2[0..16] → ring3[0..15] → scan_out`

The whole chain shifts one bit per clock. The sensor word is 82 bits, laid out `{ring3, ring2, ring1}`, and bit *i* of each field is position *i* of that ring.

### Control (`sensor_control`)

This is the part that needed the most design decisions. There are three.

* **Timer synchronisation.** The reference pulse comes from the system clock domain.
  * The raw pulse switches the oscillator on.
  * A two-flop synchroniser, clocked by the oscillator, produces `count_en`.
  * The oscillator stays on until the synchroniser has drained (`ro_control = timer | sync1 | sync2`).
  * So both edges of the pulse see the same two-period delay, and the count equals the number of oscillator periods in the pulse, ±1.
* **Scan clock.** `scan_enable` passes through a latch that is transparent while the scan clock is low, and is then ANDed with that clock. This is a standard glitch-free clock gate.
* **One clock for the sensor.** The counter and the synchroniser run on `osc_out | gated_scan_clock`. This is safe because the oscillator rests low when it is off, and because measuring and scanning are never done at the same time. The top level enforces that.

### Decoding (`rns_decoder`)

The count comes back from the residues through the Chinese remainder theorem:

count = (r1·W1 + r2·W2 + r3·W3) mod 13,328, with W1 = 5440, W2 = 7056, W3 = 833

Each weight is W<sub>i</sub> = (M/m<sub>i</sub>)·v<sub>i</sub> mod M, where v<sub>i</sub> is the inverse of M/m<sub>i</sub> modulo m<sub>i</sub>. `sensor_pkg` computes the weights when the design is elaborated, so other coprime moduli work without any table. No lookup memory is needed, unlike an LFSR counter, which would need a discrete logarithm. The decoder takes one word per clock and answers one clock later. If a ring has no hot bit it reads as residue 0; if it has several, the lowest counts.

## The system (`online_sensing_system`)

| block | role |
|---|---|
| `reference_timer` | pulse of `measure_cycles` clock cycles; 4,000 cycles = 40 µs at 100 MHz gives a 250 MHz oscillator about 10,000 counts, a resolution of 1 in 10,000 |
| `sensor_array` | 16 × 7 = 112 sensors, one shared timer line, one scan chain from sensor 0 (at `scan_in`) to sensor 111 (drives `scan_out`) |
| `scan_controller` | shifts 82 × 112 = 9,184 bits (91.8 µs), cuts them into words, decodes each word, and emits `sample_valid / sample_index / sample_count`, sensor 111 first |
| `switching_circuit` | test application: 10 regions of 2,820 flip-flops (28,200 in all) that toggle every cycle when enabled; `app_pause` freezes them all |

**Re-arming without a reset.** While the scan controller shifts the words out, it shifts a fresh pattern in: a hot bit at position 0 of every ring, for every sensor. When the readout ends, every counter stands at zero and is ready for the next measurement. A readout therefore both reads and clears the array. After reset the counters also start at zero.

**Interlock.** A measurement request is ignored while a readout runs, and a readout request is ignored while a measurement runs.

**Using it.** A typical cycle looks like this:

1. Pulse `measure_start` with `measure_cycles = 4000`.
2. Wait for `measure_busy` to fall.
3. Pulse `readout_start`.
4. Collect 112 samples.
5. Wait for `readout_done`.

Frequency in MHz is `count / (measure_cycles × 10 ns)` in counts per µs. Counts wrap modulo 13,328, which is about 53 µs at 250 MHz. Keep the pulse shorter than that, or correct for the wrap from a known frequency range.

In the system this design comes from, an embedded processor plays the role of these ports. It reaches the array and the application over point-to-point links, runs the timer as a bus peripheral, decodes in software, and carries out the measurement procedures:

* sample twice and check that the two readings agree;
* pause the application, wait about 1 ms for transients, sample again, resume;
* compare the snapshots;
* for temperature, apply a second-order model in frequency and pin voltage.

The processor, its memory and bus, the UART and the on-chip analog monitor are not part of this RTL. Neither are the procedures and the temperature model. In this RTL, the timer and the decoding are logic.

## Where this RTL departs from the published system

The following are this design's own choices:

* The timer, the decoding and the scan sequencing are in hardware, not software.
* Measurement and readout lock each other out.
* How the sensor is clocked for scanning, and the synchroniser depth.
* The order of the rings in the scan chain.
* Re-arming by shifting the pattern in.
* The asynchronous reset.
* The first oscillator LUT's exact function: control AND NOT feedback.
* Splitting the heater into 10 equal regions, with a pause input.

The sensor structure, the 49/17/16 moduli, the 82-bit word, the 16 × 7 array on one timer, the 40 µs pulse, the 100 MHz clock and the 28,200 switching flip-flops follow the published design.

The oscillator model has a fixed frequency per instance. Temperature, voltage and the heater's effect on it are not modelled. `sensor_array` gives instance *k* an interconnect delay of `WIRE_PS + ((k·37) mod 23 − 11)·SPREAD_PS`, a spread of about ±5 % in frequency, so that simulations have different counts to check. Set `SPREAD_PS = 0` for identical sensors.

The 8-LUT sensor size depends on a hand-placed netlist, and this RTL doesn't reproduce it. The hexagonal placement of the sensors is a matter of placement constraints.

## Files and simulation

`rtl/` holds one module or package per file. `sensor_pkg.sv` must be read first. All RTL is synthesizable except `ring_oscillator.sv`, and therefore the modules that instantiate it. Every testbench in `tb/` checks its results itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `ring_oscillator_tb` | rest state, 1,000 periods in 4,002 ns, slower instance |
| `rns_ring_counter_tb` | every state over two full periods with random enables, scan shifting, reset |
| `sensor_control_tb` | two-edge synchroniser latency at both ends of the pulse, edge count, glitch-free gated scan clock |
| `sensor_tb` | 4, 20 and 60 µs measurements (the last one wraps), decoded independently, re-arm |
| `sensor_array_tb` | 2 × 3 array, per-sensor expected counts from the delay formula, chain order |
| `reference_timer_tb` | exact pulse lengths including 4,000, restart ignored while busy, zero length |
| `rns_decoder_tb` | all counts 0..2000, both ends of the range, 3,000 random counts back to back |
| `scan_controller_tb` | against a model chain: order, 246-cycle enable, re-arm, ignored restart |
| `switching_circuit_tb` | ring contents against a model, with enables and pause |
| `online_sensing_system_tb` | the whole system with a 2 × 4 array: two measurements (one wraps), two readouts, both interlocks, regions switching, pause; each mechanism counted |
| `online_sensing_workloads_tb` | 2 × 4 array: ten consecutive idle readings (delay characterisation), then the dynamic-power sequence: sample twice while switching, check they agree, pause, sample, resume, compare |
| `online_sensing_system_full_tb` | the default 112-sensor system: one 40 µs measurement and a full readout, all 112 counts checked |

The simulations need the timing features of Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/sensor_pkg.sv tb/online_sensing_system_tb.sv --top-module online_sensing_system_tb
./obj_dir/Vonline_sensing_system_tb
```

The reduced system test runs in seconds. The full-size test takes a few minutes, because each of the 112 oscillator models schedules about 10,000 delay events per measurement.
