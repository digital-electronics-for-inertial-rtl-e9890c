# All-digital drive and read-out for resonant MEMS sensors

Vibrating-beam accelerometers and Coriolis gyroscopes are resonators. To use one
you have to do two things. First, drive it at its resonance with a clean sine.
Second, measure the in-phase and quadrature parts of its response at that same
frequency. Usually this takes a DAC, an ADC and analog synthesizers, and these
parts are hard to qualify for space. This RTL does the whole job inside an FPGA
with no converter. The only analog parts left are a passive RC filter, charge
amplifiers and comparators.

* **Drive.** A direct digital synthesizer (DDS) makes a sine. A one-bit
  sigma-delta modulator turns it into a bitstream. An RC filter outside the
  FPGA recovers the sine from that stream.
* **Measure.** A second synthesizer, coherent with the first, makes a reference
  sine. An external comparator compares the sensor signal with it. The FPGA
  timestamps every comparator edge. Each timestamp is the phase of the
  resonator synthesizer at that instant, plus a fraction of a clock taken from
  a tree of eight sub-clocks. This gives 0.5 ns resolution at a 250 MHz system
  clock.
* **Close the loop.** A processor on the FPGA reads the timestamps. It
  demodulates them into in-phase and quadrature terms, runs the phase-locked
  loop and the decimation, and writes new frequency and amplitude words back.
  It does this once per *measurement cycle*. The processor and its software
  are not part of this RTL. The RTL gives the processor a register bus.

One FPGA holds three such resonator channels, plus a UART to the host.

## Parts of the design

```
mems_platform_top
 ├─ resonator_manager  x3   (one per resonator)
 │   ├─ dds_accumulator  x4 ─ sine_lut x4 ─ sigma_delta_mod x4  → sd_q / sd_qn
 │   ├─ cycle_sequencer      (Q periods of DDS 0 = P periods of DDS 1)
 │   └─ subclock_sampler x4 ─ tdc_capture x4 ─ timestamp_fifo x4  ← comp
 └─ uart                     (host link)
mems_pkg                      shared widths, reg_req_t, ts_t
```

| module | what it does |
|---|---|
| `dds_accumulator` | 48-bit phase accumulator. `phase += dphi` every clock. `wrap` pulses on the carry out, which marks one period. `clear` zeroes it. Optionally pipelined in segments for 64 bits. |
| `sine_lut` | Top 12 phase bits → 16-bit signed sine, times a 16-bit amplitude. Quarter-wave table computed at elaboration. Latency 2 clocks. |
| `sigma_delta_mod` | One-bit modulator, first or second order, selected at run time. Complementary outputs `q` and `qn` drive an LVDS-style pair. |
| `subclock_sampler` | Samples the comparator at 8 instants per system clock (4 clock phases × 2 edges) and retimes the 8 samples into the system clock domain. |
| `tdc_capture` | Finds the first comparator change in those 8 samples. Emits `{rising, phase[47:16], frac}`. |
| `timestamp_fifo` | 16-entry buffer per TDC channel, with a sticky overflow flag. |
| `cycle_sequencer` | Ends a measurement cycle every Q periods of DDS 0. Reports how many DDS 1 periods (P) the cycle held. |
| `resonator_manager` | The four chains above, the register file and the coherent increment update. |
| `uart` | 8N1 UART with data, status and divisor registers. |
| `mems_platform_top` | Three managers and the UART on one register bus. |

## The measurement cycle and why the synthesizers must stay coherent

Let the resonator run at F, with DDS 0 generating F. The reference (DDS 1) runs
at F_ref = (P/Q)·F, so one cycle holds exactly Q resonator periods and P
reference periods. Demodulation sums x_k·cos kθ and x_k·sin kθ over the cycle.
The terms at 2θ cancel only when the sum covers whole periods, so the
measurement always works on complete cycles. The measurement rate is F/Q.

In hardware this becomes two rules:

* `cycle_sequencer` counts the `wrap` pulses of DDS 0 and pulses `cycle_end`
  (the `cycle_irq` output) one clock after the Q-th pulse. In the same clock it
  publishes the number of DDS 1 wraps seen in the cycle. With increments in
  the exact ratio Q : P this number is P. Software can use it to check the
  ratio it programmed.
* All increments are written into **shadow registers**. They are copied into
  every accumulator of the manager in the same clock, at the end of a cycle.
  This means the loop software may write at any time, yet no cycle ever mixes
  two frequencies, and all synthesizers keep their ratio. `CTRL.apply` copies
  them at once. `CTRL.clear` zeroes every accumulator and restarts the cycle
  count. Both are used at start-up.

Phase coherence across *managers* is not enforced. Each manager is started by
its own register write.

## Time-to-digital conversion (the subtle part)

The TDC has to date a comparator edge to 0.5 ns while no logic runs faster
than 250 MHz. It does this with four copies of the system clock, shifted by
0°, 45°, 90° and 135°. The clock manager outside the RTL makes these and feeds
them in on `clk_ph[3:0]`, where `clk_ph[0]` is the system clock. The rising
edges of the four clocks split a period into slots 0–3. Their falling edges
give slots 4–7.

```
clock edge n          n+1                n+2              n+3
 |  slots 0..7 of n    | gather <= 8 flops | samp = slots(n)  | ts out
```

1. `subclock_sampler` has one flop on each of the eight edges. At system clock
   edge n+1 all eight samples taken during period n (at n + i/8) are copied
   into one register. One more register holds them as `samp` for the whole
   next period. So `samp` describes period n between edges n+2 and n+3.
   Slot 7 is copied one eighth of a period after it was taken. The FPGA
   placement must meet that path.
2. `tdc_capture` delays the DDS 0 phase by the same two clocks, so each slot
   vector meets the phase the accumulator held during its period. It prefixes
   slot 7 of the previous period and looks for the first level change:
   * a change between slot i and slot i+1 is dated **n + i/8**, so the
     timestamp is (phase of period n, frac = i). For example, an event
     between slots 5 and 6 reads n + 5/8;
   * a change between slot 7 of period n−1 and slot 0 of period n is dated
     (n−1) + 7/8.

   Only the first change in a period is kept. The comparator is expected to
   have enough hysteresis not to chatter within 4 ns. Both polarities are
   timestamped. Bit `rising` tells them apart.
3. The timestamp is the upper 32 bits of the 48-bit phase (1.46 nrad per LSB),
   plus the 3-bit fraction. The fraction turns into phase as frac/8 · dphi.
   That product and the demodulation are left to software. A timestamp leaves
   `tdc_capture` three clocks after the period it dates (four for frac = 7).

All TDCs of a manager use DDS 0's phase. The timestamps are therefore phases of
the resonator drive, which is what the demodulation needs.

## Drive chain

`phase[47:36]` addresses the sine table. Only a quarter wave is stored: 1024
words, entry i = round(32767·sin(π/2·(i+½)/1024)). The other quadrants come
from mirroring the address (quadrants 1 and 3) and negating the value
(quadrants 2 and 3). The half-step offset makes the mirror exact. The table is
built at elaboration by an integer Taylor series in Q30 fixed point, so there
is no data file. The sample is multiplied by the amplitude word. Gain is
amp/65536, so `0x8000` is half scale.

The modulator uses the standard loops, with feedback ±2^15 and the quantizer
on the sign of the last integrator:

* first order: `v1 += x − fb`
* second order: `v1 += x − fb; v2 += v1 − fb`

The second-order loop is stable for |x| below about 0.7 of full scale. Keep the
amplitude word at or below about `0xB000` when using it. The modulator runs at
the system clock, which is 2500 times a 100 kHz drive.

Frequency: f = 250 MHz · dphi / 2^48. The step is 0.888 µHz. For 100 kHz,
dphi ≈ 112 589 990 684.

## Register map

The bus is word addressed and single cycle. `bus_addr[9:8]` selects resonator
manager 0–2, and 3 selects the UART. Writes act at the clock edge. Read data is
on `bus_rdata` one clock after `bus_re`.

Resonator manager (`bus_addr[7:0]`):

| addr | name | bits |
|---|---|---|
| 0x00 | CTRL | [0] run, [1] clear (pulse), [2] apply (pulse), [7:4] second order per DDS, [11:8] TDC enable |
| 0x01 | STATUS | [3:0] FIFO not empty, [7:4] FIFO overflow (write 1 to clear) |
| 0x02 | CYCLE_Q | [15:0] Q, resonator periods per cycle (0 acts as 1) |
| 0x03 | CYCLE | [31:16] cycles completed, [15:0] P measured in the last cycle |
| 0x10+4i | DPHI_LO | DDS i increment [31:0] (shadow) |
| 0x11+4i | DPHI_HI | DDS i increment [47:32] (shadow) |
| 0x12+4i | AMP | DDS i amplitude [15:0] (takes effect at once) |
| 0x13+4i | PHASE | DDS i phase [47:16], read only |
| 0x40+2j | TS_INFO | TDC j head entry: [31] valid, [30] overflow, [3] rising, [2:0] frac |
| 0x41+2j | TS_PHASE | TDC j head phase [31:0]; reading it removes the entry |

DDS 0 is the resonator drive and DDS 1 the reference. DDS 2 and 3 are spares:
a gyroscope's second drive, or a quadrature compensation signal. TDC 0 to 3 are
four comparator inputs. A gyroscope uses two (drive and sense). Software reads
TS_INFO, then TS_PHASE.

UART (`bus_addr[1:0]`): 0 DATA (write sends, read takes the received byte); 1
STATUS {overrun, tx busy, rx valid}, where a write clears overrun; 2 DIV, clocks
per bit, reset 2170 (115200 baud at 250 MHz).

## What is outside this RTL

| Part | Why it is not here | What the RTL offers instead |
|---|---|---|
| Soft-core CPU | A vendor processor | Its register bus is the top's `bus_*` ports |
| Demodulation, PLL, decimation, data frames | Software on that CPU | — |
| Clock manager | An FPGA clock primitive (PLL/MMCM) | The four clock phases are the `clk_ph` input ports |
| RC filter, drive and charge amplifiers, comparators | Analog, on the sensor board | — |

The testbenches stand in for the CPU (register reads and writes) and for the
comparators (square waves locked to the drive phase).

## Choices made here, and departures

These are this design's own, not given by the platform it implements:

* The register map, the bus timing and the address map.
* The shadow increment registers with update at the cycle end.
* The timestamp FIFOs (16 deep) and the UART format.
* Sine table size and width (4096 points × 16 bits) and the amplitude
  multiplier.
* Run-time selection of the modulator order.
* Which DDS the TDCs date against (DDS 0) and which DDS is the reference
  (DDS 1).
* Timestamping both comparator edges, keeping only the first edge per clock,
  and the two-stage retiming of the sub-clock samples.
* Reset is asynchronous and active low. Memories (FIFO storage) are not reset.

Known departures and limits:

* **The 64-bit option is a build-time setting, not the default.** The platform
  can widen the phase increment to 64 bits (10 pHz step) at the cost of up to
  6 clocks of accumulator latency. Set `mems_pkg::PHASE_W = 64` and
  `DDS_LAT = 6` to get it. `dds_accumulator` then splits the adder into six
  segments. Each segment adds the carry the segment below produced one clock
  earlier. Inputs are skewed and outputs deskewed, so the phase is exact but 5
  clocks late. The accumulator testbench checks this configuration bit-exact.
  The full-design testbenches run the default 48 bits with a single-cycle
  adder. How the original implementation pipelines its accumulator is not
  known. The segment scheme is this design's own.
* **At most three managers.** A six-axis IMU would need six. The address map
  allows only three.
* **Slot 7 timing.** Slot 7 is retimed one eighth of a clock after sampling.
  Sub-clock skew on the real device is what sets the TDC's linearity. The RTL
  assumes ideal phases.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Every testbench has a watchdog. With Verilator
5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module tb_mems_platform_top rtl/mems_pkg.sv tb/tb_mems_platform_top.sv
./obj_dir/Vtb_mems_platform_top
```

What each testbench checks:

* `tb_mems_platform_top` runs the whole design at its default size (3 × (4
  DDS + 4 TDC), 48-bit phase), about 200 µs of simulated time, in seconds.
  * Every timestamp read back must give the comparator phase within one
    sub-clock step (1/20000 of a turn at 100 kHz).
  * All eight fractions must occur.
  * Cycle lengths must equal 3·2^48/dphi clocks, and P must read 4.
  * One FIFO must overflow.
  * Second-order modulation is checked by correlating the bitstream with the
    expected sine.
  * An increment written mid-cycle must wait for the cycle end.
  * A four-byte frame goes out through the UART and comes back through the
    loopback.
  * Each of these mechanisms is counted, and one that never happens is a
    failure.
* `tb_resonator_manager` runs one manager with the same kinds of checks.
* The unit testbenches compare against models written in the testbench:
  * `tb_dds_accumulator` — phase sequence, wrap, frequency.
  * `tb_sine_lut` — real-valued `$sin`, ±1 LSB, over all 4096 phases.
  * `tb_sigma_delta_mod` — bit-exact loop model and mean value.
  * `tb_subclock_sampler` — event level at each slot instant, with real
    four-phase clocks.
  * `tb_tdc_capture` — dated event list.
  * `tb_cycle_sequencer` — two coherent accumulators, P/Q = 4/3, 7/5, 1/1.
  * `tb_timestamp_fifo` — queue model.
  * `tb_uart` — frame waveform and loopback.

`tb_workload_tdc_resolution` runs the intrinsic-resolution measurement. A
comparator signal with known edge instants is timestamped at 100 kHz and at
20 kHz drive, and each timestamp is turned back into a time error. The errors
must fill [0, 0.5 ns) with the rms of an ideal 0.5 ns quantizer, 0.144 ns. That
is about 91 µrad per edge at 100 kHz and 18 µrad at 20 kHz, before any
averaging over a cycle. The run takes about 15 s.

`tb_workload_sigma_delta_spectrum` analyses the 100 kHz drive stream over 40
periods, in both modulator orders. It correlates the stream at the fundamental
and at harmonics 2 to 5. The fundamental matches the amplitude word. The
harmonics are below −80 dBc (first order) and −90 dBc (second order). A
one-pole 1 MHz RC model of the output filter recovers the sine to within 0.044
of the ±1 stream.

To change the sizes, edit `mems_pkg` (phase width, LUT address bits, sample
width) or the parameters `N_RES`, `N_DDS`, `N_TDC` and `FIFO_DEPTH`. The CTRL
and STATUS fields hold at most four DDS and four TDC.
