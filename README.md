# Real-time readout and heater control for integrated photonic circuits

This RTL is the FPGA side of a test board for silicon photonic circuits. The
board watches light in up to 16 waveguides with contactless (CLIPP)
conductance sensors and tunes the circuit with 16 thermal heaters.

A CLIPP sensor has no DC output. The FPGA drives it with a sine, and an
analog front-end chip (ASIC) mixes the sensor current down to a low
intermediate frequency. The board digitises that signal, and the FPGA
finishes the lock-in detection digitally for all 16 channels at once, using
one shared arithmetic pipeline. Meanwhile it drives the heaters with a DC
value plus an optional small dither tone. That tone lets the same lock-in
also measure the slope of each device's response, which a locking algorithm
on the PC can use.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The top module is
`helios_top`, and shared constants and the register map are in
`helios_pkg`.

## Signal flow

```
            host: data/address wires, write trigger, start/reset triggers, result pipe
                                  |
                          host_regfile (128 x 16 bit)
                                  |
 160 MHz  stim_ctrl --14b--> stimulus DAC --> sensor --> ASIC mixer (square waves from stim_ctrl)
          fast_dith_ctrl --14b--> second DAC                     |
          act_chip_ctrl x4 (data generators)              analog chain, PGA
                                  |                              |
 40 MHz                           |          adc_ctrl <-- 16 serial ADCs (625 kS/s)
                                  |                |
                                  |          dsp_chain: HPF -> 4 mixers -> 4 LPF -> 4 CIC
                                  |                |
                                  |          result_buffer (64 FIFOs) --> host pipe
 27 MHz   act_chip_ctrl x4 (compiler, programmer) --> 4 heater DAC chips (4 channels each)
 40 MHz   sr595_ctrl x2 (PGA gains, heater switches), spi_tx x2 (potentiometer, bias DAC)
```

## Clock domains

| Clock | Logic |
|---|---|
| `clk_160` | all synthesizers (stimulus, demodulation, references, heater dither) and the two parallel stimulus DACs |
| `clk_40` | host register file and triggers, ADC controller, processing chain, result FIFOs, shift registers, potentiometer, bias DAC |
| `clk_27` | heater DAC instruction compiler and serial programmer |

How signals cross between domains:

- **Reset.** `rst_n` is asserted asynchronously. In each domain it is released synchronously through `cdc_bit`.
- **Host triggers.** They are one-clock pulses in the 40 MHz domain. They reach the other domains through `cdc_pulse`, a toggle-and-synchronise crossing.
- **Heater words.** They cross from 160 MHz to 27 MHz through `cdc_word`, a request/acknowledge holding register. Each instruction therefore carries a complete, recent word.
- **Digital references.** The four reference square waves are single bits. They are synchronised into 40 MHz with `cdc_bit`.
- **Parameters are quasi-static.** The host writes them before starting a chain, and the stimulation controllers copy theirs at start. Changing a parameter while a chain runs is not glitch-free across domains.

Forwarded clocks are gated copies of the domain clocks. These are the DAC clocks, the ADC `sck` and the serial clocks. They have no flip-flop driving them, so a synthesis tool reports them as outputs that follow an input.

## Frequency plan: two demodulations

The sensor is stimulated at `f_stim`. The ASIC mixes the sensor current with
square waves at `f_dem = f_stim - f_mid`, which moves the information to the
intermediate frequency `f_mid`. A useful value is around 20 kHz: above the
board's 1/f corner and well inside its 150 kHz anti-alias filter. The FPGA
then demodulates at `f_mid` with square-wave references.

All synthesizers have a 16-bit phase accumulator at 160 MHz:
`f = pinc * 160 MHz / 2^16`, a step of 2.44 kHz. `stim_ctrl` computes
`pinc_dem = pinc_stim - pinc_mid` in hardware when it starts, and loads all
increments together. This keeps the stimulus, the ASIC square waves and the
digital references phase-related.

**Dither.** The dither tones on the heaters and the matching reference are
slower synthesizers. They advance once every 32 clocks (a 5 MHz rate, step
76.3 Hz). After the ASIC mixer, a dither tone at `f_dith` appears at
`f_mid ± f_dith`. Paths 2 and 3 of the processing chain demodulate with
references at `f_mid - f_dith`. These come from the dither-demodulation
synthesizer, whose increment the host computes in 5 MHz units:
`32*pinc_mid - pinc_dith`.

**Square waves.** The square waves are the MSBs of the sine and cosine
outputs (`dds`). A bit of 1 means the sine is negative.

## Synthesizer (`dds`)

- **Phase.** The phase is the accumulator plus a phase offset.
- **Sine table.** The top two phase bits choose the quadrant. The next 10 bits address a quarter-wave table of 13-bit magnitudes, mirrored in the second and fourth quadrants and negated in the third and fourth.
- **Table contents.** The table is computed at elaboration by a constant function: entry `k` is `round(8191 * sin((2k+1)/2048 * pi/2))`. It needs no data file.
- **Enable and reset.** `aclken` low zeroes the outputs while the phase keeps running. `aresetn` clears the accumulator. `step` gives the 1-in-32 rate of the dither synthesizers without a second clock.
- **Latency.** Two clocks from phase to output.

## Acquisition (`adc_ctrl`)

The 16 ADCs share the convert and serial clock pins, and each has its own data
line. Each sample takes 64 clocks of 40 MHz, which gives exactly 625 kS/s:

| Step | Length | What happens |
|---|---:|---|
| Convert | 47 clocks | `cnv` high |
| Read | 16 clocks | gated `sck`; the ADCs shift on the falling edge and the FPGA samples on the rising edge |
| End | 1 clock | the 16 words are presented with a one-clock `data_ready` strobe |

- **Timing pulse.** `conv_start` marks the sampling instant. The processing chain uses it to capture the reference bits.
- **Stop and reset.** A stop trigger ends the loop after the current sample. The hard reset clears the controller at once.

## The time-shared lock-in chain (`dsp_chain`)

At 625 kS/s and 40 MHz, a channel needs the arithmetic for only one clock in
64. After each `data_ready`, the chain therefore feeds the 16 channels
through a single pipeline, one per clock. Only the filter states are kept
per channel, in small memories indexed by the channel number that travels
with every sample (`tdm_tag_t`). One round takes 16 clocks plus a few of pipeline latency, so the
chain is idle for most of each period.

Per channel, a sample goes through these stages:

1. **High-pass filter (`hpf_tdm`).** It removes the board offset.
   - Direct form II: `w[n] = x[n] + alpha*w[n-1]` and `y[n] = w[n] - w[n-1]`.
   - `alpha` is in 1.15 format. For a pole `f_p`, `alpha = (f_s - pi*f_p)/(f_s + pi*f_p)`, which covers poles from a few Hz up to `f_s/pi`.
   - The low-frequency gain reaches 2^15, so `w` is 31 bits. The 47-bit product is truncated by dropping its duplicate sign bit and its 15 fraction bits.
   - The output is 17 bits, saturated. The high-frequency gain is at most 2.
2. **Four square-wave mixers (`sq_mixer`).** Each passes the sample when its reference bit is 0 and negates it when the bit is 1.
   - Path 0 uses the in-phase reference at `f_mid` and gives the real part of the sensor admittance.
   - Path 1 uses the quadrature reference at `f_mid` and gives the imaginary part.
   - Paths 2 and 3 use the in-phase and quadrature references at `f_mid - f_dith` and give the dither response.
3. **Four low-pass filters (`lpf_tdm`).** They set the lock-in bandwidth.
   - `w[n] = x[n] + alpha*w[n-1]` and `y[n] = (w[n] + w[n-1]) >> 1`.
   - The DC gain is `1/(1-alpha)`, up to 2^16. The state is therefore 32 bits, the sum is 33 bits, and the shift brings the result back to 32 bits.
4. **Four CIC notch filters (`cic_tdm`).** These are Hogenauer filters: an integrator at 625 kS/s, decimation by D = 8, and a comb over M = 64 decimated samples.
   - The result equals the sum of the last D·M = 512 inputs. It has notches every 625 kHz / 512 = 1.22 kHz, which remove the mixer harmonics left after the LPF.
   - Only M words per channel are stored, instead of 512.
   - The integrator and comb wrap around, which is exact for this structure. The output is shifted right by log2(D·M) = 9 for unit DC gain.
   - One result per channel comes out every 8 samples (78 kS/s).
   - After reset, the comb memory is cleared one word per clock. `ready` stays low during that time.
   - With `cic_en = 0` the CIC is bypassed and every LPF result is delivered.

**Reference alignment.** The reference bits are captured at `conv_start`,
the moment the ADCs sample. Samples reach the mixers one sample period later,
so `ref_delay` delays the captured references by one `data_ready`. Each
sample is then mixed with the reference value of its own sampling instant.
Without this, each sample period of pipeline delay (1.6 µs) would shift the
phase by 11.5° at a 20 kHz intermediate frequency. What remains is the
two-flop synchroniser of the reference bits plus the synthesizer latency,
under 100 ns, which is below 0.7° at 20 kHz. The delay depth is a parameter and should be changed if registers
are added before the mixers.

All four path results of a channel leave the chain in the same clock.

## Results to the host (`result_buffer`)

- **FIFOs.** Each of the 64 streams (16 channels × 4 paths) has its own FIFO of 256 × 32-bit words. The FIFOs share one RAM, because the host reads whenever its operating system schedules the transfer.
- **Decimation.** An optional decimator keeps one result in N per channel, set by register `R_USB_DECIM`.
- **Reading.** The host selects a stream with `pipe_sel = 4*channel + path` and pops words with `pipe_rd`.
- **Overflow.** A write into a full FIFO is dropped and sets the sticky `pipe_overflow`. `pipe_clr` empties all FIFOs and clears the flag.

## Heater actuation (`act_chip_ctrl` and its parts)

The 16 heaters sit on four 4-channel serial DAC chips. Each chip has its own
`act_chip_ctrl`.

- **Data generation (`act_data_gen`, 160 MHz).** It computes `word = clamp(dc + (sine*amp) >>> 13, 0, 65535)`.
  - `sine` comes from the chain's own dither synthesizer.
  - `amp` is the peak dither amplitude in DAC codes. Register `R_DITH_AMPB+k` holds it, and a bit of `R_DITH_EN` enables it.
  - The clamp keeps the heater drive non-negative.
- **Compiler (`act_compiler`, 27 MHz).** It takes the four channels in turn and builds 24-bit instructions `{R/W=0, 0, REG=010, A2=0, A1:A0=channel, data[15:0]}`.
- **Programmer (`act_programmer`).** It drives `sync_n` low and shifts the instruction MSB first, on the rising edge of the forwarded 27 MHz clock (the DAC samples on the falling edge). It then holds `sync_n` high for 3 clocks.
  - One word takes 27 clocks. That is 1 MHz for the chip, or 250 kHz per channel.
  - A reset trigger aborts a frame in progress. The next frame may then follow without the 3-clock gap, and the DAC drops the incomplete frame.

## Board peripherals

- **`sr595_ctrl`** loads 595 shift registers. The word is sent MSB first on a gated shift clock, and the latch rises after the last bit. A reset pulses the register clear.
  - With 8 bits it sets the PGA gains: 4 bits for the real chains and 4 for the imaginary chains.
  - With 16 bits it sets the heater summing switches through two chained registers.
- **`spi_tx`** sends 24-bit frames to the DAC-reference digital potentiometer and to the ASIC pseudo-resistor bias DAC. It has start and reset triggers and a device-reset output.
- **`fast_dith_ctrl`** is the second stimulus chain: one synthesizer driving the second parallel DAC, with start, reset and sleep.
- **ASIC multiplexer selects** are 4 × 3 bits taken straight from register `R_ASIC_MUX`.

## Host interface and register map

The host link offers 16-bit wires, one-clock triggers and a 32-bit read
pipe. A write puts the data on `host_wire_data` and the address on
`host_wire_addr`, then pulses `host_trig_write`.

Addresses (`helios_pkg`):

| Address | Content |
|---:|---|
| 0, 1 | `pinc_stim`, `pinc_mid` |
| 2, 3 | phase offsets of the ASIC square waves and of the digital references |
| 4, 5 | dither-demodulation increment (5 MHz units) and phase |
| 6 | second-chain increment |
| 7 | control: bit 0 enable stimulus, bit 1 enable ASIC demodulation, bit 2 CIC on |
| 8, 9 | HPF and LPF `alpha` (1.15) |
| 10 | PGA gains |
| 11 | heater switches |
| 12 | ASIC multiplexer selects |
| 13–14 | potentiometer word |
| 15–16 | bias DAC word |
| 17 | pipe decimation |
| 19 | dither enables |
| 32–47 | heater DC words |
| 48–63 | dither increments |
| 64–79 | dither amplitudes |

Triggers 0–16 start and reset the chains, in the order listed in
`helios_pkg`. The ADC chain has start, stop and hard reset.

`status` returns these bits:

- running flags of the stimulation chain, the ADCs, the second chain and the heaters;
- chain ready;
- result kept;
- the current in-phase reference;
- overflow.

## Where this design departs from the original board description

- **Own synthesizer and FIFOs.** The original design used a vendor DDS core and vendor FIFOs. Both are written out here: a quarter-wave-table synthesizer and one RAM-based FIFO set.
- **`data_ready` is a strobe.** The original used `data_ready` as a clock for the later stages. Here it is a one-clock strobe in the 40 MHz domain, so the design has no derived clock.
- **Dither rate.** The dither synthesizers are described as running on a 5 MHz clock. Here they run on 160 MHz with a 1-in-32 step enable, which gives the same frequencies.
- **CIC gain.** The CIC output is shifted by log2(D·M) = 9, not log2(M) = 6. The filter sums D·M samples, and 9 is the shift that gives unit DC gain. With a shift of 6, the 32-bit result would need 3 more bits.
- **CIC comb length.** The comb subtracts the integrator value M decimated samples back, matching the stated D·M = 512-point average. A `1 - z^-D` comb after the decimator would give a different notch.
- **Reference delay depth.** The reference delay is one sample deep because of this design's pipeline. The original register count is not known.
- **Choices not set by the original.** These are the register map, the trigger numbering, the dither amplitude scaling and clamp, the HPF output saturation, the FIFO depth, and the use of the 40 MHz clock for the slow serial devices. Also not set by it: the serial frame formats of the potentiometer, the bias DAC and the heater DAC instruction bits, which follow those parts' usual formats.
- **Not part of the RTL:** the analog front-end, the ADCs and DACs themselves, the USB host interface, and the locking algorithms (they run on the PC).

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
testbenches compare against models written independently in the testbench:

| Block | What its testbench checks |
|---|---|
| `dds` | a real-valued sine model and the output period |
| `hpf_tdm`, `lpf_tdm` | the filter recursions, including their measured pole |
| `cic_tdm` | the 512-sample moving average, its notch and its DC gain |
| `adc_ctrl` | the 64-clock sample period, against a behavioural serial ADC model (`tb/ad7903_model.sv`) |
| `act_programmer` | the 27-clock word period |
| `stim_ctrl` | the synthesizer periods and the 1-in-32 stepping |

`tb_helios_top` runs the whole design at its default sizes with no
parameter overrides:

- It writes parameters through the host wires and starts every chain.
- It feeds 16 ADC models with a sine at `f_mid` whose amplitude depends on the channel.
- It reads the FIFOs like the host. The lock-in magnitudes must match `2/pi · amplitude · gain`, and a channel without signal must read near zero.
- It checks what every peripheral receives.
- It counts 21 mechanisms and fails if any never occurs: stimulation, ADC and heater start/stop/reset, CIC mode and bypass, decimation, FIFO overflow and clear, shift-register, potentiometer and bias writes, and heater programming with dither.

`tb_dither_extract` also runs the whole design at its default sizes. It
checks that the signal at `f_mid` and a dither tone are measured at the same
time on all 16 channels:

- The ADC signal carries a tone at `f_mid` and a dither tone's two sidebands at `f_mid ± f_dith`.
- Paths 0/1 must read the `f_mid` amplitude, and paths 2/3 the dither amplitude.
- The frequencies sit on the 1.22 kHz CIC grid, so every cross product is notched out.
- One error term cannot be removed. The 13th harmonic of the sampled `f_mid - f_dith` square wave aliases onto `f_mid + f_dith`, which moves the dither reading by up to 1/13 depending on the tone's phase. This is a property of square-wave references, and the check allows for it.

## Simulating

Verilator 5 with timing support is enough. From the repository root, for
example:

```
verilator --binary --timing --top-module tb_dsp_chain \
    -y rtl -y tb +libext+.sv rtl/helios_pkg.sv tb/tb_dsp_chain.sv
./obj_dir/Vtb_dsp_chain
```

Replace `tb_dsp_chain` with any other testbench; `tb_helios_top` is the
complete system and runs in seconds. The simulation is two-state, so the
testbenches start with `rst_n` high and pull it low after 1 ns, so that the asynchronous
resets see an edge. Parameter defaults are the board's sizes. Smaller sizes for
experiments can be set on the block parameters (`N_CH`, `D`, `M`,
`FIFO_DEPTH`, ...).
