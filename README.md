# Miniature recording cardiotachometer

A pocket-sized heart-rate recorder for athletes who run for hours far away
from any receiver. Instead of digitising the electrocardiogram (EKG), it
measures the time between heart beats with an 8-bit counter. Every 10
seconds it stores the latest measurement in a 1K x 8 memory. That gives
1024 readings, or 2.86 hours of heart rate. The data is read out afterwards
over a simple 8-bit parallel port with three control lines.

This repository holds synthesizable SystemVerilog for the recorder's
digital part: the timing chain, the beat period counter, the memory with its
address counter, and the asynchronous-looking state controller that
sequences memory clearing, acquisition and stopping. It also holds a
self-checking testbench for every block. The analog front end (electrodes,
instrumentation amplifier, T-wave filter) is outside the RTL. The design
starts from the filter's logic-level output.

## How a beat period becomes a byte

The analog chain produces a logic-level pulse at each QRS complex, the sharp
spike of each heart beat. `counting_gate` turns each rising edge into a
150-ms pulse. It ignores any further edge during that pulse, such as a large
T wave crossing the trigger level. Each pulse toggles a flip-flop, the
counting gate CG. CG is therefore true during every second beat interval,
and each true interval lasts exactly one beat period.

`beat_period_accumulator` counts the 204-Hz clock while CG is true. Before
each measurement it is preset to 8'hCD, which is -51. So:

    M = 204 Hz * T_beat - 51   (mod 256)
    T_beat = (M + 51) / 204 s,   heart rate = 60 * 204 / (M + 51) beats/min

| M (stored) | beat period | heart rate |
|-----------:|------------:|-----------:|
| 0          | 0.25 s      | 240 /min   |
| 51         | 0.50 s      | 120 /min   |
| 153        | 1.00 s      | 60 /min    |
| 255        | 1.50 s      | 40 /min    |

The actual count clock is 5 MHz / 4096 / 3 / 2 = 203.45 Hz, so a reading
can be up to one count below what the 204 Hz formula gives. Periods outside
0.25-1.5 s wrap modulo 256. For example, 280 beats/min reads as a slow rate.

While CG is low, no counting takes place. That is when the byte is stored.
The falling edge of CG ends a measurement. It starts the write sequence
(WE, then AI and PR), and PR presets the counter for the next gate.

## Operating states

The control unit (`state_controller`) has four parts:

- `flag_generator`: the storage request flag SRF, a toggle flip-flop on the
  0.1-Hz clock, cleared by AI.
- `transition_controller`: two JK flip-flops Q1, Q2 clocked by the 156-kHz
  strobe.
- `reset_generator`: the address reset pulse AR, on both edges of R.
- `write_controller`: two one-shots in tandem, giving WE (100 us), then AI
  and PR (10 us).

The state is the pair {Q1, Q2}:

| state      | Q1 Q2 | R | what happens |
|------------|:-----:|:-:|--------------|
| Start      | 0 0   | 1 | memory is zero-filled at the 1-kHz rate |
| not-Write  | 1 1   | 0 | acquiring; CG falls give PR only |
| Write      | 0 1   | 0 | the next CG fall stores a byte |
| Halt       | 1 0   | 0 | blocked; memory is only read |

With B = Bit 11 OR EXT STOP and X = (CG OR not Q1) AND SRF, the flip-flop
inputs are:

    J1 = (not X AND Q2) OR B      K1 = X AND Q2 AND not B
    J2 = not Q1 AND B             K2 = Q1 AND B
    R  = not (Q1 OR Q2)

Reading these against the table:

- **EXT RST** forces Start at once, with no wait for the strobe. R rises, the
  stage IV divider is held, and AR clears the address counter.
- **Clearing.** In Start, R selects the 1-kHz clock as the write
  controller's trigger and holds the beat counter at 0. Each falling 1-kHz
  edge writes a zero and advances the address. After 1024 writes (0.84 s)
  the address reaches 400h and its carry bit, Bit 11, sets. On the next
  strobe J1 = J2 = 1, so the state becomes not-Write. R falls, which fires a
  second AR. That AR returns the address to 000 and clears Bit 11 within a
  few clock cycles. This is before the next strobe, so the carry does not
  also push the machine into Halt. The design depends on this race: the
  carry clears two clock cycles after R falls, and the strobe period must be
  longer than that.
- **Storage.** Every 10 s the 0.1-Hz edge sets SRF. The state becomes Write
  on the first strobe where SRF AND CG holds. If SRF rose while CG was low,
  that is the next rise of CG. If SRF rose while CG was high, it is the
  next strobe. When CG then falls, Q1 is low, so WE and AI pass the gate.
  The accumulator's byte is written, AI advances the address and clears
  SRF, and on the next strobe K1 drops, J1 rises and the state returns to
  not-Write.
- **Phantom WE.** In not-Write, every fall of CG still fires both one-shots.
  Q1 blocks WE and AI, but PR is not gated, so the counter is preset after
  every measurement.
- **Memory full.** The 1024th storage sets Bit 11 again. In not-Write,
  K2 = 1 and the machine enters Halt, where no input changes the state
  except EXT RST.
- **EXT STOP** acts like Bit 11. From not-Write it halts on the next strobe.
  From Write it takes two strobes (Write, then not-Write, then Halt), so the
  switch must be held for at least two strobe periods (13 us at full
  speed). A push-button always is.

Power-on reset (`rst_n`) puts the machine in Halt. The operator then starts
a recording with EXT RST.

## Timing chain

`clock_module` divides the 5-MHz crystal clock, which is `clk` in this RTL:

| stage | ratio        | output      | use |
|-------|--------------|-------------|-----|
| II    | /32          | 156.25 kHz  | state clock, memory enable strobe |
| II    | /4096        | 1.22 kHz    | memory clearing rate ("1 kHz") |
| III   | /3           | 407 Hz      | feeds stage IV |
| IV    | /2 of III    | 203.45 Hz   | beat period count clock ("204 Hz") |
| IV    | /4096 of III | 0.0993 Hz   | storage request, 10.07 s ("0.1 Hz") |

Stages II and IV are each a 12-bit binary counter with two taps. Stage IV is
held at zero while R is high. So the first storage request comes half a
period (5.03 s) after clearing ends, and the later ones come 10.07 s apart.

## Memory and readout port

`memory_module` holds eight 256 x 4 static RAM chips (`ram_256x4`) as four
pairs, one pair per 256-byte quarter. `data_address_generator` decodes
address bits 9..8 into four enable lines, gated by the enable strobe. Bits
7..0 go to every chip. During WE the count is driven onto the data bus and
stored on every strobe inside the 100-us aperture. The enable strobe is the
156-kHz clock ORed with the external EN.

To read a recording, stop or wait for Halt, then:

1. Pulse `ext_ar` to set the address to 000.
2. Hold `ext_en_n` low. The byte appears on `data_bus`, with
   `data_bus_drive` high.
3. Release `ext_en_n` and pulse `ext_ai` to step to the next address.

Bytes come out in recording order, starting at 000. `address` shows the
current address, for a display. The external lines are ORed with the
internal AR, AI and EN, so they work in any state. During acquisition they
would disturb the recording. All inputs are asynchronous and pass through
two-flip-flop synchronisers.

## From asynchronous logic to one clock

The recorder's control is built from edges and one-shots: toggle flip-flops
on divided clocks, monostables on R and CG, and direct clears. This RTL
keeps every one of those elements, but runs them all on the single 5-MHz
clock:

- Divided clocks are levels. Each consumer detects the edge it reacts to
  with a one-cycle delayed copy.
- Each monostable is `monostable`, a down-counter giving a pulse of a fixed
  number of cycles. It is non-retriggerable. WE is 500 cycles (100 us),
  AI/PR is 50 (10 us), AR is 8 (1.5 us, rounded up) and the QRS pulse is
  750 000 (150 ms).
- Direct clears and presets become synchronous priority terms. AI clears SRF
  before any toggle. R's clear of the counter wins over PR.
- The tri-state data bus becomes `data_bus` plus `data_bus_drive`. The bus
  reads 00 when undriven.

The resulting delays of one to three cycles (under 1 us) are far below any
time constant of the original sequence.

Four rules are written as concurrent assertions, which check every
simulation run with `--assert`:

- Halt is left only through EXT RST (`transition_controller`).
- EXT RST yields Start on the next cycle (`transition_controller`).
- The WE and AI/PR one-shots never overlap (`write_controller`).
- At most one chip pair is enabled at a time (`data_address_generator`).

## Design choices beyond the original description

- J1 is read as `not((CG + not Q1) * SRF) * Q2 + Bit 11`, with Q2 outside
  the inversion. With Q2 inside, the machine would leave Start immediately.
- "Bit 11", the carry that ends clearing and stops acquisition, is the
  eleventh output of the 12-bit address counter, weight 1024. This is the
  carry out of a 1K memory.
- EXT STOP is ORed with Bit 11 wherever Bit 11 enters the flip-flop
  equations.
- The stage IV "hold" input is a synchronous clear driven by R.
- EXT AI also clears SRF, as the external lines are ORed with the internal
  ones.
- The power-on state is Halt.
- Low nibble and high nibble go to the two chips of a pair.
- All one-shots ignore triggers while running. The QRS one-shot thereby
  blanks T waves that survive the filter.
- The heart-rate formula uses M + 51, which makes the counter's 0.25-1.5 s
  range come out right. The stored value is the count itself.

## Limits

- 1024 readings at 10.07 s cover 2.86 hours. A four-hour race fills the
  memory after 2.86 h, and the recorder halts.
- Rates above 240 beats/min (periods under 0.25 s) and below 40 beats/min
  (over 1.5 s) wrap around and cannot be told from valid readings.
- If no counting gate ends within 10 s of a request, for example because
  the heart signal is lost, the toggle flip-flop drops SRF again at the next
  0.1-Hz edge. That storage is then skipped.

## Files

| file | contents |
|------|----------|
| `rtl/cardio_pkg.sv` | state type {Q1,Q2}, preset constant 8'hCD |
| `rtl/cardiotachometer.sv` | top level |
| `rtl/clock_module.sv` | divider chain |
| `rtl/counting_gate.sv` | QRS one-shot and CG toggle |
| `rtl/beat_period_accumulator.sv` | 8-bit presettable beat counter |
| `rtl/data_address_generator.sv` | address counter, Bit 11, enable decoder |
| `rtl/memory_module.sv`, `rtl/ram_256x4.sv` | 1K x 8 memory of 256x4 chips |
| `rtl/state_controller.sv` | groups the next four |
| `rtl/flag_generator.sv`, `rtl/transition_controller.sv`, `rtl/reset_generator.sv`, `rtl/write_controller.sv` | control parts |
| `rtl/monostable.sv`, `rtl/sync2.sv` | one-shot and input synchroniser helpers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cardiotachometer.sv` | end-to-end test at scaled timing |
| `tb/tb_cardiotachometer_full.sv` | one full operation at default parameters |
| `tb/tb_heart_rates.sv` | 45-210 beats/min at default parameters |
| `tb/tb_period_meter.sv` | testbench helper |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. It also has a watchdog. A typical run, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cardiotachometer \
        -y rtl -y tb +libext+.sv -Irtl rtl/cardio_pkg.sv tb/tb_cardiotachometer.sv
    ./obj_dir/Vtb_cardiotachometer

The testbenches are two-state clean: every register has a reset, and the
RAM contents start random. The recorder clears them itself.

**Scaled timing.** All divider ratios and pulse widths are parameters of
`cardiotachometer`, and their defaults are the real values. One 10-s storage
period at full speed is 50 million cycles, so a full recording (1024
storages, 5 * 10^10 cycles) cannot be simulated. `tb_cardiotachometer` uses
strobe /4, clearing clock /16, 0.1-Hz clock /1024 and proportionally shorter
pulses. This keeps the memory size, counter widths and offset. In about 15
s it runs:

- a full clearing, checked as all zero by readout;
- 1024 storages until the carry halts the recorder, using random beat
  intervals across the whole count range, including T-wave edges;
- a readout of all 1024 bytes.

Each byte is checked against the beat interval the testbench generated, to
+-1 count. The testbench also counts how often each mechanism occurred: AR
on both edges of R, clearing writes, storages, phantom WE, Write entered via
CG and via SRF, T-wave rejection, auto stop, EXT STOP, EXT RST and readout.

The largest full-size runs are `tb_cardiotachometer_full` and
`tb_heart_rates`. `tb_cardiotachometer_full` covers one clearing, one
storage (75 beats/min, stored 111) and readout, which is about 7 s of
recorder time. `tb_heart_rates` covers eight storages at 45-210 beats/min,
with every byte within +-1 of floor(203.45 * 60 / rate) - 51. That is about
80 s of recorder time, or 90 s of wall-clock time.
