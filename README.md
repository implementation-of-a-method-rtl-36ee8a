# Comparing two time scales on an FPGA: a carry-chain TDC with a PPS fiber link

Two stations each hold a time scale: a clock that gives a pulse-per-second (PPS) edge.
The job is to measure, to a few picoseconds, how far apart the two PPS edges are.

Each station sends its PPS to the other over an optical fiber. A time-to-digital converter (TDC) on
the FPGA measures the interval between the local PPS and the remote one. The TDC has two parts:

- a fast clock counts whole clock periods (the coarse part);
- two tapped delay lines, built from the FPGA's adder carry chain, measure the fractions of a period
  at each end (the fine part).

Everything is SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## The measurement

Each measurement gives the interval between a *start* edge and a *stop* edge:

    dT = T_A + N * T_clk - T_B

- `T_A` is the time from the start edge to the next rising clock edge. Delay line A measures it.
- `N` is the number of clock periods from that edge to the first clock edge after the stop edge.
  The coarse counter counts it.
- `T_B` is the time from the stop edge to its next clock edge. Delay line B measures it.

Default values:

- `T_clk` = 4 ns.
- Each line has 759 elements, at a mean delay of 8.59 ps per element. A line therefore covers
  about 6.5 ns, more than one clock period, so a fraction is never lost.
- The counter has 16 bits, so the measurement window is (2^16 − 1) × 4 ns ≈ 262 µs.
- A fine time is `n × tau`, where `n` is the number of elements the edge passed and `tau` the mean
  element delay.

## Carry-chain delay line (`carry_delay_line`, `full_adder`)

This is the least obvious part.

**The line.** An adder of `LINE_SIZE` bits is given operands A = 0 and B = all ones, and its
carry-in is driven by the trigger.

- While the trigger is 0, every sum bit is 1.
- When the trigger rises, the carry ripples up the chain. Each sum bit falls to 0 as the carry
  passes it.
- Each carry stage therefore acts as one delay element. The sum bits are its taps.

**The capture.** A row of flip-flops, clocked by the *stop* signal (the next clock edge), samples all
the sum bits at once. The captured word has zeros from bit 0 up to the point the carry had reached.
Everything above that point is still 1.

**The model.** In simulation each carry stage has a delay of `CARRY_DELAY_PS` (8.59 ps by default).

- Each stage is its own net inside a generate loop, so a change wakes only the next stage.
- In silicon the delays are not uniform. The design does not model that spread.
- The line needs `LINE_SIZE × tau` to return to all ones after the trigger falls, and a new
  measurement must wait for it.

**Reset.** The operand registers can be reloaded through `op_load`. They reset to A = 0 and
B = all ones, so the line works with no setup.

## Priority encoder (`prior_encoder`)

The encoder turns the captured word into a count of elements.

- Real carry chains leave *bubbles*: isolated wrong bits near the transition.
- The encoder therefore reports the position of the *highest* 0 bit, plus one, rather than the
  first 1. A bubble below the transition does not change the result.
- It needs two clock edges while `decode` is high: one to register the count and one to raise
  `valid`.

## Synchronisation logic (`tdc_sync_logic`)

This block turns the two input edges into the control signals of both lines and the counter.

- `start` starts line A. `stop` starts line B.
- Each line is captured (`stop_dline_A/B`) on the first rising clock edge after its own trigger.
- `count_enable` is high between the two captures. It is the counter's window.
- An assertion checks that line B is never captured before line A.
- Everything returns to idle only on `reset`. The design makes one measurement per reset.

## Coarse counter and result (`coarse_counter`, `tdc_result`, `tdc_core`)

**Coarse counter.**

- It counts rising edges while `count_enable` is high.
- On the edge after the window closes it buffers the count and clears itself.
- If the count wraps, a sticky `overflow` flag is set. This happens when the interval is longer
  than the window, for example when the remote PPS is missing.

**Result.** `tdc_result` works out `dT` in signed femtoseconds, in a 48-bit result:

- `tau` is the fixed constant `TAU_FS` = 8590 fs.
- `T_clk` is `TCLK_FS` = 4,000,000 fs.
- The result is negated when the normalizer reports that the remote edge came first.

**Core.** `tdc_core` joins the blocks above. The raw numbers come out as a `tdc_raw_t` struct:
`n_a`, `n_b`, `n_clk` and the sign.

- `ready` rises three clock edges after line B is captured.
- The result is loaded once per measurement.

In the original design, software does this arithmetic from the raw registers. The hardware copy here
is this design's addition. Both paths are checked against each other in simulation.

## Normalizer and source switch (`pps_normalizer`)

The local and remote PPS can arrive in either order, but the TDC needs start before stop.

- The normalizer latches a rising edge on each input.
- `start` is "either input has risen". `stop` is "both have risen".
- `negative` records that input 2 came first.
- `sel_src` chooses the pair of inputs: the two PPS signals, or the two outputs of the delay
  generator.
- `dbg_1` and `dbg_2` bring out the selected pair.

## Delay generator (`delay_generator`)

The generator is a calibration source.

- Once every `REPETITION` clock cycles (2^26 by default) it lets one clock pulse through.
- That pulse enters a 256-element delay line. `output_1` is the start of the line.
- `output_2` is tap `delay × 4`, chosen by the 6-bit `delay` input, so 64 settings cover the
  whole line.
- The element delay, `ELEM_DELAY_PS`, is a model parameter (100 ps by default).

## PPS over fiber: PRBS15 scrambler and descrambler

A PPS is a signal that hardly ever changes, which suits a fiber transceiver badly. Before it leaves
the station it is therefore scrambled by a multiplicative (self-synchronising) scrambler with the
polynomial x^15 + x^14 + 1:

    out = in ^ D(13) ^ D(14)

The scrambler feeds `out` back into its shift register. The descrambler feeds in the received bit
instead, so after 15 bits it locks to any sender with no shared reset.

Both run on `sel_clk`. In both blocks the output is a combinational XOR of the data bit and two
register taps, so a PPS edge passes through with its exact timing. It is not rounded to a clock
edge.

That only holds when the receiver's `sel_clk`, as seen through the link, lines up with the
sender's clock. Then the tap changes at the receiver and the scrambled bit changes that arrive
with them cancel. If the clocks drift apart, the recovered PPS shows short glitches. In the
original system this alignment comes from the shared master clock.

The end-to-end testbench models this case in three ways:

- the fiber delay is a whole number of `sel_clk` periods;
- each received bit lands just after the receiver's clock edge has sampled the previous one;
- no measurement starts until the descrambler has been fed 15 good bits, which takes one fiber
  delay plus 15 clocks after start-up.

The TDC then measures the recovered edge against the local PPS.

## Register map (`nios_pio_bank`)

The bank is an Avalon-MM slave for the station's soft processor.

- It uses word addresses. The byte offsets below are the low 12 bits of the processor's base
  addresses.
- Reads have one cycle of latency.
- Each PIO has its data at +0 and an interrupt mask at +8. `ready_read` also has an edge-capture
  register at +0xC; any write to it clears it.
- `irq` is high while an unmasked ready edge is captured.
- `ready_read` and `sfp_inserted` pass through two-flop synchronisers.

| byte offset | name | dir | content |
|---|---|---|---|
| 0x0C0 | sel_src | out | 0 = PPS, 1 = delay generator |
| 0x0D0 | delay_sign | in | `negative` |
| 0x0E0 | mode | out | 0 = master (measures), 1 = slave (loops PPS only) |
| 0x0F0 | reset | out | measurement reset (1 = held) |
| 0x100 | ready_read | in, irq | result ready |
| 0x110 | digit | in | reads 0 (no function defined) |
| 0x120 | cnt | in | coarse count N |
| 0x130 | stop | in | elements of line B |
| 0x140 | start | in | elements of line A |
| 0x150 | delay | out | generator tap, 6 bits |
| 0x160 | sfp_inserted | in | SFP presence, 2 bits |

Firmware sequence for one measurement:

1. Write `reset` = 1, then `reset` = 0.
2. Wait for the ready interrupt.
3. Read `start`, `stop`, `cnt` and `delay_sign`.
4. Compute `dT`.
5. Clear the edge capture.

## Top (`tdc_system_top`)

One station:

- The local PPS is scrambled onto `sfp_tx`.
- `sfp_rx` is descrambled into the remote PPS.
- The normalizer feeds the TDC core, and the register bank controls and reads it.
- In the slave role the normalizer sees no PPS input, and the station only sends its PPS.

**Not part of the RTL:**

- the processor and its peripherals (UARTs, timer, on-chip memory, I2C masters for the SFP modules);
- the board circuits (clock conditioning, buffers, SFP modules, USB bridge);
- making the 4 ns clock. `t2d_clk` is a port.

## Simulating

All files use `timeunit 1ps; timeprecision 10fs`, so the picosecond delays are kept exactly.
Compile the package first:

    verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tb_tdc_core.sv \
        --top-module tb_tdc_core -o sim && ./obj_dir/sim

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_tdc_core` | full 759-element lines; random intervals from 0 to many periods, correct to within one tau; counter overflow |
| `tb_tdc_system_top` | two stations joined by a modelled fiber. A master and a slave run PPS measurements of either sign through scrambler, fiber and descrambler. It also runs delay-generator measurements, the interrupt and register read-out, and an overflow. `GEN_REPETITION` is reduced |
| `tb_tdc_system_full` | the same two stations with every top parameter at its default; one PPS comparison with the remote edge later and one with it earlier |
| others | one per block |

The two-station testbenches are slow: about 2 µs of simulated time per second of run time. That is
because every element of the four 759-element lines (two per station) is simulated as its own
timed event.

## Departures and choices

- The element delay is uniform in the model. A real chain needs a calibration (code-density test),
  which is not modelled.
- How the gates inside the synchronisation logic and the normalizer are arranged is this design's
  own. What the blocks must do is not.
- Several points are this design's own:
  - the `ready` latency;
  - the one-measurement-per-reset protocol;
  - the overflow flag;
  - the femtosecond hardware result;
  - the PIO register layout;
  - the scrambler reset value (all ones).
- The delay generator's tap step (4) and element delay are assumed.
