# Wide-range digital duty-cycle corrector with a counter-based half-cycle delay line

A memory PHY such as HBM transfers data on both clock edges, so the clock's
duty cycle must stay at 50 %. The clock receiver and on-chip distribution
distort it, and the PHY has to run from tens of MHz (when driven by an FPGA
test controller) up to 1.6 GHz. This design corrects any input duty cycle
between 20 % and 80 % across 50 MHz to 1.6 GHz. It locks in a fixed
34 input cycles.

The usual edge-combiner corrector makes the output rise on every input rising
edge and fall half a period later. The half period comes from a digitally
controlled delay line (DCDL). For a 50 MHz clock that line would need 10 ns of
delay at picosecond resolution, which costs a lot of area. Here the delay line
is short: at most about 1.1 ns per pass. A counter sends the edge around it
several times. "Half a period" becomes "N round trips through a short line".
The corrector first measures the frequency to choose N, then trims the line
by binary search.

The corrected clock drives a reduced HBM controller PHY. This is why the duty
cycle matters here: the PHY sends four bits per pin in every controller cycle,
using both edges of a clock twice as fast as the controller's.

## Signal path

```
 clk_p/clk_n -> dcc_clk_buffer -> CLK_IN ---------------------------+
                                    |                               v
                                    |                  +--> dcc_edge_combiner --> CLK_OUT (dcc_out)
                                    v                  |      ^ set on CLK_IN rise
                                 dcc_fsm --CLK_FSM--+  |      | clear on CLK_FB fall
                                  ^   ^             |  |      |
                      code, N, D_H|   |pd_up   replica delay  |
                                  |   |             v  |      |
                                  | dcc_pd <--  switch (D_TR) |
                                  |   ^        in0=CLK_OUT    |
                                  |   |        in1=CLK_FSM'   |
                                  |   |             v         |
                                  +---+------- dcc_hcdl ------+ CLK_FB
```

- `dcc_clk_buffer` converts the differential input to the single-ended CLK_IN.
  It keeps the input's duty error. It also gives a monitor copy (`clk_mon`)
  so the uncorrected clock can be observed.
- `dcc_edge_combiner` drives CLK_OUT high on the rising edge of CLK_IN, and low
  on the falling edge of CLK_FB.
- `dcc_hcdl` is the counter-based half-cycle delay line. Its input is the
  "enable". Its output CLK_FB falls a programmed delay after the enable rises.
- The switch picks what drives the HCDL:
  - in normal operation, CLK_OUT itself. This closes the loop: the output's
    rising edge, delayed by half a period, makes its falling edge.
  - during training, a reference pulse CLK_FSM from the controller.
- `dcc_pd` compares CLK_FB with the end of the reference pulse.
- `dcc_fsm` runs the training and then holds the result.

## The counter-based delay line (`dcc_hcdl`)

The delay line has two parts:

- **Coarse line (CDL).** 1 to 8 stages of 120 ps each, set by a 3-bit code
  converted to thermometer form.
- **Fine line (FDL).** A 5-bit phase interpolator. It blends an edge with a
  copy of the edge one coarse stage later, in 32 steps.

The line's one-pass delay is

    t_DL(code) = 20 + (1 + code[7:5])*120 + 20 + code[4:0]*3.75   ps

This runs from 160 ps (code 0) to 1116.25 ps (code 255). It rises
monotonically, 3.75 ps per code step.

A NAND gate closes the line into a ring oscillator. The enable is the NAND's
other input. While the enable is low, the ring rests with its output CLK_DL
high. When the enable rises:

1. The ring starts oscillating with period 2·t_DL.
2. The counter counts CLK_DL rising edges.
3. At the N-th edge, the counter pulls CLK_FB low. This is 2·N·t_DL after the
   enable rose.
4. When the enable falls, the ring stops and the counter clears. One NAND
   delay later the coarse and fine lines are reset to rest, and any edge
   still travelling inside them is dropped.

The reset in step 4 matters at high frequency. The frequency measurement
runs the line at its longest setting, about 1.1 ns. When the input period is
shorter than that, the edge launched at the start of the measurement is still
inside the line when the enable falls. Without the reset, that edge would
come out after the next enable had risen and be counted as the first ring
period of the next trial. The binary search would then choose a wrong code
for every clock faster than about 900 MHz. A NAND alone cannot prevent this,
because it only stops new edges from entering the ring.

The counter also saves its count at the enable's falling edge. Training uses
this to measure frequency.

**Half-delay mode (D_H).** Above about 450 MHz, the whole input period is
shorter than one ring period at the longest setting (2 × 1116.25 ps), so no
whole N can make half a period. A 2:1 mux then bypasses the counter: CLK_FB is
CLK_DL itself. Its first falling edge comes one pass (t_DL) after the enable, which
in effect gives N = 0.5.

## Training: 34 cycles

Training finds a count C = 2N and a code such that 2·C·t_DL equals one full
input period T. Normal operation then uses N = C/2, which gives
2·N·t_DL = T/2. The reference must be one full period long. Half a period
cannot come from the input itself, because its duty cycle is the thing being
corrected. So CLK_FSM is produced by a divide-by-two of CLK_IN (`dcc_divider`):
each of its pulses is high for exactly one input period.

Cycle by cycle (eK is the K-th rising edge of CLK_IN after reset):

| edges | action |
|---|---|
| e0 – e1 | Count only. The code is all ones (longest line) and the counter has no target. The CLK_FSM pulse lasts e0 to e1, and the counter captures how many ring edges fit into it. |
| e2 | C = captured count + 1, limited to 32. An odd C other than 1 is raised by 1. C = 1 turns on half-delay mode. The counter target becomes C. |
| e2 + 4k … | For each code bit, MSB first, 4 cycles. (1) Clear the bit for a trial and send a CLK_FSM pulse. (2) When the pulse falls, the PD samples CLK_FB. (3) Set the bit from the PD: UP means CLK_FB had already fallen, the loop was too short, so the bit goes back to 1. DN leaves it at 0. (4) Idle, so the ring is at rest before the next trial. |
| e33 | Switch to normal operation. Target = C/2 (or the half-delay path), `locked` rises, and CLK_FSM stops. |

Three points in this schedule need explanation:

- **The captured count starts at 1.** The counter starts from zero. The "+1"
  makes the smallest count that covers a period the one that is used. Because
  C is then rounded up to an even number, the line only ever needs to shorten,
  which the binary search can always do.
- **CLK_FSM pulses once per measuring slot.** It does not toggle all the time.
  With a continuous toggle, the HCDL would still hold CLK_FB low from the last
  trial when the switch hands over to CLK_OUT. The edge combiner could then
  never set CLK_OUT, and the loop would stall.
- **The replica delay.** In normal operation, the HCDL input is CLK_OUT, which
  already lags CLK_IN by the edge combiner's delay. CLK_FB then has to pass
  through the combiner again. During training neither delay is in the loop. So
  CLK_FSM goes through a replica of 2·t_EC before it reaches the switch. The
  trained delay then comes out as exactly half a period in normal operation.
  The phase detector is clocked by the undelayed CLK_FSM.

`train_req` starts a new training from normal operation, for example after a
frequency change. An asynchronous reset (`rst_n` low) does the same.

The result is held in ordinary registers. If the input clock stops, for
example in power-down, and later returns at the same frequency, the corrected
clock is right from the first cycle. No new training is needed.

## The reduced HBM controller PHY (`hbm_phy`)

The controller works at half the PHY clock (a 2:1 frequency ratio). Each
controller cycle it hands over a four-bit word per pin. Each pin has its own
4:1 serializer (`hbm_ser4`), which sends the word over two PHY cycles, one bit
per half cycle, bit 0 first.

Only the pins needed for ACTIVATE, WRITE, READ and PRECHARGE are present:

- row command pins R0, R1, R2 and R4
- column command pins C0 to C3
- one DQ data pin, with its output enable
- the write strobe WDQS, which toggles in the beats that carry write data
- CK_t/CK_c, which are the PHY clock itself

Inside the serializer:

- A flag divides the PHY clock by two. It is brought out as the controller
  clock `dfi_clk`. A word is taken at each rising edge of `dfi_clk`.
- The bit for each high half cycle is registered at the falling edge before
  it. The bit for each low half cycle is registered at the rising edge before
  it.
- The output mux selects by the clock level. Each register changes only while
  the mux is looking at the other one.

All serialized pins therefore share one latency. Bit 0 of a word leaves in
the high half of the second PHY cycle after the word was taken. A clock with
distorted duty would make every other bit short, which is what the corrector
prevents.

**Read path (`hbm_des4`).** Read data comes back on DQ with a read strobe RDQS.
The strobe edges sit in the middle of the bits, and a burst is four bits.
Bits 0 and 2 are taken at rising strobe edges, bits 1 and 3 at falling ones.
A toggle flag, synchronised by two flip-flops, then hands the word to the
controller clock. `dfi_rddata_valid` rises two or three controller cycles
after the last strobe edge.

**CKE test mode.** CKE normally carries the controller's clock-enable bit.
With `test_mode` high it carries the PHY clock instead, so the internal clock
can be checked on a slow pin.

**Reset.** The PHY is held in reset until the corrector reports `locked`, and
again during every retraining.

**What is left to the controller.** The PHY does not interpret commands; their
encoding is the controller's job. There is no read-timing calibration. The
rest of a full HBM2 channel is not here: the other 127 DQ, DBI, DM, parity,
error and redundancy pins.

## Timing models and how far to trust them

The delay lines, edge combiner, replica and clock buffer are analog circuits.
Here they are behavioural models made of transport delays, and they are not
synthesizable. The FSM, divider, counter, muxes, thermometer decoder and phase
detector are plain synthesizable logic.

| Delay | Value | Basis |
|---|---|---|
| coarse stage | 120 ps | the design target |
| fine step | 3.75 ps (1/32 of a coarse stage) | The silicon was quoted near 4.5 ps. 3.75 ps keeps the 8-bit code monotonic, since the interpolator spans one coarse stage. |
| NAND | 20 ps | chosen |
| FDL base delay | 20 ps | chosen |
| edge combiner t_EC | 20 ps | chosen |
| pulse detector width | 30 ps | chosen |
| clock buffer | 50 ps | chosen |
| switch, mux, counter | 0 ps | chosen |

Because the switch, mux and counter are zero-delay, the replica reduces to
2·t_EC. On real silicon it would also include the switch, counter and mux
delays. With these values, the end-to-end test measures an output duty of
50 % ± 0.4 % at every frequency and duty case it runs. That is the
quantisation error of the 3.75 ps step doubled by the counter, plus the
rounding of C. Jitter, supply noise, mismatch and power are not modelled.

Other choices made by this design, not given by the underlying circuit
description:

- the 6-bit count width, and the limit of 32 on C (16 for N)
- the reset behaviour
- `train_req`
- the phase detector: a flip-flop on the falling edge of CLK_FSM that samples
  CLK_FB
- the exact placement of work inside each 4-cycle bit slot

Not built:

- the PLL
- the delay line that aligns the clock with the commands
- the pads
- equalization and crosstalk cancellation on the outputs

The top module is the receiver, then the corrector, then the reduced PHY.

## Files

All files are in `rtl/`:

| File | Contents |
|---|---|
| `dcc_pkg.sv` | widths, schedule constants, state enum |
| `hbm_clocking_top.sv` | Top. Clock side: `clk_p/clk_n`, `rst_n`, `train_req` in; `dcc_out`, `clk_mon`, `locked`, `d_h`, `dcdl_code`, `ncnt_train` out. Also carries the PHY's controller-side (`dfi_*`) and memory-side ports. No parameters. |
| `dcc_core.sv` | the corrector loop |
| `dcc_fsm.sv`, `dcc_divider.sv`, `dcc_pd.sv`, `dcc_counter.sv`, `dcc_clk_mux.sv`, `dcc_bin2therm.sv` | synthesizable logic |
| `hbm_phy.sv`, `hbm_ser4.sv`, `hbm_des4.sv` | PHY, serializer, read deserializer (synthesizable) |
| `dcc_hcdl.sv`, `dcc_cdl.sv`, `dcc_fdl.sv`, `dcc_edge_combiner.sv`, `dcc_replica_delay.sv`, `dcc_clk_buffer.sv` | behavioural models |

All files use `timescale 1ps/1fs`, and delay parameters are `real` picoseconds.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_hbm_clocking_top` runs the whole design at its default size. It covers ten
frequency and duty cases between 50 MHz and 1.6 GHz, some reached by
retraining. For each case it checks the trained count against an independently
computed value, and the output duty cycle. It also counts each mechanism seen:

- odd-to-even count correction
- counter mode
- half-delay mode
- UP and DN decisions
- retraining

At three frequencies it then acts as the memory controller. It sends ACT, WR
with data, RD and PRE through the PHY, and switches on test mode. A small
memory model decodes the pins, stores the write data and answers the read.
Twice the bench also stops the input clock and checks that the output is
corrected at once when the clock returns.

`tb_duty_sweep` trains the full design from reset for two sweeps: input
duty from 20 % to 80 % in 10 % steps at 50 MHz and at 1.6 GHz, and 20 % and
80 % duty at every 100 MHz from 100 MHz to 1.6 GHz. That is 46 cases. The
worst output duty error is 0.1 % at 50 MHz and 0.4 % elsewhere.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/dcc_pkg.sv rtl/*.sv tb/tb_hbm_clocking_top.sv \
          --top-module tb_hbm_clocking_top -o sim && ./obj_dir/sim
```

Use the same command for any other testbench, with its name. Verilator warns
about zero-delay assignments in the behavioural models (`ZERODLY`). These are
intended: the models use transport delays.

To change the design:

- **Resolution.** Edit `T_CDL` or the FDL width (`FDL_BITS` in the package).
  The interpolator step is the coarse stage divided by 2^FDL_BITS.
- **Lowest frequency.** Raise `NCNT_MAX` and `CNT_W`. The lowest frequency is
  about 1 / (2 · 2·NCNT_MAX · t_DL,max).
