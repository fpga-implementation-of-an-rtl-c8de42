# A 128-point FFT processor with a CORDIC butterfly

This is a small real-time spectrum engine. It takes a stream of 8-bit real samples,
cuts it into frames of 128, and for each frame outputs the magnitude of all 128 DFT
bins. It has no hardware multiplier in the butterfly. The twiddle-factor
multiplication is a rotation, and a shift-and-add CORDIC does it one micro-rotation per
clock. The same CORDIC, switched to vectoring mode, turns each complex result into its
magnitude at the end.

The architecture is a monoprocessor FFT, built from small named blocks:

| block | module | role |
|---|---|---|
| RAMXI, RAMXII | `fft_ram` | real parts. While one of them fills with new samples, the other is transformed (ping-pong). |
| RAMY | `fft_ram` | imaginary parts. Only needed during the transform. |
| ADDRESS | `fft_address` | walks the radix-2 decimation-in-frequency flow graph. For each butterfly it gives FI (P address), SE (Q address) and the twiddle index k. |
| COUNT | `fft_count` | 7-bit counter for the vectoring pass and for clearing RAMY after reset |
| DISP | `fft_disp` | input address INP and display address DIS |
| address muxes SX1, SX2, SY | `addr_mux` | choose the address of each RAM. The X RAMs have 5 inputs; RAMY has 4 (no DIS). |
| SUMDIFF (X and Y) | `sumdiff` | P register plus adder/subtractor. Gives (P-Q)/2, then (P+Q)/2. |
| CORDIC | `cordic` | rotation by -2πk/128, or vectoring |
| SCALE (X and Y) | `scale` | multiplies (P+Q)/2 by the CORDIC gain K |
| bus buffers | `tri_bus` | the shared buses: the CORDIC input (TROT/TVEC) and the RAM write data |
| controller | `fft_ctrl` | phases PH1/PH2, pass sequencing, selects and enables |
| top | `cordic_fft128` | wires the above together |

`fft_pkg` holds the shared constants: the sizes, the select codes, the arctangent table
and the CORDIC gain.

## The butterfly and the CORDIC gain

A decimation-in-frequency butterfly maps the pair (P, Q) to P+Q and (P−Q)·W^k, where
W = e^(−j2π/128). In this design:

1. **P cycle.** The address is FI. Both SUMDIFF registers capture P: its real part from
   the X RAM and its imaginary part from RAMY.
2. **Q cycle.** The address is SE, and the RAMs now show Q. SUMDIFF outputs (P−Q)/2. The
   TROT path of the bus carries it into the CORDIC, which starts a rotation by
   −2πk/128.
3. **SUM cycle.** SUMDIFF outputs (P+Q)/2, and SCALE captures it.
4. **Write P.** The address is FI. SCALE's result, K·(P+Q)/2, is written over P.
5. **Write Q.** The address is SE. When the CORDIC finishes, its result,
   K·(P−Q)·W^k/2, is written over Q, and ADDRESS steps to the next butterfly.

A CORDIC rotation always stretches the vector by K = ∏ sqrt(1+2^−2i) = 1.64676 (16
iterations). Nothing removes this gain. Instead, SCALE multiplies the other butterfly
output by the same K, so both outputs of every butterfly carry the same factor. SCALE
works while the CORDIC iterates, so it adds no time. After 7 stages every bin carries
K^7. The vectoring pass adds one more K.

The halving in SUMDIFF is this design's addition. With a growth of up to 2·K per stage,
16-bit words would overflow after a few stages. With the halving, a stage grows the
data by at most K. The input is stored as `sample << 2`. The end-to-end gain is then

    out_data[b] = |X[b]| / 128 · K^8 · 4        (X = DFT of the 8-bit input frame)

A full-scale DC frame of 127 gives about 27 500, which still fits in 16 bits signed.
The worst case (full-scale DC or alternating ±128) is exercised by the end-to-end test.

### CORDIC details (`cordic.sv`)

- Angles are binary: a full turn is 2^20. The target angle is −k·2^13.
- The table is ATAN[i] = round(atan(2^−i)/(2π)·2^20), for i = 0..15.
- Rotation: angles below −90° are first rotated by −90°, using (x, y) → (y, −x).
  The residual angle is then within the CORDIC convergence range of about ±99.9°.
- Vectoring: a vector with negative x is first negated, which is a 180° rotation.
  After 16 iterations, x_out ≈ K·|v| and y_out ≈ 0.
- Two guard bits are used inside, and the outputs saturate to 16 bits.
- Timing: `start` captures the inputs. `done` comes exactly 17 cycles later, and the
  result stays valid until the next start.

## Frame flow and the bank phases

`ph1` = 1 means PH1. Samples go into RAMXII while RAMXI is processed and displayed.
`ph1` = 0 means PH2, the other way round.

DISP's INP counter advances with every `in_valid`. When the 128th sample of a frame
arrives and the controller is idle, the phase flips. The controller then runs three
passes on the full bank:

| pass | cycles | what happens |
|---|---|---|
| butterflies | 448 × 19 | 7 stages × 64 butterflies, in place. Results end in bit-reversed order. |
| vectoring | 128 × 18 | COUNT addresses each bin. TVEC carries X and Y straight from the RAMs into the CORDIC in vectoring mode. K·\|X\| is written back to the X RAM and 0 to RAMY. This leaves RAMY clean for the next frame. |
| display | 128 | DIS = bit-reverse(bin) reads the bins in natural order: `out_valid`, `out_index`, `out_data` |

From the cycle in which a frame fills to its last displayed bin takes 10 944 clocks.
The real-time condition is therefore at least 86 clocks per sample (128 × 86 ≥ 10 944).
A frame that fills while the previous one is still in work is dropped: `overrun`
pulses, the phase does not flip, and the next frame overwrites the same bank. After
reset the controller spends 128 cycles writing zeros into RAMY. `busy` is high while a
frame is in work. `frame_done` pulses with its last bin.

RAMY's multiplexer keeps its INP input, but the controller never selects it. RAMY is
zeroed by the clear after reset and by each vectoring pass.

## Departures and choices to be aware of

- **Word width.** All RAMs and the datapath are 16 bits wide, and input samples are 8
  bits. The source architecture gives the RAMs as 128×8 but the SUMDIFF register as 16
  bits. 16 bits is used throughout, because 8-bit storage cannot hold the growth of the
  transform.
- **Scaling.** The halving in SUMDIFF and the `<< 2` on input (`IN_SHIFT`) are added to
  avoid overflow. The accuracy is about ±75 LSB on a full scale of about 27 500. The
  test tolerance is 100 LSB + 1 %.
- **Magnitude, not power.** The vectoring pass gives |X|·K. It does not give |X|².
- **Cycle count.** The reference figure for this architecture is 10 690 clocks per
  transform, with no breakdown given. This schedule takes 10 944, display included.
- **Tristate buses.** These are built as AND-OR multiplexers with one-hot enables, and
  an assertion checks that at most one driver is on. An idle bus reads 0.
- **RAM read.** Reads are asynchronous, like distributed FPGA RAM. A block-RAM target
  with a registered read would need one more cycle in the P and Q steps of the
  controller.
- **Not included.** The display device and the FPGA board are outside the logic. The
  `out_*` ports are where a display would connect.

## Interface of `cordic_fft128`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid, in_data | in | 1, 8 | one signed sample per strobe |
| out_valid, out_index, out_data | out | 1, 7, 16 | one bin per cycle, in natural order |
| frame_done | out | 1 | with the last bin of a frame |
| overrun | out | 1 | a full input frame was dropped |
| ph1 | out | 1 | current bank phase |
| busy | out | 1 | a frame is being processed |

Parameters: `IN_W` = 8, `IN_SHIFT` = 2, `ITER` = 16 (1 to 16). The top gives SCALE the
gain that matches `ITER`, taken from a table in `fft_pkg`. Fewer iterations give a
shorter butterfly but a coarser rotation angle.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at default parameters:

    verilator --binary --timing --assert -Irtl -Itb rtl/fft_pkg.sv tb/tb_cordic_fft128.sv \
        --top-module tb_cordic_fft128 -Mdir obj && ./obj/Vtb_cordic_fft128

`tb_cordic_fft128` feeds six frames at 90 clocks per sample:

- two tones
- noise
- a frame sent at full speed that must be dropped
- a full-scale DC frame
- a full-scale alternating frame
- zeros

It compares every bin with a floating-point DFT. It checks the 10 944-cycle latency and
counts the bank swaps in both directions, the rotations, the vectorings and the
overrun. The block tests check these against independent models:

- the CORDIC in both modes for every k
- the flow-graph addresses
- the controller's 19-cycle butterfly pattern, with stand-in blocks
- the counters, SUMDIFF, SCALE, the multiplexers and the RAM
