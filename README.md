# Parallelized sum-pooling convolution accelerator for onboard DQN routing

A satellite in a low-orbit constellation has to pick the next hop for its
traffic on board, in real time, while links come and go. One way to do this is
a Dueling Deep Q-Network (Dueling-DQN) agent: the satellite's view of the
network is a 15x15 grid with four channels (own position, destination,
broken links, boundary). Four convolution + ReLU layers turn it into a
4x4x32 feature map. Small linear advantage and state-value heads then score
the five moves: up, down, left, right, stay. The convolutions take almost all
of the inference time, so they are the part moved from the onboard processor
into programmable logic.

This repository holds the programmable-logic half: a convolution engine that
the processor calls once per layer. The processor keeps the grid model, the
linear heads and the choice of action.

## The idea: turn the loop nest inside out

A convolution written the usual way finishes one output feature at a time:

```
for out channel i, output column j, output row k:
    result = 0
    for in channel x, kernel row y, kernel column z:
        result += in[x][k+y][j+z] * w[i][x][y][z]
    out[i][k][j] = ReLU(result + bias[i])
```

Every multiply-accumulate depends on the one just before it. A pipelined
floating-point adder therefore has to wait its full latency between
iterations.

This engine reorders the loops so that the output-plane loops are innermost:

```
for out channel i:
    result[out_w * out_h] = 0                 <- the result buffer
    for in channel x, kernel row y, kernel column z:
        for output column j, output row k:      <- one iteration per clock
            result[j*out_h + k] += in[x][k+y][j+z] * w[i][x][y][z]
    out[i][*][*] = ReLU(result[*] + bias[i])
```

The dependency is still there, but two updates of the same buffer position
are now a whole output plane apart. If the plane has at least as many
positions as the loop body has pipeline stages, a new iteration can start
every clock. The sum of each feature is still built in the same order, so the
results are the same as the usual loop's, rounding included.

## The 14-cycle loop body and the dependency rule

For an iteration issued at cycle `t`, the loop body (`psp_conv_core`) is a
fixed pipeline:

| cycle  | work                                                                     |
|--------|--------------------------------------------------------------------------|
| t      | read conv_in, conv_bias and the result buffer; the tap's weight is read at the first position of a pass and held for the rest of the plane |
| t+1    | `fp32_mul`: conv_in x conv_weight (3 cycles)                             |
| t+4    | `fp32_add`: partial sum + product (4 cycles)                             |
| t+8    | `fp32_add`: sum + bias (4 cycles)                                        |
| t+12   | ReLU: a value <= 0 becomes +0                                            |
| t+13   | write the sum back to the result buffer; on the last kernel pass, write ReLU(sum + bias) to conv_out |

A buffer position is read at `t` and written at `t+13`, so the body spans
`C_COM = 14` cycles. The next read of the same position comes one plane
later, so full rate needs

```
out_w * out_h >= C_COM (14)
```

The four network layers have planes of 100, 49, 25 and 16 positions, so all
of them run at one multiply-accumulate per clock.

For smaller planes the loop controller (`psp_loop_ctrl`) does not give a wrong
answer. Before each pass that re-reads the buffer, it inserts
`C_COM - plane` idle cycles. An output-channel boundary gets no idle cycles,
because the first pass of a channel starts from zero and never reads the
buffer. The buffer read returns 0 on that first pass, so no clearing pass is
needed. A layer therefore takes

```
cycles(start -> done) = out_ch*in_ch*K*K*plane
                      + out_ch*(in_ch*K*K - 1)*max(0, 14 - plane)
                      + 14
```

The `last_cycles` output reports this count. The loop-controller, core and
end-to-end testbenches check it for every layer they run.

## Numbers

Everything is IEEE-754 single precision, which matches the `float` arithmetic
of the software model. The multiplier and adder are written out in full, with
round to nearest, ties to even. Two simplifications apply:

- Subnormal inputs are read as zero, and results below the normal range are
  flushed to zero.
- Any NaN becomes `7fc00000`.

Network activations are far from those ranges. A product or a sum is
bit-exact with a correctly rounded float operation.

## Using the engine

`psp_conv_accel` is the top. It holds four buffers (`sdp_ram`) and the core:

| buffer      | words (default) | layout                          |
|-------------|-----------------|---------------------------------|
| conv_in     | 3200            | `[ch][row][col]`                |
| conv_weight | 16384           | `[out_ch][in_ch][ky][kx]`       |
| conv_bias   | 32              | `[out_ch]`                      |
| conv_out    | 3200            | `[ch][row][col]`                |
| result buffer (in the core) | 100 | `[col*out_h + row]`        |

The depths fit a network with 32 channels after every layer: 32x10x10
feature maps and 32x32x4x4 weights. Convolutions are stride 1 without padding,
so `out = in - K + 1`. This gives the chain 15 -> 10 -> 7 -> 5 -> 4.

One layer:

1. Write conv_in, conv_weight and conv_bias through `host_we`, `host_sel`
   (`SEL_IN`, `SEL_W`, `SEL_BIAS`), `host_waddr` and `host_wdata`. Write one
   word per clock, and only while `busy` is low.
2. Set `cfg = {in_ch, in_h, in_w, ksize, out_ch}`. Each field is 8 bits;
   `psp_pkg::layer_cfg_t` defines the struct. Pulse `start` for one clock.
3. Wait for the one-clock `done` pulse. `busy` is high from the clock after
   `start` until `done`.
4. Read conv_out through `host_raddr`. `host_rdata` follows one clock later.

For the full network, run four layers and copy each conv_out back into
conv_in between them. An assertion flags a layer whose output plane exceeds
the result buffer, and another flags buffer writes while `busy` is high.

`stall` is high on each idle cycle that the dependency rule inserts.
`relu_zero` is high when ReLU clamps an output word. Both are meant for event
counting.

At the default sizes, one pass through the four layers takes
460814 + 802830 + 230414 + 65550 = 1,559,608 clocks. These are the
multiply-accumulate counts of the layers plus 14 cycles each.

## Where this RTL goes beyond, or differs from, the published description

- The published design was produced by high-level synthesis. Its source gives
  the loop order, the result buffer, the 14-cycle body and the `C_com <=
  buffer size` condition. The pipeline split into read, multiply,
  accumulate, bias, ReLU and write-back stages is this design's own. It adds
  up to the same 14 cycles.
- When the condition fails, the source says only that full pipelining is
  lost. The idle-cycle insertion described above is this design's way of
  staying correct.
- The processor-side transport is not described in the source: the bus, the
  DMA and the register map. The simple host ports stand in for it, and
  `last_cycles` is an addition.
- The source gives only the 4 input channels and the 32 final channels. The
  32 channels in the middle layers are an assumption, and they set the
  buffer depths.
- In the reference loop, the output store and ReLU sit inside the innermost
  loop, so every pass overwrites conv_out. Here conv_out is written only on
  the last pass. The final contents are the same.
- The processor, the Dueling-DQN heads, the grid environment and the vendor
  bus infrastructure are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_fp32_mul`, `tb_fp32_add`: stream one operand pair per clock, covering
  random operands, cancellation, far alignment, ties, zeros, infinities, NaN
  and overflow. Each result is compared bit for bit, at exactly the unit's
  latency, with a double-precision result rounded once to single precision
  (`tb/fp_ref_pkg.sv`).
- `tb_sdp_ram`, `tb_psum_buffer`: random traffic against a shadow array,
  including read-during-write and the zero-start read.
- `tb_psp_loop_ctrl`: every issued address, flag and buffer position is
  checked against a software loop walk for several shapes, including 1x1 and
  3x3 planes. The test also checks the distance between reuses of a buffer
  position and the exact cycle count.
- `tb_psp_conv_core`: five layer shapes with random data. Each output must
  equal, bit for bit, the usual loop nest evaluated in single precision, and
  must lie close to the same loop in double precision. Every
  output must be written exactly once, and the cycle counts must match.
- `tb_psp_conv_accel` runs end to end at the default sizes. It builds the
  grid state: agent at (2,2), goal at (10,10), random obstacles and a border.
  It runs all four layers through the host ports, checks each layer bit for
  bit against the usual loop nest in single precision, checks the final
  4x4x32 map against a reference kept in double precision all the way, and
  checks every layer's cycle count.
  It then runs a 3x3-plane layer so that idle-cycle insertion happens, and it
  fails unless full-rate layers, idle cycles, ReLU clamping and channel
  restarts each occur.

Run any of them with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/psp_pkg.sv tb/fp_ref_pkg.sv tb/tb_psp_conv_accel.sv \
    --top tb_psp_conv_accel
./obj_dir/Vtb_psp_conv_accel
```

The full-size run simulates about 1.6 million clocks and takes a few seconds.
The floating-point reference relies on `$realtobits`/`$bitstoreal`, and
deliberately not on `shortreal`, because Verilator computes `shortreal` in
double precision.

## Changing it

- Buffer sizes are parameters of `psp_conv_accel`. `BUF_DEPTH` must be at
  least the largest output plane.
- Layer dimensions are 8-bit fields and addresses are 16-bit
  (`psp_pkg::DIM_W`, `ADDR_W`). Widen `ADDR_W` for buffers above 65536 words.
- `MUL_LAT` and `ADD_LAT` in `psp_pkg` document the unit latencies, and
  `C_COM` is derived from them. If you re-pipeline `fp32_mul` or `fp32_add`,
  update these constants together with the delay lines in `psp_conv_core`.
