# Systolic-RAM: direct convolution by moving data inside an SRAM

Compute-in-memory arrays usually run convolution as a matrix product over an
image-to-column (IM2COL) matrix. In that matrix every pixel of a K x K window
appears K² times, so the data are duplicated outside the array and sent in
again and again. Systolic-RAM avoids this. The kernel window stays still in
the array and the image moves through the bit cells underneath it, one row or
one column per clock. Each pixel is written once.

This repository holds a SystemVerilog model of such a macro:

- a 200 x 64 bit SRAM;
- 25 x 7 multiplying DACs (MDACs) that share charge on seven lines;
- a ring-amplifier kernel broadcast;
- seven 4-bit flash ADCs;
- a phase controller.

The macro computes signed 8-bit 5 x 5 convolutions.

- **Peak:** seven 25-term dot products per cycle, which is 175 MACs per cycle.
- **Continuous:** a 31 x 31 layer, zero-padded to 35 x 35, takes 155 compute
  cycles plus 56 word writes. That is 24 025 MACs in 211 cycles, or 113 MACs
  per cycle.

The array, the data movement and the controller are synthesizable RTL. The
analog parts are behavioural models with ideal arithmetic: the DAC, the
ring amplifiers, the MDAC charge-share lines and the flash ADCs.

## The array

The 64 word lines form eight *row-cells* of eight word lines each. A word
line is 200 bits, which is 25 bytes: one byte for each position of a 5 x 5
window. Byte `p = 5*i + j` sits at bits `[8p+7:8p]`, where `i` is the window
row and `j` the window column.

| word lines | row-cell | contents |
|---|---|---|
| 8r, 8r+1 (r = 0..6) | activation row-cell r, B6T cells | the current 5 x 5 window. The two buffered-6T cells of a bit form one master/slave stage, so both word lines address the same window. |
| 8r+2 .. 8r+7 | activation row-cell r, 8T cells | six words of image columns that have not yet entered the window |
| 56..63 | kernel row-cell | up to eight 5 x 5 kernels; `krc_sel` picks the one to broadcast |

Each activation row-cell sits under one charge-share line of 25 MDACs. MDAC
`p` multiplies window byte `p` by kernel byte `p`, and the line sums the 25
products.

Bytes are **sign-magnitude**. Bit 0 is the sign and bits 7:1 are the
magnitude, so a byte spans -127..+127. A product's sign is the XOR of the two
sign bits. The package `srm_pkg` has `smag_encode` and `smag_value` to
convert bytes to and from integers.

## How a pass moves the image

This is the part that needs the most care.

**The ring.** The seven windows are stacked five image rows apart. Row-cell
r holds rows `5r .. 5r+4`, so together they cover 35 rows. Their B6T cells
are chained by 40-bit systolic buses into a ring. One bus carries one window
row, five pixels.

**Vertical stride (phi1V).** Every window moves down the image by one row.
In each row-cell, window rows shift up by one (row i takes row i+1). The top
row leaves on `vbus_out` and becomes the bottom row of the row-cell above.
Row-cell 0's top row wraps around to row-cell 6. After `off` vertical
strides, row-cell r's window starts at image row

    t(r) = (5r + off) mod 35

A window whose rows wrap past row 34 is not a real output. Its line is marked
invalid: `t(r) > 30`.

**Horizontal stride (phi1H).** Every window moves right by one column. The
columns shift left by one, and column 4 takes a new pixel for each window
row. The new pixels come from the row-cell's 8T cells:

1. The controller raises read word line `rwl`.
2. The addressed word drives the local bit lines.
3. For each window row i, the `LOCAL_ADR` multiplexer picks byte
   `(i, local_adr)` of that word.

**Schedule.** A pass visits kernel columns h = 0..30. At each column it
computes five vertical positions. The first position of a column is reached
by a horizontal stride (none for h = 0), and the other four by vertical
strides. So four moves in five are vertical, and every cycle has exactly one
move and one compute:

| cycle in column | move | compute |
|---|---|---|
| 1 | phi1H (none for h = 0) | lines at offset 4h |
| 2..5 | phi1V | lines at offsets 4h+1 .. 4h+4 |

Over the five positions of a column, the seven lines start at all 35 rows
once. Each line therefore gives 31 valid outputs per column (7 + 6 + 6 + 6 +
6). The pass gives 31 x 31 outputs in 155 cycles.

## Loading an image

A pass expects a 35 x 35 plane `X` (a 31 x 31 image with two rows and columns
of zero padding on each side). The host writes it in 56 word writes: seven
row-cells of eight words each.

- **Window word**, written to word lines 8r and 8r+1: byte (i, j) is
  `X[5r+i][j]`.
- **8T word** w (0..5), written to word line 8r+2+w: byte (i, j) is
  `X[(5r + 4h + i) mod 35][h + 4]`, where `h = 5w + j + 1`.

The 8T word is pre-rotated by `4h` rows. This is because horizontal stride h
happens when the ring has already turned by `4h` rows, so the column it
inserts must match the window's current rows. The controller reads word
`(h-1)/5` at local address `(h-1) mod 5` for stride h.

The result for output row t and column h is
`Y[t][h] = sum_{i,j} X[t+i][h+j] * K[i][j]`.

## Layers with channels

The macro produces one 2-D plane per pass. A layer with several input and
output channels runs as a series of passes, and the channel sums are formed
outside the macro:

    Y[co] = sum over ci of (X[ci] convolved with K[co][ci])

A pass does not disturb the 8T cells. It only consumes the B6T windows. So
after one pass over a plane, a pass with another kernel over the same plane
needs just the seven window words (word lines 8r) written again, not all 56.
Up to eight kernels stay in the kernel row-cell, so a layer with up to eight
(input, output) kernel pairs loads its kernels once.

## Compute path

These models are behavioural.

- **`kernel_broadcast`** stands for the BEOL DACs and the 25 ring amplifiers.
  It drives each byte column's magnitude as a level, with the sign on BL[0].
  While a step is not computing, the amplifiers are in reset and all levels
  are zero (half supply).
- **`mdac_cs_line`** models the C2C ladder. It weighs activation bit n
  (1..7) by 2^(n-1), applies the XOR sign, and sums the 25 MDACs of a line.
  The result `cs` is the exact integer dot product, from -403 225 to
  +403 225.
- **`flash_adc`** has 15 comparators at thresholds `(k-8) * 2^16`:

      code = clamp(floor(cs / 65536) + 8, 0, 15)

The models leave out attenuation, MDAC nonlinearity, the notch
calibration of the capacitors, noise and settling. The real charge-share
voltage is the mean of the charges, not their sum, and it is smaller. The ADC
full scale here was chosen so that the largest possible sum does not clip; on
silicon it would be set by calibration.

## Interface and timing

The top module is `systolic_ram_top`. Everything happens on the rising edge
of `clk`, with an active-low asynchronous reset `rst_n`.

| signal | meaning |
|---|---|
| `wr_en`, `wr_addr[5:0]`, `wr_data[199:0]` | write word line `wr_addr`. Not allowed while `busy` (asserted). |
| `rd_addr` → `rd_data` | read-out, registered: valid one cycle later |
| `krc_sel[2:0]` | kernel word 56+krc_sel to broadcast. It is registered, so a change reaches the lines one cycle later. Set it before the start and hold it for the whole pass. |
| `start_conv` | run a 155-cycle pass |
| `start_vmm` | one compute step with no movement: a 25-element vector times a 25 x 7 matrix, or an IM2COL-style use of the array |
| `busy` | a pass or step is running |
| `step_move` | move of the step issued this cycle (`MV_NONE`, `MV_V`, `MV_H`) |
| `out_valid`, `out_last`, `out_vmm` | a step's results; `out_last` marks the last result of a pass |
| `out_col`, `out_row[r]`, `out_line_valid[r]` | output position of each line |
| `out_code[r]` | 4-bit ADC code of line r |
| `out_cs[r]` | ideal line value, 20-bit two's complement |

A step issued in cycle n moves its data at the edge that ends cycle n. It
computes during cycle n+1, and its results are registered at the edge after
that. The first result of a pass appears three edges after the edge that
samples `start_conv`. The results then come once per cycle for 155 cycles.

## Where this model is its own

These choices are not fixed by the design description. Change them freely:

- **Ring direction and window layout.** A window's top row goes to the
  row-cell above. A 40-bit group is one window row.
- **Horizontal shift.** Columns shift left inside the B6T cells. The
  multiplexer choices are grouped by window row.
- **8T image layout.** The pre-rotation by `4h` follows from the ring and the
  schedule. The byte order inside a word is a choice.
- **Reset value of the local bit lines.** Zero when no read word line is
  active.
- **Kernel row-cell.** It holds eight kernels, chosen by a registered select.
- **Digital I/O.** The address map, the read-out port and the two-cycle
  result pipeline.
- **Data coding and ADC.** The order of the magnitude bits, the ADC
  thresholds and the 20-bit line width.

Not modelled:

- a second macro interleaved with the first, so that image writes hide
  behind compute;
- the capacitor tuning;
- any analog non-ideality.

## Files

- `rtl/srm_pkg.sv`: sizes, the move type, sign-magnitude helpers
- `rtl/b6t_window.sv`: B6T window with vertical and horizontal strides
- `rtl/sram_8t_bank.sv`: six 8T words with an RWL/local-bit-line read and a
  read-out port
- `rtl/lbl_mux.sv`: `LOCAL_ADR` byte selection
- `rtl/activation_row_cell.sv`: one activation row-cell (the three above)
- `rtl/kernel_row_cell.sv`: kernel storage and select
- `rtl/kernel_broadcast.sv`, `rtl/mdac_cs_line.sv`, `rtl/flash_adc.sv`:
  behavioural analog models
- `rtl/srm_controller.sv`: pass sequencer and output tags
- `rtl/systolic_ram_top.sv`: the macro
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_workload_multichannel.sv`: a multi-channel layer built from passes
- `tb/tb_workload_im2col.sv`: the same layer by VMM steps, against a direct pass

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/srm_pkg.sv tb/tb_systolic_ram_top.sv --top-module tb_systolic_ram_top
    ./obj_dir/Vtb_systolic_ram_top

`tb_systolic_ram_top` runs the macro at its full default size, and finishes
in well under a second. It runs three tests:

1. A pass over random data in all 35 x 35 positions.
2. A pass over a zero-padded 31 x 31 image with a second kernel.
3. One VMM step.

Every valid output is checked against a direct evaluation of the convolution
sum and the ADC formula. The testbench also checks:

- the 155-cycle pass length and the result latency;
- the 56-cycle back-to-back image load and the read-back;
- the continuous rate: 24 025 MACs over 56 + 155 cycles is 113 per cycle;
- that every output position comes out exactly once.

It counts the vertical strides, the horizontal strides, the VMM steps, the
kernel switches and the invalid (wrapped) windows, and fails if any of them
never happens.

`tb_workload_multichannel` runs a layer with three 31 x 31 input channels
and two output channels. It uses six passes, with six kernels stored at
once. It checks each pass, and the 56-write plane load and the 7-write
window rewind. It also checks the summed outputs against the channel
equation above.

`tb_workload_im2col` computes the same zero-padded 31 x 31 layer the
indirect way. It writes seven IM2COL patches into the windows for each VMM
step, then runs the layer as one direct pass, and checks that the two
results agree. The indirect way takes 138 steps, 961 word writes (each pixel
written up to 25 times) and 1375 cycles. The direct pass takes 56 writes
and 214 cycles, including the result latency.

Only the default sizes (K = 5, seven row-cells, six 8T words) have been
simulated. The parameters exist for other sizes, but the address map has
room for at most seven activation row-cells, and `LOCAL_ADR` for at most
eight bytes per window row.

The block testbenches compare each module with a reference model written in
the testbench: the window moves, the 8T reads, the multiplexer, the kernel
select timing, the broadcast reset, the signed dot product, the ADC
thresholds and the controller's schedule.
