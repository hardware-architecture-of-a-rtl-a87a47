# Wavelet based multiple line addressing driver for a 96 x 110 passive matrix display

A passive matrix display driven by multiple line addressing (MLA) applies a set
of orthogonal-like row functions to many rows at once and computes matching
column voltages. If the row functions are the basis vectors of a 9/7 wavelet,
the column voltages for one frame are

    G = c * B * (F_n^T)^-1

where B is the wavelet transformed frame (exactly what a wavelet video decoder
holds before its inverse transform) and F_n is the n x n one-level 9/7 analysis
matrix. The display itself then performs the inverse transform optically, so
the receiver never computes an IDWT. This RTL implements that driver for a
display of 96 rows by 110 columns.

## Data flow

1. `input_stage` registers `write_start` twice and delays the compressed data
   by four clocks.
2. `address_controller` sequences a frame of 96 lines. Each line time is 110
   slots of 110 clocks. One input coefficient is written per slot (the write
   rate is 1/110 of the read rate).
3. `dual_port_ram` (220 words) is split into two 110-word halves used in
   ping-pong fashion: line L is written into one half while line L-1 is read
   from the other, 110 times over.
4. In slot j the controller pairs RAM word k with coefficient (k, j) of
   `rom_wav_matrix`, so the `mult_add_engine` produces column j of G after 110
   products. Columns therefore come out in the order the column drivers need
   them (column-sequential multiplication).
5. `col_convert` applies the scale c (a right shift, rounding, saturation to 8
   bits) and drives `kolom`; `kolom_enable` pulses when a new value is loaded.
6. `rom_rijsturing` holds the 96 x 96 row matrix F_m; entry (line, j) is
   presented on `rij` in slot j (zero for j >= 96), aligned with `kolom`.

A frame takes 97 line times (the first only writes, the last only reads), i.e.
97 * 110 * 110 clocks. `done` pulses with the last column of the frame.

## ROM contents

Both ROMs are filled at start-up from the 9/7 lifting transform in
`wmla_pkg`: column r of F_m is the forward transform of the unit vector e_r,
and row k of (F_n^T)^-1 is the inverse transform of e_k. The lifting steps use
the constants a = -1.586134342, b = -0.05298011854, g = 0.8829110762,
d = 0.4435068522, K = 1.149604398 with whole-sample symmetric extension at both
ends, and each line is ordered [low band | high band].

## Choices not fixed by the architecture

- Data 12 bit signed, coefficients 16 bit (14 fractional), row values 8 bit
  (6 fractional), columns 8 bit signed, c = 1/16. All are parameters in
  `wmla_pkg`.
- Input timing: sample s of a frame must be stable on `compressed_data` during
  the 110 clocks starting at the `write_start` pulse plus s*110; it is written
  at the last clock of its slot.
- The row output serialises one row value per column slot; how the row drivers
  take the values is outside this design.
- A scheme with an extra input bit selecting matrices for a lower display
  resolution is not built.

## Status and trust

All modules pass lint with Verilator and elaborate with slang. No testbenches
are included: the end-to-end behaviour (timing alignment between RAM, ROM and
MAC, and numerical output) has not been verified in simulation, so treat the
design as unverified.

## Simulating

    verilator --binary -Irtl rtl/wmla_pkg.sv rtl/*.sv --top-module <your_tb>

Reduce `N` and `M` on `wmla_top` (both even) for short runs.
