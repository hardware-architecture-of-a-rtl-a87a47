// rom_rijsturing - row signal ROM ("rijsturing" = row driving) holding the
// m x m row matrix F_m of the multiple line addressing scheme.
//
// In wavelet based multiple line addressing every row is driven in each line
// time i with a wavelet coefficient: row r receives F_m(i,r), the r-th entry of
// the i-th 9/7 analysis basis vector. The matrix is independent of the video,
// so it is a constant table. Entry (i,r) sits at address i*M + r; one extra
// word at address M*M holds zero and is read while no row value is being sent.
//
// The table is computed when the design starts (initial block): column r of F_m is the forward 9/7
// lifting transform of the unit vector e_r (see wmla_pkg), rounded to W-bit
// signed with FRAC fractional bits.
//
// Interface: synchronous read, data appears one clock after addr.
// Document: a ROM of row-matrix wavelet coefficients for a 96-row display,
// 8 row output bits. Own choices: address layout, zero word, number format.
module rom_rijsturing
  import wmla_pkg::*;
#(
  parameter int unsigned M      = M_ROWS,
  parameter int unsigned W      = ROW_W,
  parameter int unsigned FRAC   = ROW_FRAC,
  localparam int unsigned DEPTH = M * M + 1,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       addr,
  output logic signed [W-1:0] data
);

  logic signed [W-1:0] rom[DEPTH];

  // Fill the table once at start-up from the forward lifting transform.
  initial begin
    rvec_t v;
    for (int unsigned r = 0; r < M; r++) begin
      v = fwd97(unit_vec(r), M);
      for (int unsigned i = 0; i < M; i++) rom[i*M+r] = W'(quantize(v[i], FRAC, W));
    end
    rom[M*M] = '0;
  end

  always_ff @(posedge clk) begin
    data <= (addr < AW'(DEPTH)) ? rom[addr] : '0;
  end

endmodule
