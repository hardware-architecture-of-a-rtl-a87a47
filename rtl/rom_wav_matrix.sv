// rom_wav_matrix - coefficient ROM holding the n x n matrix (F_n^T)^-1.
//
// The column voltages of one display line are G(i,:) = c * B(i,:) * (F_n^T)^-1,
// where F_n is the one-level bi-orthogonal 9/7 analysis matrix. Because the
// matrix does not depend on the video it is a constant table. Entry (k,j) sits
// at address k*N + j, so the controller walks k (the coefficient index of the
// line) for a fixed output column j, which is the column-sequential order of the
// multiplication.
//
// The table is computed when the design starts (initial block): row k of (F_n^T)^-1 equals the inverse
// 9/7 lifting transform of the unit vector e_k (see wmla_pkg), rounded to
// COEF_W-bit signed with COEF_FRAC fractional bits.
//
// Interface: synchronous read, data appears one clock after addr.
// Document: ROM of (F_n^T)^-1 with n = 110 addressed by the address controller.
// Own choices: address layout, number format, lifting/boundary convention.
module rom_wav_matrix
  import wmla_pkg::*;
#(
  parameter int unsigned N      = N_COLS,
  parameter int unsigned W      = COEF_W,
  parameter int unsigned FRAC   = COEF_FRAC,
  localparam int unsigned DEPTH = N * N,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       addr,
  output logic signed [W-1:0] data
);

  logic signed [W-1:0] rom[DEPTH];

  // Fill the table once at start-up from the inverse lifting transform.
  initial begin
    rvec_t v;
    for (int unsigned k = 0; k < N; k++) begin
      v = inv97(unit_vec(k), N);
      for (int unsigned j = 0; j < N; j++) rom[k*N+j] = W'(quantize(v[j], FRAC, W));
    end
  end

  always_ff @(posedge clk) begin
    data <= (addr < AW'(DEPTH)) ? rom[addr] : '0;
  end

endmodule
