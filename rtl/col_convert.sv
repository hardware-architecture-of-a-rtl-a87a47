// col_convert - the "Convert" cast: applies the scale factor c as an
// arithmetic right shift by SHIFT bits (rounding to nearest) and saturates
// the result to the OW-bit signed column output. Combinational.
// Document: a cast block between the Mult-Add engine and the column output.
// Own choices: c as a power of two, rounding and saturation.
module col_convert
  import wmla_pkg::*;
#(
  parameter int unsigned IW    = DATA_W + COEF_W + 8,
  parameter int unsigned OW    = COL_W,
  parameter int unsigned SHIFT = COL_SHIFT
) (
  input  logic signed [IW-1:0] din,
  output logic signed [OW-1:0] dout
);
  localparam logic signed [IW-1:0] MAXV = IW'((1 << (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -MAXV - 1;
  logic signed [IW-1:0] rounded;

  always_comb begin
    rounded = (din + IW'(1 << (SHIFT - 1))) >>> SHIFT;
    if (rounded > MAXV)      dout = OW'(MAXV);
    else if (rounded < MINV) dout = OW'(MINV);
    else                     dout = OW'(rounded);
  end
endmodule
