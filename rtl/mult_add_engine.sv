// mult_add_engine - multiply-accumulate unit computing one column voltage
// g(i,j) = sum_k b(i,k) * f(k,j) over N products, one product per clock.
// While enable_mult is high the product dwt_data*wav_coef is added to the
// accumulator. On column_enable the finished sum moves to col_out (held until
// the next column_enable) and the accumulator restarts with the current
// product (or zero). col_out is valid from the clock after column_enable.
// Document: Mult-Add engine with DWT_data, Wav_matrix, Enable_Mult,
// column_enable inputs and Col_out output. Own choices: widths, single-cycle MAC.
module mult_add_engine
  import wmla_pkg::*;
#(
  parameter int unsigned DW  = DATA_W,
  parameter int unsigned CW  = COEF_W,
  parameter int unsigned ACC = DATA_W + COEF_W + 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [DW-1:0]  dwt_data,
  input  logic signed [CW-1:0]  wav_coef,
  input  logic                  enable_mult,
  input  logic                  column_enable,
  output logic signed [ACC-1:0] col_out
);
  logic signed [ACC-1:0] prod, acc;

  always_comb prod = enable_mult ? ACC'(dwt_data * wav_coef) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      col_out <= '0;
    end else if (column_enable) begin
      col_out <= acc;
      acc     <= prod;
    end else begin
      acc <= acc + prod;
    end
  end
endmodule
