// input_stage - input registers of the driver: write_start passes through two
// flip-flops and the compressed data through a DELAY-stage shift register.
// Document: two d-q registers on write start and a z^-4 delay on the data.
module input_stage
  import wmla_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DELAY = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                write_start_in,
  input  logic signed [W-1:0] data_in,
  output logic                write_start,
  output logic signed [W-1:0] data_out
);
  logic [1:0]          ws_q;
  logic signed [W-1:0] dly[DELAY];

  always_ff @(posedge clk) begin
    if (rst) begin
      ws_q <= '0;
      for (int i = 0; i < DELAY; i++) dly[i] <= '0;
    end else begin
      ws_q <= {ws_q[0], write_start_in};
      dly[0] <= data_in;
      for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
    end
  end

  assign write_start = ws_q[1];
  assign data_out    = dly[DELAY-1];
endmodule
