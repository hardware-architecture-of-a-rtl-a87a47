// dual_port_ram - local video memory of 2*N words (220 for a 110-column display).
// Port A writes the incoming line, port B reads the previous line; the two
// halves are used alternately (ping-pong), so write and read addresses never
// coincide. Both ports are synchronous; read data appears one clock after addr_b.
// Document: dual-port RAM, 220 pixels, port B data/we tied to zero.
// Own choices: synchronous read, no read-during-write bypass.
module dual_port_ram
  import wmla_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned DEPTH  = 2 * N_COLS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       addr_a,
  input  logic signed [W-1:0] data_a,
  input  logic                we_a,
  input  logic [AW-1:0]       addr_b,
  output logic signed [W-1:0] q_b
);
  logic signed [W-1:0] mem[DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= data_a;
    q_b <= mem[addr_b];
  end
endmodule
