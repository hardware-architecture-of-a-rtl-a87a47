// wmla_top - FPGA top of the wavelet based multiple line addressing driver for
// a 96 x 110 passive matrix display. A compressed (level-1 wavelet) frame is
// streamed in after write_start, one coefficient per N clocks; the driver
// outputs, per line, 110 column values g(i,j) = c * sum_k b(i,k) f(k,j) with
// f = (F_n^T)^-1, each with a kolom_enable pulse (value valid from the next
// clock and held for N clocks), and the row matrix values on rij alongside.
// Structure follows the document's block diagram: input registers, address
// control, 220-word dual-port RAM, coefficient ROM, row ROM, Mult-Add engine
// and Convert cast. Widths and timing details are this design's own choices.
module wmla_top
  import wmla_pkg::*;
#(
  parameter int unsigned N = N_COLS,
  parameter int unsigned M = M_ROWS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    write_start,
  input  logic signed [DATA_W-1:0] compressed_data,
  output logic signed [COL_W-1:0]  kolom,
  output logic                    kolom_enable,
  output logic signed [ROW_W-1:0]  rij,
  output logic                    done
);
  localparam int unsigned ACC = DATA_W + COEF_W + 8;

  logic                     ws;
  logic signed [DATA_W-1:0] din;
  logic [$clog2(2*N)-1:0]   wr_addr, rd_addr;
  logic [$clog2(N*N)-1:0]   wav_addr;
  logic [$clog2(M*M+1)-1:0] row_addr;
  logic                     we, mult_en, col_en;
  logic signed [DATA_W-1:0] dwt_data;
  logic signed [COEF_W-1:0] wav_coef;
  logic signed [ACC-1:0]    col_acc;

  input_stage #(.W(DATA_W), .DELAY(4)) u_in (
    .clk, .rst, .write_start_in(write_start), .data_in(compressed_data),
    .write_start(ws), .data_out(din));

  address_controller #(.N(N), .M(M)) u_ctrl (
    .clk, .rst, .write_start(ws), .write_data_addr(wr_addr), .write_en(we),
    .read_data_addr(rd_addr), .rom_addr_wav_matrix(wav_addr), .mult_enable(mult_en),
    .col_en, .rom_rijsturing(row_addr), .done);

  dual_port_ram #(.W(DATA_W), .DEPTH(2 * N)) u_ram (
    .clk, .addr_a(wr_addr), .data_a(din), .we_a(we), .addr_b(rd_addr), .q_b(dwt_data));

  rom_wav_matrix #(.N(N)) u_wav (.clk, .addr(wav_addr), .data(wav_coef));

  rom_rijsturing #(.M(M)) u_row (.clk, .addr(row_addr), .data(rij));

  mult_add_engine #(.DW(DATA_W), .CW(COEF_W), .ACC(ACC)) u_mac (
    .clk, .rst, .dwt_data, .wav_coef, .enable_mult(mult_en), .column_enable(col_en),
    .col_out(col_acc));

  col_convert #(.IW(ACC), .OW(COL_W), .SHIFT(COL_SHIFT)) u_cvt (.din(col_acc), .dout(kolom));

  assign kolom_enable = col_en;
endmodule
