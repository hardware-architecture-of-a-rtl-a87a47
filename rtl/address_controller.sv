// address_controller - sequencer of the driver. One clock runs at the read
// rate; a frame of M lines is processed after write_start. Each line time
// has N slots of N clocks (N*N clocks). In line time L (0..M) the controller
//   * writes input sample s of line L into RAM half L%2 at the last clock of
//     slot s (write rate = read rate / N, as in the document), for L < M;
//   * reads line L-1 from the other half N times, once per slot, pairing
//     RAM word k with ROM entry (k, s), so that slot s yields column s of G
//     (column-sequential order), for L >= 1.
// mult_enable follows the read addresses by one clock (RAM/ROM latency),
// col_en pulses two clocks after the last read of a slot, and the row ROM
// address (line*M + column, or the zero word for columns >= M) is set so
// that row data and column data become valid on the same clock. done pulses
// with the last col_en of the frame. write_start is ignored while busy.
// Document: the signal names, the 220-word ping-pong and the 110:1 rate
// ratio. Own choices: exact timing, frame of M+1 line times, row sequence.
module address_controller
  import wmla_pkg::*;
#(
  parameter int unsigned N      = N_COLS,
  parameter int unsigned M      = M_ROWS,
  localparam int unsigned RAW   = $clog2(2 * N),
  localparam int unsigned WAW   = $clog2(N * N),
  localparam int unsigned ROWAW = $clog2(M * M + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write_start,
  output logic [RAW-1:0]   write_data_addr,
  output logic             write_en,
  output logic [RAW-1:0]   read_data_addr,
  output logic [WAW-1:0]   rom_addr_wav_matrix,
  output logic             mult_enable,
  output logic             col_en,
  output logic [ROWAW-1:0] rom_rijsturing,
  output logic             done
);
  logic                   busy;
  logic [$clog2(M+1)-1:0] line;
  logic [$clog2(N)-1:0]   slot, cnt;
  logic                   reading, last, final_col;
  logic                   last_d1, last_d2, final_d1, final_d2;
  logic [ROWAW-1:0]       row_next, row_d1;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; line <= '0; slot <= '0; cnt <= '0;
    end else if (!busy) begin
      if (write_start) begin
        busy <= 1'b1; line <= '0; slot <= '0; cnt <= '0;
      end
    end else if (cnt == ($bits(cnt))'(N - 1)) begin
      cnt <= '0;
      if (slot == ($bits(slot))'(N - 1)) begin
        slot <= '0;
        if (line == ($bits(line))'(M)) busy <= 1'b0;
        else line <= line + 1'b1;
      end else begin
        slot <= slot + 1'b1;
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    write_en            = busy && (line < ($bits(line))'(M)) && (cnt == ($bits(cnt))'(N - 1));
    write_data_addr     = RAW'(line[0] ? N : 0) + RAW'(slot);
    reading             = busy && (line != '0);
    read_data_addr      = RAW'(line[0] ? 0 : N) + RAW'(cnt);
    rom_addr_wav_matrix = WAW'(cnt) * WAW'(N) + WAW'(slot);
    last                = reading && (cnt == ($bits(cnt))'(N - 1));
    final_col           = (line == ($bits(line))'(M)) && (slot == ($bits(slot))'(N - 1));
    row_next            = (slot < ($bits(slot))'(M)) ? ROWAW'(line - 1'b1) * ROWAW'(M) + ROWAW'(slot)
                                                     : ROWAW'(M * M);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mult_enable <= 1'b0; last_d1 <= 1'b0; last_d2 <= 1'b0;
      final_d1 <= 1'b0; final_d2 <= 1'b0;
      row_d1 <= ROWAW'(M * M); rom_rijsturing <= ROWAW'(M * M);
    end else begin
      mult_enable <= reading;
      last_d1     <= last;
      last_d2     <= last_d1;
      final_d1    <= last && final_col;
      final_d2    <= final_d1;
      if (last) row_d1 <= row_next;
      if (last_d1) rom_rijsturing <= row_d1;
    end
  end

  assign col_en = last_d2;
  assign done   = final_d2;
endmodule
