// window_buffer: register memory that turns a raster-scan pixel stream into
// the sliding 3x3 processing window A1..A9.
//
// Pixels of an IMG_W x IMG_H image arrive one per clock while pix_valid is
// high, line after line, first pixel marked by sof. They shift through a
// chain of (WIN-1)*IMG_W + WIN registers: one image line of delay per window
// row, so the taps at the chain's head, one line back and two lines back give
// the three rows of the window. win[0..8] is A1..A9 in row-major order: A1..A3
// is the oldest line, A7..A9 the newest, and within a row the highest index is
// the newest pixel (A9 is the pixel just taken). Position counters step the
// window across the image automatically; win_valid marks the windows that
// lie wholly inside the image, and tx, ty give the column and row of their
// centre pixel. Window contents, win_valid, tx and ty change on the clock edge
// that accepts a pixel, so a window is available one clock after its last
// pixel was presented.
//
// Sequential pixel input, register memory and automatic window scanning are
// the document's; the line-delay organisation, the sof marker, skipping
// border windows and the synchronous active-low reset are this design's
// choices.
module window_buffer
  import mip_pkg::*;
#(
  parameter int unsigned W     = PIX_W,
  parameter int unsigned IMG_W = IMG_SIDE,
  parameter int unsigned IMG_H = IMG_SIDE,
  parameter int unsigned K     = WIN,
  localparam int unsigned XW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic          sof,
  input  logic [W-1:0]  pix_in,
  output logic          win_valid,
  output logic [W-1:0]  win [K*K],
  output logic [XW-1:0] tx,
  output logic [YW-1:0] ty
);

  localparam int unsigned DEPTH = (K - 1) * IMG_W + K;

  logic [W-1:0]  chain [DEPTH];
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [XW-1:0] col_here;
  logic [YW-1:0] row_here;

  // Position of the pixel presented this cycle.
  always_comb begin
    col_here = sof ? '0 : col;
    row_here = sof ? '0 : row;
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      chain[0] <= pix_in;
      for (int i = 1; i < DEPTH; i++) chain[i] <= chain[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      tx        <= '0;
      ty        <= '0;
    end else begin
      win_valid <= 1'b0;
      if (pix_valid) begin
        win_valid <= (32'(col_here) >= K - 1) && (32'(row_here) >= K - 1);
        tx        <= col_here - XW'((K - 1) / 2);
        ty        <= row_here - YW'((K - 1) / 2);
        if (32'(col_here) == IMG_W - 1) begin
          col <= '0;
          row <= (32'(row_here) == IMG_H - 1) ? '0 : row_here + 1'b1;
        end else begin
          col <= col_here + 1'b1;
          row <= row_here;
        end
      end
    end
  end

  // Window taps: row r (0 = oldest line) starts (K-1-r) lines back.
  for (genvar r = 0; r < K; r++) begin : g_row
    for (genvar c = 0; c < K; c++) begin : g_col
      assign win[r*K + c] = chain[(K - 1 - r) * IMG_W + (K - 1 - c)];
    end
  end

endmodule
