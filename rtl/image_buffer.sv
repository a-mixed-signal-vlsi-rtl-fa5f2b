// image_buffer: the 5x6 pixel window in front of the edge filter and the
// median path.
//
// Every clock a new column of five 8-bit pixels is written into column 6 and
// every stored column moves one place to the right (6 -> 5 -> ... -> 1); the
// contents of column 1 are dropped. Columns 1 to 5 form the 5x5 block seen by
// the edge filtering circuit, and columns 5 and 6 feed the absolute value
// circuits one clock ahead of that block, so the differences of a block reach
// the median array at the same clock edge at which its pixels reach columns
// 1 to 5.
//
// Interface: pix[r][j] is the pixel in row r (0 = top) of buffer column j+1,
// so pix[r][0] is column 1 (the oldest, leftmost image column) and pix[r][5]
// is column 6 (the column loaded at the last clock edge). The buffer shifts
// on every clock, as in the published design; there is no enable. The asynchronous
// active-low reset clearing the buffer is this design's choice.
module image_buffer
  import pped_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t col_in [K],        // new column, row 0 at the top
  output pix_t pix    [K][K+1]    // [row][column-1]
);

  pix_t buf_q [K][K+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < K; r++)
        for (int j = 0; j <= K; j++)
          buf_q[r][j] <= '0;
    end else begin
      for (int r = 0; r < K; r++) begin
        for (int j = 0; j < K; j++)
          buf_q[r][j] <= buf_q[r][j+1];
        buf_q[r][K] <= col_in[r];
      end
    end
  end

  assign pix = buf_q;

endmodule
