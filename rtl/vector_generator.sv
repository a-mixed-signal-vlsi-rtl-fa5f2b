// vector_generator: turns the stream of edge flags into the 64-element PPED
// vector (Projected Principal-Edge Distribution).
//
// Each direction's feature map is projected along its own edge direction
// onto 16 bins, and each bin counts the flags that fall into it:
//   horizontal: bin = row * 16 / IMG_H              (every 4 rows at 64x64)
//   vertical:   bin = col * 16 / IMG_W              (every 4 columns)
//   +45 deg:    bin = (row + col) * 16 / (IMG_H + IMG_W - 1)
//   -45 deg:    bin = (row - col + IMG_W - 1) * 16 / (IMG_H + IMG_W - 1)
// For a 64x64 map the diagonal bins hold 8 diagonals each (7 in the last).
// The vector is the four histograms in the order H, +45, V, -45:
// vec[d*16 + b] is bin b of direction d.
//
// Interface: `clear` empties all bins and drops `done`. While `valid` is
// high, the flags of pixel (row, col) are counted at the clock edge; up to
// four counters (one per direction) can step in the same clock. When the
// pixel marked `last` has been counted, `done` rises one clock later and
// stays high until the next clear. Counters saturate at their maximum.
//
// The 16 bins per direction, the row-wise projection of the horizontal map
// and the concatenation order follow the published design. It only says that the
// other three maps are treated "similarly"; the column and diagonal
// projections above, the counter width, clear/last/done and saturation are
// this design's choices.
module vector_generator
  import pped_pkg::*;
#(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  parameter int unsigned CNT_W = 10,
  localparam int unsigned ROW_W = $clog2(IMG_H),
  localparam int unsigned COL_W = $clog2(IMG_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic             last,
  input  logic [NDIR-1:0]  flags,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  output logic [CNT_W-1:0] vec [NDIR*NBIN],
  output logic             done
);

  localparam int unsigned DIAGS = IMG_H + IMG_W - 1;
  localparam int unsigned BIN_W = $clog2(NBIN);

  logic [BIN_W-1:0] bin [NDIR];

  always_comb begin
    int unsigned r, c;
    r = int'(row);
    c = int'(col);
    bin[DIR_H]   = BIN_W'((r * NBIN) / IMG_H);
    bin[DIR_P45] = BIN_W'(((r + c) * NBIN) / DIAGS);
    bin[DIR_V]   = BIN_W'((c * NBIN) / IMG_W);
    bin[DIR_M45] = BIN_W'(((r + IMG_W - 1 - c) * NBIN) / DIAGS);
  end

  logic [CNT_W-1:0] cnt_q [NDIR*NBIN];
  logic             done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NDIR * NBIN); i++) cnt_q[i] <= '0;
      done_q <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < int'(NDIR * NBIN); i++) cnt_q[i] <= '0;
      done_q <= 1'b0;
    end else if (valid) begin
      for (int d = 0; d < int'(NDIR); d++)
        if (flags[d] && cnt_q[d*NBIN + int'(bin[d])] != '1)
          cnt_q[d*NBIN + int'(bin[d])] <= cnt_q[d*NBIN + int'(bin[d])] + 1'b1;
      if (last) done_q <= 1'b1;
    end
  end

  assign vec  = cnt_q;
  assign done = done_q;

endmodule
