// pped_pkg: types and constants shared by the PPED feature-map generator.
//
// The generator scans a gray-scale image with a 5x5 kernel. Pixels are 8-bit
// luminance values. Each kernel position yields 40 absolute neighbour
// differences (20 horizontal, 20 vertical) whose median is the edge threshold,
// and four directional gradients from the edge filters. Directions are
// numbered in the order in which their histograms are concatenated into the
// 64-element PPED vector: horizontal, +45 degrees, vertical, -45 degrees.
//
// The kernel size, pixel width and direction order follow the published design. The
// coefficient function below encodes the four 5x5 edge-filter kernels; each
// has five +1 taps and five -1 taps, all other taps are 0.
package pped_pkg;

  localparam int unsigned PIX_W  = 8;   // luminance bits per pixel
  localparam int unsigned K      = 5;   // kernel size (5x5 block)
  localparam int unsigned NDIR   = 4;   // edge directions
  localparam int unsigned NDIFF  = 40;  // differences per 5x5 block
  localparam int unsigned NVDIFF = K - 1;  // vertical differences per column
  localparam int unsigned NHDIFF = K;      // horizontal differences per column pair
  localparam int unsigned NBIN   = 16;  // histogram bins per direction
  localparam int unsigned SUM_W  = 11;  // width of a sum of five pixels
  localparam int unsigned GRAD_W = 11;  // width of an absolute gradient

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [SUM_W-1:0] sum_t;
  typedef logic [GRAD_W-1:0] grad_t;

  typedef enum logic [1:0] {
    DIR_H   = 2'd0,   // horizontal edges
    DIR_P45 = 2'd1,   // +45 degree edges (run from lower left to upper right)
    DIR_V   = 2'd2,   // vertical edges
    DIR_M45 = 2'd3    // -45 degree edges (run from upper left to lower right)
  } dir_e;

  // Filter coefficient (+1, -1 or 0) of direction d at kernel row r, column c.
  // Row 0 is the top row of the block and column 0 its leftmost column in
  // image coordinates.
  function automatic int kernel_coef(input int d, input int r, input int c);
    int coef;
    coef = 0;
    case (d)
      0: begin            // horizontal: +1 on row 1, -1 on row 3
        if (r == 1) coef = 1;
        if (r == 3) coef = -1;
      end
      1: begin            // +45 degrees
        if ((r == 0 && c == 3) || (r == 1 && (c == 1 || c == 2)) ||
            (r == 2 && c == 1) || (r == 3 && c == 0)) coef = 1;
        if ((r == 1 && c == 4) || (r == 2 && c == 3) ||
            (r == 3 && (c == 2 || c == 3)) || (r == 4 && c == 1)) coef = -1;
      end
      2: begin            // vertical: +1 on column 1, -1 on column 3
        if (c == 1) coef = 1;
        if (c == 3) coef = -1;
      end
      default: begin      // -45 degrees: the +45 kernel mirrored top to bottom
        if ((r == 4 && c == 3) || (r == 3 && (c == 1 || c == 2)) ||
            (r == 2 && c == 1) || (r == 1 && c == 0)) coef = 1;
        if ((r == 3 && c == 4) || (r == 2 && c == 3) ||
            (r == 1 && (c == 2 || c == 3)) || (r == 0 && c == 1)) coef = -1;
      end
    endcase
    return coef;
  endfunction

endpackage
