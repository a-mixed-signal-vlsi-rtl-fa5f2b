// efc: edge filtering circuit, a four-stage pipeline of plain logic.
//
// For the 5x5 block in buffer columns 1..5 it decides whether the centre
// pixel carries a principal edge and in which of four directions.
//   stage 1: for each direction, the sums of the five pixels under the +1
//            taps and of the five under the -1 taps of its kernel;
//   stage 2: the absolute gradient |sum(+1) - sum(-1)| per direction;
//   stage 3: the largest of the four gradients and its direction; the
//            threshold from the median filter circuit is sampled here;
//   stage 4: if the largest gradient exceeds the threshold, the flag of its
//            direction is set, otherwise no flag is set.
// At most one of the four flags is set per pixel; an assertion checks this.
//
// Timing: a block presented in the cycle after edge e0 gives flags after
// edge e4. `threshold` must carry that block's median in the cycle after
// e2, which is exactly when the median filter circuit delivers it. One block
// is accepted per clock.
//
// The four stages, their split into gradient and decision halves, the
// kernels and the direction order (H, +45, V, -45) follow the published design. The
// strict "greater than" comparison, comparing the raw kernel sum with the
// median without scaling, and breaking ties between equal gradients in
// favour of the earlier direction in that order are this design's choices.
module efc
  import pped_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            blk [K][K],   // [row][column], column 0 leftmost
  input  pix_t            threshold,    // sampled by stage 3
  output logic [NDIR-1:0] flags         // bit d = direction d (dir_e order)
);

  // ---------------- stage 1: tap sums ----------------
  sum_t pos_d [NDIR], neg_d [NDIR];
  sum_t pos_q [NDIR], neg_q [NDIR];

  always_comb begin
    for (int d = 0; d < int'(NDIR); d++) begin
      pos_d[d] = '0;
      neg_d[d] = '0;
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(K); c++) begin
          if (kernel_coef(d, r, c) > 0) pos_d[d] = pos_d[d] + sum_t'(blk[r][c]);
          if (kernel_coef(d, r, c) < 0) neg_d[d] = neg_d[d] + sum_t'(blk[r][c]);
        end
    end
  end

  // ---------------- stage 2: absolute gradients ----------------
  grad_t grad_d [NDIR];
  grad_t grad_q [NDIR];

  always_comb begin
    for (int d = 0; d < int'(NDIR); d++)
      grad_d[d] = (pos_q[d] >= neg_q[d]) ? grad_t'(pos_q[d] - neg_q[d])
                                         : grad_t'(neg_q[d] - pos_q[d]);
  end

  // ---------------- stage 3: largest gradient ----------------
  grad_t max_d, max_q;
  dir_e  dir_d, dir_q;
  pix_t  thr_q;

  always_comb begin
    max_d = grad_q[0];
    dir_d = DIR_H;
    for (int d = 1; d < int'(NDIR); d++)
      if (grad_q[d] > max_d) begin
        max_d = grad_q[d];
        dir_d = dir_e'(d);
      end
  end

  // ---------------- stage 4: thresholding ----------------
  logic [NDIR-1:0] flags_d, flags_q;

  always_comb begin
    flags_d = '0;
    if (max_q > grad_t'(thr_q))
      flags_d[dir_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(NDIR); d++) begin
        pos_q[d]  <= '0;
        neg_q[d]  <= '0;
        grad_q[d] <= '0;
      end
      max_q   <= '0;
      dir_q   <= DIR_H;
      thr_q   <= '0;
      flags_q <= '0;
    end else begin
      // Only the principal (largest) direction of a pixel may be flagged.
      a_one_flag : assert ($onehot0(flags_q))
        else $error("more than one edge flag set");
      pos_q   <= pos_d;
      neg_q   <= neg_d;
      grad_q  <= grad_d;
      max_q   <= max_d;
      dir_q   <= dir_d;
      thr_q   <= threshold;
      flags_q <= flags_d;
    end
  end

  assign flags = flags_q;

endmodule
