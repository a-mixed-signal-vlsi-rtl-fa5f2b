// efc_tb: checks the edge filtering circuit.
//
// A new 5x5 block enters every clock; each block's threshold is applied two
// clocks after the block, when stage 3 samples it. The expected flags come
// from the four kernels written out here and are checked four clock edges
// after the block entered. Blocks are random, striped in each of the four
// directions, or flat, and thresholds are sometimes set just at or just
// below the largest gradient, so that flags of every direction, ties at the
// threshold and suppressed edges all occur; the run fails if one never did.
module efc_tb;
  import pped_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t blk [5][5];
  pix_t threshold;
  logic [3:0] flags;
  int checks = 0, failures = 0;
  int kern [4][5][5];
  int n_dir [4];
  int n_suppressed = 0, n_at_threshold = 0;

  efc dut (.clk, .rst_n, .blk, .threshold, .flags);

  always #5 clk = ~clk;

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  int exp_flags [$];
  int thr_q [$];

  initial begin
    automatic int hk [5][5] = '{'{0,0,0,0,0}, '{1,1,1,1,1}, '{0,0,0,0,0}, '{-1,-1,-1,-1,-1}, '{0,0,0,0,0}};
    automatic int pk [5][5] = '{'{0,0,0,1,0}, '{0,1,1,0,-1}, '{0,1,0,-1,0}, '{1,0,-1,-1,0}, '{0,-1,0,0,0}};
    automatic int vk [5][5] = '{'{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}};
    automatic int mk [5][5] = '{'{0,-1,0,0,0}, '{1,0,-1,-1,0}, '{0,1,0,-1,0}, '{0,1,1,0,-1}, '{0,0,0,1,0}};
    kern[0] = hk; kern[1] = pk; kern[2] = vk; kern[3] = mk;
    for (int k = 0; k < 4; k++) n_dir[k] = 0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) blk[r][c] = '0;
    threshold = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int kind, best, bdir, thr, e;
      kind = $urandom_range(0, 5);
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          int lo, hi;
          lo = $urandom_range(0, 80);
          hi = $urandom_range(150, 255);
          case (kind)
            0: blk[r][c] = pix_t'($urandom);
            1: blk[r][c] = pix_t'((r < 2) ? hi : lo);
            2: blk[r][c] = pix_t'((r + c < 4) ? hi : lo);
            3: blk[r][c] = pix_t'((c < 2) ? hi : lo);
            4: blk[r][c] = pix_t'((r - c > 0) ? hi : lo);
            default: blk[r][c] = 8'd77;
          endcase
        end
      best = -1; bdir = 0;
      for (int k = 0; k < 4; k++) begin
        int g;
        g = 0;
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++)
            g += kern[k][r][c] * int'(blk[r][c]);
        g = iabs(g);
        if (g > best) begin best = g; bdir = k; end
      end
      case ($urandom_range(0, 3))
        0: thr = (best <= 255) ? best : 255;                 // at the threshold
        1: thr = (best >= 1 && best <= 256) ? best - 1 : 0;  // just below
        default: thr = $urandom_range(0, 255);
      endcase
      if (best > thr) begin
        e = 1 << bdir;
        n_dir[bdir]++;
      end else begin
        e = 0;
        if (best > 0) n_suppressed++;
        if (best == thr) n_at_threshold++;
      end
      exp_flags.push_back(e);
      thr_q.push_back(thr);
      // the threshold of the block two clocks back is due now
      threshold = (thr_q.size() >= 3) ? pix_t'(thr_q[thr_q.size() - 3]) : '0;
      @(negedge clk);
      if (exp_flags.size() == 4) begin
        e = exp_flags.pop_front();
        void'(thr_q.pop_front());
        checks++;
        if (int'(flags) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d flags %b expected %b", t, flags, 4'(e));
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_dir[k] == 0) failures++;
    end
    checks += 2;
    if (n_suppressed == 0) failures++;
    if (n_at_threshold == 0) failures++;
    $display("flags H=%0d P45=%0d V=%0d M45=%0d suppressed=%0d at_threshold=%0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_suppressed, n_at_threshold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
