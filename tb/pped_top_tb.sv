// pped_top_tb: end-to-end test of the PPED generator at its default size
// (64x64 image, no parameter overrides).
//
// It builds test images with regions of horizontal, vertical and diagonal
// stripes, a flat patch and noise, streams them in strip by strip, and
// compares every flag word and the final 64-element vector with a reference
// model in this file: the 40 neighbour differences of each 5x5 block are
// sorted and the 20th smallest taken as threshold, the four kernels are
// written out here independently of the design, and the histograms are
// recomputed from the reference flags. Frame 1 streams continuously and its
// duration is checked against the 80 us per vector at 50 MHz (4000 clocks);
// frame 2 leaves idle clocks between strips; frame 3 has one idle clock
// inside a strip, and the four pixels whose blocks span it must be skipped.
//
// Besides the comparisons it counts how often the design's mechanisms occur:
// flags of each direction, blocks whose largest gradient is non-zero but not
// above the median, majority votes that end in a 20/20 tie, back-to-back
// flag words (one block per clock) and pixels skipped at the gap. A
// mechanism that never occurs, or a gap that skips other than four pixels,
// counts as a failure.
module pped_top_tb;
  import pped_pkg::*;

  localparam int W = 64;
  localparam int H = 64;
  localparam int NS = H - 4;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, in_valid = 0;
  pix_t in_col [5];
  logic map_valid;
  logic [3:0] map_flags;
  logic [5:0] map_row, map_col;
  logic [9:0] pped_vec [64];
  logic vec_done;

  pped_top dut (
    .clk, .rst_n, .frame_start, .in_valid, .in_col,
    .map_valid, .map_flags, .map_row, .map_col, .pped_vec, .vec_done
  );

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int img [H][W];
  int ref_flags [H][W];
  int ref_vec [64];
  int kern [4][5][5];

  // mechanism counters
  int n_dir [4];
  int n_suppressed = 0;
  int n_tie = 0;
  int n_back2back = 0;
  int n_dropped = 0;

  // An idle clock inside a strip: inserted before column gap_col of strip
  // gap_strip (none when negative). The four pixels whose blocks span it
  // get no flag word.
  int gap_strip = -1, gap_col = -1;
  bit present [H][W];
  int n_present;

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  task automatic set_kernels();
    int hk [5][5] = '{'{0,0,0,0,0}, '{1,1,1,1,1}, '{0,0,0,0,0}, '{-1,-1,-1,-1,-1}, '{0,0,0,0,0}};
    int pk [5][5] = '{'{0,0,0,1,0}, '{0,1,1,0,-1}, '{0,1,0,-1,0}, '{1,0,-1,-1,0}, '{0,-1,0,0,0}};
    int vk [5][5] = '{'{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}, '{0,1,0,-1,0}};
    int mk [5][5] = '{'{0,-1,0,0,0}, '{1,0,-1,-1,0}, '{0,1,0,-1,0}, '{0,1,1,0,-1}, '{0,0,0,1,0}};
    kern[0] = hk; kern[1] = pk; kern[2] = vk; kern[3] = mk;
  endtask

  task automatic make_image(int seed);
    int s;
    s = $urandom(seed);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        if (r < 32 && c < 32)       v = ((r / 3) % 2 != 0) ? 200 : 60;          // horizontal stripes
        else if (r < 32)            v = ((c / 3) % 2 != 0) ? 180 : 40;          // vertical stripes
        else if (c < 32)            v = (((r + c) / 4) % 2 != 0) ? 220 : 30;    // +45 stripes
        else                        v = (((r - c + 64) / 4) % 2 != 0) ? 210 : 50; // -45 stripes
        if (r >= 20 && r < 44 && c >= 20 && c < 44) v = 128;               // flat patch
        else v = v + int'($urandom_range(0, 24)) - 12;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r][c] = v;
      end
  endtask

  task automatic reference();
    for (int i = 0; i < 64; i++) ref_vec[i] = 0;
    n_present = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        ref_flags[r][c] = 0;
        present[r][c] = (r >= 2 && r < H - 2 && c >= 2 && c < W - 2);
        if (gap_strip >= 0 && r == gap_strip + 2 && c >= gap_col - 2 && c <= gap_col + 1)
          present[r][c] = 0;
        if (present[r][c]) n_present++;
      end
    for (int r = 2; r < H - 2; r++)
      for (int c = 2; c < W - 2; c++) begin
        int d [40];
        int n, thr, best, bdir;
        n = 0;
        for (int i = -2; i <= 2; i++)
          for (int j = -2; j <= 1; j++) begin
            d[n] = iabs(img[r+i][c+j+1] - img[r+i][c+j]); n++;   // horizontal
            d[n] = iabs(img[r+j+1][c+i] - img[r+j][c+i]); n++;   // vertical
          end
        d.sort();
        thr = d[19];
        best = -1; bdir = 0;
        for (int k = 0; k < 4; k++) begin
          int g;
          g = 0;
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              g += kern[k][i][j] * img[r-2+i][c-2+j];
          g = iabs(g);
          if (g > best) begin best = g; bdir = k; end
        end
        if (!present[r][c]) continue;
        if (best > thr) begin
          ref_flags[r][c] = 1 << bdir;
        end else if (best > 0) n_suppressed++;
      end
    // histograms, recomputed from the flag map
    for (int i = 0; i < 64; i++) ref_vec[i] = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (ref_flags[r][c][0]) ref_vec[0*16 + r / 4]++;
        if (ref_flags[r][c][1]) ref_vec[1*16 + (r + c) / 8]++;
        if (ref_flags[r][c][2]) ref_vec[2*16 + c / 4]++;
        if (ref_flags[r][c][3]) ref_vec[3*16 + (r - c + 63) / 8]++;
      end
  endtask

  // Output monitor: flag words must appear in scan order.
  int exp_r, exp_c, n_words;
  logic prev_valid = 0;
  always @(posedge clk) begin
    if (map_valid) begin
      checks++;
      if (int'(map_row) != exp_r || int'(map_col) != exp_c ||
          int'(map_flags) != ref_flags[exp_r][exp_c]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH at (%0d,%0d): got (%0d,%0d) flags %b, expected %b",
                   exp_r, exp_c, map_row, map_col, map_flags, ref_flags[exp_r][exp_c][3:0]);
      end
      for (int k = 0; k < 4; k++) if (map_flags[k]) n_dir[k]++;
      if (prev_valid) n_back2back++;
      n_words++;
      do begin
        exp_c++;
        if (exp_c == W - 2) begin exp_c = 2; exp_r++; end
      end while (exp_r < H - 2 && !present[exp_r][exp_c]);
    end
    prev_valid <= map_valid;
    if ($countones(dut.u_mfc.v7a) == 20 || $countones(dut.u_mfc.v6a) == 20 ||
        $countones(dut.u_mfc.v5a) == 20 || $countones(dut.u_mfc.v4a) == 20 ||
        $countones(dut.u_mfc.v3a) == 20 || $countones(dut.u_mfc.v2a) == 20 ||
        $countones(dut.u_mfc.v1a) == 20 || $countones(dut.u_mfc.v0a) == 20)
      n_tie++;
  end

  task automatic run_frame(int gap, output int cycles);
    int t0;
    exp_r = 2; exp_c = 2; n_words = 0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    t0 = 0; cycles = 0;
    for (int s = 0; s < NS; s++) begin
      for (int c = 0; c < W; c++) begin
        if (s == gap_strip && c == gap_col) begin
          in_valid = 0;
          for (int i = 0; i < 5; i++) in_col[i] = pix_t'($urandom);
          @(negedge clk);
          cycles++;
        end
        in_valid = 1;
        for (int i = 0; i < 5; i++) in_col[i] = pix_t'(img[s+i][c]);
        @(negedge clk);
        cycles++;
      end
      in_valid = 0;
      for (int g = 0; g < gap; g++) begin
        for (int i = 0; i < 5; i++) in_col[i] = pix_t'($urandom);
        @(negedge clk);
        cycles++;
      end
    end
    in_valid = 0;
    while (!vec_done) begin @(negedge clk); cycles++; end
    // vector and word count
    checks++;
    if (n_words != n_present) begin
      failures++;
      $display("word count %0d, expected %0d", n_words, n_present);
    end
    n_dropped += (H - 4) * (W - 4) - n_words;
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (int'(pped_vec[i]) != ref_vec[i]) begin
        failures++;
        $display("vec[%0d] = %0d, expected %0d", i, pped_vec[i], ref_vec[i]);
      end
    end
  endtask

  initial begin
    int cycles;
    set_kernels();
    for (int k = 0; k < 4; k++) n_dir[k] = 0;
    for (int i = 0; i < 5; i++) in_col[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // frame 1: continuous stream, timed
    make_image(1);
    reference();
    run_frame(0, cycles);
    $display("frame 1: %0d clocks from first column to vec_done (%0.1f us at 50 MHz)",
             cycles, cycles * 0.02);
    checks++;
    if (cycles != NS * W + 6 || cycles > 4000) begin
      failures++;
      $display("frame time %0d, expected %0d and at most 4000", cycles, NS * W + 6);
    end

    // frame 2: idle clocks between strips
    make_image(2);
    reference();
    run_frame(3, cycles);

    // frame 3: one idle clock inside strip 10, before column 31
    make_image(3);
    gap_strip = 10;
    gap_col = 31;
    reference();
    run_frame(0, cycles);

    $display("mechanisms: H=%0d P45=%0d V=%0d M45=%0d suppressed=%0d ties=%0d back2back=%0d dropped=%0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_suppressed, n_tie, n_back2back, n_dropped);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_dir[k] == 0) failures++;
    end
    checks += 3;
    if (n_suppressed == 0) failures++;
    if (n_tie == 0) failures++;
    if (n_back2back == 0) failures++;
    checks++;
    if (n_dropped != 4) failures++;

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
