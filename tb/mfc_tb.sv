// mfc_tb: checks the median filter circuit against a sorting reference.
//
// Each clock nine random differences (four vertical, five horizontal) are
// shifted in. The bench keeps its own record of the last five vertical and
// last four horizontal sets, sorts those 40 values and expects the 20th
// smallest on `median` exactly two clock edges after the edge that shifted
// the newest set in (one new median per clock). Value ranges are varied so
// that wide spreads, narrow clusters (many equal values and 20/20 votes) and
// all-equal arrays all occur; the run fails if no tied vote was seen.
module mfc_tb;
  import pped_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t vdiff [4], hdiff [5];
  pix_t median;
  int checks = 0, failures = 0;
  int n_tie = 0;

  mfc dut (.clk, .rst_n, .vdiff, .hdiff, .median);

  always #5 clk = ~clk;

  pix_t vh [$][4];
  pix_t hh [$][5];
  int   expq [$];

  initial begin
    pix_t v [4], h [5];
    int mode;
    for (int i = 0; i < 4; i++) vdiff[i] = '0;
    for (int i = 0; i < 5; i++) hdiff[i] = '0;
    // history starts as the zeros left by reset
    for (int k = 0; k < 5; k++) begin
      for (int i = 0; i < 4; i++) v[i] = '0;
      vh.push_back(v);
    end
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 5; i++) h[i] = '0;
      hh.push_back(h);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int d [40];
      int n;
      mode = (t / 100) % 4;
      for (int i = 0; i < 4; i++)
        v[i] = (mode == 0) ? pix_t'($urandom) :
               (mode == 1) ? pix_t'($urandom_range(60, 68)) :
               (mode == 2) ? pix_t'($urandom_range(0, 3) * 16 + 7) : 8'd42;
      for (int i = 0; i < 5; i++)
        h[i] = (mode == 0) ? pix_t'($urandom) :
               (mode == 1) ? pix_t'($urandom_range(60, 68)) :
               (mode == 2) ? pix_t'($urandom_range(0, 3) * 16 + 7) : 8'd42;
      vdiff = v;
      hdiff = h;
      vh.push_back(v); void'(vh.pop_front());
      hh.push_back(h); void'(hh.pop_front());
      n = 0;
      foreach (vh[k, i]) begin d[n] = int'(vh[k][i]); n++; end
      foreach (hh[k, i]) begin d[n] = int'(hh[k][i]); n++; end
      d.sort();
      expq.push_back(d[19]);
      @(negedge clk);
      if ($countones(dut.v7a) == 20 || $countones(dut.v6a) == 20 ||
          $countones(dut.v5a) == 20 || $countones(dut.v4a) == 20 ||
          $countones(dut.v3a) == 20 || $countones(dut.v2a) == 20 ||
          $countones(dut.v1a) == 20 || $countones(dut.v0a) == 20)
        n_tie++;
      // the set shifted in two edges ago must now be the median
      if (expq.size() == 3) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(median) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d median %0d expected %0d", t, median, e);
        end
      end
    end
    checks++;
    if (n_tie == 0) begin failures++; $display("no tied vote seen"); end
    $display("ties seen: %0d", n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
