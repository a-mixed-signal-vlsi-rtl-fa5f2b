// mdu_tb: checks one median detection unit on its own.
//
// Each clock a random value is shifted in and random majority flags are
// applied. The expected vote bits are derived here from a prefix rule
// instead of the cell's loser chain: for bit b, if the value's bits above b
// equal the majority flags above b, the vote is the value's own bit b;
// otherwise it is the value's bit at the highest position where it first
// differed from the flags. The lower nibble is checked one clock later,
// with the upper-nibble flags of the previous clock, as in the pipeline.
// The shift output is checked to be the value taken at the last edge.
module mdu_tb;
  import pped_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t d_in, d_q;
  logic m7, m6, m5, m4, m3, m2, m1;
  logic v7, v6, v5, v4, v3, v2, v1, v0;
  int checks = 0, failures = 0;
  int n_lost_upper = 0;

  mdu dut (.clk, .rst_n, .d_in, .d_q,
           .m7, .m6, .m5, .m4, .v7, .v6, .v5, .v4,
           .m3, .m2, .m1, .v3, .v2, .v1, .v0);

  always #5 clk = ~clk;

  // expected vote at bit b for value x against flags f (bits above b used)
  function automatic logic vote(logic [7:0] x, logic [7:0] f, int b, int top);
    for (int k = top; k > b; k--)
      if (x[k] != f[k]) return x[k];
    return x[b];
  endfunction

  initial begin
    logic [7:0] prev_x, prev_f, x, f, lo_eff;
    d_in = '0;
    {m7, m6, m5, m4, m3, m2, m1} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_x = '0; prev_f = '0;
    for (int t = 0; t < 3000; t++) begin
      x = pix_t'($urandom);
      d_in = x;
      @(negedge clk);               // x is now held by the cell
      checks++;
      if (d_q != x) failures++;
      // upper nibble: half the time use x's own bits as flags (no loser)
      f = ($urandom_range(0, 3) == 0) ? x : 8'($urandom);
      {m7, m6, m5, m4} = f[7:4];
      // lower nibble of the previous value, with new random lower flags
      {m3, m2, m1} = f[3:1];
      #1;
      checks += 4;
      if (v7 != vote(x, f, 7, 7)) failures++;
      if (v6 != vote(x, f, 6, 7)) failures++;
      if (v5 != vote(x, f, 5, 7)) failures++;
      if (v4 != vote(x, f, 4, 7)) failures++;
      if (x[7:4] != f[7:4]) n_lost_upper++;
      if (t > 0) begin
        // effective lower nibble of the previous value after the upper search
        lo_eff = {4'b0, prev_x[3:0]};
        for (int k = 7; k >= 4; k--)
          if (prev_x[k] != prev_f[k]) begin lo_eff = {4'b0, {4{prev_x[k]}}}; break; end
        checks += 4;
        if (v3 != vote(lo_eff, f, 3, 3)) failures++;
        if (v2 != vote(lo_eff, f, 2, 3)) failures++;
        if (v1 != vote(lo_eff, f, 1, 3)) failures++;
        if (v0 != vote(lo_eff, {f[7:1], 1'b0}, 0, 3)) failures++;
      end
      prev_x = x; prev_f = f;
    end
    checks++;
    if (n_lost_upper == 0) failures++;
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
