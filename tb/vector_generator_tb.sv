// vector_generator_tb: checks the PPED histogram accumulator at 64x64.
//
// Random flag words (mostly one-hot, some with several flags, some empty)
// for random pixel positions are fed in, with `valid` low now and then. The
// bench bins them itself (rows/4, (row+col)/8, cols/4, (row-col+63)/8 for
// H, +45, V, -45) and compares all 64 bins after the word marked `last`.
// It also checks that `done` rises exactly one clock after that word, that
// words with `valid` low are ignored and that `clear` empties the vector.
// A second run drives one bin past its maximum to check saturation.
module vector_generator_tb;
  import pped_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear = 0, valid = 0, last = 0;
  logic [3:0] flags;
  logic [5:0] row, col;
  logic [9:0] vec [64];
  logic done;
  int checks = 0, failures = 0;
  int ref_vec [64];

  vector_generator dut (.clk, .rst_n, .clear, .valid, .last, .flags, .row, .col, .vec, .done);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (int'(vec[i]) != ref_vec[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: vec[%0d]=%0d expected %0d", what, i, vec[i], ref_vec[i]);
      end
    end
  endtask

  initial begin
    flags = '0; row = '0; col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < 64; i++) ref_vec[i] = 0;
      compare("after clear");
      checks++;
      if (done) failures++;
      for (int t = 0; t < 3000; t++) begin
        int r, c, f;
        r = $urandom_range(0, 63);
        c = $urandom_range(0, 63);
        case ($urandom_range(0, 5))
          0: f = 0;
          1: f = $urandom_range(0, 15);
          default: f = 1 << $urandom_range(0, 3);
        endcase
        valid = ($urandom_range(0, 7) != 0);
        if (t == 2999) valid = 1;
        last  = (t == 2999);
        flags = 4'(f); row = 6'(r); col = 6'(c);
        if (valid) begin
          if (f[0]) ref_vec[0  + r / 4]++;
          if (f[1]) ref_vec[16 + (r + c) / 8]++;
          if (f[2]) ref_vec[32 + c / 4]++;
          if (f[3]) ref_vec[48 + (r - c + 63) / 8]++;
        end
        @(negedge clk);
        checks++;
        if (done != (t == 2999)) begin
          failures++;
          $display("FAIL done=%b at word %0d", done, t);
        end
      end
      valid = 0; last = 0;
      @(negedge clk);
      compare("frame");
    end
    // saturation: 1100 horizontal flags into bin 0
    clear = 1;
    @(negedge clk);
    clear = 0;
    valid = 1; flags = 4'b0001; row = '0; col = '0;
    repeat (1100) @(negedge clk);
    valid = 0;
    checks++;
    if (vec[0] != 10'h3ff) begin failures++; $display("FAIL saturation: %0d", vec[0]); end
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
