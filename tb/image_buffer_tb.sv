// image_buffer_tb: streams random columns into the 5x6 buffer and checks,
// after every clock, that buffer column 6-j holds the column loaded j clocks
// earlier (j = 0..5), i.e. that data enter at column 6 and shift right.
module image_buffer_tb;
  import pped_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t col_in [5];
  pix_t pix [5][6];
  pix_t hist [$];       // columns loaded so far, 5 pixels each, newest last
  int checks = 0, failures = 0;

  image_buffer dut (.clk, .rst_n, .col_in, .pix);

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 5; r++) col_in[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset the buffer is empty
    for (int r = 0; r < 5; r++)
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (pix[r][j] != 0) failures++;
      end
    for (int t = 0; t < 300; t++) begin
      for (int r = 0; r < 5; r++) begin
        col_in[r] = pix_t'($urandom);
        hist.push_back(col_in[r]);
      end
      @(negedge clk);
      for (int age = 0; age < 6 && age <= t; age++)
        for (int r = 0; r < 5; r++) begin
          checks++;
          if (pix[r][5-age] != hist[(t - age) * 5 + r]) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0d row %0d column %0d", t, r, 6 - age);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
