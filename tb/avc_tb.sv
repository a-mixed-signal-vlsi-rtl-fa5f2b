// avc_tb: drives random columns 5 and 6 (plus directed extremes) into the
// absolute value circuits and compares the four vertical differences inside
// column 6 and the five horizontal differences between columns 6 and 5 with
// values computed here in integer arithmetic.
module avc_tb;
  import pped_pkg::*;

  pix_t col5 [5], col6 [5];
  pix_t vdiff [4], hdiff [5];
  int checks = 0, failures = 0;

  avc dut (.col5, .col6, .vdiff, .hdiff);

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  task automatic check();
    #1;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (int'(vdiff[r]) != iabs(int'(col6[r+1]) - int'(col6[r]))) begin
        failures++;
        $display("FAIL vdiff[%0d]=%0d col6 %0d %0d", r, vdiff[r], col6[r], col6[r+1]);
      end
    end
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (int'(hdiff[r]) != iabs(int'(col6[r]) - int'(col5[r]))) begin
        failures++;
        $display("FAIL hdiff[%0d]=%0d col5 %0d col6 %0d", r, hdiff[r], col5[r], col6[r]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 5; r++) begin
      col5[r] = (r % 2 == 0) ? 8'd0 : 8'd255;
      col6[r] = (r % 2 == 0) ? 8'd255 : 8'd0;
    end
    check();
    for (int i = 0; i < 1000; i++) begin
      for (int r = 0; r < 5; r++) begin
        col5[r] = pix_t'($urandom);
        col6[r] = pix_t'($urandom);
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
