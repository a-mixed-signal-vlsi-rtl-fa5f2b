// mvc_tb: checks the majority voting circuit at its 41-input size.
//
// Input 40 is tied to 0 as in the median filter. Directed cases cover the
// 20/20 tie (must give 0), the worst case of 21 ones against 20 zeros (must
// give 1), all zeros, all ones and a low enable; then random vectors with a
// controlled number of ones are compared with a count made here.
module mvc_tb;

  localparam int N = 41;

  logic         enbl;
  logic [N-1:0] in;
  logic         out;
  int checks = 0, failures = 0;

  mvc dut (.enbl, .in, .out);

  task automatic apply(logic [N-1:0] v, logic en, logic expected, string what);
    in = v;
    enbl = en;
    #1;
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL %s: in=%h enbl=%b out=%b expected %b", what, v, en, out, expected);
    end
  endtask

  // a vector of 40 data bits with exactly `ones` ones, IN40 = 0
  function automatic logic [N-1:0] with_ones(int ones);
    logic [N-1:0] v;
    int placed;
    v = '0;
    placed = 0;
    while (placed < ones) begin
      int p;
      p = $urandom_range(0, N - 2);
      if (!v[p]) begin v[p] = 1'b1; placed++; end
    end
    return v;
  endfunction

  initial begin
    apply('0, 1'b1, 1'b0, "all zero");
    apply({1'b0, {(N-1){1'b1}}}, 1'b1, 1'b1, "all one");
    apply(with_ones(20), 1'b1, 1'b0, "tie 20/20");
    apply(with_ones(21), 1'b1, 1'b1, "worst case 21/20");
    apply(with_ones(19), 1'b1, 1'b0, "19 ones");
    apply(with_ones(30), 1'b0, 1'b0, "disabled");
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = (i % 3 == 0) ? $urandom_range(17, 23) : $urandom_range(0, 40);
      apply(with_ones(k), 1'b1, logic'(k > 20), "random");
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
