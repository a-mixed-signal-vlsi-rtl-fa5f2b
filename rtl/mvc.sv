// mvc: majority voting circuit of the median search.
//
// It decides whether the ones or the zeros form the majority of its N_IN
// input bits. In the chip it is a mixed-signal circuit: two banks of
// output-connected CMOS inverters (one fed the bits, one their complements)
// drive a two-stage differential amplifier enabled by ENBL. Here it is the
// same decision written as logic: the output is 1 when more than half of the
// inputs are 1.
//
// There are 41 input terminals for 40 data bits; the user ties in[40] to 0
// so that a 20/20 tie among the data resolves to 0, as the published design
// describes. With that tie input the search returns the lower median of the
// 40 values. The output is purely combinational (the chip settles in a few
// nanoseconds). Driving the output to 0 while enbl is low is this design's
// choice; the published design does not give the disabled output level.
module mvc #(
  parameter int unsigned N_IN = 41
) (
  input  logic            enbl,
  input  logic [N_IN-1:0] in,
  output logic            out
);

  localparam int unsigned CNT_W = $clog2(N_IN + 1);

  logic [CNT_W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(N_IN); i++)
      ones = ones + CNT_W'(in[i]);
  end

  // ones > zeros  <=>  2*ones > N_IN
  assign out = enbl && ((32'(ones) << 1) > N_IN);

endmodule
