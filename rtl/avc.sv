// avc: the nine absolute value circuits between the image buffer and the
// median array.
//
// From the two newest buffer columns it forms, combinationally, the four
// vertical differences |p(r+1) - p(r)| inside column 6 and the five
// horizontal differences |col6(r) - col5(r)| between columns 6 and 5. Over
// five consecutive clocks these give the 20 vertical and 20 horizontal
// differences of one 5x5 block.
//
// The published design says that the AVC takes its differences from columns 5 and 6
// and that four vertical and five horizontal differences enter the array per
// clock. That the vertical ones are taken inside column 6 (the newest column)
// is this design's choice; it is what makes the array hold exactly the
// differences of the block sitting in columns 1 to 5.
module avc
  import pped_pkg::*;
(
  input  pix_t col5  [K],
  input  pix_t col6  [K],
  output pix_t vdiff [NVDIFF],   // vdiff[r] = |col6[r+1] - col6[r]|
  output pix_t hdiff [NHDIFF]    // hdiff[r] = |col6[r]   - col5[r]|
);

  function automatic pix_t absdiff(input pix_t a, input pix_t b);
    return (a >= b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

  always_comb begin
    for (int r = 0; r < NVDIFF; r++)
      vdiff[r] = absdiff(col6[r+1], col6[r]);
    for (int r = 0; r < NHDIFF; r++)
      hdiff[r] = absdiff(col6[r], col5[r]);
  end

endmodule
