// mdu: median detection unit, one cell of the 40-entry difference array.
//
// Each MDU holds one 8-bit luminance difference. The array is a set of shift
// chains: on every clock the MDU takes the value of the cell above it (or a
// fresh AVC output at the top of a chain) and hands its own to the cell below.
//
// The median is found by a bit-serial binary search with majority votes, MSB
// first. The MDU presents one vote bit per bit position to the majority
// voting circuits (MVCs) and receives the majority flag back. Once its bit
// differs from the majority it is a loser: every later vote bit it presents
// equals the bit it lost with, which withdraws it from the search. The upper
// nibble is searched in the clock cycle in which the value sits in the MDU
// (v7..v4 against m7..m4, a combinational ripple through four MVCs). At the
// clock edge the lower nibble, already replaced by the loser bit if the value
// lost in the upper search, is stored in lo_q; the next cycle searches it
// (v3..v0 against m3..m0) while the array already holds the next block.
//
// The loser rule and the split into an upper and a lower nibble pipeline
// stage follow the published design; the cell's exact register layout, and carrying
// the loser information by rewriting the stored lower nibble, are this
// design's choices. Vote and flag ports are scalars so that the ripple
// through the array stays free of false combinational loops.
module mdu
  import pped_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t d_in,      // value shifted in from above
  output pix_t d_q,       // value held, shifted to the cell below
  // upper-nibble search, same cycle as d_q
  input  logic m7, m6, m5, m4,
  output logic v7, v6, v5, v4,
  // lower-nibble search, one cycle later (the last flag, m0, is not needed
  // by the cell: no vote follows it)
  input  logic m3, m2, m1,
  output logic v3, v2, v1, v0
);

  pix_t       data_q;
  logic [3:0] lo_q;
  logic       lost7, lost6, lost5, lost4;
  logic       lost3, lost2, lost1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      lo_q   <= '0;
    end else begin
      data_q <= d_in;
      lo_q   <= lost4 ? {4{v4}} : data_q[3:0];
    end
  end

  assign d_q = data_q;

  // Upper nibble: a loser repeats the bit it lost with.
  assign v7    = data_q[7];
  assign lost7 = (v7 != m7);
  assign v6    = lost7 ? v7 : data_q[6];
  assign lost6 = lost7 || (v6 != m6);
  assign v5    = lost6 ? v6 : data_q[5];
  assign lost5 = lost6 || (v5 != m5);
  assign v4    = lost5 ? v5 : data_q[4];
  assign lost4 = lost5 || (v4 != m4);

  // Lower nibble of the value held during the previous cycle.
  assign v3    = lo_q[3];
  assign lost3 = (v3 != m3);
  assign v2    = lost3 ? v3 : lo_q[2];
  assign lost2 = lost3 || (v2 != m2);
  assign v1    = lost2 ? v2 : lo_q[1];
  assign lost1 = lost2 || (v1 != m1);
  assign v0    = lost1 ? v1 : lo_q[0];

endmodule
