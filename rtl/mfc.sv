// mfc: median filter circuit, the threshold detector of the edge filter.
//
// It holds the 40 absolute luminance differences of one 5x5 block in an
// array of median detection units (MDUs) and finds their median with eight
// majority voting circuits (MVCs). The array is nine shift chains: four
// vertical-difference chains five cells deep (one cell per block column) and
// five horizontal-difference chains four cells deep (one per column pair).
// Every clock the nine AVC outputs enter at the top of the chains and
// everything moves one cell down, so the array always holds the differences
// of the latest five columns.
//
// Timing: values that enter at clock edge e0 are searched during the cycle
// that follows it. MVC7..MVC4 resolve the upper nibble in that cycle, as a
// four-step combinational ripple, and it is stored at edge e1 together with
// each MDU's loser-adjusted lower nibble. MVC3..MVC0 resolve the lower nibble
// in the next cycle, and the full median is in `median` after edge e2. A new
// block is accepted every clock. Each MVC's 41st input is tied to 0, so ties
// go to 0 and the result is the lower median (the 20th smallest of the 40
// values).
//
// The array shape, the 8 MVCs, the nibble split and the tie input follow the
// document. The cell numbering, the median register and the reset are this
// design's choices.
module mfc
  import pped_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t vdiff [NVDIFF],   // from the AVC, vertical differences
  input  pix_t hdiff [NHDIFF],   // from the AVC, horizontal differences
  output pix_t median            // threshold, two clocks after the block
);

  localparam int unsigned VDEPTH = K;       // block columns
  localparam int unsigned HDEPTH = K - 1;   // column pairs
  localparam int unsigned HBASE  = NVDIFF * VDEPTH;

  // Vote bits of all cells, one vector per bit position, and the flags.
  logic [NDIFF-1:0] v7a, v6a, v5a, v4a, v3a, v2a, v1a, v0a;
  logic             m7, m6, m5, m4, m3, m2, m1, m0;

  pix_t chain_d [NDIFF];   // input of each cell
  pix_t chain_q [NDIFF];   // output of each cell

  // Cell n of a chain takes the output of cell n-1; cell 0 takes the AVC.
  for (genvar j = 0; j < NVDIFF; j++) begin : g_vchain
    for (genvar k = 0; k < VDEPTH; k++) begin : g_cell
      localparam int unsigned IDX = j * VDEPTH + k;
      if (k == 0) begin : g_top
        assign chain_d[IDX] = vdiff[j];
      end else begin : g_below
        assign chain_d[IDX] = chain_q[IDX-1];
      end
    end
  end

  for (genvar r = 0; r < NHDIFF; r++) begin : g_hchain
    for (genvar k = 0; k < HDEPTH; k++) begin : g_cell
      localparam int unsigned IDX = HBASE + r * HDEPTH + k;
      if (k == 0) begin : g_top
        assign chain_d[IDX] = hdiff[r];
      end else begin : g_below
        assign chain_d[IDX] = chain_q[IDX-1];
      end
    end
  end

  for (genvar n = 0; n < NDIFF; n++) begin : g_mdu
    mdu u_mdu (
      .clk  (clk),
      .rst_n(rst_n),
      .d_in (chain_d[n]),
      .d_q  (chain_q[n]),
      .m7(m7), .m6(m6), .m5(m5), .m4(m4),
      .v7(v7a[n]), .v6(v6a[n]), .v5(v5a[n]), .v4(v4a[n]),
      .m3(m3), .m2(m2), .m1(m1),
      .v3(v3a[n]), .v2(v2a[n]), .v1(v1a[n]), .v0(v0a[n])
    );
  end

  // Eight majority voting circuits; IN40 is tied to 0.
  mvc #(.N_IN(NDIFF + 1)) u_mvc7 (.enbl(1'b1), .in({1'b0, v7a}), .out(m7));
  mvc #(.N_IN(NDIFF + 1)) u_mvc6 (.enbl(1'b1), .in({1'b0, v6a}), .out(m6));
  mvc #(.N_IN(NDIFF + 1)) u_mvc5 (.enbl(1'b1), .in({1'b0, v5a}), .out(m5));
  mvc #(.N_IN(NDIFF + 1)) u_mvc4 (.enbl(1'b1), .in({1'b0, v4a}), .out(m4));
  mvc #(.N_IN(NDIFF + 1)) u_mvc3 (.enbl(1'b1), .in({1'b0, v3a}), .out(m3));
  mvc #(.N_IN(NDIFF + 1)) u_mvc2 (.enbl(1'b1), .in({1'b0, v2a}), .out(m2));
  mvc #(.N_IN(NDIFF + 1)) u_mvc1 (.enbl(1'b1), .in({1'b0, v1a}), .out(m1));
  mvc #(.N_IN(NDIFF + 1)) u_mvc0 (.enbl(1'b1), .in({1'b0, v0a}), .out(m0));

  // Median value register, filled a nibble per pipeline stage.
  logic [3:0] upper_q;
  pix_t       median_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upper_q  <= '0;
      median_q <= '0;
    end else begin
      upper_q  <= {m7, m6, m5, m4};
      median_q <= {upper_q, m3, m2, m1, m0};
    end
  end

  assign median = median_q;

endmodule
