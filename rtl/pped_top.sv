// pped_top: feature-map and PPED-vector generator for one gray-scale image.
//
// The image is streamed in as columns of five 8-bit pixels, one column per
// clock, strip by strip: strip s carries image rows s..s+4, and its columns
// 0..IMG_W-1 arrive left to right. Each column enters a 5x6 image buffer.
// The two newest buffer columns feed the absolute value circuits (AVC), whose
// nine differences shift into the median filter circuit (MFC); the MFC finds
// the median of the 40 neighbour differences of a 5x5 block in two pipelined
// cycles with majority voting. Meanwhile the edge filtering circuit (EFC)
// computes the four directional gradients of the same block and, when the
// median arrives, thresholds the largest one into an edge flag for the block's
// centre pixel. The vector generator accumulates the flags into the 64-element
// PPED vector.
//
// Frame protocol: pulse `frame_start` for one clock, with no column in that
// clock (an assertion reports one), to clear the vector. Then send IMG_H-4
// strips of IMG_W columns with `in_valid` high. Only pixels at least two
// pixels from every border have a full 5x5 block; only they receive flags,
// so a frame yields (IMG_H-4)*(IMG_W-4) flag words. A clock with `in_valid`
// low inside a strip still shifts the pipeline; the blocks that span that
// gap get no flags. `vec_done` rises six clock edges after the edge that
// takes the last column, and `pped_vec` holds the frame's vector until the
// next `frame_start`. A frame of continuous columns takes (IMG_H-4)*IMG_W
// clocks: 3840 clocks, 76.8 us at 50 MHz, for 64x64.
//
// Latency of a block, counted from the clock edge that loads its newest
// column into buffer column 6: edge +1 puts it in buffer columns 1..5 and its
// differences in the MFC; edge +3 brings its median; edge +5 brings its
// flags on map_*.
//
// The buffer, AVC/MFC/EFC partition, the one-column-per-clock input and the
// seamless threshold-to-flag pipeline follow the published design. The strip order,
// the frame protocol, border handling and the tag pipeline that marks valid
// blocks are this design's choices.
module pped_top
  import pped_pkg::*;
#(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  parameter int unsigned CNT_W = 10,
  localparam int unsigned ROW_W = $clog2(IMG_H),
  localparam int unsigned COL_W = $clog2(IMG_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             in_valid,
  input  pix_t             in_col [K],          // row 0 of the strip first
  // feature maps, one pixel per clock
  output logic             map_valid,
  output logic [NDIR-1:0]  map_flags,           // H, +45, V, -45
  output logic [ROW_W-1:0] map_row,
  output logic [COL_W-1:0] map_col,
  // PPED vector
  output logic [CNT_W-1:0] pped_vec [NDIR*NBIN],
  output logic             vec_done
);

  localparam int unsigned NSTRIP = IMG_H - K + 1;
  localparam int unsigned HALF   = K / 2;
  localparam int unsigned RUN_W  = $clog2(K + 1);
  localparam int unsigned STR_W  = $clog2(NSTRIP);

  // A tag travels with every column/block through the pipeline.
  typedef struct packed {
    logic             ok;     // a complete 5x5 block of one strip
    logic             last;   // last block of the frame
    logic [ROW_W-1:0] row;    // centre pixel
    logic [COL_W-1:0] col;
  } tag_t;

  // ---------------- scan sequencing ----------------
  logic             active_q;
  logic [COL_W-1:0] col_q;
  logic [STR_W-1:0] strip_q;
  logic [RUN_W-1:0] run_q;      // consecutive columns of this strip, capped
  logic             take;
  logic [RUN_W-1:0] run_d;
  tag_t             tag_in;

  assign take = active_q && in_valid && !frame_start;

  always_comb begin
    run_d = '0;
    if (take)
      run_d = (col_q == '0)         ? RUN_W'(1) :
              (run_q == RUN_W'(K))  ? RUN_W'(K) : run_q + 1'b1;
    tag_in.ok   = (run_d == RUN_W'(K));
    tag_in.last = take && (strip_q == STR_W'(NSTRIP - 1)) &&
                  (col_q == COL_W'(IMG_W - 1));
    tag_in.row  = ROW_W'(int'(strip_q) + int'(HALF));
    tag_in.col  = COL_W'(int'(col_q) - int'(HALF));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      col_q    <= '0;
      strip_q  <= '0;
      run_q    <= '0;
    end else if (frame_start) begin
      // Frame protocol: a column sent in the frame_start clock is dropped.
      a_start_alone : assert (!in_valid)
        else $error("column sent in the same clock as frame_start");
      active_q <= 1'b1;
      col_q    <= '0;
      strip_q  <= '0;
      run_q    <= '0;
    end else begin
      run_q <= run_d;
      if (take) begin
        if (col_q == COL_W'(IMG_W - 1)) begin
          col_q <= '0;
          if (strip_q == STR_W'(NSTRIP - 1)) begin
            strip_q  <= '0;
            active_q <= 1'b0;
          end else begin
            strip_q <= strip_q + 1'b1;
          end
        end else begin
          col_q <= col_q + 1'b1;
        end
      end
    end
  end

  // Tag stages: buffer column 6, buffer column 5 (block in columns 1..5),
  // then the four EFC stages.
  localparam int unsigned TAG_STAGES = 6;
  tag_t tag_q [TAG_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAG_STAGES); i++) tag_q[i] <= '0;
    end else begin
      tag_q[0] <= tag_in;
      for (int i = 1; i < int'(TAG_STAGES); i++) tag_q[i] <= tag_q[i-1];
    end
  end

  // ---------------- datapath ----------------
  pix_t buf_pix [K][K+1];
  pix_t col5 [K], col6 [K];
  pix_t blk [K][K];
  pix_t vdiff [NVDIFF];
  pix_t hdiff [NHDIFF];
  pix_t threshold;
  logic [NDIR-1:0] flags;

  image_buffer u_buf (
    .clk   (clk),
    .rst_n (rst_n),
    .col_in(in_col),
    .pix   (buf_pix)
  );

  always_comb begin
    for (int r = 0; r < int'(K); r++) begin
      col5[r] = buf_pix[r][K-1];
      col6[r] = buf_pix[r][K];
      for (int c = 0; c < int'(K); c++)
        blk[r][c] = buf_pix[r][c];
    end
  end

  avc u_avc (
    .col5 (col5),
    .col6 (col6),
    .vdiff(vdiff),
    .hdiff(hdiff)
  );

  mfc u_mfc (
    .clk   (clk),
    .rst_n (rst_n),
    .vdiff (vdiff),
    .hdiff (hdiff),
    .median(threshold)
  );

  efc u_efc (
    .clk      (clk),
    .rst_n    (rst_n),
    .blk      (blk),
    .threshold(threshold),
    .flags    (flags)
  );

  tag_t tag_out;
  assign tag_out = tag_q[TAG_STAGES-1];

  assign map_valid = tag_out.ok;
  assign map_flags = tag_out.ok ? flags : '0;
  assign map_row   = tag_out.row;
  assign map_col   = tag_out.col;

  vector_generator #(
    .IMG_W(IMG_W),
    .IMG_H(IMG_H),
    .CNT_W(CNT_W)
  ) u_vg (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(frame_start),
    .valid(tag_out.ok),
    .last (tag_out.last),
    .flags(flags),
    .row  (tag_out.row),
    .col  (tag_out.col),
    .vec  (pped_vec),
    .done (vec_done)
  );

endmodule
