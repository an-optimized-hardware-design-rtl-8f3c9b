// VVC intra reference sample smoothing filter, top level.
//
// Smooths the reference line of one intra block (2H left samples, the
// top-left corner and 2W top samples, W and H in {8, 16, 32, 64}) with the
// VVC [1 2 1]/4 filter, leaving the first and last line samples unchanged.
// Thirty-three smoothing units work in parallel, so an 8x8 block (33 line
// samples) takes one clock and a 64x64 block (257 samples) takes eight.
//
// Datapath: input buffer (35 samples) -> filter array (33 units) -> output
// buffer (33 samples), sequenced by the control unit.
//
// Interface and timing:
//   start/skip/w_sel/h_sel  block request, taken when `ready` is high.
//   in_load/in_seg          on every cycle with `in_load` high the source
//                           must drive in_win with the window of segment
//                           in_seg: in_win[j] = line position 33*in_seg-1+j
//                           (positions outside the line are don't-care).
//                           The first load is the start cycle itself.
//   out_valid/out_seg       two clocks after a segment was loaded,
//                           out_samples[i] holds smoothed line position
//                           33*out_seg+i; `done` marks the block's last
//                           segment (or, with out_skipped, a skipped block).
// Line positions: 0 = Left[2H-1], 2H-1 = Left[0], 2H = corner,
// 2H+1+i = Top[i].
//
// The structure and sizes (33 units, 35-sample input window, LUT and counter
// control, single-cycle skip) follow the published design; the interface
// protocol and reset are this design's choices.
module vvc_rss_top
  import rss_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    skip,
  input  blk_size_e               w_sel,
  input  blk_size_e               h_sel,
  output logic                    ready,
  output logic                    in_load,
  output logic [SEG_W-1:0]        in_seg,
  input  sample_t [WIN-1:0]       in_win,
  output logic                    out_valid,
  output logic [SEG_W-1:0]        out_seg,
  output sample_t [LANES-1:0]     out_samples,
  output logic                    done,
  output logic                    out_skipped
);

  sample_t [WIN-1:0]   win_q;
  sample_t [LANES-1:0] smoothed;
  logic                f_first, f_last, out_load;
  logic [LANE_W-1:0]   f_last_lane;

  rss_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .skip       (skip),
    .w_sel      (w_sel),
    .h_sel      (h_sel),
    .ready      (ready),
    .in_load    (in_load),
    .seg_idx    (in_seg),
    .f_first    (f_first),
    .f_last     (f_last),
    .f_last_lane(f_last_lane),
    .out_load   (out_load),
    .out_valid  (out_valid),
    .out_seg    (out_seg),
    .done       (done),
    .out_skipped(out_skipped)
  );

  rss_sample_buf #(.DEPTH(WIN)) u_in_buf (
    .clk  (clk),
    .rst_n(rst_n),
    .load (in_load),
    .d    (in_win),
    .q    (win_q)
  );

  rss_filter_array #(.N_LANES(LANES)) u_filters (
    .win      (win_q),
    .first    (f_first),
    .last     (f_last),
    .last_lane(f_last_lane),
    .y        (smoothed)
  );

  rss_sample_buf #(.DEPTH(LANES)) u_out_buf (
    .clk  (clk),
    .rst_n(rst_n),
    .load (out_load),
    .d    (smoothed),
    .q    (out_samples)
  );

endmodule
