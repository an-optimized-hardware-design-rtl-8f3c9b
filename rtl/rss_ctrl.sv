// Control unit of the reference sample smoothing filter.
//
// A block is started by `start` (accepted only while `ready`), together with
// its size (w_sel, h_sel) and `skip`. The cycle look-up ROM gives the number
// of 33-sample segments of the block; a segment counter, cleared by start,
// steps once per clock until the last segment has been requested. Each
// segment then travels through a three-step pipeline:
//   load    (`in_load` high): the input buffer captures the window of segment
//           `seg_idx`, which the sample source must present on the same cycle;
//   filter  (f_* outputs): the filter array smooths the input buffer and
//           `out_load` writes the result into the output buffer;
//   output  (`out_valid`): the output buffer holds segment `out_seg`; `done`
//           marks the block's final segment.
// So the first smoothed segment appears two clocks after start and a block
// of n segments occupies the datapath for n cycles; a new block may start
// on the cycle after the previous one's last load, so 8x8 blocks stream at
// one block per clock. A block started with `skip` high consumes a single
// cycle: nothing is loaded or smoothed, and two clocks later `done` and
// `out_skipped` are high with `out_valid` low.
//
// The counter, the ROM, start/done and the one-cycle skip follow the
// published design; the three-step timing, `ready`, the segment tags and the
// synchronous active-low reset are this design's choices.
module rss_ctrl
  import rss_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // block request
  input  logic               start,
  input  logic               skip,
  input  blk_size_e          w_sel,
  input  blk_size_e          h_sel,
  output logic               ready,
  // load step: input buffer strobe and the segment it must receive
  output logic               in_load,
  output logic [SEG_W-1:0]   seg_idx,
  // filter step: end-sample controls for the filter array, output strobe
  output logic               f_first,
  output logic               f_last,
  output logic [LANE_W-1:0]  f_last_lane,
  output logic               out_load,
  // output step
  output logic               out_valid,
  output logic [SEG_W-1:0]   out_seg,
  output logic               done,
  output logic               out_skipped
);

  logic [SEG_W-1:0]  lut_ncyc;
  logic [LANE_W-1:0] lut_lane;

  rss_cycle_lut u_lut (
    .w_sel    (w_sel),
    .h_sel    (h_sel),
    .ncyc     (lut_ncyc),
    .last_lane(lut_lane)
  );

  // Load step state
  logic              busy;        // further segments of the block to load
  logic [SEG_W-1:0]  cnt;         // segment counter
  logic [SEG_W-1:0]  ncyc_q;      // segments of the current block
  logic [LANE_W-1:0] lane_q;      // last lane of the current block
  logic              accept;
  logic              load_last;   // the segment loaded now is the block's last

  // Filter step state
  logic              f_act, f_skip;
  logic [SEG_W-1:0]  f_seg;
  logic              f_end;

  assign ready   = !busy;
  assign accept  = start && ready;
  assign in_load = accept ? !skip : busy;
  assign seg_idx = accept ? '0 : cnt;
  assign load_last = accept ? (skip || lut_ncyc == SEG_W'(1))
                            : (cnt == ncyc_q - SEG_W'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      ncyc_q <= '0;
      lane_q <= '0;
    end else if (accept) begin
      ncyc_q <= lut_ncyc;
      lane_q <= lut_lane;
      cnt    <= SEG_W'(1);
      busy   <= !skip && lut_ncyc > SEG_W'(1);
    end else if (busy) begin
      cnt  <= cnt + SEG_W'(1);
      busy <= !load_last;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_act       <= 1'b0;
      f_skip      <= 1'b0;
      f_seg       <= '0;
      f_end       <= 1'b0;
      f_last_lane <= '0;
      out_valid   <= 1'b0;
      out_seg     <= '0;
      done        <= 1'b0;
      out_skipped <= 1'b0;
    end else begin
      f_act       <= accept || busy;
      f_skip      <= accept && skip;
      f_seg       <= seg_idx;
      f_end       <= load_last;
      f_last_lane <= accept ? lut_lane : lane_q;
      out_valid   <= out_load;
      out_seg     <= f_seg;
      done        <= f_act && f_end;
      out_skipped <= f_act && f_skip;
    end
  end

  assign f_first  = (f_seg == '0);
  assign f_last   = f_end;
  assign out_load = f_act && !f_skip;

  // Handshake rule: a block may only be started while the unit is ready.
  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready)
    else $error("rss_ctrl: start while busy is ignored");

endmodule
