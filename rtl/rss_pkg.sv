// Shared types and constants of the VVC intra reference sample smoothing
// filter.
//
// A block of W x H luma samples (W, H in {8, 16, 32, 64}) is predicted from
// one line of 2H + 1 + 2W reconstructed neighbours, ordered here as
//   Left[2H-1] ... Left[0], corner, Top[0] ... Top[2W-1]
// so that position 0 is the bottom-most left sample, position 2H is the
// shared top-left corner and position 2W+2H is the right-most top sample.
// Every position except the two ends is replaced by the [1 2 1]/4 smoothed
// value of itself and its two line neighbours.
//
// The line is processed in segments of LANES = 33 output samples; segment k
// needs a window of WIN = 35 input samples, positions 33k-1 ... 33k+33.
// The 8-bit sample width, the 33 lanes and the 35-sample window are those of
// the published architecture; the size encoding is this design's own.
package rss_pkg;

  parameter int unsigned SAMPLE_W = 8;   // bits per reference sample
  parameter int unsigned LANES    = 33;  // smoothing units / output samples per cycle
  parameter int unsigned WIN      = LANES + 2;  // input window (one neighbour each side)
  parameter int unsigned SEG_W    = 4;   // segment counter width (up to 8 segments)
  parameter int unsigned LANE_W   = $clog2(LANES);

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Block width or height, coded as log2(size) - 3.
  typedef enum logic [1:0] {
    SZ8  = 2'd0,
    SZ16 = 2'd1,
    SZ32 = 2'd2,
    SZ64 = 2'd3
  } blk_size_e;

endpackage
