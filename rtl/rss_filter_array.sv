// Array of LANES parallel smoothing units over one window of the reference
// line.
//
// win[j] holds line position 33k - 1 + j for segment k, so output lane i
// (line position 33k + i) is the [1 2 1]/4 smoothing of win[i], win[i+1],
// win[i+2]. The two end samples of the line are never smoothed: when
// `first` is set (segment 0) lane 0 passes win[1] through unchanged, and when
// `last` is set (final segment) lane `last_lane`, which holds the final line
// sample, does the same. Lanes after `last_lane` in the final segment lie
// beyond the line and carry no meaning.
//
// The array of 33 units over a 35-sample window follows the published
// architecture; the end-sample pass-through multiplexers are this design's
// way of leaving the two end samples unfiltered. Purely combinational.
module rss_filter_array
  import rss_pkg::*;
#(
  parameter int unsigned N_LANES = LANES
) (
  input  sample_t [N_LANES+1:0]       win,
  input  logic                        first,
  input  logic                        last,
  input  logic [$clog2(N_LANES)-1:0]  last_lane,
  output sample_t [N_LANES-1:0]       y
);

  sample_t [N_LANES-1:0] smooth;

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    rss_unit #(.W(SAMPLE_W)) u_unit (
      .a(win[i]),
      .b(win[i+1]),
      .c(win[i+2]),
      .y(smooth[i])
    );
  end

  always_comb begin
    for (int i = 0; i < N_LANES; i++) begin
      if ((first && i == 0) || (last && last_lane == ($clog2(N_LANES))'(i)))
        y[i] = win[i+1];
      else
        y[i] = smooth[i];
    end
  end

endmodule
