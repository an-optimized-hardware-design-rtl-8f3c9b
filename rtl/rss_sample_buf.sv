// Sample buffer: DEPTH registered 8-bit samples loaded in parallel.
//
// Used twice in the smoothing filter: as the input buffer (DEPTH = 35, one
// window of the reference line) and as the output buffer (DEPTH = 33, one
// segment of smoothed samples). On a rising clock edge with `load` high all
// DEPTH samples of `d` are captured; otherwise the buffer holds. `q` is the
// registered content. An active-low synchronous reset clears it to zero
// (the reset is this design's choice).
module rss_sample_buf
  import rss_pkg::*;
#(
  parameter int unsigned DEPTH = WIN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  sample_t [DEPTH-1:0]   d,
  output sample_t [DEPTH-1:0]   q
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      q <= '0;
    else if (load)
      q <= d;
  end

endmodule
