// One reference sample smoothing unit: y = (A + 2B + C + 2) >> 2.
//
// The filter is evaluated as two halving stages,
//   h = floor((A + C) / 2)          and   y = floor((h + B + 1) / 2),
// which is exactly equal to the [1 2 1]/4 filter with rounding. Neither
// stage computes the bit that its halving throws away:
//   stage 1 adds bits [W-1:1] of A and C; the carry that bit 0 would have
//           produced is A[0] AND C[0];
//   stage 2 adds bits [W-1:1] of h and B; the rounding constant makes the
//           carry-in of bit 0 a 1, so its carry-out is h[0] OR B[0].
// Each stage is therefore one (W-1)-bit adder with carry-in whose carry-out
// becomes the MSB of the W-bit result. With W = 8 this is the datapath of
// two 7-bit adders, one AND and one OR gate that the published design uses.
//
// Interface: a, c are the two line neighbours, b the sample being smoothed,
// y the smoothed sample. Purely combinational.
module rss_unit #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  logic         cin1, cin2;
  logic [W-1:0] half_ac;   // floor((a + c) / 2)

  always_comb begin
    cin1    = a[0] & c[0];
    half_ac = {1'b0, a[W-1:1]} + {1'b0, c[W-1:1]} + W'(cin1);
    cin2    = half_ac[0] | b[0];
    y       = {1'b0, half_ac[W-1:1]} + {1'b0, b[W-1:1]} + W'(cin2);
  end

endmodule
