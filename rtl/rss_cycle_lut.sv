// Cycle look-up ROM of the control unit.
//
// For every valid block size W x H (W, H in {8, 16, 32, 64}) it returns
//   ncyc      = ceil((2W + 2H - 1) / 33), the number of 33-sample segments
//               (clock cycles) the block's reference line takes, and
//   last_lane = (2W + 2H) mod 33, the output lane that holds the final line
//               sample (position 2W + 2H) in the last segment.
// The ncyc column is the table of the published design; the last_lane column
// is this design's addition, used to leave the final sample unfiltered.
// Both are constants, so no arithmetic happens at run time. Combinational.
module rss_cycle_lut
  import rss_pkg::*;
(
  input  blk_size_e          w_sel,
  input  blk_size_e          h_sel,
  output logic [SEG_W-1:0]   ncyc,
  output logic [LANE_W-1:0]  last_lane
);

  always_comb begin
    // The table is symmetric in W and H: index it by the sorted pair.
    logic [1:0] lo, hi;
    if (w_sel < h_sel) begin
      lo = w_sel;
      hi = h_sel;
    end else begin
      lo = h_sel;
      hi = w_sel;
    end
    unique case ({lo, hi})
      //                   2W+2H  ncyc  last_lane
      4'b00_00: begin ncyc = 4'd1; last_lane = 6'd32; end //  32
      4'b00_01: begin ncyc = 4'd2; last_lane = 6'd15; end //  48
      4'b00_10: begin ncyc = 4'd3; last_lane = 6'd14; end //  80
      4'b00_11: begin ncyc = 4'd5; last_lane = 6'd12; end // 144
      4'b01_01: begin ncyc = 4'd2; last_lane = 6'd31; end //  64
      4'b01_10: begin ncyc = 4'd3; last_lane = 6'd30; end //  96
      4'b01_11: begin ncyc = 4'd5; last_lane = 6'd28; end // 160
      4'b10_10: begin ncyc = 4'd4; last_lane = 6'd29; end // 128
      4'b10_11: begin ncyc = 4'd6; last_lane = 6'd27; end // 192
      4'b11_11: begin ncyc = 4'd8; last_lane = 6'd25; end // 256
      default:  begin ncyc = 4'd1; last_lane = 6'd0;  end // unreachable (lo <= hi)
    endcase
  end

endmodule
