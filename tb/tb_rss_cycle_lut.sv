// Testbench of rss_cycle_lut: for all 16 block sizes the ROM must return
// ceil((2W + 2H - 1) / 33) segments and (2W + 2H) mod 33 as the lane of the
// final line sample.
module tb_rss_cycle_lut;
  import rss_pkg::*;

  blk_size_e         w_sel, h_sel;
  logic [SEG_W-1:0]  ncyc;
  logic [LANE_W-1:0] last_lane;
  int checks = 0, failures = 0;

  rss_cycle_lut dut (.w_sel(w_sel), .h_sel(h_sel), .ncyc(ncyc), .last_lane(last_lane));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int wi = 0; wi < 4; wi++)
      for (int hi = 0; hi < 4; hi++) begin
        automatic int w = 8 << wi, h = 8 << hi;
        automatic int exp_n = (2 * w + 2 * h - 1 + 32) / 33;
        automatic int exp_l = (2 * w + 2 * h) % 33;
        w_sel = blk_size_e'(wi);
        h_sel = blk_size_e'(hi);
        #1;
        checks += 2;
        if (int'(ncyc) != exp_n || int'(last_lane) != exp_l) begin
          failures++;
          $display("FAIL %0dx%0d: ncyc=%0d exp %0d, last_lane=%0d exp %0d",
                   w, h, ncyc, exp_n, last_lane, exp_l);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
