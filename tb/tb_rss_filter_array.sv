// Testbench of rss_filter_array: random 35-sample windows with random
// first/last flags and last-lane positions. Each of the 33 outputs must be
// the [1 2 1]/4 smoothing of its three window samples, except lane 0 when
// `first` is set and lane `last_lane` when `last` is set, which must equal
// the unsmoothed centre sample.
module tb_rss_filter_array;
  import rss_pkg::*;
  import rss_ref_pkg::*;

  sample_t [WIN-1:0]   win;
  sample_t [LANES-1:0] y;
  logic                first, last;
  logic [LANE_W-1:0]   last_lane;
  int checks = 0, failures = 0;
  int n_first = 0, n_last = 0;

  rss_filter_array dut (.win(win), .first(first), .last(last), .last_lane(last_lane), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int exp;
      for (int j = 0; j < WIN; j++) win[j] = sample_t'($urandom_range(255));
      if (t % 50 == 0) win = '1;
      first     = ($urandom_range(3) == 0);
      last      = ($urandom_range(3) == 0);
      last_lane = LANE_W'($urandom_range(LANES - 1));
      #1;
      for (int i = 0; i < LANES; i++) begin
        if ((first && i == 0) || (last && i == int'(last_lane))) begin
          exp = int'(win[i+1]);
          if (first && i == 0) n_first++; else n_last++;
        end else
          exp = smooth3(int'(win[i]), int'(win[i+1]), int'(win[i+2]));
        checks++;
        if (int'(y[i]) != exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d lane=%0d y=%0d exp=%0d first=%0b last=%0b ll=%0d",
                     t, i, y[i], exp, first, last, last_lane);
        end
      end
    end
    if (n_first == 0 || n_last == 0) failures++;
    $display("pass-through lanes checked: first=%0d last=%0d", n_first, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
