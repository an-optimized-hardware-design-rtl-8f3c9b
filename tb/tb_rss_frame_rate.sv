// Worst-case throughput workload: one UHD 8K luma frame (7680 x 4320)
// cut entirely into 8x8 intra blocks, all filtered, i.e. 518,400 blocks.
// The blocks are started back to back; every smoothed sample is checked
// against the [1 2 1]/4 reference, the clocks from the first start to the
// last `done` are counted, and the clock frequency needed for real time is
// derived for 4K (3840 x 2160) and 8K at 30 and 60 frames per second:
//   f = blocks_per_frame * clocks_per_block * fps.
// The expected values are 3.89, 7.78, 15.55 and 31.10 MHz.
module tb_rss_frame_rate;
  import rss_pkg::*;
  import rss_ref_pkg::*;

  localparam int FRAME_W = 7680, FRAME_H = 4320;
  localparam int NBLK = (FRAME_W / 8) * (FRAME_H / 8);

  logic clk = 0, rst_n = 0, start = 0, skip = 0;
  blk_size_e w_sel = SZ8, h_sel = SZ8;
  logic ready, in_load, out_valid, done, out_skipped;
  logic [SEG_W-1:0] in_seg, out_seg;
  sample_t [WIN-1:0] in_win;
  sample_t [LANES-1:0] out_samples;

  vvc_rss_top dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, checks = 0, failures = 0;
  int n_started = 0, n_done = 0, first_start = -1, last_done = -1;
  sample_t [WIN-1:0] pending[$];   // windows of blocks in flight

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NBLK + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mhz(int fw, int fh, int fps, real clk_per_blk);
    return real'((fw / 8) * (fh / 8)) * clk_per_blk * fps / 1.0e6;
  endfunction

  task automatic chk_rate(string name, real got, real exp);
    checks++;
    $display("%-10s requires %6.2f MHz (published %6.2f MHz)", name, got, exp);
    if (got > exp + 0.006 || got < exp - 0.006) failures++;
  endtask

  initial begin
    in_win = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_done < NBLK) begin
      @(negedge clk);
      // sink
      if (out_valid) begin
        automatic sample_t [WIN-1:0] w = pending.pop_front();
        automatic int bad = 0;
        for (int i = 0; i < LANES; i++) begin
          automatic int exp = (i == 0 || i == LANES - 1) ? int'(w[i+1])
                  : smooth3(int'(w[i]), int'(w[i+1]), int'(w[i+2]));
          if (int'(out_samples[i]) != exp) bad++;
        end
        checks++;
        if (bad != 0 || !done) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d: %0d lanes wrong", n_done, bad);
        end
        n_done++;
        last_done = cyc;
      end
      // source
      start = 0;
      if (n_started < NBLK) begin
        checks++;
        if (!ready) failures++;
        start = 1;
        if (first_start < 0) first_start = cyc;
        n_started++;
      end
      #1;
      if (in_load) begin
        in_win[0] = sample_t'($urandom);
        for (int j = 1; j <= LANES; j++) in_win[j] = sample_t'($urandom);
        in_win[WIN-1] = sample_t'($urandom);
        pending.push_back(in_win);
      end
    end
    begin
      automatic real cpb = real'(last_done - first_start - 1) / real'(NBLK);
      $display("%0d 8x8 blocks finished %0d clocks after the first result appeared + 1: %0.4f clocks per block",
               NBLK, last_done - first_start - 1, cpb);
      chk_rate("4K 30 fps", mhz(3840, 2160, 30, cpb), 3.89);
      chk_rate("4K 60 fps", mhz(3840, 2160, 60, cpb), 7.78);
      chk_rate("8K 30 fps", mhz(7680, 4320, 30, cpb), 15.55);
      chk_rate("8K 60 fps", mhz(7680, 4320, 60, cpb), 31.10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
