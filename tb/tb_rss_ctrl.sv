// Testbench of rss_ctrl. A cycle-indexed scoreboard, filled from the
// segment count ceil((2W + 2H - 1) / 33) of each request, predicts on which
// cycle every segment must be requested (in_load, seg_idx), filtered
// (out_load, f_first, f_last, f_last_lane) and presented (out_valid,
// out_seg, done), as well as `ready` and the single-cycle skip. Requests of
// all 16 sizes, skipped blocks, idle gaps and back-to-back starts are driven.
module tb_rss_ctrl;
  import rss_pkg::*;
  import rss_ref_pkg::*;

  localparam int MAXC = 20000;

  logic clk = 0, rst_n = 0;
  logic start = 0, skip = 0;
  blk_size_e w_sel = SZ8, h_sel = SZ8;
  logic ready, in_load, f_first, f_last, out_load, out_valid, done, out_skipped;
  logic [SEG_W-1:0] seg_idx, out_seg;
  logic [LANE_W-1:0] f_last_lane;

  rss_ctrl dut (.*);

  always #5 clk = ~clk;

  bit exp_load[MAXC], exp_f[MAXC], exp_first[MAXC], exp_last[MAXC];
  bit exp_outv[MAXC], exp_done[MAXC], exp_skipd[MAXC];
  int exp_seg[MAXC], exp_lane[MAXC], exp_oseg[MAXC];
  int cyc = 0, free_at = 0;
  int checks = 0, failures = 0;
  int n_skip = 0, n_b2b = 0, n_multi = 0, last_start = -10;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic schedule(int c, int wi, int hi, bit sk);
    int w = size_of(wi), h = size_of(hi);
    int n = n_segments(w, h);
    int lane = (2 * w + 2 * h) % 33;
    if (sk) begin
      exp_done[c+2] = 1;
      exp_skipd[c+2] = 1;
      free_at = c + 1;
      return;
    end
    for (int k = 0; k < n; k++) begin
      exp_load[c+k] = 1; exp_seg[c+k] = k;
      exp_f[c+k+1] = 1; exp_first[c+k+1] = (k == 0); exp_last[c+k+1] = (k == n - 1);
      exp_lane[c+k+1] = lane;
      exp_outv[c+k+2] = 1; exp_oseg[c+k+2] = k; exp_done[c+k+2] = (k == n - 1);
    end
    free_at = c + n;
  endtask

  initial begin
    int req = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (req < 400) begin
      @(negedge clk);
      start = 0;
      chk(ready == (cyc >= free_at), "ready");
      if (cyc >= free_at && cyc > 3 && $urandom_range(3) != 0) begin
        automatic int wi = (req < 16) ? req / 4 : $urandom_range(3);
        automatic int hi = (req < 16) ? req % 4 : $urandom_range(3);
        automatic bit sk = (req >= 16) && ($urandom_range(5) == 0);
        start = 1; skip = sk;
        w_sel = blk_size_e'(wi); h_sel = blk_size_e'(hi);
        schedule(cyc, wi, hi, sk);
        if (sk) n_skip++;
        if (n_segments(size_of(wi), size_of(hi)) > 1 && !sk) n_multi++;
        if (last_start == cyc - 1) n_b2b++;
        last_start = cyc;
        req++;
      end
      #1;
      chk(in_load == exp_load[cyc], "in_load");
      if (exp_load[cyc]) chk(int'(seg_idx) == exp_seg[cyc], "seg_idx");
      chk(out_load == exp_f[cyc], "out_load");
      if (exp_f[cyc]) begin
        chk(f_first == exp_first[cyc], "f_first");
        chk(f_last == exp_last[cyc], "f_last");
        if (exp_last[cyc]) chk(int'(f_last_lane) == exp_lane[cyc], "f_last_lane");
      end
      chk(out_valid == exp_outv[cyc], "out_valid");
      if (exp_outv[cyc]) chk(int'(out_seg) == exp_oseg[cyc], "out_seg");
      chk(done == exp_done[cyc], "done");
      chk(out_skipped == exp_skipd[cyc], "out_skipped");
    end
    repeat (12) begin
      @(negedge clk);
      start = 0;
      #1;
      chk(out_valid == exp_outv[cyc] && done == exp_done[cyc], $sformatf("drain ov=%0b exp=%0b done=%0b exp=%0b ready=%0b", out_valid, exp_outv[cyc], done, exp_done[cyc], ready));
    end
    $display("skipped=%0d multi-segment=%0d back-to-back=%0d", n_skip, n_multi, n_b2b);
    if (n_skip == 0 || n_multi == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
