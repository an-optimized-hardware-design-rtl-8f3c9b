// End-to-end testbench of vvc_rss_top at its default (published) sizes.
//
// Random reference lines are generated for a sequence of blocks: first all
// 16 sizes from 8x8 to 64x64, then skipped blocks mixed with filtered ones,
// a burst of back-to-back 8x8 blocks and finally a random mix with random
// idle gaps. The testbench acts as the sample source (it answers every
// in_load with the window of segment in_seg) and as the sink: every output
// sample is compared with the [1 2 1]/4 smoothing of the line computed
// here, the two end samples must come out unchanged, and `done` must
// appear exactly ceil((2W+2H-1)/33) + 1 clocks after start (2 for a skipped
// block). It counts multi-segment blocks, skipped blocks, back-to-back
// starts and one-clock 8x8 blocks, and fails if any of them never happened.
module tb_vvc_rss_top;
  import rss_pkg::*;
  import rss_ref_pkg::*;

  localparam int NB = 400;

  logic clk = 0, rst_n = 0, start = 0, skip = 0;
  blk_size_e w_sel = SZ8, h_sel = SZ8;
  logic ready, in_load, out_valid, done, out_skipped;
  logic [SEG_W-1:0] in_seg, out_seg;
  sample_t [WIN-1:0] in_win;
  sample_t [LANES-1:0] out_samples;

  vvc_rss_top dut (.*);

  always #5 clk = ~clk;

  line_t lines [NB];
  int bw[NB], bh[NB], bn[NB], bstart[NB];
  bit bskip[NB];
  int started[$];
  int cyc = 0, checks = 0, failures = 0;
  int n_multi = 0, n_skip = 0, n_b2b = 0, n_single = 0, n_ends = 0, n_done = 0;
  int size_seen = 0, last_start = -10, ld_blk = 0, oseg = 0;
  int burst_first_done = -1, burst_last_done = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50_000) @(posedge clk);
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

  // Sink: compare what the output buffer holds this cycle.
  task automatic observe();
    int h;
    if (!out_valid && !done) begin
      chk(!out_skipped, "out_skipped without done");
      return;
    end
    if (started.size() == 0) begin
      chk(0, "output with no block in flight");
      return;
    end
    h = started[0];
    if (bskip[h]) begin
      chk(!out_valid && done && out_skipped, "skipped block signalling");
      chk(cyc == bstart[h] + 2, "skipped block latency");
      void'(started.pop_front());
      n_done++;
      return;
    end
    chk(out_valid && !out_skipped, "out_valid");
    chk(int'(out_seg) == oseg, $sformatf("out_seg %0d exp %0d", out_seg, oseg));
    for (int i = 0; i < LANES; i++) begin
      automatic int p = 33 * oseg + i;
      automatic int n = line_len(bw[h], bh[h]);
      if (p < n) begin
        chk(int'(out_samples[i]) == ref_out(lines[h], n, p),
            $sformatf("block %0d (%0dx%0d) pos %0d: got %0d exp %0d",
                      h, bw[h], bh[h], p, out_samples[i], ref_out(lines[h], n, p)));
        if (p == 0 || p == n - 1) n_ends++;
      end
    end
    chk(done == (oseg == bn[h] - 1), "done on last segment only");
    if (oseg == bn[h] - 1) begin
      chk(cyc == bstart[h] + bn[h] + 1, $sformatf("block %0d latency", h));
      if (h == 60) burst_first_done = cyc;
      if (h == 99) burst_last_done = cyc;
      void'(started.pop_front());
      oseg = 0;
      n_done++;
    end else
      oseg++;
  endtask

  initial begin
    int nxt = 0;
    for (int b = 0; b < NB; b++) begin
      int wi, hi;
      if (b < 16)      begin wi = b / 4; hi = b % 4; end
      else if (b < 60) begin wi = $urandom_range(3); hi = $urandom_range(3); end
      else if (b < 100) begin wi = 0; hi = 0; end       // burst of 8x8 blocks
      else             begin wi = $urandom_range(3); hi = $urandom_range(3); end
      bw[b] = size_of(wi); bh[b] = size_of(hi);
      bn[b] = n_segments(bw[b], bh[b]);
      bskip[b] = (b >= 16 && b < 60 && b % 3 == 0) || (b >= 100 && $urandom_range(7) == 0);
      for (int p = 0; p < MAX_N; p++) lines[b][p] = $urandom_range(255);
      if (b % 37 == 5) for (int p = 0; p < MAX_N; p++) lines[b][p] = 255;
    end
    in_win = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (nxt < NB || started.size() != 0) begin
      @(negedge clk);
      observe();
      start = 0;
      if (nxt < NB && ready && (nxt < 16 || (nxt >= 60 && nxt < 100) || $urandom_range(2) != 0)) begin
        start = 1;
        skip = bskip[nxt];
        w_sel = blk_size_e'($clog2(bw[nxt]) - 3);
        h_sel = blk_size_e'($clog2(bh[nxt]) - 3);
        bstart[nxt] = cyc;
        started.push_back(nxt);
        if (bskip[nxt]) n_skip++;
        else begin
          ld_blk = nxt;
          if (bn[nxt] > 1) n_multi++; else n_single++;
        end
        if (last_start == cyc - 1) n_b2b++;
        last_start = cyc;
        size_seen |= 1 << (($clog2(bw[nxt]) - 3) * 4 + $clog2(bh[nxt]) - 3);
        nxt++;
      end
      #1;
      if (in_load) begin
        automatic int n = line_len(bw[ld_blk], bh[ld_blk]);
        for (int j = 0; j < WIN; j++) begin
          automatic int p = 33 * int'(in_seg) - 1 + j;
          in_win[j] = (p >= 0 && p < n) ? sample_t'(lines[ld_blk][p]) : sample_t'($urandom);
        end
      end else
        for (int j = 0; j < WIN; j++) in_win[j] = sample_t'($urandom);
    end
    repeat (3) begin
      @(negedge clk);
      start = 0;
      chk(!out_valid && !done, "idle after last block");
    end
    chk(burst_last_done - burst_first_done == 39, "8x8 burst: one block per clock");
    chk(size_seen == 16'hffff, "all 16 block sizes");
    chk(n_done == NB, "every block completed");
    $display("blocks=%0d multi-segment=%0d single-cycle 8x8=%0d skipped=%0d back-to-back starts=%0d end samples=%0d",
             n_done, n_multi, n_single, n_skip, n_b2b, n_ends);
    $display("8x8 burst: 40 blocks finished in %0d clocks", burst_last_done - burst_first_done + 1);
    if (n_multi == 0 || n_single == 0 || n_skip == 0 || n_b2b == 0 || n_ends == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
