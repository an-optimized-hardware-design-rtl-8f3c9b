// Testbench of rss_sample_buf at the input-buffer depth (35 samples):
// reset clears the buffer, a load captures all samples in one clock, and
// the content holds while load is low.
module tb_rss_sample_buf;
  import rss_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  sample_t [WIN-1:0] d, q, model;
  int checks = 0, failures = 0;

  rss_sample_buf #(.DEPTH(WIN)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (q !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    d = '1;
    @(negedge clk); @(negedge clk);
    model = '0;
    compare("reset");
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load = ($urandom_range(1) == 1);
      for (int j = 0; j < WIN; j++) d[j] = sample_t'($urandom);
      @(negedge clk);
      if (load) model = d;
      compare(load ? "load" : "hold");
    end
    // reset in the middle of operation
    rst_n = 0; load = 1;
    @(negedge clk);
    model = '0;
    compare("reset with load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
