// Testbench of rss_unit: compares the two-stage bit-level smoothing unit
// with (A + 2B + C + 2) >> 2 for all extreme operand combinations and a
// large random sample of the 2^24 operand space.
module tb_rss_unit;
  logic [7:0] a, b, c, y;
  int checks = 0, failures = 0;

  rss_unit #(.W(8)) dut (.a(a), .b(b), .c(c), .y(y));

  task automatic check_one(int ia, int ib, int ic);
    int exp;
    a = 8'(ia); b = 8'(ib); c = 8'(ic);
    #1;
    exp = (ia + 2 * ib + ic + 2) >> 2;
    checks++;
    if (y !== 8'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d y=%0d exp=%0d", ia, ib, ic, y, exp);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[8] = '{0, 1, 2, 3, 127, 128, 254, 255};
    foreach (v[i]) foreach (v[j]) foreach (v[k]) check_one(v[i], v[j], v[k]);
    // every (A, C) pair with B sweeping its LSB patterns
    for (int ia = 0; ia < 256; ia++)
      for (int ic = 0; ic < 256; ic++)
        check_one(ia, (ia * 7 + ic * 13) & 255, ic);
    for (int n = 0; n < 200_000; n++)
      check_one($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
