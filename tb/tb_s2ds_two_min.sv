// tb_s2ds_two_min: self-checking test of the two-minimum finder.
//
// Drives a 6-input instance (the (3,6)-regular check degree) and a 5-input
// one (non-power-of-two, exercising the padding) with corner cases (all
// equal, all maximal, minimum at every position, duplicated minimum) and
// random vectors, and compares min1, min2 and the min1 index with a plain
// linear scan. Ties must resolve to the lowest index.
module tb_s2ds_two_min;

  localparam int unsigned MAG_W = 5;

  logic [MAG_W-1:0] a6 [6];
  logic [MAG_W-1:0] a5 [5];
  logic [MAG_W-1:0] m1_6, m2_6, m1_5, m2_5;
  logic [2:0]       i6, i5;

  int checks = 0, failures = 0;

  s2ds_two_min #(.DC(6), .MAG_W(MAG_W)) dut6 (.mag_i(a6), .min1_o(m1_6), .min2_o(m2_6), .idx_o(i6));
  s2ds_two_min #(.DC(5), .MAG_W(MAG_W)) dut5 (.mag_i(a5), .min1_o(m1_5), .min2_o(m2_5), .idx_o(i5));

  // Reference: linear scan, first occurrence of the minimum.
  task automatic ref_scan(input int v[], output int m1, output int m2, output int idx);
    m1 = 1 << 30; m2 = 1 << 30; idx = 0;
    foreach (v[k]) begin
      if (v[k] < m1) begin m2 = m1; m1 = v[k]; idx = k; end
      else if (v[k] < m2) m2 = v[k];
    end
  endtask

  task automatic check6(string what);
    int v[] = new[6];
    int m1, m2, idx;
    foreach (v[k]) v[k] = int'(a6[k]);
    ref_scan(v, m1, m2, idx);
    #1;
    checks++;
    if (int'(m1_6) != m1 || int'(m2_6) != m2 || int'(i6) != idx) begin
      failures++;
      $display("FAIL dc6 %s: got (%0d,%0d,%0d) want (%0d,%0d,%0d)", what, m1_6, m2_6, i6, m1, m2, idx);
    end
  endtask

  task automatic check5(string what);
    int v[] = new[5];
    int m1, m2, idx;
    foreach (v[k]) v[k] = int'(a5[k]);
    ref_scan(v, m1, m2, idx);
    #1;
    checks++;
    if (int'(m1_5) != m1 || int'(m2_5) != m2 || int'(i5) != idx) begin
      failures++;
      $display("FAIL dc5 %s: got (%0d,%0d,%0d) want (%0d,%0d,%0d)", what, m1_5, m2_5, i5, m1, m2, idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // All equal, all maximal.
    foreach (a6[k]) a6[k] = 5'd7;
    foreach (a5[k]) a5[k] = 5'd7;
    check6("all equal"); check5("all equal");
    foreach (a6[k]) a6[k] = '1;
    foreach (a5[k]) a5[k] = '1;
    check6("all max"); check5("all max");
    // Unique minimum and second minimum at every pair of positions.
    for (int p = 0; p < 6; p++)
      for (int q = 0; q < 6; q++) if (p != q) begin
        foreach (a6[k]) a6[k] = 5'd20;
        a6[p] = 5'd3; a6[q] = 5'd9;
        check6("positions");
      end
    for (int p = 0; p < 5; p++) begin
      foreach (a5[k]) a5[k] = 5'd31;
      a5[p] = 5'd0;
      check5("zero min");
    end
    // Duplicated minimum: lowest index wins, min2 equals min1.
    foreach (a6[k]) a6[k] = 5'd15;
    a6[4] = 5'd2; a6[1] = 5'd2;
    check6("dup min");
    // Random.
    repeat (3000) begin
      foreach (a6[k]) a6[k] = MAG_W'($urandom_range(0, 31));
      foreach (a5[k]) a5[k] = MAG_W'($urandom_range(0, 31));
      check6("random"); check5("random");
    end
    // Random over a narrow range to produce many ties.
    repeat (1000) begin
      foreach (a6[k]) a6[k] = MAG_W'($urandom_range(4, 6));
      foreach (a5[k]) a5[k] = MAG_W'($urandom_range(4, 6));
      check6("ties"); check5("ties");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
