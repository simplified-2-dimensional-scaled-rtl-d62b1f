// tb_s2ds_cnu: self-checking test of the S2DS check-node unit.
//
// Random sign-magnitude inputs to a degree-6 check node (plus directed
// cases). The reference computes, from the min-sum equations, the
// extrinsic sign product of every edge, min1, its first index, min2,
// floor(3*min1/4) and min2 - min1, and also checks that the
// magnitude an edge finally receives matches the S2DS rule.
module tb_s2ds_cnu;
  import s2ds_pkg::*;

  localparam int unsigned DC = 6;

  sm_msg_t          vtc [DC];
  logic [DC-1:0]    sgn;
  logic [2:0]       idx;
  logic [MAG_W-1:0] m1s, dmin;

  int checks = 0, failures = 0;

  s2ds_cnu #(.DC(DC)) dut (.vtc_i(vtc), .sign_o(sgn), .idx_o(idx), .min1s_o(m1s), .dmin_o(dmin));

  task automatic check(string what);
    int m1 = 99, m2 = 99, id = 0;
    #1;
    for (int k = 0; k < int'(DC); k++) begin
      int m = int'(vtc[k].mag);
      if (m < m1) begin m2 = m1; m1 = m; id = k; end
      else if (m < m2) m2 = m;
    end
    for (int k = 0; k < int'(DC); k++) begin
      int prod = 1;
      for (int j = 0; j < int'(DC); j++) if (j != k && vtc[j].sign) prod = -prod;
      checks++;
      if ((prod < 0) != sgn[k]) begin
        failures++;
        $display("FAIL %s: sign of edge %0d", what, k);
      end
    end
    checks++;
    if (int'(idx) != id || int'(m1s) != ((3 * m1) / 4) || int'(dmin) != (m2 - m1)) begin
      failures++;
      $display("FAIL %s: got idx=%0d m1s=%0d d=%0d want %0d %0d %0d",
               what, idx, m1s, dmin, id, (3 * m1) / 4, m2 - m1);
    end
    // Magnitude delivered to the min1 edge: 0.75*min1 + (min2 - min1).
    checks++;
    if (int'(m1s) + int'(dmin) != (3 * m1) / 4 + m2 - m1) begin
      failures++;
      $display("FAIL %s: min1-edge magnitude", what);
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
    // All positive, strictly increasing.
    for (int k = 0; k < int'(DC); k++) vtc[k] = '{sign: 1'b0, mag: MAG_W'(4 * k + 5)};
    check("increasing");
    // One negative input.
    vtc[3].sign = 1'b1;
    check("one negative");
    // Minimum last, zero magnitude.
    for (int k = 0; k < int'(DC); k++) vtc[k] = '{sign: 1'b1, mag: MAG_W'(31 - k)};
    vtc[DC-1].mag = '0;
    check("zero last");
    repeat (5000) begin
      for (int k = 0; k < int'(DC); k++)
        vtc[k] = '{sign: 1'($urandom_range(0, 1)), mag: MAG_W'($urandom_range(0, 31))};
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
