// tb_s2ds_vnu: self-checking test of the variable-node unit.
//
// A degree-3 variable node gets random a-priori LLRs and CTV messages in
// the symmetric Q2.3 range; the reference forms z = F + sum(CTV), the hard
// decision z < 0 and each extrinsic sum F + sum of the other CTVs clamped
// to -31..+31, in sign-magnitude form (zero positive). Saturation in both
// directions is counted and must occur.
module tb_s2ds_vnu;
  import s2ds_pkg::*;

  localparam int unsigned DV = 3;

  logic signed [LLR_W-1:0] llr;
  logic signed [LLR_W-1:0] ctv [DV];
  sm_msg_t                 vtc [DV];
  logic signed [7:0]       z;
  logic                    hard;

  int checks = 0, failures = 0, sat_pos = 0, sat_neg = 0;

  s2ds_vnu #(.DV(DV)) dut (.llr_i(llr), .ctv_i(ctv), .vtc_o(vtc), .z_o(z), .hard_o(hard));

  task automatic check();
    int zz;
    #1;
    zz = int'(llr);
    for (int k = 0; k < int'(DV); k++) zz += int'(ctv[k]);
    checks++;
    if (int'(z) != zz || hard != (zz < 0)) begin
      failures++;
      $display("FAIL z=%0d hard=%0d want %0d", z, hard, zz);
    end
    for (int k = 0; k < int'(DV); k++) begin
      int e = zz - int'(ctv[k]);
      int sm;
      if (e > 31) begin e = 31; sat_pos++; end
      if (e < -31) begin e = -31; sat_neg++; end
      sm = vtc[k].sign ? -int'(vtc[k].mag) : int'(vtc[k].mag);
      checks++;
      if (sm != e || (e >= 0 && vtc[k].sign)) begin
        failures++;
        $display("FAIL edge %0d: got %0d (sign %0d) want %0d", k, sm, vtc[k].sign, e);
      end
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
    llr = 6'sd0;
    foreach (ctv[k]) ctv[k] = 6'sd0;
    check();
    llr = 6'sd31;
    foreach (ctv[k]) ctv[k] = 6'sd31;
    check();
    llr = -6'sd31;
    foreach (ctv[k]) ctv[k] = -6'sd31;
    check();
    repeat (5000) begin
      llr = LLR_W'($urandom_range(0, 62)) - 6'sd31;
      foreach (ctv[k]) ctv[k] = LLR_W'($urandom_range(0, 62)) - 6'sd31;
      check();
    end
    checks++;
    if (sat_pos == 0 || sat_neg == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturations: +%0d -%0d", sat_pos, sat_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
