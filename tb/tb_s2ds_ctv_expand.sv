// tb_s2ds_ctv_expand: test of the CTV reconstruction from a compressed
// S2DS check-node message.
//
// Draws consistent (min1, min2) pairs, forms 0.75*min1 and delta-min as
// the check node would, and checks the signed CTV for the min1 edge
// (magnitude 0.75*min1 + min2 - min1) and for other edges (0.75*min1),
// with both signs.
module tb_s2ds_ctv_expand;
  import s2ds_pkg::*;

  localparam int unsigned DC = 6;

  logic                    sgn;
  logic [2:0]              idx, pos;
  logic [MAG_W-1:0]        m1s, dmin;
  logic signed [LLR_W-1:0] ctv;

  int checks = 0, failures = 0;

  s2ds_ctv_expand #(.DC(DC)) dut (
    .sign_i(sgn), .idx_i(idx), .pos_i(pos), .min1s_i(m1s), .dmin_i(dmin), .ctv_o(ctv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m1 = 0; m1 < 32; m1++)
      for (int m2 = m1; m2 < 32; m2++)
        for (int s = 0; s < 2; s++) begin
          int want;
          idx  = 3'($urandom_range(0, DC - 1));
          pos  = ($urandom_range(0, 1) == 1) ? idx : 3'(($urandom_range(1, DC - 1) + idx) % DC);
          sgn  = 1'(s);
          m1s  = MAG_W'((3 * m1) / 4);
          dmin = MAG_W'(m2 - m1);
          #1;
          want = (pos == idx) ? ((3 * m1) / 4 + m2 - m1) : ((3 * m1) / 4);
          if (s == 1) want = -want;
          checks++;
          if (int'(ctv) != want) begin
            failures++;
            $display("FAIL m1=%0d m2=%0d s=%0d idx=%0d pos=%0d: got %0d want %0d",
                     m1, m2, s, idx, pos, ctv, want);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
