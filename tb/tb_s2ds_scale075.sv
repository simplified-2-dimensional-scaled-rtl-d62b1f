// tb_s2ds_scale075: exhaustive test of the 0.75 scaling unit.
//
// For every 5-bit input x it checks y = floor(3x/4) and, as an
// independent sanity bound, that y lies within one LSB below 0.75*x.
module tb_s2ds_scale075;

  logic [4:0] x, y;
  int checks = 0, failures = 0;

  s2ds_scale075 #(.MAG_W(5)) dut (.x_i(x), .y_o(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int  want;
      real exact;
      x = 5'(v);
      #1;
      want  = (3 * v) / 4;
      exact = 0.75 * v;
      checks++;
      if (int'(y) != want) begin
        failures++;
        $display("FAIL x=%0d y=%0d want %0d", v, y, want);
      end
      checks++;
      if (real'(y) > exact || real'(y) <= exact - 1.0) begin
        failures++;
        $display("FAIL x=%0d y=%0d not within one LSB of %f", v, y, exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
