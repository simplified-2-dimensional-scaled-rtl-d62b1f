// tb_s2ds_syndrome: test of the syndrome check on the 4 x 6 example
// parity-check matrix.
//
// All 64 hard-decision vectors are applied; the reference evaluates each
// parity equation by hand (rows {1,4}, {2,5}, {1,3,5}, {3,6} in 1-based
// column numbers) and the all-zero flag.
module tb_s2ds_syndrome;

  logic [5:0] c;
  logic [3:0] syn;
  logic       ok;
  int checks = 0, failures = 0, codewords = 0;

  s2ds_syndrome dut (.c_i(c), .syn_o(syn), .ok_o(ok));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [3:0] want;
      c = 6'(v);
      #1;
      want[0] = c[0] ^ c[3];
      want[1] = c[1] ^ c[4];
      want[2] = c[0] ^ c[2] ^ c[4];
      want[3] = c[2] ^ c[5];
      checks++;
      if (syn != want || ok != (want == 0)) begin
        failures++;
        $display("FAIL c=%b syn=%b ok=%0d want %b", c, syn, ok, want);
      end
      if (want == 0) codewords++;
    end
    // The example code has rank 4, so 2^(6-4) = 4 codewords.
    checks++;
    if (codewords != 4) begin
      failures++;
      $display("FAIL found %0d codewords", codewords);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
