// tb_s2ds_decoder_qc: decoder on a (3,6)-regular code of length 408 and
// dimension 204, the size and degree profile of the regular test code used
// to evaluate the S2DS algorithm.
//
// The parity-check matrix is quasi-cyclic: 3 x 6 blocks of 68 x 68
// circulant permutation matrices. The first block row has shift 0
// throughout; the shifts of the other two (see QC_SHIFT) were picked so that
// the graph has no 4-cycles: no s(i1,j1)-s(i1,j2)+s(i2,j2)-s(i2,j1) is a
// multiple of 68. The all-zero codeword is sent
// through BPSK/AWGN at Eb/N0 = 1.0, 1.5, 2.0, 2.5 and 3.0 dB (code rate 1/2),
// quantized to Q2.3 and decoded by the RTL and by the reference model;
// every frame's codeword, iteration count, parity flag and latency must
// match. The bit and frame error counts, and the mean magnitudes of min1,
// min2 and delta-min (the approximation min1 ~ delta-min that S2DS relies
// on), are printed per SNR point. All
// decoder mechanisms (early stop, iteration limit, saturation, min1-edge
// magnitude, corrected frames) must occur.
module tb_s2ds_decoder_qc;
  import s2ds_pkg::*;
  import s2ds_ref_pkg::*;

  localparam int Z  = 68;
  localparam int NB = 6 * Z;
  localparam int MB = 3 * Z;
  localparam int FRAMES_PER_SNR = 40;
  localparam int QC_SHIFT [3][6] = '{'{0, 0, 0, 0, 0, 0},
                                    '{0, 7, 19, 31, 45, 60},
                                    '{0, 23, 5, 50, 12, 39}};

  function automatic int shift(int i, int j);
    return QC_SHIFT[i][j];
  endfunction

  // H bit of (row r, column c) of the quasi-cyclic matrix.
  function automatic bit qc_bit(int r, int c);
    int i = r / Z, j = c / Z;
    return ((r % Z + shift(i, j)) % Z) == (c % Z);
  endfunction

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [LLR_W-1:0] llr [NB];
  logic                    busy, done, parity_ok;
  logic [NB-1:0]           codeword;
  logic [4:0]              iters;

  int checks = 0, failures = 0;

  s2ds_decoder #(
    .Z(Z), .MB(3), .NB(6),
    .SHIFT(QC_SHIFT)
  ) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .llr_i(llr),
    .busy_o(busy), .done_o(done), .codeword_o(codeword), .iter_o(iters),
    .parity_ok_o(parity_ok)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES_PER_SNR * 5 * 30 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    real     ebn0[5] = '{1.0, 1.5, 2.0, 2.5, 3.0};
    bit      hm[][];
    s2ds_ref rm;
    int      f[];

    hm = new[MB];
    foreach (hm[r]) begin
      hm[r] = new[NB];
      foreach (hm[r][k]) hm[r][k] = qc_bit(r, k);
    end
    rm = new(NB, MB, hm, int'(MAX_ITER));
    f  = new[NB];
    foreach (llr[k]) llr[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    foreach (ebn0[p]) begin
      real sigma;
      int  bit_err, frame_err, iter_sum;
      sigma     = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebn0[p] / 10.0))));
      bit_err   = 0;
      frame_err = 0;
      iter_sum  = 0;
      for (int fr = 0; fr < FRAMES_PER_SNR; fr++) begin
        int cyc, errs;
        foreach (f[k]) begin
          f[k]   = channel_llr(1'b0, sigma);
          llr[k] = LLR_W'(f[k]);
        end
        rm.decode(f);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done && cyc <= 40) begin
          @(negedge clk);
          cyc++;
        end
        errs = 0;
        for (int k = 0; k < NB; k++) begin
          if (codeword[k] != rm.cw[k]) errs += 1000;
          if (codeword[k]) errs++;
        end
        expect_eq(int'(errs >= 1000), 0, $sformatf("%.1f dB frame %0d codeword", ebn0[p], fr));
        expect_eq(int'(iters), rm.iters, $sformatf("%.1f dB frame %0d iterations", ebn0[p], fr));
        expect_eq(int'(parity_ok), int'(rm.ok), $sformatf("%.1f dB frame %0d parity", ebn0[p], fr));
        expect_eq(cyc, rm.iters + 1, $sformatf("%.1f dB frame %0d latency", ebn0[p], fr));
        bit_err  += errs % 1000;
        iter_sum += int'(iters);
        if (errs % 1000 != 0) frame_err++;
      end
      $display("Eb/N0 %.1f dB: mean |min1| %.3f, |min2| %.3f, |delta-min| %.3f (LLR units)",
               ebn0[p], real'(rm.sum_min1) / rm.n_cn / 8.0, real'(rm.sum_min2) / rm.n_cn / 8.0,
               real'(rm.sum_dmin) / rm.n_cn / 8.0);
      rm.sum_min1 = 0; rm.sum_min2 = 0; rm.sum_dmin = 0; rm.n_cn = 0;
      $display("Eb/N0 %.1f dB: %0d frames, %0d frame errors, %0d bit errors, mean %.2f iterations",
               ebn0[p], FRAMES_PER_SNR, frame_err, bit_err, real'(iter_sum) / FRAMES_PER_SNR);
    end

    $display("early stops %0d, iteration-limit stops %0d, saturations %0d, min1-edge boosts %0d, corrected frames %0d",
             rm.n_early, rm.n_maxstop, rm.n_sat, rm.n_min1edge, rm.n_fixed);
    expect_eq(int'(rm.n_early    > 0), 1, "early stop occurred");
    expect_eq(int'(rm.n_maxstop  > 0), 1, "iteration-limit stop occurred");
    expect_eq(int'(rm.n_sat      > 0), 1, "saturation occurred");
    expect_eq(int'(rm.n_min1edge > 0), 1, "min1-edge boost occurred");
    expect_eq(int'(rm.n_fixed    > 0), 1, "correction occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
