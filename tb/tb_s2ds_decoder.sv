// tb_s2ds_decoder: end-to-end test of the decoder at its default
// parameters (the 4 x 6 example parity-check matrix, 20 iterations).
//
// Each frame picks one of the code's four codewords, sends it through a
// BPSK/AWGN channel at one of several noise levels, quantizes the channel
// values to Q2.3 and decodes them both in the RTL and in the behavioural
// reference (s2ds_ref_pkg). Checked per frame: hard-decision codeword,
// iteration count, parity flag, busy_o while decoding, and the latency
// (done_o exactly iter_o + 1 clock edges after start). Also checked at the
// end: every mechanism occurred at least once - syndrome early stop,
// stop at the iteration limit, VTC saturation, the 0.75*min1 + delta-min
// magnitude on a min1 edge, and a corrected channel error.
module tb_s2ds_decoder;
  import s2ds_pkg::*;
  import s2ds_ref_pkg::*;

  localparam int NB     = 6;
  localparam int MB     = 4;
  localparam int FRAMES = 4000;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [LLR_W-1:0] llr [NB];
  logic                    busy, done, parity_ok;
  logic [NB-1:0]           codeword;
  logic [4:0]              iters;

  int checks = 0, failures = 0;

  s2ds_decoder dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .llr_i(llr),
    .busy_o(busy), .done_o(done), .codeword_o(codeword), .iter_o(iters),
    .parity_ok_o(parity_ok)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * 30 + 100) @(posedge clk);
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
    // The example matrix, written out row by row.
    string   rows[MB] = '{"100100", "010010", "101010", "001001"};
    real     sigmas[5] = '{0.25, 0.5, 0.8, 1.1, 1.6};
    bit      hm[][];
    bit      cws[$][];
    s2ds_ref rm;
    int      f[];

    hm = new[MB];
    foreach (hm[r]) begin
      hm[r] = new[NB];
      foreach (hm[r][k]) hm[r][k] = (rows[r][k] == "1");
    end
    rm = new(NB, MB, hm, int'(MAX_ITER));
    // Enumerate the codewords.
    for (int v = 0; v < (1 << NB); v++) begin
      bit c[];
      c = new[NB];
      foreach (c[k]) c[k] = v[k];
      if (rm.syndrome_ok(c)) cws.push_back(c);
    end
    expect_eq(cws.size(), 4, "codeword count");

    f = new[NB];
    foreach (llr[k]) llr[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int fr = 0; fr < FRAMES; fr++) begin
      bit   tx[];
      int   cyc;
      real  sigma;
      cyc   = 0;
      sigma = sigmas[fr % 5];
      tx = cws[$urandom_range(0, cws.size() - 1)];
      foreach (f[k]) begin
        f[k]   = channel_llr(tx[k], sigma);
        llr[k] = LLR_W'(f[k]);
      end
      rm.decode(f);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low while decoding"); end
        @(negedge clk);
        cyc++;
        if (cyc > 40) break;
      end
      foreach (tx[k]) expect_eq(int'(codeword[k]), int'(rm.cw[k]), $sformatf("frame %0d bit %0d", fr, k));
      expect_eq(int'(iters), rm.iters, $sformatf("frame %0d iterations", fr));
      expect_eq(int'(parity_ok), int'(rm.ok), $sformatf("frame %0d parity", fr));
      expect_eq(cyc, rm.iters + 1, $sformatf("frame %0d latency", fr));
      @(negedge clk);
      expect_eq(int'(busy), 0, "idle after done");
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
