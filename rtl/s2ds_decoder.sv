// s2ds_decoder: iterative LDPC decoder running the simplified
// 2-dimensional scaled (S2DS) min-sum algorithm.
//
// Algorithm. The a-priori LLRs F (the quantized channel values) are loaded
// and used as the first VTC messages. Each iteration every check node (CN)
// finds min1, min2 and the index of min1 over its VTC magnitudes and sends
// 0.75*min1 to all edges but the min1 edge, which gets 0.75*min1 +
// (min2 - min1), a cheap stand-in for 0.875*min2; signs follow the usual
// min-sum sign product. Every variable node (VN) adds F and all CTV
// messages into the a-posteriori LLR z, makes the hard decision z < 0 and
// sends the extrinsic sums back. After each iteration the syndrome H*c^T
// of the hard decisions is checked; decoding stops when it is zero or
// when MAX_ITER (20) iterations have run.
//
// Architecture (this design's own choice; the algorithm does not fix one):
// fully parallel, flooding schedule, one iteration per clock cycle. One
// s2ds_cnu per row of H and one s2ds_vnu per column, wired from the
// parameter H at elaboration time. The only state is the compressed CTV
// message of each CN, {signs, index of min1, 0.75*min1, delta-min}, held
// in registers; the VN sums, the hard decisions and the syndrome are
// combinational from those registers and the loaded F.
//
// Interface and timing:
//   start_i     one-cycle request while busy_o is low; llr_i is sampled on
//               that edge (Q2.3 two's complement, range -31..+31 counts).
//   busy_o      high from the cycle after start until the result appears.
//   done_o      one-cycle pulse; codeword_o, iter_o and parity_ok_o are
//               valid from then until the next start.
//   iter_o      iterations run (1..MAX_ITER); parity_ok_o is 1 when the
//               syndrome of codeword_o is zero.
// done_o rises iter_o + 1 clock edges after the edge that sampled start_i:
// one edge per iteration plus one for the final check.
//
// The parity-check matrix is given in quasi-cyclic form, the form the
// evaluated codes are specified in: an MB x NB base matrix SHIFT of Z x Z
// blocks, where -1 is an all-zero block and s >= 0 is the identity matrix
// cyclically shifted right by s (row a of the block has its 1 in column
// (a + s) mod Z). N = NB*Z code bits, M = MB*Z checks. Any H can be given
// with Z = 1 and a base matrix of 0 and -1 entries, which is how the
// default, the 4 x 6 example matrix used to introduce the decoder's
// bipartite graph, is written. Every row and every column of H must hold
// at least one 1.
module s2ds_decoder
  import s2ds_pkg::*;
#(
  parameter int unsigned Z  = 1,
  parameter int unsigned MB = 4,
  parameter int unsigned NB = 6,
  parameter int SHIFT [MB][NB] = '{'{ 0, -1, -1,  0, -1, -1},
                                   '{-1,  0, -1, -1,  0, -1},
                                   '{ 0, -1,  0, -1,  0, -1},
                                   '{-1, -1,  0, -1, -1,  0}},
  parameter int unsigned MAX_IT = MAX_ITER,
  localparam int unsigned N    = NB * Z,
  localparam int unsigned M    = MB * Z,
  localparam int unsigned IT_W = $clog2(MAX_IT + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  input  logic signed [LLR_W-1:0] llr_i [N],
  output logic                    busy_o,
  output logic                    done_o,
  output logic [N-1:0]            codeword_o,
  output logic [IT_W-1:0]         iter_o,
  output logic                    parity_ok_o
);

  // ---------------------------------------------------------------------
  // Graph of H, evaluated at elaboration time
  // ---------------------------------------------------------------------
  function automatic bit nz(int i, int j);
    return SHIFT[i][j] >= 0;
  endfunction

  function automatic int row_w(int r);
    int w = 0;
    for (int j = 0; j < int'(NB); j++) w += int'(nz(r / int'(Z), j));
    return w;
  endfunction

  function automatic int col_w(int c);
    int w = 0;
    for (int i = 0; i < int'(MB); i++) w += int'(nz(i, c / int'(Z)));
    return w;
  endfunction

  function automatic int max_row_w();
    int w = 1;
    for (int i = 0; i < int'(MB); i++) if (row_w(i * int'(Z)) > w) w = row_w(i * int'(Z));
    return w;
  endfunction

  function automatic int max_col_w();
    int w = 1;
    for (int j = 0; j < int'(NB); j++) if (col_w(j * int'(Z)) > w) w = col_w(j * int'(Z));
    return w;
  endfunction

  function automatic int min_w();
    int w = int'(NB);
    for (int i = 0; i < int'(MB); i++) if (row_w(i * int'(Z)) < w) w = row_w(i * int'(Z));
    for (int j = 0; j < int'(NB); j++) if (col_w(j * int'(Z)) < w) w = col_w(j * int'(Z));
    return w;
  endfunction

  // Column of the p-th 1 of row r (columns come in increasing order).
  function automatic int cn_col(int r, int p);
    int i = r / int'(Z), a = r % int'(Z), n = 0;
    for (int j = 0; j < int'(NB); j++)
      if (nz(i, j)) begin
        if (n == p) return j * int'(Z) + (a + SHIFT[i][j] % int'(Z)) % int'(Z);
        n++;
      end
    return 0;
  endfunction

  // Row of the k-th 1 of column c (rows come in increasing order).
  function automatic int vn_row(int c, int k);
    int j = c / int'(Z), b = c % int'(Z), n = 0;
    for (int i = 0; i < int'(MB); i++)
      if (nz(i, j)) begin
        if (n == k) return i * int'(Z) + (b + int'(Z) - SHIFT[i][j] % int'(Z)) % int'(Z);
        n++;
      end
    return 0;
  endfunction

  // Edge position of column c within row r, and of row r within column c.
  function automatic int pos_in_row(int r, int c);
    int n = 0;
    for (int j = 0; j < c / int'(Z); j++) n += int'(nz(r / int'(Z), j));
    return n;
  endfunction

  function automatic int pos_in_col(int c, int r);
    int n = 0;
    for (int i = 0; i < r / int'(Z); i++) n += int'(nz(i, c / int'(Z)));
    return n;
  endfunction

  localparam int unsigned DCMAX = max_row_w();
  localparam int unsigned DVMAX = max_col_w();
  localparam int unsigned IDX_W = (DCMAX > 1) ? $clog2(DCMAX) : 1;

  if (min_w() < 1) begin : g_bad_h
    $error("s2ds_decoder: every row and column of H needs at least one 1");
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t                  state_q;
  logic [IT_W-1:0]         iter_q;
  logic signed [LLR_W-1:0] llr_q [N];

  // Compressed CTV messages, one per check node.
  logic [DCMAX-1:0] sign_q [M];
  logic [IDX_W-1:0] idx_q  [M];
  logic [MAG_W-1:0] m1s_q  [M];
  logic [MAG_W-1:0] dmin_q [M];

  // Next compressed messages from the CN units.
  logic [DCMAX-1:0] sign_d [M];
  logic [IDX_W-1:0] idx_d  [M];
  logic [MAG_W-1:0] m1s_d  [M];
  logic [MAG_W-1:0] dmin_d [M];

  // Edge messages, indexed by VN and VN-side edge position.
  sm_msg_t                 vtc_e [N][DVMAX];

  logic [N-1:0] hard;
  logic [M-1:0] syndrome;
  logic         syn_ok;

  // ---------------------------------------------------------------------
  // Variable nodes, fed through CTV expansion from the stored messages
  // ---------------------------------------------------------------------
  for (genvar c = 0; c < int'(N); c++) begin : g_vn
    localparam int unsigned DV = col_w(c);

    logic signed [LLR_W-1:0] ctv [DV];
    sm_msg_t                 vtc [DV];

    for (genvar k = 0; k < int'(DV); k++) begin : g_edge
      localparam int unsigned R = vn_row(c, k);
      localparam int unsigned P = pos_in_row(R, c);

      s2ds_ctv_expand #(.DC(DCMAX)) u_expand (
        .sign_i  (sign_q[R][P]),
        .idx_i   (idx_q[R]),
        .pos_i   (IDX_W'(P)),
        .min1s_i (m1s_q[R]),
        .dmin_i  (dmin_q[R]),
        .ctv_o   (ctv[k])
      );

      assign vtc_e[c][k] = vtc[k];
    end

    // Unused edge slots of a VN with fewer than DVMAX edges.
    for (genvar k = int'(DV); k < int'(DVMAX); k++) begin : g_unused
      assign vtc_e[c][k] = '0;
    end

    s2ds_vnu #(.DV(DV)) u_vnu (
      .llr_i  (llr_q[c]),
      .ctv_i  (ctv),
      .vtc_o  (vtc),
      .z_o    (),
      .hard_o (hard[c])
    );
  end

  // ---------------------------------------------------------------------
  // Check nodes
  // ---------------------------------------------------------------------
  for (genvar r = 0; r < int'(M); r++) begin : g_cn
    localparam int unsigned DC   = row_w(r);
    localparam int unsigned CI_W = (DC > 1) ? $clog2(DC) : 1;

    sm_msg_t          vtc [DC];
    logic [DC-1:0]    sign;
    logic [CI_W-1:0]  idx;

    for (genvar p = 0; p < int'(DC); p++) begin : g_edge
      localparam int unsigned C = cn_col(r, p);
      localparam int unsigned K = pos_in_col(C, r);
      assign vtc[p] = vtc_e[C][K];
    end

    s2ds_cnu #(.DC(DC)) u_cnu (
      .vtc_i   (vtc),
      .sign_o  (sign),
      .idx_o   (idx),
      .min1s_o (m1s_d[r]),
      .dmin_o  (dmin_d[r])
    );

    assign sign_d[r] = DCMAX'(sign);
    assign idx_d[r]  = IDX_W'(idx);
  end

  // ---------------------------------------------------------------------
  // Tentative decision check
  // ---------------------------------------------------------------------
  s2ds_syndrome #(.Z(Z), .MB(MB), .NB(NB), .SHIFT(SHIFT)) u_syndrome (
    .c_i   (hard),
    .syn_o (syndrome),
    .ok_o  (syn_ok)
  );

  logic finish;
  assign finish = (iter_q != '0 && syn_ok) || (iter_q == IT_W'(MAX_IT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      iter_q      <= '0;
      done_o      <= 1'b0;
      codeword_o  <= '0;
      iter_o      <= '0;
      parity_ok_o <= 1'b0;
      for (int c = 0; c < int'(N); c++) llr_q[c] <= '0;
      for (int r = 0; r < int'(M); r++) begin
        sign_q[r] <= '0;
        idx_q[r]  <= '0;
        m1s_q[r]  <= '0;
        dmin_q[r] <= '0;
      end
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start_i) begin
            // Initialization: VTC messages start as F, so all CTV are zero.
            for (int c = 0; c < int'(N); c++) llr_q[c] <= llr_i[c];
            for (int r = 0; r < int'(M); r++) begin
              sign_q[r] <= '0;
              idx_q[r]  <= '0;
              m1s_q[r]  <= '0;
              dmin_q[r] <= '0;
            end
            iter_q  <= '0;
            state_q <= S_RUN;
          end
        end
        S_RUN: begin
          if (finish) begin
            codeword_o  <= hard;
            iter_o      <= iter_q;
            parity_ok_o <= syn_ok;
            done_o      <= 1'b1;
            state_q     <= S_IDLE;
          end else begin
            // One flooding iteration: CN results become the new messages.
            for (int r = 0; r < int'(M); r++) begin
              sign_q[r] <= sign_d[r];
              idx_q[r]  <= idx_d[r];
              m1s_q[r]  <= m1s_d[r];
              dmin_q[r] <= dmin_d[r];
            end
            iter_q <= iter_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q == S_RUN);

  // A start request is only meaningful while the decoder is idle.
  property p_start_when_idle;
    @(posedge clk) disable iff (!rst_n) start_i |-> !busy_o;
  endproperty
  a_start_when_idle: assert property (p_start_when_idle)
    else $error("s2ds_decoder: start_i while busy");

  // done_o is a single-cycle pulse and the iteration count stays in range.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done_o |=> !done_o)
    else $error("s2ds_decoder: done_o held for more than one cycle");
  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n) iter_q <= IT_W'(MAX_IT))
    else $error("s2ds_decoder: iteration counter beyond MAX_IT");

endmodule
