// s2ds_ctv_expand: rebuilds one edge's CTV message from the compressed
// S2DS check-node message.
//
// The check node stores and sends {signs, index of min1, 0.75*min1,
// delta-min}. The edge at position pos_i of the check node receives
//   magnitude = 0.75*min1 + delta-min   if pos_i == idx_i  (the min1 edge)
//   magnitude = 0.75*min1               otherwise
// with the sign bit sign_i belonging to that edge, and the block outputs
// it as a two's-complement LLR. 0.75*min1 + delta-min = min2 - min1/4 (up
// to truncation) never exceeds min2, so the sum cannot overflow MAG_W bits.
//
// Interface: compressed message fields and the edge position in, signed
// CTV out. Combinational; pos_i is a constant wherever the decoder uses it.
module s2ds_ctv_expand
  import s2ds_pkg::*;
#(
  parameter int unsigned DC = 6,
  localparam int unsigned IDX_W = (DC > 1) ? $clog2(DC) : 1
) (
  input  logic                    sign_i,
  input  logic [IDX_W-1:0]        idx_i,
  input  logic [IDX_W-1:0]        pos_i,
  input  logic [MAG_W-1:0]        min1s_i,
  input  logic [MAG_W-1:0]        dmin_i,
  output logic signed [LLR_W-1:0] ctv_o
);

  sm_msg_t m;

  always_comb begin
    m.sign = sign_i;
    m.mag  = (idx_i == pos_i) ? min1s_i + dmin_i : min1s_i;
    ctv_o  = from_sm(m);
  end

endmodule
