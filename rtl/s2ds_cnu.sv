// s2ds_cnu: S2DS check-node unit.
//
// Takes the DC variable-to-check (VTC) messages of one check node in
// sign-magnitude form and produces the compressed check-to-variable (CTV)
// message of the S2DS min-sum algorithm:
//   sign_o[k] : product of the signs of all inputs except input k
//               (overall XOR of the signs, XORed with the sign of input k)
//   idx_o     : index of the input holding the smallest magnitude, min1
//   min1s_o   : 0.75 * min1, from the one shift-and-add scaling unit
//   dmin_o    : delta-min = min2 - min1, the one subtraction
// Edge k later receives magnitude min1s_o, or min1s_o + dmin_o when
// k == idx_o (see s2ds_ctv_expand). That sum approximates 0.875*min2 of the
// two-factor scaling (0.75 on min1, 0.875 on min2), assuming min1 and
// delta-min are of similar size; it equals min2 - 0.25*min1. So the check
// node needs one scaling unit, one subtraction and, on the receiving side,
// one addition.
//
// Magnitudes are 5-bit Q2.3 (s2ds_pkg). min1/min2 come from s2ds_two_min.
// Purely combinational; the decoder registers the compressed message.
module s2ds_cnu
  import s2ds_pkg::*;
#(
  parameter int unsigned DC = 6,
  localparam int unsigned IDX_W = (DC > 1) ? $clog2(DC) : 1
) (
  input  sm_msg_t          vtc_i  [DC],
  output logic [DC-1:0]    sign_o,
  output logic [IDX_W-1:0] idx_o,
  output logic [MAG_W-1:0] min1s_o,
  output logic [MAG_W-1:0] dmin_o
);

  logic [MAG_W-1:0] mag [DC];
  logic [MAG_W-1:0] min1, min2;
  logic             sign_all;

  always_comb begin
    sign_all = 1'b0;
    for (int unsigned k = 0; k < DC; k++) begin
      mag[k]   = vtc_i[k].mag;
      sign_all = sign_all ^ vtc_i[k].sign;
    end
    for (int unsigned k = 0; k < DC; k++) begin
      sign_o[k] = sign_all ^ vtc_i[k].sign;
    end
  end

  s2ds_two_min #(.DC(DC), .MAG_W(MAG_W)) u_two_min (
    .mag_i  (mag),
    .min1_o (min1),
    .min2_o (min2),
    .idx_o  (idx_o)
  );

  s2ds_scale075 #(.MAG_W(MAG_W)) u_scale (
    .x_i (min1),
    .y_o (min1s_o)
  );

  // min2 >= min1 always, so the difference is non-negative.
  assign dmin_o = min2 - min1;

endmodule
