// s2ds_vnu: variable-node unit of the min-sum decoder.
//
// For one code bit with DV neighbouring check nodes:
//   z_o       = F + sum of all DV incoming CTV messages (a-posteriori LLR)
//   vtc_o[k]  = z_o - ctv_i[k] = F + sum of the other CTV messages
//               (extrinsic VTC message to check node k)
//   hard_o    = 1 when z_o < 0, else 0 (tentative decision)
// The a-posteriori sum is kept at full width (LLR_W + log2(DV+1) bits), so
// it never overflows. Each VTC message is saturated to the symmetric Q2.3
// range -MAG_MAX .. +MAG_MAX and handed to the check node side in
// sign-magnitude form; saturation, rather than wrap-around, is this
// design's choice.
//
// Interface: llr_i (the a-priori LLR F) and ctv_i[DV] in, two's complement;
// vtc_o[DV], z_o and hard_o out. Combinational.
module s2ds_vnu
  import s2ds_pkg::*;
#(
  parameter int unsigned DV = 3,
  localparam int unsigned SUM_W = LLR_W + $clog2(DV + 1)
) (
  input  logic signed [LLR_W-1:0] llr_i,
  input  logic signed [LLR_W-1:0] ctv_i [DV],
  output sm_msg_t                 vtc_o [DV],
  output logic signed [SUM_W-1:0] z_o,
  output logic                    hard_o
);

  localparam logic signed [SUM_W-1:0] POS_MAX = SUM_W'(MAG_MAX);
  localparam logic signed [SUM_W-1:0] NEG_MAX = -SUM_W'(MAG_MAX);

  logic signed [SUM_W-1:0] ext;
  logic signed [LLR_W-1:0] sat;

  always_comb begin
    z_o = SUM_W'(llr_i);
    for (int unsigned k = 0; k < DV; k++) z_o += SUM_W'(ctv_i[k]);
    hard_o = z_o[SUM_W-1];
    for (int unsigned k = 0; k < DV; k++) begin
      ext = z_o - SUM_W'(ctv_i[k]);
      if (ext > POS_MAX)      sat = LLR_W'(MAG_MAX);
      else if (ext < NEG_MAX) sat = -LLR_W'(MAG_MAX);
      else                    sat = ext[LLR_W-1:0];
      vtc_o[k] = to_sm(sat);
    end
  end

endmodule
