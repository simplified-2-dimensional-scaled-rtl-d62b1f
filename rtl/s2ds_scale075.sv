// s2ds_scale075: the single scaling unit of the S2DS check node.
//
// Multiplies an unsigned magnitude by the scaling factor 0.75 without a
// multiplier, using two shifts and one addition. The prescribed form is
// 0.75*x = x/2 + x/4; this design evaluates it as (x + x/2) / 2, which is
// the same sum with one shift moved after the adder. Keeping one extra bit
// through the adder makes the result exactly floor(3x/4), whereas
// truncating x/2 and x/4 separately could lose more than one LSB. The
// rounding (truncation toward zero) is this design's choice. The result
// never exceeds x, so it fits in MAG_W bits.
//
// Interface: x_i in, y_o = floor(3*x_i/4) out. Combinational.
module s2ds_scale075 #(
  parameter int unsigned MAG_W = 5
) (
  input  logic [MAG_W-1:0] x_i,
  output logic [MAG_W-1:0] y_o
);

  logic [MAG_W:0] sum;

  assign sum = {1'b0, x_i} + {2'b00, x_i[MAG_W-1:1]};   // x + x/2
  assign y_o = sum[MAG_W:1];                            // (x + x/2) / 2

endmodule
