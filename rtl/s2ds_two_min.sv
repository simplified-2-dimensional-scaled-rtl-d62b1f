// s2ds_two_min: first and second minimum of a check node's input magnitudes.
//
// A check node of a min-sum decoder only ever sends one of two magnitudes:
// the smallest input (min1) to every edge except the one it came from, and
// the second smallest (min2) to that edge. This block finds min1, min2 and
// the index of min1 among DC unsigned magnitudes.
//
// How it works: a tournament. The inputs, padded to a power of two P with
// the largest magnitude, are reduced by a binary tree of comparators; each
// node passes on the smaller value and its index, the left (lower-index)
// one on a tie, so min1 is the first occurrence of the minimum. The second
// minimum must have lost directly to min1 somewhere on its way up, so min2
// is the smallest of the log2(P) values that met min1's path: they are
// picked by multiplexers from the index of min1 and reduced by log2(P) - 1
// further comparators. For power-of-two DC that is DC + log2(DC) - 2
// comparisons, the usual count for a two-minimum finder; comparisons
// against padding are constant and vanish in synthesis. Only the function
// (min1, min2, index of min1) and that comparison count come from the
// algorithm's description; the tournament structure is this design's
// choice.
//
// Interface: mag_i[DC] in, min1_o / min2_o / idx_o out. Purely
// combinational, no clock. The two stages are in series, so the path is
// about 2*log2(DC) comparators plus the multiplexers deep.
module s2ds_two_min #(
  parameter int unsigned DC    = 6,
  parameter int unsigned MAG_W = 5,
  localparam int unsigned IDX_W = (DC > 1) ? $clog2(DC) : 1
) (
  input  logic [MAG_W-1:0] mag_i [DC],
  output logic [MAG_W-1:0] min1_o,
  output logic [MAG_W-1:0] min2_o,
  output logic [IDX_W-1:0] idx_o
);

  localparam int unsigned LEVELS = (DC > 1) ? $clog2(DC) : 0;
  localparam int unsigned P      = 1 << LEVELS;   // padded leaf count

  logic [MAG_W-1:0] val [LEVELS+1][P];   // winner value of each tree node
  logic [IDX_W-1:0] win [LEVELS+1][P];   // winner index of each tree node
  logic [MAG_W-1:0] lost;                // value that met min1 at a level
  logic [IDX_W-1:0] node;                // min1's ancestor at a level

  always_comb begin
    // Leaves: a real input or padding with the largest magnitude.
    for (int unsigned k = 0; k < P; k++) begin
      val[0][k] = (k < DC) ? mag_i[k] : '1;
      win[0][k] = IDX_W'(k);
    end
    // Tournament for min1.
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned k = 0; k < P; k++) begin
        if (k < (P >> l)) begin
          if (val[l-1][2*k] <= val[l-1][2*k+1]) begin
            val[l][k] = val[l-1][2*k];
            win[l][k] = win[l-1][2*k];
          end else begin
            val[l][k] = val[l-1][2*k+1];
            win[l][k] = win[l-1][2*k+1];
          end
        end else begin
          val[l][k] = '0;   // unused slot of this level
          win[l][k] = '0;
        end
      end
    end
    min1_o = val[LEVELS][0];
    idx_o  = win[LEVELS][0];
    // min2: smallest of the opponents min1 met, one per level.
    min2_o = '1;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      node = IDX_W'(idx_o >> l);
      lost = val[l][node ^ IDX_W'(1)];
      if (lost < min2_o) min2_o = lost;
    end
  end

endmodule
