// s2ds_syndrome: syndrome check of the tentative hard decisions.
//
// Computes s = H * c^T over GF(2): bit r of syn_o is the XOR of the code
// bits that row r of the parity-check matrix H covers. ok_o is 1 when the
// whole syndrome is zero, i.e. c is a codeword and decoding may stop.
//
// H is given in quasi-cyclic form, as in s2ds_decoder: an MB x NB base
// matrix SHIFT of Z x Z blocks, -1 for a zero block and s >= 0 for the
// identity shifted right by s, so row a of block row i meets column
// j*Z + (a + s) mod Z of block column j. The default (Z = 1) is the 4 x 6
// example matrix that introduces the decoder's bipartite graph.
// Combinational.
module s2ds_syndrome #(
  parameter int unsigned Z  = 1,
  parameter int unsigned MB = 4,
  parameter int unsigned NB = 6,
  parameter int SHIFT [MB][NB] = '{'{ 0, -1, -1,  0, -1, -1},
                                   '{-1,  0, -1, -1,  0, -1},
                                   '{ 0, -1,  0, -1,  0, -1},
                                   '{-1, -1,  0, -1, -1,  0}},
  localparam int unsigned N = NB * Z,
  localparam int unsigned M = MB * Z
) (
  input  logic [N-1:0] c_i,
  output logic [M-1:0] syn_o,
  output logic         ok_o
);

  always_comb begin
    for (int i = 0; i < int'(MB); i++)
      for (int a = 0; a < int'(Z); a++) begin
        syn_o[i*Z + a] = 1'b0;
        for (int j = 0; j < int'(NB); j++)
          if (SHIFT[i][j] >= 0)
            syn_o[i*Z + a] = syn_o[i*Z + a] ^ c_i[j*Z + (a + SHIFT[i][j] % Z) % Z];
      end
    ok_o = (syn_o == '0);
  end

endmodule
