// s2ds_pkg: widths, message types and conversions shared by the S2DS
// min-sum LDPC decoder.
//
// Messages between check nodes (CN) and variable nodes (VN) are LLRs in
// Q2.3 fixed point: 5 magnitude bits (2 integer, 3 fractional) plus a sign,
// following the 5-bit quantization chosen for the S2DS decoder. Inside a CN
// they travel in sign-magnitude form (sm_msg_t); inside a VN they are
// two's-complement numbers of LLR_W bits whose range is kept symmetric,
// -MAG_MAX .. +MAG_MAX. The maximum of 20 decoding iterations also follows
// the decoder's evaluated configuration. A zero LLR counts as positive
// (sign bit 0, hard decision 0), the same rule the hard decision uses.
package s2ds_pkg;

  // Quantization Q2.3: 5 magnitude bits, 3 of them fractional.
  localparam int unsigned MAG_W   = 5;
  localparam int unsigned FRAC_W  = 3;
  localparam int unsigned LLR_W   = MAG_W + 1;
  localparam int unsigned MAG_MAX = (1 << MAG_W) - 1;

  // Maximum iteration count of the decoder.
  localparam int unsigned MAX_ITER = 20;

  // Sign-magnitude LLR message as used on the check-node side.
  typedef struct packed {
    logic             sign;   // 1 = negative
    logic [MAG_W-1:0] mag;
  } sm_msg_t;

  // Two's-complement LLR -> sign-magnitude, saturating the magnitude.
  function automatic sm_msg_t to_sm(input logic signed [LLR_W-1:0] v);
    sm_msg_t r;
    r.sign = v[LLR_W-1];
    if (v[LLR_W-1]) begin
      // -2^MAG_W has no sign-magnitude code: clamp it to -MAG_MAX.
      r.mag = (v == {1'b1, {MAG_W{1'b0}}}) ? MAG_W'(MAG_MAX) : MAG_W'(-v);
    end else begin
      r.mag = v[MAG_W-1:0];
    end
    return r;
  endfunction

  // Sign-magnitude -> two's complement.
  function automatic logic signed [LLR_W-1:0] from_sm(input sm_msg_t m);
    logic signed [LLR_W-1:0] p;
    p = $signed({1'b0, m.mag});
    return m.sign ? -p : p;
  endfunction

endpackage
