// ldpc_pkg: widths, types and helper functions shared by the layered
// min-sum LDPC decoder.
//
// LLRs are 7-bit two's complement numbers (the quantisation of the
// reference implementation). Check node magnitudes are the 6 low bits of a
// saturated LLR, so the largest magnitude (all ones) also serves as the
// "+infinity" that pads an odd check node degree to an even one.
// Saturation to the symmetric range [-(2^(Q-1)-1), 2^(Q-1)-1] is this
// design's own choice; it keeps |x| inside Q-1 bits.
package ldpc_pkg;

  localparam int unsigned Q      = 7;       // LLR width (bits)
  localparam int unsigned MAG_W  = Q - 1;   // magnitude width

  typedef logic signed [Q-1:0] llr_t;
  typedef logic [MAG_W-1:0]    mag_t;

  localparam mag_t MAG_INF = '1;            // +infinity for padding

  // Saturate a wider signed value to the symmetric Q-bit range.
  function automatic llr_t sat_llr(input logic signed [Q+1:0] v);
    localparam logic signed [Q+1:0] MAXV = (1 <<< (Q-1)) - 1;
    if (v > MAXV)       return llr_t'(MAXV);
    else if (v < -MAXV) return llr_t'(-MAXV);
    else                return llr_t'(v);
  endfunction

  // Sign-magnitude split of a (saturated) LLR. Zero counts as positive.
  function automatic mag_t llr_mag(input llr_t v);
    llr_t a;
    a = (v < 0) ? -v : v;
    if (a[Q-1]) return MAG_INF;   // -2^(Q-1) cannot occur after sat_llr
    return a[MAG_W-1:0];
  endfunction

  function automatic llr_t llr_from_sm(input logic s, input mag_t m);
    llr_t v;
    v = llr_t'({1'b0, m});
    return s ? -v : v;
  endfunction

endpackage
