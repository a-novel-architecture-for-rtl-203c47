// pxp_barrel_shifter: P x P cyclic rotation of one channel-memory word.
//
// A channel-memory word holds P LLRs of one circulant, lane m holding the
// variable node a + m*(Z/P) (a = word address). For a circulant with shift
// s, the P rows processed together need a word whose lanes are rotated by
// q = floor((t + s) / (Z/P)) mod P (t = row set). In read direction
// (dir = 0) the shifter gives check node p the lane (p + rot) mod P; in
// write direction (dir = 1) it applies the inverse rotation so that each
// updated LLR returns to the lane it came from. One shifter per memory
// bank, shared by the read and the write phase, is this design's choice.
// Purely combinational; rot < P. T is the lane type (a 7-bit LLR).
module pxp_barrel_shifter #(
  parameter int unsigned P  = 27,
  parameter type         T  = logic signed [6:0],   // one LLR
  localparam int unsigned RW = (P > 1) ? $clog2(P) : 1
) (
  input  T              din  [P],
  input  logic [RW-1:0] rot,
  input  logic          dir,
  output T              dout [P]
);

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      int unsigned idx;
      if (!dir) idx = p + int'(rot);
      else      idx = p + P - int'(rot);
      if (idx >= P) idx = idx - P;
      dout[p] = din[idx];
    end
  end

endmodule
