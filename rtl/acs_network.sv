// acs_network: circular permutation ("ACS network") between the
// compare-select units of the tree-way check node.
//
// The network is an N_MAX x N_MAX barrel shifter that rotates the first
// n_act entries of its input vector: out[k] = in[(k + shift) mod n_act]
// for k < n_act. n_act = dc'/2 is the number of compare-select units in use
// for the current check node degree dc' (rounded up to even), so one network
// synthesised for the largest degree serves every smaller degree, as the
// architecture requires for irregular codes. Entries at k >= n_act are
// unused and pass in[k] through. Purely combinational; shift < n_act.
// The rotation direction (towards higher unit numbers reading lower ones)
// follows the tree of the reference design: unit k is paired with unit k+s.
module acs_network #(
  parameter int unsigned N_MAX = 4,
  parameter int unsigned W     = 6,
  localparam int unsigned SW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned NW   = $clog2(N_MAX + 1)
) (
  input  logic [W-1:0]  in_vec  [N_MAX],
  input  logic [SW-1:0] shift,
  input  logic [NW-1:0] n_act,
  output logic [W-1:0]  out_vec [N_MAX]
);

  always_comb begin
    for (int unsigned k = 0; k < N_MAX; k++) begin
      logic [NW:0] idx;
      idx = (NW+1)'(k) + (NW+1)'(shift);
      if (idx >= (NW+1)'(n_act)) idx = idx - (NW+1)'(n_act);
      if ((NW+1)'(k) < (NW+1)'(n_act)) out_vec[k] = in_vec[idx[SW-1:0]];
      else                              out_vec[k] = in_vec[k];
    end
  end

endmodule
