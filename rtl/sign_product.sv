// sign_product: sign part of the tree-way check node.
//
// The sign of the extrinsic message sent back to variable node j is the
// product (XOR) of the signs of all other inputs. As in the reference
// datapath this is formed as the XOR of all active signs, then XORed with
// the input's own sign: p[j] = (s[0] ^ ... ^ s[dc-1]) ^ s[j]. Inputs at
// positions >= dc are masked to 0 (the "select" multiplexers of the flexible
// tree), so one block built for DC_MAX serves every smaller degree. A
// padding input of an odd degree is therefore positive, matching its
// +infinity magnitude. Purely combinational (the tree-way PE registers the
// result in its output bank).
module sign_product #(
  parameter int unsigned DC_MAX = 8,
  localparam int unsigned DW    = $clog2(DC_MAX + 1)
) (
  input  logic [DC_MAX-1:0] s,
  input  logic [DW-1:0]     dc,
  output logic [DC_MAX-1:0] p
);

  logic [DC_MAX-1:0] masked;
  logic              total;

  always_comb begin
    for (int unsigned i = 0; i < DC_MAX; i++)
      masked[i] = s[i] & (DW'(i) < dc);
    total = ^masked;
    p     = {DC_MAX{total}} ^ masked;
  end

endmodule
