// tree_way_pe: tree-way min-sum check node processing element.
//
// Takes the dc variable-to-check messages of one check node in parallel
// (two's complement LLRs) and returns all dc check-to-variable messages in
// parallel: beta[j] = (product of the signs of the other inputs) x (minimum
// of the other inputs' magnitudes), the min-sum check node rule.
//
// The magnitudes go through the time-shared tree-way datapath
// (tree_way_magnitude); the signs through the XOR sign product tree
// (sign_product). Input signs are captured on start together with the
// magnitudes and the sign product is formed from that register, so beta[]
// is valid from the done pulse until the next start.
// A zero input counts as positive. Saturation of the inputs to the
// symmetric range is this design's own choice.
//
// Timing: start (one cycle, ignored while busy) -> done after Ncc(dc) + 1
// cycles (see tree_way_magnitude).
module tree_way_pe
  import ldpc_pkg::*;
#(
  parameter int unsigned DC_MAX = 8,
  localparam int unsigned DW    = $clog2(DC_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dc,
  input  llr_t          alpha [DC_MAX],
  output logic          busy,
  output logic          done,
  output llr_t          beta  [DC_MAX]
);

  mag_t              mag_in  [DC_MAX];
  mag_t              mag_out [DC_MAX];
  logic [DC_MAX-1:0] sgn_in, sgn_reg, sgn_prod;
  logic [DW-1:0]     dc_reg;
  logic              mag_done;

  always_comb begin
    for (int unsigned j = 0; j < DC_MAX; j++) begin
      mag_in[j] = llr_mag(alpha[j]);
      sgn_in[j] = alpha[j][Q-1];
    end
  end

  tree_way_magnitude #(.DC_MAX(DC_MAX), .W(MAG_W)) u_mag (
    .clk, .rst_n, .start, .dc,
    .mag_in (mag_in),
    .busy   (busy),
    .done   (mag_done),
    .mag_out(mag_out)
  );

  sign_product #(.DC_MAX(DC_MAX)) u_sign (
    .s (sgn_reg),
    .dc(dc_reg),
    .p (sgn_prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgn_reg <= '0;
      dc_reg  <= '0;
    end else begin
      if (start && !busy) begin
        sgn_reg <= sgn_in;
        dc_reg  <= dc;
      end
    end
  end

  assign done = mag_done;

  always_comb
    for (int unsigned j = 0; j < DC_MAX; j++)
      beta[j] = llr_from_sm(sgn_prod[j], mag_out[j]);

endmodule
