// tree_way_magnitude: magnitude datapath of the parallel "tree-way"
// min-sum check node.
//
// For a check node of degree dc the block returns, for every input j, the
// minimum of the magnitudes of all the other inputs. Only DC_MAX/2
// compare-select (CS) units exist; they are reused over Ncc clock cycles:
//
//   DVC  (1 cycle)  CS k compares the input pair (I[2k], I[2k+1]). Its
//                   result is the minimum over a "window" of 1 pair.
//   MSC  (several)  doubling stages with ACS shift s = 1, 2, 4, ...: CS k
//                   merges its own window with the window of unit k+s
//                   (mod dc'/2), which doubles the window. Then remainder
//                   stages merge windows of 2^b pairs read back from the
//                   switch-matrix (SM) memories, one per set bit b of
//                   L = dc'/2 - 1 below its top bit, until every unit holds
//                   the minimum over L pairs = dc'-2 inputs, starting at
//                   its own pair. The shift of a remainder stage is the
//                   window length reached so far.
//   EC1, EC2        The two inputs missing from unit k's window are
//                   I[2k-2] and I[2k-1] (mod dc'). EC1 compares the window
//                   with I[2k-1] and gives the extrinsic of input 2k-2;
//                   EC2 compares it with I[2k-2] and gives that of 2k-1.
//
// This schedule reproduces the cycle counts and shift sequences of the
// reference design (dc' = 8: shifts 1,2, Ncc = 5; dc' = 16: 1,2,4,6, Ncc = 7;
// dc' = 32: 1,2,4,8,12,14, Ncc = 9). Odd degrees are padded to
// dc' = dc + 1 with a +infinity input. SM memory k holds the output of
// every DVC/MSC stage at the stage's index, so the window of 2^b pairs
// lies at address b.
//
// Interface: pulse start for one cycle with mag_in and dc (3..DC_MAX)
// valid; they are captured into the input register bank at that clock
// edge, the Ncc(dc) stage cycles follow, and done pulses for one cycle
// Ncc(dc) + 1 cycles after start (the extra cycle is the input register
// load). mag_out[0..dc-1] then holds the extrinsic magnitudes until the
// next operation finishes. start is ignored
// while busy. The ready/valid-free start/done protocol is this design's
// own choice.
//
// Lint tools may report rst_n as used both asynchronously and
// synchronously: the flip-flops use it only as an asynchronous reset,
// the other use is the disable condition of the assertions below.
module tree_way_magnitude #(
  parameter int unsigned DC_MAX = 8,
  parameter int unsigned W      = 6,
  localparam int unsigned N_MAX = (DC_MAX + 1) / 2,
  localparam int unsigned DW    = $clog2(DC_MAX + 1),
  localparam int unsigned SW    = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned NW    = $clog2(N_MAX + 1),
  localparam int unsigned OW    = $clog2(DC_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dc,
  input  logic [W-1:0]  mag_in  [DC_MAX],
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  mag_out [DC_MAX]
);

  // ---------------------------------------------------------------------
  // Schedule helpers
  // ---------------------------------------------------------------------
  function automatic int unsigned flog2(input int unsigned v);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < 32; i++) if ((v >> i) != 0) r = i;
    return r;
  endfunction

  function automatic int unsigned popcnt(input int unsigned v);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < 32; i++) r += (v >> i) & 1;
    return r;
  endfunction

  // Number of cycles of one check node update for degree d.
  function automatic int unsigned ncc_of(input int unsigned d);
    int unsigned l;
    l = (d + (d & 1)) / 2 - 1;
    return 1 + flog2(l) + popcnt(l) - 1 + 2;
  endfunction

  localparam int unsigned NCC_MAX  = ncc_of(DC_MAX + (DC_MAX & 1));
  localparam int unsigned SM_DEPTH = NCC_MAX - 2;      // DVC + MSC stages
  localparam int unsigned AW       = $clog2(SM_DEPTH + 1);
  localparam logic [W-1:0] INF     = '1;

  typedef enum logic [2:0] {S_IDLE, S_DVC, S_DBL, S_REM, S_EC1, S_EC2} state_e;

  // ---------------------------------------------------------------------
  // Registers
  // ---------------------------------------------------------------------
  state_e        state;
  logic [W-1:0]  in_reg [DC_MAX];       // input register bank
  logic [DW:0]   dcp;                   // padded (even) degree
  logic [DW-1:0] dc_r;
  logic [NW-1:0] nact;                  // CS units in use = dcp/2
  logic [NW-1:0] lvl_top;               // floor(log2 L)
  logic [NW-1:0] lvl;                   // current doubling level
  logic [NW:0]   cur;                   // window length reached (pairs)
  logic [NW:0]   rem;                   // pairs still to merge
  logic [AW-1:0] sidx;                  // stage index = SM write address
  logic [W-1:0]  acc [N_MAX];           // CS output feedback (FBD)
  logic [W-1:0]  sm  [N_MAX][SM_DEPTH]; // switch-matrix memories

  // ---------------------------------------------------------------------
  // Input vector with +infinity padding beyond dc
  // ---------------------------------------------------------------------
  logic [W-1:0] iv [DC_MAX + 1];
  always_comb begin
    for (int unsigned j = 0; j <= DC_MAX; j++)
      iv[j] = INF;
    for (int unsigned j = 0; j < DC_MAX; j++)
      if ((DW+1)'(j) < (DW+1)'(dc_r)) iv[j] = in_reg[j];
  end

  // Highest set bit of the remaining pair count (next remainder window).
  logic [NW-1:0] rem_bit;
  always_comb begin
    rem_bit = '0;
    for (int unsigned i = 0; i <= NW; i++)
      if (rem[i]) rem_bit = NW'(i);
  end

  // ---------------------------------------------------------------------
  // ACS network: rotates either the feedback vector (doubling stages) or
  // a stored SM window (remainder stages).
  // ---------------------------------------------------------------------
  logic [W-1:0]  acs_in  [N_MAX];
  logic [W-1:0]  acs_out [N_MAX];
  logic [SW-1:0] acs_shift;

  always_comb begin
    acs_shift = '0;
    for (int unsigned k = 0; k < N_MAX; k++) acs_in[k] = acc[k];
    if (state == S_DBL) begin
      acs_shift = SW'(1 << (lvl - 1));
    end else if (state == S_REM) begin
      acs_shift = SW'(cur);
      for (int unsigned k = 0; k < N_MAX; k++)
        acs_in[k] = sm[k][AW'(rem_bit)];
    end
  end

  acs_network #(.N_MAX(N_MAX), .W(W)) u_acs (
    .in_vec (acs_in),
    .shift  (acs_shift),
    .n_act  (nact),
    .out_vec(acs_out)
  );

  // ---------------------------------------------------------------------
  // Input mux stage and compare-select units
  // ---------------------------------------------------------------------
  logic [W-1:0] op_a [N_MAX];
  logic [W-1:0] op_b [N_MAX];
  logic [W-1:0] cs   [N_MAX];
  logic [DW:0]  ec_dst [N_MAX];          // output index written by EC stage

  always_comb begin
    for (int unsigned k = 0; k < N_MAX; k++) begin
      logic [DW-1:0] i1, i2;             // (2k-1) and (2k-2) mod dcp
      i1 = (2 * k >= 1) ? DW'(2 * k - 1) : DW'(int'(dcp) - 1);
      i2 = (2 * k >= 2) ? DW'(2 * k - 2) : DW'(int'(dcp) - 2 + 2 * k);
      op_a[k]   = acc[k];
      op_b[k]   = INF;
      ec_dst[k] = '0;
      unique case (state)
        S_DVC: begin
          op_a[k] = iv[2 * k];
          op_b[k] = iv[2 * k + 1];
        end
        S_DBL, S_REM: op_b[k] = acs_out[k];
        S_EC1: begin
          op_b[k]   = iv[i1];
          ec_dst[k] = (DW+1)'(i2);
        end
        S_EC2: begin
          op_b[k]   = iv[i2];
          ec_dst[k] = (DW+1)'(i1);
        end
        default: ;
      endcase
      cs[k] = (op_b[k] < op_a[k]) ? op_b[k] : op_a[k];
    end
  end

  // ---------------------------------------------------------------------
  // Control and storage
  // ---------------------------------------------------------------------
  assign busy = (state != S_IDLE);

  // Degree decoding at start, and the remainder bits left after this stage.
  int unsigned   st_d, st_l;
  logic [NW:0]   rem_n;
  always_comb begin
    st_d  = int'(dc) + int'(dc[0]);
    st_l  = st_d / 2 - 1;
    rem_n = rem & ~((NW+1)'(1) << rem_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      dcp     <= '0;
      dc_r    <= '0;
      nact    <= '0;
      lvl_top <= '0;
      lvl     <= '0;
      cur     <= '0;
      rem     <= '0;
      sidx    <= '0;
      for (int unsigned j = 0; j < DC_MAX; j++) begin
        in_reg[j]  <= '0;
        mag_out[j] <= '0;
      end
      for (int unsigned k = 0; k < N_MAX; k++) begin
        acc[k] <= '0;
        for (int unsigned a = 0; a < SM_DEPTH; a++) sm[k][a] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          in_reg  <= mag_in;
          dc_r    <= dc;
          dcp     <= (DW+1)'(st_d);
          nact    <= NW'(st_d / 2);
          lvl_top <= NW'(flog2(st_l));
          rem     <= (NW+1)'(st_l - (1 << flog2(st_l)));
          cur     <= (NW+1)'(1 << flog2(st_l));
          state   <= S_DVC;
        end
        S_DVC: begin
          for (int unsigned k = 0; k < N_MAX; k++) begin
            acc[k]   <= cs[k];
            sm[k][0] <= cs[k];
          end
          sidx  <= AW'(1);
          lvl   <= NW'(1);
          state <= (lvl_top != 0) ? S_DBL : S_EC1;
        end
        S_DBL: begin
          for (int unsigned k = 0; k < N_MAX; k++) begin
            acc[k]      <= cs[k];
            sm[k][sidx] <= cs[k];
          end
          sidx <= sidx + 1'b1;
          lvl  <= lvl + 1'b1;
          if (lvl == lvl_top) state <= (rem != 0) ? S_REM : S_EC1;
        end
        S_REM: begin
          for (int unsigned k = 0; k < N_MAX; k++) begin
            acc[k] <= cs[k];
            if (sidx < AW'(SM_DEPTH)) sm[k][sidx] <= cs[k];
          end
          sidx  <= sidx + 1'b1;
          cur   <= cur + ((NW+1)'(1) << rem_bit);
          rem   <= rem_n;
          if (rem_n == 0) state <= S_EC1;
        end
        S_EC1: begin
          for (int unsigned k = 0; k < N_MAX; k++)
            if (k < nact && ec_dst[k] < (DW+1)'(DC_MAX)) mag_out[ec_dst[k][OW-1:0]] <= cs[k];
          state <= S_EC2;
        end
        S_EC2: begin
          for (int unsigned k = 0; k < N_MAX; k++)
            if (k < nact && ec_dst[k] < (DW+1)'(DC_MAX)) mag_out[ec_dst[k][OW-1:0]] <= cs[k];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The degree must lie inside the range the datapath was built for.
  a_dc_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (dc >= 3 && dc <= DW'(DC_MAX)));

endmodule
