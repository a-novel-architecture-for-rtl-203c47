// layered_cn: layered-decoding check node built around the parallel
// tree-way processing element.
//
// In layered min-sum decoding the variable nodes only store a-posteriori
// LLRs (APP). For the row being processed the check node
//   1. subtracts the message it sent on the previous iteration:
//        t[j] = APP[j] - beta_old[j]
//   2. runs the min-sum check node rule on t[] (tree_way_pe) -> beta_new[]
//   3. returns APP'[j] = t[j] + beta_new[j] and stores beta_new[j].
// All dc edges are handled in parallel: there are DC_MAX message memories
// of K_WORDS words each (one word per row the node processes in an
// iteration, at address msg_addr), instead of one memory of K x dc words.
// A single +/- unit per edge is shared between step 1 (subtract mode) and
// step 3 (add mode) through its input multiplexers; the pipeline registers
// between it and the PE keep t[] for step 3, which replaces the FIFO of a
// serial check node. Results saturate to the symmetric Q-bit range.
//
// Interface: pulse start for one cycle with app_in[], dc, msg_addr and
// first (first = 1 treats the stored messages as zero, for the first
// iteration). The message word is read at that edge; the subtraction
// happens in the next cycle and starts the PE; when the PE finishes, the
// sum is registered into app_out[], beta_new is written back and done
// pulses: Ncc(dc) + 3 cycles after start. start is ignored while busy.
// The handshake, the `first` input and the saturation are this design's
// own choices.
//
// Lint tools may report rst_n as used both asynchronously and
// synchronously: the flip-flops use it only as an asynchronous reset,
// the other use is the disable condition of the assertions below.
module layered_cn
  import ldpc_pkg::*;
#(
  parameter int unsigned DC_MAX  = 8,
  parameter int unsigned K_WORDS = 36,
  localparam int unsigned DW     = $clog2(DC_MAX + 1),
  localparam int unsigned KW     = (K_WORDS > 1) ? $clog2(K_WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          first,
  input  logic [DW-1:0] dc,
  input  logic [KW-1:0] msg_addr,
  input  llr_t          app_in  [DC_MAX],
  output logic          busy,
  output logic          done,
  output llr_t          app_out [DC_MAX]
);

  typedef enum logic [1:0] {C_IDLE, C_SUB, C_PE} cstate_e;
  cstate_e state;

  llr_t          msg_mem [DC_MAX][K_WORDS];   // message memory bank
  llr_t          msg_rd  [DC_MAX];
  llr_t          app_reg [DC_MAX];            // input register
  llr_t          t_reg   [DC_MAX];            // pipeline registers
  llr_t          addsub_a [DC_MAX], addsub_b [DC_MAX], addsub_y [DC_MAX];
  logic          mode_add;
  logic          first_r;
  logic [DW-1:0] dc_r;
  logic [KW-1:0] addr_r;

  llr_t          beta [DC_MAX];
  logic          pe_start, pe_busy, pe_done;

  // Shared +/- units with their input multiplexers.
  assign mode_add = (state == C_PE);
  always_comb begin
    for (int unsigned j = 0; j < DC_MAX; j++) begin
      if (mode_add) begin
        addsub_a[j] = t_reg[j];
        addsub_b[j] = beta[j];
        addsub_y[j] = sat_llr((Q+2)'(addsub_a[j]) + (Q+2)'(addsub_b[j]));
      end else begin
        addsub_a[j] = app_reg[j];
        addsub_b[j] = first_r ? llr_t'(0) : msg_rd[j];
        addsub_y[j] = sat_llr((Q+2)'(addsub_a[j]) - (Q+2)'(addsub_b[j]));
      end
    end
  end

  assign pe_start = (state == C_SUB);

  tree_way_pe #(.DC_MAX(DC_MAX)) u_pe (
    .clk, .rst_n,
    .start(pe_start),
    .dc   (dc_r),
    .alpha(addsub_y),
    .busy (pe_busy),
    .done (pe_done),
    .beta (beta)
  );

  assign busy = (state != C_IDLE);

  // Message memories: one synchronous-read, single-port word per edge.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < DC_MAX; j++) begin
      if (state == C_IDLE && start)
        msg_rd[j] <= msg_mem[j][msg_addr];
      else if (state == C_PE && pe_done && (DW'(j) < dc_r))
        msg_mem[j][addr_r] <= beta[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      done    <= 1'b0;
      first_r <= 1'b0;
      dc_r    <= '0;
      addr_r  <= '0;
      for (int unsigned j = 0; j < DC_MAX; j++) begin
        app_reg[j] <= '0;
        t_reg[j]   <= '0;
        app_out[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          app_reg <= app_in;
          first_r <= first;
          dc_r    <= dc;
          addr_r  <= msg_addr;
          state   <= C_SUB;
        end
        C_SUB: begin
          t_reg <= addsub_y;
          state <= C_PE;
        end
        C_PE: if (pe_done) begin
          for (int unsigned j = 0; j < DC_MAX; j++)
            app_out[j] <= (DW'(j) < dc_r) ? addsub_y[j] : app_reg[j];
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The PE is always idle when a row starts.
  a_pe_idle: assert property (@(posedge clk) disable iff (!rst_n)
    pe_start |-> !pe_busy);

  // The message address must lie inside the memory.
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (32'(msg_addr) < K_WORDS));

endmodule
