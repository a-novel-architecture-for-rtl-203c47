// decoder_controller: schedule and address generation of the layered
// decoder.
//
// Code description (written while idle, so one build serves many codes):
//  * column map: for every block column c of the base matrix, the channel
//    memory bank and the slot (circulant position inside the bank) that
//    hold it. Any regular or irregular bank organisation can be loaded.
//  * layer table: for every block row (layer) l and check node input
//    position j < DC_MAX, {valid, block column, circulant shift s}. Valid
//    entries must be packed at positions 0..dc-1; dc of a layer is the
//    number of valid entries. The shift is split on writing into
//    q0 = s div (Z/P) and a0 = s mod (Z/P) for the current zp = Z/P.
//  * zp = Z/P (words per circulant), n_layers, n_iter (fixed iteration
//    count, no early stop).
//
// Decoding walks iterations -> layers -> sub-iterations t = 0..zp-1. In
// sub-iteration t the P check nodes process rows t + p*zp (p = 0..P-1) of
// the layer. Entry j is read from word slot*zp + ((a0 + t) mod zp) of its
// bank, and the word is rotated by q = (q0 + carry) mod P. Entries that
// share a bank cannot be read in the same cycle: each gets a rank (its
// order among the layer's entries in that bank) and is read in cycle
// "rank" of the read phase, so a layer costs 1 + (largest rank) read
// cycles; the extra cycles are the memory conflict penalty and are
// counted in stat_conflict. Phases of one sub-iteration:
//   RD  (nread cycles)  bank reads; data is captured into the check node
//                       inputs one cycle later (cap_en / sh_pos / sh_rot)
//   CAP (1 cycle)       capture of the last read
//   CNS (1 cycle)       check nodes start
//   CNW                 wait for the check nodes
//   WR  (nread cycles)  write back, same banks, addresses and ranks,
//                       inverse rotation
// The phases do not overlap, so a layer always reads the LLRs written by
// the previous one; overlapping them is left out (own choice, the source
// design gives no pipeline schedule).
//
// Lint tools may report rst_n as used both asynchronously and
// synchronously: the flip-flops use it only as an asynchronous reset,
// the other use is the disable condition of the assertions below.
module decoder_controller #(
  parameter int unsigned P       = 27,
  parameter int unsigned DC_MAX  = 22,
  parameter int unsigned NB_MAX  = 24,
  parameter int unsigned MB_MAX  = 12,
  parameter int unsigned SLOTS   = 5,
  parameter int unsigned ZP_MAX  = 3,
  localparam int unsigned NBANK  = DC_MAX,
  localparam int unsigned K_WORDS = MB_MAX * ZP_MAX,
  localparam int unsigned CW     = $clog2(NB_MAX),
  localparam int unsigned BW     = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int unsigned SLW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned ZW     = $clog2(ZP_MAX + 1),
  localparam int unsigned SHW    = $clog2(P * ZP_MAX),
  localparam int unsigned RW     = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned LW     = $clog2(MB_MAX),
  localparam int unsigned PW     = (DC_MAX > 1) ? $clog2(DC_MAX) : 1,
  localparam int unsigned DW     = $clog2(DC_MAX + 1),
  localparam int unsigned AW     = $clog2(SLOTS * ZP_MAX),
  localparam int unsigned KW     = (K_WORDS > 1) ? $clog2(K_WORDS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // static configuration
  input  logic [ZW-1:0]  zp,
  input  logic [LW:0]    n_layers,
  input  logic [7:0]     n_iter,
  input  logic           map_we,
  input  logic [CW-1:0]  map_col,
  input  logic [BW-1:0]  map_bank,
  input  logic [SLW-1:0] map_slot,
  input  logic           ent_we,
  input  logic [LW-1:0]  ent_layer,
  input  logic [PW-1:0]  ent_pos,
  input  logic           ent_valid,
  input  logic [CW-1:0]  ent_col,
  input  logic [SHW-1:0] ent_shift,
  // host access address translation
  input  logic [CW-1:0]  host_col,
  input  logic [ZW-1:0]  host_word,
  output logic [BW-1:0]  host_bank,
  output logic [AW-1:0]  host_addr,
  // run control
  input  logic           start,
  output logic           busy,
  output logic           done,
  // channel memory
  output logic           mem_en   [NBANK],
  output logic           mem_we   [NBANK],
  output logic [AW-1:0]  mem_addr [NBANK],
  // PxP shifters and input capture
  output logic           sh_dir,
  output logic [RW-1:0]  sh_rot   [NBANK],
  output logic [PW-1:0]  sh_pos   [NBANK],
  output logic           cap_en   [NBANK],
  // check nodes
  output logic           cn_start,
  output logic           cn_first,
  output logic [DW-1:0]  cn_dc,
  output logic [KW-1:0]  cn_addr,
  input  logic           cn_done,
  // statistics
  output logic [31:0]    stat_conflict,
  output logic [31:0]    stat_subiter
);

  typedef struct packed {
    logic           valid;
    logic [CW-1:0]  col;
    logic [RW-1:0]  q0;
    logic [ZW-1:0]  a0;
  } entry_t;

  typedef struct packed {
    logic [BW-1:0]  bank;
    logic [SLW-1:0] slot;
  } loc_t;

  typedef enum logic [2:0] {K_IDLE, K_RD, K_CAP, K_CNS, K_CNW, K_WR} kstate_e;

  loc_t    col_map [NB_MAX];
  entry_t  layer_tab [MB_MAX][DC_MAX];

  kstate_e        state;
  logic [7:0]     it;
  logic [LW-1:0]  layer;
  logic [ZW-1:0]  t;
  logic [DW-1:0]  r;            // read/write cycle within a phase
  logic           cap_valid;
  logic [DW-1:0]  cap_r;
  logic [KW-1:0]  msg_addr;

  // -------------------------------------------------------------------
  // Configuration tables
  // -------------------------------------------------------------------
  // shift split: qq = ent_shift div zp (by comparison, no divider)
  int unsigned qq;
  always_comb begin
    qq = 0;
    for (int unsigned k = 1; k <= P; k++)
      if (k * int'(zp) <= int'(ent_shift)) qq = k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < NB_MAX; c++) col_map[c] <= '0;
      for (int unsigned l = 0; l < MB_MAX; l++)
        for (int unsigned j = 0; j < DC_MAX; j++) layer_tab[l][j] <= '0;
    end else if (state == K_IDLE) begin
      if (map_we) col_map[map_col] <= '{bank: map_bank, slot: map_slot};
      if (ent_we) begin
        layer_tab[ent_layer][ent_pos] <= '{
          valid: ent_valid,
          col:   ent_col,
          q0:    RW'(qq),
          a0:    ZW'(int'(ent_shift) - qq * int'(zp))};
      end
    end
  end

  assign host_bank = col_map[host_col].bank;
  assign host_addr = AW'(int'(col_map[host_col].slot) * int'(zp) + int'(host_word));

  // -------------------------------------------------------------------
  // Per-entry bank, rank, word address and rotation of the current layer
  // -------------------------------------------------------------------
  logic [BW-1:0] e_bank [DC_MAX];
  logic [AW-1:0] e_addr [DC_MAX];
  logic [RW-1:0] e_rot  [DC_MAX];
  logic [DW-1:0] e_rank [DC_MAX];
  logic          e_val  [DC_MAX];
  logic [DW-1:0] nread, ldc;

  always_comb begin
    nread = DW'(1);
    ldc   = '0;
    for (int unsigned j = 0; j < DC_MAX; j++) begin
      entry_t e;
      int unsigned sum, q;
      e         = layer_tab[layer][j];
      e_val[j]  = e.valid;
      e_bank[j] = col_map[e.col].bank;
      sum = int'(e.a0) + int'(t);
      q   = int'(e.q0);
      if (sum >= int'(zp)) begin
        sum = sum - int'(zp);
        q   = q + 1;
      end
      if (q >= P) q = q - P;
      e_addr[j] = AW'(int'(col_map[e.col].slot) * int'(zp) + sum);
      e_rot[j]  = RW'(q);
      e_rank[j] = '0;
      for (int unsigned i = 0; i < j; i++)
        if (layer_tab[layer][i].valid && col_map[layer_tab[layer][i].col].bank == e_bank[j])
          e_rank[j] = e_rank[j] + 1'b1;
      if (e.valid) begin
        ldc = ldc + 1'b1;
        if (e_rank[j] + 1'b1 > nread) nread = e_rank[j] + 1'b1;
      end
    end
  end

  // Entry served by each bank in a given cycle of a phase.
  function automatic logic [PW:0] served(input logic [BW-1:0] b, input logic [DW-1:0] rr);
    logic [PW:0] res;
    res = '0;                                    // {hit, position}
    for (int unsigned j = 0; j < DC_MAX; j++)
      if (e_val[j] && e_bank[j] == b && e_rank[j] == rr) res = {1'b1, PW'(j)};
    return res;
  endfunction

  // -------------------------------------------------------------------
  // Memory, shifter and capture control
  // -------------------------------------------------------------------
  always_comb begin
    sh_dir = (state == K_WR);
    for (int unsigned b = 0; b < NBANK; b++) begin
      logic [PW:0] acc_s, cap_s;
      acc_s = served(BW'(b), r);
      cap_s = served(BW'(b), cap_r);
      mem_en[b]   = 1'b0;
      mem_we[b]   = 1'b0;
      mem_addr[b] = '0;
      cap_en[b]   = cap_valid && cap_s[PW];
      sh_pos[b]   = cap_s[PW-1:0];
      sh_rot[b]   = e_rot[cap_s[PW-1:0]];
      if ((state == K_RD || state == K_WR) && acc_s[PW]) begin
        mem_en[b]   = 1'b1;
        mem_we[b]   = (state == K_WR);
        mem_addr[b] = e_addr[acc_s[PW-1:0]];
      end
      if (state == K_WR) begin
        sh_pos[b] = acc_s[PW-1:0];
        sh_rot[b] = e_rot[acc_s[PW-1:0]];
      end
    end
  end

  assign cn_start = (state == K_CNS);
  assign cn_first = (it == 0);
  assign cn_dc    = ldc;
  assign cn_addr  = msg_addr;
  assign busy     = (state != K_IDLE);

  // -------------------------------------------------------------------
  // Sequencer
  // -------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= K_IDLE;
      it            <= '0;
      layer         <= '0;
      t             <= '0;
      r             <= '0;
      cap_valid     <= 1'b0;
      cap_r         <= '0;
      msg_addr      <= '0;
      done          <= 1'b0;
      stat_conflict <= '0;
      stat_subiter  <= '0;
    end else begin
      done      <= 1'b0;
      cap_valid <= (state == K_RD);
      cap_r     <= r;
      unique case (state)
        K_IDLE: if (start) begin
          it            <= '0;
          layer         <= '0;
          t             <= '0;
          r             <= '0;
          msg_addr      <= '0;
          stat_conflict <= '0;
          stat_subiter  <= '0;
          state         <= K_RD;
        end
        K_RD: begin
          if (r + 1'b1 == nread) begin
            r     <= '0;
            state <= K_CAP;
          end else begin
            r             <= r + 1'b1;
            stat_conflict <= stat_conflict + 1;
          end
        end
        K_CAP: state <= K_CNS;
        K_CNS: state <= K_CNW;
        K_CNW: if (cn_done) state <= K_WR;
        K_WR: begin
          if (r + 1'b1 != nread) begin
            r <= r + 1'b1;
          end else begin
            r            <= '0;
            stat_subiter <= stat_subiter + 1;
            state        <= K_RD;
            if (t + 1'b1 != zp) begin
              t        <= t + 1'b1;
              msg_addr <= msg_addr + 1'b1;
            end else begin
              t <= '0;
              if (layer + 1'b1 != n_layers) begin
                layer    <= layer + 1'b1;
                msg_addr <= msg_addr + 1'b1;
              end else begin
                layer    <= '0;
                msg_addr <= '0;
                if (it + 1'b1 != n_iter) begin
                  it <= it + 1'b1;
                end else begin
                  done  <= 1'b1;
                  state <= K_IDLE;
                end
              end
            end
          end
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  // Configuration must describe something the hardware can run.
  a_zp: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (zp >= 1 && 32'(zp) <= ZP_MAX && n_layers >= 1 &&
                          32'(n_layers) <= MB_MAX && n_iter >= 1));

endmodule
