// ldpc_decoder: scalable multi-standard layered min-sum LDPC decoder with
// parallel "tree-way" check nodes.
//
// The decoder handles quasi-cyclic LDPC codes (IEEE 802.16e / 802.11n
// style): a base matrix of block rows (layers) and block columns whose
// entries are Z x Z cyclically shifted identities. P check nodes work in
// parallel, each taking all dc inputs of its row at once (layered_cn with
// a tree-way PE), so a sub-iteration costs a few cycles for the memory
// phases plus the PE's Ncc cycles rather than dc cycles per row.
//
// Structure:
//   channel_memory       DC_MAX banks x P single-port memories; each bank
//                        holds up to SLOTS circulants, Z/P words each
//   pxp_barrel_shifter   one per bank, rotating a memory word so that lane
//                        p carries the LLR needed by check node p (read)
//                        and back again (write)
//   staging registers    collect the dc rotated words of a sub-iteration
//                        (several cycles when two entries share a bank)
//   layered_cn x P       subtract old message, tree-way min-sum, add
//   decoder_controller   code tables, schedule, conflict ranking
//
// Defaults are the all-rate 802.11n build: P = 27, check node degree up to
// DC_MAX = 22 (the row weight of the rate-5/6 code, hence 22 banks), 24
// block columns, up to 12 layers, Z up to 81 (Z/P up to 3), 7-bit LLRs.
// SLOTS = 5 holds the longest bank of the irregular organisations used for
// the rate-1/2 codes, which use only 8 of the banks.
//
// Use: while idle, set zp = Z/P, n_layers, n_iter, load the column map and
// the layer table (see decoder_controller), and write the channel LLRs:
// host_we with host_col (block column) and host_word (0..Z/P-1) writes
// host_wdata[m] as the LLR of variable node host_word + m*Z/P of that
// block column. Pulse start; done pulses after n_iter iterations. Read the
// a-posteriori LLRs with host_re (data on host_rdata the next cycle); a
// bit is 1 where its LLR is negative. Host accesses while busy are
// ignored.
//
// Lint tools may report rst_n as used both asynchronously and
// synchronously: the flip-flops use it only as an asynchronous reset,
// the other use is the disable condition of the assertions below.
module ldpc_decoder
  import ldpc_pkg::*;
#(
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
  // code configuration
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
  // channel LLR access
  input  logic           host_we,
  input  logic           host_re,
  input  logic [CW-1:0]  host_col,
  input  logic [ZW-1:0]  host_word,
  input  llr_t           host_wdata [P],
  output llr_t           host_rdata [P],
  // run control and statistics
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [31:0]    stat_conflict,
  output logic [31:0]    stat_subiter
);

  // controller <-> datapath
  logic          c_en   [NBANK];
  logic          c_we   [NBANK];
  logic [AW-1:0] c_addr [NBANK];
  logic          sh_dir;
  logic [RW-1:0] sh_rot [NBANK];
  logic [PW-1:0] sh_pos [NBANK];
  logic          cap_en [NBANK];
  logic          cn_start, cn_first, cn_done;
  logic [DW-1:0] cn_dc;
  logic [KW-1:0] cn_addr;
  logic [BW-1:0] host_bank;
  logic [AW-1:0] host_addr;

  decoder_controller #(
    .P(P), .DC_MAX(DC_MAX), .NB_MAX(NB_MAX), .MB_MAX(MB_MAX),
    .SLOTS(SLOTS), .ZP_MAX(ZP_MAX)
  ) u_ctrl (
    .clk, .rst_n,
    .zp, .n_layers, .n_iter,
    .map_we, .map_col, .map_bank, .map_slot,
    .ent_we, .ent_layer, .ent_pos, .ent_valid, .ent_col, .ent_shift,
    .host_col, .host_word, .host_bank, .host_addr,
    .start, .busy, .done,
    .mem_en(c_en), .mem_we(c_we), .mem_addr(c_addr),
    .sh_dir, .sh_rot, .sh_pos, .cap_en,
    .cn_start, .cn_first, .cn_dc, .cn_addr, .cn_done,
    .stat_conflict, .stat_subiter
  );

  // channel memory with host access multiplexed in while idle
  logic          m_en    [NBANK];
  logic          m_we    [NBANK];
  logic [AW-1:0] m_addr  [NBANK];
  llr_t          m_wdata [NBANK][P];
  llr_t          m_rdata [NBANK][P];
  llr_t          sh_in   [NBANK][P];
  llr_t          sh_out  [NBANK][P];
  llr_t          staging [P][DC_MAX];
  llr_t          cn_out  [P][DC_MAX];
  logic [BW-1:0] host_bank_r;

  // shifter input: memory word on reads, check node results on writes
  always_comb begin
    for (int unsigned b = 0; b < NBANK; b++)
      for (int unsigned p = 0; p < P; p++)
        sh_in[b][p] = sh_dir ? cn_out[p][sh_pos[b]] : m_rdata[b][p];
  end

  always_comb begin
    for (int unsigned b = 0; b < NBANK; b++) begin
      m_en[b]    = c_en[b];
      m_we[b]    = c_we[b];
      m_addr[b]  = c_addr[b];
      m_wdata[b] = sh_out[b];
      if (!busy && (host_we || host_re) && host_bank == BW'(b)) begin
        m_en[b]   = 1'b1;
        m_we[b]   = host_we;
        m_addr[b] = host_addr;
        m_wdata[b] = host_wdata;
      end
    end
  end

  channel_memory #(.NBANK(NBANK), .P(P), .SLOTS(SLOTS), .ZP_MAX(ZP_MAX)) u_mem (
    .clk,
    .en   (m_en),
    .we   (m_we),
    .addr (m_addr),
    .wdata(m_wdata),
    .rdata(m_rdata)
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_shift
    pxp_barrel_shifter #(.P(P), .T(llr_t)) u_pxp (
      .din (sh_in[b]),
      .rot (sh_rot[b]),
      .dir (sh_dir),
      .dout(sh_out[b])
    );
  end

  // staging registers: check node inputs of the sub-iteration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < P; p++)
        for (int unsigned j = 0; j < DC_MAX; j++) staging[p][j] <= '0;
      host_bank_r <= '0;
    end else begin
      for (int unsigned b = 0; b < NBANK; b++)
        if (cap_en[b])
          for (int unsigned p = 0; p < P; p++) staging[p][sh_pos[b]] <= sh_out[b][p];
      if (host_re && !busy) host_bank_r <= host_bank;
    end
  end

  assign host_rdata = m_rdata[host_bank_r];

  logic cn_done_v [P];
  for (genvar p = 0; p < P; p++) begin : g_cn
    logic cn_busy;
    layered_cn #(.DC_MAX(DC_MAX), .K_WORDS(K_WORDS)) u_cn (
      .clk, .rst_n,
      .start   (cn_start),
      .first   (cn_first),
      .dc      (cn_dc),
      .msg_addr(cn_addr),
      .app_in  (staging[p]),
      .busy    (cn_busy),
      .done    (cn_done_v[p]),
      .app_out (cn_out[p])
    );
    // the controller starts a check node only when it is idle
    a_cn_idle: assert property (@(posedge clk) disable iff (!rst_n)
      cn_start |-> !cn_busy);
  end

  // All check nodes run in lock step; node 0 reports completion.
  assign cn_done = cn_done_v[0];

endmodule
