// tb_decoder_controller: checks the schedule produced by the controller.
//
// A small code (4 layers, zp = Z/P = 3, degrees 3..8, random columns and
// shifts, an irregular bank map) is loaded, and the check nodes are
// replaced by a counter that answers cn_start with cn_done a few cycles
// later. For every sub-iteration (iteration, layer, row set t) the test
// recomputes from the code alone which bank word every entry needs
// (slot*zp + (s + t) mod zp), the rotation ((s + t) div zp) mod P and the
// cycle it must use (its rank among the layer's entries in the same bank),
// and compares them with the reads, captures and write-backs the
// controller issues. It also checks cn_dc, cn_addr, cn_first, the host
// address translation and the statistics counters.
module tb_decoder_controller;
  localparam int P = 27, DC = 8, NB = 24, MB = 12, ZP = 3, NL = 4, NIT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] zp; logic [4:0] n_layers; logic [7:0] n_iter;
  logic map_we, ent_we, ent_valid, start, busy, done;
  logic [4:0] map_col, ent_col, host_col;
  logic [2:0] map_bank, map_slot, ent_pos;
  logic [3:0] ent_layer;
  logic [6:0] ent_shift;
  logic [1:0] host_word;
  logic [2:0] host_bank;
  logic [3:0] host_addr;
  logic mem_en [DC], mem_we [DC], cap_en [DC];
  logic [3:0] mem_addr [DC];
  logic sh_dir;
  logic [4:0] sh_rot [DC];
  logic [2:0] sh_pos [DC];
  logic cn_start, cn_first, cn_done;
  logic [3:0] cn_dc;
  logic [5:0] cn_addr;
  logic [31:0] stat_conflict, stat_subiter;

  decoder_controller #(.DC_MAX(DC)) dut (
    .clk, .rst_n, .zp, .n_layers, .n_iter,
    .map_we, .map_col, .map_bank, .map_slot,
    .ent_we, .ent_layer, .ent_pos, .ent_valid, .ent_col, .ent_shift,
    .host_col, .host_word, .host_bank, .host_addr,
    .start, .busy, .done,
    .mem_en, .mem_we, .mem_addr, .sh_dir, .sh_rot, .sh_pos, .cap_en,
    .cn_start, .cn_first, .cn_dc, .cn_addr, .cn_done,
    .stat_conflict, .stat_subiter);

  int checks = 0, failures = 0;
  int bank_of [NB], slot_of [NB];
  int deg [NL], col [NL][DC], sh [NL][DC], rank_of [NL][DC];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // stand-in check nodes
  int cn_cnt = 0;
  always @(posedge clk) begin
    cn_done <= 1'b0;
    if (cn_start) cn_cnt <= 6;
    else if (cn_cnt > 0) begin
      cn_cnt <= cn_cnt - 1;
      if (cn_cnt == 1) cn_done <= 1'b1;
    end
  end

  // schedule monitor
  int sub = 0;          // sub-iteration index
  int cyc = 0;
  int rd_first, wr_first, cap_first;
  int n_rd, n_wr, n_cap, penalty = 0;
  bit in_wr = 0;

  function automatic int exp_addr(int l, int j, int t);
    return slot_of[col[l][j]] * ZP + (sh[l][j] + t) % ZP;
  endfunction
  function automatic int exp_rot(int l, int j, int t);
    return ((sh[l][j] + t) / ZP) % P;
  endfunction

  always @(negedge clk) if (rst_n) begin
    int l, t, it;
    cyc++;
    it = sub / (NL * ZP); l = (sub / ZP) % NL; t = sub % ZP;
    for (int b = 0; b < DC; b++) begin
      if (mem_en[b] && !mem_we[b]) begin
        bit hit;
        hit = 0;
        if (in_wr) begin
          // a new sub-iteration starts: close the previous one
          chk(n_wr == deg[(sub / ZP) % NL], $sformatf("writes %0d in sub %0d", n_wr, sub));
          sub++; in_wr = 0;
          it = sub / (NL * ZP); l = (sub / ZP) % NL; t = sub % ZP;
        end
        if (n_rd == 0) rd_first = cyc;
        for (int j = 0; j < deg[l]; j++)
          if (bank_of[col[l][j]] == b && rank_of[l][j] == cyc - rd_first &&
              int'(mem_addr[b]) == exp_addr(l, j, t)) hit = 1;
        chk(hit, $sformatf("read bank %0d addr %0d sub %0d", b, mem_addr[b], sub));
        n_rd++;
      end
      if (cap_en[b]) begin
        bit hit;
        hit = 0;
        if (n_cap == 0) cap_first = cyc;
        for (int j = 0; j < deg[l]; j++)
          if (bank_of[col[l][j]] == b && int'(sh_pos[b]) == j && rank_of[l][j] == cyc - cap_first &&
              int'(sh_rot[b]) == exp_rot(l, j, t)) hit = 1;
        chk(hit && !sh_dir, $sformatf("capture bank %0d pos %0d rot %0d sub %0d", b, sh_pos[b], sh_rot[b], sub));
        n_cap++;
      end
      if (mem_en[b] && mem_we[b]) begin
        bit hit;
        hit = 0;
        if (n_wr == 0) wr_first = cyc;
        in_wr = 1;
        for (int j = 0; j < deg[l]; j++)
          if (bank_of[col[l][j]] == b && rank_of[l][j] == cyc - wr_first && int'(sh_pos[b]) == j &&
              int'(mem_addr[b]) == exp_addr(l, j, t) && int'(sh_rot[b]) == exp_rot(l, j, t)) hit = 1;
        chk(hit && sh_dir, $sformatf("write bank %0d addr %0d sub %0d", b, mem_addr[b], sub));
        n_wr++;
      end
    end
    if (cn_start) begin
      chk(n_rd == deg[l] && n_cap == deg[l], $sformatf("reads %0d captures %0d sub %0d", n_rd, n_cap, sub));
      chk(int'(cn_dc) == deg[l], "cn_dc");
      chk(int'(cn_addr) == l * ZP + t, "cn_addr");
      chk(cn_first == (it == 0), "cn_first");
      n_rd = 0; n_cap = 0; n_wr = 0;
    end
  end

  initial begin
    int lists [8][5];
    int lens [8];
    zp = 2'(ZP); n_layers = 5'(NL); n_iter = 8'(NIT);
    map_we = 0; ent_we = 0; start = 0; ent_valid = 0;
    map_col = 0; map_bank = 0; map_slot = 0; ent_layer = 0; ent_pos = 0; ent_col = 0; ent_shift = 0;
    host_col = 0; host_word = 0;
    n_rd = 0; n_wr = 0; n_cap = 0;
    lists = '{'{12,15,19,21,24}, '{2,3,10,23,0}, '{4,8,18,20,0}, '{6,7,11,13,0},
              '{14,16,17,22,0}, '{1,0,0,0,0}, '{5,0,0,0,0}, '{9,0,0,0,0}};
    lens = '{5,4,4,4,4,1,1,1};
    for (int b = 0; b < 8; b++)
      for (int s = 0; s < lens[b]; s++) begin
        bank_of[lists[b][s] - 1] = b; slot_of[lists[b][s] - 1] = s;
      end
    for (int l = 0; l < NL; l++) begin
      int used [NB];
      for (int c = 0; c < NB; c++) used[c] = 0;
      deg[l] = (l == 0) ? 8 : (l == 1) ? 3 : $urandom_range(3, 8);
      for (int j = 0; j < deg[l]; j++) begin
        int c;
        do c = $urandom_range(0, NB - 1); while (used[c]);
        used[c] = 1; col[l][j] = c; sh[l][j] = $urandom_range(0, P * ZP - 1);
        rank_of[l][j] = 0;
        for (int i = 0; i < j; i++) if (bank_of[col[l][i]] == bank_of[c]) rank_of[l][j]++;
      end
      begin
        int mx;
        mx = 0;
        for (int j = 0; j < deg[l]; j++) if (rank_of[l][j] > mx) mx = rank_of[l][j];
        penalty += mx * ZP * NIT;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NB; c++) begin
      map_we = 1; map_col = 5'(c); map_bank = 3'(bank_of[c]); map_slot = 3'(slot_of[c]);
      @(negedge clk);
    end
    map_we = 0;
    for (int l = 0; l < NL; l++)
      for (int j = 0; j < DC; j++) begin
        ent_we = 1; ent_layer = 4'(l); ent_pos = 3'(j); ent_valid = (j < deg[l]);
        ent_col = 5'(col[l][j]); ent_shift = 7'(sh[l][j]);
        @(negedge clk);
      end
    ent_we = 0;
    // host address translation
    for (int c = 0; c < NB; c++)
      for (int w = 0; w < ZP; w++) begin
        host_col = 5'(c); host_word = 2'(w);
        #1;
        chk(int'(host_bank) == bank_of[c] && int'(host_addr) == slot_of[c] * ZP + w, "host address");
      end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(n_wr == deg[NL - 1], "last writes");
    chk(sub + 1 == NIT * NL * ZP, $sformatf("sub-iterations seen %0d", sub + 1));
    chk(stat_subiter == 32'(NIT * NL * ZP), "stat_subiter");
    chk(stat_conflict == 32'(penalty), $sformatf("stat_conflict %0d expected %0d", stat_conflict, penalty));
    chk(penalty > 0, "code has bank conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
