// tb_ldpc_decoder: end-to-end test of the decoder at its default build
// (P = 27, DC_MAX = 22, 24 block columns, 12 layers, Z/P up to 3). It
// prints the cycle count of each decoded codeword.
//
// The test generates random quasi-cyclic codes (random block columns and
// circulant shifts per layer), loads them with three bank organisations (an
// irregular 802.11n-style one with Z = 81, an irregular 802.16e-style one
// with Z = 27 and Z = 54, and one using all 22 banks for a 4-layer code of
// degree 19..22, like the rate-5/6 codes), writes noisy all-zero-codeword
// LLRs and decodes. An independent layered min-sum model written here (row
// by row, no knowledge of banks or rotations) gives the expected
// a-posteriori LLRs, which are compared bit-exactly with what the decoder
// returns. It also checks the number of sub-iterations, the counted memory
// conflict penalty against the penalty worked out from the code, and that
// each mechanism occurred: bank conflicts, odd and even degrees, several
// sub-iterations per layer, degrees above 8, rotation wrap-around, a second
// iteration that subtracts stored messages, and a switch to another code.
module tb_ldpc_decoder;
  localparam int P = 27, DC_MAX = 22, NB = 24, MB_MAX = 12;
  localparam int QMAX = 63;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // DUT signals
  logic [1:0]  zp;
  logic [4:0]  n_layers;
  logic [7:0]  n_iter;
  logic        map_we, ent_we, ent_valid, host_we, host_re, start;
  logic [4:0]  map_col, ent_col, host_col;
  logic [4:0]  map_bank, ent_pos;
  logic [2:0]  map_slot;
  logic [3:0]  ent_layer;
  logic [6:0]  ent_shift;
  logic [1:0]  host_word;
  logic signed [6:0] host_wdata [P];
  logic signed [6:0] host_rdata [P];
  logic        busy, done;
  logic [31:0] stat_conflict, stat_subiter;

  ldpc_decoder dut (
    .clk, .rst_n, .zp, .n_layers, .n_iter,
    .map_we, .map_col, .map_bank, .map_slot,
    .ent_we, .ent_layer, .ent_pos, .ent_valid, .ent_col, .ent_shift,
    .host_we, .host_re, .host_col, .host_word, .host_wdata, .host_rdata,
    .start, .busy, .done, .stat_conflict, .stat_subiter);

  // Code under test
  int z, zpv, nl, nit;
  int bank_of [NB], slot_of [NB];
  int ldeg [MB_MAX];
  int lcol [MB_MAX][DC_MAX];
  int lsh  [MB_MAX][DC_MAX];

  // Reference model state
  int app [NB][81];
  int msg [MB_MAX][81][DC_MAX];
  int ch  [NB][81];

  // mechanism counters
  int n_conflict_runs = 0, n_odd = 0, n_even = 0, n_multi_t = 0;
  int n_wrap = 0, n_multi_iter = 0, n_switch = 0, n_high = 0;

  function automatic int sat(input int v);
    if (v > QMAX) return QMAX;
    if (v < -QMAX) return -QMAX;
    return v;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Layered min-sum reference, row by row.
  task automatic ref_decode();
    for (int c = 0; c < NB; c++)
      for (int v = 0; v < z; v++) app[c][v] = ch[c][v];
    for (int it = 0; it < nit; it++)
      for (int l = 0; l < nl; l++)
        for (int r = 0; r < z; r++) begin
          int tv [DC_MAX];
          int vn [DC_MAX];
          int d;
          d = ldeg[l];
          for (int j = 0; j < d; j++) begin
            vn[j] = (r + lsh[l][j]) % z;
            tv[j] = sat(app[lcol[l][j]][vn[j]] - ((it == 0) ? 0 : msg[l][r][j]));
          end
          for (int j = 0; j < d; j++) begin
            int m, s, b;
            m = QMAX; s = 0;
            for (int i = 0; i < d; i++)
              if (i != j) begin
                if (iabs(tv[i]) < m) m = iabs(tv[i]);
                if (tv[i] < 0) s ^= 1;
              end
            b = s ? -m : m;
            msg[l][r][j] = b;
            app[lcol[l][j]][vn[j]] = sat(tv[j] + b);
          end
        end
  endtask

  // Random code with the given column map.
  task automatic make_code(input int nlayers, input int zz, input int dmin, input int dmax);
    z = zz; zpv = zz / P; nl = nlayers;
    for (int l = 0; l < nl; l++) begin
      int used [NB];
      for (int c = 0; c < NB; c++) used[c] = 0;
      ldeg[l] = $urandom_range(dmin, dmax);
      for (int j = 0; j < ldeg[l]; j++) begin
        int c;
        do c = $urandom_range(0, NB - 1); while (used[c]);
        used[c] = 1;
        lcol[l][j] = c;
        lsh[l][j]  = $urandom_range(0, z - 1);
        if (zpv > 1 && (lsh[l][j] % zpv) != 0) n_wrap++;
      end
      if (ldeg[l] % 2) n_odd++; else n_even++;
      if (ldeg[l] > 8) n_high++;
    end
  endtask

  // Expected conflict penalty per sub-iteration of layer l.
  function automatic int layer_penalty(input int l);
    int cnt [DC_MAX];
    int mx;
    for (int b = 0; b < DC_MAX; b++) cnt[b] = 0;
    for (int j = 0; j < ldeg[l]; j++) cnt[bank_of[lcol[l][j]]]++;
    mx = 1;
    for (int b = 0; b < DC_MAX; b++) if (cnt[b] > mx) mx = cnt[b];
    return mx - 1;
  endfunction

  task automatic load_and_run();
    int pen, cyc;
    // configuration
    @(negedge clk);
    zp = 2'(zpv); n_layers = 5'(nl); n_iter = 8'(nit);
    for (int c = 0; c < NB; c++) begin
      map_we = 1; map_col = 5'(c); map_bank = 5'(bank_of[c]); map_slot = 3'(slot_of[c]);
      @(negedge clk);
    end
    map_we = 0;
    for (int l = 0; l < MB_MAX; l++)
      for (int j = 0; j < DC_MAX; j++) begin
        ent_we = 1; ent_layer = 4'(l); ent_pos = 5'(j);
        ent_valid = (l < nl) && (j < ldeg[l]);
        ent_col   = ent_valid ? 5'(lcol[l][j]) : 5'd0;
        ent_shift = ent_valid ? 7'(lsh[l][j]) : 7'd0;
        @(negedge clk);
      end
    ent_we = 0;
    // channel LLRs: all-zero codeword (+), noise
    for (int c = 0; c < NB; c++)
      for (int v = 0; v < z; v++) ch[c][v] = sat(8 + int'($urandom_range(0, 40)) - 20);
    for (int c = 0; c < NB; c++)
      for (int w = 0; w < zpv; w++) begin
        host_we = 1; host_col = 5'(c); host_word = 2'(w);
        for (int m = 0; m < P; m++) host_wdata[m] = 7'(ch[c][w + m * zpv]);
        @(negedge clk);
      end
    host_we = 0;
    // decode
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("decoded Z=%0d layers=%0d iterations=%0d: %0d cycles, %0d conflict cycles",
             z, nl, nit, cyc, stat_conflict);
    ref_decode();
    // sub-iterations and conflict penalty
    pen = 0;
    for (int l = 0; l < nl; l++) pen += layer_penalty(l) * zpv * nit;
    checks++;
    if (stat_subiter != 32'(nit * nl * zpv)) begin
      failures++;
      $display("FAIL sub-iterations %0d expected %0d", stat_subiter, nit * nl * zpv);
    end
    checks++;
    if (stat_conflict != 32'(pen)) begin
      failures++;
      $display("FAIL conflict penalty %0d expected %0d", stat_conflict, pen);
    end
    if (pen > 0) n_conflict_runs++;
    if (zpv > 1) n_multi_t++;
    if (nit > 1) n_multi_iter++;
    // read back and compare
    for (int c = 0; c < NB; c++)
      for (int w = 0; w < zpv; w++) begin
        host_re = 1; host_col = 5'(c); host_word = 2'(w);
        @(negedge clk);
        host_re = 0;
        for (int m = 0; m < P; m++) begin
          checks++;
          if (int'(host_rdata[m]) != app[c][w + m * zpv]) begin
            failures++;
            if (failures < 20)
              $display("FAIL col %0d vn %0d: got %0d expected %0d", c, w + m * zpv,
                       host_rdata[m], app[c][w + m * zpv]);
          end
        end
      end
  endtask

  // Bank organisations (block column numbers counted from 1, lowest slot
  // first): an 802.11n rate-1/2 style irregular one and an 802.16e rate-1/2
  // style irregular one.
  task automatic set_map(input int which);
    int lists [2][8][5];
    int lens  [2][8];
    if (which == 2) begin
      // block column c in bank c mod 22, slot c div 22
      for (int c = 0; c < NB; c++) begin
        bank_of[c] = c % 22;
        slot_of[c] = c / 22;
      end
      return;
    end
    lists = '{'{'{12,15,19,21,24}, '{2,3,10,23,0}, '{4,8,18,20,0}, '{6,7,11,13,0},
                '{14,16,17,22,0}, '{1,0,0,0,0}, '{5,0,0,0,0}, '{9,0,0,0,0}},
              '{'{18,4,2,1,0}, '{13,21,16,11,0}, '{23,19,17,14,0}, '{9,7,5,0,0},
                '{15,24,22,0,0}, '{3,6,0,0,0}, '{20,8,0,0,0}, '{12,10,0,0,0}}};
    lens  = '{'{5,4,4,4,4,1,1,1}, '{4,4,4,3,3,2,2,2}};
    for (int b = 0; b < 8; b++)
      for (int s = 0; s < lens[which][b]; s++) begin
        bank_of[lists[which][b][s] - 1] = b;
        slot_of[lists[which][b][s] - 1] = s;
      end
  endtask

  initial begin
    zp = 1; n_layers = 1; n_iter = 1;
    map_we = 0; ent_we = 0; host_we = 0; host_re = 0; start = 0;
    map_col = 0; map_bank = 0; map_slot = 0; ent_layer = 0; ent_pos = 0;
    ent_valid = 0; ent_col = 0; ent_shift = 0; host_col = 0; host_word = 0;
    for (int m = 0; m < P; m++) host_wdata[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Code 1: Z = 81, 12 layers, degrees 7..8, 20 iterations
    set_map(0);
    make_code(12, 81, 7, 8);
    nit = 20;
    load_and_run();
    // Code 2: Z = 27, 12 layers, degrees 5..7, 4 iterations
    set_map(1);
    make_code(12, 27, 5, 7);
    nit = 4;
    n_switch++;
    load_and_run();
    // Code 3: Z = 54, 8 layers, degrees 3..8, 3 iterations
    make_code(8, 54, 3, 8);
    nit = 3;
    n_switch++;
    load_and_run();
    // Code 4: Z = 81, 4 layers, degrees 19..22 over 22 banks, 3 iterations
    set_map(2);
    make_code(4, 81, 19, 22);
    nit = 3;
    n_switch++;
    load_and_run();

    $display("mechanisms: conflicts=%0d odd=%0d even=%0d high=%0d multi_t=%0d wrap=%0d multi_iter=%0d switch=%0d",
             n_conflict_runs, n_odd, n_even, n_high, n_multi_t, n_wrap, n_multi_iter, n_switch);
    checks++; if (n_conflict_runs == 0) failures++;
    checks++; if (n_odd == 0) failures++;
    checks++; if (n_even == 0) failures++;
    checks++; if (n_high == 0) failures++;
    checks++; if (n_multi_t == 0) failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_multi_iter == 0) failures++;
    checks++; if (n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
