// tb_layered_cn: test of the layered check node with its message memory.
// A model kept here stores, per message address, the messages sent last
// time; each operation (random address, degree and inputs; `first` on the
// first visit of an address) must return sat(t + minsum(t)) with
// t = sat(APP - old message), positions >= dc unchanged, after
// Ncc(dc) + 3 cycles.
module tb_layered_cn;
  localparam int DC = 8, K = 6;
  typedef logic signed [6:0] llr_t;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, first, busy, done;
  logic [3:0] dc;
  logic [2:0] msg_addr;
  llr_t app_in [DC], app_out [DC];
  int checks = 0, failures = 0;
  int store [K][DC];
  bit visited [K];

  layered_cn #(.DC_MAX(DC), .K_WORDS(K)) dut (
    .clk, .rst_n, .start, .first, .dc, .msg_addr, .app_in, .busy, .done, .app_out);

  function automatic int sat(input int v);
    return (v > 63) ? 63 : (v < -63) ? -63 : v;
  endfunction

  function automatic int ncc(input int d);
    case (d + d % 2) 4: return 3; 6: return 4; default: return 5; endcase
  endfunction

  int dc_of [K];

  initial begin
    start = 0; first = 0; dc = 8; msg_addr = 0;
    for (int j = 0; j < DC; j++) app_in[j] = '0;
    for (int a = 0; a < K; a++) begin visited[a] = 0; dc_of[a] = $urandom_range(3, DC); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 600; rep++) begin
      int a, d, cyc;
      int in_v [DC], t [DC], e [DC];
      a = $urandom_range(0, K - 1);
      d = dc_of[a];                           // a row keeps its degree
      for (int j = 0; j < DC; j++) in_v[j] = int'($urandom_range(0, 126)) - 63;
      for (int j = 0; j < d; j++) t[j] = sat(in_v[j] - (visited[a] ? store[a][j] : 0));
      for (int j = 0; j < DC; j++) e[j] = in_v[j];
      for (int j = 0; j < d; j++) begin
        int m, s, b;
        m = 63; s = 0;
        for (int i = 0; i < d; i++) if (i != j) begin
          if ((t[i] < 0 ? -t[i] : t[i]) < m) m = (t[i] < 0 ? -t[i] : t[i]);
          if (t[i] < 0) s ^= 1;
        end
        b = s ? -m : m;
        store[a][j] = b;
        e[j] = sat(t[j] + b);
      end
      for (int j = 0; j < DC; j++) app_in[j] = llr_t'(in_v[j]);
      dc = 4'(d); msg_addr = 3'(a); first = !visited[a]; start = 1;
      visited[a] = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ncc(d) + 3) begin failures++; $display("FAIL latency %0d dc=%0d", cyc, d); end
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (int'(app_out[j]) != e[j]) begin
          failures++;
          $display("FAIL rep=%0d a=%0d j=%0d got %0d exp %0d", rep, a, j, app_out[j], e[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
