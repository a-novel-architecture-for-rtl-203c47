// tb_tree_way_pe: random test of the signed tree-way check node PE.
// For every degree 3..8 and random two's complement inputs (zeros, ties
// and saturated values included) each output must equal the min-sum rule:
// sign = XOR of the other inputs' signs (zero is positive), magnitude =
// smallest other |input|. The result must appear Ncc(dc) + 1 cycles after
// start (Ncc = 3, 3, 4, 4, 5, 5 for dc = 3..8, as in the reference table).
module tb_tree_way_pe;
  localparam int DC = 8;
  typedef logic signed [6:0] llr_t;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [3:0] dc;
  llr_t alpha [DC], beta [DC];
  int checks = 0, failures = 0;

  tree_way_pe dut (.clk, .rst_n, .start, .dc, .alpha, .busy, .done, .beta);

  function automatic int ncc(input int d);
    case (d + d % 2) 4: return 3; 6: return 4; default: return 5; endcase
  endfunction

  initial begin
    start = 0; dc = 8;
    for (int j = 0; j < DC; j++) alpha[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 400; rep++)
      for (int d = 3; d <= DC; d++) begin
        int v [DC];
        int cyc;
        for (int j = 0; j < DC; j++) begin
          int r;
          r = $urandom_range(0, 9);
          v[j] = (r == 0) ? 0 : (r == 1) ? 63 : (r == 2) ? -63 : int'($urandom_range(0, 20)) - 10;
          alpha[j] = llr_t'(v[j]);
        end
        dc = 4'(d); start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != ncc(d) + 1) begin failures++; $display("FAIL dc=%0d latency %0d", d, cyc); end
        for (int j = 0; j < d; j++) begin
          int m, s, e;
          m = 63; s = 0;
          for (int i = 0; i < d; i++) if (i != j) begin
            if ((v[i] < 0 ? -v[i] : v[i]) < m) m = (v[i] < 0 ? -v[i] : v[i]);
            if (v[i] < 0) s ^= 1;
          end
          e = s ? -m : m;
          checks++;
          if (int'(beta[j]) != e) begin
            failures++;
            $display("FAIL dc=%0d j=%0d got %0d exp %0d", d, j, beta[j], e);
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
