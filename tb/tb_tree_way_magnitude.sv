// tb_tree_way_magnitude: self-checking test of the tree-way magnitude
// datapath.
//
// Two instances are tested: the default one (DC_MAX = 8) and one built for
// the largest degree of the architecture (DC_MAX = 32). For every degree
// the test applies random magnitudes (with many ties and large values) and
// compares each output with a direct "minimum of all other inputs"
// computed here. It also checks that the update takes exactly the cycle
// count of the reference table (Ncc stage cycles after the cycle that
// loads the input register bank) and that the ACS shifts used in the
// shuffled stages follow the table's permutation sequence.
module tb_tree_way_magnitude;
  localparam int unsigned W = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT with DC_MAX = 32 ----------------
  logic        start32;
  logic [5:0]  dc32;
  logic [W-1:0] in32 [32];
  logic [W-1:0] out32 [32];
  logic        busy32, done32;

  tree_way_magnitude #(.DC_MAX(32), .W(W)) dut32 (
    .clk, .rst_n, .start(start32), .dc(dc32), .mag_in(in32),
    .busy(busy32), .done(done32), .mag_out(out32));

  // ---------------- DUT with default parameters ----------------
  logic        start8;
  logic [3:0]  dc8;
  logic [W-1:0] in8 [8];
  logic [W-1:0] out8 [8];
  logic        busy8, done8;

  tree_way_magnitude dut8 (
    .clk, .rst_n, .start(start8), .dc(dc8), .mag_in(in8),
    .busy(busy8), .done(done8), .mag_out(out8));

  // Expected Ncc and shuffle shifts per even degree (reference table).
  function automatic int exp_ncc(input int d);
    case (d + (d % 2))
      4: return 3;   6: return 4;   8: return 5;   10: return 5;
      12: return 6;  14: return 6;  16: return 7;  18: return 6;
      20: return 7;  22: return 7;  24: return 8;  26: return 7;
      28: return 8;  30: return 8;  32: return 9;
      default: return -1;
    endcase
  endfunction

  function automatic string exp_perm(input int d);
    case (d + (d % 2))
      4: return "";
      6: return "1";
      8, 10: return "1,2";
      12, 14, 18: return "1,2,4";
      16: return "1,2,4,6";
      20, 22, 26: return "1,2,4,8";
      24: return "1,2,4,8,10";
      28, 30: return "1,2,4,8,12";
      32: return "1,2,4,8,12,14";
      default: return "?";
    endcase
  endfunction

  function automatic logic [W-1:0] rnd_mag();
    int r;
    r = $urandom_range(0, 9);
    if (r < 2) return '1;                       // saturated value
    if (r < 5) return W'($urandom_range(0, 3)); // small values -> ties
    return W'($urandom);
  endfunction

  string perm_seen;

  // Record ACS shifts of the 32-input instance during MSC stages.
  always @(posedge clk)
    if (dut32.state == dut32.S_DBL || dut32.state == dut32.S_REM)
      perm_seen = (perm_seen == "") ? $sformatf("%0d", dut32.acs_shift)
                                    : $sformatf("%s,%0d", perm_seen, dut32.acs_shift);

  task automatic run32(input int d);
    logic [W-1:0] v [32];
    int cyc;
    for (int j = 0; j < 32; j++) v[j] = rnd_mag();
    @(negedge clk);
    perm_seen = "";
    in32 = v; dc32 = 6'(d); start32 = 1'b1;
    @(negedge clk);
    start32 = 1'b0;
    cyc = 1;
    while (!done32) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_ncc(d) + 1) begin
      failures++;
      $display("FAIL dc=%0d: %0d cycles, expected %0d", d, cyc, exp_ncc(d) + 1);
    end
    checks++;
    if (perm_seen != exp_perm(d)) begin
      failures++;
      $display("FAIL dc=%0d: shifts %s, expected %s", d, perm_seen, exp_perm(d));
    end
    for (int j = 0; j < d; j++) begin
      logic [W-1:0] m;
      m = '1;
      for (int i = 0; i < d; i++) if (i != j && v[i] < m) m = v[i];
      checks++;
      if (out32[j] != m) begin
        failures++;
        $display("FAIL dc=%0d out[%0d]=%0d expected %0d", d, j, out32[j], m);
      end
    end
  endtask

  task automatic run8(input int d);
    logic [W-1:0] v [8];
    int cyc;
    for (int j = 0; j < 8; j++) v[j] = rnd_mag();
    @(negedge clk);
    in8 = v; dc8 = 4'(d); start8 = 1'b1;
    @(negedge clk);
    start8 = 1'b0;
    cyc = 1;
    while (!done8) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_ncc(d) + 1) begin
      failures++;
      $display("FAIL dc8=%0d: %0d cycles, expected %0d", d, cyc, exp_ncc(d) + 1);
    end
    for (int j = 0; j < d; j++) begin
      logic [W-1:0] m;
      m = '1;
      for (int i = 0; i < d; i++) if (i != j && v[i] < m) m = v[i];
      checks++;
      if (out8[j] != m) begin
        failures++;
        $display("FAIL dc8=%0d out[%0d]=%0d expected %0d", d, j, out8[j], m);
      end
    end
  endtask

  initial begin
    start32 = 0; start8 = 0; dc32 = 6'd8; dc8 = 4'd8;
    for (int j = 0; j < 32; j++) in32[j] = '0;
    for (int j = 0; j < 8; j++) in8[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int d = 3; d <= 32; d++) run32(d);
      for (int d = 3; d <= 8; d++) run8(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
