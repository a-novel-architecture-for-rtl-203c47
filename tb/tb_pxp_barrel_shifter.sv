// tb_pxp_barrel_shifter: checks the PxP word rotation in both directions
// for every rotation amount, and that the write direction undoes the read
// direction. It also replays the 32 x 32 example with circulant shift 17
// (diagonal starting at column 18), P = 4, Z/P = 8: lane m of word a holds
// variable node a + 8m, and row set t must deliver variable nodes
// (t + 8p + 17) mod 32 to check nodes p = 0..3.
module tb_pxp_barrel_shifter;
  localparam int P = 27;
  typedef logic signed [6:0] lane_t;
  lane_t din [P], dout [P], back [P];
  logic [4:0] rot;
  int checks = 0, failures = 0;

  pxp_barrel_shifter #(.P(P), .T(lane_t)) dut  (.din, .rot, .dir(1'b0), .dout);
  pxp_barrel_shifter #(.P(P), .T(lane_t)) dutw (.din(dout), .rot, .dir(1'b1), .dout(back));

  // small instance for the 32 x 32 example
  typedef logic [6:0] vn_t;
  vn_t w4 [4], o4 [4];
  logic [1:0] rot4;
  pxp_barrel_shifter #(.P(4), .T(vn_t)) dut4 (.din(w4), .rot(rot4), .dir(1'b0), .dout(o4));

  initial begin
    for (int r = 0; r < P; r++) begin
      for (int m = 0; m < P; m++) din[m] = lane_t'($urandom);
      rot = 5'(r);
      #1;
      for (int p = 0; p < P; p++) begin
        checks += 2;
        if (dout[p] !== din[(p + r) % P]) begin failures++; $display("FAIL read r=%0d p=%0d", r, p); end
        if (back[p] !== din[p]) begin failures++; $display("FAIL write r=%0d p=%0d", r, p); end
      end
    end
    for (int t = 0; t < 8; t++) begin
      int a, q;
      a = (t + 17) % 8;
      q = (t + 17) / 8 % 4;
      for (int m = 0; m < 4; m++) w4[m] = vn_t'(a + 8 * m);
      rot4 = 2'(q);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(o4[p]) != (t + 8 * p + 17) % 32) begin
          failures++;
          $display("FAIL example t=%0d p=%0d got vn %0d", t, p, o4[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
