// tb_sign_product: random test of the flexible sign product tree.
// For random sign vectors and every degree it compares each output with
// the XOR of the other active signs, computed input by input.
module tb_sign_product;
  localparam int DC = 32;
  logic [DC-1:0] s, p;
  logic [5:0]    dc;
  int checks = 0, failures = 0;

  sign_product #(.DC_MAX(DC)) dut (.s, .dc, .p);

  initial begin
    for (int rep = 0; rep < 200; rep++)
      for (int d = 2; d <= DC; d++) begin
        s = DC'($urandom);
        dc = 6'(d);
        #1;
        for (int j = 0; j < d; j++) begin
          logic e;
          e = 1'b0;
          for (int i = 0; i < d; i++) if (i != j) e ^= s[i];
          checks++;
          if (p[j] !== e) begin
            failures++;
            $display("FAIL dc=%0d j=%0d", d, j);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
