// tb_acs_network: exhaustive test of the circular permutation network.
// For every active width n_act and every shift s < n_act it checks
// out[k] = in[(k + s) mod n_act] for k < n_act and out[k] = in[k] above.
module tb_acs_network;
  localparam int N = 16, W = 6;
  logic [W-1:0] in_vec [N];
  logic [W-1:0] out_vec [N];
  logic [3:0]   shift;
  logic [4:0]   n_act;
  int checks = 0, failures = 0;

  acs_network #(.N_MAX(N), .W(W)) dut (.in_vec, .shift, .n_act, .out_vec);

  initial begin
    for (int n = 1; n <= N; n++)
      for (int s = 0; s < n; s++) begin
        for (int k = 0; k < N; k++) in_vec[k] = W'($urandom);
        shift = 4'(s); n_act = 5'(n);
        #1;
        for (int k = 0; k < N; k++) begin
          logic [W-1:0] e;
          e = (k < n) ? in_vec[(k + s) % n] : in_vec[k];
          checks++;
          if (out_vec[k] !== e) begin
            failures++;
            $display("FAIL n=%0d s=%0d k=%0d got %0d exp %0d", n, s, k, out_vec[k], e);
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
