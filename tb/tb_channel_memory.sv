// tb_channel_memory: random test of the banked channel memory. Each cycle
// every bank independently writes, reads or idles at a random address; a
// model array kept here predicts each read word (available one cycle
// after the read, held until the bank's next read).
module tb_channel_memory;
  localparam int NB = 8, P = 27, SLOTS = 5, ZPM = 3, D = SLOTS * ZPM;
  typedef logic signed [6:0] llr_t;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en [NB], we [NB];
  logic [3:0] addr [NB];
  llr_t wdata [NB][P], rdata [NB][P];
  int model [NB][P][D];
  int expect_rd [NB][P];
  bit pending [NB];
  int checks = 0, failures = 0;

  channel_memory dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    for (int b = 0; b < NB; b++) begin en[b] = 0; we[b] = 0; addr[b] = 0; pending[b] = 0; end
    // fill every word first
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        en[b] = 1; we[b] = 1; addr[b] = 4'(a);
        for (int m = 0; m < P; m++) begin
          model[b][m][a] = int'($urandom_range(0, 126)) - 63;
          wdata[b][m] = llr_t'(model[b][m][a]);
        end
      end
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check reads issued in the previous cycle
      for (int b = 0; b < NB; b++)
        if (pending[b])
          for (int m = 0; m < P; m++) begin
            checks++;
            if (int'(rdata[b][m]) != expect_rd[b][m]) begin
              failures++;
              if (failures < 10) $display("FAIL bank %0d lane %0d", b, m);
            end
          end
      for (int b = 0; b < NB; b++) begin
        int op, a;
        op = $urandom_range(0, 2);
        a  = $urandom_range(0, D - 1);
        en[b] = (op != 0); we[b] = (op == 1); addr[b] = 4'(a);
        pending[b] = (op == 2);
        for (int m = 0; m < P; m++) begin
          if (op == 1) begin
            model[b][m][a] = int'($urandom_range(0, 126)) - 63;
            wdata[b][m] = llr_t'(model[b][m][a]);
          end
          if (op == 2) expect_rd[b][m] = model[b][m][a];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
