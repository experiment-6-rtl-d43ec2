// tb_out_bus: checks the read bus with seven 8-bit sources: with one enable
// high the bus carries that source, with none it reads 0.
module tb_out_bus;
  localparam int N = 7, W = 8;

  logic [N-1:0]        en;
  logic [N-1:0][W-1:0] d;
  logic [W-1:0]        q, e;
  int                  checks = 0, failures = 0;

  out_bus #(.N(N), .W(W)) dut (.en(en), .d(d), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      automatic int k = int'($urandom_range(N));   // N means no source enabled
      for (int j = 0; j < N; j++) d[j] = W'($urandom);
      en = (k == N) ? '0 : N'(1) << k;
      #1;
      e = (k == N) ? '0 : d[k];
      checks++;
      if (q !== e) begin
        failures++;
        $display("FAIL en=%b q=%h expected %h", en, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
