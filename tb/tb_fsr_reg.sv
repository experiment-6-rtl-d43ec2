// tb_fsr_reg: checks reset, write and hold of the File Select Register
// against a reference value over random traffic.
module tb_fsr_reg;
  import dm_pkg::*;

  logic  clock = 0, reset, we;
  data_t din, q, model;
  int    checks = 0, failures = 0;

  fsr_reg dut (.clock(clock), .reset(reset), .we(we), .din(din), .q(q));

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we = 0; din = 8'hFF;
    @(negedge clock);
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      reset = ($urandom_range(19) == 0);
      we    = 1'($urandom_range(1));
      din   = data_t'($urandom);
      @(posedge clock);
      if (reset)   model = '0;
      else if (we) model = din;
      @(negedge clock);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
