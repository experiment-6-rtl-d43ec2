// tb_io_port: random test of one 5-bit I/O port (the PORTA width) against a
// reference: TRIS resets to all ones, PORTx/TRISx writes load the latch and
// the direction register, pins with TRIS = 0 are driven from the latch, and a
// PORTx read returns the external level for input pins and the latch for
// output pins.
module tb_io_port;
  localparam int W = 5;

  logic         clock = 0, reset, we_port, we_tris;
  logic [W-1:0] din, pin_in, pin_out, pin_oe, port_q, tris_q;
  logic [W-1:0] m_latch, m_tris;
  int           checks = 0, failures = 0;

  io_port #(.WIDTH(W)) dut (.clock(clock), .reset(reset), .we_port(we_port),
    .we_tris(we_tris), .din(din), .pin_in(pin_in), .pin_out(pin_out),
    .pin_oe(pin_oe), .port_q(port_q), .tris_q(tris_q));

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we_port = 0; we_tris = 0; din = '0; pin_in = '0;
    @(negedge clock);
    m_latch = '0; m_tris = '1;
    for (int i = 0; i < 2000; i++) begin
      reset   = ($urandom_range(39) == 0);
      we_port = 1'($urandom_range(1));
      we_tris = ($urandom_range(3) == 0);
      din     = W'($urandom);
      pin_in  = W'($urandom);
      @(posedge clock);
      if (reset) begin m_latch = '0; m_tris = '1; end
      else begin
        if (we_port) m_latch = din;
        if (we_tris) m_tris  = din;
      end
      @(negedge clock);
      pin_in = W'($urandom);
      #1;
      checks++;
      if (tris_q !== m_tris || pin_oe !== ~m_tris || pin_out !== m_latch ||
          port_q !== ((m_tris & pin_in) | (~m_tris & m_latch))) begin
        failures++;
        $display("FAIL cycle %0d: tris=%b oe=%b out=%b port=%b (model tris=%b latch=%b pins=%b)",
                 i, tris_q, pin_oe, pin_out, port_q, m_tris, m_latch, pin_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
