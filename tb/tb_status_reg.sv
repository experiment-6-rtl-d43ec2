// tb_status_reg: random test of the STATUS register against a bit-level
// reference: reset clears it, a data write loads RP0/Z/DC/C from bits 5/2/1/0,
// a flag enable overrides the data write for its own flag, and the
// unimplemented bits read 0. Also counts the cases where a flag enable and a
// data write coincide, and fails if that never happened.
module tb_status_reg;
  import dm_pkg::*;

  logic  clock = 0, reset, we;
  data_t din, q;
  logic  c_in, dc_in, z_in, c_en, dc_en, z_en, rp0, c;
  logic  m_rp0, m_z, m_dc, m_c;
  data_t exp_q;
  int    checks = 0, failures = 0, overrides = 0;

  status_reg dut (.clock(clock), .reset(reset), .we(we), .din(din),
                  .c_in(c_in), .dc_in(dc_in), .z_in(z_in),
                  .c_en(c_en), .dc_en(dc_en), .z_en(z_en),
                  .q(q), .rp0(rp0), .c(c));

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we = 0; din = 8'hFF;
    {c_in, dc_in, z_in, c_en, dc_en, z_en} = '0;
    @(negedge clock);
    {m_rp0, m_z, m_dc, m_c} = '0;
    for (int i = 0; i < 2000; i++) begin
      reset = ($urandom_range(29) == 0);
      we    = 1'($urandom_range(1));
      din   = data_t'($urandom);
      {c_in, dc_in, z_in} = 3'($urandom);
      {c_en, dc_en, z_en} = 3'($urandom);
      @(posedge clock);
      if (reset) {m_rp0, m_z, m_dc, m_c} = '0;
      else begin
        if (we) m_rp0 = din[5];
        m_z  = z_en  ? z_in  : (we ? din[2] : m_z);
        m_dc = dc_en ? dc_in : (we ? din[1] : m_dc);
        m_c  = c_en  ? c_in  : (we ? din[0] : m_c);
        if (we && (c_en || dc_en || z_en)) overrides++;
      end
      @(negedge clock);
      exp_q = {2'b00, m_rp0, 2'b00, m_z, m_dc, m_c};
      checks++;
      if (q !== exp_q || rp0 !== m_rp0 || c !== m_c) begin
        failures++;
        $display("FAIL cycle %0d: q=%h rp0=%b c=%b expected %h", i, q, rp0, c, exp_q);
      end
    end
    checks++;
    if (overrides == 0) begin
      failures++;
      $display("FAIL flag enable never coincided with a data write");
    end
    $display("flag-over-write cases: %0d", overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
