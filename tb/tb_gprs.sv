// tb_gprs: checks the 68 x 8 general purpose register file. All 68 registers
// are written with distinct values and read back; writes with wt low and
// writes to addresses outside 0Ch-4Fh must change nothing, and those addresses
// must read 0. A random phase then compares against a reference array.
module tb_gprs;
  import dm_pkg::*;

  logic  clock = 0;
  logic  wt;
  addr_t addr;
  data_t din, dout;
  data_t ref_mem [12:79];
  int    checks = 0, failures = 0;

  gprs dut (.clock(clock), .wt(wt), .addr(addr), .din(din), .dout(dout));

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input data_t d, input logic w);
    @(negedge clock);
    addr = addr_t'(a); din = d; wt = w;
    @(posedge clock);
    if (w && a >= 12 && a <= 79) ref_mem[a] = d;
    @(negedge clock);
    wt = 0;
  endtask

  task automatic check_read(input int a);
    data_t e;
    @(negedge clock);
    addr = addr_t'(a);
    #1;
    e = (a >= 12 && a <= 79) ? ref_mem[a] : 8'h00;
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL read %h: got %h expected %h", a, dout, e);
    end
  endtask

  initial begin
    wt = 0; addr = '0; din = '0;
    for (int a = 12; a <= 79; a++) write(a, data_t'(a * 7 + 3), 1'b1);
    for (int a = 0; a < 128; a++) check_read(a);
    // writes that must not land
    for (int a = 12; a <= 79; a++) write(a, 8'hEE, 1'b0);
    for (int a = 0; a < 12; a++) write(a, 8'hDD, 1'b1);
    for (int a = 80; a < 128; a++) write(a, 8'hCC, 1'b1);
    for (int a = 0; a < 128; a++) check_read(a);
    // random traffic
    for (int i = 0; i < 500; i++) begin
      automatic int a = int'($urandom_range(127));
      if ($urandom_range(1) != 0) write(a, data_t'($urandom), 1'($urandom_range(1)));
      else check_read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
