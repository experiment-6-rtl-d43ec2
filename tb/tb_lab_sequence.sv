// tb_lab_sequence: the six-cycle acceptance sequence for the data memory,
// one access per clock cycle, printed as a cycle-by-cycle table:
//   1 Reset=1                       2 write 13h to FSR (04h)
//   3 write 27h to GPR 13h          4 read INDF (00h) -> 27h through FSR
//   5 write 55h to GPR 0Fh          6 read GPR 0Fh    -> 55h
// Reads are combinational, so the value is checked in the same cycle as the
// address is applied; each write must be visible in the very next cycle.
module tb_lab_sequence;
  import dm_pkg::*;

  logic       Clock = 0, Reset = 0, DataWrite = 0;
  logic       C_in = 0, DC_in = 0, Z_in = 0, C_en = 0, DC_en = 0, Z_en = 0, C;
  addr_t      Addr = '0;
  data_t      DataIn = '0, DataOut;
  logic [4:0] PortA_in = '0, PortA_out, PortA_oe;
  logic [7:0] PortB_in = '0, PortB_out, PortB_oe;
  int         checks = 0, failures = 0, cycle = 0;

  DataMemory dut (.*);

  always #5 Clock = ~Clock;

  initial begin : watchdog
    repeat (100) @(posedge Clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic  rst;
    addr_t addr;
    data_t din;
    logic  wr;
    logic  chk;   // compare DataOut in this cycle
    data_t exp;
  } step_t;

  initial begin
    static step_t steps [6] = '{
      '{1'b1, 7'h00, 8'h00, 1'b0, 1'b0, 8'h00},
      '{1'b0, 7'h04, 8'h13, 1'b1, 1'b0, 8'h00},
      '{1'b0, 7'h13, 8'h27, 1'b1, 1'b0, 8'h00},
      '{1'b0, 7'h00, 8'h00, 1'b0, 1'b1, 8'h27},
      '{1'b0, 7'h0F, 8'h55, 1'b1, 1'b0, 8'h00},
      '{1'b0, 7'h0F, 8'h00, 1'b0, 1'b1, 8'h55}};
    int first_read_cycle;
    $display("cycle Reset Addr    DataIn   DataWrite DataOut");
    foreach (steps[i]) begin
      @(negedge Clock);
      Reset = steps[i].rst; Addr = steps[i].addr;
      DataIn = steps[i].din; DataWrite = steps[i].wr;
      #1;
      cycle++;
      $display("%5d   %b   %b %b     %b     %h", cycle, Reset, Addr, DataIn, DataWrite, DataOut);
      if (steps[i].chk) begin
        checks++;
        if (DataOut !== steps[i].exp) begin
          failures++;
          $display("FAIL cycle %0d: DataOut=%h expected %h", cycle, DataOut, steps[i].exp);
        end
      end
      // the FSR written in cycle 2 must steer the INDF read two cycles later
      if (i == 3) first_read_cycle = cycle;
      @(posedge Clock);
    end
    checks++;
    if (first_read_cycle != 4 || cycle != 6) begin
      failures++;
      $display("FAIL sequence took %0d cycles, indirect read in cycle %0d", cycle, first_read_cycle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
