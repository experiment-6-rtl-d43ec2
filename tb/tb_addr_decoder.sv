// tb_addr_decoder: exhaustive check of the register select decoder over all
// 128 addresses in both banks, against the PIC16F84A memory map written out
// independently below (bank 1 GPRs mirror bank 0; 05h/06h are the ports in
// bank 0 and the TRIS registers in bank 1; everything else selects nothing).
module tb_addr_decoder;
  import dm_pkg::*;

  addr_t addr;
  logic  rp0;
  sel_t  sel, exp_sel;
  int    checks = 0, failures = 0;

  addr_decoder dut (.addr(addr), .rp0(rp0), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 128; a++) begin
        addr = addr_t'(a);
        rp0  = b[0];
        #1;
        exp_sel = '0;
        case (8'(a + 128*b))
          8'h03, 8'h83: exp_sel.status = 1'b1;
          8'h04, 8'h84: exp_sel.fsr    = 1'b1;
          8'h05:        exp_sel.porta  = 1'b1;
          8'h85:        exp_sel.trisa  = 1'b1;
          8'h06:        exp_sel.portb  = 1'b1;
          8'h86:        exp_sel.trisb  = 1'b1;
          default:      exp_sel.gpr    = (a >= 12) && (a <= 79);
        endcase
        checks++;
        if (sel !== exp_sel) begin
          failures++;
          $display("FAIL addr=%h rp0=%b sel=%b expected %b", addr, rp0, sel, exp_sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
