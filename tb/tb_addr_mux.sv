// tb_addr_mux: exhaustive check of the direct/indirect address multiplexer.
// Every 7-bit address is applied with a set of FSR values; the expected
// effective address is FSR<6:0> for address 00h and the address otherwise.
module tb_addr_mux;
  import dm_pkg::*;

  addr_t addr, eff_addr;
  data_t fsr;
  int    checks = 0, failures = 0;

  addr_mux dut (.addr(addr), .fsr(fsr[6:0]), .eff_addr(eff_addr));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static data_t fsr_vals [6] = '{8'h01, 8'h13, 8'h7F, 8'h80, 8'hCF, 8'hA5};
    for (int f = 0; f < 6; f++) begin
      for (int a = 0; a < 128; a++) begin
        addr = addr_t'(a);
        fsr  = fsr_vals[f];
        #1;
        checks++;
        if (a == 0) begin
          if (eff_addr != fsr_vals[f][6:0]) begin
            failures++;
            $display("FAIL addr=%h fsr=%h eff=%h", addr, fsr, eff_addr);
          end
        end else if (eff_addr != addr_t'(a)) begin
          failures++;
          $display("FAIL addr=%h fsr=%h eff=%h", addr, fsr, eff_addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
