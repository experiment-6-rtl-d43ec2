// tb_DataMemory: end-to-end test of the data memory at its default size.
//
// Phase 1 applies the six-step lab sequence: reset; write 13h to FSR (04h);
// write 27h to GPR 13h; read INDF (00h), which must return 27h through FSR;
// write 55h to GPR 0Fh; read 0Fh back (55h).
// Phase 2 drives random accesses, biased towards the SFRs, both banks and
// indirect addressing, together with random ALU flag updates and pin levels,
// and compares DataOut, C and the port pins every cycle with a reference model
// of the memory map written independently here. Each mechanism of the design
// (reset, direct and indirect reads and writes, bank 1 accesses, GPR mirroring,
// bank switching through RP0, flag updates overriding a STATUS write, port
// input and output pins, unimplemented locations) is counted, and one that
// never happened is a failure. Every access is one clock cycle: reads are
// checked before the edge, writes by the value they leave.
module tb_DataMemory;
  import dm_pkg::*;

  logic        Clock = 0, Reset = 0;
  logic        C_in = 0, DC_in = 0, Z_in = 0, C_en = 0, DC_en = 0, Z_en = 0, C;
  addr_t       Addr = '0;
  data_t       DataIn = '0, DataOut;
  logic        DataWrite = 0;
  logic [4:0]  PortA_in = '0, PortA_out, PortA_oe;
  logic [7:0]  PortB_in = '0, PortB_out, PortB_oe;

  DataMemory dut (.*);

  always #5 Clock = ~Clock;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  data_t      m_gpr [12:79];
  data_t      m_fsr;
  logic       m_rp0, m_z, m_dc, m_c;
  logic [4:0] m_lata, m_trisa;
  logic [7:0] m_latb, m_trisb;

  // mechanism counters
  typedef enum int {M_RESET, M_DIRECT_WR, M_INDIRECT_RD, M_INDIRECT_WR, M_BANK1,
                    M_MIRROR, M_RP0_SWITCH, M_FLAG_UPDATE, M_FLAG_OVERRIDE,
                    M_PORT_IN, M_PORT_OUT, M_TRIS_WR, M_UNIMPL, M_NUM} mech_e;
  int    mech [M_NUM];
  logic  gpr_bank [12:79];   // bank of the last write of each GPR
  logic  m_gpr_known [12:79]; // GPR written since start

  function automatic addr_t m_eff(addr_t a);
    return (a == 7'h00) ? m_fsr[6:0] : a;
  endfunction

  function automatic data_t m_read(addr_t a);
    addr_t e = m_eff(a);
    if (e >= 7'h0C && e <= 7'h4F) return m_gpr[e];
    case (e)
      7'h03: return {2'b00, m_rp0, 2'b00, m_z, m_dc, m_c};
      7'h04: return m_fsr;
      7'h05: return m_rp0 ? {3'b000, m_trisa} : {3'b000, (m_trisa & PortA_in) | (~m_trisa & m_lata)};
      7'h06: return m_rp0 ? m_trisb : (m_trisb & PortB_in) | (~m_trisb & m_latb);
      default: return 8'h00;
    endcase
  endfunction

  // Apply the model's view of one clock edge (called right after posedge)
  task automatic m_clock(addr_t a, data_t d, logic wr, logic rst);
    addr_t e = m_eff(a);
    logic  rp0_before = m_rp0;
    if (rst) begin
      m_fsr = '0; {m_rp0, m_z, m_dc, m_c} = '0;
      m_lata = '0; m_trisa = '1; m_latb = '0; m_trisb = '1;
      mech[M_RESET]++;
      return;
    end
    if (C_en || DC_en || Z_en) mech[M_FLAG_UPDATE]++;
    if (wr && e == 7'h03 && (C_en || DC_en || Z_en)) mech[M_FLAG_OVERRIDE]++;
    if (wr) begin
      if (a == 7'h00) mech[M_INDIRECT_WR]++; else mech[M_DIRECT_WR]++;
      if (e >= 7'h0C && e <= 7'h4F) begin
        m_gpr[e] = d;
        m_gpr_known[e] = 1'b1;
        gpr_bank[e] = rp0_before;
      end
      case (e)
        7'h03: m_rp0 = d[5];
        7'h04: m_fsr = d;
        7'h05: if (rp0_before) begin m_trisa = d[4:0]; mech[M_TRIS_WR]++; end else m_lata = d[4:0];
        7'h06: if (rp0_before) begin m_trisb = d;      mech[M_TRIS_WR]++; end else m_latb = d;
        default: ;
      endcase
      if (m_rp0 != rp0_before) mech[M_RP0_SWITCH]++;
    end
    m_z  = Z_en  ? Z_in  : ((wr && e == 7'h03) ? d[2] : m_z);
    m_dc = DC_en ? DC_in : ((wr && e == 7'h03) ? d[1] : m_dc);
    m_c  = C_en  ? C_in  : ((wr && e == 7'h03) ? d[0] : m_c);
  endtask

  // Check DataOut for the current inputs, and the pins, before the edge
  task automatic check_outputs(string tag);
    data_t exp = m_read(Addr);
    addr_t e = m_eff(Addr);
    // GPRs power up with unknown contents: nothing to compare before one
    // has been written
    checks++;
    if (!(e >= 7'h0C && e <= 7'h4F && !m_gpr_known[e]) && DataOut !== exp) begin
      failures++;
      $display("FAIL %s: Addr=%h eff=%h rp0=%b DataOut=%h expected %h", tag, Addr, e, m_rp0, DataOut, exp);
    end
    checks++;
    if (C !== m_c || PortA_out !== m_lata || PortA_oe !== ~m_trisa ||
        PortB_out !== m_latb || PortB_oe !== ~m_trisb) begin
      failures++;
      $display("FAIL %s: C=%b/%b PA=%b,%b/%b,%b PB=%h,%h/%h,%h", tag, C, m_c,
               PortA_out, PortA_oe, m_lata, ~m_trisa, PortB_out, PortB_oe, m_latb, ~m_trisb);
    end
    if (!DataWrite && !Reset) begin
      if (Addr == 7'h00) mech[M_INDIRECT_RD]++;
      if (m_rp0 && e >= 7'h0C && e <= 7'h4F && gpr_bank[e] == 1'b0) mech[M_MIRROR]++;
      if (!m_rp0 && e == 7'h05 && m_trisa != '0 && m_trisa != '1) mech[M_PORT_IN]++;
      if (!m_rp0 && e == 7'h06 && m_trisb != '0 && m_trisb != '1) mech[M_PORT_IN]++;
      if (!((e >= 7'h03 && e <= 7'h06) || (e >= 7'h0C && e <= 7'h4F))) mech[M_UNIMPL]++;
    end
    if (m_rp0 && !Reset) mech[M_BANK1]++;
    if ((PortA_oe != '0) || (PortB_oe != '0)) mech[M_PORT_OUT]++;
  endtask

  // One access: set inputs after the falling edge, check, then clock
  task automatic access(logic rst, addr_t a, data_t d, logic wr, string tag,
                        logic [2:0] fen = 3'b000, logic [2:0] fin = 3'b000,
                        logic [4:0] pa = 5'h00, logic [7:0] pb = 8'h00);
    @(negedge Clock);
    Reset = rst; Addr = a; DataIn = d; DataWrite = wr;
    {C_en, DC_en, Z_en} = fen;
    {C_in, DC_in, Z_in} = fin;
    PortA_in = pa;
    PortB_in = pb;
    #1;
    if (!rst) check_outputs(tag);
    @(posedge Clock);
    m_clock(a, d, wr, rst);
  endtask

  task automatic expect_out(data_t exp, string tag);
    checks++;
    if (DataOut !== exp) begin
      failures++;
      $display("FAIL %s: DataOut=%h expected %h", tag, DataOut, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge Clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int n_cycles = 20000;
    foreach (mech[i]) mech[i] = 0;
    foreach (gpr_bank[i]) gpr_bank[i] = 1'b1;
    foreach (m_gpr[i]) m_gpr[i] = '0;
    foreach (m_gpr_known[i]) m_gpr_known[i] = 1'b0;

    // ---- Phase 1: the lab's test sequence ----
    access(1'b1, 7'h00, 8'h00, 1'b0, "lab reset");
    access(1'b0, 7'h04, 8'h13, 1'b1, "lab write FSR");
    access(1'b0, 7'h13, 8'h27, 1'b1, "lab write GPR 13h");
    @(negedge Clock); Addr = 7'h00; DataWrite = 0; DataIn = 0; #1;
    expect_out(8'h27, "lab indirect read via FSR=13h");
    access(1'b0, 7'h00, 8'h00, 1'b0, "lab read INDF");
    access(1'b0, 7'h0F, 8'h55, 1'b1, "lab write GPR 0Fh");
    @(negedge Clock); Addr = 7'h0F; DataWrite = 0; #1;
    expect_out(8'h55, "lab read GPR 0Fh");
    access(1'b0, 7'h0F, 8'h00, 1'b0, "lab read 0Fh");

    // Initialise every GPR so the random phase starts from known contents
    for (int a = 12; a <= 79; a++) access(1'b0, addr_t'(a), data_t'(a ^ 'h5A), 1'b1, "init");

    // ---- Phase 2: random traffic against the model ----
    for (int i = 0; i < n_cycles; i++) begin
      automatic int    kind = int'($urandom_range(99));
      automatic addr_t a;
      automatic data_t d = data_t'($urandom);
      automatic logic  wr = 1'($urandom_range(1));
      automatic logic  rst = (kind == 0) && ($urandom_range(9) == 0);
      if (kind < 25)      a = addr_t'(3 + $urandom_range(3));       // SFRs
      else if (kind < 40) a = 7'h00;                                 // INDF
      else if (kind < 50) a = addr_t'($urandom_range(127));          // anywhere
      else                a = addr_t'(12 + $urandom_range(67));      // GPRs
      // Keep FSR mostly pointing at something implemented
      if (wr && m_eff(a) == 7'h04) d = ($urandom_range(3) == 0) ? d : data_t'(3 + $urandom_range(76));
      access(rst, a, d, wr, "random",
             ($urandom_range(2) == 0) ? 3'($urandom) : 3'b000, 3'($urandom),
             5'($urandom), 8'($urandom));
    end
    @(negedge Clock);
    DataWrite = 1'b0; {C_en, DC_en, Z_en} = 3'b000; #1;
    check_outputs("final");

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-16s happened %0d times", mech_e'(i), mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
