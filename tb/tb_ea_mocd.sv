// tb_ea_mocd: end-to-end test of the debug architecture with four cores.
//
// The top is used at its default parameters (four cores, four other JTAG
// IPs).  Four behavioural cores run a small loop; a JTAG master plays the
// software debugger and follows the monitoring-mode control flow: enable,
// enter monitoring mode with a breakpoint on the next instruction, read and
// write registers, memory and processor status through the CFD mailbox,
// single-step, set address breakpoints and watchpoints, stop all cores from
// one core's breakpoint through the cross breakpoint manager, and resume.
// Every value read is compared with the core model's own state; every write
// is checked in the model.  It also checks that EN=0 blocks breakpoints and
// that SEL/JSEL route the pins to another JTAG IP.
//
// Each mechanism is counted and must happen at least once.  The cost in TCK
// cycles of 16 register reads/writes, 16 memory reads/writes and one
// single-step is measured and printed.
//
// The debugger follows the source design's control flowchart:
//   - the command values are those of the MMCR bit definitions;
//   - polling comes before every step.
// The core model, its program and the clock frequencies are this
// testbench's own.
module tb_ea_mocd;
  import ea_mocd_pkg::*;

  localparam int NC = 4;
  localparam int NI = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;                      // system clock 100 MHz

  logic tck, tms, tdi, trst_n, sel, tdo, tdo_oe;
  logic [NI-1:0] ip_tck, ip_tms, ip_tdi, ip_trst_n, ip_tdo;
  logic [NC-1:0] i_req, d_req, d_nrw, exception_ack, cop_req, cop_type, ext_bkpt_en;
  logic [XLEN-1:0] i_addr [NC], i_data [NC], d_addr [NC], d_rdata [NC], d_wdata [NC];
  logic [COP_NUMB_W-1:0] cop_numb [NC];
  logic [XLEN-1:0] cop_wdata [NC], cop_rdata [NC];

  ea_mocd dut (.*);

  jtag_driver #(.TCK_NS(100)) drv (.tck, .tms, .tdi, .trst_n, .tdo);   // TCK 10 MHz

  for (genvar c = 0; c < NC; c++) begin : g_core
    core_model #(.START_PC(32'(c * 'h40))) u_core (
      .clk, .rst_n, .ext_bkpt_en (ext_bkpt_en[c]),
      .i_req (i_req[c]), .i_addr (i_addr[c]), .i_data (i_data[c]),
      .d_req (d_req[c]), .d_nrw (d_nrw[c]), .d_addr (d_addr[c]),
      .d_rdata (d_rdata[c]), .d_wdata (d_wdata[c]),
      .exception_ack (exception_ack[c]),
      .cop_req (cop_req[c]), .cop_type (cop_type[c]), .cop_numb (cop_numb[c]),
      .cop_wdata (cop_wdata[c]), .cop_rdata (cop_rdata[c])
    );
  end

  // other JTAG IPs: one-bit stage each
  logic [NI-1:0] ip_ff = '0;
  for (genvar k = 0; k < NI; k++) begin : g_ip
    always_ff @(posedge ip_tck[k]) ip_ff[k] <= ~ip_tdi[k];
  end
  assign ip_tdo = ip_ff;

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  typedef enum int {
    M_ENTRY, M_CROSS, M_SSTEP, M_REG_R, M_REG_W, M_MEM_R, M_MEM_W, M_PS_R, M_PS_W,
    M_IBP, M_WATCH, M_RESUME, M_EN_OFF, M_JSEL, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"monitor entry", "cross breakpoint", "single-step",
    "register read", "register write", "memory read", "memory write",
    "status read", "status write", "instruction breakpoint", "watchpoint",
    "resume", "EN blocks breakpoints", "JTAG IP routing"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
    if (failures >= 10) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
      wait (0);
    end
  endtask

  // peeks into the core models (constant generate indices)
  function automatic logic [XLEN-1:0] m_gpr(input int c, input int i);
    case (c)
      0: return g_core[0].u_core.gpr[i];
      1: return g_core[1].u_core.gpr[i];
      2: return g_core[2].u_core.gpr[i];
      default: return g_core[3].u_core.gpr[i];
    endcase
  endfunction
  function automatic logic [XLEN-1:0] m_mem(input int c, input logic [XLEN-1:0] a);
    int unsigned w = (a >> 2) % 256;
    case (c)
      0: return g_core[0].u_core.dmem[w];
      1: return g_core[1].u_core.dmem[w];
      2: return g_core[2].u_core.dmem[w];
      default: return g_core[3].u_core.dmem[w];
    endcase
  endfunction
  function automatic logic [XLEN-1:0] m_psr(input int c);
    case (c)
      0: return g_core[0].u_core.psr;
      1: return g_core[1].u_core.psr;
      2: return g_core[2].u_core.psr;
      default: return g_core[3].u_core.psr;
    endcase
  endfunction
  function automatic logic [XLEN-1:0] m_epc(input int c);
    case (c)
      0: return g_core[0].u_core.epc;
      1: return g_core[1].u_core.epc;
      2: return g_core[2].u_core.epc;
      default: return g_core[3].u_core.epc;
    endcase
  endfunction
  function automatic int unsigned m_retired(input int c);
    case (c)
      0: return g_core[0].u_core.retired;
      1: return g_core[1].u_core.retired;
      2: return g_core[2].u_core.retired;
      default: return g_core[3].u_core.retired;
    endcase
  endfunction

  // ------------------------------------------------------------ addresses
  function automatic logic [DBG_AW-1:0] a_cfd(input int c, input cfd_reg_e r);
    return {UNIT_CFD, 4'(c), 2'b00, r};
  endfunction
  function automatic logic [DBG_AW-1:0] a_bp(input int c, input int r);
    return {UNIT_BP, 4'(c), 4'(r)};
  endfunction
  function automatic logic [DBG_AW-1:0] a_cbm(input int j, input logic [3:0] r);
    return {UNIT_CBM, 4'(j), r};
  endfunction

  // ------------------------------------------------------------ debugger
  task automatic read_mmcr(input int c, output mmcr_t m);
    logic [XLEN-1:0] v;
    drv.dbg_read(a_cfd(c, CFD_MMCR), v);
    m = mmcr_t'(v[MMCR_W-1:0]);
  endtask

  // "Polling D.S": wait until D.EXP equals `want`
  task automatic poll_ds(input int c, input logic want);
    mmcr_t m;
    for (int i = 0; i < 40; i++) begin
      read_mmcr(c, m);
      if (m.d_exp == want) return;
    end
    check(1'b0, $sformatf("core %0d: D.EXP never became %0d", c, want));
  endtask

  // "Polling": wait until D.EXP and C.ACK are both 1
  task automatic poll(input int c);
    mmcr_t m;
    for (int i = 0; i < 40; i++) begin
      read_mmcr(c, m);
      if (m.d_exp && m.c_ack) return;
    end
    check(1'b0, $sformatf("core %0d: C.ACK never came", c));
  endtask

  task automatic set_bp(input int c, input int b, input logic [XLEN-1:0] a, input bp_ctrl_t ctl);
    drv.dbg_write(a_bp(c, 4*b), a);
    drv.dbg_write(a_bp(c, 4*b + 2), XLEN'(ctl));
  endtask

  localparam bp_ctrl_t BP_ANY  = '{any_addr: 1, data_cmp: 0, kind: BPK_INSTR, enable: 1};
  localparam bp_ctrl_t BP_IADR = '{any_addr: 0, data_cmp: 0, kind: BPK_INSTR, enable: 1};
  localparam bp_ctrl_t BP_DW   = '{any_addr: 0, data_cmp: 0, kind: BPK_DWRITE, enable: 1};
  localparam bp_ctrl_t BP_OFF  = '0;

  // MM entry: break on the next instruction, wait, read the return address
  task automatic mm_entry(input int c, output logic [XLEN-1:0] ra);
    poll_ds(c, 1'b0);
    set_bp(c, 0, '0, BP_ANY);
    poll_ds(c, 1'b1);
    drv.dbg_read(a_cfd(c, CFD_RDATA), ra);
    poll(c);
    set_bp(c, 0, '0, BP_OFF);
  endtask

  task automatic reg_read(input int c, input int idx, output logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC00 | (idx << 6));
    poll(c);
    drv.dbg_read(a_cfd(c, CFD_RDATA), v);
  endtask

  task automatic reg_write(input int c, input int idx, input logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_WDATA), v);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC20 | (idx << 6));
  endtask

  task automatic mem_read(input int c, input logic [XLEN-1:0] a, output logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_ADDR), a);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC10);
    poll(c);
    drv.dbg_read(a_cfd(c, CFD_RDATA), v);
  endtask

  task automatic mem_write(input int c, input logic [XLEN-1:0] a, input logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_ADDR), a);
    drv.dbg_write(a_cfd(c, CFD_WDATA), v);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC30);
  endtask

  task automatic ps_read(input int c, output logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC08);
    poll(c);
    drv.dbg_read(a_cfd(c, CFD_RDATA), v);
  endtask

  task automatic ps_write(input int c, input logic [XLEN-1:0] v);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_WDATA), v);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC28);
  endtask

  task automatic single_step(input int c, output logic [XLEN-1:0] ra);
    poll(c);
    set_bp(c, 0, '0, BP_ANY);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC04);
    poll_ds(c, 1'b1);
    drv.dbg_read(a_cfd(c, CFD_RDATA), ra);
    poll(c);
    set_bp(c, 0, '0, BP_OFF);
  endtask

  task automatic end_debug(input int c);
    poll(c);
    drv.dbg_write(a_cfd(c, CFD_MMCR), 32'hC04);
    poll_ds(c, 1'b0);
  endtask

  // private stop condition: ext_bkpt_en[j] follows int_bkpt_en[j]
  task automatic cbm_private();
    for (int j = 0; j < NC; j++) begin
      drv.dbg_write(a_cbm(j, CBM_STOP), 32'(1 << j));
      drv.dbg_write(a_cbm(j, CBM_MASK), 32'(~(1 << j) & ((1 << NC) - 1)));
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scenario
  initial begin
    logic [XLEN-1:0]   ra, ra2, v;
    logic [IR_LEN-1:0] cap;
    longint unsigned   t0;
    int unsigned       r0;
    mmcr_t             m;
    logic [63:0]       o;
    for (int k = 0; k < M_NUM; k++) mech[k] = 0;
    sel = 1'b0;
    #25 rst_n = 1'b1;
    drv.reset();
    drv.set_ir(IR_DBG, cap);

    // Start: enable all four cores' debug units, private stop conditions
    for (int c = 0; c < NC; c++) drv.dbg_write(a_cfd(c, CFD_MMCR), 32'h800);
    cbm_private();
    for (int c = 0; c < NC; c++) begin
      read_mmcr(c, m);
      check(m.en && !m.d_exp, $sformatf("core %0d enabled, running", c));
    end

    // ---- core 0: monitor entry, register / memory / status access
    mm_entry(0, ra);
    check(ra == m_epc(0), $sformatf("core 0 RA %h model %h", ra, m_epc(0)));
    check(exception_ack == 4'b0001, "only core 0 in exception");
    mech[M_ENTRY]++;

    t0 = drv.tck_count;
    for (int i = 0; i < 16; i++) begin
      reg_read(0, i, v);
      check(v == m_gpr(0, i), $sformatf("reg %0d read %h model %h", i, v, m_gpr(0, i)));
      mech[M_REG_R]++;
    end
    $display("TCK cycles, 16 register reads : %0d", drv.tck_count - t0);

    t0 = drv.tck_count;
    for (int i = 0; i < 16; i++) begin
      reg_write(0, i, 32'hBEEF_0000 + 32'(i));
      mech[M_REG_W]++;
    end
    poll(0);
    $display("TCK cycles, 16 register writes: %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++)
      check(m_gpr(0, i) == 32'hBEEF_0000 + 32'(i), $sformatf("reg %0d written", i));

    t0 = drv.tck_count;
    for (int i = 0; i < 16; i++) begin
      mem_read(0, 32'h1000 + 32'(4 * i), v);
      check(v == m_mem(0, 32'h1000 + 32'(4 * i)), $sformatf("mem %0d read %h", i, v));
      mech[M_MEM_R]++;
    end
    $display("TCK cycles, 16 memory reads   : %0d", drv.tck_count - t0);

    t0 = drv.tck_count;
    for (int i = 0; i < 16; i++) begin
      mem_write(0, 32'h1100 + 32'(4 * i), 32'h5A5A_0000 ^ 32'(i));
      mech[M_MEM_W]++;
    end
    poll(0);
    $display("TCK cycles, 16 memory writes  : %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++)
      check(m_mem(0, 32'h1100 + 32'(4 * i)) == (32'h5A5A_0000 ^ 32'(i)), $sformatf("mem %0d written", i));

    ps_read(0, v);
    check(v == m_psr(0), $sformatf("status read %h", v));
    mech[M_PS_R]++;
    ps_write(0, 32'h0000_0013);
    poll(0);
    check(m_psr(0) == 32'h13, "status written");
    mech[M_PS_W]++;

    // ---- single-step: exactly one instruction
    r0 = m_retired(0);
    t0 = drv.tck_count;
    single_step(0, ra2);
    $display("TCK cycles, single-step       : %0d", drv.tck_count - t0);
    check(ra2 == ((ra + 4) & 32'hFF), $sformatf("single-step RA %h after %h", ra2, ra));
    check(m_retired(0) == r0 + 1, $sformatf("one instruction executed (%0d)", m_retired(0) - r0));
    mech[M_SSTEP]++;
    single_step(0, ra);
    check(ra == ((ra2 + 4) & 32'hFF), "second single-step");
    mech[M_SSTEP]++;

    // ---- resume
    r0 = m_retired(0);
    end_debug(0);
    repeat (50) @(posedge clk);
    check(!exception_ack[0] && m_retired(0) > r0 + 40, "core 0 resumed");
    mech[M_RESUME]++;

    // ---- core 1: instruction address breakpoint at 0x88
    set_bp(1, 1, 32'h88, BP_IADR);
    poll_ds(1, 1'b1);
    drv.dbg_read(a_cfd(1, CFD_RDATA), ra);
    check(ra == 32'h8C, $sformatf("core 1 stopped after 0x88, RA %h", ra));
    drv.dbg_read(a_bp(1, BP_STATUS), v);
    check(v[1:0] == 2'b10, "core 1 hit status BP1");
    check(exception_ack == 4'b0010, "only core 1 stopped");
    mech[M_IBP]++;
    mech[M_ENTRY]++;
    set_bp(1, 1, 32'h88, BP_OFF);
    end_debug(1);
    mech[M_RESUME]++;

    // ---- core 2: watchpoint on the store at pc 0x2C (address 0x1008)
    set_bp(2, 0, 32'h1008, BP_DW);
    poll_ds(2, 1'b1);
    drv.dbg_read(a_cfd(2, CFD_RDATA), ra);
    check(ra == 32'h30, $sformatf("core 2 watchpoint RA %h", ra));
    mech[M_WATCH]++;
    mech[M_ENTRY]++;
    poll(2);
    mem_read(2, 32'h1008, v);
    check(v == m_gpr(2, 1), "stored value visible through memory read");
    set_bp(2, 0, '0, BP_OFF);
    end_debug(2);

    // ---- cross breakpoint: core 0's breakpoint stops all cores
    for (int j = 0; j < NC; j++) begin
      drv.dbg_write(a_cbm(j, CBM_STOP), 32'h1);
      drv.dbg_write(a_cbm(j, CBM_MASK), 32'hE);
    end
    set_bp(0, 0, 32'h80, BP_IADR);
    poll_ds(0, 1'b1);
    repeat (5) @(posedge clk);
    check(exception_ack == 4'b1111, $sformatf("all cores stopped: %b", exception_ack));
    for (int c = 0; c < NC; c++) begin
      poll(c);
      drv.dbg_read(a_cfd(c, CFD_RDATA), ra);
      check(ra == m_epc(c), $sformatf("core %0d RA %h model %h", c, ra, m_epc(c)));
      if (c != 0 && exception_ack[c]) mech[M_CROSS]++;
    end
    drv.dbg_read(a_cfd(0, CFD_RDATA), ra);
    check(ra == 32'h84, "core 0 stopped after 0x80");
    set_bp(0, 0, '0, BP_OFF);
    cbm_private();
    for (int c = 0; c < NC; c++) begin
      end_debug(c);
      mech[M_RESUME]++;
    end
    repeat (20) @(posedge clk);
    check(exception_ack == 4'b0000, "all resumed");

    // ---- EN = 0 blocks breakpoints on core 3
    drv.dbg_write(a_cfd(3, CFD_MMCR), 32'h000);
    set_bp(3, 0, '0, BP_ANY);
    repeat (200) @(posedge clk);
    check(!exception_ack[3], "no entry with EN=0");
    if (!exception_ack[3]) mech[M_EN_OFF]++;
    drv.dbg_write(a_cfd(3, CFD_MMCR), 32'h800);
    poll_ds(3, 1'b1);
    mech[M_ENTRY]++;
    set_bp(3, 0, '0, BP_OFF);
    poll(3);
    end_debug(3);

    // ---- route the pins to JTAG IP 2 and back
    drv.set_ir(IR_JSEL, cap);
    drv.scan(1'b0, 64'd2, 2, o);
    sel = 1'b1;
    begin
      logic d;
      drv.clock(1'b0, 1'b1, d);
      drv.clock(1'b0, 1'b0, d);
      check(d == 1'b0, "IP 2 reached through SEL");
      drv.clock(1'b0, 1'b0, d);
      check(d == 1'b1, "IP 2 data returned on TDO");
      check(ip_tck[1:0] == 2'b00 && ip_tck[3] == 1'b0, "other IPs idle");
      if (failures == 0) mech[M_JSEL]++;
    end
    sel = 1'b0;
    drv.set_ir(IR_IDCODE, cap);
    drv.scan(1'b0, '0, 32, o);
    check(o[31:0] == 32'h1EAD_B0C1, "IDCODE after routing back");

    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-24s : %0d", mech_name[k], mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s never happened", mech_name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
