// tb_ea_mocd_single: the debug architecture attached to a single core, with
// the debug functions timed in TCK cycles.
//
// The top is built with NUM_CORES = 1. In that configuration the cross
// breakpoint manager is left out, and the core's breakpoint request goes
// straight to the core. One behavioural core runs its loop. A JTAG master
// plays the debugger.
//
// Unlike tb_ea_mocd, the debugger here uses a pipelined scan sequence. A DBG
// scan returns the result of the previous access, so each scan both issues
// the next access and collects the last one. Each command is followed by one
// MMCR read. The following scan checks D.EXP and C.ACK in the returned value.
// With TCK ten times slower than the system clock, the service routine has
// always finished by then. Costs:
//   - register read: 3 scans;
//   - register write: 3 scans;
//   - memory read or write: 4 scans.
//
// The single-step is timed the way the original evaluation counts it. The
// count covers:
//   - programming the breakpoint;
//   - restoring 16 registers;
//   - leaving and re-entering debug mode;
//   - saving 16 registers.
//
// Checks:
//   - every value read matches the core model;
//   - every write lands in the model;
//   - exactly one instruction runs per step;
//   - ext_bkpt_en equals int_bkpt_en in every cycle;
//   - an address breakpoint and resume work;
//   - each mechanism happens at least once.
//
// The single-core configuration, without the MDSU, comes from the source
// design.  So does the list of debug functions, whose costs are compared with
// the source's own measurements.  The pipelined scan order and the clock
// frequencies are this testbench's own.
module tb_ea_mocd_single;
  import ea_mocd_pkg::*;

  localparam int NI = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;                      // system clock 100 MHz

  logic tck, tms, tdi, trst_n, sel, tdo, tdo_oe;
  logic [NI-1:0] ip_tck, ip_tms, ip_tdi, ip_trst_n;
  logic [NI-1:0] ip_tdo = '0;
  logic [0:0] i_req, d_req, d_nrw, exception_ack, cop_req, cop_type, ext_bkpt_en;
  logic [XLEN-1:0] i_addr [1], i_data [1], d_addr [1], d_rdata [1], d_wdata [1];
  logic [COP_NUMB_W-1:0] cop_numb [1];
  logic [XLEN-1:0] cop_wdata [1], cop_rdata [1];

  ea_mocd #(.NUM_CORES(1)) dut (.*);

  jtag_driver #(.TCK_NS(100)) drv (.tck, .tms, .tdi, .trst_n, .tdo);   // TCK 10 MHz

  core_model u_core (
    .clk, .rst_n, .ext_bkpt_en (ext_bkpt_en[0]),
    .i_req (i_req[0]), .i_addr (i_addr[0]), .i_data (i_data[0]),
    .d_req (d_req[0]), .d_nrw (d_nrw[0]), .d_addr (d_addr[0]),
    .d_rdata (d_rdata[0]), .d_wdata (d_wdata[0]),
    .exception_ack (exception_ack[0]),
    .cop_req (cop_req[0]), .cop_type (cop_type[0]), .cop_numb (cop_numb[0]),
    .cop_wdata (cop_wdata[0]), .cop_rdata (cop_rdata[0])
  );

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  typedef enum int {
    M_ENTRY, M_SSTEP, M_REG_R, M_REG_W, M_MEM_R, M_MEM_W, M_IBP, M_RESUME, M_DIRECT, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"monitor entry", "single-step", "register read",
    "register write", "memory read", "memory write", "instruction breakpoint",
    "resume", "breakpoint request without MDSU"};

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

  // with one core the request must reach the core unchanged in every cycle
  int direct_bad = 0;
  always @(negedge clk)
    if (rst_n) begin
      if (ext_bkpt_en[0] !== dut.int_bkpt_en[0]) direct_bad++;
      else if (ext_bkpt_en[0]) mech[M_DIRECT]++;
    end

  // ------------------------------------------------------------ debugger
  function automatic logic [DBG_AW-1:0] a_cfd(input cfd_reg_e r);
    return {UNIT_CFD, 4'd0, 2'b00, r};
  endfunction
  function automatic logic [DBG_AW-1:0] a_bp(input int r);
    return {UNIT_BP, 4'd0, 4'(r)};
  endfunction

  localparam bp_ctrl_t BP_ANY  = '{any_addr: 1, data_cmp: 0, kind: BPK_INSTR, enable: 1};
  localparam bp_ctrl_t BP_IADR = '{any_addr: 0, data_cmp: 0, kind: BPK_INSTR, enable: 1};
  localparam bp_ctrl_t BP_OFF  = '0;

  // one scan: issue an access, return the previous one's read data
  task automatic issue(input logic wr, input logic [DBG_AW-1:0] a, input logic [XLEN-1:0] d,
                       output logic [XLEN-1:0] prev);
    drv.dbg_scan(wr, a, d, prev);
    check(!drv.last_busy, "previous access finished before the next scan");
  endtask

  // value returned by the previous scan must be an MMCR with D.EXP and C.ACK
  task automatic check_done(input logic [XLEN-1:0] v, input string what);
    mmcr_t m;
    m = mmcr_t'(v[MMCR_W-1:0]);
    check(m.d_exp && m.c_ack && !m.d_ack, $sformatf("%s: command served (MMCR %h)", what, v));
  endtask

  // classic polling for the slow parts (entry, leaving)
  task automatic poll_ds(input logic want);
    logic [XLEN-1:0] v;
    mmcr_t m;
    for (int i = 0; i < 40; i++) begin
      drv.dbg_read(a_cfd(CFD_MMCR), v);
      m = mmcr_t'(v[MMCR_W-1:0]);
      if (m.d_exp == want && (!want || m.c_ack)) return;
    end
    check(1'b0, $sformatf("D.EXP never became %0d", want));
  endtask

  // 16 register reads: cmd, MMCR read, RDATA read (returns MMCR), next cmd (returns RDATA)
  task automatic read_regs(output logic [XLEN-1:0] v [16]);
    logic [XLEN-1:0] p;
    for (int i = 0; i <= 16; i++) begin
      if (i < 16) issue(1'b1, a_cfd(CFD_MMCR), 32'hC00 | 32'(i << 6), p);
      else        issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      if (i > 0) v[i-1] = p;
      if (i == 16) break;
      issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      issue(1'b0, a_cfd(CFD_RDATA), '0, p);
      check_done(p, $sformatf("register read %0d", i));
    end
  endtask

  // 16 register writes: WDATA (returns last MMCR), cmd, MMCR read
  task automatic write_regs(input logic [XLEN-1:0] v [16]);
    logic [XLEN-1:0] p;
    for (int i = 0; i <= 16; i++) begin
      if (i < 16) issue(1'b1, a_cfd(CFD_WDATA), v[i], p);
      else        issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      if (i > 0) check_done(p, $sformatf("register write %0d", i - 1));
      if (i == 16) break;
      issue(1'b1, a_cfd(CFD_MMCR), 32'hC20 | 32'(i << 6), p);
      issue(1'b0, a_cfd(CFD_MMCR), '0, p);
    end
  endtask

  // 16 memory reads: ADDR (returns RDATA), cmd, MMCR read, RDATA read (returns MMCR)
  task automatic read_mem(input logic [XLEN-1:0] base, output logic [XLEN-1:0] v [16]);
    logic [XLEN-1:0] p;
    for (int i = 0; i <= 16; i++) begin
      if (i < 16) issue(1'b1, a_cfd(CFD_ADDR), base + 32'(4 * i), p);
      else        issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      if (i > 0) v[i-1] = p;
      if (i == 16) break;
      issue(1'b1, a_cfd(CFD_MMCR), 32'hC10, p);
      issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      issue(1'b0, a_cfd(CFD_RDATA), '0, p);
      check_done(p, $sformatf("memory read %0d", i));
    end
  endtask

  // 16 memory writes: ADDR (returns last MMCR), WDATA, cmd, MMCR read
  task automatic write_mem(input logic [XLEN-1:0] base, input logic [XLEN-1:0] v [16]);
    logic [XLEN-1:0] p;
    for (int i = 0; i <= 16; i++) begin
      if (i < 16) issue(1'b1, a_cfd(CFD_ADDR), base + 32'(4 * i), p);
      else        issue(1'b0, a_cfd(CFD_MMCR), '0, p);
      if (i > 0) check_done(p, $sformatf("memory write %0d", i - 1));
      if (i == 16) break;
      issue(1'b1, a_cfd(CFD_WDATA), v[i], p);
      issue(1'b1, a_cfd(CFD_MMCR), 32'hC30, p);
      issue(1'b0, a_cfd(CFD_MMCR), '0, p);
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
    logic [XLEN-1:0]   ra, ra2, p;
    logic [XLEN-1:0]   v [16], w [16];
    logic [IR_LEN-1:0] cap;
    longint unsigned   t0;
    int unsigned       r0;
    for (int k = 0; k < M_NUM; k++) mech[k] = 0;
    sel = 1'b0;
    #25 rst_n = 1'b1;
    drv.reset();
    drv.set_ir(IR_DBG, cap);

    // enable, enter monitoring mode with a break on the next instruction
    drv.dbg_write(a_cfd(CFD_MMCR), 32'h800);
    drv.dbg_write(a_bp(2), 32'(BP_ANY));
    poll_ds(1'b1);
    drv.dbg_write(a_bp(2), 32'(BP_OFF));
    drv.dbg_read(a_cfd(CFD_RDATA), ra);
    check(ra == u_core.epc, $sformatf("RA %h model %h", ra, u_core.epc));
    mech[M_ENTRY]++;

    t0 = drv.tck_count;
    read_regs(v);
    $display("TCK cycles, 16 register reads : %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++) begin
      check(v[i] == u_core.gpr[i], $sformatf("reg %0d read %h model %h", i, v[i], u_core.gpr[i]));
      mech[M_REG_R]++;
    end

    for (int i = 0; i < 16; i++) w[i] = $urandom;
    t0 = drv.tck_count;
    write_regs(w);
    $display("TCK cycles, 16 register writes: %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++) begin
      check(u_core.gpr[i] == w[i], $sformatf("reg %0d written", i));
      mech[M_REG_W]++;
    end

    for (int i = 0; i < 16; i++) w[i] = $urandom;
    t0 = drv.tck_count;
    write_mem(32'h1100, w);
    $display("TCK cycles, 16 memory writes  : %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++) begin
      check(u_core.dmem[(32'h1100 >> 2) % 256 + i] == w[i], $sformatf("mem %0d written", i));
      mech[M_MEM_W]++;
    end

    t0 = drv.tck_count;
    read_mem(32'h1100, v);
    $display("TCK cycles, 16 memory reads   : %0d", drv.tck_count - t0);
    for (int i = 0; i < 16; i++) begin
      check(v[i] == w[i], $sformatf("mem %0d read %h wrote %h", i, v[i], w[i]));
      mech[M_MEM_R]++;
    end

    // single-step, counted with the register restore and save around it
    for (int s = 0; s < 2; s++) begin
      r0 = u_core.retired;
      t0 = drv.tck_count;
      drv.dbg_write(a_bp(2), 32'(BP_ANY));
      for (int i = 0; i < 16; i++) w[i] = u_core.gpr[i];
      write_regs(w);
      drv.dbg_write(a_cfd(CFD_MMCR), 32'hC04);
      poll_ds(1'b1);
      drv.dbg_write(a_bp(2), 32'(BP_OFF));
      drv.dbg_read(a_cfd(CFD_RDATA), ra2);
      read_regs(v);
      if (s == 0)
        $display("TCK cycles, single-step       : %0d", drv.tck_count - t0);
      check(ra2 == ((ra + 4) & 32'hFF), $sformatf("step RA %h after %h", ra2, ra));
      check(u_core.retired == r0 + 1, "exactly one instruction per step");
      for (int i = 0; i < 16; i++)
        check(v[i] == u_core.gpr[i], $sformatf("reg %0d saved after step", i));
      ra = ra2;
      mech[M_SSTEP]++;
    end

    // leave, then stop again on an address breakpoint
    drv.dbg_write(a_cfd(CFD_MMCR), 32'hC04);
    poll_ds(1'b0);
    repeat (40) @(posedge clk);
    check(u_core.retired > r0 + 30, "core resumed");
    mech[M_RESUME]++;
    drv.dbg_write(a_bp(BP_STATUS), 32'h3);   // clear the hits of breakpoint 0
    drv.dbg_write(a_bp(4), 32'h48);
    drv.dbg_write(a_bp(6), 32'(BP_IADR));
    poll_ds(1'b1);
    drv.dbg_read(a_cfd(CFD_RDATA), ra);
    check(ra == 32'h4C, $sformatf("stopped after 0x48, RA %h", ra));
    drv.dbg_read(a_bp(BP_STATUS), p);
    check(p[1:0] == 2'b10, "hit status of breakpoint 1");
    mech[M_IBP]++;
    mech[M_ENTRY]++;
    drv.dbg_write(a_bp(6), 32'(BP_OFF));
    drv.dbg_write(a_cfd(CFD_MMCR), 32'hC04);
    poll_ds(1'b0);
    mech[M_RESUME]++;

    check(direct_bad == 0, $sformatf("ext_bkpt_en differed from int_bkpt_en in %0d cycles", direct_bad));
    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-32s : %0d", mech_name[k], mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s never happened", mech_name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
