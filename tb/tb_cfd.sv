// tb_cfd: checks the coprocessor for debug.
//
// Plays both sides of one monitoring-mode command: the debugger writes ADDR,
// WDATA and an MMCR command, the core reads them over the coprocessor
// interface, answers in RDATA and hands the registers back with C.ACK.
// Checks the MMCR rules: D.EXP mirrors Exception_ack and cannot be written, a
// debugger write clears C.ACK, a core write changes only D.ACK and C.ACK,
// entering the exception clears D.ACK, EN drives `en`, and reads from both
// sides return the same registers.
//
// The MMCR fields and the handshake come from the source design.  The write
// rules checked here are this implementation's own.
module tb_cfd;
  import ea_mocd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dbg_req_t              dbg_req;
  logic [XLEN-1:0]       dbg_rdata;
  logic                  cop_req, cop_type, exception_ack, en;
  logic [COP_NUMB_W-1:0] cop_numb;
  logic [XLEN-1:0]       cop_wdata, cop_rdata;
  mmcr_t                 mmcr;

  int checks = 0, failures = 0;

  cfd dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dbg(input logic wr, input cfd_reg_e r, input logic [XLEN-1:0] wd,
                     output logic [XLEN-1:0] rd);
    dbg_req = '{valid: 1'b1, wr: wr, addr: {UNIT_CFD, 4'd0, 2'b00, r}, wdata: wd};
    #1 rd = dbg_rdata;
    @(posedge clk); #1;
    dbg_req = '0;
  endtask

  task automatic cop(input logic wr, input cfd_reg_e r, input logic [XLEN-1:0] wd,
                     output logic [XLEN-1:0] rd);
    cop_req = 1; cop_type = wr; cop_numb = COP_NUMB_W'(r); cop_wdata = wd;
    #1 rd = cop_rdata;
    @(posedge clk); #1;
    cop_req = 0;
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] r;
    dbg_req = '0; cop_req = 0; cop_type = 0; cop_numb = 0; cop_wdata = 0;
    exception_ack = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;

    check(!en && mmcr == '0, "reset state");

    // Start: enable
    dbg(1'b1, CFD_MMCR, 32'h800, r);
    check(en, "EN drives en");
    dbg(1'b0, CFD_MMCR, 0, r);
    check(r == 32'h800, $sformatf("MMCR read %h", r));

    // core enters exception: D.EXP follows Exception_ack
    exception_ack = 1;
    #1 check(mmcr.d_exp, "D.EXP mirrors Exception_ack");
    @(posedge clk); #1;
    // core routine: RDATA <- return address, hand registers to debugger
    cop(1'b1, CFD_RDATA, 32'h0000_0124, r);
    cop(1'b1, CFD_MMCR, 32'h0000_0FFF, r);   // only D.ACK and C.ACK taken
    dbg(1'b0, CFD_MMCR, 0, r);
    check(r == 32'hC03, $sformatf("core write limited to D.ACK/C.ACK, D.EXP set: %h", r));
    cop(1'b1, CFD_MMCR, 32'h1, r);            // C.ACK=1, D.ACK=0
    dbg(1'b0, CFD_MMCR, 0, r);
    check(r == 32'h803, $sformatf("debugger sees D.EXP & C.ACK: %h", r));
    dbg(1'b0, CFD_RDATA, 0, r);
    check(r == 32'h124, "debugger reads RDATA (return address)");

    // memory write command: ADDR, WDATA, MMCR = EN|D.ACK|R/W|R/M
    dbg(1'b1, CFD_ADDR,  32'h0000_2000, r);
    dbg(1'b1, CFD_WDATA, 32'hA5A5_0001, r);
    dbg(1'b1, CFD_MMCR,  32'hC33, r);         // C.ACK and D.EXP bits written as 1
    cop(1'b0, CFD_MMCR, 0, r);
    check(r[11:0] == 12'hC32, $sformatf("debugger write clears C.ACK, D.EXP read-only: %h", r));
    cop(1'b0, CFD_ADDR, 0, r);
    check(r == 32'h2000, "core reads ADDR");
    cop(1'b0, CFD_WDATA, 0, r);
    check(r == 32'hA5A5_0001, "core reads WDATA");
    cop(1'b1, CFD_MMCR, 32'h1, r);
    dbg(1'b0, CFD_MMCR, 0, r);
    check(r == 32'h833, $sformatf("command done: %h", r));

    // the debugger cannot set D.EXP while the core is outside the exception
    exception_ack = 0;
    #1 check(!mmcr.d_exp, "D.EXP low outside the exception");
    dbg(1'b1, CFD_MMCR, 32'hC06, r);          // command pending, then re-entry
    exception_ack = 1;
    @(posedge clk); #1;
    check(!mmcr.d_ack, "entering the exception clears D.ACK");
    check(mmcr.ss_end, "other command bits kept");

    // simultaneous writes: debugger wins
    dbg_req = '{valid: 1'b1, wr: 1'b1, addr: {UNIT_CFD, 4'd0, 2'b00, CFD_MMCR}, wdata: 32'h808};
    cop_req = 1; cop_type = 1; cop_numb = COP_NUMB_W'(CFD_MMCR); cop_wdata = 32'h401;
    @(posedge clk); #1;
    dbg_req = '0; cop_req = 0;
    check(mmcr[11:0] == 12'h80A, $sformatf("debugger wins: %h", mmcr));

    // reads on other units/numbers return zero
    cop(1'b0, cfd_reg_e'(0), 0, r);
    cop_req = 1; cop_type = 0; cop_numb = 5'd4;
    #1 check(cop_rdata == 0, "unknown coprocessor register reads 0");
    @(posedge clk); #1 cop_req = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
