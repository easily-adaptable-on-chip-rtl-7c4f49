// tb_ea_edu: checks one EA-EDU (comparator + CFD) as a unit.
//
// The unit is built with CORE_ID = 2.  Checks that debug-bus accesses for
// other cores are ignored, that the comparator only fires after MMCR.EN is
// set through the CFD, that int_bkpt_en follows the core's instruction bus and
// is cleared by Exception_ack, and that the CFD answers the core over the
// coprocessor interface while the read data of the two sub-blocks are merged.
//
// The comparator-plus-CFD structure comes from the source design.  The core
// decode of the debug-bus address is this implementation's own.
module tb_ea_edu;
  import ea_mocd_pkg::*;

  localparam int ID = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dbg_req_t              dbg_req;
  logic [XLEN-1:0]       dbg_rdata;
  logic                  i_req, d_req, d_nrw, exception_ack, int_bkpt_en;
  logic [XLEN-1:0]       i_addr, i_data, d_addr, d_rdata, d_wdata;
  logic                  cop_req, cop_type;
  logic [COP_NUMB_W-1:0] cop_numb;
  logic [XLEN-1:0]       cop_wdata, cop_rdata;

  int checks = 0, failures = 0;

  ea_edu #(.CORE_ID(ID)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input logic wr, input dbg_unit_e u, input int core, input logic [3:0] r,
                     input logic [XLEN-1:0] wd, output logic [XLEN-1:0] rd);
    dbg_req = '{valid: 1'b1, wr: wr, addr: {u, 4'(core), r}, wdata: wd};
    #1 rd = dbg_rdata;
    @(posedge clk); #1;
    dbg_req = '0;
  endtask

  task automatic fetch(input logic [XLEN-1:0] a);
    i_req = 1; i_addr = a;
    @(posedge clk); #1;
    i_req = 0;
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
    dbg_req = '0; exception_ack = 0;
    i_req = 0; i_addr = 0; i_data = 0; d_req = 0; d_nrw = 0; d_addr = 0; d_rdata = 0; d_wdata = 0;
    cop_req = 0; cop_type = 0; cop_numb = 0; cop_wdata = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;

    // breakpoint at 0x80 programmed for this core, and a decoy for core 1
    bus(1'b1, UNIT_BP, ID, 4'd0, 32'h80, r);
    bus(1'b1, UNIT_BP, ID, 4'd2, 32'h1, r);
    bus(1'b1, UNIT_BP, 1,  4'd0, 32'h90, r);
    bus(1'b0, UNIT_BP, ID, 4'd0, 0, r);
    check(r == 32'h80, $sformatf("own address kept %h", r));
    bus(1'b0, UNIT_BP, 1, 4'd0, 0, r);
    check(r == 0, "other core's request not answered");

    // EN still 0: no breakpoint
    fetch(32'h80);
    #1 check(!int_bkpt_en, "comparator idle while EN=0");

    // enable through the CFD, then hit
    bus(1'b1, UNIT_CFD, ID, 4'(CFD_MMCR), 32'h800, r);
    bus(1'b1, UNIT_CFD, 3,  4'(CFD_MMCR), 32'h000, r);   // other core: no effect
    fetch(32'h80);
    #1 check(int_bkpt_en, "breakpoint after EN=1");
    exception_ack = 1;
    @(posedge clk); #1;
    check(!int_bkpt_en, "cleared by Exception_ack");

    // core side: mailbox
    cop_req = 1; cop_type = 0; cop_numb = COP_NUMB_W'(CFD_MMCR);
    #1 check(cop_rdata == 32'h802, $sformatf("core reads MMCR with D.EXP %h", cop_rdata));
    @(posedge clk); #1;
    cop_type = 1; cop_numb = COP_NUMB_W'(CFD_RDATA); cop_wdata = 32'h84;
    @(posedge clk); #1;
    cop_req = 0;
    bus(1'b0, UNIT_CFD, ID, 4'(CFD_RDATA), 0, r);
    check(r == 32'h84, "debugger reads RDATA");
    bus(1'b0, UNIT_BP, ID, BP_STATUS, 0, r);
    check(r == 32'h1, "hit status through merged read data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
