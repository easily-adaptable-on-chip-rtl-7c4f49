// tb_bp_comparator: checks the breakpoint register set and comparator.
//
// Programs the two breakpoints over the debug register bus and checks:
// instruction address breakpoint, data-write watchpoint with data compare,
// data-read watchpoint, "any address" (next fetch), the one-cycle latency of
// int_bkpt_en, that it holds until Exception_ack and is cleared by it, that
// nothing matches during the exception or with EN low, the sticky hit status
// and its write-one-to-clear, and register read-back.
//
// The two breakpoints and the int_bkpt_en output come from the source design.
// The register map, the timing and the test values checked here belong to
// this implementation.
module tb_bp_comparator;
  import ea_mocd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dbg_req_t        dbg_req;
  logic [XLEN-1:0] dbg_rdata;
  logic            i_req, d_req, d_nrw, exception_ack, en, int_bkpt_en;
  logic [XLEN-1:0] i_addr, i_data, d_addr, d_rdata, d_wdata;

  int checks = 0, failures = 0;

  bp_comparator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input logic wr, input logic [3:0] r, input logic [XLEN-1:0] wd,
                     output logic [XLEN-1:0] rd);
    dbg_req = '{valid: 1'b1, wr: wr, addr: {UNIT_BP, 4'd0, r}, wdata: wd};
    #1 rd = dbg_rdata;
    @(posedge clk); #1;
    dbg_req = '0;
  endtask

  task automatic set_bp(input int b, input logic [XLEN-1:0] a, input logic [XLEN-1:0] d,
                        input bp_ctrl_t c);
    logic [XLEN-1:0] r;
    bus(1'b1, 4'(4*b),   a, r);
    bus(1'b1, 4'(4*b+1), d, r);
    bus(1'b1, 4'(4*b+2), XLEN'(c), r);
  endtask

  task automatic idle();
    i_req = 0; d_req = 0; d_nrw = 0;
    i_addr = 32'hFFFF_FFF0; d_addr = 32'hFFFF_FFF0;
  endtask

  // one access cycle; returns int_bkpt_en in the same and in the next cycle
  task automatic fetch(input logic [XLEN-1:0] a, input logic [XLEN-1:0] d,
                       output logic now, output logic next);
    i_req = 1; i_addr = a; i_data = d;
    #1 now = int_bkpt_en;
    @(posedge clk); #1;
    idle();
    next = int_bkpt_en;
  endtask

  task automatic daccess(input logic wr, input logic [XLEN-1:0] a, input logic [XLEN-1:0] d,
                         output logic next);
    d_req = 1; d_nrw = wr; d_addr = a;
    if (wr) d_wdata = d; else d_rdata = d;
    @(posedge clk); #1;
    idle();
    next = int_bkpt_en;
  endtask

  task automatic ack();
    exception_ack = 1;
    @(posedge clk); #1;
    check(!int_bkpt_en, "Exception_ack clears int_bkpt_en");
    exception_ack = 0;
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic now, nx;
    logic [XLEN-1:0] r;
    dbg_req = '0; exception_ack = 0; en = 1;
    i_data = 0; d_rdata = 0; d_wdata = 0;
    idle();
    #12 rst_n = 1'b1;
    @(posedge clk); #1;

    // nothing programmed: nothing happens
    fetch(32'h100, 0, now, nx);
    check(!nx, "no breakpoint after reset");

    // BP0: instruction address 0x140
    set_bp(0, 32'h140, 0, '{any_addr: 0, data_cmp: 0, kind: BPK_INSTR, enable: 1});
    fetch(32'h13C, 0, now, nx);
    check(!nx, "other address does not match");
    fetch(32'h140, 0, now, nx);
    check(!now && nx, "instruction breakpoint, one cycle later");
    repeat (3) @(posedge clk);
    #1 check(int_bkpt_en, "held until acknowledged");
    ack();
    bus(1'b0, BP_STATUS, 0, r);
    check(r[1:0] == 2'b01, $sformatf("hit status %b", r[1:0]));
    bus(1'b1, BP_STATUS, 32'h1, r);
    bus(1'b0, BP_STATUS, 0, r);
    check(r[1:0] == 2'b00, "hit status cleared by writing 1");

    // no match while in the exception
    exception_ack = 1;
    fetch(32'h140, 0, now, nx);
    check(!nx, "no match during exception");
    exception_ack = 0;

    // no match with EN low
    en = 0;
    fetch(32'h140, 0, now, nx);
    check(!nx, "no match with EN low");
    en = 1;

    // BP1: data write watchpoint at 0x2000 with value 0x55
    set_bp(1, 32'h2000, 32'h55, '{any_addr: 0, data_cmp: 1, kind: BPK_DWRITE, enable: 1});
    daccess(1'b1, 32'h2000, 32'h54, nx);
    check(!nx, "data compare rejects other value");
    daccess(1'b0, 32'h2000, 32'h55, nx);
    check(!nx, "read does not match a write watchpoint");
    daccess(1'b1, 32'h2000, 32'h55, nx);
    check(nx, "data write watchpoint");
    ack();
    bus(1'b0, BP_STATUS, 0, r);
    check(r[1:0] == 2'b10, $sformatf("status BP1 %b", r[1:0]));

    // BP1 as data read watchpoint, any value
    set_bp(1, 32'h2004, 0, '{any_addr: 0, data_cmp: 0, kind: BPK_DREAD, enable: 1});
    daccess(1'b1, 32'h2004, 32'h1, nx);
    check(!nx, "write does not match a read watchpoint");
    daccess(1'b0, 32'h2004, 32'h1, nx);
    check(nx, "data read watchpoint");
    ack();

    // BP1 any data access
    set_bp(1, 32'h2008, 0, '{any_addr: 0, data_cmp: 0, kind: BPK_DANY, enable: 1});
    daccess(1'b1, 32'h2008, 32'h1, nx);
    check(nx, "data read-or-write watchpoint on write");
    ack();

    // BP0: any address (next fetched instruction)
    set_bp(0, 0, 0, '{any_addr: 1, data_cmp: 0, kind: BPK_INSTR, enable: 1});
    fetch(32'h3000, 0, now, nx);
    check(nx, "any-address breakpoint");
    ack();

    // instruction breakpoint with data compare on the fetched word
    set_bp(0, 32'h40, 32'hCAFE, '{any_addr: 0, data_cmp: 1, kind: BPK_INSTR, enable: 1});
    fetch(32'h40, 32'hCAFD, now, nx);
    check(!nx, "instruction word compare rejects");
    fetch(32'h40, 32'hCAFE, now, nx);
    check(nx, "instruction word compare matches");
    ack();

    // disable both, read back registers
    set_bp(0, 32'h44, 32'h1, '{any_addr: 0, data_cmp: 0, kind: BPK_INSTR, enable: 0});
    bus(1'b0, 4'd0, 0, r);  check(r == 32'h44, "read BP0 address");
    bus(1'b0, 4'd1, 0, r);  check(r == 32'h1, "read BP0 data");
    bus(1'b0, 4'd6, 0, r);  check(r == 32'h07, $sformatf("read BP1 control %h", r));
    fetch(32'h44, 0, now, nx);
    check(!nx, "disabled breakpoint");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
