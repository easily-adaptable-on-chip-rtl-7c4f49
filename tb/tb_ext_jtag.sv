// tb_ext_jtag: self-checking test of the extended JTAG block.
//
// Checks: the IR capture pattern 0001, IDCODE after reset, the 1-bit BYPASS
// path, DBG writes and reads reaching a register model on the system-clock
// bus (the model is a 16-word array in this testbench), the busy flag, and
// the SEL/JSEL routing of TCK/TMS/TDI/nTRST/TDO to the selected JTAG-based IP.
// Each IP is modelled as a 1-bit register clocked by its own TCK.
//
// The TAP behaviour follows IEEE 1149.1.  The selection register and the pin
// routing follow the source design.  The instruction codes and the DBG
// register belong to this implementation.
module tb_ext_jtag;
  import ea_mocd_pkg::*;

  localparam int NIPS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tck, tms, tdi, trst_n, tdo, tdo_oe, sel;
  logic [NIPS-1:0] ip_tck, ip_tms, ip_tdi, ip_trst_n, ip_tdo;
  dbg_req_t        dbg_req;
  logic [XLEN-1:0] dbg_rdata;

  int checks = 0, failures = 0;

  ext_jtag #(.NUM_IPS(NIPS)) dut (.*);
  jtag_driver #(.TCK_NS(100)) drv (.tck, .tms, .tdi, .trst_n, .tdo);

  // system-side register model
  logic [XLEN-1:0] regs [16];
  int              n_req = 0;
  always_comb dbg_rdata = (dbg_req.valid && !dbg_req.wr) ? regs[dbg_req.addr[3:0]] : '0;
  always_ff @(posedge clk) if (rst_n && dbg_req.valid) begin
    n_req <= n_req + 1;
    if (dbg_req.wr) regs[dbg_req.addr[3:0]] <= dbg_req.wdata;
  end

  // JTAG-based IPs: 1-bit shift stage each, tracked with their own clocks
  logic [NIPS-1:0] ip_ff;
  int              ip_edges [NIPS];
  for (genvar k = 0; k < NIPS; k++) begin : g_ip
    always_ff @(posedge ip_tck[k]) begin
      ip_ff[k]    <= ip_tdi[k] ^ k[0];    // IP 1 and 3 invert, so they differ
      ip_edges[k] <= ip_edges[k] + 1;
    end
  end
  assign ip_tdo = ip_ff;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]       o;
    logic [IR_LEN-1:0] cap;
    logic [XLEN-1:0]   r;
    sel = 1'b0;
    for (int i = 0; i < 16; i++) regs[i] = 32'h1000 + i;
    for (int k = 0; k < NIPS; k++) ip_edges[k] = 0;
    ip_ff = '0;
    #20 rst_n = 1'b1;
    drv.reset();

    // IDCODE is the reset instruction
    drv.scan(1'b0, '0, 32, o);
    check(o[31:0] == 32'h1EAD_B0C1, $sformatf("IDCODE after reset %h", o[31:0]));

    // IR capture value and BYPASS: one-bit delay
    drv.set_ir(IR_BYPASS, cap);
    check(cap == 4'b0001, $sformatf("IR capture %b", cap));
    drv.scan(1'b0, 64'h0000_0000_0000_00B5, 9, o);
    check(o[8:0] == {8'hB5, 1'b0}, $sformatf("bypass delay %h", o[8:0]));

    // DBG: write three registers, read them back, check the model saw them
    drv.set_ir(IR_DBG, cap);
    drv.dbg_write(10'h005, 32'hDEAD_BEEF);
    drv.dbg_write(10'h00A, 32'h1234_5678);
    check(regs[5] == 32'hDEAD_BEEF, "DBG write reaches system bus");
    check(regs[10] == 32'h1234_5678, "DBG second write");
    drv.dbg_read(10'h005, r);
    check(r == 32'hDEAD_BEEF, $sformatf("DBG read back %h", r));
    check(!drv.last_busy, "not busy after slow scans");
    drv.dbg_read(10'h003, r);
    check(r == 32'h1003, $sformatf("DBG read untouched %h", r));
    check(n_req == 6, $sformatf("one system request per update: %0d", n_req));

    // IDCODE through the IR again
    drv.set_ir(IR_IDCODE, cap);
    drv.scan(1'b0, '0, 32, o);
    check(o[31:0] == 32'h1EAD_B0C1, "IDCODE via IR");

    // Select IP 1 then route the pins
    drv.set_ir(IR_JSEL, cap);
    drv.scan(1'b0, 64'd1, 2, o);
    drv.scan(1'b0, 64'd1, 2, o);
    check(o[1:0] == 2'd1, $sformatf("JSEL read back %0d", o[1:0]));
    sel = 1'b1;
    begin
      logic d;
      int   e0 [NIPS];
      for (int k = 0; k < NIPS; k++) e0[k] = ip_edges[k];
      drv.clock(1'b0, 1'b1, d);
      drv.clock(1'b0, 1'b0, d);
      check(d == 1'b0, "IP1 TDO (inverted 1) on TDO pin");
      drv.clock(1'b0, 1'b0, d);
      check(d == 1'b1, "IP1 TDO (inverted 0) on TDO pin");
      check(ip_edges[1] - e0[1] == 3, "selected IP clocked");
      check(ip_edges[0] == e0[0] && ip_edges[2] == e0[2] && ip_edges[3] == e0[3],
            "unselected IPs not clocked");
      check(ip_tms[0] == 1'b1 && ip_trst_n[0] == 1'b1, "unselected IP parked");
      check(tdo_oe == 1'b1, "TDO driven while routed");
    end
    sel = 1'b0;
    // local TAP was frozen: IR still JSEL
    drv.scan(1'b0, 64'd1, 2, o);
    check(o[1:0] == 2'd1, "TAP frozen while SEL high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
