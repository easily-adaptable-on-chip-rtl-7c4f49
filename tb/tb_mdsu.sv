// tb_mdsu: checks the cross breakpoint manager.
//
// Programs random stop-mode value/mask pairs for each output over the debug
// register bus, reads them back, drives random int_bkpt_en patterns and
// compares every ext_bkpt_en bit with a reference that evaluates the stop
// condition bit by bit.  Also checks the typical uses: "core 0 stops all"
// and "each core stops only itself", and that the reset state requests
// nothing.
//
// The compare-with-stop-value, OR-with-mask and AND-over-cores structure
// comes from the source design.  Per-output registers and "all masked = off"
// belong to this implementation.
module tb_mdsu;
  import ea_mocd_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dbg_req_t        dbg_req;
  logic [XLEN-1:0] dbg_rdata;
  logic [N-1:0]    int_bkpt_en, ext_bkpt_en;

  int checks = 0, failures = 0;
  logic [N-1:0] ref_stop [N];
  logic [N-1:0] ref_mask [N];

  mdsu #(.NUM_CORES(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input logic wr, input logic [3:0] core, input logic [3:0] r,
                     input logic [XLEN-1:0] wd, output logic [XLEN-1:0] rd);
    dbg_req = '{valid: 1'b1, wr: wr, addr: {UNIT_CBM, core, r}, wdata: wd};
    #1 rd = dbg_rdata;
    @(posedge clk); #1;
    dbg_req = '0;
  endtask

  task automatic prog(input int j, input logic [N-1:0] s, input logic [N-1:0] m);
    logic [XLEN-1:0] r;
    bus(1'b1, 4'(j), CBM_STOP, XLEN'(s), r);
    bus(1'b1, 4'(j), CBM_MASK, XLEN'(m), r);
    ref_stop[j] = s;
    ref_mask[j] = m;
  endtask

  function automatic logic ref_ext(input int j, input logic [N-1:0] ib);
    logic ok = 1'b1, any_unmasked = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (!ref_mask[j][i]) begin
        any_unmasked = 1'b1;
        if (ib[i] != ref_stop[j][i]) ok = 1'b0;
      end
    end
    return ok && any_unmasked;
  endfunction

  task automatic compare_all(input string tag);
    for (int v = 0; v < (1 << N); v++) begin
      int_bkpt_en = N'(v);
      #1;
      for (int j = 0; j < N; j++)
        check(ext_bkpt_en[j] == ref_ext(j, N'(v)),
              $sformatf("%s: out %0d in %b got %b", tag, j, N'(v), ext_bkpt_en[j]));
    end
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
    dbg_req = '0;
    int_bkpt_en = '0;
    for (int j = 0; j < N; j++) begin ref_stop[j] = '0; ref_mask[j] = '1; end
    #12 rst_n = 1'b1;
    @(posedge clk); #1;

    compare_all("reset");

    // core 0 stops every core
    for (int j = 0; j < N; j++) prog(j, 4'b0001, 4'b1110);
    compare_all("core0 stops all");
    int_bkpt_en = 4'b0001; #1;
    check(ext_bkpt_en == 4'b1111, "core0 breakpoint -> all stop");

    // each core stops itself only
    for (int j = 0; j < N; j++) prog(j, N'(1 << j), ~N'(1 << j));
    int_bkpt_en = 4'b0100; #1;
    check(ext_bkpt_en == 4'b0100, "private breakpoint");

    // random conditions
    for (int it = 0; it < 20; it++) begin
      for (int j = 0; j < N; j++) prog(j, N'($urandom), N'($urandom));
      for (int j = 0; j < N; j++) begin
        bus(1'b0, 4'(j), CBM_STOP, '0, r);
        check(r == XLEN'(ref_stop[j]), $sformatf("read stop %0d", j));
        bus(1'b0, 4'(j), CBM_MASK, '0, r);
        check(r == XLEN'(ref_mask[j]), $sformatf("read mask %0d", j));
      end
      compare_all($sformatf("random %0d", it));
    end

    // requests for another unit are ignored
    dbg_req = '{valid: 1'b1, wr: 1'b1, addr: {UNIT_CFD, 4'd0, CBM_MASK}, wdata: 32'h0};
    @(posedge clk); #1 dbg_req = '0;
    bus(1'b0, 4'd0, CBM_MASK, '0, r);
    check(r == XLEN'(ref_mask[0]), "other unit ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
