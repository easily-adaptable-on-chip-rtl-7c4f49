// jtag_driver: testbench-side JTAG master (the probe a software debugger would
// drive).  Tasks are called hierarchically from the testbench.
//
// Each clock() call makes one TCK period of TCK_NS: TMS/TDI change while TCK
// is low, TDO is sampled at the rising edge (the device changes TDO on the
// falling edge).  `tck_count` counts the TCK cycles issued, so a testbench can
// measure the cost of a debug function in TCK cycles.  The DBG data register
// layout {wr, addr[9:0], data[31:0]} and the IR codes follow ea_mocd_pkg.
//
// The TAP state sequence follows IEEE 1149.1.  The scan helpers and the
// two-scan read are this testbench's own.
module jtag_driver
  import ea_mocd_pkg::*;
#(
  parameter int unsigned TCK_NS = 100
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  output logic trst_n,
  input  logic tdo
);

  longint unsigned tck_count = 0;
  logic            last_busy = 1'b0;

  initial begin
    tck = 1'b0; tms = 1'b1; tdi = 1'b0; trst_n = 1'b0;
  end

  task automatic clock(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #(TCK_NS / 2);
    tdo_v = tdo;
    tck = 1'b1;
    #(TCK_NS / 2);
    tck = 1'b0;
    tck_count++;
  endtask

  task automatic reset();
    logic d;
    trst_n = 1'b1;
    #(TCK_NS / 2);
    trst_n = 1'b0;
    #(TCK_NS * 2);
    trst_n = 1'b1;
    repeat (5) clock(1'b1, 1'b0, d);
    clock(1'b0, 1'b0, d);               // Run-Test/Idle
  endtask

  // From Run-Test/Idle, shift `len` bits of `din` (LSB first) through the
  // selected register and return to Run-Test/Idle.  ir=1 selects the IR path.
  task automatic scan(input bit ir, input logic [63:0] din, input int len,
                      output logic [63:0] dout);
    logic d;
    dout = '0;
    clock(1'b1, 1'b0, d);               // Select-DR
    if (ir) clock(1'b1, 1'b0, d);       // Select-IR
    clock(1'b0, 1'b0, d);               // Capture
    clock(1'b0, 1'b0, d);               // -> Shift
    for (int i = 0; i < len; i++) begin
      clock(i == len - 1, din[i], d);   // last bit moves to Exit1
      dout[i] = d;
    end
    clock(1'b1, 1'b0, d);               // Update
    clock(1'b0, 1'b0, d);               // Run-Test/Idle
  endtask

  task automatic set_ir(input logic [IR_LEN-1:0] code, output logic [IR_LEN-1:0] captured);
    logic [63:0] o;
    scan(1'b1, 64'(code), IR_LEN, o);
    captured = o[IR_LEN-1:0];
  endtask

  // One DBG scan: issue {wr, addr, data}, return what was captured
  // (busy flag, address and read data of the previous access).
  task automatic dbg_scan(input logic wr, input logic [DBG_AW-1:0] addr,
                          input logic [XLEN-1:0] data, output logic [XLEN-1:0] rdata);
    logic [63:0] o;
    scan(1'b0, 64'({wr, addr, data}), DBG_DR_LEN, o);
    rdata     = o[XLEN-1:0];
    last_busy = o[DBG_DR_LEN-1];
  endtask

  task automatic dbg_write(input logic [DBG_AW-1:0] addr, input logic [XLEN-1:0] data);
    logic [XLEN-1:0] r;
    dbg_scan(1'b1, addr, data, r);
  endtask

  // Read: the first scan issues the read, the second returns its data.
  task automatic dbg_read(input logic [DBG_AW-1:0] addr, output logic [XLEN-1:0] data);
    logic [XLEN-1:0] r;
    dbg_scan(1'b0, addr, '0, r);
    dbg_scan(1'b0, addr, '0, data);
  endtask

endmodule
