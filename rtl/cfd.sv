// cfd: coprocessor for debug - the mailbox between a core and the debugger.
//
// In monitoring-mode debugging the core is never halted: a breakpoint sends it
// into a debug exception whose software service routine carries out the
// debugger's commands.  The CFD is the coprocessor through which the two
// sides talk.  It holds four 32-bit registers, reachable from the core over
// the coprocessor interface (COP_NUMB selects the register) and from the
// debugger over the debug register bus (unit CFD, low address bits):
//   0 MMCR   monitoring mode control register (12 bits, mmcr_t)
//   1 ADDR   address for a memory access          (debugger writes)
//   2 RDATA  value for the debugger                (core writes)
//   3 WDATA  value from the debugger               (debugger writes)
//
// MMCR handshake.  The debugger waits until D.EXP and C.ACK are both 1, writes
// ADDR/WDATA, then writes a command into the MMCR with D.ACK set.  The core's
// routine polls D.ACK, performs the command, puts a result into RDATA and
// writes the MMCR with C.ACK set and D.ACK clear.  The hardware enforces:
//   - D.EXP is read-only and always shows Exception_ack;
//   - a debugger write loads every bit except D.EXP and clears C.ACK, so each
//     new command takes the registers away from the debugger;
//   - a core write changes only D.ACK and C.ACK;
//   - entering the debug exception (rising Exception_ack) clears D.ACK, so a
//     command from before the exception is not taken as a new one.
// EN is sent to the comparator, which ignores breakpoints while it is 0.
//
// Timing: register writes take effect at the next clock edge; coprocessor and
// debug-bus read data are combinational in the request cycle.  When both sides
// write the MMCR in one cycle the debugger's write wins.
//
// From the document: the coprocessor interface signals, the MMCR fields and
// their meaning, the address / read data / write data registers and the
// polling protocol.  This design's own: the register numbers, the read-only
// and clear rules above and the single-cycle coprocessor timing.
module cfd
  import ea_mocd_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // debug register bus (already decoded for this core)
  input  dbg_req_t              dbg_req,
  output logic [XLEN-1:0]       dbg_rdata,
  // coprocessor interface
  input  logic                  cop_req,
  input  logic                  cop_type,   // 1: core writes, 0: core reads
  input  logic [COP_NUMB_W-1:0] cop_numb,
  input  logic [XLEN-1:0]       cop_wdata,  // core -> CFD
  output logic [XLEN-1:0]       cop_rdata,  // CFD -> core
  input  logic                  exception_ack,
  output logic                  en,
  output mmcr_t                 mmcr
);

  mmcr_t           mmcr_q;
  logic [XLEN-1:0] addr_q, rdata_q, wdata_q;
  logic            exc_d;

  logic dbg_sel, dbg_wr, cop_wr;
  assign dbg_sel = dbg_req.valid && dbg_unit(dbg_req.addr) == UNIT_CFD
                && dbg_req.addr[3:2] == 2'b00;
  assign dbg_wr  = dbg_sel && dbg_req.wr;
  assign cop_wr  = cop_req && cop_type && cop_numb[COP_NUMB_W-1:2] == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mmcr_q  <= '0;
      addr_q  <= '0;
      rdata_q <= '0;
      wdata_q <= '0;
      exc_d   <= 1'b0;
    end else begin
      exc_d <= exception_ack;

      // MMCR
      if (dbg_wr && cfd_reg_e'(dbg_req.addr[1:0]) == CFD_MMCR) begin
        mmcr_q       <= mmcr_t'(dbg_req.wdata[MMCR_W-1:0]);
        mmcr_q.d_exp <= 1'b0;
        mmcr_q.c_ack <= 1'b0;
      end else if (cop_wr && cfd_reg_e'(cop_numb[1:0]) == CFD_MMCR) begin
        mmcr_q.d_ack <= cop_wdata[MMCR_DACK];
        mmcr_q.c_ack <= cop_wdata[MMCR_CACK];
      end else if (exception_ack && !exc_d) begin
        mmcr_q.d_ack <= 1'b0;
      end

      // debugger -> core
      if (dbg_wr && cfd_reg_e'(dbg_req.addr[1:0]) == CFD_ADDR)  addr_q  <= dbg_req.wdata;
      if (dbg_wr && cfd_reg_e'(dbg_req.addr[1:0]) == CFD_WDATA) wdata_q <= dbg_req.wdata;
      // core -> debugger
      if (cop_wr && cfd_reg_e'(cop_numb[1:0]) == CFD_RDATA)     rdata_q <= cop_wdata;
    end
  end

  always_comb begin
    mmcr       = mmcr_q;
    mmcr.d_exp = exception_ack;
  end
  assign en = mmcr_q.en;

  function automatic logic [XLEN-1:0] reg_read(input logic [1:0] n);
    unique case (cfd_reg_e'(n))
      CFD_MMCR:  return XLEN'(mmcr);
      CFD_ADDR:  return addr_q;
      CFD_RDATA: return rdata_q;
      default:   return wdata_q;
    endcase
  endfunction

  always_comb begin
    dbg_rdata = '0;
    if (dbg_sel && !dbg_req.wr) dbg_rdata = reg_read(dbg_req.addr[1:0]);
  end

  always_comb begin
    cop_rdata = '0;
    if (cop_req && !cop_type && cop_numb[COP_NUMB_W-1:2] == '0) cop_rdata = reg_read(cop_numb[1:0]);
  end

endmodule
