// bp_comparator: breakpoint register set and comparator of one EA-EDU.
//
// The comparator watches its core's instruction and data memory interfaces
// and raises int_bkpt_en when an access matches one of the NUM_BP (two)
// programmed breakpoints.  Each breakpoint b has three registers on the debug
// register bus (unit BP): address (4b+0), data (4b+1) and control (4b+2,
// bp_ctrl_t: enable, kind, data compare, any address).  Register 8 holds one
// sticky hit bit per breakpoint; writing 1 clears it.
//
// A breakpoint matches when it is enabled, an access of its kind is requested
// in this cycle (instruction fetch: I_REQ; data read: D_REQ with D_nRW=0; data
// write: D_REQ with D_nRW=1; data either), the address equals the programmed
// address (or "any address" is set), and, if data compare is set, the data
// word equals the programmed data (I_DATA for fetches, D_RDATA for reads,
// D_WDATA for writes; all are taken in the request cycle).  A watchpoint is a
// data-kind breakpoint; "any address" on the instruction kind stops at the
// next fetched instruction, which is how single-step and entry into monitoring
// mode are built.
//
// Timing: int_bkpt_en is a register, high from the cycle after the matching
// access until the core acknowledges with Exception_ack (or the debug
// architecture is disabled, `en` low).  While Exception_ack is high nothing
// matches, so the service routine's own accesses are never trapped.  An
// assertion checks that Exception_ack always clears int_bkpt_en one cycle later.
//
// From the document: the two-entry breakpoint register set programmed over
// JTAG, comparison against the core's memory access signals (the I_* and D_*
// signals and Exception_ack), and int_bkpt_en.  This design's own: the
// register map, the control fields, the data compare, the hold-until-
// acknowledge behaviour and the one-cycle latency.
module bp_comparator
  import ea_mocd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // debug register bus (already decoded for this core)
  input  dbg_req_t        dbg_req,
  output logic [XLEN-1:0] dbg_rdata,
  // core memory interface, monitored
  input  logic            i_req,
  input  logic [XLEN-1:0] i_addr,
  input  logic [XLEN-1:0] i_data,
  input  logic            d_req,
  input  logic            d_nrw,
  input  logic [XLEN-1:0] d_addr,
  input  logic [XLEN-1:0] d_rdata,
  input  logic [XLEN-1:0] d_wdata,
  input  logic            exception_ack,
  // MMCR.EN of the companion CFD
  input  logic            en,
  output logic            int_bkpt_en
);

  logic [XLEN-1:0] bp_addr [NUM_BP];
  logic [XLEN-1:0] bp_data [NUM_BP];
  bp_ctrl_t        bp_ctrl [NUM_BP];
  logic [NUM_BP-1:0] hit_status;

  // ------------------------------------------------ compare
  logic [NUM_BP-1:0] match;

  always_comb begin
    for (int b = 0; b < NUM_BP; b++) begin
      logic            req;
      logic [XLEN-1:0] a, d;
      unique case (bp_ctrl[b].kind)
        BPK_INSTR:  begin req = i_req;           a = i_addr; d = i_data;  end
        BPK_DREAD:  begin req = d_req & ~d_nrw;  a = d_addr; d = d_rdata; end
        BPK_DWRITE: begin req = d_req &  d_nrw;  a = d_addr; d = d_wdata; end
        default:    begin req = d_req;           a = d_addr; d = d_nrw ? d_wdata : d_rdata; end
      endcase
      match[b] = bp_ctrl[b].enable && req
              && (bp_ctrl[b].any_addr || a == bp_addr[b])
              && (!bp_ctrl[b].data_cmp || d == bp_data[b]);
    end
  end

  logic hit;
  assign hit = en && !exception_ack && (|match);

  // ------------------------------------------------ registers
  logic       sel;
  logic [3:0] ra;
  assign sel = dbg_req.valid && dbg_unit(dbg_req.addr) == UNIT_BP;
  assign ra  = dbg_req.addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BP; b++) begin
        bp_addr[b] <= '0;
        bp_data[b] <= '0;
        bp_ctrl[b] <= '0;
      end
      hit_status  <= '0;
      int_bkpt_en <= 1'b0;
    end else begin
      // breakpoint event, held until the core acknowledges
      if (exception_ack || !en) int_bkpt_en <= 1'b0;
      else if (hit)             int_bkpt_en <= 1'b1;

      for (int b = 0; b < NUM_BP; b++)
        if (hit && match[b]) hit_status[b] <= 1'b1;

      if (sel && dbg_req.wr) begin
        for (int b = 0; b < NUM_BP; b++) begin
          if (ra == 4'(4*b + 0)) bp_addr[b] <= dbg_req.wdata;
          if (ra == 4'(4*b + 1)) bp_data[b] <= dbg_req.wdata;
          if (ra == 4'(4*b + 2)) bp_ctrl[b] <= bp_ctrl_t'(dbg_req.wdata[$bits(bp_ctrl_t)-1:0]);
        end
        if (ra == BP_STATUS) hit_status <= hit_status & ~dbg_req.wdata[NUM_BP-1:0];
      end
    end
  end

  always_comb begin
    dbg_rdata = '0;
    if (sel && !dbg_req.wr) begin
      for (int b = 0; b < NUM_BP; b++) begin
        if (ra == 4'(4*b + 0)) dbg_rdata = bp_addr[b];
        if (ra == 4'(4*b + 1)) dbg_rdata = bp_data[b];
        if (ra == 4'(4*b + 2)) dbg_rdata = XLEN'(bp_ctrl[b]);
      end
      if (ra == BP_STATUS) dbg_rdata = XLEN'(hit_status);
    end
  end

  // the core's acknowledge always withdraws the request in the next cycle
  a_ack_clears: assert property (@(posedge clk)
                                 exception_ack |=> !int_bkpt_en);

endmodule
