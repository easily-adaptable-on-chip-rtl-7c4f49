// ea_edu: easily adaptable embedded debug unit, one per processor core.
//
// It pairs the breakpoint comparator, which watches the core's instruction and
// data memory interfaces and raises int_bkpt_en, with the coprocessor for
// debug (CFD), which is the mailbox between the core's debug exception routine
// and the debugger.  The core needs no change beyond offering a coprocessor
// interface and its memory interface signals: the EA-EDU only observes the
// memory bus and answers coprocessor accesses.
//
// Debug register bus requests are accepted when the address's core field
// equals CORE_ID; the unit field then selects comparator or CFD, and the two
// read-data outputs are ORed (each is zero unless selected).  The CFD's
// MMCR.EN enables the comparator.  Timing is that of the two sub-blocks:
// int_bkpt_en one cycle after the matching access, combinational reads.
//
// From the document: the composition (comparator + CFD), the connections to
// the core (I_*, D_*, Exception_ack, COP_*), to the extended JTAG and to the
// MDSU.  This design's own: the address decode and the EN connection.
module ea_edu
  import ea_mocd_pkg::*;
#(
  parameter int unsigned CORE_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dbg_req_t              dbg_req,
  output logic [XLEN-1:0]       dbg_rdata,
  // memory bus of the core (observed)
  input  logic                  i_req,
  input  logic [XLEN-1:0]       i_addr,
  input  logic [XLEN-1:0]       i_data,
  input  logic                  d_req,
  input  logic                  d_nrw,
  input  logic [XLEN-1:0]       d_addr,
  input  logic [XLEN-1:0]       d_rdata,
  input  logic [XLEN-1:0]       d_wdata,
  input  logic                  exception_ack,
  // coprocessor interface of the core
  input  logic                  cop_req,
  input  logic                  cop_type,
  input  logic [COP_NUMB_W-1:0] cop_numb,
  input  logic [XLEN-1:0]       cop_wdata,
  output logic [XLEN-1:0]       cop_rdata,
  // to the MDSU
  output logic                  int_bkpt_en
);

  dbg_req_t        req_local;
  logic [XLEN-1:0] cmp_rdata, cfd_rdata;
  logic            en;
  mmcr_t           mmcr;

  always_comb begin
    req_local       = dbg_req;
    req_local.valid = dbg_req.valid && 32'(dbg_core(dbg_req.addr)) == CORE_ID;
  end

  bp_comparator u_cmp (
    .clk, .rst_n,
    .dbg_req (req_local), .dbg_rdata (cmp_rdata),
    .i_req, .i_addr, .i_data,
    .d_req, .d_nrw, .d_addr, .d_rdata, .d_wdata,
    .exception_ack, .en,
    .int_bkpt_en
  );

  cfd u_cfd (
    .clk, .rst_n,
    .dbg_req (req_local), .dbg_rdata (cfd_rdata),
    .cop_req, .cop_type, .cop_numb, .cop_wdata, .cop_rdata,
    .exception_ack, .en, .mmcr
  );

  assign dbg_rdata = cmp_rdata | cfd_rdata;

endmodule
