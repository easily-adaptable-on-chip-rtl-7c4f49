// ea_mocd: on-chip debug architecture for a multicore processor (top level).
//
// One extended JTAG block, one multicore debug support unit (MDSU, the cross
// breakpoint manager) and one EA-EDU per core.  The cores are debugged in
// monitoring mode: when a core's comparator sees a breakpoint it raises
// int_bkpt_en; the MDSU combines these into ext_bkpt_en[j], which sends core j
// into a debug exception; the exception's service routine then serves the
// debugger's commands through the core's CFD coprocessor, while the core keeps
// running on the system clock.  The debugger reaches every debug register
// (CFD mailboxes, breakpoint register sets, CBM configuration) through the
// single JTAG port and the DBG instruction; SEL plus the JTAG selection
// register route the pins to one of NUM_IPS other JTAG-based IPs instead.
//
// Interface: JTAG pins (TCK, TMS, TDI, nTRST, SEL, TDO); the IPs' JTAG ports;
// system clock and reset; per core j the observed memory interface (I_*, D_*),
// Exception_ack, the coprocessor interface (COP_*) and ext_bkpt_en[j].
// With NUM_CORES = 1 the MDSU is left out and int_bkpt_en drives ext_bkpt_en
// directly, as for a single core.
//
// Timing: a breakpoint access at cycle t gives int_bkpt_en at t+1 and
// ext_bkpt_en in the same cycle (the CBM is combinational).  A debug register
// access reaches the system clock domain 2-3 system cycles after the JTAG
// Update-DR state.
//
// From the document: the block structure, the four-core default, the signal
// names at the core boundary and the single-core arrangement.  The number of
// other JTAG-based IPs is this design's own choice.
module ea_mocd
  import ea_mocd_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned NUM_IPS   = 4
) (
  // JTAG pins
  input  logic                  tck,
  input  logic                  tms,
  input  logic                  tdi,
  input  logic                  trst_n,
  input  logic                  sel,
  output logic                  tdo,
  output logic                  tdo_oe,
  // internal JTAG ports of other JTAG-based IPs
  output logic [NUM_IPS-1:0]    ip_tck,
  output logic [NUM_IPS-1:0]    ip_tms,
  output logic [NUM_IPS-1:0]    ip_tdi,
  output logic [NUM_IPS-1:0]    ip_trst_n,
  input  logic [NUM_IPS-1:0]    ip_tdo,
  // system clock
  input  logic                  clk,
  input  logic                  rst_n,
  // per-core memory interface (observed)
  input  logic [NUM_CORES-1:0]  i_req,
  input  logic [XLEN-1:0]       i_addr  [NUM_CORES],
  input  logic [XLEN-1:0]       i_data  [NUM_CORES],
  input  logic [NUM_CORES-1:0]  d_req,
  input  logic [NUM_CORES-1:0]  d_nrw,
  input  logic [XLEN-1:0]       d_addr  [NUM_CORES],
  input  logic [XLEN-1:0]       d_rdata [NUM_CORES],
  input  logic [XLEN-1:0]       d_wdata [NUM_CORES],
  input  logic [NUM_CORES-1:0]  exception_ack,
  // per-core coprocessor interface
  input  logic [NUM_CORES-1:0]  cop_req,
  input  logic [NUM_CORES-1:0]  cop_type,
  input  logic [COP_NUMB_W-1:0] cop_numb  [NUM_CORES],
  input  logic [XLEN-1:0]       cop_wdata [NUM_CORES],
  output logic [XLEN-1:0]       cop_rdata [NUM_CORES],
  // debug exception requests to the cores
  output logic [NUM_CORES-1:0]  ext_bkpt_en
);

  dbg_req_t             dbg_req;
  logic [XLEN-1:0]      dbg_rdata;
  logic [XLEN-1:0]      edu_rdata [NUM_CORES];
  logic [XLEN-1:0]      cbm_rdata;
  logic [NUM_CORES-1:0] int_bkpt_en;

  ext_jtag #(.NUM_IPS(NUM_IPS)) u_jtag (
    .tck, .tms, .tdi, .trst_n, .sel, .tdo, .tdo_oe,
    .ip_tck, .ip_tms, .ip_tdi, .ip_trst_n, .ip_tdo,
    .clk, .rst_n, .dbg_req, .dbg_rdata
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_edu
    ea_edu #(.CORE_ID(c)) u_edu (
      .clk, .rst_n,
      .dbg_req, .dbg_rdata (edu_rdata[c]),
      .i_req (i_req[c]), .i_addr (i_addr[c]), .i_data (i_data[c]),
      .d_req (d_req[c]), .d_nrw (d_nrw[c]), .d_addr (d_addr[c]),
      .d_rdata (d_rdata[c]), .d_wdata (d_wdata[c]),
      .exception_ack (exception_ack[c]),
      .cop_req (cop_req[c]), .cop_type (cop_type[c]), .cop_numb (cop_numb[c]),
      .cop_wdata (cop_wdata[c]), .cop_rdata (cop_rdata[c]),
      .int_bkpt_en (int_bkpt_en[c])
    );
  end

  if (NUM_CORES > 1) begin : g_mdsu
    mdsu #(.NUM_CORES(NUM_CORES)) u_mdsu (
      .clk, .rst_n, .dbg_req, .dbg_rdata (cbm_rdata),
      .int_bkpt_en, .ext_bkpt_en
    );
  end else begin : g_single
    assign cbm_rdata   = '0;
    assign ext_bkpt_en = int_bkpt_en;
  end

  always_comb begin
    dbg_rdata = cbm_rdata;
    for (int c = 0; c < NUM_CORES; c++) dbg_rdata |= edu_rdata[c];
  end

  initial assert (NUM_CORES >= 1 && NUM_CORES <= MAX_CORES)
    else $error("NUM_CORES must be 1..%0d", MAX_CORES);

endmodule
