// mdsu: multicore debug support unit, made of the cross breakpoint manager.
//
// Each core's comparator raises int_bkpt_en[i] when that core hits a
// breakpoint.  The CBM turns these into ext_bkpt_en[j], which forces core j
// into its debug exception, so that cores running related tasks stop together.
// For every output j there is a stop-mode value register and a stop-mode mask
// register (one bit per core):
//   term[i]         = (int_bkpt_en[i] XNOR stop_mode[j][i]) OR mask[j][i]
//   ext_bkpt_en[j]  = AND of term[0..N-1]  AND  (some bit of mask[j] is 0)
// so an unmasked bit demands that core i's breakpoint state equal the value
// bit, and a masked bit does not matter.  A condition with every bit masked is
// treated as switched off (the reset state), so the outputs stay low until the
// debugger programs a condition.  The output is combinational from the
// breakpoint inputs: every core sees its stop request in the same cycle.
//
// Configuration registers are written and read over the debug register bus
// (unit CBM, core field = j, register 0 value / 1 mask) in the system clock
// domain.  Read data is combinational in the request cycle.
//
// From the document: the value/mask register pair, the per-core compare with
// the value, the masking and the AND over cores.  This design's own: one
// register pair per output, the "all masked = off" rule, the register map.
module mdsu
  import ea_mocd_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dbg_req_t             dbg_req,
  output logic [XLEN-1:0]      dbg_rdata,
  input  logic [NUM_CORES-1:0] int_bkpt_en,
  output logic [NUM_CORES-1:0] ext_bkpt_en
);

  logic [NUM_CORES-1:0] stop_mode [NUM_CORES];
  logic [NUM_CORES-1:0] mask      [NUM_CORES];

  logic       sel;
  logic [3:0] j;
  assign sel = dbg_req.valid && dbg_unit(dbg_req.addr) == UNIT_CBM;
  assign j   = dbg_core(dbg_req.addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_CORES; k++) begin
        stop_mode[k] <= '0;
        mask[k]      <= '1;
      end
    end else if (sel && dbg_req.wr) begin
      for (int k = 0; k < NUM_CORES; k++) begin
        if (32'(j) == k && dbg_req.addr[3:0] == CBM_STOP) stop_mode[k] <= dbg_req.wdata[NUM_CORES-1:0];
        if (32'(j) == k && dbg_req.addr[3:0] == CBM_MASK) mask[k]      <= dbg_req.wdata[NUM_CORES-1:0];
      end
    end
  end

  always_comb begin
    dbg_rdata = '0;
    if (sel && !dbg_req.wr) begin
      for (int k = 0; k < NUM_CORES; k++) begin
        if (32'(j) == k && dbg_req.addr[3:0] == CBM_STOP) dbg_rdata = XLEN'(stop_mode[k]);
        if (32'(j) == k && dbg_req.addr[3:0] == CBM_MASK) dbg_rdata = XLEN'(mask[k]);
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_CORES; o++) begin
      logic [NUM_CORES-1:0] term;
      term = ~(int_bkpt_en ^ stop_mode[o]) | mask[o];
      ext_bkpt_en[o] = (&term) & ~(&mask[o]);
    end
  end

endmodule
