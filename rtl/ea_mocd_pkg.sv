// ea_mocd_pkg: types and constants shared by the on-chip debug blocks.
//
// The debug architecture is reached from a single JTAG port.  Inside the
// system-clock domain every debug-visible register (coprocessor-for-debug
// registers, breakpoint register sets, cross-breakpoint configuration) sits on
// one small register bus driven by the extended JTAG block.  This package
// holds that bus's request/response structs, its address map, the layout of
// the monitoring mode control register (MMCR) and the JTAG instruction codes.
//
// The MMCR bit positions come from the design's register definition (12 bits:
// EN, D.ACK, register number, R/W, R/M, PS, SS&END, D.EXP, C.ACK).  The debug
// bus, its address map and the JTAG instruction codes are this design's own
// choices; the document names the registers but gives no encodings for them.
package ea_mocd_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned XLEN       = 32;  // 32-bit RISC cores
  localparam int unsigned DBG_AW     = 10;  // debug register bus address
  localparam int unsigned IR_LEN     = 4;   // JTAG instruction register
  localparam int unsigned MMCR_W     = 12;  // monitoring mode control register
  localparam int unsigned COP_NUMB_W = 5;   // coprocessor register number

  // ------------------------------------------------------------ MMCR bits
  localparam int unsigned MMCR_EN     = 11;
  localparam int unsigned MMCR_DACK   = 10;
  localparam int unsigned MMCR_RNUM_H = 9;
  localparam int unsigned MMCR_RNUM_L = 6;
  localparam int unsigned MMCR_RW     = 5;
  localparam int unsigned MMCR_RM     = 4;
  localparam int unsigned MMCR_PS     = 3;
  localparam int unsigned MMCR_SSEND  = 2;
  localparam int unsigned MMCR_DEXP   = 1;
  localparam int unsigned MMCR_CACK   = 0;

  typedef struct packed {
    logic       en;      // [11] debug architecture enabled
    logic       d_ack;   // [10] core may access the CFD registers
    logic [3:0] regnum;  // [9:6] register number for register read/write
    logic       rw;      // [5] 0 read, 1 write
    logic       rm;      // [4] 0 register, 1 memory
    logic       ps;      // [3] processor status operation
    logic       ss_end;  // [2] single-step / end of debug
    logic       d_exp;   // [1] core is in the debug exception
    logic       c_ack;   // [0] debugger may access the CFD registers
  } mmcr_t;

  // ------------------------------------------- CFD coprocessor registers
  // Same numbering on the coprocessor interface (COP_NUMB) and on the debug
  // bus (low address bits).
  typedef enum logic [1:0] {
    CFD_MMCR  = 2'd0,
    CFD_ADDR  = 2'd1,
    CFD_RDATA = 2'd2,   // core -> debugger
    CFD_WDATA = 2'd3    // debugger -> core
  } cfd_reg_e;

  // ------------------------------------------- breakpoint register set
  // Per breakpoint b (0 or 1): base 4*b; +0 address, +1 data, +2 control.
  // Register 8 is the hit status (one sticky bit per breakpoint, write 1 to
  // clear).
  localparam int unsigned NUM_BP      = 2;
  localparam int unsigned MAX_CORES   = 16;
  localparam logic [3:0]  BP_STATUS   = 4'd8;

  typedef enum logic [1:0] {
    BPK_INSTR  = 2'd0,  // instruction fetch
    BPK_DREAD  = 2'd1,  // data read
    BPK_DWRITE = 2'd2,  // data write
    BPK_DANY   = 2'd3   // data read or write
  } bp_kind_e;

  typedef struct packed {
    logic       any_addr;  // [4] match every access of this kind
    logic       data_cmp;  // [3] also compare the data word
    bp_kind_e   kind;      // [2:1]
    logic       enable;    // [0]
  } bp_ctrl_t;

  // ------------------------------------------------ debug bus address map
  // addr[9:8] unit, addr[7:4] core index (up to 16 cores), addr[3:0] register.
  typedef enum logic [1:0] {
    UNIT_CFD = 2'd0,
    UNIT_BP  = 2'd1,
    UNIT_CBM = 2'd2
  } dbg_unit_e;
  // CBM registers (core field = output index j): 0 stop-mode value,
  // 1 stop-mode mask.
  localparam logic [3:0] CBM_STOP = 4'd0;
  localparam logic [3:0] CBM_MASK = 4'd1;

  typedef struct packed {
    logic              valid;  // one system-clock cycle per access
    logic              wr;     // 1 write, 0 read
    logic [DBG_AW-1:0] addr;
    logic [XLEN-1:0]   wdata;
  } dbg_req_t;

  function automatic dbg_unit_e dbg_unit(input logic [DBG_AW-1:0] a);
    return dbg_unit_e'(a[9:8]);
  endfunction

  function automatic logic [3:0] dbg_core(input logic [DBG_AW-1:0] a);
    return a[7:4];
  endfunction

  // ------------------------------------------------ JTAG instructions
  localparam logic [IR_LEN-1:0] IR_EXTEST  = 4'h0;
  localparam logic [IR_LEN-1:0] IR_IDCODE  = 4'h1;
  localparam logic [IR_LEN-1:0] IR_SAMPLE  = 4'h2;
  localparam logic [IR_LEN-1:0] IR_JSEL    = 4'h8;  // JTAG selection register
  localparam logic [IR_LEN-1:0] IR_DBG     = 4'h9;  // debug register access
  localparam logic [IR_LEN-1:0] IR_BYPASS  = 4'hF;

  // Debug data register: {wr, addr, data}, shifted LSB first.
  localparam int unsigned DBG_DR_LEN = 1 + DBG_AW + XLEN;

  // ------------------------------------------------ TAP states
  typedef enum logic [3:0] {
    TLR        = 4'h0, RTI        = 4'h1,
    SEL_DR     = 4'h2, CAPTURE_DR = 4'h3, SHIFT_DR = 4'h4, EXIT1_DR = 4'h5,
    PAUSE_DR   = 4'h6, EXIT2_DR   = 4'h7, UPDATE_DR = 4'h8,
    SEL_IR     = 4'h9, CAPTURE_IR = 4'hA, SHIFT_IR = 4'hB, EXIT1_IR = 4'hC,
    PAUSE_IR   = 4'hD, EXIT2_IR   = 4'hE, UPDATE_IR = 4'hF
  } tap_state_e;

endpackage
