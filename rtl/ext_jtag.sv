// ext_jtag: extended JTAG block - one TAP for the whole multicore debug system.
//
// A standard IEEE 1149.1 part (TAP controller, 4-bit instruction register,
// 32-bit ID register, bypass register) is extended with user instructions
// that reuse the same instruction length:
//   JSEL  selects, through the JTAG selection register and a decoder, which of
//         NUM_IPS internal JTAG-based IPs the pins are routed to when the SEL
//         pin is high;
//   DBG   gives the debugger read/write access to every debug register of the
//         system-clock domain (CFD registers, breakpoint register sets, CBM
//         configuration) through a 43-bit data register {wr, addr[9:0], data}.
//
// SEL low: the pins drive this block's TAP.  SEL high: TCK, TMS, TDI and nTRST
// go to the selected IP and its TDO drives the TDO pin; the local TAP is then
// frozen (clock enable low).  Unselected IPs see TCK low, TMS high, TDI low,
// nTRST high.
//
// Clock domains: everything shifted is in the TCK domain; a debug access is
// handed to the system clock with a toggle handshake (two-flop synchronisers
// each way).  At Update-DR of DBG the request is latched and its toggle
// flipped; 2-3 system cycles later the request appears for one cycle on
// `dbg_req`, read data returned on `dbg_rdata` in that same cycle is stored,
// and an acknowledge toggle travels back.  Until it arrives the request is
// "busy": Capture-DR of DBG loads {busy, last address, last read data}, and an
// Update-DR while busy is dropped.  A debugger therefore reads the result of
// access n while it shifts in access n+1.  An assertion checks that each
// request lasts exactly one system cycle.
//
// From the document: one TAP shared by all cores, the extra instructions
// without a longer instruction register, the JTAG selection register and
// decoder, the SEL pin and the pin routing to the IPs' JTAG ports, TAP
// signals to the MDSU and EA-EDUs, separate TCK and system clock domains.
// This design's own: instruction codes, the DBG register and its handshake,
// the ID code value, the values parked on unselected IPs.
module ext_jtag
  import ea_mocd_pkg::*;
#(
  parameter int unsigned NUM_IPS    = 4,
  parameter logic [31:0] IDCODE_VAL = 32'h1EAD_B0C1
) (
  // JTAG pins
  input  logic               tck,
  input  logic               tms,
  input  logic               tdi,
  input  logic               trst_n,
  input  logic               sel,
  output logic               tdo,
  output logic               tdo_oe,
  // internal JTAG ports of the JTAG-based IPs
  output logic [NUM_IPS-1:0] ip_tck,
  output logic [NUM_IPS-1:0] ip_tms,
  output logic [NUM_IPS-1:0] ip_tdi,
  output logic [NUM_IPS-1:0] ip_trst_n,
  input  logic [NUM_IPS-1:0] ip_tdo,
  // system clock side: debug register bus
  input  logic               clk,
  input  logic               rst_n,
  output dbg_req_t           dbg_req,
  input  logic [XLEN-1:0]    dbg_rdata
);

  localparam int unsigned JSEL_W = (NUM_IPS > 1) ? $clog2(NUM_IPS) : 1;

  // ------------------------------------------------------------- TAP
  tap_state_e state;
  logic tlr, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;
  logic tck_en;

  assign tck_en = ~sel;

  tap_controller u_tap (
    .tck, .trst_n, .tck_en, .tms,
    .state,
    .test_logic_reset (tlr),
    .capture_dr (cap_dr), .shift_dr (sh_dr), .update_dr (upd_dr),
    .capture_ir (cap_ir), .shift_ir (sh_ir), .update_ir (upd_ir)
  );

  // ------------------------------------------------ instruction register
  logic [IR_LEN-1:0] ir_sr, ir;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sr <= '0;
      ir    <= IR_IDCODE;
    end else if (tck_en) begin
      if (tlr)         ir    <= IR_IDCODE;
      else if (upd_ir) ir    <= ir_sr;
      if (cap_ir)      ir_sr <= IR_LEN'(4'b0001);
      else if (sh_ir)  ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
    end
  end

  // ------------------------------------------------ data registers
  logic                  bypass_sr;
  logic [31:0]           id_sr;
  logic [JSEL_W-1:0]     jsel_sr, jsel;
  logic [DBG_DR_LEN-1:0] dbg_sr;

  // CDC state, TCK side
  logic                  req_tgl, busy;
  logic                  ack_s1, ack_s2;
  logic                  hold_wr;
  logic [DBG_AW-1:0]     hold_addr;
  logic [XLEN-1:0]       hold_wdata;
  // CDC state, system side (read data is quasi-static when not busy)
  logic [XLEN-1:0]       rdata_q;

  assign busy = req_tgl ^ ack_s2;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      bypass_sr  <= 1'b0;
      id_sr      <= '0;
      jsel_sr    <= '0;
      jsel       <= '0;
      dbg_sr     <= '0;
      req_tgl    <= 1'b0;
      hold_wr    <= 1'b0;
      hold_addr  <= '0;
      hold_wdata <= '0;
    end else if (tck_en) begin
      unique case (ir)
        IR_IDCODE: begin
          if (cap_dr)     id_sr <= IDCODE_VAL;
          else if (sh_dr) id_sr <= {tdi, id_sr[31:1]};
        end
        IR_JSEL: begin
          if (cap_dr)      jsel_sr <= jsel;
          else if (sh_dr)  jsel_sr <= JSEL_W'({tdi, jsel_sr} >> 1);
          else if (upd_dr) jsel    <= jsel_sr;
        end
        IR_DBG: begin
          if (cap_dr)     dbg_sr <= {busy, hold_addr, rdata_q};
          else if (sh_dr) dbg_sr <= {tdi, dbg_sr[DBG_DR_LEN-1:1]};
          else if (upd_dr && !busy) begin
            hold_wr    <= dbg_sr[DBG_DR_LEN-1];
            hold_addr  <= dbg_sr[XLEN +: DBG_AW];
            hold_wdata <= dbg_sr[XLEN-1:0];
            req_tgl    <= ~req_tgl;
          end
        end
        default: begin  // BYPASS and every unimplemented instruction
          if (cap_dr)     bypass_sr <= 1'b0;
          else if (sh_dr) bypass_sr <= tdi;
        end
      endcase
    end
  end

  // acknowledge synchroniser into TCK
  logic ack_tgl;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) {ack_s2, ack_s1} <= '0;
    else         {ack_s2, ack_s1} <= {ack_s1, ack_tgl};
  end

  // ------------------------------------------------ system clock side
  logic req_s1, req_s2, req_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {req_s3, req_s2, req_s1} <= '0;
    else        {req_s3, req_s2, req_s1} <= {req_s2, req_s1, req_tgl};
  end

  always_comb begin
    dbg_req.valid = req_s2 ^ req_s3;
    dbg_req.wr    = hold_wr;
    dbg_req.addr  = hold_addr;
    dbg_req.wdata = hold_wdata;
  end

  // each DBG update gives exactly one single-cycle access on the debug bus
  a_req_pulse: assert property (@(posedge clk)
                                dbg_req.valid |=> !dbg_req.valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata_q <= '0;
      ack_tgl <= 1'b0;
    end else if (dbg_req.valid) begin
      if (!dbg_req.wr) rdata_q <= dbg_rdata;
      ack_tgl <= ~ack_tgl;
    end
  end

  // ------------------------------------------------ TDO
  logic tdo_int, tdo_int_oe;

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo_int    <= 1'b0;
      tdo_int_oe <= 1'b0;
    end else begin
      tdo_int_oe <= tck_en & (sh_dr | sh_ir);
      if (sh_ir) tdo_int <= ir_sr[0];
      else begin
        unique case (ir)
          IR_IDCODE: tdo_int <= id_sr[0];
          IR_JSEL:   tdo_int <= jsel_sr[0];
          IR_DBG:    tdo_int <= dbg_sr[0];
          default:   tdo_int <= bypass_sr;
        endcase
      end
    end
  end

  // ------------------------------------------------ decoder and pin routing
  logic [NUM_IPS-1:0] ip_sel;

  always_comb begin
    ip_sel = '0;
    for (int k = 0; k < NUM_IPS; k++)
      ip_sel[k] = sel && (jsel == JSEL_W'(k));
  end

  always_comb begin
    for (int k = 0; k < NUM_IPS; k++) begin
      ip_tck[k]    = ip_sel[k] & tck;
      ip_tms[k]    = ip_sel[k] ? tms    : 1'b1;
      ip_tdi[k]    = ip_sel[k] ? tdi    : 1'b0;
      ip_trst_n[k] = ip_sel[k] ? trst_n : 1'b1;
    end
  end

  always_comb begin
    if (sel) begin
      tdo    = 1'b0;
      tdo_oe = 1'b1;
      for (int k = 0; k < NUM_IPS; k++)
        if (ip_sel[k]) tdo = ip_tdo[k];
    end else begin
      tdo    = tdo_int;
      tdo_oe = tdo_int_oe;
    end
  end

endmodule
