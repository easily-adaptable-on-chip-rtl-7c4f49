// tap_controller: IEEE 1149.1 test access port state machine.
//
// The sixteen-state TAP machine advances on each rising TCK edge on which
// `tck_en` is high, following TMS as the standard prescribes.  An active-low
// nTRST resets it asynchronously to Test-Logic-Reset; five TCK cycles with
// TMS high reach the same state from anywhere.  Besides the state it gives
// one-hot strobes for the states the data and instruction registers act on.
//
// The document only names this block as the single TAP controller of the
// extended JTAG; its behaviour is that of the standard.  `tck_en` is this
// design's addition: it freezes the TAP while the JTAG pins are routed to
// another JTAG-based IP.
module tap_controller
  import ea_mocd_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tck_en,
  input  logic       tms,
  output tap_state_e state,
  output logic       test_logic_reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);

  tap_state_e nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SEL_DR    : RTI;
      SEL_DR:     nxt = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR    : RTI;
      SEL_IR:     nxt = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR    : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)     state <= TLR;
    else if (tck_en) state <= nxt;
  end

  assign test_logic_reset = (state == TLR);
  assign capture_dr       = (state == CAPTURE_DR);
  assign shift_dr         = (state == SHIFT_DR);
  assign update_dr        = (state == UPDATE_DR);
  assign capture_ir       = (state == CAPTURE_IR);
  assign shift_ir         = (state == SHIFT_IR);
  assign update_ir        = (state == UPDATE_IR);

endmodule
