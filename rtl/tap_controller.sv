// tap_controller: the IEEE 1149.1 test access port state machine of the MOCD
// JTAG block. TMS is sampled on the rising edge of TCK and walks the sixteen
// standard states; nTRST (active low, asynchronous) forces Test-Logic-Reset.
// Besides the state it gives the decoded strobes the registers need:
// capture/shift for rising-edge use and update for falling-edge use, for the
// data path (dr) and the instruction path (ir), plus Run-Test/Idle (rti),
// which the clock controller uses to issue controlled clock pulses.
// The state machine is the standard one; the document names the TAP only.
module tap_controller
  import mocd_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output dr_ctrl_t   dr,
  output dr_ctrl_t   ir,
  output logic       rti,
  output logic       tlr
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TAP_TLR:        next = tms ? TAP_TLR      : TAP_RTI;
      TAP_RTI:        next = tms ? TAP_SEL_DR   : TAP_RTI;
      TAP_SEL_DR:     next = tms ? TAP_SEL_IR   : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: next = tms ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   next = tms ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   next = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   next = tms ? TAP_EXIT2_DR : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   next = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  next = tms ? TAP_SEL_DR   : TAP_RTI;
      TAP_SEL_IR:     next = tms ? TAP_TLR      : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: next = tms ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   next = tms ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   next = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   next = tms ? TAP_EXIT2_IR : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   next = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  next = tms ? TAP_SEL_DR   : TAP_RTI;
      default:        next = TAP_TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TAP_TLR;
    else         state <= next;
  end

  assign dr.capture = (state == TAP_CAPTURE_DR);
  assign dr.shift   = (state == TAP_SHIFT_DR);
  assign dr.update  = (state == TAP_UPDATE_DR);
  assign ir.capture = (state == TAP_CAPTURE_IR);
  assign ir.shift   = (state == TAP_SHIFT_IR);
  assign ir.update  = (state == TAP_UPDATE_IR);
  assign rti        = (state == TAP_RTI);
  assign tlr        = (state == TAP_TLR);

endmodule
