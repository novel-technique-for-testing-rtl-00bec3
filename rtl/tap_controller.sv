// tap_controller: the sixteen-state test access port controller of a
// boundary-scan device (IEEE 1149.1 state diagram), clocked by the system
// clock that the test uses as TCK.
//
// TMS is sampled on every rising edge and moves the state as the standard
// defines. The outputs are one-cycle strobes for the data register: `capture`
// while in Capture-DR, `shift` while in Shift-DR, `update` while in Update-DR
// (the register acts on the edge that leaves the state). Only the data-
// register side is used by the test; the instruction register is not
// modelled, the boundary-scan register being taken as always selected. The
// document only names the TAP controller and counts its cycles (three to
// update, three to capture); the state machine itself is the standard one.
// `rst_n` is an asynchronous reset to Test-Logic-Reset (standing for TRST).
module tap_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic tms,
  output logic capture,
  output logic shift,
  output logic update,
  output logic in_reset
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SHIFT_DR, EXIT1_DR, PAUSE_DR, EXIT2_DR, UPD_DR,
    SEL_IR, CAP_IR, SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPD_IR
  } tap_state_e;

  tap_state_e state, next;

  always_comb begin
    unique case (state)
      TLR:      next = tms ? TLR      : RTI;
      RTI:      next = tms ? SEL_DR   : RTI;
      SEL_DR:   next = tms ? SEL_IR   : CAP_DR;
      CAP_DR:   next = tms ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR: next = tms ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR: next = tms ? UPD_DR   : PAUSE_DR;
      PAUSE_DR: next = tms ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR: next = tms ? UPD_DR   : SHIFT_DR;
      UPD_DR:   next = tms ? SEL_DR   : RTI;
      SEL_IR:   next = tms ? TLR      : CAP_IR;
      CAP_IR:   next = tms ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR: next = tms ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR: next = tms ? UPD_IR   : PAUSE_IR;
      PAUSE_IR: next = tms ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR: next = tms ? UPD_IR   : SHIFT_IR;
      default:  next = tms ? SEL_DR   : RTI;  // UPD_IR
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= TLR;
    else        state <= next;
  end

  assign capture  = (state == CAP_DR);
  assign shift    = (state == SHIFT_DR);
  assign update   = (state == UPD_DR);
  assign in_reset = (state == TLR);
endmodule
