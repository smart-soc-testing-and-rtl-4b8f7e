// tap_controller: the 16-state IEEE 1149.1 TAP state machine.
//
// The state advances on every `rise` enable according to TMS (the standard
// state diagram). From the state, the controller decodes the enables that the
// instruction register and the test data registers use: capture and shift
// act on the next `rise`, update acts on the next `fall`, so the register
// clock sensitivity of the standard (capture/shift on the rising edge, update
// on the falling edge) is kept while everything is clocked by the system
// clock. The extension outputs (idle, reset, pause) report Run-Test/Idle,
// Test-Logic-Reset and Pause-DR.
//
// The state diagram and the extension outputs follow the design; the
// asynchronous system reset into Test-Logic-Reset is this design's choice (the
// JTAG port has no TRST pin; five TCK cycles with TMS high also reset it).
module tap_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic rise,
  input  logic tms,
  output logic capture_dr,
  output logic shift_dr,
  output logic update_dr,
  output logic capture_ir,
  output logic shift_ir,
  output logic update_ir,
  output logic test_logic_reset,
  output logic run_test_idle,
  output logic pause_dr,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    S_TLR        = 4'h0,
    S_RTI        = 4'h1,
    S_SELECT_DR  = 4'h2,
    S_CAPTURE_DR = 4'h3,
    S_SHIFT_DR   = 4'h4,
    S_EXIT1_DR   = 4'h5,
    S_PAUSE_DR   = 4'h6,
    S_EXIT2_DR   = 4'h7,
    S_UPDATE_DR  = 4'h8,
    S_SELECT_IR  = 4'h9,
    S_CAPTURE_IR = 4'hA,
    S_SHIFT_IR   = 4'hB,
    S_EXIT1_IR   = 4'hC,
    S_PAUSE_IR   = 4'hD,
    S_EXIT2_IR   = 4'hE,
    S_UPDATE_IR  = 4'hF
  } tap_state_e;

  tap_state_e state, next;

  always_comb begin
    unique case (state)
      S_TLR:        next = tms ? S_TLR       : S_RTI;
      S_RTI:        next = tms ? S_SELECT_DR : S_RTI;
      S_SELECT_DR:  next = tms ? S_SELECT_IR : S_CAPTURE_DR;
      S_CAPTURE_DR: next = tms ? S_EXIT1_DR  : S_SHIFT_DR;
      S_SHIFT_DR:   next = tms ? S_EXIT1_DR  : S_SHIFT_DR;
      S_EXIT1_DR:   next = tms ? S_UPDATE_DR : S_PAUSE_DR;
      S_PAUSE_DR:   next = tms ? S_EXIT2_DR  : S_PAUSE_DR;
      S_EXIT2_DR:   next = tms ? S_UPDATE_DR : S_SHIFT_DR;
      S_UPDATE_DR:  next = tms ? S_SELECT_DR : S_RTI;
      S_SELECT_IR:  next = tms ? S_TLR       : S_CAPTURE_IR;
      S_CAPTURE_IR: next = tms ? S_EXIT1_IR  : S_SHIFT_IR;
      S_SHIFT_IR:   next = tms ? S_EXIT1_IR  : S_SHIFT_IR;
      S_EXIT1_IR:   next = tms ? S_UPDATE_IR : S_PAUSE_IR;
      S_PAUSE_IR:   next = tms ? S_EXIT2_IR  : S_PAUSE_IR;
      S_EXIT2_IR:   next = tms ? S_UPDATE_IR : S_SHIFT_IR;
      S_UPDATE_IR:  next = tms ? S_SELECT_DR : S_RTI;
      default:      next = S_TLR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= S_TLR;
    else if (rise) state <= next;
  end

  assign capture_dr       = (state == S_CAPTURE_DR);
  assign shift_dr         = (state == S_SHIFT_DR);
  assign update_dr        = (state == S_UPDATE_DR);
  assign capture_ir       = (state == S_CAPTURE_IR);
  assign shift_ir         = (state == S_SHIFT_IR);
  assign update_ir        = (state == S_UPDATE_IR);
  assign test_logic_reset = (state == S_TLR);
  assign run_test_idle    = (state == S_RTI);
  assign pause_dr         = (state == S_PAUSE_DR);
  assign state_o          = state;
endmodule
