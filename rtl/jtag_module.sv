// jtag_module: IEEE 1149.1 test access port for off-chip access (ATE).
//
// Holds the TAP controller, the instruction register (a shift stage plus a
// separate update stage, so the instruction changes only in Update-IR), and the
// two internal test data registers, BYPASS (1 bit) and IDCODE (32 bits). All
// other TDRs are outside: the boundary scan chain (BSC) and the three
// instructions of the IJTAG-Module (IJTAG, SIB, EXCFG). For them the module
// drives one shared JTAG-TAP-Interface (`tap`: enables plus TDI) and a select
// per register; their serial outputs come back on `bsc_so` and `ext_so`.
// SAMPLE/PRELOAD and EXTEST share one BSC select, their individual selects are
// side outputs, and `bsc_mode` switches the boundary cells to test mode under
// EXTEST. Any other instruction code selects BYPASS.
//
// Timing: the module works on the system clock with the `rise`/`fall`
// enables of a TCK sampler. IR and TDR capture/shift happen on `rise`, IR and
// TDR updates on `fall`, and TDO changes on `fall` (output on the falling TCK
// edge as the standard requires). Test-Logic-Reset loads IDCODE into the IR.
//
// From the design: the register set, the instruction codes of the example
// specification (IDCODE 1, SAMPLE/PRELOAD 19, EXTEST 18, BYPASS 255,
// IJTAG 8, SIB 9, EXCFG 10), the 8-bit IR and the IDCODE fields. This
// design's choices: the IR capture value 0000_0001 (the standard's "01" in the
// low bits) and TDO driven low outside Shift-IR/Shift-DR (two-state logic has
// no high impedance).
module jtag_module
  import ijtag_pkg::*;
#(
  parameter instr_t      IDX_IDCODE  = INSTR_IDCODE,
  parameter instr_t      IDX_SAMPLE  = INSTR_SAMPLE_PRELOAD,
  parameter instr_t      IDX_PRELOAD = INSTR_SAMPLE_PRELOAD,
  parameter instr_t      IDX_EXTEST  = INSTR_EXTEST,
  parameter instr_t      IDX_BYPASS  = INSTR_BYPASS,
  parameter instr_t      IDX_IJTAG   = INSTR_IJTAG,
  parameter instr_t      IDX_SIB     = INSTR_SIB,
  parameter instr_t      IDX_EXCFG   = INSTR_EXCFG,
  parameter logic [31:0] IDCODE      = IDCODE_VALUE
) (
  input  logic          clk,
  input  logic          rst_n,
  // sampled JTAG port
  input  logic          rise,
  input  logic          fall,
  input  logic          tms,
  input  logic          tdi,
  output logic          tdo,
  // shared JTAG-TAP-Interface and TAP extension signals
  output jtag_tap_t     tap,
  output jtag_tap_ext_t tap_ext,
  // boundary scan chain (JTAG-TDR-Interface plus sideband)
  output logic          bsc_select,
  input  logic          bsc_so,
  output logic          bsc_mode,
  output logic          bypass_sel,
  output logic          idcode_sel,
  output logic          sample_preload_sel,
  output logic          extest_sel,
  // IJTAG-Module instructions: [0]=IJTAG, [1]=SIB, [2]=EXCFG
  output logic [2:0]    ext_select,
  input  logic [2:0]    ext_so,
  output instr_t        ir_o
);
  logic capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  logic tlr, rti, pdr;

  tap_controller u_tap (
    .clk, .rst_n, .rise, .tms,
    .capture_dr, .shift_dr, .update_dr,
    .capture_ir, .shift_ir, .update_ir,
    .test_logic_reset(tlr), .run_test_idle(rti), .pause_dr(pdr),
    .state_o()
  );

  // ---- instruction register ----------------------------------------------
  instr_t ir_sr, ir_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_sr <= '0;
      ir_q  <= IDX_IDCODE;
    end else begin
      if (tlr)                    ir_q  <= IDX_IDCODE;
      else if (fall && update_ir) ir_q  <= ir_sr;
      if (rise && capture_ir)     ir_sr <= instr_t'(1);
      else if (rise && shift_ir)  ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
    end
  end
  assign ir_o = ir_q;

  // ---- instruction decode -------------------------------------------------
  logic known;
  always_comb begin
    idcode_sel         = (ir_q == IDX_IDCODE);
    sample_preload_sel = (ir_q == IDX_SAMPLE) || (ir_q == IDX_PRELOAD);
    extest_sel         = (ir_q == IDX_EXTEST);
    ext_select[0]      = (ir_q == IDX_IJTAG);
    ext_select[1]      = (ir_q == IDX_SIB);
    ext_select[2]      = (ir_q == IDX_EXCFG);
    known              = idcode_sel | sample_preload_sel | extest_sel | (|ext_select);
    bypass_sel         = (ir_q == IDX_BYPASS) || !known;
  end
  assign bsc_select = sample_preload_sel | extest_sel;
  assign bsc_mode   = extest_sel;

  // ---- internal TDRs: BYPASS and IDCODE ------------------------------------
  logic        bypass_q;
  logic [31:0] idcode_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bypass_q  <= 1'b0;
      idcode_sr <= '0;
    end else if (rise) begin
      if (bypass_sel && capture_dr)      bypass_q <= 1'b0;
      else if (bypass_sel && shift_dr)   bypass_q <= tdi;
      if (idcode_sel && capture_dr)      idcode_sr <= IDCODE;
      else if (idcode_sel && shift_dr)   idcode_sr <= {tdi, idcode_sr[31:1]};
    end
  end

  // ---- TDO: selected register output, changes on the falling edge -------
  logic dr_so;
  always_comb begin
    if (idcode_sel)              dr_so = idcode_sr[0];
    else if (bsc_select)         dr_so = bsc_so;
    else if (ext_select[0])      dr_so = ext_so[0];
    else if (ext_select[1])      dr_so = ext_so[1];
    else if (ext_select[2])      dr_so = ext_so[2];
    else                         dr_so = bypass_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                tdo <= 1'b0;
    else if (fall) begin
      if (shift_ir)            tdo <= ir_sr[0];
      else if (shift_dr)       tdo <= dr_so;
      else                     tdo <= 1'b0;
    end
  end

  // ---- interfaces towards external TDRs ------------------------------------
  assign tap = '{rise: rise, fall: fall, capture: capture_dr, shift: shift_dr,
                 update: update_dr, si: tdi};
  assign tap_ext = '{idle: rti, reset: tlr, pause: pdr};

  // the one-hot property of the decode
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({idcode_sel, sample_preload_sel, extest_sel, ext_select, bypass_sel}))
    else $error("jtag_module: more than one TDR selected");
endmodule
