// ijtag_trim_subnetwork: the IJTAG subnetwork of a comparator-based self-trim
// (called "subnetwork2" in the example system).
//
// Two SIBs, one per register unit, each guarding one register:
//   unit 1 "ResultUnit": a 1-bit capture cell that samples the comparator;
//   unit 0 "TrimUnit":   a 10-bit configuration register that drives the
//                        trim value of the analog block.
// The SIB with the highest address is nearest the serial input, so the scan
// path is  si -> [ComparatorResult] -> SIB1 -> [TrimValue] -> SIB0 -> so,
// where a bracketed register is in the path only while its SIB is open.
// With both SIBs closed the subnetwork is 2 bits long; with the TrimUnit open
// it is 12 bits, with the ResultUnit open 3 bits.
//
// The subnetwork's select (from the IJTAG-Module's scan multiplexer) gates
// both SIBs; each SIB's select_out gates its register. The configuration
// register's mismatch flag is reported on the IJTAG-TDR-Interface error line.
// All timing is that of the cells: capture/shift on `rise`, updates on `fall`.
//
// From the design: the two units with their addresses, register sizes and
// cell types (TrimValue: 10 bits, hardware-read, configuration cell;
// ComparatorResult: 1 bit, hardware-written, capture cell) and the rule that
// the highest address is nearest the input. The comparator input is captured
// without a synchroniser; it is expected to be settled when captured.
module ijtag_trim_subnetwork
  import ijtag_pkg::*;
#(
  parameter int unsigned TRIM_WIDTH = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ijtag_tap_t            tap,
  input  ijtag_tdr_in_t         tdr_in,
  output ijtag_tdr_out_t        tdr_out,
  output logic [TRIM_WIDTH-1:0] trim_value,
  input  logic                  comparator
);
  logic sib1_so, sib1_sel, sib0_so, sib0_sel;
  logic res_so, trim_so, trim_err;
  logic sib1_open, sib0_open;
  logic res_po;

  // ---- unit 1: comparator result ------------------------------------------
  tdr_register #(.WIDTH(1), .HAS_CAPTURE(1'b1), .HAS_UPDATE(1'b0)) u_result (
    .clk, .rst_n, .rise(tap.rise), .fall(tap.fall), .select(sib1_sel),
    .capture(tap.capture), .shift(tap.shift), .update(tap.update),
    .si(tdr_in.si), .so(res_so), .pi(comparator), .po(res_po)
  );

  sib_cell u_sib1 (
    .clk, .rst_n, .rise(tap.rise), .fall(tap.fall), .select_in(tdr_in.select),
    .capture(tap.capture), .shift(tap.shift), .update(tap.update),
    .si_in(tdr_in.si), .so_in(res_so), .so(sib1_so), .select_out(sib1_sel),
    .open_o(sib1_open)
  );

  // ---- unit 0: trim value ---------------------------------------------------
  config_register #(.WIDTH(TRIM_WIDTH)) u_trim (
    .clk, .rst_n, .rise(tap.rise), .fall(tap.fall), .select(sib0_sel),
    .capture(tap.capture), .shift(tap.shift), .update(tap.update),
    .excfg(tap.excfg), .config_en(tap.config_en),
    .si(sib1_so), .so(trim_so), .po(trim_value), .error(trim_err)
  );

  sib_cell u_sib0 (
    .clk, .rst_n, .rise(tap.rise), .fall(tap.fall), .select_in(tdr_in.select),
    .capture(tap.capture), .shift(tap.shift), .update(tap.update),
    .si_in(sib1_so), .so_in(trim_so), .so(sib0_so), .select_out(sib0_sel),
    .open_o(sib0_open)
  );

  assign tdr_out.so    = sib0_so;
  assign tdr_out.error = trim_err;
endmodule
