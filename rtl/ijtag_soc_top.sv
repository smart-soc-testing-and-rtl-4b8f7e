// ijtag_soc_top: on-chip test infrastructure of an SoC, giving both the
// external tester (JTAG port) and the CPU (APB bus) access to one
// reconfigurable scan network of IJTAG subnetworks.
//
// Blocks and wiring:
//   tck_edge_detect        samples TCK/TMS/TDI with the system clock;
//   jtag_module            IEEE 1149.1 TAP, IR, BYPASS, IDCODE; drives the
//                          boundary scan register and the IJTAG instructions;
//   boundary_scan_register BSC around BSC_LEN border signals;
//   apb_module             CPU-side scan controller behind a 16-bit APB port;
//   ijtag_module           remote scan multiplexers joining the subnetworks;
//   ijtag_trim_subnetwork  subnetwork 2: 10-bit trim value, comparator input.
// Subnetworks 0 and 1 are not part of this block; their IJTAG-TDR-Interfaces
// are ports, together with the shared IJTAG-TAP-Interface.
//
// `jtag_apb_switch` selects the controller of the IJTAG-Module: 1 = APB
// module, 0 = JTAG module. All IJTAG-Module inputs (enables, serial input,
// instruction selects, rise/fall) are multiplexed by it; its serial outputs
// go back to both controllers. The switch is static: change it only when no
// scan operation is in progress. There is a single clock domain: with the APB
// module in control every system clock edge acts as both edges, with the JTAG
// module in control the sampled TCK edges are used.
//
// Parameters: BSC_LEN (not given by the design, assumed 8). The number of
// subnetworks (3), the instruction codes and the 10-bit trim value are those
// of the example system.
module ijtag_soc_top
  import ijtag_pkg::*;
#(
  parameter int unsigned BSC_LEN = 8
) (
  input  logic                sysclk,
  input  logic                sysrst_n,
  input  logic                jtag_apb_switch,
  // APB slave port
  input  logic                apb_psel,
  input  logic                apb_penable,
  input  logic                apb_pwrite,
  input  logic [15:0]         apb_paddr,
  input  logic [15:0]         apb_pwdata,
  output logic [15:0]         apb_prdata,
  output logic                apb_pready,
  output logic                apb_pslverr,
  // JTAG port
  input  logic                jtag_tck,
  input  logic                jtag_tms,
  input  logic                jtag_tdi,
  output logic                jtag_tdo,
  // JTAG-TAP side outputs
  output jtag_tap_t           jtag_tap,
  output jtag_tap_ext_t       jtag_tap_ext,
  output logic                jtag_bypass_sel,
  output logic                jtag_idcode_sel,
  output logic                jtag_sample_preload_sel,
  output logic                jtag_extest_sel,
  output logic                jtag_tap_clock_rising,
  output logic                jtag_tap_clock_falling,
  // boundary scan register
  input  logic [BSC_LEN-1:0]  bsc_sys_in,
  output logic [BSC_LEN-1:0]  bsc_sys_out,
  // IJTAG network
  output ijtag_tap_t          ijtag,
  output ijtag_tdr_in_t       subnetwork0_in,
  input  ijtag_tdr_out_t      subnetwork0_out,
  output ijtag_tdr_in_t       subnetwork1_in,
  input  ijtag_tdr_out_t      subnetwork1_out,
  input  logic                ijtag_config_lock,
  output logic                ijtag_error,
  output logic                ijtag_tap_clock_rising,
  output logic                ijtag_tap_clock_falling,
  // subnetwork 2 sideband: trimmed analog unit and comparator
  output logic [9:0]          trim_value,
  input  logic                comparator,
  // status
  output logic                apb_busy
);
  // ---- JTAG side -------------------------------------------------------------
  logic rise, fall, tms_s, tdi_s;
  tck_edge_detect u_edge (
    .clk(sysclk), .rst_n(sysrst_n), .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi),
    .rise, .fall, .tms_s, .tdi_s
  );

  logic       bsc_select, bsc_so, bsc_mode;
  logic [2:0] jtag_ext_sel, ext_so;
  instr_t     jtag_ir, apb_ir;

  jtag_module u_jtag (
    .clk(sysclk), .rst_n(sysrst_n), .rise, .fall, .tms(tms_s), .tdi(tdi_s),
    .tdo(jtag_tdo), .tap(jtag_tap), .tap_ext(jtag_tap_ext),
    .bsc_select, .bsc_so, .bsc_mode,
    .bypass_sel(jtag_bypass_sel), .idcode_sel(jtag_idcode_sel),
    .sample_preload_sel(jtag_sample_preload_sel), .extest_sel(jtag_extest_sel),
    .ext_select(jtag_ext_sel), .ext_so, .ir_o(jtag_ir)
  );
  assign jtag_tap_clock_rising  = rise;
  assign jtag_tap_clock_falling = fall;

  boundary_scan_register #(.N(BSC_LEN)) u_bsc (
    .clk(sysclk), .rst_n(sysrst_n), .rise(jtag_tap.rise), .fall(jtag_tap.fall),
    .select(bsc_select), .capture(jtag_tap.capture), .shift(jtag_tap.shift),
    .update(jtag_tap.update), .mode(bsc_mode), .si(jtag_tap.si), .so(bsc_so),
    .sys_in(bsc_sys_in), .sys_out(bsc_sys_out)
  );

  // ---- APB side ----------------------------------------------------------------
  jtag_tap_t  apb_tap;
  logic [2:0] apb_ext_sel;
  apb_module u_apb (
    .clk(sysclk), .rst_n(sysrst_n),
    .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite), .paddr(apb_paddr),
    .pwdata(apb_pwdata), .prdata(apb_prdata), .pready(apb_pready), .pslverr(apb_pslverr),
    .tap(apb_tap), .ext_select(apb_ext_sel), .ext_so, .busy(apb_busy), .ir_o(apb_ir)
  );

  // ---- controller switch in front of the IJTAG-Module -----------------------
  jtag_tap_t  ij_tap;
  logic [2:0] ij_sel;
  assign ij_tap = jtag_apb_switch ? apb_tap     : jtag_tap;
  assign ij_sel = jtag_apb_switch ? apb_ext_sel : jtag_ext_sel;

  // ---- IJTAG network ---------------------------------------------------------------
  ijtag_tdr_in_t  sub_in  [NUM_SUBNETS];
  ijtag_tdr_out_t sub_out [NUM_SUBNETS];
  logic [NUM_SUBNETS-1:0] mux_ctrl;

  ijtag_module #(.N(NUM_SUBNETS)) u_ijtag (
    .clk(sysclk), .rst_n(sysrst_n), .tap(ij_tap), .select(ij_sel), .so(ext_so),
    .ijtag_tap(ijtag), .sub_in, .sub_out, .config_lock(ijtag_config_lock),
    .error(ijtag_error), .mux_ctrl
  );
  assign ijtag_tap_clock_rising  = ijtag.rise;
  assign ijtag_tap_clock_falling = ijtag.fall;

  assign subnetwork0_in = sub_in[0];
  assign subnetwork1_in = sub_in[1];
  assign sub_out[0]     = subnetwork0_out;
  assign sub_out[1]     = subnetwork1_out;

  ijtag_trim_subnetwork #(.TRIM_WIDTH(10)) u_subnet2 (
    .clk(sysclk), .rst_n(sysrst_n), .tap(ijtag), .tdr_in(sub_in[2]),
    .tdr_out(sub_out[2]), .trim_value, .comparator
  );
endmodule
