// ijtag_module: bridge from a JTAG-style controller to the reconfigurable scan
// network (RSN) made of IJTAG subnetworks.
//
// The subnetworks are joined by remote-controlled scan multiplexers. Their
// control bits live in a separate N-bit TDR (selected by the SIB instruction);
// bit i includes subnetwork i. For every subnetwork a 2:1 multiplexer chooses
// between the serial input that reaches it and its serial output; the result
// is the serial input of the next subnetwork. Subnetwork N-1 is first in the
// chain (nearest SI), subnetwork 0 last (nearest SO), following the
// LSB-first shift rule. An included subnetwork gets its select whenever the
// RSN itself is selected.
//
// Three instructions are served, one select/serial-output pair each:
//   [0] IJTAG - the RSN, normal updates;
//   [1] SIB   - the multiplexer control TDR (capture returns its state);
//   [2] EXCFG - the RSN, with ExCfg high so updates of configuration cells
//               move their update stage into their config stage.
// ConfigEn, the configuration permission sent to every subnetwork, is the
// inverse of `config_lock`. The error lines of all subnetworks are ORed and
// reported only while configuration is locked, so configuration sequences
// cannot raise an error.
//
// Timing: pure wiring plus the control TDR; capture/shift on `rise`, update
// on `fall`, as delivered by the controller. The controller's `rise`/`fall`
// are forwarded to the subnetworks.
//
// From the design: remote multiplexers in a separate TDR of one bit per
// subnetwork, the three instructions, the chain order, ExCfg and the masked
// error collection. This design's choices: reset excludes all subnetworks and
// `config_lock` high means locked.
module ijtag_module
  import ijtag_pkg::*;
#(
  parameter int unsigned N = NUM_SUBNETS
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the controller (JTAG-TAP-Interface + three JTAG-TDR-Interfaces)
  input  jtag_tap_t      tap,
  input  logic [2:0]     select,
  output logic [2:0]     so,
  // towards the subnetworks
  output ijtag_tap_t     ijtag_tap,
  output ijtag_tdr_in_t  sub_in  [N],
  input  ijtag_tdr_out_t sub_out [N],
  // configuration lock and error monitor
  input  logic           config_lock,
  output logic           error,
  output logic [N-1:0]   mux_ctrl
);
  logic rsn_sel;
  logic ctrl_so;
  logic [N:0] chain;
  logic [N-1:0] err;

  assign rsn_sel = select[0] | select[2];

  // ---- multiplexer control TDR (SIB instruction) ---------------------------
  tdr_register #(.WIDTH(N), .HAS_CAPTURE(1'b1), .HAS_UPDATE(1'b1)) u_ctrl (
    .clk, .rst_n, .rise(tap.rise), .fall(tap.fall), .select(select[1]),
    .capture(tap.capture), .shift(tap.shift), .update(tap.update),
    .si(tap.si), .so(ctrl_so), .pi(mux_ctrl), .po(mux_ctrl)
  );

  // ---- scan multiplexer network --------------------------------------------
  assign chain[N] = tap.si;
  for (genvar i = 0; i < N; i++) begin : g_sub
    assign sub_in[i].si     = chain[i+1];
    assign sub_in[i].select = mux_ctrl[i] & rsn_sel;
    assign chain[i]         = mux_ctrl[i] ? sub_out[i].so : chain[i+1];
    assign err[i]           = sub_out[i].error;
  end

  assign so[0] = chain[0];
  assign so[1] = ctrl_so;
  assign so[2] = chain[0];

  // ---- shared IJTAG-TAP-Interface ------------------------------------------
  assign ijtag_tap = '{rise: tap.rise, fall: tap.fall, capture: tap.capture,
                       shift: tap.shift, update: tap.update,
                       excfg: select[2], config_en: ~config_lock};

  assign error = (|err) & config_lock;
endmodule
