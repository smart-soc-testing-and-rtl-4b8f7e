// config_register: a chain of configuration cells for analog trim and
// configuration values, protected against unintended changes.
//
// Each bit has three stages: a capture-shift stage (CS), an update stage (U)
// and a config stage (Cfg) that drives the parallel output `po`. In normal
// operation an update copies CS into U; when `excfg` is high (EXCFG
// instruction) an update instead copies U into Cfg. Both kinds of update only
// happen while `config_en` is high, so the configuration can be locked. The
// register is self-capturing: a capture loads U into CS, so the value last
// written can be read back. `error` is the OR over all bits of U XOR Cfg; it
// flags a configuration whose two copies disagree (for instance a bit flip).
// Writing a value therefore takes two scan operations: one update to U, then
// one update under EXCFG to move U into Cfg.
//
// Timing: capture/shift on `rise` cycles, updates on `fall` cycles, all gated
// by `select`. Shift order as for every TDR: bit WIDTH-1 next to `si`, bit 0
// drives `so`.
//
// From the design: the three stages, the EXCFG steering, the lock and the
// U/Cfg comparison. This design's choices: capture loads U (not Cfg), one
// `config_en` gates both kinds of update, and both U and Cfg reset to
// RESET_VALUE, so no error is flagged after reset.
module config_register #(
  parameter int unsigned      WIDTH       = 10,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rise,
  input  logic             fall,
  input  logic             select,
  input  logic             capture,
  input  logic             shift,
  input  logic             update,
  input  logic             excfg,
  input  logic             config_en,
  input  logic             si,
  output logic             so,
  output logic [WIDTH-1:0] po,
  output logic             error
);
  logic [WIDTH-1:0] cs_q, u_q, cfg_q;
  logic upd;

  assign upd = fall && select && update && config_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q  <= '0;
      u_q   <= RESET_VALUE;
      cfg_q <= RESET_VALUE;
    end else begin
      if (rise && select && shift)        cs_q <= (cs_q >> 1) | (WIDTH'(si) << (WIDTH-1));
      else if (rise && select && capture) cs_q <= u_q;
      if (upd && !excfg)                  u_q   <= cs_q;
      if (upd &&  excfg)                  cfg_q <= u_q;
    end
  end

  assign so    = cs_q[0];
  assign po    = cfg_q;
  assign error = |(u_q ^ cfg_q);
endmodule
