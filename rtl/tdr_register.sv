// tdr_register: a test data register built from capture-update cells.
//
// Each bit has a capture-shift stage and, optionally, an update stage. While
// `select` is high, a `capture` on a `rise` cycle loads the parallel input
// `pi` into the shift stages, a `shift` on a `rise` cycle moves the register
// one place towards `so` (bit WIDTH-1 sits next to `si`, bit 0 drives `so`, so
// the LSB is shifted in first), and an `update` on a `fall` cycle copies the
// shift stages to the update stages that drive `po`.
//
// Leaving out the capture logic gives update cells (capture keeps the shift
// stage), leaving out the update stage gives capture cells (`po` then follows
// the shift stage directly); both out gives shift-only cells. These cell
// types and the clock sensitivity follow the JTAG cell described in the
// design; the reset values (RESET_VALUE for the update stage, zero for the
// shift stage) are this design's choice.
module tdr_register #(
  parameter int unsigned     WIDTH       = 8,
  parameter bit              HAS_CAPTURE = 1'b1,
  parameter bit              HAS_UPDATE  = 1'b1,
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
  input  logic             si,
  output logic             so,
  input  logic [WIDTH-1:0] pi,
  output logic [WIDTH-1:0] po
);
  logic [WIDTH-1:0] cs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             cs_q <= '0;
    else if (rise && select && shift)       cs_q <= (cs_q >> 1) | (WIDTH'(si) << (WIDTH-1));
    else if (rise && select && capture && HAS_CAPTURE) cs_q <= pi;
  end
  assign so = cs_q[0];

  if (HAS_UPDATE) begin : g_update
    logic [WIDTH-1:0] u_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                           u_q <= RESET_VALUE;
      else if (fall && select && update)    u_q <= cs_q;
    end
    assign po = u_q;
  end else begin : g_no_update
    assign po = cs_q;
  end
endmodule
