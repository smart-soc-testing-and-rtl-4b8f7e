// boundary_scan_register: the boundary scan chain (BSC) around the chip pins.
//
// One boundary scan cell per signal crossing the chip border. Each cell is a
// capture-update cell whose parallel output is not driven straight onto the
// signal: a mode multiplexer passes the functional value `sys_in` through in
// normal operation and the update stage's value in test mode (`mode` high,
// asserted by the EXTEST instruction). Capture always samples `sys_in`, so
// SAMPLE observes the border signals and PRELOAD fills the update stages,
// both without disturbing normal operation.
//
// Timing: capture/shift on `rise` cycles and update on `fall` cycles while
// `select` (SAMPLE/PRELOAD or EXTEST) is high. Bit N-1 is next to `si`.
//
// From the design: the cell structure and the role of the mode signal and the
// instructions. The number of cells (N) is not given and is a parameter here;
// the same cell type is used for inputs and outputs.
module boundary_scan_register #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rise,
  input  logic         fall,
  input  logic         select,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         mode,
  input  logic         si,
  output logic         so,
  input  logic [N-1:0] sys_in,   // functional value arriving at each cell
  output logic [N-1:0] sys_out   // value leaving each cell
);
  logic [N-1:0] upd;

  tdr_register #(.WIDTH(N), .HAS_CAPTURE(1'b1), .HAS_UPDATE(1'b1)) u_cells (
    .clk, .rst_n, .rise, .fall, .select, .capture, .shift, .update,
    .si, .so, .pi(sys_in), .po(upd)
  );

  assign sys_out = mode ? upd : sys_in;
endmodule
