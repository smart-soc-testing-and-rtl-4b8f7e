// sib_cell: Segment Insertion Bit (IEEE 1687), an in-line scan multiplexer.
//
// A one-bit register with a capture-shift stage and an update stage. The
// update stage decides whether the guarded segment is part of the scan path:
// when it is 1 the shift stage takes its input from the segment's serial
// output (`so_in`), so the segment sits in the path right before the SIB;
// when it is 0 the shift stage takes the predecessor's output (`si_in`) and
// the SIB behaves like a bypass bit. `select_out` (update stage AND
// `select_in`) enables the guarded segment's control signals. The shift stage
// output `so` feeds both the successor and the guarded segment's input.
// Capture loads the update stage's value, so a read-back shows the SIB state.
//
// Timing: capture/shift on `rise` cycles, update on `fall` cycles, all gated
// by `select_in`. Reset opens nothing (update stage 0), this design's choice.
module sib_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic rise,
  input  logic fall,
  input  logic select_in,
  input  logic capture,
  input  logic shift,
  input  logic update,
  input  logic si_in,       // serial output of the predecessor
  input  logic so_in,       // serial output of the guarded segment
  output logic so,          // shift stage: to successor and segment input
  output logic select_out,  // select of the guarded segment
  output logic open_o       // update stage (segment included)
);
  logic cs_q, u_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q <= 1'b0;
      u_q  <= 1'b0;
    end else begin
      if (rise && select_in && shift)        cs_q <= u_q ? so_in : si_in;
      else if (rise && select_in && capture) cs_q <= u_q;
      if (fall && select_in && update)       u_q  <= cs_q;
    end
  end

  assign so         = cs_q;
  assign select_out = u_q & select_in;
  assign open_o     = u_q;
endmodule
