// tck_edge_detect: samples the external JTAG pins with the system clock.
//
// The scan logic of this design has a single clock, the system clock. Rather
// than multiplexing TCK into the clock path, TCK is passed through a
// two-flop synchroniser and compared with its previous sample; the result is a
// one-cycle `rise` or `fall` enable that the TCK-domain registers use as their
// clock enable (rising-edge logic uses `rise`, falling-edge logic uses `fall`).
// TMS and TDI go through the same number of flops, so at the cycle where `rise`
// is set they show the values that were present at the TCK rising edge.
//
// Timing: `rise`/`fall` appear two to three system clock cycles after the TCK edge
// (two synchroniser stages, then the edge compare). TCK must therefore be
// oversampled: 3*t_sys + d_tck + d_out < t_tck/2, i.e. about 8x or more.
//
// The sampling scheme and the rising/falling outputs follow the edge
// detection transformation of the design; the synchroniser depth of two comes
// from its timing discussion. Reset value of the sampled TCK (low) is this
// design's choice.
module tck_edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic rise,      // one cycle after a sampled 0->1 of TCK
  output logic fall,      // one cycle after a sampled 1->0 of TCK
  output logic tms_s,     // TMS aligned with rise/fall
  output logic tdi_s      // TDI aligned with rise/fall
);
  logic [2:0] tck_q;
  logic [1:0] tms_q, tdi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_q <= '0;
      tms_q <= '1;
      tdi_q <= '0;
    end else begin
      tck_q <= {tck_q[1:0], tck};
      tms_q <= {tms_q[0], tms};
      tdi_q <= {tdi_q[0], tdi};
    end
  end

  // tck_q[1] is the synchronised TCK; tck_q[2] its previous value.
  assign rise  =  tck_q[1] & ~tck_q[2];
  assign fall  = ~tck_q[1] &  tck_q[2];
  assign tms_s = tms_q[1];
  assign tdi_s = tdi_q[1];
endmodule
