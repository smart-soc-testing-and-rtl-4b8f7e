// apb2csc_bridge: purely combinational bridge from an APB slave port to a
// single-cycle register data bus (address, data_in, rd_en, wr_en in;
// data_out, error out) with an added stall input. wr_req/rd_req report the
// access before the stall is applied, so the register block can decide
// whether to stall it.
//
// An APB access phase (PSEL and PENABLE high) turns into a one-cycle read or
// write strobe on the data bus in the cycle where the register block does not
// stall; while it stalls, PREADY is held low and no strobe is issued, so the
// APB master waits. Read data and the error flag are passed back unchanged in
// the completing cycle (PSLVERR is only driven with PREADY).
//
// From the design: a combinational bridge in front of a single-cycle data bus
// with those signals, and stalls of APB transfers. The stall input and the
// word index taken from PADDR[3:1] (16-bit registers at even byte addresses)
// are this design's choices.
module apb2csc_bridge #(
  parameter int unsigned ADDR_WIDTH = 16,
  parameter int unsigned DATA_WIDTH = 16
) (
  // APB slave side
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [ADDR_WIDTH-1:0] paddr,
  input  logic [DATA_WIDTH-1:0] pwdata,
  output logic [DATA_WIDTH-1:0] prdata,
  output logic                  pready,
  output logic                  pslverr,
  // register data bus side
  output logic [2:0]            addr,
  output logic [DATA_WIDTH-1:0] data_in,
  output logic                  rd_en,
  output logic                  wr_en,
  output logic                  wr_req,   // write access pending (before stall)
  output logic                  rd_req,   // read access pending (before stall)
  input  logic [DATA_WIDTH-1:0] data_out,
  input  logic                  error,
  input  logic                  stall
);
  logic access;
  assign access  = psel & penable;
  assign addr    = paddr[3:1];
  assign data_in = pwdata;
  assign wr_req  = access &  pwrite;
  assign rd_req  = access & ~pwrite;
  assign wr_en   = access &  pwrite & ~stall;
  assign rd_en   = access & ~pwrite & ~stall;
  assign pready  = ~(access & stall);
  assign prdata  = data_out;
  assign pslverr = access & ~stall & error;
endmodule
