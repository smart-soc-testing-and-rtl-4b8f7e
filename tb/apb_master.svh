// apb_master.svh: APB master tasks shared by testbenches. Expects in scope:
// clk, psel, penable, pwrite, paddr, pwdata, prdata, pready, pslverr, and
// int counters n_stall (stalled cycles) and cyc (cycle count); sets
// last_accept to the cycle in which the transfer completed.
task automatic apb_write(input logic [15:0] a, input logic [15:0] d, output logic err);
  @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
  @(negedge clk); penable = 1; #1;
  while (!pready) begin @(negedge clk); #1; n_stall++; end
  err = pslverr;
  last_accept = cyc;
  @(posedge clk); #1;
  psel = 0; penable = 0;
endtask

task automatic apb_read(input logic [15:0] a, output logic [15:0] d, output logic err);
  @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
  @(negedge clk); penable = 1; #1;
  while (!pready) begin @(negedge clk); #1; n_stall++; end
  d = prdata; err = pslverr;
  last_accept = cyc;
  @(posedge clk); #1;
  psel = 0; penable = 0;
endtask
