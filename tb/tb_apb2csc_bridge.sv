// tb_apb2csc_bridge: random APB-side inputs into the combinational bridge,
// compared against the expected strobes: write/read strobes only in an access
// phase without stall, PREADY low exactly when an access is stalled, word
// index from PADDR[3:1], read data and PSLVERR passed through when the
// transfer completes.
module tb_apb2csc_bridge;
  logic psel, penable, pwrite, pready, pslverr, rd_en, wr_en, wr_req, rd_req, error, stall;
  logic [15:0] paddr, pwdata, prdata, data_in, data_out;
  logic [2:0] addr;
  int checks = 0, failures = 0;

  apb2csc_bridge dut (.psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
                      .addr, .data_in, .rd_en, .wr_en, .wr_req, .rd_req, .data_out, .error, .stall);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic acc;
      psel = 1'($urandom); penable = 1'($urandom); pwrite = 1'($urandom);
      paddr = 16'($urandom); pwdata = 16'($urandom); data_out = 16'($urandom);
      error = 1'($urandom); stall = 1'($urandom);
      #1;
      acc = psel && penable;
      checks++;
      if (wr_en !== (acc && pwrite && !stall) || rd_en !== (acc && !pwrite && !stall) ||
          wr_req !== (acc && pwrite) || rd_req !== (acc && !pwrite)) begin
        failures++; $display("strobe mismatch");
      end
      checks++; if (pready !== !(acc && stall)) begin failures++; $display("pready mismatch"); end
      checks++; if (addr !== paddr[3:1] || data_in !== pwdata || prdata !== data_out) begin failures++; $display("data/addr"); end
      checks++; if (pslverr !== (acc && !stall && error)) begin failures++; $display("pslverr"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
