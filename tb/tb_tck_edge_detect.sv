// tb_tck_edge_detect: drives a slow TCK with changing TMS/TDI and checks that
// exactly one `rise` and one `fall` enable appear per TCK period, that each
// comes 2 or 3 system clocks after the TCK edge, and that tms_s/tdi_s at the
// `rise` show the pin values present at the TCK rising edge.
module tb_tck_edge_detect;
  logic clk = 0, rst_n = 0;
  logic tck = 0, tms = 0, tdi = 0;
  logic rise, fall, tms_s, tdi_s;
  int checks = 0, failures = 0;
  int cyc = 0;

  tck_edge_detect dut (.clk, .rst_n, .tck, .tms, .tdi, .rise, .fall, .tms_s, .tdi_s);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int n_rise = 0, n_fall = 0, t_edge_r, t_edge_f;
  logic exp_tms, exp_tdi;

  always @(posedge clk) if (rst_n) begin
    if (rise) begin
      n_rise++;
      checks++;
      if (!(cyc - t_edge_r inside {[2:3]})) begin failures++; $display("rise latency %0d", cyc - t_edge_r); end
      checks++;
      if (tms_s !== exp_tms || tdi_s !== exp_tdi) begin failures++; $display("tms/tdi mismatch"); end
    end
    if (fall) begin
      n_fall++;
      checks++;
      if (!(cyc - t_edge_f inside {[2:3]})) begin failures++; $display("fall latency %0d", cyc - t_edge_f); end
    end
    checks++;
    if (rise && fall) failures++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      // TDI/TMS change on the falling TCK edge, stable over the rising edge
      @(negedge clk);
      tms = $urandom_range(0, 1);
      tdi = $urandom_range(0, 1);
      repeat (4) @(negedge clk);
      tck = 1; t_edge_r = cyc; exp_tms = tms; exp_tdi = tdi;
      repeat (8) @(negedge clk);
      tck = 0; t_edge_f = cyc;
      repeat (4) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    checks++; if (n_rise != 40) begin failures++; $display("rises %0d", n_rise); end
    checks++; if (n_fall != 40) begin failures++; $display("falls %0d", n_fall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
