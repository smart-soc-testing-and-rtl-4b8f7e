// tb_boundary_scan_register: SAMPLE/PRELOAD and EXTEST style use of an 8-cell
// boundary scan register. Checks that capture samples the functional values,
// that shift/update fill the update stages without touching the outputs in
// normal mode (mode low: outputs follow the inputs), and that in test mode the
// outputs show the preloaded values.
module tb_boundary_scan_register;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic select = 1, capture = 0, shift = 0, update = 0, mode = 0, si = 0, so;
  logic [N-1:0] sys_in, sys_out;
  int checks = 0, failures = 0;

  boundary_scan_register #(.N(N)) dut (.clk, .rst_n, .rise(1'b1), .fall(1'b1), .select, .capture,
                                       .shift, .update, .mode, .si, .so, .sys_in, .sys_out);
  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d);
    @(negedge clk); capture = c; shift = s; update = u; si = d;
    @(posedge clk); #1;
    capture = 0; shift = 0; update = 0;
  endtask

  initial begin
    logic [N-1:0] a, p, r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      a = N'($urandom); p = N'($urandom);
      sys_in = a; mode = 0;
      cyc(1, 0, 0, 0);                                  // SAMPLE
      for (int i = 0; i < N; i++) begin r[i] = so; cyc(0, 1, 0, p[i]); end
      checks++; if (r !== a) begin failures++; $display("sample %h expected %h", r, a); end
      cyc(0, 0, 1, 0);                                  // PRELOAD update
      sys_in = ~a; #1;
      checks++; if (sys_out !== ~a) begin failures++; $display("normal mode disturbed"); end
      mode = 1; #1;                                     // EXTEST
      checks++; if (sys_out !== p) begin failures++; $display("test mode %h expected %h", sys_out, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
