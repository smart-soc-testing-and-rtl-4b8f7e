// tb_tap_controller: walks the TAP controller with random TMS values and
// compares its state and decoded enables against a reference table of the
// IEEE 1149.1 state diagram kept in this testbench. Also checks that five
// TMS=1 steps reach Test-Logic-Reset from every state, and that the state
// only advances on `rise` cycles.
module tb_tap_controller;
  logic clk = 0, rst_n = 0, rise = 0, tms = 0;
  logic capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  logic tlr, rti, pdr;
  logic [3:0] state;
  int checks = 0, failures = 0;

  tap_controller dut (.clk, .rst_n, .rise, .tms, .capture_dr, .shift_dr, .update_dr,
                      .capture_ir, .shift_ir, .update_ir, .test_logic_reset(tlr),
                      .run_test_idle(rti), .pause_dr(pdr), .state_o(state));

  always #5 clk = ~clk;

  // reference: names as strings, next state for TMS = 0 / 1
  string name [16] = '{"TLR","RTI","SelDR","CapDR","ShDR","Ex1DR","PauDR","Ex2DR","UpdDR",
                       "SelIR","CapIR","ShIR","Ex1IR","PauIR","Ex2IR","UpdIR"};
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int ref_s = 0;

  task automatic step(input logic t, input logic r);
    @(negedge clk); tms = t; rise = r;
    @(posedge clk); #1;
    if (r) ref_s = t ? nxt1[ref_s] : nxt0[ref_s];
    checks++;
    if (int'(state) != ref_s) begin failures++; $display("state %0d expected %s", state, name[ref_s]); end
    checks++;
    if (capture_dr != (ref_s == 3) || shift_dr != (ref_s == 4) || update_dr != (ref_s == 8) ||
        capture_ir != (ref_s == 10) || shift_ir != (ref_s == 11) || update_ir != (ref_s == 15) ||
        tlr != (ref_s == 0) || rti != (ref_s == 1) || pdr != (ref_s == 6)) begin
      failures++; $display("decode wrong in %s", name[ref_s]);
    end
  endtask

  bit visited [16];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (!tlr) failures++;
    for (int i = 0; i < 2000; i++) begin
      step($urandom_range(0, 2) != 0 ? 1'(i % 3 == 0) : 1'($urandom_range(0, 1)), 1'($urandom_range(0, 3) != 0));
      visited[ref_s] = 1;
    end
    for (int s = 0; s < 16; s++) begin
      checks++; if (!visited[s]) begin failures++; $display("state %s never reached", name[s]); end
    end
    // five TMS=1 reach TLR from anywhere
    for (int s = 0; s < 30; s++) begin
      repeat ($urandom_range(0, 7)) step(1'($urandom_range(0, 1)), 1);
      repeat (5) step(1, 1);
      checks++; if (!tlr) begin failures++; $display("no reset after 5 TMS=1"); end
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
