// tb_jtag_module: drives the JTAG-Module as an external tester would, one TCK
// period = one `rise` pulse then one `fall` pulse of the system clock, and
// samples TDO before each rising edge. Checks: IDCODE selected after reset and
// reading 32'h00000083, IR capture value 0000_0001, BYPASS delay of one bit,
// unknown codes falling back to BYPASS, SAMPLE/PRELOAD and EXTEST selecting the
// boundary chain (modelled here as a 4-bit register) with the mode signal only
// under EXTEST, the IJTAG/SIB/EXCFG selects and their serial paths (3-bit
// models), and the Idle/Reset/Pause extension signals.
module tb_jtag_module;
  import ijtag_pkg::*;
  logic clk = 0, rst_n = 0, rise = 0, fall = 0, tms = 1, tdi = 0, tdo;
  jtag_tap_t tap;
  jtag_tap_ext_t tap_ext;
  logic bsc_select, bsc_so, bsc_mode, bypass_sel, idcode_sel, sample_preload_sel, extest_sel;
  logic [2:0] ext_select, ext_so;
  instr_t ir;
  logic [3:0] bsc_sr;
  logic [2:0] ext_sr [3];
  int checks = 0, failures = 0;
  int n_pause = 0;

  jtag_module dut (.clk, .rst_n, .rise, .fall, .tms, .tdi, .tdo, .tap, .tap_ext, .bsc_select,
                   .bsc_so, .bsc_mode, .bypass_sel, .idcode_sel, .sample_preload_sel, .extest_sel,
                   .ext_select, .ext_so, .ir_o(ir));

  // external TDR models
  always_ff @(posedge clk) begin
    if (tap.rise && tap.shift && bsc_select) bsc_sr <= {tap.si, bsc_sr[3:1]};
    for (int i = 0; i < 3; i++)
      if (tap.rise && tap.shift && ext_select[i]) ext_sr[i] <= {tap.si, ext_sr[i][2:1]};
  end
  assign bsc_so = bsc_sr[0];
  for (genvar i = 0; i < 3; i++) begin : g_so
    assign ext_so[i] = ext_sr[i][0];
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (tap_ext.pause) n_pause++;

  // one TCK period; returns TDO as seen before the rising edge
  task automatic tck(input logic m, input logic d, output logic o);
    @(negedge clk); tms = m; tdi = d;
    repeat (2) @(negedge clk);
    o = tdo;
    rise = 1; @(negedge clk); rise = 0;
    repeat (3) @(negedge clk);
    fall = 1; @(negedge clk); fall = 0;
  endtask
  task automatic tck0(input logic m);
    logic o; tck(m, 0, o);
  endtask
  task automatic shift_ir(input instr_t v, output instr_t cap);
    logic o;
    tck0(1); tck0(1); tck0(0); tck0(0);
    for (int i = 0; i < IR_LEN; i++) begin tck(i == IR_LEN - 1, v[i], o); cap[i] = o; end
    tck0(1); tck0(0);
  endtask
  task automatic shift_dr(input int n, input logic [63:0] din, output logic [63:0] dout, input bit pause = 0);
    logic o;
    dout = '0;
    tck0(1); tck0(0); tck0(0);
    for (int i = 0; i < n; i++) begin tck(i == n - 1, din[i], o); dout[i] = o; end
    if (pause) begin tck0(0); tck0(0); tck0(1); tck0(1); end   // Pause-DR, Exit2, Update
    else tck0(1);
    tck0(0);
  endtask
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [63:0] r, a;
    instr_t cap;
    bsc_sr = '0; ext_sr[0] = '0; ext_sr[1] = '0; ext_sr[2] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(tap_ext.reset, "reset state after reset");
    tck0(0);
    check(tap_ext.idle, "idle");
    check(idcode_sel && ir == INSTR_IDCODE, "IDCODE after reset");
    shift_dr(32, 0, r);
    check(r[31:0] == 32'h0000_0083, $sformatf("IDCODE %h", r[31:0]));
    // BYPASS and IR capture
    shift_ir(INSTR_BYPASS, cap);
    check(cap == 8'h01, $sformatf("IR capture %h", cap));
    check(bypass_sel, "bypass select");
    a = {$urandom, $urandom};
    shift_dr(20, a, r);
    check(r[19:1] == a[18:0] && r[0] == 1'b0, "bypass one-bit delay");
    shift_ir(8'h55, cap);
    check(bypass_sel, "unknown code selects bypass");
    // SAMPLE/PRELOAD, EXTEST
    shift_ir(INSTR_SAMPLE_PRELOAD, cap);
    check(bsc_select && sample_preload_sel && !bsc_mode, "sample/preload");
    a = 64'hA; shift_dr(4, a, r);
    check(bsc_sr == 4'hA, "BSC shifted through TDI");
    a = 64'h5; shift_dr(4, a, r, 1);
    check(r[3:0] == 4'hA, "BSC read through TDO");
    check(n_pause > 0, "pause-DR indicated");
    shift_ir(INSTR_EXTEST, cap);
    check(bsc_select && extest_sel && bsc_mode, "extest mode");
    // IJTAG-Module instructions
    for (int k = 0; k < 3; k++) begin
      instr_t code;
      code = (k == 0) ? INSTR_IJTAG : (k == 1) ? INSTR_SIB : INSTR_EXCFG;
      shift_ir(code, cap);
      check(ext_select == 3'(1 << k) && !bsc_select && !bypass_sel, $sformatf("ext select %0d", k));
      a = 64'($urandom); shift_dr(3, a, r);
      a = 64'($urandom); shift_dr(3, a, r);
      check(ext_sr[k] == a[2:0], $sformatf("ext %0d data in", k));
    end
    // Test-Logic-Reset restores IDCODE
    repeat (5) tck0(1);
    check(tap_ext.reset && ir == INSTR_IDCODE, "TLR loads IDCODE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
