// tb_ijtag_soc_top: end-to-end test of the whole test infrastructure at its
// default parameters.
//
// Off-chip part (jtag_apb_switch = 0), through the JTAG pins with TCK at 1/16
// of the system clock: IDCODE read (also at the minimum oversampling, TCK at
// 1/8 of the system clock, with BYPASS), SAMPLE/PRELOAD and EXTEST on the boundary
// scan register, then the IJTAG network: the SIB instruction includes
// subnetworks 0 and 1 (modelled here as 4- and 6-bit shift registers) and the
// IJTAG instruction shows a 10-bit path through them; then one trim step from
// the tester: write 700 into subnetwork 2, commit it under EXCFG and read the
// comparator back.
// On-chip part (jtag_apb_switch = 1), through APB: a comparator-based
// self-trim. The analog unit and its comparator are a behavioural model in
// this testbench (comparator high when trim_value >= THRESH). A binary search
// over the 10-bit trim range sets a value (IJTAG write), commits it (EXCFG
// write) and reads the comparator (capture and read) per step; the search
// must bracket THRESH. Then the configuration lock: an uncommitted value with
// the lock set must raise ijtag_error.
// Every mechanism used is counted and must have happened at least once.
module tb_ijtag_soc_top;
  import ijtag_pkg::*;
  logic sysclk = 0, sysrst_n = 0, jtag_apb_switch = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [15:0] paddr = 0, pwdata = 0, prdata;
  logic tck = 0, tms = 1, tdi = 0, tdo;
  jtag_tap_t jtag_tap;
  jtag_tap_ext_t jtag_tap_ext;
  logic bypass_sel, idcode_sel, sp_sel, extest_sel, j_rise, j_fall, i_rise, i_fall;
  logic [7:0] bsc_sys_in = 0, bsc_sys_out;
  ijtag_tap_t ijtag;
  ijtag_tdr_in_t sub0_in, sub1_in;
  ijtag_tdr_out_t sub0_out, sub1_out;
  logic config_lock = 0, ijtag_error, comparator, apb_busy;
  logic [9:0] trim_value;
  int checks = 0, failures = 0, n_stall = 0, cyc = 0, last_accept = 0;

  ijtag_soc_top dut (
    .sysclk, .sysrst_n, .jtag_apb_switch,
    .apb_psel(psel), .apb_penable(penable), .apb_pwrite(pwrite), .apb_paddr(paddr),
    .apb_pwdata(pwdata), .apb_prdata(prdata), .apb_pready(pready), .apb_pslverr(pslverr),
    .jtag_tck(tck), .jtag_tms(tms), .jtag_tdi(tdi), .jtag_tdo(tdo),
    .jtag_tap, .jtag_tap_ext, .jtag_bypass_sel(bypass_sel), .jtag_idcode_sel(idcode_sel),
    .jtag_sample_preload_sel(sp_sel), .jtag_extest_sel(extest_sel),
    .jtag_tap_clock_rising(j_rise), .jtag_tap_clock_falling(j_fall),
    .bsc_sys_in, .bsc_sys_out, .ijtag,
    .subnetwork0_in(sub0_in), .subnetwork0_out(sub0_out),
    .subnetwork1_in(sub1_in), .subnetwork1_out(sub1_out),
    .ijtag_config_lock(config_lock), .ijtag_error,
    .ijtag_tap_clock_rising(i_rise), .ijtag_tap_clock_falling(i_fall),
    .trim_value, .comparator, .apb_busy
  );

  logic clk;
  assign clk = sysclk;
  `include "apb_master.svh"

  always #5 sysclk = ~sysclk;

  // ---- behavioural models: subnetworks 0/1 and the trimmed comparator ------
  localparam int unsigned THRESH = 613;
  logic [3:0] sub0_sr;
  logic [5:0] sub1_sr;
  always_ff @(posedge sysclk) begin
    if (ijtag.rise && ijtag.shift && sub0_in.select) sub0_sr <= {sub0_in.si, sub0_sr[3:1]};
    if (ijtag.rise && ijtag.shift && sub1_in.select) sub1_sr <= {sub1_in.si, sub1_sr[5:1]};
  end
  assign sub0_out = '{so: sub0_sr[0], error: 1'b0};
  assign sub1_out = '{so: sub1_sr[0], error: 1'b0};
  assign comparator = (int'(trim_value) >= THRESH);

  // ---- mechanism counters ------------------------------------------------------
  int m_tck_rise, m_tck_fall, m_extest, m_capture, m_update, m_excfg_update, m_shift;
  int m_held_instr, m_sub_sel [3], m_error, m_tlr, m_pause, m_action_pair;
  logic prev_upd;
  always @(posedge sysclk) begin
    cyc <= cyc + 1;
    if (j_rise) m_tck_rise++;
    if (j_fall) m_tck_fall++;
    if (extest_sel && bsc_sys_out != bsc_sys_in) m_extest++;
    if (ijtag.capture) m_capture++;
    if (ijtag.update) m_update++;
    if (ijtag.update && ijtag.excfg) m_excfg_update++;
    if (ijtag.shift) m_shift++;
    if (dut.u_apb.instr_sched) m_held_instr++;
    if (sub0_in.select) m_sub_sel[0]++;
    if (sub1_in.select) m_sub_sel[1]++;
    if (dut.sub_in[2].select) m_sub_sel[2]++;
    if (ijtag_error) m_error++;
    if (jtag_tap_ext.reset) m_tlr++;
    if (jtag_tap_ext.pause) m_pause++;
    if (prev_upd && ijtag.capture) m_action_pair++;
    prev_upd <= ijtag.update;
  end

  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- JTAG pin driver: TCK period = 2*half system clocks ------------------------
  int half = 8;
  task automatic tck_cycle(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (half) @(negedge sysclk);
    o = tdo;
    tck = 1;
    repeat (half) @(negedge sysclk);
    tck = 0;
  endtask
  task automatic tck0(input logic m);
    logic o; tck_cycle(m, 0, o);
  endtask
  task automatic jtag_ir(input instr_t v);
    logic o;
    tck0(1); tck0(1); tck0(0); tck0(0);
    for (int i = 0; i < IR_LEN; i++) tck_cycle(i == IR_LEN - 1, v[i], o);
    tck0(1); tck0(0);
  endtask
  task automatic jtag_dr(input int n, input logic [63:0] din, output logic [63:0] dout);
    logic o;
    dout = '0;
    tck0(1); tck0(0); tck0(0);
    for (int i = 0; i < n; i++) begin tck_cycle(i == n - 1, din[i], o); dout[i] = o; end
    tck0(0); tck0(1); tck0(1);     // Pause-DR, Exit2-DR, Update-DR
    tck0(0);
  endtask

  // ---- on-chip driver (register-level scan sequences) --------------------------
  localparam logic [15:0] A_INSTR = 16'h0E80, A_ACT = 16'h0E82, A_WF = 16'h0E84, A_WP = 16'h0E86,
                          A_RD = 16'h0E88, A_STAT = 16'h0E8C;
  // first-zero encoding of n data bits
  function automatic logic [15:0] wp(input int n, input logic [15:0] d);
    return (d << (16 - n)) | ((16'd1 << (15 - n)) - 1);
  endfunction
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic e; apb_write(a, d, e);
    check(!e, "unexpected PSLVERR");
  endtask
  // poll the Status register until all scheduled operations are done
  task automatic wait_idle();
    logic [15:0] d; logic e;
    do apb_read(A_STAT, d, e); while (d[0]);
  endtask
  task automatic select_subnet2();
    wr(A_INSTR, INSTR_SIB); wr(A_WP, wp(3, 3'b100)); wr(A_ACT, 2);
  endtask
  task automatic trim_write(input logic [9:0] v);
    select_subnet2();
    wr(A_INSTR, INSTR_IJTAG); wr(A_WP, wp(3, 3'b010)); wr(A_ACT, 2);   // open TrimUnit
    wr(A_ACT, 1); wr(A_WP, wp(12, {1'b0, v, 1'b0})); wr(A_ACT, 2);     // value, close SIBs
    wait_idle();
  endtask
  task automatic trim_commit();
    select_subnet2();
    wr(A_INSTR, INSTR_EXCFG); wr(A_WP, wp(3, 3'b010)); wr(A_ACT, 2);
    wr(A_WP, wp(12, 12'h000)); wr(A_ACT, 2);
    wait_idle();
  endtask
  task automatic compare(output logic res);
    logic [15:0] d; logic e;
    select_subnet2();
    wr(A_INSTR, INSTR_IJTAG); wr(A_WP, wp(3, 3'b100)); wr(A_ACT, 2);   // open ResultUnit
    wr(A_ACT, 1); wr(A_WP, wp(3, 3'b000));
    apb_read(A_RD, d, e);
    wr(A_ACT, 2);
    res = d[15];
    check(d[14:13] == 2'b10, "SIB states read with the comparator");
  endtask

  initial begin
    logic [63:0] r, a;
    int lo, hi, mid, steps;
    logic res;
    sub0_sr = '0; sub1_sr = '0;
    repeat (4) @(posedge sysclk);
    sysrst_n = 1;

    // ================= off-chip: JTAG ==========================================
    repeat (5) tck0(1);
    tck0(0);
    jtag_dr(32, 0, r);
    check(r[31:0] == IDCODE_VALUE, $sformatf("IDCODE %h", r[31:0]));
    // the minimum oversampling, TCK = sysclk/8: IDCODE again, then BYPASS
    half = 4;
    jtag_ir(INSTR_IDCODE);
    jtag_dr(32, 0, r);
    check(r[31:0] == IDCODE_VALUE, $sformatf("IDCODE at 8x oversampling %h", r[31:0]));
    jtag_ir(INSTR_BYPASS);
    jtag_dr(9, 64'h1A5, r);
    check(r[8:0] == {8'hA5, 1'b0}, $sformatf("BYPASS at 8x oversampling %h", r[8:0]));
    half = 8;
    // boundary scan: sample the inputs, preload a pattern, apply it with EXTEST
    bsc_sys_in = 8'h3C;
    jtag_ir(INSTR_SAMPLE_PRELOAD);
    jtag_dr(8, 64'hA5, r);
    check(r[7:0] == 8'h3C, $sformatf("SAMPLE %h", r[7:0]));
    check(bsc_sys_out == 8'h3C, "normal mode during preload");
    jtag_ir(INSTR_EXTEST);
    check(bsc_sys_out == 8'hA5, $sformatf("EXTEST drives %h", bsc_sys_out));
    // IJTAG network via JTAG: include subnetworks 0 and 1
    jtag_ir(INSTR_SIB);
    jtag_dr(3, 64'b011, r);
    jtag_ir(INSTR_IJTAG);
    a = {$urandom, $urandom};
    jtag_dr(30, a, r);
    check(r[29:10] == a[19:0], "RSN path of 10 bits via JTAG");
    jtag_ir(INSTR_SIB);
    jtag_dr(3, 64'b000, r);
    check(r[2:0] == 3'b011, "SIB register captured via JTAG");
    // off-chip trim through subnetwork 2: write, commit, read the comparator
    jtag_ir(INSTR_SIB);
    jtag_dr(3, 64'b100, r);                       // subnetwork 2 only
    jtag_ir(INSTR_IJTAG);
    jtag_dr(2, 64'b01, r);                        // open SIB0 (TrimUnit)
    check(r[1:0] == 2'b00, "both SIBs closed before");
    jtag_dr(12, {51'd0, 1'b0, 10'd700, 1'b0}, r); // value, close SIB0
    check(trim_value == 10'd0, "JTAG-written value not live before commit");
    jtag_ir(INSTR_EXCFG);
    jtag_dr(2, 64'b01, r);
    jtag_dr(12, 64'd0, r);
    check(trim_value == 10'd700, $sformatf("JTAG trim commit %0d", trim_value));
    jtag_ir(INSTR_IJTAG);
    jtag_dr(2, 64'b10, r);                        // open SIB1 (ResultUnit)
    jtag_dr(3, 64'd0, r);
    check(r[2:0] == {1'b1, 2'b10}, $sformatf("JTAG comparator read %b", r[2:0]));
    jtag_ir(INSTR_BYPASS);

    // ================= on-chip: APB self-trim ====================================
    jtag_apb_switch = 1;
    @(negedge sysclk);
    lo = 0; hi = 1023; steps = 0;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      trim_write(10'(mid));
      check(trim_value != 10'(mid), "value not live before commit");
      trim_commit();
      check(trim_value == 10'(mid), $sformatf("trim %0d expected %0d", trim_value, mid));
      compare(res);
      check(res == (mid >= THRESH), $sformatf("comparator at %0d", mid));
      if (res) hi = mid; else lo = mid;
      steps++;
    end
    check(hi == THRESH && lo == THRESH - 1, $sformatf("trim search ended at %0d..%0d", lo, hi));
    check(steps == 10, $sformatf("binary search took %0d steps", steps));

    // subnetworks 0/1 via APB: SIB instruction, then path length 10
    wr(A_INSTR, INSTR_SIB); wr(A_WP, wp(3, 3'b011)); wr(A_ACT, 2);
    wr(A_INSTR, INSTR_IJTAG);
    begin
      logic [15:0] d; logic e;
      wr(A_WF, 16'hFFFF);
      wr(A_WF, 16'h1234);
      wr(A_INSTR, INSTR_BYPASS);          // held until the serialisation ends
      check(dut.u_apb.instr_sched && dut.u_apb.ir_q == INSTR_IJTAG, "instruction held");
      apb_read(A_RD, d, e);
      // 10 ones left from the first write, then the first 6 bits of 16'h1234
      check(d == {6'h34, 10'h3FF}, $sformatf("APB RSN 10-bit path read %h", d));
    end
    // configuration lock: uncommitted value with lock set raises the error
    trim_write(10'(THRESH + 5));
    config_lock = 1;
    repeat (2) @(posedge sysclk); #1;
    check(ijtag_error, "config mismatch reported while locked");
    config_lock = 0;
    trim_commit();
    config_lock = 1;
    repeat (2) @(posedge sysclk); #1;
    check(!ijtag_error && trim_value == 10'(THRESH + 5), "no error after commit");
    config_lock = 0;

    // ================= mechanisms ===================================================
    check(m_tck_rise > 0 && m_tck_fall > 0, "TCK edges sampled");
    check(m_tlr > 0, "Test-Logic-Reset");
    check(m_pause > 0, "Pause-DR");
    check(m_extest > 0, "EXTEST test mode");
    check(m_capture > 0 && m_update > 0 && m_shift > 0, "capture/update/shift");
    check(m_excfg_update > 0, "EXCFG update");
    check(m_action_pair > 0, "update followed by capture");
    check(n_stall > 0, "APB stall");
    check(m_held_instr > 0, "instruction held while busy");
    check(m_sub_sel[0] > 0 && m_sub_sel[1] > 0 && m_sub_sel[2] > 0, "all subnetworks selected");
    check(m_error > 0, "configuration error");
    $display("mechanisms: tck_rise=%0d tck_fall=%0d tlr=%0d pause=%0d extest=%0d capture=%0d update=%0d shift=%0d excfg_update=%0d upd_then_cap=%0d stalls=%0d held_instr=%0d sel0=%0d sel1=%0d sel2=%0d error=%0d",
             m_tck_rise, m_tck_fall, m_tlr, m_pause, m_extest, m_capture, m_update, m_shift, m_excfg_update,
             m_action_pair, n_stall, m_held_instr, m_sub_sel[0], m_sub_sel[1], m_sub_sel[2], m_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
