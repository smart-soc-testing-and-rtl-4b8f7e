// tb_apb_module: CPU-side use of the APB-Module against two 16-bit TDR models
// kept in this testbench (one behind the SIB instruction, one shared by IJTAG
// and EXCFG as in the IJTAG network). Checks, with independently computed
// expectations:
//  - Instruction write/read and the selects;
//  - WriteF: 16 shifts, model holds the data, Read returns the old content,
//    last shift 16 cycles after the write is accepted;
//  - WriteP with random lengths in first-zero encoding: exactly n shifts,
//    MSB-aligned read data with zeros below;
//  - Action 3 runs update then capture on consecutive cycles, 1 and 2 alone;
//  - stalls: back-to-back writes, Read during a shift, Instruction while
//    actions are pending (and the instruction held while shifting), a write
//    behind a scheduled capture;
//  - operation order: capture, write, update issued during a busy period run
//    as capture, shift, update;
//  - Status busy/idle, PSLVERR on a read of a write-only register.
module tb_apb_module;
  import ijtag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [15:0] paddr = 0, pwdata = 0, prdata;
  jtag_tap_t tap;
  logic [2:0] ext_select, ext_so;
  logic busy;
  instr_t ir;
  int checks = 0, failures = 0, n_stall = 0, cyc = 0, last_accept = 0;

  apb_module dut (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
                  .pslverr, .tap, .ext_select, .ext_so, .busy, .ir_o(ir));

  `include "apb_master.svh"

  localparam logic [15:0] A_INSTR = 16'h0E80, A_ACT = 16'h0E82, A_WF = 16'h0E84, A_WP = 16'h0E86,
                          A_RD = 16'h0E88, A_CTRL = 16'h0E8A, A_STAT = 16'h0E8C;

  // TDR models: [0] SIB register, [1] RSN register (IJTAG/EXCFG)
  logic [15:0] m_sr [2], m_upd [2];
  logic [15:0] CAP [2] = '{16'hC3A5, 16'h5A3C};
  int n_shift = 0, n_cap = 0, n_upd = 0, last_shift_cyc = 0, upd_cyc = 0, cap_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < 2; k++) begin
      automatic logic sel = (k == 0) ? ext_select[1] : (ext_select[0] | ext_select[2]);
      if (sel && tap.shift)   m_sr[k]  <= {tap.si, m_sr[k][15:1]};
      if (sel && tap.capture) m_sr[k]  <= CAP[k];
      if (sel && tap.update)  m_upd[k] <= m_sr[k];
    end
    if (tap.shift)   begin n_shift++; last_shift_cyc = cyc; end
    if (tap.capture) begin n_cap++; cap_cyc = cyc; end
    if (tap.update)  begin n_upd++; upd_cyc = cyc; end
  end
  assign ext_so[1] = m_sr[0][0];
  assign ext_so[0] = m_sr[1][0];
  assign ext_so[2] = m_sr[1][0];

  always #5 clk = ~clk;

  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wait_idle();
    logic [15:0] s; logic e;
    do apb_read(A_STAT, s, e); while (s[0]);
  endtask

  initial begin
    logic [15:0] d, old, w, exp;
    logic e;
    int n, s0, stall0;
    m_sr[0] = 16'h1234; m_sr[1] = 16'h0; m_upd[0] = 0; m_upd[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // instruction register
    apb_write(A_INSTR, 16'd9, e);
    check(ir == INSTR_SIB && ext_select == 3'b010, "SIB selected");
    apb_read(A_INSTR, d, e);
    check(d == 16'd9 && !e, "Instruction read back");

    // WriteF: 16 shifts, old content returned, timing
    for (int k = 0; k < 10; k++) begin
      old = m_sr[0]; w = 16'($urandom); s0 = n_shift;
      apb_write(A_WF, w, e);
      apb_read(A_RD, d, e);
      check(n_shift - s0 == 16, $sformatf("WriteF shift count %0d", n_shift - s0));
      check(m_sr[0] == w, "WriteF data in TDR");
      check(d == old, $sformatf("WriteF read %h expected %h", d, old));
    end
    // timing of one WriteF: last shift 16 cycles after acceptance
    apb_write(A_WF, 16'hFFFF, e);
    s0 = last_accept;
    wait_idle();
    check(last_shift_cyc - s0 == 16, $sformatf("WriteF latency %0d", last_shift_cyc - s0));

    // WriteP, random lengths
    for (int k = 0; k < 30; k++) begin
      n = $urandom_range(1, 15);
      old = m_sr[0]; d = 16'($urandom);
      w = (d << (16 - n)) | ((16'd1 << (15 - n)) - 1);   // data, one zero, ones
      s0 = n_shift;
      apb_write(A_WP, w, e);
      apb_read(A_RD, d, e);
      check(n_shift - s0 == n, $sformatf("WriteP %0d bits shifted %0d", n, n_shift - s0));
      exp = (old >> n) | (w & ~((16'd1 << (16 - n)) - 1));
      check(m_sr[0] == exp, $sformatf("WriteP %0d: TDR %h expected %h", n, m_sr[0], exp));
      exp = old << (16 - n);
      check(d == exp, $sformatf("WriteP %0d: read %h expected %h", n, d, exp));
    end

    // actions: update then capture
    s0 = n_cap;
    apb_write(A_WF, 16'hBEEF, e);
    apb_write(A_ACT, 16'd3, e);
    wait_idle();
    check(m_upd[0] == 16'hBEEF, "update took the shifted value");
    check(m_sr[0] == CAP[0] && n_cap == s0 + 1, "capture after update");
    check(cap_cyc == upd_cyc + 1, $sformatf("update then capture on consecutive cycles (%0d %0d)", upd_cyc, cap_cyc));
    s0 = n_upd;
    apb_write(A_ACT, 16'd1, e); wait_idle();
    check(n_upd == s0, "capture alone");
    apb_write(A_ACT, 16'd2, e); wait_idle();
    check(n_upd == s0 + 1, "update alone");

    // stalls: back-to-back writes, read during shift
    stall0 = n_stall;
    apb_write(A_WF, 16'h1111, e);
    apb_write(A_WF, 16'h2222, e);
    check(n_stall > stall0, "second write stalled");
    stall0 = n_stall;
    apb_write(A_WF, 16'h3333, e);
    apb_read(A_RD, d, e);
    check(n_stall > stall0 && d == 16'h2222, "read stalled until shift done");
    // instruction written during a shift is held until the shift ends
    apb_write(A_WF, 16'h4444, e);
    apb_write(A_INSTR, 16'd8, e);
    check(ir == INSTR_SIB, "instruction held while shifting");
    apb_read(A_STAT, d, e);
    check(d[0] == 1'b1, "busy while shifting");
    wait_idle();
    check(ir == INSTR_IJTAG && m_sr[0] == 16'h4444, "held instruction applied after shift");
    // instruction write stalls while actions are pending
    apb_write(A_WF, 16'h5555, e);
    apb_write(A_ACT, 16'd2, e);
    stall0 = n_stall;
    apb_write(A_INSTR, 16'd10, e);
    check(n_stall > stall0, "instruction stalled behind actions");
    check(m_upd[1] == 16'h5555 && ir == INSTR_EXCFG, "update done before instruction change");
    wait_idle();
    // order kept across a busy period: capture; write; update
    apb_write(A_WF, 16'h6666, e);
    apb_write(A_ACT, 16'd1, e);
    stall0 = n_stall;
    apb_write(A_WF, 16'h7777, e);
    check(n_stall > stall0, "write stalled behind a scheduled capture");
    apb_write(A_ACT, 16'd2, e);
    apb_read(A_RD, d, e);
    check(d == CAP[1], $sformatf("capture ran before the shift, read %h", d));
    wait_idle();
    check(m_upd[1] == 16'h7777 && upd_cyc > last_shift_cyc, "update ran after the shift");
    apb_read(A_STAT, d, e);
    check(d[0] == 1'b0 && !busy, "idle");
    apb_read(A_WF, d, e);
    check(e, "PSLVERR reading a write-only register");
    apb_write(A_CTRL, 16'd1, e); apb_read(A_CTRL, d, e);
    check(d == 16'd1, "Control register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
