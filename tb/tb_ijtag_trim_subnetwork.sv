// tb_ijtag_trim_subnetwork: replays at scan level the operations a driver
// performs on the trim subnetwork: open the TrimUnit SIB (3 bits "010"),
// capture + 12-bit scan carrying a random 10-bit trim value with both SIBs
// closing, update; then the same under EXCFG with all-zero data to move the
// value into the config stage; then open the ResultUnit SIB ("100") and read
// the comparator through a 3-bit scan. Checks the trim output only changes
// after the EXCFG step, the mismatch flag in between, the read-back path
// lengths and the comparator value.
module tb_ijtag_trim_subnetwork;
  import ijtag_pkg::*;
  logic clk = 0, rst_n = 0;
  ijtag_tap_t tap;
  ijtag_tdr_in_t tdr_in;
  ijtag_tdr_out_t tdr_out;
  logic [9:0] trim_value;
  logic comparator = 0;
  int checks = 0, failures = 0;

  ijtag_trim_subnetwork dut (.clk, .rst_n, .tap, .tdr_in, .tdr_out, .trim_value, .comparator);

  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d);
    @(negedge clk); tap.capture = c; tap.shift = s; tap.update = u; tdr_in.si = d;
    @(posedge clk); #1;
    tap.capture = 0; tap.shift = 0; tap.update = 0;
  endtask
  task automatic scan(input int n, input logic [15:0] din, output logic [15:0] dout);
    dout = '0;
    for (int i = 0; i < n; i++) begin dout[i] = tdr_out.so; cyc(0, 1, 0, din[i]); end
  endtask

  initial begin
    logic [15:0] r;
    logic [9:0] v, old;
    tap = '{rise: 1'b1, fall: 1'b1, capture: 1'b0, shift: 1'b0, update: 1'b0, excfg: 1'b0, config_en: 1'b1};
    tdr_in = '{select: 1'b1, si: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    old = '0;
    for (int n = 0; n < 20; n++) begin
      v = 10'($urandom);
      if (v == old) v = ~old;
      // set_trim_value: open TrimUnit, write value and close
      scan(3, 16'b010, r); cyc(0, 0, 1, 0);
      cyc(1, 0, 0, 0);
      scan(12, {1'b0, v, 1'b0}, r); cyc(0, 0, 1, 0);
      checks++; if (r[0] !== 1'b1 || r[11] !== 1'b0) begin failures++; $display("SIB readback %b", r[11:0]); end
      checks++; if (r[10:1] !== old) begin failures++; $display("previous trim readback %h", r[10:1]); end
      checks++; if (trim_value !== old) begin failures++; $display("trim changed before EXCFG"); end
      checks++; if (!tdr_out.error) begin failures++; $display("no mismatch flagged"); end
      // set_trim_value_config: EXCFG, open TrimUnit, zeros, update
      tap.excfg = 1;
      scan(3, 16'b010, r); cyc(0, 0, 1, 0);
      scan(12, 16'h0, r); cyc(0, 0, 1, 0);
      tap.excfg = 0;
      checks++; if (trim_value !== v) begin failures++; $display("trim %h expected %h", trim_value, v); end
      checks++; if (tdr_out.error) begin failures++; $display("mismatch after config"); end
      // get_comparator_result: open ResultUnit, capture, read 3 bits, close
      comparator = 1'($urandom);
      scan(3, 16'b100, r); cyc(0, 0, 1, 0);
      cyc(1, 0, 0, 0);
      scan(3, 16'b000, r); cyc(0, 0, 1, 0);
      checks++; if (r[2:0] !== {comparator, 2'b10}) begin failures++; $display("comparator read %b", r[2:0]); end
      // with both SIBs closed the path is 2 bits
      scan(4, 16'b1011, r);
      checks++; if (r[3:2] !== 2'b11) begin failures++; $display("closed length wrong %b", r[3:0]); end
      scan(2, 16'b00, r);
      old = v;
    end
    // locked: an update cannot change the trim value
    tap.config_en = 0;
    scan(3, 16'b010, r); cyc(0, 0, 1, 0);
    scan(12, {1'b0, ~old, 1'b0}, r); cyc(0, 0, 1, 0);
    tap.excfg = 1; cyc(0, 0, 1, 0); tap.excfg = 0;
    checks++; if (trim_value !== old) begin failures++; $display("locked value changed"); end
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
