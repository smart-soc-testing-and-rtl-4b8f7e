// tb_sib_cell: a SIB guarding a 4-bit shift segment (modelled in this
// testbench, shifting only while the SIB's select_out is high). Checks the
// scan path length (1 bit closed, 5 bits open) by pushing random streams
// through it, the open/close update, select_out gating, and that capture
// returns the SIB state.
module tb_sib_cell;
  logic clk = 0, rst_n = 0;
  logic select_in = 1, capture = 0, shift = 0, update = 0, si = 0;
  logic so, select_out, open_o;
  logic [3:0] seg;
  int checks = 0, failures = 0;

  sib_cell dut (.clk, .rst_n, .rise(1'b1), .fall(1'b1), .select_in, .capture, .shift, .update,
                .si_in(si), .so_in(seg[0]), .so, .select_out, .open_o);

  // guarded segment: SI is the SIB's shift stage input side, i.e. the
  // predecessor output `si`; SO goes into the SIB
  always_ff @(posedge clk) if (select_out && shift) seg <= {si, seg[3:1]};

  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d);
    @(negedge clk); capture = c; shift = s; update = u; si = d;
    @(posedge clk); #1;
    capture = 0; shift = 0; update = 0;
  endtask

  // shift `n` bits; return the bits seen at so before each shift
  task automatic scan(input int n, input logic [31:0] din, output logic [31:0] dout);
    dout = '0;
    for (int i = 0; i < n; i++) begin dout[i] = so; cyc(0, 1, 0, din[i]); end
  endtask

  initial begin
    logic [31:0] a, b, r;
    seg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (open_o || select_out) failures++;
    // closed: path of one bit
    for (int k = 0; k < 10; k++) begin
      a = $urandom; scan(8, a, r);
      checks++; if (r[7:1] !== a[6:0]) begin failures++; $display("closed path length wrong"); end
    end
    // open it: last shifted bit = 1, update
    scan(1, 1, r); cyc(0, 0, 1, 0);
    checks++; if (!open_o || !select_out) begin failures++; $display("did not open"); end
    select_in = 0; #1;
    checks++; if (select_out) begin failures++; $display("select_out not gated"); end
    select_in = 1;
    // capture returns the state
    cyc(1, 0, 0, 0);
    checks++; if (so !== 1'b1) begin failures++; $display("capture of open SIB wrong"); end
    // open path: 5 bits
    for (int k = 0; k < 10; k++) begin
      a = $urandom; scan(16, a, r);
      checks++; if (r[15:5] !== a[10:0]) begin failures++; $display("open path length wrong %h %h", r, a); end
    end
    // close: put 0 into the SIB bit (last shifted) and update
    scan(1, 0, r); cyc(0, 0, 1, 0);
    checks++; if (open_o) begin failures++; $display("did not close"); end
    cyc(1, 0, 0, 0);
    checks++; if (so !== 1'b0) failures++;
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
