// tb_tdr_register: random scan operations on an 8-bit capture-update TDR and a
// 5-bit capture-only TDR. Each operation captures a random parallel input,
// shifts 8 (5) new bits in LSB first while recording the serial output,
// updates, and compares: serial output == captured value (LSB first), update
// stage == shifted-in value, capture-only output == shift stage. Also checks
// that nothing moves without `select` or without `rise`/`fall`.
module tb_tdr_register;
  logic clk = 0, rst_n = 0;
  logic rise = 0, fall = 0, select = 0, capture = 0, shift = 0, update = 0, si = 0;
  logic so, so5;
  logic [7:0] pi, po;
  logic [4:0] pi5, po5;
  int checks = 0, failures = 0;

  tdr_register #(.WIDTH(8)) dut (.clk, .rst_n, .rise, .fall, .select, .capture, .shift,
                                 .update, .si, .so, .pi, .po);
  tdr_register #(.WIDTH(5), .HAS_UPDATE(1'b0)) dut_cap (.clk, .rst_n, .rise, .fall, .select,
                                 .capture, .shift, .update, .si, .so(so5), .pi(pi5), .po(po5));

  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d, r = 1, f = 1);
    @(negedge clk); capture = c; shift = s; update = u; si = d; rise = r; fall = f;
    @(posedge clk); #1;
    capture = 0; shift = 0; update = 0;
  endtask

  initial begin
    logic [7:0] cap_v, in_v, out_v, keep;
    repeat (2) @(posedge clk);
    rst_n = 1;
    select = 1;
    for (int n = 0; n < 50; n++) begin
      cap_v = 8'($urandom); in_v = 8'($urandom);
      pi = cap_v; pi5 = cap_v[4:0];
      cyc(1, 0, 0, 0);
      checks++; if (po5 !== cap_v[4:0]) begin failures++; $display("capture-only po %h", po5); end
      for (int i = 0; i < 8; i++) begin
        out_v[i] = so;
        cyc(0, 1, 0, in_v[i]);
      end
      checks++; if (out_v !== cap_v) begin failures++; $display("so %h expected %h", out_v, cap_v); end
      checks++; if (po5 !== in_v[7:3]) begin failures++; $display("capture-only shifted %h", po5); end
      keep = po;
      // a shift without rise and an update without fall do nothing
      cyc(0, 1, 0, 1'b1, 0, 1);
      cyc(0, 0, 1, 1'b0, 1, 0);
      checks++; if (po !== keep) begin failures++; $display("update without fall"); end
      cyc(0, 0, 1, 0);
      checks++; if (po !== in_v) begin failures++; $display("po %h expected %h", po, in_v); end
      // unselected: no change
      select = 0;
      cyc(0, 1, 0, 1); cyc(0, 0, 1, 0);
      select = 1;
      checks++; if (po !== in_v) begin failures++; $display("changed while unselected"); end
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
