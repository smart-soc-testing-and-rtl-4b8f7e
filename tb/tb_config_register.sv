// tb_config_register: two-phase writes into a 10-bit configuration register.
// For random values: shift in, update (value reaches the update stage only,
// output unchanged, mismatch flagged), update under EXCFG with any shift data
// (output takes the value, mismatch cleared), capture and shift out (returns
// the value). With config_en low, neither kind of update has any effect.
module tb_config_register;
  localparam int W = 10;
  logic clk = 0, rst_n = 0;
  logic select = 1, capture = 0, shift = 0, update = 0, excfg = 0, config_en = 1, si = 0;
  logic so, error;
  logic [W-1:0] po;
  int checks = 0, failures = 0;

  config_register #(.WIDTH(W)) dut (.clk, .rst_n, .rise(1'b1), .fall(1'b1), .select, .capture,
                                    .shift, .update, .excfg, .config_en, .si, .so, .po, .error);
  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d);
    @(negedge clk); capture = c; shift = s; update = u; si = d;
    @(posedge clk); #1;
    capture = 0; shift = 0; update = 0;
  endtask
  task automatic scan(input logic [W-1:0] din, output logic [W-1:0] dout);
    for (int i = 0; i < W; i++) begin dout[i] = so; cyc(0, 1, 0, din[i]); end
  endtask

  initial begin
    logic [W-1:0] v, old, r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (po !== '0 || error) failures++;
    old = '0;
    for (int n = 0; n < 30; n++) begin
      v = W'($urandom);
      if (v == old) v = ~old;
      excfg = 0; scan(v, r); cyc(0, 0, 1, 0);
      checks++; if (po !== old) begin failures++; $display("po changed before EXCFG"); end
      checks++; if (!error) begin failures++; $display("mismatch not flagged"); end
      excfg = 1; scan(W'($urandom), r); cyc(0, 0, 1, 0); excfg = 0;
      checks++; if (po !== v) begin failures++; $display("po %h expected %h", po, v); end
      checks++; if (error) begin failures++; $display("error after config"); end
      cyc(1, 0, 0, 0); scan('0, r);
      checks++; if (r !== v) begin failures++; $display("readback %h expected %h", r, v); end
      // locked: nothing changes
      config_en = 0;
      scan(~v, r); cyc(0, 0, 1, 0);
      excfg = 1; cyc(0, 0, 1, 0); excfg = 0;
      config_en = 1;
      checks++; if (po !== v || error) begin failures++; $display("changed while locked"); end
      old = v;
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
