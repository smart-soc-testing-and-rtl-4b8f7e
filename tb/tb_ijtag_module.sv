// tb_ijtag_module: the IJTAG-Module with three subnetworks modelled in this
// testbench as plain shift registers of 3, 5 and 2 bits that shift while
// their select is high. For every setting of the multiplexer control TDR
// (written through the SIB instruction and read back by capture) it checks
// the RSN path length under IJTAG and EXCFG (sum of the included
// subnetworks), the data order (subnetwork 2 first), the subnetwork selects,
// ExCfg, ConfigEn and the masking of the collected error.
module tb_ijtag_module;
  import ijtag_pkg::*;
  localparam int N = 3;
  localparam int L [N] = '{3, 5, 2};
  logic clk = 0, rst_n = 0;
  jtag_tap_t tap;
  logic [2:0] select, so;
  ijtag_tap_t ijtag_tap;
  ijtag_tdr_in_t  sub_in  [N];
  ijtag_tdr_out_t sub_out [N];
  logic config_lock = 0, error;
  logic [N-1:0] mux_ctrl, sub_err = '0;
  logic [7:0] sr [N];
  int checks = 0, failures = 0;

  ijtag_module #(.N(N)) dut (.clk, .rst_n, .tap, .select, .so, .ijtag_tap, .sub_in, .sub_out,
                             .config_lock, .error, .mux_ctrl);

  for (genvar i = 0; i < N; i++) begin : g_sub
    always_ff @(posedge clk) if (sub_in[i].select && ijtag_tap.shift) sr[i] <= {sub_in[i].si, sr[i][7:1]};
    assign sub_out[i].so    = sr[i][8-L[i]];
    assign sub_out[i].error = sub_err[i];
  end

  always #5 clk = ~clk;

  task automatic cyc(input logic c, s, u, d);
    @(negedge clk); tap = '{rise: 1'b1, fall: 1'b1, capture: c, shift: s, update: u, si: d};
    @(posedge clk); #1;
    tap.capture = 0; tap.shift = 0; tap.update = 0;
  endtask

  initial begin
    logic [63:0] a, r;
    int len;
    tap = '0; select = '0;
    for (int i = 0; i < N; i++) sr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
    for (int m = 0; m < 8; m++) begin
      // program the multiplexers through the SIB instruction
      select = 3'b010;
      for (int i = 0; i < N; i++) cyc(0, 1, 0, m[i]);
      cyc(0, 0, 1, 0);
      checks++; if (mux_ctrl !== 3'(m)) begin failures++; $display("mux_ctrl %b expected %b", mux_ctrl, m); end
      cyc(1, 0, 0, 0);
      for (int i = 0; i < N; i++) begin r[i] = so[1]; cyc(0, 1, 0, r[i]); end
      checks++; if (r[2:0] !== 3'(m)) begin failures++; $display("capture of control TDR %b", r[2:0]); end
      // RSN path length under IJTAG (rep 0,2) or EXCFG (rep 1)
      select = (rep == 1) ? 3'b100 : 3'b001;
      #1;
      checks++;
      if (ijtag_tap.excfg !== (rep == 1) || ijtag_tap.config_en !== !config_lock) begin failures++; $display("excfg/config_en"); end
      for (int i = 0; i < N; i++) begin
        checks++; if (sub_in[i].select !== m[i]) begin failures++; $display("select %0d", i); end
      end
      len = 0;
      for (int i = 0; i < N; i++) if (m[i]) len += L[i];
      a = {$urandom, $urandom};
      for (int i = 0; i < 40; i++) begin r[i] = so[(rep == 1) ? 2 : 0]; cyc(0, 1, 0, a[i]); end
      // (an empty network is a plain wire from si to so)
      checks++; if (len == 0 ? (so[0] !== tap.si) : ((((r >> len) ^ a) & ((64'd1 << (40 - len)) - 1)) != 0)) begin failures++; $display("path length for %b not %0d", m, len); end
      // order: with all three included, subnetwork 2 holds the last bits shifted
      // in, subnetwork 0 the earliest that are still in the path
      if (m == 7) begin
        checks++; if (sr[2][7:6] !== a[39:38] || sr[0][7:5] !== a[32:30])
          begin failures++; $display("subnetwork order"); end
      end
      // error collection, masked while configuration is enabled
      sub_err = 3'(m); config_lock = 1; #1;
      checks++; if (error !== (m != 0)) begin failures++; $display("error not reported"); end
      config_lock = 0; #1;
      checks++; if (error !== 1'b0) begin failures++; $display("error not masked"); end
      sub_err = '0;
      select = '0;
    end
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
