// nus_lin_datapath_tb -- drives the multiply/scale/add datapath (sqrt(-ln)
// widths) with random coefficients and inputs on every clock and compares
// each output, three clocks later, with a 64-bit integer model. Also checks
// the valid pipeline and the clamping at both ends of the output range.
module nus_lin_datapath_tb;
  import nus_ref_pkg::*;

  localparam int XW = 32, C1W = 6, S1W = 5, C0W = 32, S0W = 5, F = 24, YW = 16, YF = 13;
  localparam int LAT = 3;

  int checks = 0, failures = 0, clamps_lo = 0, clamps_hi = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid, out_valid;
  logic [XW-1:0]         x;
  logic signed [C1W-1:0] c1;
  logic signed [S1W-1:0] s1;
  logic signed [C0W-1:0] c0;
  logic signed [S0W-1:0] s0;
  logic [YW-1:0]         y;

  nus_lin_datapath #(.XW(XW), .C1W(C1W), .S1W(S1W), .C0W(C0W), .S0W(S0W),
                     .F(F), .YW(YW), .YF(YF)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .c1(c1), .s1(s1),
    .c0(c0), .s0(s0), .out_valid(out_valid), .y(y));

  longint exp_q [$];
  logic   vexp_q [$];

  initial begin
    longint e;
    logic   v;
    in_valid = 0; x = 0; c1 = 0; s1 = 0; c0 = 0; s0 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // check what entered LAT clocks ago
      if (exp_q.size() == LAT) begin
        e = exp_q.pop_front();
        v = vexp_q.pop_front();
        checks++;
        if (out_valid !== v) begin failures++; $display("FAIL valid"); end
        if (v) begin
          checks++;
          if (longint'(y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL y=%0d exp=%0d", y, e);
          end
          if (e == 0) clamps_lo++;
          if (e == (1 << YW) - 1) clamps_hi++;
        end
      end
      in_valid = ($urandom % 8) != 0;
      x  = $urandom;
      c1 = C1W'($urandom);
      s1 = S1W'($urandom);
      c0 = C0W'($urandom);
      s0 = S0W'($signed(5'($urandom % 24)) - 5'sd12);
      if (i % 3 == 0) begin       // realistic magnitudes around 0..8
        s1 = -5'sd12; s0 = -5'sd6;
        c0 = 32'($urandom % 32'h8000_0000);
      end
      exp_q.push_back(ref_lin(longint'(x), c1, s1, c0, s0, F, YW, YF));
      vexp_q.push_back(in_valid);
    end
    checks++;
    if (clamps_lo == 0 || clamps_hi == 0) begin
      failures++;
      $display("FAIL clamping not exercised lo=%0d hi=%0d", clamps_lo, clamps_hi);
    end
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
