// nus_trig_fold_tb -- exhaustive check of the quarter-wave folding: for
// every 16-bit input and both functions, sign * cos(2*pi*arg/2^16) must
// equal cos(2*pi*x) or sin(2*pi*x), the argument must lie in [0, 1/4), and
// the zero flag must be set exactly for the quarter-turn cases.
module nus_trig_fold_tb;
  import nus_pkg::*;
  import nus_ref_pkg::*;

  int checks = 0, failures = 0;
  logic        is_sin;
  logic [15:0] x;
  logic [13:0] arg;
  fold_t       info;

  nus_trig_fold dut (.is_sin(is_sin), .x(x), .arg(arg), .info(info));

  initial begin
    real got, want;
    int  zeros = 0;
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 65536; v++) begin
        is_sin = f[0];
        x = 16'(v);
        #1;
        want = f ? f_sin(v) : f_cos(v);
        if (info.zero) got = 0.0;
        else got = (info.neg ? -1.0 : 1.0) * f_cos(arg);
        checks++;
        if (fabs(got - want) > 1e-9) begin
          failures++;
          if (failures < 10) $display("FAIL sin=%0d x=%h arg=%h neg=%0d zero=%0d", f, v, arg, info.neg, info.zero);
        end
        if (info.zero) zeros++;
      end
    end
    checks++;
    if (zeros != 4) begin failures++; $display("FAIL %0d quarter-turn flags, expected 4", zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
