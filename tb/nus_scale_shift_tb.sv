// nus_scale_shift_tb -- checks power-of-two scaling: for s >= 0 the output
// must equal in*2^s, for s < 0 the floor of in/2^-s, over random signed
// inputs and every scale factor.
module nus_scale_shift_tb;
  import nus_ref_pkg::*;

  int checks = 0, failures = 0;

  logic signed [15:0] in;
  logic signed [3:0]  s;
  logic signed [23:0] out;

  nus_scale_shift #(.IW(16), .SW(4), .OW(24)) dut (.in(in), .s(s), .out(out));

  initial begin
    longint e;
    real    q;
    for (int i = 0; i < 20000; i++) begin
      in = 16'($urandom);
      s  = 4'(i % 16);
      #1;
      if (s >= 0) e = longint'(in) * (longint'(1) << s);
      else begin
        q = $floor(real'(in) / real'(longint'(1) << (-s)));
        e = longint'(q);
      end
      checks++;
      if (longint'(out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL in=%0d s=%0d out=%0d exp=%0d", in, s, out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
