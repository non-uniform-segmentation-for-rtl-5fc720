// nus_addr_gen_tb -- checks the interval/segment address generator in the
// cosine configuration (four intervals, per-interval taps) exhaustively and
// in a single-interval 32-bit configuration on random inputs. The expected
// address is the number of segments below the input, counted from the
// boundary list of every interval.
module nus_addr_gen_tb;
  import nus_pkg::*;
  import nus_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [13:0] xc;
  logic [4:0]  ac;
  nus_addr_gen #(.XW(CS_XW), .IB(CS_IB), .NSEG(CS_NSEG), .OR_TAPS(CS_OR_TAPS),
                 .AND_TAPS(CS_AND_TAPS)) u_cs (.x(xc), .addr(ac));

  logic [31:0] xs;
  logic [5:0]  as_;
  nus_addr_gen #(.XW(SQ_XW), .IB(SQ_IB), .NSEG(SQ_NSEG), .OR_TAPS(SQ_OR_TAPS),
                 .AND_TAPS(SQ_AND_TAPS)) u_sq (.x(xs), .addr(as_));

  function automatic int exp_cs(int x);
    int iv = x >> 12, a = 0;
    for (int j = 0; j < iv; j++)
      a += $countones(CS_OR_TAPS[j]) + $countones(CS_AND_TAPS[j]) + 1;
    return a + ref_seg(x & 12'hfff, 12, 64'(CS_OR_TAPS[iv]), 64'(CS_AND_TAPS[iv]));
  endfunction

  initial begin
    int e, prev;
    prev = 0;
    for (int v = 0; v < (1 << 14); v++) begin
      xc = 14'(v);
      #1;
      e = exp_cs(v);
      checks++;
      if (int'(ac) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cos x=%h addr=%0d exp=%0d", v, ac, e);
      end
      // addresses never decrease and never skip
      checks++;
      if (int'(ac) < prev || int'(ac) > prev + 1) failures++;
      prev = int'(ac);
    end
    checks++;
    if (prev != CS_NSEG - 1) begin failures++; $display("FAIL last address %0d", prev); end

    for (int i = 0; i < 5000; i++) begin
      xs = $urandom;
      if (i % 2 == 0) xs = xs >> ($urandom % 32);
      else            xs = ~(xs >> ($urandom % 32));
      #1;
      e = ref_seg(xs, 32, 64'(SQ_OR_TAPS), 64'(SQ_AND_TAPS));
      checks++;
      if (int'(as_) != e) begin
        failures++;
        if (failures < 10) $display("FAIL sq x=%h addr=%0d exp=%0d", xs, as_, e);
      end
    end
    xs = 32'hffff_ffff; #1; checks++; if (as_ != 6'(SQ_NSEG - 1)) failures++;
    xs = 32'h0;         #1; checks++; if (as_ != 6'd0) failures++;
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
