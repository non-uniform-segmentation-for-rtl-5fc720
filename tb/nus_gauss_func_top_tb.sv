// nus_gauss_func_top_tb -- end-to-end test of the three evaluators at their
// default sizes, as a Box-Muller noise generator would use them.
// A stream of (u0, u1) pairs, with bursts of back-to-back inputs and idle
// gaps, is checked 7 clocks later: sqrt(-ln u0) must be within 2^-5 of the
// real value and match the integer model bit for bit; cos(2*pi*u1) and
// sin(2*pi*u1) must be within 0.0035 (plus half an output LSB). The test
// counts how often each mechanism of the design was used and fails if one
// never was: every segment of both tables, the leading-zero (OR cascade) and
// leading-one (AND cascade) regions, mirrored and negated quadrants, the
// quarter-turn zero case, full-rate bursts and idle gaps.
module nus_gauss_func_top_tb;
  import nus_pkg::*;
  import nus_ref_pkg::*;

  localparam int  LAT  = 7;
  localparam int  SQW  = SQ_C1W + SQ_S1W + SQ_C0W + SQ_S0W;
  localparam int  CSW  = CS_C1W + CS_S1W + CS_C0W + CS_S0W;
  localparam real TOL_TRIG = 0.0035 + 1.0 / 32768.0;
  localparam real TOL_LN   = 0.03125;
  localparam int  N    = 60000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic [31:0]        u0;
  logic [15:0]        u1;
  logic [15:0]        ln_y;
  logic signed [15:0] cos_y, sin_y;

  nus_gauss_func_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u0(u0), .u1(u1),
                          .out_valid(out_valid), .ln_y(ln_y), .cos_y(cos_y), .sin_y(sin_y));

  logic [SQW-1:0] sq_mem [SQ_NSEG];
  logic [CSW-1:0] cs_mem [CS_NSEG];
  int sq_hits [SQ_NSEG];
  int cs_hits [CS_NSEG];
  int n_or_region = 0, n_and_region = 0, n_mirror = 0, n_negate = 0, n_zero = 0;
  int n_burst = 0, n_gap = 0, run = 0;
  real max_ln = 0.0, max_trig = 0.0;

  // Expected cos(2*pi*(v - sh)/2^16) in Q2.14, and the table segment used.
  function automatic longint trig_model(int v, int sh, output int seg);
    int p = (v - sh) & 16'hffff;
    int q = p >> 14, r = p & 14'h3fff, a, iv;
    longint t;
    seg = -1;
    if ((q == 1 || q == 3) && r == 0) return 0;
    a   = (q == 1 || q == 3) ? (1 << 14) - r : r;
    iv  = a >> 12;
    seg = 0;
    for (int j = 0; j < iv; j++) seg += $countones(CS_OR_TAPS[j]) + $countones(CS_AND_TAPS[j]) + 1;
    seg += ref_seg(a & 12'hfff, 12, 64'(CS_OR_TAPS[iv]), 64'(CS_AND_TAPS[iv]));
    t = ref_word(a, 64'(cs_mem[seg]), CS_C1W, CS_S1W, CS_C0W, CS_S0W, CS_F, CS_YW, CS_YF);
    return (q == 1 || q == 2) ? -t : t;
  endfunction

  typedef struct { logic v; longint unsigned a; int b; } in_t;
  in_t inq [$];

  task automatic check_out(in_t it);
    int sg, sgc, sgs, q;
    longint e;
    real err;
    checks++;
    if (out_valid !== it.v) begin failures++; $display("FAIL valid"); end
    if (!it.v) return;
    // sqrt(-ln u0)
    sg = ref_seg(it.a, 32, 64'(SQ_OR_TAPS), 64'(SQ_AND_TAPS));
    sq_hits[sg]++;
    if (it.a[31]) n_and_region++; else n_or_region++;
    e = ref_word(longint'(it.a), 64'(sq_mem[sg]), SQ_C1W, SQ_S1W, SQ_C0W, SQ_S0W, SQ_F, SQ_YW, SQ_YF);
    err = fabs(real'(ln_y) / 8192.0 - f_sqrtln(it.a));
    if (err > max_ln) max_ln = err;
    checks += 2;
    if (longint'(ln_y) != e) begin failures++; if (failures < 10) $display("FAIL ln u0=%h y=%h exp=%h", it.a, ln_y, e); end
    if (err >= TOL_LN) begin failures++; if (failures < 10) $display("FAIL ln accuracy u0=%h", it.a); end
    // cos, sin
    checks += 4;
    if (longint'(cos_y) != trig_model(it.b, 0, sgc)) begin failures++; if (failures < 10) $display("FAIL cos u1=%h", it.b); end
    if (longint'(sin_y) != trig_model(it.b, 1 << 14, sgs)) begin failures++; if (failures < 10) $display("FAIL sin u1=%h", it.b); end
    err = fabs(real'(cos_y) / 16384.0 - f_cos(it.b));
    if (err > max_trig) max_trig = err;
    if (err > TOL_TRIG) begin failures++; if (failures < 10) $display("FAIL cos accuracy u1=%h", it.b); end
    err = fabs(real'(sin_y) / 16384.0 - f_sin(it.b));
    if (err > max_trig) max_trig = err;
    if (err > TOL_TRIG) begin failures++; if (failures < 10) $display("FAIL sin accuracy u1=%h", it.b); end
    if (sgc >= 0) cs_hits[sgc]++;
    if (sgs >= 0) cs_hits[sgs]++;
    if (sgc < 0 || sgs < 0) n_zero++;
    q = it.b >> 14;
    if (q == 1 || q == 3) n_mirror++;
    if (q == 1 || q == 2) n_negate++;
  endtask

  initial begin
    in_t it;
    $readmemh("rtl/nus_sqrtln_coef.hex", sq_mem);
    $readmemh("rtl/nus_cos_coef.hex", cs_mem);
    in_valid = 0; u0 = 1; u1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (inq.size() == LAT) check_out(inq.pop_front());
      // bursts of full-rate input alternating with sparse traffic
      in_valid = ((i / 500) % 2 == 0) ? 1'b1 : (($urandom % 4) == 0);
      u0 = $urandom;
      case (i % 3)
        0: u0 = u0 >> ($urandom % 32);
        1: u0 = ~(u0 >> ($urandom % 32));
        default: ;
      endcase
      if (u0 == 0) u0 = 1;
      u1 = 16'($urandom);
      if (i % 1000 == 7) u1 = 16'h4000;   // quarter turn
      if (i % 1000 == 9) u1 = 16'hc000;   // three quarters
      it.v = in_valid; it.a = u0; it.b = int'(u1);
      inq.push_back(it);
      if (in_valid) begin run++; end
      else begin
        if (run >= 100) n_burst++;
        if (run == 0) n_gap++;
        run = 0;
      end
    end
    repeat (LAT) begin
      @(negedge clk);
      check_out(inq.pop_front());
      in_valid = 0;
      it.v = 0;
      inq.push_back(it);
    end
    for (int s = 0; s < SQ_NSEG; s++) begin checks++; if (sq_hits[s] == 0) begin failures++; $display("FAIL ln segment %0d unused", s); end end
    for (int s = 0; s < CS_NSEG; s++) begin checks++; if (cs_hits[s] == 0) begin failures++; $display("FAIL cos segment %0d unused", s); end end
    $display("OR-cascade region %0d, AND-cascade region %0d, mirrored %0d, negated %0d, quarter-turn zero %0d, bursts %0d, idle gaps %0d",
             n_or_region, n_and_region, n_mirror, n_negate, n_zero, n_burst, n_gap);
    checks += 7;
    if (n_or_region == 0) failures++;
    if (n_and_region == 0) failures++;
    if (n_mirror == 0) failures++;
    if (n_negate == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_burst == 0) failures++;
    if (n_gap == 0) failures++;
    $display("max abs error: sqrt(-ln) %f, cos/sin %f", max_ln, max_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
