// nus_sincos_eval_tb -- sweeps every 16-bit input of the cosine/sine
// evaluator back to back and checks, 7 clocks later, both results against
// the real functions (error below 0.0035 plus half an output LSB) and bit
// for bit against a model: quadrant reduction done with integer arithmetic,
// segment found from the boundary list, table word evaluated in 64 bits.
// Then a random stream with gaps checks the valid pipeline.
module nus_sincos_eval_tb;
  import nus_pkg::*;
  import nus_ref_pkg::*;

  localparam int LAT = 7;
  localparam int W   = CS_C1W + CS_S1W + CS_C0W + CS_S0W;
  localparam real TOL = 0.0035 + 1.0 / 32768.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic [15:0]        x;
  logic signed [15:0] cos_y, sin_y;
  logic [W-1:0]       ref_mem [CS_NSEG];
  int                 quad_hits [2][4];
  real                max_err = 0.0;

  nus_sincos_eval dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                       .out_valid(out_valid), .cos_y(cos_y), .sin_y(sin_y));

  // Expected signed Q2.14 value of cos(2*pi*(v - sh)/2^16) where sh = 0 or 2^14.
  function automatic longint model(int v, int sh);
    int p = (v - sh) & 16'hffff;
    int q = p >> 14, r = p & 14'h3fff, a, iv, s;
    longint t;
    if (q == 1 || q == 3) begin
      if (r == 0) return 0;
      a = (1 << 14) - r;
    end else a = r;
    iv = a >> 12;
    s  = 0;
    for (int j = 0; j < iv; j++) s += $countones(CS_OR_TAPS[j]) + $countones(CS_AND_TAPS[j]) + 1;
    s += ref_seg(a & 12'hfff, 12, 64'(CS_OR_TAPS[iv]), 64'(CS_AND_TAPS[iv]));
    t = ref_word(a, 64'(ref_mem[s]), CS_C1W, CS_S1W, CS_C0W, CS_S0W, CS_F, CS_YW, CS_YF);
    return (q == 1 || q == 2) ? -t : t;
  endfunction

  int  xq [$];
  logic vq [$];

  task automatic check_out(int v, logic vexp);
    real ec, es;
    checks++;
    if (out_valid !== vexp) begin failures++; $display("FAIL valid for x=%h", v); end
    if (!vexp) return;
    checks += 4;
    if (longint'(cos_y) != model(v, 0))       begin failures++; if (failures < 10) $display("FAIL cos x=%h y=%0d exp=%0d", v, cos_y, model(v, 0)); end
    if (longint'(sin_y) != model(v, 1 << 14)) begin failures++; if (failures < 10) $display("FAIL sin x=%h y=%0d exp=%0d", v, sin_y, model(v, 1 << 14)); end
    ec = fabs(real'(cos_y) / 16384.0 - f_cos(v));
    es = fabs(real'(sin_y) / 16384.0 - f_sin(v));
    if (ec > max_err) max_err = ec;
    if (es > max_err) max_err = es;
    if (ec > TOL) begin failures++; if (failures < 10) $display("FAIL cos accuracy x=%h err=%f", v, ec); end
    if (es > TOL) begin failures++; if (failures < 10) $display("FAIL sin accuracy x=%h err=%f", v, es); end
    quad_hits[0][v >> 14]++;
    quad_hits[1][((v - (1 << 14)) & 16'hffff) >> 14]++;
  endtask

  initial begin
    $readmemh("rtl/nus_cos_coef.hex", ref_mem);
    in_valid = 0; x = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 65536 + 20000; i++) begin
      @(negedge clk);
      if (xq.size() == LAT) check_out(xq.pop_front(), vq.pop_front());
      if (i < 65536) begin in_valid = 1; x = 16'(i); end
      else begin in_valid = ($urandom % 3) != 0; x = 16'($urandom); end
      xq.push_back(int'(x));
      vq.push_back(in_valid);
    end
    for (int f = 0; f < 2; f++)
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (quad_hits[f][q] == 0) failures++;
      end
    $display("cos/sin: max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
