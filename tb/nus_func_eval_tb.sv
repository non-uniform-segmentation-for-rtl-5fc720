// nus_func_eval_tb -- end-to-end check of the sqrt(-ln x) evaluator at its
// default (full) size: 32-bit input, 59 segments.
// Each output is compared bit for bit with a model that finds the segment by
// comparing against the boundary list and evaluates the table word with
// 64-bit integers, and against the real function: the error must stay below
// one unit in the fifth fraction bit (2^-5), the 8-bit accuracy the design
// targets. Inputs are spread log-uniformly towards both ends so every
// segment is used; inputs arrive on most clocks, and the valid output must
// follow its input by exactly 5 clocks.
module nus_func_eval_tb;
  import nus_pkg::*;
  import nus_ref_pkg::*;

  localparam int LAT = 5;
  localparam int W   = SQ_C1W + SQ_S1W + SQ_C0W + SQ_S0W;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid, out_valid;
  logic [0:0][31:0]    x;
  logic [0:0][15:0]    y;
  logic [W-1:0]        ref_mem [SQ_NSEG];
  int                  seg_hits [SQ_NSEG];

  nus_func_eval dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                     .out_valid(out_valid), .y(y));

  longint unsigned xq [$];
  logic            vq [$];
  real             max_err = 0.0;

  function automatic logic [31:0] pick_x(int i);
    logic [31:0] r = $urandom;
    case (i % 4)
      0: r = r >> ($urandom % 32);          // towards 0
      1: r = ~(r >> ($urandom % 32));       // towards 1
      default: ;
    endcase
    if (r == 0) r = 1;                      // x = 0 is outside the domain
    return r;
  endfunction

  initial begin
    longint unsigned xv;
    logic            v;
    int              sg;
    longint          e;
    real             err;
    $readmemh("rtl/nus_sqrtln_coef.hex", ref_mem);
    in_valid = 0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      if (xq.size() == LAT) begin
        xv = xq.pop_front();
        v  = vq.pop_front();
        checks++;
        if (out_valid !== v) begin failures++; $display("FAIL valid at cycle %0d", i); end
        if (v) begin
          sg = ref_seg(xv, 32, 64'(SQ_OR_TAPS), 64'(SQ_AND_TAPS));
          seg_hits[sg]++;
          e  = ref_word(longint'(xv), 64'(ref_mem[sg]), SQ_C1W, SQ_S1W, SQ_C0W, SQ_S0W,
                        SQ_F, SQ_YW, SQ_YF);
          checks++;
          if (longint'(y[0]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h y=%h exp=%h", xv, y[0], e);
          end
          err = fabs(real'(y[0]) / 8192.0 - f_sqrtln(xv));
          if (err > max_err) max_err = err;
          checks++;
          if (err >= 0.03125) begin
            failures++;
            if (failures < 10) $display("FAIL accuracy x=%h y=%f f=%f", xv, real'(y[0]) / 8192.0, f_sqrtln(xv));
          end
        end
      end
      in_valid = ($urandom % 10) != 0;
      x[0]     = pick_x(i);
      if (i == 100) x[0] = 32'h0000_0001;   // smallest input: about 4.71
      if (i == 101) x[0] = 32'hffff_ffff;
      if (i == 102) x[0] = 32'h8000_0000;
      xq.push_back(x[0]);
      vq.push_back(in_valid);
    end
    for (int s = 0; s < SQ_NSEG; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin failures++; $display("FAIL segment %0d never used", s); end
    end
    $display("sqrt(-ln x): max abs error %f over the run", max_err);
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
