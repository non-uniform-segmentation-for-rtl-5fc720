// nus_lin_datapath -- multiply, scale and add: y = c1*x*2^c_s1 + c0*2^c_s0.
//
// x is an unsigned XW-bit input, c1 and c0 signed coefficients and c_s1,
// c_s0 signed power-of-two scale factors. The sum is formed in units of
// 2^-F, then rounded to YF fraction bits (round half up) and clamped to the
// unsigned YW-bit output range. Internal widths are sized so that no scale
// factor can overflow them.
//
// Pipeline (one result per clock, latency 3):
//   1  c1*x product registered, c0 scaled and registered
//   2  product scaled by c_s1 and added to the scaled c0
//   3  rounding and clamping, output register
// The multiplier, the two scalers and the adder are the published
// architecture; the pipeline cut points and the rounding are this design's.
module nus_lin_datapath #(
  parameter int unsigned XW  = nus_pkg::CS_XW,
  parameter int unsigned C1W = nus_pkg::CS_C1W,
  parameter int unsigned S1W = nus_pkg::CS_S1W,
  parameter int unsigned C0W = nus_pkg::CS_C0W,
  parameter int unsigned S0W = nus_pkg::CS_S0W,
  parameter int unsigned F   = nus_pkg::CS_F,
  parameter int unsigned YW  = nus_pkg::CS_YW,
  parameter int unsigned YF  = nus_pkg::CS_YF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [XW-1:0]         x,
  input  logic signed [C1W-1:0] c1,
  input  logic signed [S1W-1:0] s1,
  input  logic signed [C0W-1:0] c0,
  input  logic signed [S0W-1:0] s0,
  output logic                  out_valid,
  output logic [YW-1:0]         y
);

  localparam int unsigned PW   = C1W + XW + 1;            // signed product
  localparam int unsigned T1W  = PW + (1 << (S1W - 1));
  localparam int unsigned T0W  = C0W + (1 << (S0W - 1));
  localparam int unsigned ACCW = ((T1W > T0W) ? T1W : T0W) + 1;
  localparam int unsigned SH   = F - YF;

  // ---- stage 1: multiplier, c0 scaler
  logic signed [PW-1:0]   prod_q;
  logic signed [S1W-1:0]  s1_q;
  logic signed [T0W-1:0]  t0_d, t0_q;
  logic                   v1_q;

  nus_scale_shift #(.IW(C0W), .SW(S0W), .OW(T0W)) u_sc0 (.in(c0), .s(s0), .out(t0_d));

  always_ff @(posedge clk) begin
    prod_q <= PW'(c1) * $signed({1'b0, x});
    s1_q   <= s1;
    t0_q   <= t0_d;
  end

  // ---- stage 2: product scaler and adder
  logic signed [T1W-1:0]  t1_d;
  logic signed [ACCW-1:0] acc_q;
  logic                   v2_q;

  nus_scale_shift #(.IW(PW), .SW(S1W), .OW(T1W)) u_sc1 (.in(prod_q), .s(s1_q), .out(t1_d));

  always_ff @(posedge clk) acc_q <= ACCW'(t1_d) + ACCW'(t0_q);

  // ---- stage 3: round to YF fraction bits and clamp
  logic signed [ACCW-1:0] rnd;
  logic [YW-1:0]          y_d;

  always_comb begin
    if (SH > 0) rnd = (acc_q + (ACCW'(1) <<< (SH - 1))) >>> SH;
    else        rnd = acc_q;
    if (rnd < 0)                                 y_d = '0;
    else if (rnd > $signed(ACCW'({YW{1'b1}})))   y_d = '1;
    else                                         y_d = rnd[YW-1:0];
  end

  always_ff @(posedge clk) y <= y_d;

  // ---- valid pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1_q, v2_q, out_valid} <= '0;
    else        {v1_q, v2_q, out_valid} <= {in_valid, v1_q, v2_q};
  end

endmodule
