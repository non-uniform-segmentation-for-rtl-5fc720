// nus_gauss_func_top -- the function evaluators of a Box-Muller Gaussian
// noise generator: sqrt(-ln u0), cos(2*pi*u1) and sin(2*pi*u1).
//
// u0 is a 32-bit uniform fraction (u0 = U0 / 2^32, U0 > 0) evaluated by a
// single 59-segment non-uniform table whose segments shrink by halves
// towards 0 and towards 1, where the function is least linear. u1 is a
// 16-bit fraction of a turn; cosine and sine come from one shared
// 21-segment quarter-wave table (nus_sincos_eval). The two tables hold
// 59*48 + 21*32 = 3504 bits.
//
// Interface: in_valid with u0 and u1; out_valid with ln_y (unsigned Q3.13),
// cos_y and sin_y (signed Q2.14) LATENCY = 7 clocks later, a new input
// accepted every clock. The sqrt(-ln) result is delayed by two registers so
// that all three results leave together. Reset (rst_n, asynchronous, active
// low) clears only the valid pipeline. The split into these evaluators
// follows the published design; the pipeline depth and number formats are
// this design's own.
module nus_gauss_func_top (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [31:0]        u0,
  input  logic [15:0]        u1,
  output logic               out_valid,
  output logic [15:0]        ln_y,
  output logic signed [15:0] cos_y,
  output logic signed [15:0] sin_y
);
  import nus_pkg::*;

  localparam int unsigned LN_LAT = 5;
  localparam int unsigned LATENCY = 7;

  logic [0:0][SQ_YW-1:0] ln_raw;
  logic                  ln_valid;

  nus_func_eval #(
    .NCH(1), .XW(SQ_XW), .IB(SQ_IB), .NSEG(SQ_NSEG),
    .OR_TAPS(SQ_OR_TAPS), .AND_TAPS(SQ_AND_TAPS),
    .C1W(SQ_C1W), .S1W(SQ_S1W), .C0W(SQ_C0W), .S0W(SQ_S0W),
    .F(SQ_F), .YW(SQ_YW), .YF(SQ_YF), .ROM_FILE(SQ_ROM_FILE)
  ) u_sqrtln (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(u0),
    .out_valid(ln_valid), .y(ln_raw)
  );

  logic sc_valid;

  nus_sincos_eval #(.XW(16), .OW(16)) u_sincos (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(u1),
    .out_valid(sc_valid), .cos_y(cos_y), .sin_y(sin_y)
  );

  // Align the sqrt(-ln) result with the trigonometric results.
  logic [LATENCY-LN_LAT-1:0][SQ_YW-1:0] ln_dly;
  always_ff @(posedge clk) begin
    ln_dly[0] <= ln_raw[0];
    for (int i = 1; i < LATENCY - LN_LAT; i++) ln_dly[i] <= ln_dly[i-1];
  end
  assign ln_y      = ln_dly[LATENCY-LN_LAT-1];
  assign out_valid = sc_valid;

  // Both evaluators see the same valid stream.
  logic [LATENCY-LN_LAT-1:0] lnv_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lnv_dly <= '0;
    else        lnv_dly <= {lnv_dly[LATENCY-LN_LAT-2:0], ln_valid};
  end

  assert property (@(posedge clk) lnv_dly[LATENCY-LN_LAT-1] == sc_valid)
    else $error("nus_gauss_func_top: evaluator pipelines out of step");

endmodule
