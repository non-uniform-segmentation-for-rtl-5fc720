// nus_sincos_eval -- cos(2*pi*x) and sin(2*pi*x) from one quarter-wave table.
//
// Both results come from cosine evaluators on [0, 1/4] that share a single
// dual-ported table of 21 segments: the argument range is split into four
// uniform intervals, and each interval is split non-uniformly with its own
// choice of prefix-cascade taps. The coefficients are c1 8 bits, c_s1 4,
// c0 16 and c_s0 4 (the published widths).
//
// Interface: in_valid with x (one turn = 2^16) in; out_valid with cos_y and
// sin_y, signed Q2.14, LATENCY = 7 clocks later; one input per clock.
//   1 fold registered   2..6 nus_func_eval (2 channels)   7 sign restore
module nus_sincos_eval #(
  parameter int unsigned XW = nus_pkg::TRIG_XW,
  parameter int unsigned OW = nus_pkg::TRIG_OW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [XW-1:0]        x,
  output logic                 out_valid,
  output logic signed [OW-1:0] cos_y,
  output logic signed [OW-1:0] sin_y
);
  import nus_pkg::*;

  localparam int unsigned EVAL_LAT = 5;

  // ---- stage 1: fold both arguments
  logic [1:0][XW-3:0] arg_d, arg_q;
  fold_t [1:0]        info_d;
  fold_t [EVAL_LAT:0][1:0] info_pipe;
  logic               v1_q;

  nus_trig_fold #(.XW(XW)) u_fold_cos (.is_sin(1'b0), .x(x), .arg(arg_d[0]), .info(info_d[0]));
  nus_trig_fold #(.XW(XW)) u_fold_sin (.is_sin(1'b1), .x(x), .arg(arg_d[1]), .info(info_d[1]));

  always_ff @(posedge clk) begin
    arg_q        <= arg_d;
    info_pipe[0] <= info_d;
    for (int i = 1; i <= EVAL_LAT; i++) info_pipe[i] <= info_pipe[i-1];
  end

  // ---- stages 2..6: shared-table evaluator
  logic [1:0][CS_YW-1:0] yv;
  logic                  ev_valid;

  nus_func_eval #(
    .NCH(2), .XW(CS_XW), .IB(CS_IB), .NSEG(CS_NSEG),
    .OR_TAPS(CS_OR_TAPS), .AND_TAPS(CS_AND_TAPS),
    .C1W(CS_C1W), .S1W(CS_S1W), .C0W(CS_C0W), .S0W(CS_S0W),
    .F(CS_F), .YW(CS_YW), .YF(CS_YF), .ROM_FILE(CS_ROM_FILE)
  ) u_eval (
    .clk(clk), .rst_n(rst_n), .in_valid(v1_q), .x(arg_q),
    .out_valid(ev_valid), .y(yv)
  );

  // ---- stage 7: signs
  nus_trig_sign #(.YW(CS_YW), .OW(OW)) u_sign_cos (
    .clk(clk), .y(yv[0]), .info(info_pipe[EVAL_LAT][0]), .out(cos_y));
  nus_trig_sign #(.YW(CS_YW), .OW(OW)) u_sign_sin (
    .clk(clk), .y(yv[1]), .info(info_pipe[EVAL_LAT][1]), .out(sin_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1_q, out_valid} <= '0;
    else        {v1_q, out_valid} <= {in_valid, ev_valid};
  end

endmodule
