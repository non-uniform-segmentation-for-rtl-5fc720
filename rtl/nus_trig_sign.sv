// nus_trig_sign -- restores the sign of a folded cosine/sine value.
//
// Takes the unsigned table value y (in [0, 2), YF fraction bits) and the
// fold information from nus_trig_fold, and returns the signed result in OW
// bits with the same fraction: 0 for a flagged quarter turn, -y when the
// fold negated, y otherwise. Registered: one clock of latency.
module nus_trig_sign #(
  parameter int unsigned YW = nus_pkg::CS_YW,
  parameter int unsigned OW = nus_pkg::TRIG_OW
) (
  input  logic                 clk,
  input  logic [YW-1:0]        y,
  input  nus_pkg::fold_t       info,
  output logic signed [OW-1:0] out
);

  logic signed [OW-1:0] mag;
  assign mag = $signed(OW'(y));

  always_ff @(posedge clk) begin
    if (info.zero)     out <= '0;
    else if (info.neg) out <= -mag;
    else               out <= mag;
  end

endmodule
