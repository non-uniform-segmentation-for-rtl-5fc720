// nus_scale_shift -- power-of-two scaling by a signed scale factor.
//
// out = in * 2^s: a left shift for s >= 0 and an arithmetic right shift
// (rounding towards minus infinity) for s < 0. The input is sign-extended to
// OW bits first; OW must hold the largest left-shifted value. This is the
// scaling circuit applied to the c1*x product (by c_s1) and to c0 (by c_s0).
// That scaling is by shifting follows the published design; the signed
// scale encoding and the floor rounding are this design's choices.
// Combinational.
module nus_scale_shift #(
  parameter int unsigned IW = 16,
  parameter int unsigned SW = 4,
  parameter int unsigned OW = IW + (1 << (SW - 1))
) (
  input  logic signed [IW-1:0] in,
  input  logic signed [SW-1:0] s,
  output logic signed [OW-1:0] out
);

  logic signed [OW-1:0] ext;
  logic        [SW-1:0] mag;

  assign ext = OW'(in);   // sign extension of a signed operand
  assign mag = s[SW-1] ? SW'(-s) : SW'(s);

  assign out = s[SW-1] ? (ext >>> mag) : (ext <<< mag);

endmodule
