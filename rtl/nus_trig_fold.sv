// nus_trig_fold -- quarter-wave folding for cos(2*pi*x) and sin(2*pi*x).
//
// Only cos(2*pi*r) for r in [0, 1/4] is tabulated. A 16-bit input x (one
// turn = 2^16) is reduced using sin(2*pi*x) = cos(2*pi*(x - 1/4)) and the
// quadrant symmetries of the cosine: with p = x (cosine) or x - 2^14 (sine)
// and quadrant q = p[15:14], R = p[13:0],
//   q=0: cos(R)            q=1: -cos(2^14 - R)
//   q=2: -cos(R)           q=3:  cos(2^14 - R)
// The argument 2^14 - R equals a full quarter (cos = 0) when R = 0; that case
// is flagged as zero instead of being passed on. Using the symmetry to
// approximate only [0, 1/4] follows the published design; this reduction
// circuit is this design's own. Combinational.
module nus_trig_fold #(
  parameter int unsigned XW = nus_pkg::TRIG_XW
) (
  input  logic             is_sin,
  input  logic [XW-1:0]    x,
  output logic [XW-3:0]    arg,    // folded argument, r = arg / 2^XW
  output nus_pkg::fold_t   info
);

  logic [XW-1:0] p;
  logic [1:0]    q;
  logic [XW-3:0] r;
  logic          mirror;

  assign p      = x - (is_sin ? XW'(1) << (XW - 2) : '0);
  assign q      = p[XW-1 -: 2];
  assign r      = p[XW-3:0];
  assign mirror = q[0];

  assign arg       = mirror ? (XW-2)'(-r) : r;
  assign info.neg  = q[1] ^ q[0];
  assign info.zero = mirror && (r == '0);

endmodule
