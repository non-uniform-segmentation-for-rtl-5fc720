// nus_pkg -- shared constants and types of the non-uniform segmentation
// function evaluators.
//
// The evaluators approximate a function with one straight line per segment,
// p(x) = c1*x + c0, where segments are chosen so that the segment that holds
// an input can be found with a prefix OR cascade (leading zeros) and a prefix
// AND cascade (leading ones). This package holds the two configurations the
// design uses: sqrt(-ln x) on a 32-bit input and cos(2*pi*x) on [0, 1/4] with
// a 14-bit folded argument (used for both cosine and sine). The coefficient
// widths (c1, c_s1, c0, c_s0) and segment counts (59 and 21) follow the
// published numbers; the tap masks, internal fraction widths and output
// formats are this design's own choices.
package nus_pkg;

  // ---------------------------------------------------------------- sqrt(-ln x)
  // Input x = X / 2^32, output unsigned Q3.13.
  localparam int unsigned SQ_XW   = 32;
  localparam int unsigned SQ_IB   = 0;    // one interval: all bits non-uniform
  localparam int unsigned SQ_NSEG = 59;
  localparam int unsigned SQ_C1W  = 6;
  localparam int unsigned SQ_S1W  = 5;
  localparam int unsigned SQ_C0W  = 32;
  localparam int unsigned SQ_S0W  = 5;
  localparam int unsigned SQ_F    = 24;   // fraction bits of the sum
  localparam int unsigned SQ_YW   = 16;
  localparam int unsigned SQ_YF   = 13;
  // OR tap k marks a boundary at X = 2^k, AND tap k one at X = 2^32 - 2^k.
  localparam logic [30:0] SQ_OR_TAPS  = 31'h7fff_fffc;  // 2^2 .. 2^30
  localparam logic [31:0] SQ_AND_TAPS = 32'hffff_fff8;  // 1-2^-1 .. 1-2^-29
  localparam string       SQ_ROM_FILE = "rtl/nus_sqrtln_coef.hex";

  // ------------------------------------------------------ cos(2*pi*x), x<1/4
  // Folded argument r = R / 2^16 with R 14 bits; four uniform intervals of
  // 12-bit segment fields. Output unsigned Q1.14.
  localparam int unsigned CS_XW   = 14;
  localparam int unsigned CS_IB   = 2;
  localparam int unsigned CS_NSEG = 21;
  localparam int unsigned CS_C1W  = 8;
  localparam int unsigned CS_S1W  = 4;
  localparam int unsigned CS_C0W  = 16;
  localparam int unsigned CS_S0W  = 4;
  localparam int unsigned CS_F    = 20;
  localparam int unsigned CS_YW   = 15;
  localparam int unsigned CS_YF   = 14;
  // Index [i] holds the taps of interval i.
  localparam logic [3:0][10:0] CS_OR_TAPS  = {11'h000, 11'h700, 11'h500, 11'h600};
  localparam logic [3:0][11:0] CS_AND_TAPS = {12'h000, 12'h600, 12'he20, 12'hf00};
  localparam string            CS_ROM_FILE = "rtl/nus_cos_coef.hex";

  // Width of the folded trigonometric argument and of the signed outputs.
  localparam int unsigned TRIG_XW = 16;   // full input, one turn = 2^16
  localparam int unsigned TRIG_OW = 16;   // signed Q2.14 cos / sin

  // What the sign stage needs to know about a folded trigonometric input.
  typedef struct packed {
    logic neg;    // result is the negated table value
    logic zero;   // argument was exactly a quarter turn: result is 0
  } fold_t;

endpackage
