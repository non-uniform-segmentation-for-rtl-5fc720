// nus_seg_addr -- non-uniform segment address calculator.
//
// The SB-bit segment field s is fed to two prefix cascades that both start
// with the two top bits:
//   OR  cascade  o[k] = s[SB-1] | ... | s[k]   (k = SB-2 .. 0): o[k] = (s >= 2^k)
//   AND cascade  a[k] = s[SB-1] & ... & s[k]   (k = SB-1 .. 0): a[k] = (s >= 2^SB - 2^k)
// The OR taps therefore mark boundaries that double in size away from zero,
// the AND taps boundaries that halve towards the top of the range. Each tap
// can be taken or left out (or_en / and_en); an adder counts the taken taps
// that are 1, which is the number of boundaries at or below s, i.e. the index
// of the segment holding s. With every tap of an 8-bit field taken except
// a[7] (the top bit alone) this gives the 14 segments of the 8-bit example.
// The cascades and the counting adder follow the published circuit; the
// tap-enable inputs are how this design lets one calculator serve intervals
// with different tap choices. Purely combinational.
//
// PARALLEL = 0 builds the ripple cascades of the published circuit (one
// gate per bit, the longest path runs through all of them). PARALLEL = 1
// computes the same prefixes with a log-depth parallel-prefix network
// (Sklansky form): a shorter critical path for more gates, the trade-off
// the published text points to. Both give identical results.
module nus_seg_addr #(
  parameter int unsigned SB       = 8,
  parameter int unsigned SAW      = $clog2(2 * SB),
  parameter bit          PARALLEL = 1'b0
) (
  input  logic [SB-1:0] seg_bits,
  input  logic [SB-2:0] or_en,    // take OR tap k
  input  logic [SB-1:0] and_en,   // take AND tap k
  output logic [SAW-1:0] seg
);

  logic [SB-2:0] or_chain;
  logic [SB-1:0] and_chain;

  if (!PARALLEL) begin : g_ripple
    // Prefix cascades, one gate per bit.
    always_comb begin
      or_chain[SB-2]  = seg_bits[SB-1] | seg_bits[SB-2];
      for (int k = SB - 3; k >= 0; k--) or_chain[k] = or_chain[k+1] | seg_bits[k];
      and_chain[SB-1] = seg_bits[SB-1];
      for (int k = SB - 2; k >= 0; k--) and_chain[k] = and_chain[k+1] & seg_bits[k];
    end
  end else begin : g_tree
    // Element i of the prefix networks covers seg_bits[SB-1 .. SB-1-i].
    localparam int unsigned LV = $clog2(SB);
    logic [SB-1:0] por, pand;
    always_comb begin
      for (int i = 0; i < SB; i++) begin
        por[i]  = seg_bits[SB-1-i];
        pand[i] = seg_bits[SB-1-i];
      end
      // At level l every element with bit l set combines with the last
      // element of the block before it, which this level leaves unchanged.
      for (int l = 0; l < LV; l++)
        for (int i = 0; i < SB; i++)
          if (((i >> l) & 1) == 1) begin
            por[i]  = por[i]  | por[((i >> l) << l) - 1];
            pand[i] = pand[i] & pand[((i >> l) << l) - 1];
          end
      for (int k = 0; k < SB - 1; k++) or_chain[k] = por[SB-1-k];
      for (int k = 0; k < SB; k++)     and_chain[k] = pand[SB-1-k];
    end
  end

  // Adder counting the taken taps.
  logic [SB-2:0] or_taken;
  logic [SB-1:0] and_taken;
  assign or_taken  = or_chain & or_en;
  assign and_taken = and_chain & and_en;

  always_comb begin
    seg = '0;
    for (int k = 0; k < SB - 1; k++) seg += SAW'(or_taken[k]);
    for (int k = 0; k < SB; k++)     seg += SAW'(and_taken[k]);
  end

endmodule
